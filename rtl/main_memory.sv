// main_memory: image store for the thinning processor.
//
// WORDS bytes (32768 by default: a 512 x 512 binary image, eight pixels per
// byte, line after line, bit 7 the leftmost pixel). One address bus and
// separate input and output data buses. Synchronous: when wr is high,
// mem[addr] takes din at the clock edge; when rd is high, dout takes
// mem[addr] at the edge and holds until the next read. The size and the
// bus arrangement follow the published architecture; the one-clock read
// latency is this design's choice. Contents are not reset.
module main_memory #(
  parameter int unsigned WORDS = 32768,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          rd,
  input  logic          wr,
  input  logic [7:0]    din,
  output logic [7:0]    dout
);

  logic [7:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (wr) mem[addr] <= din;
    if (rd) dout <= mem[addr];
  end

endmodule
