// ram_module: one on-chip line buffer of the RAM bank.
//
// DEPTH words of WIDTH bits; with the defaults, 64 columns of 8 pixels hold
// one 512-pixel image line. Synchronous single-port RAM: when rd is high,
// dout takes mem[addr] at the clock edge and then holds until the next
// read; when wr is high, mem[addr] takes din at the edge. The organisation
// (64 x 8) follows the published architecture; the read latency and output
// hold are this design's choice (a plain FPGA block RAM). The array is not
// reset: every word is written before it is read.
module ram_module #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic [AW-1:0]    addr,
  input  logic             rd,
  input  logic             wr,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr) mem[addr] <= din;
    if (rd) dout <= mem[addr];
  end

endmodule
