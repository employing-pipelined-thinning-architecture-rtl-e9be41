// ram_bank: three RAM modules forming a rolling three-line buffer.
//
// RAM1 holds the line above the centre line, RAM2 the centre line and RAM3
// the line below, one column per address. All three share the column
// address. ram_read fetches the column from all three at once (data on
// ram_data one clock later, held until the next read). ram_write loads the
// column with the chain RAM1 <= RAM2, RAM2 <= RAM3, RAM3 <= mem_data, using
// the values fetched earlier in the same execution cycle, so after every
// column of a line has passed, the buffer has moved down by one image line
// and the newest line has come from main memory. The chained dataflow
// follows the published architecture; reusing the held read data for the load
// is this design's choice.
module ram_bank
  import thinning_pkg::*;
#(
  parameter int unsigned COLS = 64,
  localparam int unsigned AW  = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic                clk,
  input  logic [AW-1:0]       ram_addr,
  input  logic                ram_read,
  input  logic                ram_write,
  input  logic [PIX-1:0]      mem_data,
  output logic [2:0][PIX-1:0] ram_data
);

  logic [2:0][PIX-1:0] wdata;

  assign wdata = {mem_data, ram_data[2], ram_data[1]};

  for (genvar i = 0; i < 3; i++) begin : g_ram
    ram_module #(.DEPTH(COLS), .WIDTH(PIX)) u_ram (
      .clk  (clk),
      .addr (ram_addr),
      .rd   (ram_read),
      .wr   (ram_write),
      .din  (wdata[i]),
      .dout (ram_data[i])
    );
  end

endmodule
