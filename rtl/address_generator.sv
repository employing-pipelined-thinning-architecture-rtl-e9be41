// address_generator: RAM-bank and main memory addresses.
//
// Three systolic counters, advanced by strobes from the controller:
//   ram pointer   : column address of the RAM bank, 0..COLS-1, wraps;
//   fetch pointer : main memory word fetched into RAM3, 0..COLS*LINES-1,
//                   wraps, so near the end of a pass it already reads the
//                   first lines again for the next pass;
//   store pointer : main memory word the temporal register is written to.
// Main memory has a single address bus, so mem_addr shows the store
// pointer when sel_store is high and the fetch pointer otherwise. init
// clears all three. Outputs are combinational from the counter registers.
// A counter-based generator follows the published architecture; the split into
// separate fetch and store pointers is this design's choice.
module address_generator #(
  parameter int unsigned COLS  = 64,
  parameter int unsigned LINES = 512,
  localparam int unsigned RAW  = (COLS > 1) ? $clog2(COLS) : 1,
  localparam int unsigned MAW  = $clog2(COLS * LINES)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           init,
  input  logic           ram_addr_inc,
  input  logic           fetch_inc,
  input  logic           store_inc,
  input  logic           sel_store,
  output logic [RAW-1:0] ram_addr,
  output logic [MAW-1:0] mem_addr
);

  localparam int unsigned WORDS = COLS * LINES;

  logic [MAW-1:0] fetch_ptr, store_ptr;
  logic           ram_wrap, fetch_wrap, store_wrap;

  assign ram_wrap   = ram_addr_inc && (ram_addr  == RAW'(COLS - 1));
  assign fetch_wrap = fetch_inc    && (fetch_ptr == MAW'(WORDS - 1));
  assign store_wrap = store_inc    && (store_ptr == MAW'(WORDS - 1));

  systolic_counter #(.WIDTH(RAW)) u_ram_cnt (
    .clk, .rst_n, .clear(init || ram_wrap), .inc(ram_addr_inc), .count(ram_addr)
  );

  systolic_counter #(.WIDTH(MAW)) u_fetch_cnt (
    .clk, .rst_n, .clear(init || fetch_wrap), .inc(fetch_inc), .count(fetch_ptr)
  );

  systolic_counter #(.WIDTH(MAW)) u_store_cnt (
    .clk, .rst_n, .clear(init || store_wrap), .inc(store_inc), .count(store_ptr)
  );

  assign mem_addr = sel_store ? store_ptr : fetch_ptr;

endmodule
