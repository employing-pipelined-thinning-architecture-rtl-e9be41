// thinning_processor: pipelined Zhang-Suen thinning engine.
//
// Thins a binary image (object = 1, background = 0) held in an external
// main memory, eight pixels per byte, line after line, bit 7 the leftmost
// pixel, IMG_W/8 bytes per line. Each main memory byte flows through the
// RAM bank (a rolling buffer of three image lines), into the three register
// sets (30 bits: one column of the line above, the centre line and the line
// below, plus one neighbour pixel on each side), through the eight-unit
// modification unit array, into the temporal register and back to its own
// address in main memory. The controller repeats this for every column of
// every line once per sub-iteration pass, alternating Step, until an
// iteration deletes nothing.
//
// Timing: one column per six clocks, so one pass of a 512 x 512 image takes
// 6 * 64 * 512 = 196,608 clocks (4.9 ms at 40 MHz); a run of P passes keeps
// busy high for 6 * COLS * (2 + P * IMG_H) + 6 clocks. Main memory port:
// mem_read / mem_write with mem_addr, held for two clocks per access;
// mem_rdata is expected one clock after a read and to hold afterwards.
// start is taken while busy is low; done pulses for one clock at the end.
// The block structure, widths and the six-step schedule follow the
// published architecture; pixels outside the image are treated as background, and
// the pass sequencing is this design's choice (see controller).
module thinning_processor
  import thinning_pkg::*;
#(
  parameter int unsigned IMG_W = DEF_IMG_W,
  parameter int unsigned IMG_H = DEF_IMG_H,
  localparam int unsigned COLS = IMG_W / PIX,
  localparam int unsigned MAW  = $clog2(COLS * IMG_H)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,
  output logic           done,
  output logic [MAW-1:0] mem_addr,
  output logic           mem_read,
  output logic           mem_write,
  output logic [PIX-1:0] mem_wdata,
  input  logic [PIX-1:0] mem_rdata
);

  localparam int unsigned RAW = (COLS > 1) ? $clog2(COLS) : 1;

  ctl_t                ctl;
  logic [RAW-1:0]      ram_addr;
  logic [2:0][PIX-1:0] ram_data;
  logic [ROW_BITS-1:0] row_h, row_m, row_l;
  logic [PIX-1:0]      mu_out;
  logic                any_deleted, cont, tmp_valid;

  controller #(.COLS(COLS), .LINES(IMG_H)) u_ctrl (
    .clk, .rst_n, .start,
    .cont, .any_deleted, .tmp_valid,
    .ctl, .busy, .done
  );

  address_generator #(.COLS(COLS), .LINES(IMG_H)) u_agen (
    .clk, .rst_n,
    .init         (ctl.init),
    .ram_addr_inc (ctl.ram_addr_inc),
    .fetch_inc    (ctl.fetch_inc),
    .store_inc    (ctl.store_inc),
    .sel_store    (ctl.sel_store),
    .ram_addr     (ram_addr),
    .mem_addr     (mem_addr)
  );

  ram_bank #(.COLS(COLS)) u_ram_bank (
    .clk,
    .ram_addr  (ram_addr),
    .ram_read  (ctl.ram_read),
    .ram_write (ctl.ram_write),
    .mem_data  (mem_rdata),
    .ram_data  (ram_data)
  );

  register_sets u_regs (
    .clk, .rst_n,
    .ram_data    (ram_data),
    .lr_load     (ctl.lr_load),
    .mr_load     (ctl.mr_load),
    .rr_load     (ctl.rr_load),
    .first_col   (ctl.first_col),
    .last_col    (ctl.last_col),
    .top_line    (ctl.top_line),
    .bottom_line (ctl.bottom_line),
    .row_h, .row_m, .row_l
  );

  modification_unit_array u_mua (
    .step        (ctl.step),
    .row_h, .row_m, .row_l,
    .pix_out     (mu_out),
    .any_deleted (any_deleted)
  );

  continue_register u_cont (
    .clk, .rst_n,
    .clear       (ctl.cont_clear),
    .sample      (ctl.tmp_load && ctl.exec_valid),
    .any_deleted (any_deleted),
    .cont        (cont)
  );

  temporal_register u_tmp (
    .clk, .rst_n,
    .load     (ctl.tmp_load),
    .valid_in (ctl.exec_valid),
    .d        (mu_out),
    .stored   (ctl.store_inc),
    .q        (mem_wdata),
    .valid    (tmp_valid)
  );

  assign mem_read  = ctl.mem_read;
  assign mem_write = ctl.mem_write;

  initial begin
    assert (IMG_W % PIX == 0 && IMG_W >= 2 * PIX)
      else $error("thinning_processor: IMG_W must be a multiple of 8, at least 16");
    assert (IMG_H >= 3)
      else $error("thinning_processor: IMG_H must be at least 3");
  end

endmodule
