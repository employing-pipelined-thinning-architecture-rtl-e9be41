// register_sets: the three 10-bit register sets H, M and L.
//
// Each set is split into l (1 bit), m (8 bits) and r (1 bit) and holds one
// column of one image line plus the nearest pixel of each neighbouring
// column: H holds the line above the centre line, M the centre line and L
// the line below. Together the 30 bits are the windows of all eight pixels
// of the column. Each set works as a queue fed from its RAM module:
//   lr_load : l <= m[0]           (last pixel of the previous column)
//   mr_load : m <= RAM data        (the column being processed)
//   rr_load : r <= RAM data[7]     (first pixel of the next column)
// The loads happen in clock steps 1, 2 and 5 of the execution cycle. The
// border inputs are this design's choice: they load background (0) for
// pixels outside the image (l at the first column, r at the last column,
// all of H on the first line and all of L on the last line).
// Ports are registered; outputs are the packed words {l, m, r}.
module register_sets
  import thinning_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [2:0][PIX-1:0]    ram_data,   // [0]=RAM1 (H), [1]=RAM2 (M), [2]=RAM3 (L)
  input  logic                   lr_load,
  input  logic                   mr_load,
  input  logic                   rr_load,
  input  logic                   first_col,
  input  logic                   last_col,
  input  logic                   top_line,
  input  logic                   bottom_line,
  output logic [ROW_BITS-1:0]    row_h,
  output logic [ROW_BITS-1:0]    row_m,
  output logic [ROW_BITS-1:0]    row_l
);

  logic [2:0]          l_q, r_q;
  logic [2:0][PIX-1:0] m_q;
  logic [2:0]          row_zero;

  assign row_zero = {bottom_line, 1'b0, top_line};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l_q <= '0;
      m_q <= '0;
      r_q <= '0;
    end else begin
      for (int s = 0; s < 3; s++) begin
        if (lr_load) l_q[s] <= first_col ? 1'b0 : m_q[s][0];
        if (mr_load) m_q[s] <= row_zero[s] ? '0 : ram_data[s];
        if (rr_load) r_q[s] <= (last_col || row_zero[s]) ? 1'b0 : ram_data[s][PIX-1];
      end
    end
  end

  assign row_h = {l_q[0], m_q[0], r_q[0]};
  assign row_m = {l_q[1], m_q[1], r_q[1]};
  assign row_l = {l_q[2], m_q[2], r_q[2]};

endmodule
