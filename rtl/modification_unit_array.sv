// modification_unit_array: eight modification units that thin one column.
//
// Combinational. The three register-set words are packed {l, m[7:0], r}
// (bit 9 = l, bit 0 = r); row_h is the line above, row_m the centre line,
// row_l the line below. Unit 1 takes the centre pixel m[7] (leftmost, whose
// left neighbour is l) and unit 8 takes m[0] (whose right neighbour is r),
// so all eight share the same 30 input bits. pix_out is the processed
// column in the same bit order; any_deleted is the OR of the eight deletion
// flags and feeds the continue register. Eight units and the sharing of the
// 30 bits follow the published architecture.
module modification_unit_array
  import thinning_pkg::*;
(
  input  logic                step,
  input  logic [ROW_BITS-1:0] row_h,
  input  logic [ROW_BITS-1:0] row_m,
  input  logic [ROW_BITS-1:0] row_l,
  output logic [PIX-1:0]      pix_out,
  output logic                any_deleted
);

  logic [PIX-1:0] del;

  for (genvar b = 0; b < PIX; b++) begin : g_unit
    // Centre at word index b+1; word index b+2 is to its left, b to its right.
    logic [8:0] win;
    assign win = {row_h[b+2],   // P9  upper-left
                  row_m[b+2],   // P8  left
                  row_l[b+2],   // P7  lower-left
                  row_l[b+1],   // P6  below
                  row_l[b],     // P5  lower-right
                  row_m[b],     // P4  right
                  row_h[b],     // P3  upper-right
                  row_h[b+1],   // P2  above
                  row_m[b+1]};  // P1  centre
    modification_unit u_mu (
      .step    (step),
      .p       (win),
      .pix_out (pix_out[b]),
      .deleted (del[b])
    );
  end

  assign any_deleted = |del;

endmodule
