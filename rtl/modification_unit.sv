// modification_unit: Zhang-Suen deletion test for one centre pixel.
//
// Purely combinational. p[0] is the centre pixel P1 and p[i-1] is Pi, with
// the neighbours numbered clockwise from the pixel above:
//     P9 P2 P3
//     P8 P1 P4
//     P7 P6 P5
// The centre pixel is deleted when all four conditions hold at once:
//   (a) 2 <= N <= 6, N the number of object neighbours;
//   (b) S == 1, S the number of 0->1 transitions around P2,P3,...,P9,P2;
//   (c)/(d) with step = 1: P2.P4.P6 = 0 and P4.P6.P8 = 0 (first pass),
//   (c')/(d') with step = 0: P2.P4.P8 = 0 and P2.P6.P8 = 0 (second pass).
// Both product pairs are formed in parallel and step selects one, so the
// four checks and the deletion are a single clock of logic. The conditions
// and the step multiplexer follow the published architecture; deleted (C) is
// read as "an object pixel was removed here".
module modification_unit (
  input  logic       step,
  input  logic [8:0] p,
  output logic       pix_out,
  output logic       deleted
);

  logic [7:0] nb;        // nb[i] = P(i+2): P2..P9
  logic [3:0] n_count;   // N(P1)
  logic [7:0] rise;      // 0->1 transition between consecutive neighbours
  logic [3:0] s_count;   // S(P1)
  logic       cond_a, cond_b, cond_c, cond_d;

  always_comb begin
    nb      = p[8:1];
    n_count = '0;
    s_count = '0;
    for (int i = 0; i < 8; i++) begin
      rise[i] = ~nb[i] & nb[(i + 1) % 8];
      n_count = n_count + 4'(nb[i]);
      s_count = s_count + 4'(rise[i]);
    end
    cond_a = (n_count >= 4'd2) && (n_count <= 4'd6);
    cond_b = (s_count == 4'd1);
    // P2 = nb[0], P4 = nb[2], P6 = nb[4], P8 = nb[6]
    cond_c = step ? ~(nb[0] & nb[2] & nb[4]) : ~(nb[0] & nb[2] & nb[6]);
    cond_d = step ? ~(nb[2] & nb[4] & nb[6]) : ~(nb[0] & nb[4] & nb[6]);
    deleted = p[0] & cond_a & cond_b & cond_c & cond_d;
    pix_out = p[0] & ~deleted;
  end

endmodule
