// systolic_counter: long binary counter with only local carry paths.
//
// The counter is cut into segments of SEG bits. A segment counts when inc
// is high and every lower segment is all ones; instead of forming that
// condition through a carry chain, each segment keeps a registered flag
// "all segments below me are all ones", recomputed every clock from the
// current count. The critical path is therefore one SEG-bit incrementer
// plus one gate, whatever WIDTH is. A change ripples through the flags one
// segment per clock, like a wave through a systolic array, so two
// increments must be at least NSEG clocks apart (NSEG = number of segments,
// 4 with the defaults; checked by an assertion); the thinning controller
// increments at most once every six clocks. clear (synchronous) wins over
// inc and also resets the flags. The published architecture only asks for
// a counter whose speed is independent of its length; the segment-and-flag
// structure is this design's choice.
module systolic_counter #(
  parameter int unsigned WIDTH = 15,
  parameter int unsigned SEG   = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             inc,
  output logic [WIDTH-1:0] count
);

  localparam int unsigned NSEG = (WIDTH + SEG - 1) / SEG;
  localparam int unsigned PADW = NSEG * SEG;

  logic [PADW-1:0] cnt_q;
  logic [NSEG-1:0] lower_ones_q;  // lower_ones_q[s]: segments 0..s-1 all ones
  logic [NSEG-1:0] seg_ones;      // segment s is all ones (within WIDTH)
  logic [PADW-1:0] pad_mask;

  always_comb begin
    pad_mask = '0;
    pad_mask[WIDTH-1:0] = '1;
    for (int s = 0; s < NSEG; s++)
      seg_ones[s] = &(cnt_q[s*SEG +: SEG] | ~pad_mask[s*SEG +: SEG]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q        <= '0;
      lower_ones_q <= '0;
      lower_ones_q[0] <= 1'b1;
    end else if (clear) begin
      cnt_q        <= '0;
      lower_ones_q <= '0;
      lower_ones_q[0] <= 1'b1;
    end else begin
      for (int s = 0; s < NSEG; s++) begin
        if (inc && lower_ones_q[s])
          cnt_q[s*SEG +: SEG] <= (cnt_q[s*SEG +: SEG] + 1'b1) & pad_mask[s*SEG +: SEG];
      end
      // Local flag pipeline: each flag looks only at its neighbour segment
      // and the neighbour's flag (one AND gate per segment).
      lower_ones_q[0] <= 1'b1;
      for (int s = 1; s < NSEG; s++)
        lower_ones_q[s] <= lower_ones_q[s-1] && seg_ones[s-1];
    end
  end

  assign count = cnt_q[WIDTH-1:0];

  // Increments must be spaced so that the flag wave has settled.
  localparam int unsigned GAPW = $clog2(NSEG + 1);
  logic [GAPW-1:0] gap_q;  // clocks since the last increment, saturating
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   gap_q <= GAPW'(NSEG);
    else if (clear)               gap_q <= GAPW'(NSEG);
    else if (inc)                 gap_q <= '0;
    else if (gap_q != GAPW'(NSEG)) gap_q <= gap_q + 1'b1;
  end

  a_inc_spacing: assert property (@(posedge clk) disable iff (!rst_n)
                                  (inc && !clear) |-> (gap_q >= GAPW'(NSEG - 1)))
    else $error("systolic_counter: increments closer than NSEG clocks");

endmodule
