// continue_register: sticky "a pixel was deleted" flag.
//
// Set at a clock edge where sample and any_deleted are both high (an
// execute step in which a modification unit removed a pixel); cleared by
// clear, which wins over a set in the same clock. The controller clears it
// at the start of every iteration (a pair of sub-iteration passes) and
// reads cont at the end of the iteration: thinning goes on only while it
// is set. The flag itself follows the published architecture; clearing per
// iteration is this design's choice.
module continue_register (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic sample,
  input  logic any_deleted,
  output logic cont
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        cont <= 1'b0;
    else if (clear)                    cont <= 1'b0;
    else if (sample && any_deleted)    cont <= 1'b1;
  end

endmodule
