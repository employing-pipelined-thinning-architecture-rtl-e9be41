// temporal_register: buffer between the modification unit array and main
// memory.
//
// On load it captures the processed column d, and valid takes valid_in
// (low for execute steps that produce no real result, such as while the
// RAM bank is being primed). The column is written back to main memory in
// the store steps of the next execution cycle; stored marks the write as
// done and clears valid. The buffer follows the published architecture; the
// valid bit is this design's choice.
module temporal_register
  import thinning_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load,
  input  logic           valid_in,
  input  logic [PIX-1:0] d,
  input  logic           stored,
  output logic [PIX-1:0] q,
  output logic           valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q     <= '0;
      valid <= 1'b0;
    end else if (load) begin
      q     <= d;
      valid <= valid_in;
    end else if (stored) begin
      valid <= 1'b0;
    end
  end

endmodule
