// thdn_decision: THD+N pass/fail decision (BIST step 3).
//
// As in the published diagram, the threshold is subtracted from P_THDN and
// the sign of the difference is the decision: a negative difference
// (P_THDN below the threshold) passes. The difference is formed one bit
// wider than the operands so that the sign is exact.
//
// Interface: on `eval` (one cycle) the decision is registered into `pass`
// and `valid` is set; `clear` resets both.
module thdn_decision
  import bist_pkg::*;
#(
  parameter int unsigned W = PWR_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         eval,
  input  logic [W-1:0] p_thdn,
  input  logic [W-1:0] threshold,
  output logic         pass,
  output logic         valid
);

  logic [W:0] diff;
  assign diff = {1'b0, p_thdn} - {1'b0, threshold};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pass  <= 1'b0;
      valid <= 1'b0;
    end else if (clear) begin
      pass  <= 1'b0;
      valid <= 1'b0;
    end else if (eval) begin
      pass  <= diff[W];
      valid <= 1'b1;
    end
  end

endmodule
