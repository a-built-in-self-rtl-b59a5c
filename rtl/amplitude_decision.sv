// amplitude_decision: amplitude response decision maker (BIST step 2).
//
// Checks that the estimated output amplitude Y_AMP lies inside the
// specification window [lo, hi] (limits inclusive, unsigned). A gain error
// of the ADC moves Y_AMP out of the window. The published design names the
// block and its purpose; the window comparison and its limits as two
// programmable words are this design's choices.
//
// Interface: on `eval` (one cycle) the decision is registered into `pass`
// and `valid` is set; `clear` resets both.
module amplitude_decision
  import bist_pkg::*;
#(
  parameter int unsigned W = BSG_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         eval,
  input  logic [W-1:0] y_amp,
  input  logic [W-1:0] lo,
  input  logic [W-1:0] hi,
  output logic         pass,
  output logic         valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pass  <= 1'b0;
      valid <= 1'b0;
    end else if (clear) begin
      pass  <= 1'b0;
      valid <= 1'b0;
    end else if (eval) begin
      pass  <= (y_amp >= lo) && (y_amp <= hi);
      valid <= 1'b1;
    end
  end

endmodule
