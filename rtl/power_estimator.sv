// power_estimator: P_THDN = sum of y''_RES(m)^2 over N samples (step 3).
//
// Each valid 24-bit residue sample is squared by a serial shift-and-add
// multiplier (24 clocks, well inside the 128-clock sample period) and the
// 47-bit square is added to a 47-bit accumulator, following the published
// circuit. The 1/N of the definition is kept as a binary point: p_thdn is
// the mean power with N_LOG2 (11) fraction bits.
//
// This design's choices: the accumulator saturates at its maximum instead
// of wrapping, so a residue too large for 47 bits still reads as a large
// power (and fails the threshold); `ovf` flags that. A sample arriving
// while the multiplier is busy is lost, which cannot happen at the
// decimated rate.
//
// Interface: `clear` zeroes the accumulator; din_valid/din as for the other
// estimators. `busy` is high while a square is being formed or added;
// p_thdn is final once `busy` is low after the last sample.
module power_estimator
  import bist_pkg::*;
#(
  parameter int unsigned IN_W = DEC_W,
  parameter int unsigned PW   = PWR_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   din_valid,
  input  logic signed [IN_W-1:0] din,
  output logic                   busy,
  output logic [PW-1:0]          p_thdn,
  output logic                   ovf
);

  logic              mul_busy, mul_done;
  logic [2*IN_W-2:0] sq;
  logic [PW:0]       sum;

  serial_multiplier #(.W(IN_W)) u_mul (
    .clk, .rst_n,
    .start (din_valid),
    .din,
    .busy  (mul_busy),
    .done  (mul_done),
    .prod  (sq)
  );

  assign sum  = {1'b0, p_thdn} + (PW+1)'(sq);
  assign busy = mul_busy | mul_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_thdn <= '0;
      ovf    <= 1'b0;
    end else if (clear) begin
      p_thdn <= '0;
      ovf    <= 1'b0;
    end else if (mul_done) begin
      if (sum[PW]) begin
        p_thdn <= '1;
        ovf    <= 1'b1;
      end else begin
        p_thdn <= sum[PW-1:0];
      end
    end
  end

endmodule
