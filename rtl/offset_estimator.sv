// offset_estimator: Y_OS = (1/N) * sum of N decimated samples (BIST step 1).
//
// A 35-bit accumulator adds each valid 24-bit sample, as in the published
// circuit. Because N is a power of two, dividing by N is a bit selection:
// y_os is the accumulator shifted right arithmetically by N_L2 and
// truncated to the sample width (rounding toward minus infinity, this
// design's choice). AW must be at least IN_W + N_L2.
//
// Interface: `clear` (synchronous) zeroes the accumulator; each cycle with
// din_valid high adds din. The caller counts the N samples. y_os is valid
// the cycle after the last sample is added.
module offset_estimator
  import bist_pkg::*;
#(
  parameter int unsigned IN_W = DEC_W,
  parameter int unsigned AW   = ACC_W,
  parameter int unsigned N_L2 = N_LOG2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   din_valid,
  input  logic signed [IN_W-1:0] din,
  output logic signed [IN_W-1:0] y_os
);

  logic signed [AW-1:0] acc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         acc_q <= '0;
    else if (clear)     acc_q <= '0;
    else if (din_valid) acc_q <= acc_q + AW'(din);
  end

  // arithmetic shift right by N_L2, truncated to IN_W bits
  assign y_os = acc_q[N_L2 +: IN_W];

endmodule
