// amplitude_estimator: Y_AMP = (1/N) * sum |y'_RES(m)| (BIST step 2).
//
// The absolute value is formed as in the published circuit, without a
// negator: the 23 magnitude bits of the 24-bit sample are inverted when the
// sign bit is set, and the sign bit is also the carry-in of the 35-bit
// accumulator adder, so a negative sample adds ~x + 1 = |x|. This also
// handles the most negative sample exactly.
//
// The accumulator is 35 bits and Y_AMP is 32 bits. This design takes the
// upper 32 accumulator bits, i.e. Y_AMP = sum / 2^(N_L2) with 8 fraction
// bits (unsigned fixed point, 24 integer bits, for N = 2048). Y_AMP is later
// loaded as the initial value of the reference generator's Register 2.
//
// Interface: `clear` (synchronous) zeroes the accumulator; each cycle with
// din_valid high adds |din|. y_amp is valid the cycle after the last add.
module amplitude_estimator
  import bist_pkg::*;
#(
  parameter int unsigned IN_W  = DEC_W,
  parameter int unsigned AW    = ACC_W,
  parameter int unsigned OUT_W = BSG_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   din_valid,
  input  logic signed [IN_W-1:0] din,
  output logic        [OUT_W-1:0] y_amp
);

  logic [AW-1:0]     acc_q;
  logic [IN_W-2:0]   mag_bits;
  logic              sgn;

  assign sgn      = din[IN_W-1];
  assign mag_bits = sgn ? ~din[IN_W-2:0] : din[IN_W-2:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         acc_q <= '0;
    else if (clear)     acc_q <= '0;
    else if (din_valid) acc_q <= acc_q + AW'(mag_bits) + AW'(sgn);
  end

  assign y_amp = acc_q[AW-1 -: OUT_W];

endmodule
