// residue_mux: single-bit-side subtractor and source MUX in front of the
// decimation filter.
//
// In BIST steps 1 and 2 the decimation filter sees the MUT bit-stream
// itself. In step 3 it sees the MUT bit-stream minus the phase-compensated
// reference bit-stream, which removes the stimulus tone before decimation.
// Doing the subtraction on the single-bit side (a 2-bit result) instead of
// after the decimation filter is the published architecture.
//
// Number format (this design's choice): the output is a 2-bit two's
// complement value. With SRC_MUT it is the normalized bit-stream
// y = 2*D - 1 (+1 or -1). With SRC_DIFF it is D_MUT - D_REF (-1, 0 or +1),
// which equals (y_MUT - y_REF)/2, i.e. half the scale of SRC_MUT. The
// controller halves the offset it subtracts in step 3 to match.
//
// Interface: combinational.
module residue_mux
  import bist_pkg::*;
(
  input  dec_src_e          sel,
  input  logic              d_mut,
  input  logic              d_ref,
  output logic signed [1:0] dout
);

  always_comb begin
    if (sel == SRC_DIFF) dout = $signed({1'b0, d_mut}) - $signed({1'b0, d_ref});
    else                 dout = d_mut ? 2'sd1 : -2'sd1;
  end

endmodule
