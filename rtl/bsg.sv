// bsg: bit-stream generator (used twice: stimulus SBSG and reference RBSG).
//
// A digital resonator drives an embedded single-bit second-order digital
// sigma-delta modulator, and the modulator's output bit closes the
// resonator loop, so no multiplier is needed:
//   v2 = R2 + (d ? -a21 : +a21)     R2 <= v2      (Register 2)
//   v1 = R1 + v2 * a12              R1 <= v1      (Register 1), a12 = 2^-6
//   v1 is the sinusoid A_S*X_BIST fed to the modulator.
// The modulator has a delay-free first integrator and a delaying second
// integrator, both with full-scale feedback, which gives STF = z^-1 and
// NTF = (1 - z^-1)^2; the output bit is the sign of the second integrator.
// The tone frequency is f_CLK*acos(1 - a12*a21/2)/(2*pi). Register 1 starts
// at zero and Register 2 at the amplitude word, so the tone's peak value is
// amp*sqrt(a12/a21) (to first order in a12*a21).
//
// Structure, widths (32-bit resonator, 34-bit integrators) and a12 follow
// the published schematic. Which MUX input the output bit selects (-a21
// for a one, so the loop is a negative-feedback resonator), the full-scale
// level 2^30, two's-complement wrap-around and the synchronous load are
// this design's choices.
//
// Interface: `load` (synchronous, held for one or more cycles) sets
// R1 = 0, R2 = amp and clears the modulator; the generator runs on every
// clock while `load` is low. d_bsg is registered: it changes one clock
// after each edge and is the bit of D_BSG for the current cycle.
module bsg
  import bist_pkg::*;
#(
  parameter int unsigned W      = BSG_W,
  parameter int unsigned IW     = DSM_W,
  parameter int unsigned FS_L2  = FS_LOG2,
  parameter int unsigned SHIFT  = A12_SHIFT
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic signed [W-1:0] amp,    // initial value of Register 2
  input  logic signed [W-1:0] a21,    // frequency word
  output logic                d_bsg   // 1 = +1, 0 = -1
);

  logic signed [W-1:0]  r1_q, r2_q;      // Register 1, Register 2
  logic signed [IW-1:0] i1_q, i2_q;      // modulator integrators
  logic signed [W-1:0]  v1, v2;
  logic signed [IW-1:0] u, fb, i1_n;

  localparam logic signed [IW-1:0] FS = IW'(1) <<< FS_L2;

  assign d_bsg = ~i2_q[IW-1];

  always_comb begin
    v2   = r2_q + (d_bsg ? -a21 : a21);
    v1   = r1_q + (v2 >>> SHIFT);
    u    = IW'(v1);                      // sign-extended
    fb   = d_bsg ? FS : -FS;
    i1_n = i1_q + u - fb;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1_q <= '0;
      r2_q <= '0;
      i1_q <= '0;
      i2_q <= '0;
    end else if (load) begin
      r1_q <= '0;
      r2_q <= amp;
      i1_q <= '0;
      i2_q <= '0;
    end else begin
      r2_q <= v2;
      r1_q <= v1;
      i1_q <= i1_n;
      i2_q <= i2_q + i1_n - fb;
    end
  end

endmodule
