// mut_model: behavioural model of the modulator under test (not
// synthesizable; used only by testbenches).
//
// Models a second-order single-bit sigma-delta modulator with a
// design-for-digital-testability input: with t = 1 its input is the
// two-level stimulus +/-1 given by d_bsg, with t = 0 it is the analog
// input v_asg. Loop: x1 += u - y, x2 += x1 - 2y, y = sign(x2), which gives
// STF = z^-2 and NTF = (1 - z^-1)^2. Non-idealities are parameters: a gain
// on the input, an input-referred offset, uniform white noise and a cubic
// distortion term. Real arithmetic; one update per rising clock edge;
// d_mut is the bit for the current cycle.
module mut_model #(
  parameter real GAIN   = 1.0,
  parameter real OFFSET = 0.0,
  parameter real NOISE  = 0.0,    // peak of uniform noise added to the input
  parameter real HD3    = 0.0     // u + HD3*u^3
) (
  input  logic clk,
  input  logic t,
  input  logic d_bsg,
  input  real  v_asg,
  output logic d_mut
);

  real x1 = 0.0, x2 = 0.0;
  real u, y, nz;

  assign d_mut = (x2 >= 0.0);

  always @(posedge clk) begin
    y  = d_mut ? 1.0 : -1.0;
    nz = NOISE * (2.0 * (real'($urandom % 65536) / 65536.0) - 1.0);
    u  = t ? (d_bsg ? 1.0 : -1.0) : v_asg;
    u  = GAIN * (u + HD3 * u * u * u) + OFFSET + nz;
    x2 <= x2 + x1 - 2.0 * y;
    x1 <= x1 + u - y;
  end

endmodule
