// bist_adc_top: digital part of a built-in-self-test sigma-delta ADC.
//
// The analog second-order sigma-delta modulator under test (MUT) sits
// outside this module: in test mode (mut_test = T = 1) it takes the
// stimulus bit-stream d_bsg and returns its own bit-stream d_mut; with
// mut_test = 0 it converts its analog input, and d_bsg is then held at 1
// as the published MUT requires for normal operation. Inside:
//   SBSG  stimulus bit-stream generator (resonator + digital modulator)
//   RBSG  reference bit-stream generator, same circuit
//   phase compensator z^-2 on the reference stream
//   single-bit subtractor and MUX in front of the decimation filter
//   decimation filter, OSR 128, 24-bit output (also the ADC output)
//   offset, amplitude and power estimators with the offset subtractor
//   amplitude-response and THD+N decision makers
//   controller with serial I/O sequencing the three BIST steps
// The partitioning and the connections follow the published block
// diagram; the subtraction of Y_OS/2 (not Y_OS) when the decimator is fed
// with the 2-bit difference stream is this design's consequence of
// encoding that stream as (y_MUT - y_REF)/2 so that it fits in 2 bits.
//
// Timing: one clock per modulator sample (6.144 MHz in the measured
// prototype). A full BIST run takes 3 * (N + SETTLE) * OSR clocks plus a
// few cycles, about 0.8 M clocks at the defaults.
module bist_adc_top
  import bist_pkg::*;
#(
  parameter int unsigned N_L2   = N_LOG2,
  parameter int unsigned R      = OSR,
  parameter int unsigned SETTLE = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // serial I/O
  input  logic                    sio_cs_n,
  input  logic                    sio_sclk,
  input  logic                    sio_sdi,
  output logic                    sio_sdo,
  // modulator under test
  output logic                    mut_test,    // T: 1 = digital test mode
  output logic                    d_bsg,       // D_BSG stimulus bit-stream
  input  logic                    d_mut,       // D_MUT output bit-stream
  // ADC output (decimated)
  output logic signed [DEC_W-1:0] adc_out,
  output logic                    adc_valid,
  // BIST results
  output bist_state_e             bist_state,  // current BIST step
  output logic                    bist_done,
  output logic                    amp_pass,
  output logic                    amp_valid,
  output logic                    thdn_pass,
  output logic                    thdn_valid
);

  logic signed [BSG_W-1:0] a21, sbsg_amp, rbsg_amp;
  logic                    sbsg_load, rbsg_load;
  logic                    d_sbs, d_rbs, d_ref;
  dec_src_e                dec_src;
  logic signed [1:0]       dec_in;
  logic signed [DEC_W-1:0] y_dec, y_os, y_res;
  logic                    dec_valid;
  logic                    est_clear, os_en, amp_en, pwr_en, pwr_busy, pwr_ovf;
  logic                    amp_eval, thdn_eval;
  logic        [BSG_W-1:0] y_amp, amp_lo, amp_hi;
  logic        [PWR_W-1:0] p_thdn, thdn_th;

  bist_controller #(.N_L2(N_L2), .SETTLE(SETTLE)) u_ctrl (
    .clk, .rst_n,
    .sio_cs_n, .sio_sclk, .sio_sdi, .sio_sdo,
    .a21, .sbsg_load, .sbsg_amp, .rbsg_load, .rbsg_amp,
    .mut_test, .dec_src,
    .dec_valid, .est_clear, .os_en, .amp_en, .pwr_en, .pwr_busy,
    .amp_eval, .thdn_eval,
    .y_os, .y_amp, .p_thdn, .amp_pass, .thdn_pass, .pwr_ovf,
    .amp_lo, .amp_hi, .thdn_th,
    .state(bist_state), .done(bist_done)
  );

  bsg u_sbsg (.clk, .rst_n, .load(sbsg_load), .amp(sbsg_amp), .a21, .d_bsg(d_sbs));

  // outside a test the MUT must see D_BSG = 1 to work as a normal modulator
  assign d_bsg = mut_test ? d_sbs : 1'b1;
  bsg u_rbsg (.clk, .rst_n, .load(rbsg_load), .amp(rbsg_amp), .a21, .d_bsg(d_rbs));

  phase_compensator #(.DELAY(2)) u_fc (.clk, .rst_n, .d_in(d_rbs), .d_out(d_ref));

  residue_mux u_mux (.sel(dec_src), .d_mut, .d_ref, .dout(dec_in));

  decimation_filter #(.R(R), .OUT_W(DEC_W)) u_dec (
    .clk, .rst_n, .din(dec_in), .dout(y_dec), .dout_valid(dec_valid)
  );

  assign adc_out   = y_dec;
  assign adc_valid = dec_valid;

  // offset removal: the difference stream is at half scale
  assign y_res = y_dec - ((dec_src == SRC_DIFF) ? (y_os >>> 1) : y_os);

  offset_estimator #(.N_L2(N_L2)) u_os (
    .clk, .rst_n, .clear(est_clear), .din_valid(os_en), .din(y_dec), .y_os
  );

  amplitude_estimator u_amp (
    .clk, .rst_n, .clear(est_clear), .din_valid(amp_en), .din(y_res), .y_amp
  );

  power_estimator u_pwr (
    .clk, .rst_n, .clear(est_clear), .din_valid(pwr_en), .din(y_res),
    .busy(pwr_busy), .p_thdn, .ovf(pwr_ovf)
  );

  amplitude_decision u_amp_dec (
    .clk, .rst_n, .clear(est_clear), .eval(amp_eval),
    .y_amp, .lo(amp_lo), .hi(amp_hi), .pass(amp_pass), .valid(amp_valid)
  );

  thdn_decision u_thdn_dec (
    .clk, .rst_n, .clear(est_clear), .eval(thdn_eval),
    .p_thdn, .threshold(thdn_th), .pass(thdn_pass), .valid(thdn_valid)
  );

endmodule
