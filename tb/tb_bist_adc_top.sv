// tb_bist_adc_top: end-to-end test of the BIST sigma-delta ADC at its
// default parameters (N = 2048 samples per step, OSR = 128).
//
// A behavioural modulator under test is attached to the stimulus and
// response pins. For each run the testbench loads the test parameters over
// the serial port, starts the BIST, waits for it to finish and reads back
// Y_OS, Y_AMP, P_THDN and the status word. Runs:
//   1. the standard -6 dBFS test at 43 cycles per 2^18 clocks (about
//      1 kHz at 6.144 MHz) with a good modulator (offset -55.7 dBFS, small
//      noise): Y_OS and Y_AMP must match values computed here from the
//      model's settings and the sinc^3 response, the SNDR derived from
//      P_THDN must exceed 60 dB, and both decisions must pass;
//   2. the same test with a modulator that has a 10 % gain error and a
//      high noise floor: both decisions must fail;
//   3. the good modulator at 326 cycles per 2^18 clocks (about 7.6 kHz).
// The testbench counts how often each mechanism occurred: the three steps,
// discarded settling samples, the difference-stream mode, serial writes
// and reads, pass and fail of both decisions, cycles in normal mode (where
// d_bsg must stay 1), and checks the cycle count
// of each run against 3*(N+SETTLE)*OSR.
module tb_bist_adc_top;
  import bist_pkg::*;

  localparam int    N      = 2048;
  localparam real   PI     = 3.14159265358979;
  localparam real   OFS    = 0.00164;             // -55.7 dBFS

  logic clk = 0, rst_n = 0;
  logic sio_cs_n = 1, sio_sclk = 0, sio_sdi = 0, sio_sdo;
  logic mut_test, d_bsg, d_mut_good, d_mut_bad, d_mut;
  logic signed [DEC_W-1:0] adc_out;
  logic adc_valid, bist_done, amp_pass, amp_valid, thdn_pass, thdn_valid;
  bist_state_e bist_state;
  logic use_bad = 0;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bist_adc_top dut (
    .clk, .rst_n, .sio_cs_n, .sio_sclk, .sio_sdi, .sio_sdo,
    .mut_test, .d_bsg, .d_mut,
    .adc_out, .adc_valid, .bist_state, .bist_done,
    .amp_pass, .amp_valid, .thdn_pass, .thdn_valid
  );

  mut_model #(.GAIN(1.0), .OFFSET(OFS), .NOISE(1.0e-3)) u_good (
    .clk, .t(mut_test), .d_bsg, .v_asg(0.0), .d_mut(d_mut_good));
  mut_model #(.GAIN(0.9), .OFFSET(OFS), .NOISE(0.05)) u_bad (
    .clk, .t(mut_test), .d_bsg, .v_asg(0.0), .d_mut(d_mut_bad));

  assign d_mut = use_bad ? d_mut_bad : d_mut_good;

  // watchdog: three full runs take about 2.4 M cycles
  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- mechanism counters
  int n_step[4];
  int n_settle_discard = 0, n_diff_cycles = 0, n_wr = 0, n_rd = 0, n_normal = 0, n_bad_normal = 0;
  int n_amp_pass = 0, n_amp_fail = 0, n_thdn_pass = 0, n_thdn_fail = 0;
  bist_state_e prev_state = ST_IDLE;

  always @(posedge clk) begin
    if (rst_n) begin                     // nothing counts before reset is released
      if (bist_state != prev_state && bist_state inside {ST_STEP1, ST_STEP2, ST_STEP3})
        n_step[int'(bist_state)]++;
      if (dut.u_ctrl.phase_q == 2'd1 && adc_valid && mut_test) n_settle_discard++;
      if (dut.dec_src == SRC_DIFF) n_diff_cycles++;
      if (dut.u_ctrl.wr_en) n_wr++;
      if (!mut_test) begin                 // normal mode: D_BSG must be 1
        n_normal++;
        if (d_bsg !== 1'b1) n_bad_normal++;
      end
    end
    prev_state <= bist_state;
  end

  // ---------------------------------------------------------------- serial master
  task automatic sclk_cycle();
    repeat (8) @(negedge clk);
    sio_sclk = 1;
    repeat (8) @(negedge clk);
    sio_sclk = 0;
  endtask

  task automatic sio_write(input logic [3:0] addr, input logic [47:0] data);
    logic [55:0] frame = {1'b1, 3'b000, addr, data};
    sio_cs_n = 0;
    repeat (8) @(negedge clk);
    for (int i = 55; i >= 0; i--) begin
      sio_sdi = frame[i];
      sclk_cycle();
    end
    repeat (8) @(negedge clk);
    sio_cs_n = 1;
    repeat (8) @(negedge clk);
  endtask

  task automatic sio_read(input logic [3:0] addr, output logic [47:0] data);
    logic [7:0] hdr = {1'b0, 3'b000, addr};
    sio_cs_n = 0;
    repeat (8) @(negedge clk);
    for (int i = 7; i >= 0; i--) begin
      sio_sdi = hdr[i];
      sclk_cycle();
    end
    for (int i = 47; i >= 0; i--) begin
      repeat (8) @(negedge clk);
      sio_sclk = 1;
      data[i] = sio_sdo;
      repeat (8) @(negedge clk);
      sio_sclk = 0;
    end
    repeat (8) @(negedge clk);
    sio_cs_n = 1;
    repeat (8) @(negedge clk);
    n_rd++;
  endtask

  // ---------------------------------------------------------------- helpers
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  real w, a21r, k, hdec, fd, a_s, a2;
  logic signed [31:0] a21w, amps_h, amps_c;
  logic [47:0] rd, rd2;
  real exp_os, exp_amp, got_os, got_amp, sig_pow, p_norm, sndr;
  int t0, t1;

  // Test set-up for a tone of j cycles per 2^18 clocks and amplitude a_s
  // (full scale 1), from the resonator and sinc^3 formulas:
  //   k      = sqrt(a12/a21), gain from Register 2 to the tone
  //   |H|    = sinc^3 response at the tone
  //   AmpS(steps 1, 3) = a_s*|H| / k
  //   AmpS(step 2)     = a2 / k with a2 = a_s*(pi/2)*(2/k): the step-2
  //   tone is scaled by 2/k so that Y_AMP, loaded unchanged into the
  //   reference generator, reproduces the MUT's step-3 tone.
  task automatic setup(input int j, input real amp_fs);
    a_s  = amp_fs;
    w    = 2.0 * PI * j / (2.0**18);
    a21r = 2.0 * (1.0 - $cos(w)) * 64.0;
    a21w = 32'(longint'(a21r * (2.0**30) + 0.5));
    a21r = real'(a21w) / (2.0**30);
    k    = $sqrt((1.0/64.0) / a21r);
    fd   = real'(j) / (2.0**18);
    hdec = $pow($sin(PI * fd * 128.0) / (128.0 * $sin(PI * fd)), 3.0);
    a2   = a_s * (PI / 2.0) * (2.0 / k);
    amps_h = 32'(longint'(a_s * hdec * (2.0**30) / k));
    amps_c = 32'(longint'(a2 * (2.0**30) / k));
    exp_amp = a2 * (2.0 / PI) * hdec * (2.0**21);       // mean |y'_RES|
    $display("tone %0d/2^18: a21 %0d  k %f  |H_DEC| %f  AmpS(1,3) %0d  AmpS(2) %0d",
             j, a21w, k, hdec, amps_h, amps_c);
    sio_write(REG_A21, 48'(unsigned'(a21w)));
    sio_write(REG_AMPS_H, 48'(unsigned'(amps_h)));
    sio_write(REG_AMPS_C, 48'(unsigned'(amps_c)));
    sio_write(REG_AMP_LO, 48'(longint'(0.97 * exp_amp * 256.0)));
    sio_write(REG_AMP_HI, 48'(longint'(1.03 * exp_amp * 256.0)));
    // THD+N threshold for an SNDR of 60 dB (residue at half scale, 11
    // fraction bits: P = mean(r^2) * 2^40 * 2^11)
    sio_write(REG_THDN_TH, 48'(longint'((a_s*hdec)*(a_s*hdec)/2.0 * 1.0e-6 * (2.0**51))));
  endtask

  task automatic run_bist(input bit expect_pass, input real gain);
    sio_write(REG_CTRL, 48'd1);
    t0 = int'($time / 10);
    wait (bist_done === 1'b1);
    t1 = int'($time / 10);
    @(negedge clk);
    // duration: three steps of (N + SETTLE) decimated samples each
    check((t1 - t0) >= 3 * (N + 3) * 128 && (t1 - t0) <= 3 * (N + 4) * 128 + 3 * 128 + 200,
          $sformatf("run length %0d cycles", t1 - t0));
    sio_read(REG_STATUS, rd);
    check(rd[1] == 1'b1, "status done bit");
    sio_read(REG_Y_OS, rd);
    got_os = real'(longint'({{16{rd[47]}}, rd}));
    sio_read(REG_Y_AMP, rd);
    got_amp = real'(rd) / 256.0;
    sio_read(REG_P_THDN, rd2);
    exp_os  = OFS * (2.0**21);                    // offset is added after the gain
    p_norm  = real'(rd2) / 2048.0 / (2.0**40);    // residue power, full scale 1
    sig_pow = (a_s * hdec) * (a_s * hdec) / 2.0;
    sndr    = 10.0 * $log10(sig_pow / p_norm);
    $display("Y_OS %0.1f (expected %0.1f)  Y_AMP %0.1f (expected %0.1f)  P_THDN %0d  SNDR %0.1f dB  amp_pass %0b thdn_pass %0b",
             got_os, exp_os, got_amp, exp_amp * gain, rd2, sndr, amp_pass, thdn_pass);
    check(got_os > exp_os - 0.0002 * (2.0**21) && got_os < exp_os + 0.0002 * (2.0**21), "Y_OS");
    if (expect_pass) begin
      check(got_amp > 0.99 * exp_amp && got_amp < 1.01 * exp_amp, "Y_AMP");
      check(sndr > 60.0, "SNDR of good modulator above 60 dB");
    end
    check(amp_valid && thdn_valid, "decisions valid");
    check(amp_pass == expect_pass, "amplitude decision");
    check(thdn_pass == expect_pass, "THD+N decision");
    if (amp_pass) n_amp_pass++; else n_amp_fail++;
    if (thdn_pass) n_thdn_pass++; else n_thdn_fail++;
  endtask

  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);

    // standard test: -6 dBFS, 43/2^18 of the clock (about 1 kHz)
    setup(43, 0.5);
    sio_read(REG_A21, rd);
    check(rd[31:0] == a21w, "serial read-back of a21");
    run_bist(1'b1, 1.0);
    use_bad = 1;
    run_bist(1'b0, 0.9);
    use_bad = 0;
    // a second frequency: 326/2^18 (about 7.6 kHz)
    setup(326, 0.5);
    run_bist(1'b1, 1.0);

    // every mechanism must have happened
    for (int s = 1; s <= 3; s++) check(n_step[s] == 3, $sformatf("step %0d count %0d", s, n_step[s]));
    check(n_settle_discard == 3 * 3 * 4, $sformatf("settling samples discarded %0d", n_settle_discard));
    check(n_diff_cycles > 0, "difference-stream mode used");
    check(n_normal > 0 && n_bad_normal == 0,
          $sformatf("d_bsg held at 1 in normal mode (%0d of %0d cycles wrong)", n_bad_normal, n_normal));
    check(n_wr >= 15 && n_rd >= 13, "serial writes and reads");
    check(n_amp_pass > 0 && n_amp_fail > 0, "amplitude decision passed and failed");
    check(n_thdn_pass > 0 && n_thdn_fail > 0, "THD+N decision passed and failed");
    $display("steps %0d/%0d/%0d, settle discards %0d, diff-mode cycles %0d, writes %0d, reads %0d",
             n_step[1], n_step[2], n_step[3], n_settle_discard, n_diff_cycles, n_wr, n_rd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
