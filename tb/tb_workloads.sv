// tb_workloads: the measurement sweeps of a BIST run, on the full-size
// design (N = 2048, OSR = 128) with a behavioural modulator under test.
//   Dynamic range: a tone of 43 cycles per 2^18 clocks (about 1 kHz at
//   6.144 MHz) at -60 ... -4 dBFS. The SNDR derived from P_THDN must rise
//   with the amplitude, exceed 60 dB at -6 dBFS, and Y_OS and Y_AMP must
//   match the values computed here. The dynamic range is reported as
//   SNDR(-60 dBFS) + 60 dB.
//   Test bandwidth: -6 dBFS tones from about 1 kHz to 20 kHz. In this
//   design the step-2 stimulus is a_s*(pi/2)*(2/k) with
//   k = sqrt(a12/a21), which grows with frequency; while it stays below
//   0.7 of full scale the SNDR must exceed 60 dB. Above that the stimulus
//   generator overloads and the result is only reported.
module tb_workloads;
  import bist_pkg::*;

  localparam int    N      = 2048;
  localparam real   PI     = 3.14159265358979;
  localparam real   OFS    = 0.00164;             // -55.7 dBFS

  logic clk = 0, rst_n = 0;
  logic sio_cs_n = 1, sio_sclk = 0, sio_sdi = 0, sio_sdo;
  logic mut_test, d_bsg, d_mut_good, d_mut;
  logic signed [DEC_W-1:0] adc_out;
  logic adc_valid, bist_done, amp_pass, amp_valid, thdn_pass, thdn_valid;
  bist_state_e bist_state;

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

  assign d_mut = d_mut_good;

  // watchdog: 18 full runs take about 14.2 M cycles
  initial begin
    repeat (16_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- mechanism counters
  int n_step[4];
  int n_settle_discard = 0, n_diff_cycles = 0, n_wr = 0, n_rd = 0;
  int n_amp_pass = 0, n_amp_fail = 0, n_thdn_pass = 0, n_thdn_fail = 0;
  bist_state_e prev_state = ST_IDLE;

  always @(posedge clk) begin
    if (rst_n) begin                     // nothing counts before reset is released
      if (bist_state != prev_state && bist_state inside {ST_STEP1, ST_STEP2, ST_STEP3})
        n_step[int'(bist_state)]++;
      if (dut.u_ctrl.phase_q == 2'd1 && adc_valid && mut_test) n_settle_discard++;
      if (dut.dec_src == SRC_DIFF) n_diff_cycles++;
      if (dut.u_ctrl.wr_en) n_wr++;
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

  task automatic run_bist();
    sio_write(REG_CTRL, 48'd1);
    wait (bist_done === 1'b1);
    @(negedge clk);
    sio_read(REG_Y_OS, rd);
    got_os = real'(longint'({{16{rd[47]}}, rd}));
    sio_read(REG_Y_AMP, rd);
    got_amp = real'(rd) / 256.0;
    sio_read(REG_P_THDN, rd2);
    exp_os  = OFS * (2.0**21);
    p_norm  = real'(rd2) / 2048.0 / (2.0**40);
    sig_pow = (a_s * hdec) * (a_s * hdec) / 2.0;
    sndr    = 10.0 * $log10(sig_pow / p_norm);
    $display("  Y_OS %0.1f (expected %0.1f)  Y_AMP %0.1f (expected %0.1f)  SNDR %0.1f dB  amp_pass %0b thdn_pass %0b",
             got_os, exp_os, got_amp, exp_amp, sndr, amp_pass, thdn_pass);
    check(got_os > exp_os - 0.0002 * (2.0**21) && got_os < exp_os + 0.0002 * (2.0**21), "Y_OS");
  endtask

  int  dbfs[8] = '{-60, -50, -40, -30, -20, -10, -6, -4};
  real fkhz[10] = '{1.0, 2.0, 4.0, 6.0, 7.0, 8.0, 10.0, 12.0, 16.0, 20.0};
  real sndr_at[8];
  int  j;

  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);

    $display("dynamic range sweep, 43/2^18 of f_CLK");
    for (int i = 0; i < 8; i++) begin
      setup(43, $pow(10.0, dbfs[i] / 20.0));
      run_bist();
      sndr_at[i] = sndr;
      $display("  %0d dBFS: SNDR %0.1f dB", dbfs[i], sndr);
      check(got_amp > 0.95 * exp_amp && got_amp < 1.05 * exp_amp, $sformatf("Y_AMP at %0d dBFS", dbfs[i]));
      if (i > 0) check(sndr_at[i] > sndr_at[i-1] || dbfs[i] > -10,
                       $sformatf("SNDR rises from %0d to %0d dBFS", dbfs[i-1], dbfs[i]));
    end
    check(sndr_at[6] > 60.0, "SNDR at -6 dBFS above 60 dB");
    $display("dynamic range (SNDR at -60 dBFS + 60 dB): %0.1f dB", sndr_at[0] + 60.0);

    $display("test bandwidth sweep, -6 dBFS");
    for (int i = 0; i < 10; i++) begin
      j = int'(fkhz[i] * 1000.0 / 6.144e6 * (2.0**18));
      if (j % 2 == 0) j++;                       // odd: coherent, no repeated samples
      setup(j, 0.5);
      run_bist();
      $display("  %0.1f kHz (%0d/2^18): step-2 stimulus %0.2f of full scale, SNDR %0.1f dB",
               fkhz[i], j, a2, sndr);
      if (a2 < 0.7) check(sndr > 60.0 && thdn_pass && amp_pass, $sformatf("pass at %0.1f kHz", fkhz[i]));
    end

    check(n_step[3] == 18, $sformatf("%0d BIST runs", n_step[3]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
