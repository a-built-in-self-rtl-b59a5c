// tb_bist_controller: the controller and its serial port, with the
// datapath replaced by simple stand-ins (decimated-sample strobe every 8
// clocks, constant estimator results, a power estimator that stays busy for
// a few clocks after each sample). N is reduced to 16 and SETTLE to 2.
// Checks: serial write and read-back of every parameter register, the
// sequence of generator loads and their amplitudes, the RBSG amplitude
// taken from Y_AMP, the decimator source per step, exactly N accumulate
// strobes per estimator and SETTLE discarded samples per step, one
// evaluation strobe per decision (the THD+N one only after the power
// estimator is idle), the test-mode pin, the status word and the run
// length against 3*(N+SETTLE) sample periods.
module tb_bist_controller;
  import bist_pkg::*;

  localparam int N_L2 = 4, N = 16, SETTLE = 2, PER = 8;

  logic clk = 0, rst_n = 0;
  logic sio_cs_n = 1, sio_sclk = 0, sio_sdi = 0, sio_sdo;
  logic signed [31:0] a21, sbsg_amp, rbsg_amp;
  logic sbsg_load, rbsg_load, mut_test;
  dec_src_e dec_src;
  logic dec_valid = 0, est_clear, os_en, amp_en, pwr_en, pwr_busy, amp_eval, thdn_eval;
  logic signed [23:0] y_os = -24'sd1234;
  logic [31:0] y_amp = 32'd987654;
  logic [46:0] p_thdn = 47'h1234_5678_9ABC;
  logic amp_pass = 1, thdn_pass = 0, pwr_ovf = 0;
  logic [31:0] amp_lo, amp_hi;
  logic [46:0] thdn_th;
  bist_state_e state;
  logic done;
  int checks = 0, failures = 0;

  bist_controller #(.N_L2(N_L2), .SETTLE(SETTLE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // decimated-sample strobe and power-estimator stand-in
  int ph = 0, busy_cnt = 0;
  always @(posedge clk) begin
    ph <= (ph == PER - 1) ? 0 : ph + 1;
    dec_valid <= (ph == PER - 1);
    if (pwr_en) busy_cnt <= 5;
    else if (busy_cnt > 0) busy_cnt <= busy_cnt - 1;
  end
  assign pwr_busy = (busy_cnt > 0);

  // observers
  int n_sload = 0, n_rload = 0, n_os = 0, n_amp = 0, n_pwr = 0, n_ae = 0, n_te = 0;
  int n_discard = 0, n_bad_src = 0, n_bad_amp = 0, n_te_busy = 0;
  always @(posedge clk) if (rst_n) begin
    if (sbsg_load && state != ST_IDLE) begin
      n_sload++;
      // steps 1 and 3 use REG_AMPS_H (1111), step 2 uses REG_AMPS_C (2222)
      if (!((state == ST_STEP2 && sbsg_amp == 32'sd2222) || (state != ST_STEP2 && sbsg_amp == 32'sd1111)))
        n_bad_amp++;
    end
    if (rbsg_load && state == ST_STEP3) begin
      n_rload++;
      if (rbsg_amp != signed'(y_amp)) n_bad_amp++;
    end
    if (os_en) n_os++;
    if (amp_en) n_amp++;
    if (pwr_en) n_pwr++;
    if (amp_eval) n_ae++;
    if (thdn_eval) begin n_te++; if (pwr_busy) n_te_busy++; end
    if (dec_valid && mut_test && !(os_en || amp_en || pwr_en) && dut.phase_q == 2'd1) n_discard++;
    if (os_en || amp_en) if (dec_src != SRC_MUT) n_bad_src++;
    if (pwr_en) if (dec_src != SRC_DIFF) n_bad_src++;
  end

  task automatic sclk_cycle();
    repeat (4) @(negedge clk);
    sio_sclk = 1;
    repeat (4) @(negedge clk);
    sio_sclk = 0;
  endtask

  task automatic sio_write(input logic [3:0] addr, input logic [47:0] data);
    logic [55:0] frame = {1'b1, 3'b000, addr, data};
    sio_cs_n = 0;
    repeat (4) @(negedge clk);
    for (int i = 55; i >= 0; i--) begin sio_sdi = frame[i]; sclk_cycle(); end
    repeat (4) @(negedge clk);
    sio_cs_n = 1;
    repeat (4) @(negedge clk);
  endtask

  task automatic sio_read(input logic [3:0] addr, output logic [47:0] data);
    logic [7:0] hdr = {1'b0, 3'b000, addr};
    sio_cs_n = 0;
    repeat (4) @(negedge clk);
    for (int i = 7; i >= 0; i--) begin sio_sdi = hdr[i]; sclk_cycle(); end
    for (int i = 47; i >= 0; i--) begin
      repeat (4) @(negedge clk);
      sio_sclk = 1;
      data[i] = sio_sdo;
      repeat (4) @(negedge clk);
      sio_sclk = 0;
    end
    repeat (4) @(negedge clk);
    sio_cs_n = 1;
    repeat (4) @(negedge clk);
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [47:0] rd;
  int t0, t1;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    sio_write(REG_A21,     48'h0000_0040_0123);
    sio_write(REG_AMPS_H,  48'd1111);
    sio_write(REG_AMPS_C,  48'd2222);
    sio_write(REG_AMP_LO,  48'd100);
    sio_write(REG_AMP_HI,  48'd200000);
    sio_write(REG_THDN_TH, 48'h7ABC_DEF0_1234);
    check(a21 == 32'h0040_0123, "a21 written");
    check(amp_lo == 32'd100 && amp_hi == 32'd200000, "amplitude limits written");
    check(thdn_th == 47'h7ABC_DEF0_1234, "threshold written");
    sio_read(REG_A21, rd);     check(rd == 48'h0000_0040_0123, $sformatf("a21 read-back %h", rd));
    sio_read(REG_AMPS_C, rd);  check(rd == 48'd2222, "AmpS step 2 read-back");
    sio_read(REG_THDN_TH, rd); check(rd == 48'h7ABC_DEF0_1234, "threshold read-back");
    sio_read(REG_Y_OS, rd);    check(rd == 48'(-48'sd1234), $sformatf("Y_OS read-back %h", rd));
    sio_read(REG_P_THDN, rd);  check(rd == 48'h1234_5678_9ABC, "P_THDN read-back");
    check(state == ST_IDLE && !mut_test, "idle before start");

    sio_write(REG_CTRL, 48'd1);
    t0 = int'($time / 10);
    check(mut_test, "test mode asserted while running");
    wait (done);
    t1 = int'($time / 10);
    @(negedge clk);
    check(n_sload == 3, $sformatf("SBSG loads %0d", n_sload));
    check(n_rload == 1, $sformatf("RBSG loads %0d", n_rload));
    check(n_bad_amp == 0, "generator amplitudes per step");
    check(n_os == N && n_amp == N && n_pwr == N, $sformatf("accumulate strobes %0d/%0d/%0d", n_os, n_amp, n_pwr));
    check(n_discard == 3 * SETTLE, $sformatf("discarded samples %0d", n_discard));
    check(n_bad_src == 0, "decimator source per step");
    check(n_ae == 1 && n_te == 1 && n_te_busy == 0, $sformatf("evaluations %0d/%0d (during busy %0d), after the power estimator is idle", n_ae, n_te, n_te_busy));
    check(!mut_test && dec_src == SRC_MUT, "test mode released at the end");
    check((t1 - t0) >= 3 * (N + SETTLE - 1) * PER && (t1 - t0) <= 3 * (N + SETTLE) * PER + 60,
          $sformatf("run length %0d cycles", t1 - t0));
    sio_read(REG_STATUS, rd);
    check(rd[4:0] == 5'b01010, $sformatf("status %b", rd[4:0]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
