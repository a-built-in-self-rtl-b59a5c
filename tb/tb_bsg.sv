// tb_bsg: self-checking testbench for the bit-stream generator.
//
// Two kinds of checks:
//  * every output bit is compared with a cycle-accurate reference model of
//    the resonator and modulator written here with 64-bit integers;
//  * the bit-stream is correlated with a cosine and a sine at the frequency
//    predicted by f = acos(1 - a12*a21/2)/(2*pi); the recovered amplitude
//    must match amp*sqrt(a12/a21) within 3 %, and the mean (DC) must be small.
// A reload in the middle checks that `load` restarts the tone.
module tb_bsg;
  import bist_pkg::*;

  localparam int MCYC = 16384;

  logic clk = 0, rst_n = 0, load = 0;
  logic signed [31:0] amp, a21;
  logic d;
  int checks = 0, failures = 0;

  bsg dut (.clk, .rst_n, .load, .amp, .a21, .d_bsg(d));

  always #5 clk = ~clk;

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  longint r1, r2, i1, i2;
  bit     ref_d;

  function automatic longint wrap(longint v, int w);
    longint m = (64'sd1 <<< w);
    longint x = v & (m - 1);
    if (x >= (m >>> 1)) x -= m;
    return x;
  endfunction

  task automatic ref_load(longint a);
    r1 = 0; r2 = a; i1 = 0; i2 = 0;
  endtask

  task automatic ref_step();
    longint v1, v2, fb, i1n;
    ref_d = (i2 >= 0);
    v2  = wrap(r2 + (ref_d ? -longint'(a21) : longint'(a21)), 32);
    v1  = wrap(r1 + (v2 >>> 6), 32);
    fb  = ref_d ? (64'sd1 <<< 30) : -(64'sd1 <<< 30);
    i1n = wrap(i1 + v1 - fb, 34);
    i2  = wrap(i2 + i1n - fb, 34);
    i1  = i1n; r1 = v1; r2 = v2;
  endtask

  real w, a12r, a21r, kexp, acos_arg;
  real sc, ss, sdc, ampl, expect_amp;

  task automatic run_tone(real target_frac);
    int n;
    amp = 32'(longint'(target_frac * (2.0**30) / kexp));
    @(negedge clk); load = 1; ref_load(longint'(amp));
    @(negedge clk); load = 0;
    sc = 0; ss = 0; sdc = 0;
    for (n = 0; n < MCYC; n++) begin
      ref_step();
      checks++;
      if (d !== ref_d) begin
        failures++;
        if (failures < 5) $display("mismatch at %0d: dut=%0b ref=%0b", n, d, ref_d);
      end
      sc  += (d ? 1.0 : -1.0) * $cos(w * n);
      ss  += (d ? 1.0 : -1.0) * $sin(w * n);
      sdc += (d ? 1.0 : -1.0);
      @(negedge clk);
    end
    ampl = 2.0 * $sqrt(sc*sc + ss*ss) / MCYC;
    expect_amp = real'(amp) * kexp / (2.0**30);
    checks++;
    if (ampl < 0.97*expect_amp || ampl > 1.03*expect_amp) begin
      failures++;
      $display("amplitude %f expected %f", ampl, expect_amp);
    end
    checks++;
    if (sdc/MCYC > 0.01 || sdc/MCYC < -0.01) begin
      failures++;
      $display("dc %f", sdc/MCYC);
    end
    $display("tone: amplitude %f (expected %f), dc %f", ampl, expect_amp, sdc/MCYC);
  endtask

  initial begin
    // 16 cycles in 16384 clocks
    a12r = 1.0/64.0;
    w    = 2.0 * 3.14159265358979 * 16.0 / MCYC;
    a21r = 2.0 * (1.0 - $cos(w)) / a12r;
    a21  = 32'(longint'(a21r * (2.0**30)));
    a21r = real'(a21) / (2.0**30);
    acos_arg = 1.0 - a12r*a21r/2.0;
    w    = $acos(acos_arg);
    kexp = $sqrt(a12r/a21r);
    amp  = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_tone(0.5);
    run_tone(0.25);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
