// tb_amplitude_estimator: N = 2048 samples of a sampled sine plus random
// samples, including the most negative 24-bit value; Y_AMP must equal the
// upper 32 of 35 bits of sum |x| computed here, i.e. floor(sum|x| / 8),
// and for the pure sine the mean |x| must be close to 2/pi of its peak.
module tb_amplitude_estimator;
  localparam int N = 2048;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0, clear = 0, din_valid = 0;
  logic signed [23:0] din = 0;
  logic [31:0] y_amp;
  int checks = 0, failures = 0;

  amplitude_estimator dut (.clk, .rst_n, .clear, .din_valid, .din, .y_amp);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int mode);
    longint sum = 0, expv, a;
    real mean;
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    for (int i = 0; i < N; i++) begin
      case (mode)
        0: din = 24'(longint'(1000000.0 * $sin(2.0 * PI * 43.0 * i / N)));
        1: din = 24'($urandom);
        default: din = (i % 2 == 1) ? -24'sd8388608 : 24'sd8388607;
      endcase
      a = (din < 0) ? -longint'(din) : longint'(din);
      sum += a;
      din_valid = 1;
      @(negedge clk);
      din_valid = 0;
    end
    expv = sum >>> 3;
    checks++;
    if (longint'(y_amp) != expv) begin
      failures++;
      $display("mode %0d: Y_AMP %0d expected %0d", mode, y_amp, expv);
    end
    if (mode == 0) begin
      mean = real'(y_amp) / 256.0;
      checks++;
      if (mean < 0.995 * 1.0e6 * 2.0 / PI || mean > 1.005 * 1.0e6 * 2.0 / PI) begin
        failures++;
        $display("sine: mean |x| %f", mean);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0);
    run(1);
    run(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
