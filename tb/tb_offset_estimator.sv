// tb_offset_estimator: N = 2048 random 24-bit samples (with a bias, and
// sparse valid strobes); Y_OS must equal floor(sum / N) computed here.
// A second run after `clear` checks that the accumulator restarts, and a
// run of full-scale negative samples checks the 35-bit width.
module tb_offset_estimator;
  localparam int N = 2048;
  logic clk = 0, rst_n = 0, clear = 0, din_valid = 0;
  logic signed [23:0] din = 0, y_os;
  int checks = 0, failures = 0;

  offset_estimator dut (.clk, .rst_n, .clear, .din_valid, .din, .y_os);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int mode);
    longint sum = 0, expv;
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    for (int i = 0; i < N; i++) begin
      case (mode)
        0: din = 24'($signed($urandom_range(0, 200000)) - 90000);
        1: din = 24'($signed($urandom_range(0, 4000000)) - 2000000);
        default: din = -24'sd8388608;
      endcase
      sum += longint'(din);
      din_valid = 1;
      @(negedge clk);
      din_valid = 0;
      din = 24'($urandom);           // ignored while not valid
      repeat (i % 3) @(negedge clk);
    end
    expv = sum >>> 11;
    checks++;
    if (longint'(y_os) != expv) begin
      failures++;
      $display("mode %0d: Y_OS %0d expected %0d", mode, y_os, expv);
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
