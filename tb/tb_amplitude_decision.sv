// tb_amplitude_decision: random and boundary values of Y_AMP against a
// window [lo, hi]; pass must be lo <= Y_AMP <= hi, registered on eval.
module tb_amplitude_decision;
  logic clk = 0, rst_n = 0, clear = 0, eval = 0;
  logic [31:0] y_amp, lo, hi;
  logic pass, valid;
  int checks = 0, failures = 0;

  amplitude_decision dut (.clk, .rst_n, .clear, .eval, .y_amp, .lo, .hi, .pass, .valid);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input logic [31:0] v);
    bit e;
    y_amp = v;
    e = (v >= lo) && (v <= hi);
    eval = 1;
    @(negedge clk);
    eval = 0;
    checks++;
    if (pass !== e || valid !== 1'b1) begin
      failures++;
      $display("y %0d lo %0d hi %0d: pass %0b expected %0b", v, lo, hi, pass, e);
    end
  endtask

  initial begin
    y_amp = 0; lo = 0; hi = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (valid) begin failures++; $display("valid before eval"); end
    for (int i = 0; i < 200; i++) begin
      lo = $urandom_range(1000, 900000);
      hi = lo + $urandom_range(0, 500000);
      one(lo); one(hi); one(lo - 1); one(hi + 1);
      one($urandom_range(0, 2000000));
      one(32'hFFFF_FFFF);
    end
    clear = 1; @(negedge clk); clear = 0;
    checks++;
    if (valid) begin failures++; $display("valid after clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
