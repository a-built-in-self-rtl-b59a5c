// tb_thdn_decision: random and boundary values of P_THDN against a
// threshold; pass must be P_THDN < threshold, registered on eval.
module tb_thdn_decision;
  logic clk = 0, rst_n = 0, clear = 0, eval = 0;
  logic [46:0] p_thdn, threshold;
  logic pass, valid;
  int checks = 0, failures = 0;

  thdn_decision dut (.clk, .rst_n, .clear, .eval, .p_thdn, .threshold, .pass, .valid);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input logic [46:0] p);
    bit e;
    p_thdn = p;
    e = p < threshold;
    eval = 1;
    @(negedge clk);
    eval = 0;
    checks++;
    if (pass !== e || valid !== 1'b1) begin
      failures++;
      $display("p %0d th %0d: pass %0b expected %0b", p, threshold, pass, e);
    end
  endtask

  initial begin
    p_thdn = 0; threshold = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      threshold = 47'({$urandom, $urandom});
      one(threshold); one(threshold - 1); one(threshold + 1);
      one(47'({$urandom, $urandom}));
    end
    threshold = '1;   one('1); one('0);
    threshold = '0;   one('0); one('1);
    clear = 1; @(negedge clk); clear = 0;
    checks++;
    if (valid || pass) begin failures++; $display("outputs not cleared"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
