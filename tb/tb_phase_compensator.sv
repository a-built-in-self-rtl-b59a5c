// tb_phase_compensator: random bits in, each output bit must equal the
// input from exactly two clocks earlier (H_FC = z^-2).
module tb_phase_compensator;
  logic clk = 0, rst_n = 0, d_in = 0, d_out;
  logic [1:0] hist;
  int checks = 0, failures = 0;

  phase_compensator dut (.clk, .rst_n, .d_in, .d_out);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hist = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      d_in = 1'($urandom);
      @(posedge clk);
      hist <= {hist[0], d_in};
      @(negedge clk);
      checks++;
      if (d_out !== hist[1]) begin
        failures++;
        $display("cycle %0d: got %0b expected %0b", i, d_out, hist[1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
