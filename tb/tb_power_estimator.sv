// tb_power_estimator: random residue samples arrive every 128 clocks (the
// decimated rate) and, in a second run, every 30 clocks; P_THDN must equal
// the sum of squares computed here. Each square must take W = 24 clocks.
// A third run with full-scale samples must saturate the 47-bit
// accumulator and raise ovf.
module tb_power_estimator;
  logic clk = 0, rst_n = 0, clear = 0, din_valid = 0;
  logic signed [23:0] din = 0;
  logic busy, ovf;
  logic [46:0] p_thdn;
  int checks = 0, failures = 0;

  power_estimator dut (.clk, .rst_n, .clear, .din_valid, .din, .busy, .p_thdn, .ovf);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int mode, input int gap, input int nsamp);
    longint sum = 0;
    int busy_cycles;
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    for (int i = 0; i < nsamp; i++) begin
      case (mode)
        0: din = 24'($signed($urandom_range(0, 20000)) - 10000);
        1: din = 24'($signed($urandom) >>> 12);   // +/- 2^19
        default: din = -24'sd8388608;
      endcase
      sum += longint'(din) * longint'(din);
      din_valid = 1;
      @(negedge clk);
      din_valid = 0;
      busy_cycles = 0;
      while (busy) begin busy_cycles++; @(negedge clk); end
      if (i == 0) begin
        checks++;
        if (busy_cycles != 25) begin
          failures++;
          $display("square + add took %0d cycles, expected 24 + 1", busy_cycles);
        end
      end
      repeat (gap - busy_cycles - 1) @(negedge clk);
    end
    checks++;
    if (mode < 2) begin
      if (longint'(p_thdn) != sum || ovf) begin
        failures++;
        $display("mode %0d: P_THDN %0d expected %0d ovf %0b", mode, p_thdn, sum, ovf);
      end
    end else begin
      if (p_thdn != '1 || !ovf) begin
        failures++;
        $display("saturation: P_THDN %h ovf %0b", p_thdn, ovf);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0, 128, 2048);
    run(1, 30, 300);
    run(2, 30, 40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
