// tb_decimation_filter: the decimator (R = 128) is compared with a direct
// FIR evaluation of the sinc^3 response, h = three length-R boxcars
// convolved (3R-2 taps), on a random 2-bit input stream. The alignment
// between input and output is found once and must be within R+3 clocks;
// every later output must match exactly. Outputs must come exactly every R
// clocks, and a constant +1 input must give the DC gain R^3 = 2^21.
module tb_decimation_filter;
  localparam int R = 128;
  localparam int L = 3*R - 2;

  logic clk = 0, rst_n = 0;
  logic signed [1:0]  din = 0;
  logic signed [23:0] dout;
  logic dout_valid;
  int checks = 0, failures = 0;

  decimation_filter #(.R(R)) dut (.clk, .rst_n, .din, .dout, .dout_valid);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int h[L];
  int xs[$];              // input history, xs[0] = oldest
  int n_in = 0;
  int lag = -1;
  int last_valid = -1;
  int n_out = 0;
  bit const_mode = 0;

  function automatic longint fir(int end_idx);
    longint acc = 0;
    for (int k = 0; k < L; k++)
      if (end_idx - k >= 0) acc += longint'(h[k]) * xs[end_idx - k];
    return acc;
  endfunction

  // drive a new input after each rising edge; record what was sampled
  always @(posedge clk) if (rst_n) begin
    xs.push_back(int'(din));
    n_in++;
  end

  always @(negedge clk) if (rst_n) begin
    din <= const_mode ? 2'sd1 : 2'($signed($urandom_range(0, 2)) - 1);
    if (dout_valid) begin
      if (last_valid >= 0) begin
        checks++;
        if (n_in - last_valid != R) begin
          failures++;
          $display("output spacing %0d", n_in - last_valid);
        end
      end
      last_valid = n_in;
      n_out++;
      if (n_out == 4) begin
        // find the alignment once (filter fully primed)
        for (int d = 0; d <= R + 3; d++)
          if (fir(n_in - 1 - d) == longint'(dout)) begin lag = d; break; end
        checks++;
        if (lag < 0) begin failures++; $display("no alignment found"); end
        else $display("latency: output = sinc^3 of inputs up to %0d clocks earlier", lag);
      end else if (n_out > 4 && lag >= 0) begin
        checks++;
        if (fir(n_in - 1 - lag) != longint'(dout)) begin
          failures++;
          if (failures < 5) $display("out %0d: got %0d expected %0d", n_out, dout, fir(n_in - 1 - lag));
        end
      end
    end
  end

  initial begin
    int tmp[];
    // h = boxcar * boxcar * boxcar
    tmp = new[2*R-1];
    foreach (tmp[i]) tmp[i] = 0;
    for (int i = 0; i < R; i++) for (int j = 0; j < R; j++) tmp[i+j] += 1;
    foreach (h[i]) h[i] = 0;
    for (int i = 0; i < 2*R-1; i++) for (int j = 0; j < R; j++) h[i+j] += tmp[i];
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (n_out == 150);
    const_mode = 1;
    wait (n_out == 160);
    @(negedge clk);
    checks++;
    if (dout != 24'sd2097152) begin
      failures++;
      $display("DC gain: got %0d expected 2097152", dout);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
