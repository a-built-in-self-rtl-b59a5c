// decimation_filter: decimates the 2-bit modulator-side stream by the
// oversampling ratio (default 128) to 24-bit samples.
//
// The published design gives only the filter's role, its ratio (OSR 128,
// 6.144 MHz to 48 kS/s), its 2-bit input and 24-bit output. This
// implementation is the simplest filter that does the job for a
// second-order modulator: a third-order cascaded integrator-comb (sinc^3)
// filter. Three integrators run at the input rate, the decimated value
// passes three differentiators, all in wrap-around two's complement, which
// is exact for a CIC filter. The DC gain is OSR^3 = 2^21, so a full-scale
// input of +1 gives 2^21 at the output.
//
// Interface: din is sampled on every clock. Every OSR clocks dout carries
// a new sample and dout_valid is high for one cycle; dout holds until the
// next one. The latency from an input to its first effect on dout is at
// most OSR+3 clocks.
module decimation_filter
  import bist_pkg::*;
#(
  parameter int unsigned R     = OSR,
  parameter int unsigned OUT_W = DEC_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [1:0]       din,
  output logic signed [OUT_W-1:0] dout,
  output logic                    dout_valid
);

  localparam int unsigned CW = 2 + 3 * $clog2(R);   // register growth
  typedef logic signed [CW-1:0] cic_t;

  cic_t int1_q, int2_q, int3_q;
  cic_t dif1_q, dif2_q, dif3_q;        // comb delay elements
  cic_t c1, c2, c3;
  logic [$clog2(R)-1:0] phase_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      int1_q <= '0;
      int2_q <= '0;
      int3_q <= '0;
    end else begin
      int1_q <= int1_q + CW'(din);
      int2_q <= int2_q + int1_q;
      int3_q <= int3_q + int2_q;
    end
  end

  always_comb begin
    c1 = int3_q - dif1_q;
    c2 = c1 - dif2_q;
    c3 = c2 - dif3_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q    <= '0;
      dif1_q     <= '0;
      dif2_q     <= '0;
      dif3_q     <= '0;
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      phase_q    <= phase_q + 1'b1;
      dout_valid <= 1'b0;
      if (phase_q == '1) begin
        dif1_q     <= int3_q;
        dif2_q     <= c1;
        dif3_q     <= c2;
        dout       <= OUT_W'(c3);
        dout_valid <= 1'b1;
      end
    end
  end

endmodule
