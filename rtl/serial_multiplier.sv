// serial_multiplier: squares a signed sample with one shift-and-add step
// per clock (helper of the power estimator).
//
// The published power estimator uses a serial multiplier because its input
// arrives only once every 128 clocks. Here the magnitude of the sample is
// formed first; then, LSB first, the shifted magnitude is added to the
// partial product whenever the current multiplier bit is one. The square of
// a W-bit two's complement number fits in 2W-1 bits.
//
// Interface: a one-cycle `start` with din captures the sample; `busy` is
// high for W cycles; `done` pulses for one cycle with the product on
// `prod`, which holds until the next start. A start while busy is ignored.
module serial_multiplier #(
  parameter int unsigned W = 24
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic signed [W-1:0] din,
  output logic                busy,
  output logic                done,
  output logic [2*W-2:0]      prod
);

  logic [W-1:0]            mag;
  logic [W-1:0]            mplr_q;   // remaining multiplier bits
  logic [2*W-2:0]          mcand_q;  // shifted multiplicand
  logic [2*W-2:0]          acc_q;
  logic [$clog2(W+1)-1:0]  cnt_q;

  assign mag  = din[W-1] ? W'(-din) : W'(din);
  assign busy = (cnt_q != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mplr_q  <= '0;
      mcand_q <= '0;
      acc_q   <= '0;
      cnt_q   <= '0;
      done    <= 1'b0;
      prod    <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          mplr_q  <= mag;
          mcand_q <= (2*W-1)'(mag);
          acc_q   <= '0;
          cnt_q   <= ($clog2(W+1))'(W);
        end
      end else begin
        if (mplr_q[0]) acc_q <= acc_q + mcand_q;
        mplr_q  <= mplr_q >> 1;
        mcand_q <= mcand_q << 1;
        cnt_q   <= cnt_q - 1'b1;
        if (cnt_q == 1) begin
          done <= 1'b1;
          prod <= mplr_q[0] ? acc_q + mcand_q : acc_q;
        end
      end
    end
  end

endmodule
