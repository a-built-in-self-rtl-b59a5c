// phase_compensator: fixed phase compensation of the reference bit-stream.
//
// The reference bit-stream from the RBSG is delayed by two clock cycles,
// H_FC(z) = z^-2, so that it lines up with the stimulus tone after it has
// passed through the modulator under test, whose signal transfer function
// has a phase close to z^-2. The two cascaded D flip-flops clocked by the
// sampling clock are the published circuit; DELAY is a parameter here
// (default 2) and the reset value is this design's choice.
//
// Interface: d_in is sampled on every rising edge; d_out is d_in from
// DELAY cycles earlier.
module phase_compensator #(
  parameter int unsigned DELAY = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d_in,
  output logic d_out
);

  logic [DELAY-1:0] sr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr_q <= '0;
    else sr_q <= DELAY'({sr_q, d_in});
  end

  assign d_out = sr_q[DELAY-1];

endmodule
