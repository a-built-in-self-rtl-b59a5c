// bist_controller: test-parameter registers, serial I/O and the sequencer
// of the three BIST steps.
//
// The published design names a "Controller and Serial I/O" block that
// loads the per-test parameters (a21, A_S/A_CNST and A_S*|H_DEC|) and runs
// the modified controlled-sine-wave-fitting procedure. The register map,
// the serial protocol (see serial_io) and the sequencing details below are
// this design's own.
//
// Sequence after a start command (write 1 to bit 0 of REG_CTRL):
//   step 1  SBSG amplitude A_S*|H_DEC|, decimator fed by the MUT stream,
//           offset estimator accumulates N samples            -> Y_OS
//   step 2  SBSG amplitude REG_AMPS_C, MUT stream, amplitude estimator
//           accumulates |y_DEC - Y_OS| over N samples         -> Y_AMP,
//           amplitude decision
//   step 3  SBSG amplitude A_S*|H_DEC| and RBSG amplitude Y_AMP, both
//           loaded in the same cycle; decimator fed by MUT - REF; power
//           estimator accumulates (y_DEC - Y_OS/2)^2          -> P_THDN,
//           THD+N decision
// At the start of each step the bit-stream generators are (re)loaded and
// the first SETTLE decimated samples are discarded, so that the filter and
// the modulator under test have settled. mut_test (the MUT's test-mode
// pin T) is high from start to done. bist_done rises in the cycle in which
// both decisions are valid.
//
// The published procedure sets the step-2 stimulus to A_S/A_CNST. Here the
// RBSG's Register 2 is loaded with Y_AMP unchanged, and Register 2 sets a
// tone of Register2*k with k = sqrt(a12/a21), so REG_AMPS_C must hold
// A_S*(pi/2)*(2/k)/k (in 2^30 units) for the reference to match the MUT's
// tone; at k = 2 this is exactly A_S/A_CNST. The hardware is the same; only
// the precomputed setup value differs.
//
// Interface: dec_valid marks each decimated sample. os_en, amp_en and
// pwr_en mark samples to accumulate; *_clear reset the estimators at the
// start of a run; amp_eval / thdn_eval fire the decision makers. The
// per-step control outputs are registered.
module bist_controller
  import bist_pkg::*;
#(
  parameter int unsigned N_L2   = N_LOG2,
  parameter int unsigned SETTLE = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // serial I/O
  input  logic                     sio_cs_n,
  input  logic                     sio_sclk,
  input  logic                     sio_sdi,
  output logic                     sio_sdo,
  // bit-stream generators
  output logic signed [BSG_W-1:0]  a21,
  output logic                     sbsg_load,
  output logic signed [BSG_W-1:0]  sbsg_amp,
  output logic                     rbsg_load,
  output logic signed [BSG_W-1:0]  rbsg_amp,
  output logic                     mut_test,
  output dec_src_e                 dec_src,
  // output response analyzer
  input  logic                     dec_valid,
  output logic                     est_clear,
  output logic                     os_en,
  output logic                     amp_en,
  output logic                     pwr_en,
  input  logic                     pwr_busy,
  output logic                     amp_eval,
  output logic                     thdn_eval,
  input  logic signed [DEC_W-1:0]  y_os,
  input  logic        [BSG_W-1:0]  y_amp,
  input  logic        [PWR_W-1:0]  p_thdn,
  input  logic                     amp_pass,
  input  logic                     thdn_pass,
  input  logic                     pwr_ovf,
  // limits for the decision makers
  output logic        [BSG_W-1:0]  amp_lo,
  output logic        [BSG_W-1:0]  amp_hi,
  output logic        [PWR_W-1:0]  thdn_th,
  // status
  output bist_state_e              state,
  output logic                     done
);

  localparam int unsigned CNT_W = N_L2 + 2;
  localparam int unsigned N     = 1 << N_L2;

  // ---------------------------------------------------------------- registers
  logic                  wr_en;
  logic [3:0]            wr_addr, rd_addr;
  logic [SIO_DATA_W-1:0] wr_data, rd_data;
  logic                  start_q;
  logic signed [BSG_W-1:0] amps_h_q, amps_c_q;

  serial_io #(.DW(SIO_DATA_W)) u_sio (
    .clk, .rst_n, .sio_cs_n, .sio_sclk, .sio_sdi, .sio_sdo,
    .wr_en, .wr_addr, .wr_data, .rd_addr, .rd_data
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a21      <= '0;
      amps_h_q <= '0;
      amps_c_q <= '0;
      amp_lo   <= '0;
      amp_hi   <= '1;
      thdn_th  <= '1;
      start_q  <= 1'b0;
    end else begin
      start_q <= 1'b0;
      if (wr_en) begin
        unique case (reg_addr_e'(wr_addr))
          REG_A21:     a21      <= wr_data[BSG_W-1:0];
          REG_AMPS_H:  amps_h_q <= wr_data[BSG_W-1:0];
          REG_AMPS_C:  amps_c_q <= wr_data[BSG_W-1:0];
          REG_AMP_LO:  amp_lo   <= wr_data[BSG_W-1:0];
          REG_AMP_HI:  amp_hi   <= wr_data[BSG_W-1:0];
          REG_THDN_TH: thdn_th  <= wr_data[PWR_W-1:0];
          REG_CTRL:    start_q  <= wr_data[0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    rd_data = '0;
    case (reg_addr_e'(rd_addr))
      REG_A21:     rd_data = SIO_DATA_W'(unsigned'(a21));
      REG_AMPS_H:  rd_data = SIO_DATA_W'(unsigned'(amps_h_q));
      REG_AMPS_C:  rd_data = SIO_DATA_W'(unsigned'(amps_c_q));
      REG_AMP_LO:  rd_data = SIO_DATA_W'(amp_lo);
      REG_AMP_HI:  rd_data = SIO_DATA_W'(amp_hi);
      REG_THDN_TH: rd_data = SIO_DATA_W'(thdn_th);
      REG_STATUS:  rd_data = SIO_DATA_W'({pwr_ovf, amp_pass, thdn_pass, done, (state != ST_IDLE && state != ST_DONE)});
      REG_Y_OS:    rd_data = SIO_DATA_W'(y_os);          // sign-extended
      REG_Y_AMP:   rd_data = SIO_DATA_W'(y_amp);
      REG_P_THDN:  rd_data = SIO_DATA_W'(p_thdn);
      default:     rd_data = '0;
    endcase
  end

  // ---------------------------------------------------------------- sequencer
  typedef enum logic [1:0] {PH_LOAD, PH_SETTLE, PH_ACC, PH_FINISH} phase_e;

  phase_e           phase_q;
  logic [CNT_W-1:0] cnt_q;

  assign done     = (state == ST_DONE);
  assign mut_test = (state != ST_IDLE) && (state != ST_DONE);

  always_comb begin
    os_en  = (state == ST_STEP1) && (phase_q == PH_ACC) && dec_valid;
    amp_en = (state == ST_STEP2) && (phase_q == PH_ACC) && dec_valid;
    pwr_en = (state == ST_STEP3) && (phase_q == PH_ACC) && dec_valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_IDLE;
      phase_q   <= PH_LOAD;
      cnt_q     <= '0;
      sbsg_load <= 1'b1;
      rbsg_load <= 1'b1;
      sbsg_amp  <= '0;
      rbsg_amp  <= '0;
      dec_src   <= SRC_MUT;
      est_clear <= 1'b0;
      amp_eval  <= 1'b0;
      thdn_eval <= 1'b0;
    end else begin
      sbsg_load <= 1'b0;
      rbsg_load <= 1'b0;
      est_clear <= 1'b0;
      amp_eval  <= 1'b0;
      thdn_eval <= 1'b0;
      unique case (state)
        ST_IDLE, ST_DONE: begin
          if (start_q) begin
            state     <= ST_STEP1;
            phase_q   <= PH_LOAD;
            est_clear <= 1'b1;
          end
        end
        default: begin
          unique case (phase_q)
            PH_LOAD: begin
              // (re)start the generators for this step
              sbsg_load <= 1'b1;
              sbsg_amp  <= (state == ST_STEP2) ? amps_c_q : amps_h_q;
              if (state == ST_STEP3) begin
                rbsg_load <= 1'b1;
                rbsg_amp  <= signed'(y_amp);
                dec_src   <= SRC_DIFF;
              end else begin
                dec_src   <= SRC_MUT;
              end
              cnt_q   <= '0;
              phase_q <= PH_SETTLE;
            end
            PH_SETTLE: if (dec_valid) begin
              if (cnt_q == CNT_W'(SETTLE - 1)) begin
                cnt_q   <= '0;
                phase_q <= PH_ACC;
              end else begin
                cnt_q <= cnt_q + 1'b1;
              end
            end
            PH_ACC: if (dec_valid) begin
              if (cnt_q == CNT_W'(N - 1)) begin
                cnt_q   <= '0;
                phase_q <= PH_FINISH;
              end else begin
                cnt_q <= cnt_q + 1'b1;
              end
            end
            PH_FINISH: begin
              // wait for the power estimator's last square in step 3
              // and let the THD+N decision register before done rises
              unique case (state)
                ST_STEP1: begin
                  state   <= ST_STEP2;
                  phase_q <= PH_LOAD;
                end
                ST_STEP2: begin
                  state    <= ST_STEP3;
                  phase_q  <= PH_LOAD;
                  amp_eval <= 1'b1;
                end
                default: begin
                  if (thdn_eval) begin
                    state   <= ST_DONE;
                    phase_q <= PH_LOAD;
                    dec_src <= SRC_MUT;
                  end else if (!pwr_busy) begin
                    thdn_eval <= 1'b1;
                  end
                end
              endcase
            end
            default: phase_q <= PH_LOAD;
          endcase
        end
      endcase
    end
  end

endmodule
