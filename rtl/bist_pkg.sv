// bist_pkg: widths, constants and types shared by the BIST sigma-delta ADC.
//
// The word widths printed in the block diagrams are kept: 32-bit resonator
// registers and stimulus, 34-bit modulator integrators, 24-bit decimated
// samples, 35-bit offset/amplitude accumulators and a 47-bit power
// accumulator. N = 2048 decimated samples per BIST step and an
// oversampling ratio of 128 are the measured configuration. The full-scale
// value of the bit-stream generators (2^30 in a 32-bit word) and the
// register map of the serial port are this design's own choices.
package bist_pkg;

  // Bit-stream generator
  localparam int unsigned BSG_W      = 32;  // resonator registers, a21, amplitudes
  localparam int unsigned DSM_W      = 34;  // digital modulator integrators
  localparam int unsigned FS_LOG2    = 30;  // full scale (0 dBFS) = 2^30
  localparam int unsigned A12_SHIFT  = 6;   // a12 = 2^-6

  // Decimation and output response analysis
  localparam int unsigned OSR        = 128;
  localparam int unsigned DEC_W      = 24;  // decimated sample width
  localparam int unsigned N_LOG2     = 11;  // N = 2048 samples per step
  localparam int unsigned ACC_W      = 35;  // offset / amplitude accumulators
  localparam int unsigned PWR_W      = 47;  // power accumulator

  // BIST step sequenced by the controller
  typedef enum logic [2:0] {
    ST_IDLE  = 3'd0,
    ST_STEP1 = 3'd1,   // offset
    ST_STEP2 = 3'd2,   // amplitude
    ST_STEP3 = 3'd3,   // THD+N power
    ST_DONE  = 3'd4
  } bist_state_e;

  // Decimation filter input source
  typedef enum logic {
    SRC_MUT  = 1'b0,   // raw MUT bit-stream
    SRC_DIFF = 1'b1    // MUT bit-stream minus delayed reference bit-stream
  } dec_src_e;

  // Serial-port register addresses
  typedef enum logic [3:0] {
    REG_A21     = 4'h0,
    REG_AMPS_H  = 4'h1,   // A_S*|H_DEC|  : SBSG amplitude for steps 1 and 3
    REG_AMPS_C  = 4'h2,   // SBSG amplitude for step 2 (A_S/A_CNST, scaled
                          // by 2/k so that Y_AMP suits the RBSG)
    REG_AMP_LO  = 4'h3,   // amplitude decision lower limit
    REG_AMP_HI  = 4'h4,   // amplitude decision upper limit
    REG_THDN_TH = 4'h5,   // THD+N power threshold
    REG_CTRL    = 4'h6,   // bit 0: start (self-clearing)
    REG_STATUS  = 4'h7,   // {pwr_ovf, amp_pass, thdn_pass, done, busy}
    REG_Y_OS    = 4'h8,
    REG_Y_AMP   = 4'h9,
    REG_P_THDN  = 4'hA
  } reg_addr_e;

  localparam int unsigned SIO_DATA_W = 48;   // serial data field
endpackage
