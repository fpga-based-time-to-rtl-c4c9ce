// tdc_pkg: constants and types shared by the time-to-digital converter.
//
// The numbers are those of the 16-channel instrument: a 512-tap delay line
// read out as a 9-bit bin code, 2^20 calibration hits per channel, a 12-bit
// fixed-point fine time (T_CLK / 4096 = 1.86 ps at 131.25 MHz) and a 36-bit
// coarse cycle count, giving a 48-bit time tag {coarse, fine}.
`timescale 1ps/1fs
package tdc_pkg;

  localparam int unsigned DEF_N_CHANNELS = 16;
  localparam int unsigned DEF_N_TAPS     = 512;
  localparam int unsigned DEF_HITS_LOG2  = 20;  // 2^20 calibration hits
  localparam int unsigned DEF_FINE_W     = 12;  // Y_b
  localparam int unsigned DEF_COARSE_W   = 36;  // C_b

  // Top-level operating mode, as driven by the top-level state machine.
  typedef enum logic [2:0] {
    MODE_IDLE  = 3'd0,  // nothing running, delay lines see the channel inputs
    MODE_CLEAR = 3'd1,  // calibration RAMs are being zeroed
    MODE_HIST  = 3'd2,  // code-density histogram (PDF) is being collected
    MODE_CDF   = 3'd3,  // histogram is being turned into the CDF in place
    MODE_RUN   = 3'd4   // calibrated, time tags are produced
  } tdc_mode_e;

endpackage
