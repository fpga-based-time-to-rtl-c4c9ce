// tdc_controller: the top-level state machine of the instrument.
//
// It runs the calibration of all channels at once and then the measurement,
// on commands from the host computer (single-cycle pulses):
//
//   cmd_calibrate  IDLE/READY/RUN -> CLEAR: switch every delay line to the
//                  calibration oscillator and zero the calibration RAMs;
//                  -> HIST when every channel is done: collect 2^HITS_LOG2
//                  hits per channel; -> CDF when every channel has them:
//                  build the look-up tables; -> READY.
//   cmd_start      READY/RUN -> RUN: clear the coarse counter (this is the
//                  time origin of all tags) and produce time tags.
//   cmd_stop       RUN -> READY.
//
// cal_sel is high from CLEAR through HIST. `calibrated` is high once a
// calibration has finished and until the next one starts. Calibration can be
// repeated at any time to follow voltage and temperature drift.
//
// A host-controlled top-level state machine that drives the input
// multiplexers is part of the published design; its states and commands
// are this design's.
//
// Timing: a command is acted upon on the clock edge that samples it; the
// state, mode and cal_sel outputs are registered.
`timescale 1ps/1fs
module tdc_controller
  import tdc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      cmd_calibrate,
  input  logic      cmd_start,
  input  logic      cmd_stop,
  input  logic      all_done,        // AND of the channels' phase-done flags
  output tdc_mode_e mode,
  output logic      cal_sel,
  output logic      coarse_clear,
  output logic      coarse_enable,
  output logic      calibrated
);
  typedef enum logic [2:0] {
    S_IDLE, S_CLEAR, S_HIST, S_CDF, S_READY, S_RUN
  } state_e;

  state_e state, state_n;
  logic   entered;   // first cycle in a state: the channels' done is stale

  always_comb begin
    state_n = state;
    unique case (state)
      S_IDLE:  if (cmd_calibrate) state_n = S_CLEAR;
      S_CLEAR: if (!entered && all_done) state_n = S_HIST;
      S_HIST:  if (!entered && all_done) state_n = S_CDF;
      S_CDF:   if (!entered && all_done) state_n = S_READY;
      S_READY: if (cmd_calibrate) state_n = S_CLEAR;
               else if (cmd_start) state_n = S_RUN;
      S_RUN:   if (cmd_calibrate) state_n = S_CLEAR;
               else if (cmd_stop) state_n = S_READY;
      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      entered      <= 1'b0;
      calibrated   <= 1'b0;
      coarse_clear <= 1'b0;
    end else begin
      state        <= state_n;
      // mode changes together with state; the channels drop a stale done
      // one cycle later, so all_done is ignored in a state's first cycle
      entered      <= (state_n != state);
      coarse_clear <= (state_n == S_RUN) && (state != S_RUN || cmd_start);
      if (state_n == S_CLEAR)                   calibrated <= 1'b0;
      else if (state == S_CDF && state_n == S_READY) calibrated <= 1'b1;
    end
  end

  function automatic tdc_mode_e state_mode(state_e s);
    unique case (s)
      S_CLEAR: return MODE_CLEAR;
      S_HIST:  return MODE_HIST;
      S_CDF:   return MODE_CDF;
      S_RUN:   return MODE_RUN;
      default: return MODE_IDLE;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode    <= MODE_IDLE;
      cal_sel <= 1'b0;
    end else begin
      mode    <= state_mode(state_n);
      cal_sel <= (state_n == S_CLEAR) || (state_n == S_HIST);
    end
  end

  assign coarse_enable = (state == S_RUN);
endmodule
