// tdc_top: 16-channel FPGA time-to-digital converter with on-chip
// statistical code density calibration.
//
// Every channel time-stamps the rising edges of its input against one shared
// 36-bit coarse counter of the system clock (131.25 MHz, T_CLK = 7.62 ns) and
// refines the stamp with its own 512-tap carry-chain delay line. The
// non-linear delay line is calibrated in hardware: the top-level state
// machine switches all lines to an asynchronous calibration oscillator, each
// channel histograms 2^20 hits in its dual-port block RAM, turns the
// histogram into the cumulative distribution in the same RAM, and then uses
// it as the look-up table from bin code to a 12-bit fine time. Because the
// number of hits is a power of two, the fine time is a fixed-point fraction
// of T_CLK (1.86 ps per LSB) and the tag is simply {coarse, fine}, 48 bits,
// covering about 524 s.
//
// Interface: host commands cmd_calibrate / cmd_start / cmd_stop (one-cycle
// pulses), cal_clk from the calibration oscillator, ch_in[] from the input
// discriminators; per channel a tag and a one-cycle tag_valid. The host link
// that would carry the commands and the tags is outside this design, so both
// are plain ports. Each channel's delay line is a behavioural model (see
// tdc_delay_line); everything else is synthesizable.
//
// The channel count, sizes and calibration scheme follow the published
// instrument; the command interface and per-channel tag ports are this
// design's. The assertions in the calibrators use rst_n synchronously
// (disable iff), which lint reports as a reset used both ways; it is
// simulation-only.
//
// Timing: tag_valid of a channel rises five clocks after the clock edge that
// sampled the input edge; hits on one channel must be at least two clocks
// apart (closer edges are not seen).
`timescale 1ps/1fs
module tdc_top
  import tdc_pkg::*;
#(
  parameter int unsigned N_CH      = tdc_pkg::DEF_N_CHANNELS,
  parameter int unsigned N         = tdc_pkg::DEF_N_TAPS,
  parameter int unsigned HITS_LOG2 = tdc_pkg::DEF_HITS_LOG2,
  parameter int unsigned FINE_W    = tdc_pkg::DEF_FINE_W,
  parameter int unsigned COARSE_W  = tdc_pkg::DEF_COARSE_W,
  localparam int unsigned TAG_W    = COARSE_W + FINE_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cmd_calibrate,
  input  logic                  cmd_start,
  input  logic                  cmd_stop,
  input  logic                  cal_clk,
  input  logic [N_CH-1:0]       ch_in,
  output tdc_mode_e             mode,
  output logic                  calibrated,
  output logic [COARSE_W-1:0]   coarse,
  output logic [N_CH-1:0]       tag_valid,
  output logic [TAG_W-1:0]      tag [N_CH],
  output logic [HITS_LOG2:0]    hits_counted [N_CH]
);
  logic            cal_sel, coarse_clear, coarse_enable;
  logic [N_CH-1:0] done;

  tdc_controller u_ctrl (
    .clk(clk), .rst_n(rst_n),
    .cmd_calibrate(cmd_calibrate), .cmd_start(cmd_start), .cmd_stop(cmd_stop),
    .all_done(&done),
    .mode(mode), .cal_sel(cal_sel),
    .coarse_clear(coarse_clear), .coarse_enable(coarse_enable),
    .calibrated(calibrated)
  );

  tdc_coarse_counter #(.W(COARSE_W)) u_coarse (
    .clk(clk), .rst_n(rst_n), .clear(coarse_clear), .enable(coarse_enable),
    .count(coarse)
  );

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    tdc_channel #(
      .N(N), .HITS_LOG2(HITS_LOG2), .FINE_W(FINE_W), .COARSE_W(COARSE_W),
      .SEED(c + 1)
    ) u_ch (
      .clk(clk), .rst_n(rst_n), .mode(mode), .cal_sel(cal_sel),
      .cal_clk(cal_clk), .ch_in(ch_in[c]), .coarse(coarse),
      .done(done[c]), .hits_counted(hits_counted[c]),
      .tag_valid(tag_valid[c]), .tag(tag[c])
    );
  end
endmodule
