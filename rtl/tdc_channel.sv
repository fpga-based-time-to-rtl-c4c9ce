// tdc_channel: one complete time-to-digital converter channel.
//
// Chain: input multiplexer -> carry-chain delay line with sampling flip-flops
// -> second register (metastability) -> rising-edge detector -> priority
// encoder -> calibrator (histogram / CDF / look-up RAM) -> time tag.
//
// A hit is a rising edge: tap 0 of the resynchronised word is 1 and was 0 one
// clock earlier. Hits are therefore at least two clocks apart. The sampled
// word of a hit is encoded into a bin code; in MODE_HIST the calibrator counts
// it, in MODE_RUN it looks the code up and returns the fine time. The tag is
// {coarse, fine}: coarse is the cycle count of the clock period in which the
// edge arrived (the period that ends at the sampling clock edge) and fine the
// calibrated position of the edge inside that period, in units of
// T_CLK / 2^FINE_W.
//
// Timing: the sampling edge is edge k; the resynchronising register loads at
// k+1, the hit is seen during cycle k+1, the code is registered at k+2, the fine
// time at k+4 and the tag at k+5 (tag_valid high for one cycle after edge
// k+5). The coarse count travels with the hit: it is captured when the hit
// is detected, when it is two ahead of the arrival period, so two is
// subtracted from it there.
//
// The chain of blocks follows the published design; the resynchronising
// register, the tap-0 edge detector and the choice of coarse period are this
// design's.
//
// cal_sel (from the top-level state machine) feeds the line from cal_clk
// during calibration and from ch_in otherwise.
`timescale 1ps/1fs
module tdc_channel
  import tdc_pkg::*;
#(
  parameter int unsigned N         = tdc_pkg::DEF_N_TAPS,
  parameter int unsigned HITS_LOG2 = tdc_pkg::DEF_HITS_LOG2,
  parameter int unsigned FINE_W    = tdc_pkg::DEF_FINE_W,
  parameter int unsigned COARSE_W  = tdc_pkg::DEF_COARSE_W,
  parameter int unsigned SEED      = 1,
  localparam int unsigned CW       = $clog2(N),
  localparam int unsigned TAG_W    = COARSE_W + FINE_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  tdc_mode_e           mode,
  input  logic                cal_sel,   // 1: delay line fed from cal_clk
  input  logic                cal_clk,
  input  logic                ch_in,
  input  logic [COARSE_W-1:0] coarse,
  output logic                done,      // calibration phase finished
  output logic [HITS_LOG2:0]  hits_counted,
  output logic                tag_valid,
  output logic [TAG_W-1:0]    tag
);
  localparam int unsigned DETECT_LAG = 2;  // coarse(k+1) - coarse(k-1)

  logic          line_in;
  logic [N-1:0]  taps_q, taps_s;
  logic          tap0_prev;
  logic          hit;
  logic          code_v;
  logic [CW-1:0] code;
  logic [COARSE_W-1:0] coarse_hit, coarse_code, coarse_lut;
  logic                fine_v;
  logic [FINE_W-1:0]   fine;

  tdc_input_mux u_mux (
    .sel_cal(cal_sel), .cal_clk(cal_clk), .ch_in(ch_in), .line_in(line_in)
  );

  tdc_delay_line #(.N(N), .SEED(SEED)) u_line (
    .din(line_in), .clk(clk), .taps_q(taps_q)
  );

  // Second register stage and rising-edge detection on tap 0.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      taps_s    <= '0;
      tap0_prev <= 1'b0;
    end else begin
      taps_s    <= taps_q;
      tap0_prev <= taps_s[0];
    end
  end
  assign hit        = taps_s[0] & ~tap0_prev;
  assign coarse_hit = coarse - COARSE_W'(DETECT_LAG);

  tdc_priority_encoder #(.N(N)) u_enc (
    .clk(clk), .rst_n(rst_n),
    .valid_i(hit), .therm_i(taps_s),
    .valid_o(code_v), .code_o(code)
  );

  tdc_calibrator #(.N(N), .HITS_LOG2(HITS_LOG2), .FINE_W(FINE_W)) u_cal (
    .clk(clk), .rst_n(rst_n), .mode(mode),
    .hit_i(code_v), .code_i(code),
    .done(done), .fine_valid_o(fine_v), .fine_o(fine),
    .hits_counted(hits_counted)
  );

  // Carry the coarse count alongside the code and the look-up.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      coarse_code <= '0;
      coarse_lut  <= '0;
      tag_valid   <= 1'b0;
      tag         <= '0;
    end else begin
      if (hit)    coarse_code <= coarse_hit;
      if (code_v) coarse_lut  <= coarse_code;
      tag_valid   <= fine_v && (mode == MODE_RUN);
      if (fine_v) tag <= {coarse_lut, fine};
    end
  end
endmodule
