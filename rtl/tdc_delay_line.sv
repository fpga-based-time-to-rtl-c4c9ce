// tdc_delay_line: BEHAVIOURAL MODEL (not synthesizable) of the carry-chain
// delay line and its row of sampling flip-flops.
//
// In the FPGA the line is the dedicated carry chain: the input edge ripples
// through N carry elements and a flip-flop behind each element samples the
// chain at every rising system clock edge. The sampled word is a thermometer
// code whose length is the time between the input edge and the clock edge,
// measured in uneven steps. That timing cannot be written as synthesizable
// logic, so this model reproduces it: tap i switches D(i) picoseconds after
// the input, and at a clock edge at time ts tap i captures the input's level
// at time ts - D(i).
//
// Tap widths, W(i) = D(i) - D(i-1), are drawn deterministically from SEED and
// imitate the non-linearity of a real chain: most are 10..24 ps, every eighth
// tap has zero width (a missing code) and every 64th, where the chain leaves
// a slice, is an ultra-wide 60 ps bin. The line is about 7.9 ns long, a little
// more than the 7.62 ns clock period, so it always covers one period; the mean
// tap width over a period is close to 15 ps.
//
// The model keeps only the last two input transitions, so input pulses must
// be longer than the line (7.9 ns) to be sampled correctly.
//
// Ports: din is the line input, clk the system clock, taps_q the sampled
// word (bit 0 nearest the input), registered on the rising clock edge.
// Time unit is 1 ps.
`timescale 1ps/1fs
module tdc_delay_line #(
  parameter int unsigned N    = tdc_pkg::DEF_N_TAPS,
  parameter int unsigned SEED = 1
) (
  input  logic         din,
  input  logic         clk,
  output logic [N-1:0] taps_q
);
  real  tap_delay [N];   // D(i) in ps
  real  t_last, t_prev;  // times of the last two transitions of din
  logic lvl_last, lvl_prev;
  real  line_len;

  // Deterministic width of tap i, in ps.
  function automatic real tap_width(int unsigned i);
    int unsigned h;
    h = (i + 1) * 32'd2654435761 ^ (SEED * 32'd40503);
    h = h ^ (h >> 13);
    h = h * 32'd1274126177;
    h = h ^ (h >> 16);
    if (i % 64 == 63) return 60.0;
    if (i % 8 == 5)   return 0.0;
    return 10.0 + real'(h % 1401) / 100.0;  // 10.00 .. 24.00 ps
  endfunction

  initial begin
    real d;
    d = 0.0;
    for (int unsigned i = 0; i < N; i++) begin
      d = d + tap_width(i);
      tap_delay[i] = d;
    end
    line_len = d;
    t_last   = -1.0e9;
    t_prev   = -2.0e9;
    lvl_last = 1'b0;
    lvl_prev = 1'b0;
    taps_q   = '0;
  end

  always @(din) begin
    t_prev   = t_last;
    lvl_prev = lvl_last;
    t_last   = $realtime;
    lvl_last = din;
  end

  // Level of din at time t (ps).
  function automatic logic level_at(real t);
    if (t >= t_last) return lvl_last;
    if (t >= t_prev) return lvl_prev;
    return ~lvl_prev;
  endfunction

  always @(posedge clk) begin
    real now;
    logic [N-1:0] s;
    now = $realtime;
    if (now - t_last > line_len) begin
      s = {N{lvl_last}};          // no transition inside the line
    end else begin
      for (int unsigned i = 0; i < N; i++)
        s[i] = level_at(now - tap_delay[i]);
    end
    taps_q <= s;
  end
endmodule
