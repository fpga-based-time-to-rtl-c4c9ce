// tb_tdc_ssp: single-shot precision of a pair of channels.
//
// Two channels of the TDC (all other sizes at their defaults: 512 taps,
// 2^20 calibration hits, 12-bit fine and 36-bit coarse time) are calibrated
// and then both receive the same input edge, as from a pulse generator and a
// splitter, two million times at random points of the clock period. For
// every event the difference of the two tags is formed; its RMS about the
// mean is the single-shot precision of the pair. The delay-line model has no
// jitter, so this measures what the calibrated quantisation of two different
// lines contributes. Every tag is also compared with the ideal time of its
// edge: -8..37 LSB, i.e. up to one bin (the widest is 60 ps = 32 LSB) late
// plus a few LSB of calibration error.
`timescale 1ps/1fs
module tb_tdc_ssp;
  import tdc_pkg::*;
  localparam int  N_CH = 2, CB = 36, FW = 12, TW = CB + FW, HL = 20;
  localparam int  EVENTS = 2000000;
  localparam real T = 7620.0;
  localparam real T_CAL = 17530.0;

  logic clk = 0, rst_n = 0;
  logic cmd_calibrate = 0, cmd_start = 0, cmd_stop = 0;
  logic cal_clk = 0;
  logic [N_CH-1:0] ch_in = '0;
  tdc_mode_e mode;
  logic calibrated;
  logic [CB-1:0] coarse;
  logic [N_CH-1:0] tag_valid;
  logic [TW-1:0] tag [N_CH];
  logic [HL:0] hits_counted [N_CH];

  int checks = 0, failures = 0, bad = 0;
  real t0, d0 [N_CH];
  real edge_t [$];
  real tag_q [N_CH][$];
  real dsum = 0.0, dsq = 0.0, emax = 0.0;
  int  n_pairs = 0;

  always #3810 clk = ~clk;

  // time origin: the clock edge after which a running counter reads 0
  initial t0 = 0.0;
  always @(posedge clk) begin
    #1;
    if (coarse == 0 && dut.coarse_enable) t0 = $realtime - 1.0;
  end
  always #(T_CAL / 2.0) cal_clk = ~cal_clk;

  tdc_top #(.N_CH(N_CH)) dut (.*);

  for (genvar c = 0; c < N_CH; c++) begin : g_d0
    initial #100 d0[c] = dut.g_ch[c].u_ch.u_line.tap_delay[0];
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(negedge clk) begin
    for (int c = 0; c < N_CH; c++) if (tag_valid[c]) tag_q[c].push_back(real'(tag[c]));
    while (tag_q[0].size() > 0 && tag_q[1].size() > 0) begin
      automatic real a  = tag_q[0].pop_front();
      automatic real b  = tag_q[1].pop_front();
      automatic real t  = edge_t.pop_front();
      automatic real e0 = a - (t + d0[0] - t0) / T * 4096.0;
      automatic real e1 = b - (t + d0[1] - t0) / T * 4096.0;
      if (!(e0 > -8.0 && e0 < 37.0 && e1 > -8.0 && e1 < 37.0)) begin
        bad++;
        if (bad < 10) $display("FAIL tag errors %0.1f / %0.1f LSB", e0, e1);
      end
      dsum += b - a; dsq += (b - a) * (b - a);
      n_pairs++;
    end
  end

  initial begin
    int n;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); cmd_calibrate = 1; @(negedge clk); cmd_calibrate = 0;
    n = 0;
    while (!calibrated && n < (8 << HL)) begin @(negedge clk); n++; end
    check(calibrated, "calibration finished");
    @(negedge clk); cmd_start = 1; @(negedge clk); cmd_start = 0;
    repeat (2) @(negedge clk);
    check(t0 > 0.0 && coarse == 36'($rtoi(($realtime - t0) / T)),
          $sformatf("coarse origin (coarse %0d)", coarse));
    for (int k = 0; k < EVENTS; k++) begin
      #(12000.0 + real'($urandom % 1000000) / 100.0);
      ch_in = '1;
      edge_t.push_back($realtime);
      #(10000.0);
      ch_in = '0;
    end
    #(100000.0);
    @(negedge clk); cmd_stop = 1; @(negedge clk); cmd_stop = 0;
    begin
      automatic real m  = dsum / n_pairs;
      automatic real sd = $sqrt(dsq / n_pairs - m * m);
      $display("%0d pairs: mean difference %0.2f LSB, RMS about the mean %0.2f LSB = %0.2f ps",
               n_pairs, m, sd, sd * T / 4096.0);
      check(n_pairs == EVENTS, $sformatf("%0d tag pairs", n_pairs));
      check(bad == 0, $sformatf("%0d tags outside the bound", bad));
      check(sd * T / 4096.0 < 20.0, "pair precision below 20 ps RMS");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
