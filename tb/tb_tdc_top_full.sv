// tb_tdc_top_full: one complete calibration and measurement of the TDC at its
// default size: 16 channels, 512-tap lines, 2^20 calibration hits per
// channel, 12-bit fine time, 36-bit coarse count. The top is instantiated
// without parameters.
//
// Sequence: reset, calibrate (clear, histogram from the 57.04 MHz
// calibration clock, CDF), start, a series of input events in which every
// channel gets the same edge (the splitter arrangement used to measure
// single-shot precision), stop.
// Every tag is compared with the ideal fixed-point time of its edge counted
// from the coarse-counter origin (the look-up table
// marks the end of a bin, so a tag may be up to one bin, 32 LSB, late;
// calibration error allows a few LSB early), and for
// every channel the spread (standard deviation) of its tag minus channel 0's
// tag is reported and bounded. Each mechanism - the calibration phases, the
// input multiplexer switch, start/stop, recalibration - is counted and must
// have happened.
`timescale 1ps/1fs
module tb_tdc_top_full;
  import tdc_pkg::*;
  localparam int  N_CH = 16, N = 512, HL = 20, FW = 12, CB = 36;
  localparam int  EVENTS = 200;
  localparam real T = 7620.0;
  localparam real T_CAL = 17530.0;
  localparam int  TW = CB + FW;

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

  int checks = 0, failures = 0;
  real t0, d0 [N_CH];
  real edge_t [N_CH][$];
  real last_tag [N_CH];
  int  n_tags [N_CH];
  real dsum [N_CH], dsq [N_CH];
  int  n_pairs;
  int  n_clear = 0, n_hist = 0, n_cdf = 0, n_run = 0, n_mux = 0, n_origin = 0;
  tdc_mode_e mode_q = MODE_IDLE;
  logic cal_sel_q = 0;

  always #3810 clk = ~clk;
  always #(T_CAL / 2.0) cal_clk = ~cal_clk;

  tdc_top dut (.*);

  for (genvar c = 0; c < N_CH; c++) begin : g_d0
    initial #100 d0[c] = dut.g_ch[c].u_ch.u_line.tap_delay[0];
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask

  // mechanism counters and the time origin
  always @(posedge clk) begin
    #1;
    if (mode != mode_q) begin
      case (mode)
        MODE_CLEAR: n_clear++;
        MODE_HIST:  n_hist++;
        MODE_CDF:   n_cdf++;
        MODE_RUN:   n_run++;
        default: ;
      endcase
    end
    if (dut.cal_sel && !cal_sel_q) n_mux++;
    if (mode == MODE_RUN && dut.coarse_clear) begin
      // coarse is zero from the next edge on
      @(posedge clk); t0 = $realtime; n_origin++;
    end
    mode_q    = mode;
    cal_sel_q = dut.cal_sel;
  end

  // tag checking
  always @(negedge clk) begin
    for (int c = 0; c < N_CH; c++) if (tag_valid[c]) begin
      real t, ideal, err;
      n_tags[c]++;
      if (edge_t[c].size() == 0) check(0, $sformatf("ch%0d tag without an edge", c));
      else begin
        t = edge_t[c].pop_front();
        ideal = (t + d0[c] - t0) / T * 4096.0;
        err = real'(tag[c]) - ideal;
        check(err > -8.0 && err < 37.0,
              $sformatf("ch%0d tag %0d ideal %0.1f error %0.1f LSB", c, tag[c], ideal, err));
        last_tag[c] = real'(tag[c]);
      end
    end
  end

  task automatic wait_calibrated();
    int n = 0;
    while (!calibrated && n < (8 << HL)) begin @(negedge clk); n++; end
    check(calibrated, "calibration did not finish");
    for (int c = 0; c < N_CH; c++)
      check(hits_counted[c] == (HL+1)'(1 << HL),
            $sformatf("ch%0d histogram holds %0d hits", c, hits_counted[c]));
  endtask

  task automatic events(int count);
    for (int k = 0; k < count; k++) begin
      #(20000.0 + real'($urandom % 3000000) / 100.0);
      ch_in = '1;
      for (int c = 0; c < N_CH; c++) edge_t[c].push_back($realtime);
      #(10000.0);
      ch_in = '0;
      #(60000.0);   // all tags of this event are out
      for (int c = 1; c < N_CH; c++) begin
        real d = last_tag[c] - last_tag[0];
        dsum[c] += d; dsq[c] += d * d;
      end
      n_pairs++;
    end
  endtask

  initial begin
    foreach (n_tags[c]) begin
      n_tags[c] = 0; dsum[c] = 0.0; dsq[c] = 0.0; last_tag[c] = 0.0;
    end
    n_pairs = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    pulse(cmd_calibrate);
    wait_calibrated();
    pulse(cmd_start);
    events(EVENTS);
    pulse(cmd_stop);
    // edges while stopped give no tags
    #(50000.0); ch_in = '1; #(10000.0); ch_in = '0; #(50000.0);
    for (int c = 0; c < N_CH; c++)
      check(n_tags[c] == EVENTS, $sformatf("ch%0d: %0d tags", c, n_tags[c]));
    for (int c = 1; c < N_CH; c++) begin
      automatic real m  = dsum[c] / n_pairs;
      automatic real sd = $sqrt(dsq[c] / n_pairs - m * m);
      $display("ch%0d - ch0: mean %0.2f LSB, spread %0.2f LSB (%0.2f ps)", c, m, sd,
               sd * T / 4096.0);
      check(sd < 12.0, $sformatf("ch%0d spread %0.2f LSB", c, sd));
    end
    $display("mechanisms: clear %0d hist %0d cdf %0d run %0d mux-switch %0d origin %0d",
             n_clear, n_hist, n_cdf, n_run, n_mux, n_origin);
    check(n_clear >= 1 && n_hist >= 1 && n_cdf >= 1, "calibration phases");
    check(n_mux >= 1, "input multiplexer switched to the calibration clock");
    check(n_run >= 1 && n_origin >= 1, "measurement start with coarse origin");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
