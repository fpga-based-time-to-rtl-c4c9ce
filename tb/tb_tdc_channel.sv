// tb_tdc_channel: one channel, calibrated and then measuring.
//
// The testbench steps the channel through clear, histogram (fed by an
// asynchronous 57.04 MHz calibration clock) and CDF, then sends rising edges
// at random, known times and compares each tag with the ideal fixed-point time
// (t - t0) / T_CLK * 2^12, where t0 is the clock edge at which the coarse count
// was zero. The calibrated tag marks the end of the bin the edge fell in, so
// it may be late by up to one bin (widest bin 60 ps = 32 LSB); the bound used
// is -8..37 LSB per tag (a few LSB of calibration error either way) and
// 0..10 LSB for the mean error. The time of an edge
// is taken where it reaches the first tap: the delay in front of tap 0 is a
// fixed offset that code-density calibration cannot see. Tag count and the
// five-cycle latency are checked too.
`timescale 1ps/1fs
module tb_tdc_channel;
  import tdc_pkg::*;
  localparam int  N = 512, HL = 16, FW = 12, CB = 36;
  localparam real T = 7620.0;
  localparam real T_CAL = 17530.0;
  logic clk = 0, rst_n = 0;
  tdc_mode_e mode;
  logic cal_sel, cal_clk = 0, ch_in = 0;
  logic [CB-1:0] coarse;
  logic done, tag_valid;
  logic [HL:0] hits_counted;
  logic [CB+FW-1:0] tag;
  int checks = 0, failures = 0;
  real t0;
  real edge_t [$];
  int  edge_cyc [$];
  int  cyc = 0;
  real err_sum = 0.0, err_max = 0.0;
  int  n_tags = 0;

  always #3810 clk = ~clk;
  always #(T_CAL / 2.0) cal_clk = ~cal_clk;
  always @(posedge clk) begin
    coarse <= coarse + 1'b1;
    cyc++;
  end

  tdc_channel #(.N(N), .HITS_LOG2(HL), .FINE_W(FW), .COARSE_W(CB), .SEED(5)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic phase(tdc_mode_e m, int limit);
    int n = 0;
    @(negedge clk); mode = m;
    @(negedge clk); @(negedge clk);
    while (!done && n < limit) begin @(negedge clk); n++; end
    check(done, $sformatf("phase %s not done", m.name()));
  endtask

  // compare tags with the edges sent
  always @(negedge clk) if (tag_valid) begin
    real t, ideal, err;
    int  c;
    n_tags++;
    if (edge_t.size() == 0) begin
      check(0, "tag without an edge");
    end else begin
      t = edge_t.pop_front();
      c = edge_cyc.pop_front();
      // the edge reaches the first sampling flip-flop D(0) after t
      ideal = (t + dut.u_line.tap_delay[0] - t0) / T * 4096.0;
      err   = real'(tag) - ideal;
      err_sum += err;
      if (err > err_max) err_max = err;
      if (-err > err_max) err_max = -err;
      check(err > -8.0 && err < 37.0,
            $sformatf("tag %0d, ideal %0.1f (error %0.1f LSB)", tag, ideal, err));
      // sampled at the first clock edge after the edge reaches tap 0 (one
      // edge later if that is within D(0) of a clock edge); tag five edges
      // after the sampling edge
      check(cyc - c == 6 || cyc - c == 7, $sformatf("latency %0d edges", cyc - c - 1));
    end
  end

  initial begin
    mode = MODE_IDLE; cal_sel = 0; coarse = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    cal_sel = 1;
    phase(MODE_CLEAR, 2 * N);
    phase(MODE_HIST, 4 << HL);
    check(hits_counted == (HL+1)'(1 << HL), "hit count");
    @(negedge clk); cal_sel = 0;
    phase(MODE_CDF, 2 * N);
    @(negedge clk); mode = MODE_RUN;
    // time origin: the next rising clock edge leaves coarse = 0
    @(negedge clk);
    coarse = '1;
    @(posedge clk);
    t0 = $realtime;
    for (int k = 0; k < 2000; k++) begin
      real gap;
      gap = 20000.0 + real'($urandom % 4000000) / 100.0;
      #(gap * 1.0);
      ch_in = 1;
      edge_t.push_back($realtime);
      edge_cyc.push_back(cyc);
      #(10000.0);
      ch_in = 0;
    end
    #(100000);
    check(n_tags == 2000, $sformatf("%0d tags for 2000 edges", n_tags));
    check(err_sum / 2000.0 > 0.0 && err_sum / 2000.0 < 10.0, $sformatf("mean error %0.2f LSB", err_sum / 2000.0));
    $display("mean error %0.2f LSB, max |error| %0.2f LSB", err_sum / 2000.0, err_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #40000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
