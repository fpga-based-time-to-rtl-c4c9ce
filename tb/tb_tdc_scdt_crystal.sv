// tb_tdc_scdt_crystal: code-density calibration of one full-size channel
// (512 taps, 2^20 hits) from a 1.8432 MHz calibration oscillator against the
// 131.25 MHz system clock, as in the instrument.
//
// After the histogram phase the bin widths W(i) = H(i) * T_CLK / 2^20 are
// computed from the RAM contents and compared with the true widths of the
// delay-line model (the part of each tap's delay that falls inside one clock
// period). DNL(i) = W(i) / T_LSB - 1 and INL(i) = sum of DNL up to i are
// reported, with the ideal bin width T_LSB = T_CLK / 512 = 14.88 ps (the
// mean bin of the line; against the 1.86 ps fine-time LSB every bin would be
// several LSB wide and the INL would only grow). Then the look-up table is built and
// 500 edges at random times are tagged and checked as in tb_tdc_channel.
`timescale 1ps/1fs
module tb_tdc_scdt_crystal;
  import tdc_pkg::*;
  localparam int  N = 512, HL = 20, FW = 12, CB = 36;
  localparam real T = 7620.0;
  localparam real T_CAL = 1.0e6 / 1.8432;   // ps
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
  int  n_tags = 0;

  always #3810 clk = ~clk;
  always #(T_CAL / 2.0) cal_clk = ~cal_clk;
  always @(posedge clk) coarse <= coarse + 1'b1;

  tdc_channel dut (.*);

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

  always @(negedge clk) if (tag_valid) begin
    real ideal, err;
    n_tags++;
    if (edge_t.size() == 0) check(0, "tag without an edge");
    else begin
      ideal = (edge_t.pop_front() + dut.u_line.tap_delay[0] - t0) / T * 4096.0;
      err = real'(tag) - ideal;
      check(err > -8.0 && err < 37.0, $sformatf("tag %0d ideal %0.1f error %0.1f", tag, ideal, err));
    end
  end

  // true width of bin `code`: elapsed times in [D(h), D(h+1)), h = N-1-code,
  // limited to the one period [D(0), D(0) + T) that hits can come from
  function automatic real true_width(int code);
    int  h = N - 1 - code;
    real lo = dut.u_line.tap_delay[h];
    real hi = (h == N - 1) ? 1.0e9 : dut.u_line.tap_delay[h + 1];
    real a = dut.u_line.tap_delay[0], b = dut.u_line.tap_delay[0] + T;
    if (lo < a) lo = a;
    if (hi > b) hi = b;
    return (hi > lo) ? hi - lo : 0.0;
  endfunction

  initial begin
    real w, wt, err_max, dnl, dnl_max, inl, inl_max, tlsb, wsum;
    int  missing;
    mode = MODE_IDLE; cal_sel = 0; coarse = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    cal_sel = 1;
    phase(MODE_CLEAR, 2 * N);
    phase(MODE_HIST, 80 << HL);
    check(hits_counted == (HL+1)'(1 << HL), "hit count");
    // bin widths from the histogram, eq. W(i) = H(i) T / Y
    tlsb = T / real'(N);
    err_max = 0.0; dnl_max = 0.0; inl = 0.0; inl_max = 0.0; wsum = 0.0; missing = 0;
    for (int c = 0; c < N; c++) begin
      w  = real'(dut.u_cal.u_ram.mem[c]) * T / real'(1 << HL);
      wt = true_width(c);
      wsum += w;
      if (w == 0.0) missing++;
      if (w - wt > err_max) err_max = w - wt;
      if (wt - w > err_max) err_max = wt - w;
      dnl = w / tlsb - 1.0;
      inl += dnl;
      if (dnl > dnl_max) dnl_max = dnl;
      if (inl > inl_max) inl_max = inl;
      if (-inl > inl_max) inl_max = -inl;
    end
    $display("bin widths: max |measured - true| %0.3f ps, %0d missing codes, sum %0.1f ps",
             err_max, missing, wsum);
    $display("DNL max %0.2f LSB, |INL| max %0.2f LSB (LSB = %0.3f ps)", dnl_max, inl_max, tlsb);
    check(err_max < 0.5, "measured bin widths match the delay line");
    check(missing > 50, "missing codes seen");
    check(dnl_max > 2.0 && inl_max < 40.0, "DNL shows the wide bins, INL bounded");
    @(negedge clk); cal_sel = 0;
    phase(MODE_CDF, 2 * N);
    @(negedge clk); mode = MODE_RUN;
    @(negedge clk);
    coarse = '1;
    @(posedge clk);
    t0 = $realtime;
    for (int k = 0; k < 500; k++) begin
      #(20000.0 + real'($urandom % 4000000) / 100.0);
      ch_in = 1;
      edge_t.push_back($realtime);
      #(10000.0);
      ch_in = 0;
    end
    #(100000);
    check(n_tags == 500, $sformatf("%0d tags for 500 edges", n_tags));
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
