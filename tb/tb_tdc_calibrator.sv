// tb_tdc_calibrator: two full calibrations of one channel's RAM with a
// non-uniform code distribution (missing codes, over-wide bins), followed by
// look-ups of every code. The expected look-up table is the running sum of a
// histogram kept here, scaled to the fine-time width and saturated. Also
// checks the phase lengths (clear and CDF take N cycles plus a few), that
// hits beyond 2^HITS_LOG2 are ignored, and the two-cycle look-up latency.
`timescale 1ps/1fs
module tb_tdc_calibrator;
  import tdc_pkg::*;
  localparam int N = 512, HL = 14, FW = 12;
  logic clk = 0, rst_n = 0;
  tdc_mode_e mode;
  logic hit_i, done, fine_valid_o;
  logic [8:0] code_i;
  logic [FW-1:0] fine_o;
  logic [HL:0] hits_counted;
  int checks = 0, failures = 0;
  int hist [N];
  int cyc;

  always #3810 clk = ~clk;

  tdc_calibrator #(.N(N), .HITS_LOG2(HL), .FINE_W(FW)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic enter(tdc_mode_e m);
    @(negedge clk); mode = m; cyc = 0;
    @(negedge clk);
    while (!done) begin @(negedge clk); cyc++; if (cyc > 100000) break; end
  endtask

  // a code drawn from a deliberately uneven distribution
  function automatic int draw(int round);
    int c = $urandom % N;
    if (c % 8 == 5) c++;                       // missing codes
    if ($urandom % 4 == 0) c = (c / 64) * 64 + 63 - round; // wide bins
    return c % N;
  endfunction

  task automatic calibrate(int round);
    int sent = 0;
    foreach (hist[i]) hist[i] = 0;
    enter(MODE_CLEAR);
    check(cyc <= N + 2, $sformatf("clear took %0d cycles", cyc));
    @(negedge clk); mode = MODE_HIST;
    @(negedge clk);
    while (sent < (1 << HL) + 300) begin
      int c = draw(round);
      hit_i = 1; code_i = 9'(c);
      if (sent < (1 << HL)) hist[c]++;
      sent++;
      @(negedge clk); hit_i = 0;
      repeat (1 + $urandom % 3) @(negedge clk);
    end
    check(done, "histogram not done");
    check(hits_counted == (HL+1)'(1 << HL), $sformatf("hits_counted %0d", hits_counted));
    enter(MODE_CDF);
    check(cyc <= N + 3, $sformatf("cdf took %0d cycles", cyc));
    @(negedge clk); mode = MODE_RUN;
    @(negedge clk);
    begin
      int cum = 0, e;
      for (int c = 0; c < N; c++) begin
        cum += hist[c];
        e = cum >> (HL - FW);
        if (e > (1 << FW) - 1) e = (1 << FW) - 1;
        hit_i = 1; code_i = 9'(c);
        @(negedge clk); hit_i = 0;
        check(!fine_valid_o, "look-up result after one cycle");
        @(negedge clk);
        check(fine_valid_o && fine_o == FW'(e),
              $sformatf("code %0d: fine %0d valid %0d, expected %0d", c, fine_o, fine_valid_o, e));
      end
    end
  endtask

  initial begin
    mode = MODE_IDLE; hit_i = 0; code_i = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    calibrate(0);
    calibrate(7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
