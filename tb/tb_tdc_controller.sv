// tb_tdc_controller: drives the host commands and imitates the channels'
// phase-done flag (a phase finishes a random number of cycles after the mode
// changes, and done stays stale for one cycle as in the channels). Checks the
// mode sequence CLEAR -> HIST -> CDF -> IDLE(ready) -> RUN, the calibration
// multiplexer select, the coarse counter clear on every start, stop, and a
// recalibration from RUN.
`timescale 1ps/1fs
module tb_tdc_controller;
  import tdc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cmd_calibrate, cmd_start, cmd_stop, all_done;
  tdc_mode_e mode;
  logic cal_sel, coarse_clear, coarse_enable, calibrated;
  int checks = 0, failures = 0;

  always #3810 clk = ~clk;

  tdc_controller dut (.*);

  // channel imitation: done drops one cycle after the mode changes and rises
  // a random time later
  tdc_mode_e mode_q;
  int        busy;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q   <= MODE_IDLE;
      all_done <= 1'b0;
      busy     <= 0;
    end else begin
    mode_q <= mode;
    if (mode != mode_q) begin
      all_done <= 1'b0;
      busy     <= 3 + $urandom % 20;
    end else if (busy > 0) busy <= busy - 1;
    else all_done <= (mode inside {MODE_CLEAR, MODE_HIST, MODE_CDF});
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (mode %s)", what, mode.name()); end
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask

  task automatic expect_calibration();
    int guard;
    check(mode == MODE_CLEAR && cal_sel && !calibrated, "clear after calibrate");
    guard = 0;
    while (mode == MODE_CLEAR && guard < 100) begin @(negedge clk); guard++; end
    check(mode == MODE_HIST && cal_sel, "histogram after clear");
    check(guard > 3, "clear left before its done");
    guard = 0;
    while (mode == MODE_HIST && guard < 100) begin @(negedge clk); guard++; end
    check(mode == MODE_CDF && !cal_sel, "cdf after histogram");
    check(guard > 3, "histogram left before its done");
    while (mode == MODE_CDF && guard < 200) begin @(negedge clk); guard++; end
    check(mode == MODE_IDLE && calibrated && !cal_sel, "ready after cdf");
  endtask

  initial begin
    int clears;
    cmd_calibrate = 0; cmd_start = 0; cmd_stop = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(mode == MODE_IDLE && !calibrated && !coarse_enable, "idle after reset");
    pulse(cmd_start);                       // ignored before calibration
    check(mode == MODE_IDLE, "start before calibration ignored");
    pulse(cmd_calibrate);
    expect_calibration();
    // start: one clear pulse, then counting
    clears = 0;
    @(negedge clk); cmd_start = 1;
    @(negedge clk); cmd_start = 0;
    check(mode == MODE_RUN && coarse_enable, "run after start");
    repeat (3) begin if (coarse_clear) clears++; @(negedge clk); end
    check(clears == 1, $sformatf("%0d coarse clears on start", clears));
    // restart while running clears again
    clears = 0;
    pulse(cmd_start);
    repeat (3) begin if (coarse_clear) clears++; @(negedge clk); end
    check(clears == 1 && mode == MODE_RUN, "restart clears the counter");
    pulse(cmd_stop);
    check(mode == MODE_IDLE && calibrated && !coarse_enable, "ready after stop");
    pulse(cmd_start);
    check(mode == MODE_RUN, "run again");
    pulse(cmd_calibrate);                   // recalibrate from run
    expect_calibration();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
