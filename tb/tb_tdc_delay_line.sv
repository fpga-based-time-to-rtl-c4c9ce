// tb_tdc_delay_line: checks the behavioural delay line and sampling
// flip-flops. Edges are placed at known times before a clock edge; the
// sampled word must be the thermometer code of the taps whose delay is not
// longer than the time since the edge, the line must cover a clock period
// and its mean tap width over one period must be near 15 ps.
`timescale 1ps/1fs
module tb_tdc_delay_line;
  localparam int  N = 512;
  localparam real T = 7620.0;
  logic clk = 0, din = 0;
  logic [N-1:0] taps_q;
  int checks = 0, failures = 0;

  tdc_delay_line #(.N(N), .SEED(3)) dut (.din, .clk, .taps_q);

  initial begin
    real lead, ts, mean_w;
    int  ones, exp_ones, in_period;
    #10000;
    // line covers a period, mean width over one period near 15 ps
    in_period = 0;
    for (int i = 0; i < N; i++) if (dut.tap_delay[i] <= T) in_period++;
    mean_w = T / real'(in_period);
    checks++;
    if (dut.line_len < T || mean_w < 13.0 || mean_w > 17.0) begin
      failures++;
      $display("FAIL line %0.1f ps, mean width %0.2f ps", dut.line_len, mean_w);
    end
    for (int k = 0; k < 400; k++) begin
      // rising edge 'lead' ps before the next clock edge
      lead = 1.0 + real'($urandom % 760000) / 100.0;
      ts   = $realtime + 20000.0;
      #(ts - lead - $realtime) din = 1;
      #(ts - $realtime) clk = 1;
      #1 clk = 0;
      exp_ones = 0;
      for (int i = 0; i < N; i++) if (dut.tap_delay[i] <= lead) exp_ones++;
      ones = $countones(taps_q);
      checks++;
      if (ones != exp_ones || taps_q != (({N{1'b1}} << ones) ^ {N{1'b1}})) begin
        failures++;
        $display("FAIL lead %0.2f: %0d ones, expected %0d", lead, ones, exp_ones);
      end
      // a clock edge long after: all ones
      #(12000) clk = 1;
      #1 clk = 0;
      checks++;
      if (taps_q != '1) begin failures++; $display("FAIL not all ones after settling"); end
      #(1000) din = 0;
      #(12000) clk = 1;
      #1 clk = 0;
      checks++;
      if (taps_q != '0) begin failures++; $display("FAIL not all zeros after falling edge"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
