// tb_tdc_coarse_counter: random clear/enable against a reference count, at
// the full 36-bit width and at 4 bits to see the wrap.
`timescale 1ps/1fs
module tb_tdc_coarse_counter;
  logic clk = 0, rst_n = 0;
  logic clear, enable;
  logic [35:0] count36;
  logic [3:0]  count4;
  longint unsigned ref36;
  int unsigned ref4;
  int checks = 0, failures = 0, wraps = 0;

  always #3810 clk = ~clk;

  tdc_coarse_counter dut36 (.clk, .rst_n, .clear, .enable, .count(count36));
  tdc_coarse_counter #(.W(4)) dut4 (.clk, .rst_n, .clear, .enable, .count(count4));

  initial begin
    clear = 0; enable = 0; ref36 = 0; ref4 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (count36 != 36'(ref36) || count4 != 4'(ref4)) begin
        failures++;
        $display("FAIL cycle %0d: %0d/%0d expected %0d/%0d", i, count36, count4, ref36, ref4);
      end
      clear  = ($urandom % 100) == 0;
      enable = ($urandom % 8) != 0;
      if (clear) begin ref36 = 0; ref4 = 0; end
      else if (enable) begin
        ref36++;
        if (ref4 == 15) wraps++;
        ref4 = (ref4 + 1) % 16;
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL no wrap seen"); end
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
