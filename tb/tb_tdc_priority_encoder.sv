// tb_tdc_priority_encoder: thermometer codes of every length, with and without
// bubbles, against a reference that scans from the top bit down.
`timescale 1ps/1fs
module tb_tdc_priority_encoder;
  localparam int N = 512;
  logic clk = 0, rst_n = 0;
  logic         valid_i, valid_o;
  logic [N-1:0] therm_i;
  logic [8:0]   code_o;
  int checks = 0, failures = 0;

  always #3810 clk = ~clk;

  tdc_priority_encoder dut (.*);

  function automatic int ref_code(logic [N-1:0] t);
    for (int i = N - 1; i >= 0; i--) if (t[i]) return N - 1 - i;
    return N - 1;
  endfunction

  task automatic apply(logic [N-1:0] t);
    int e;
    @(negedge clk);
    therm_i = t; valid_i = 1;
    e = ref_code(t);
    @(negedge clk);
    valid_i = 0;
    checks++;
    if (!valid_o || code_o != 9'(e)) begin
      failures++;
      $display("FAIL ones=%0d code=%0d exp=%0d valid=%0d", $countones(t), code_o, e, valid_o);
    end
  endtask

  initial begin
    logic [N-1:0] t;
    valid_i = 0; therm_i = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // clean thermometer codes of length 1..N
    for (int n = 1; n <= N; n++) begin
      t = '0;
      for (int i = 0; i < n; i++) t[i] = 1'b1;
      apply(t);
    end
    // with bubbles just below the front
    for (int k = 0; k < 1000; k++) begin
      automatic int n = 4 + $urandom % (N - 4);
      t = '0;
      for (int i = 0; i < n; i++) t[i] = 1'b1;
      t[n - 2 - $urandom % 3] = 1'b0;
      apply(t);
    end
    // valid must follow valid_i by exactly one cycle
    @(negedge clk);
    checks++;
    if (valid_o) begin failures++; $display("FAIL valid without input"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
