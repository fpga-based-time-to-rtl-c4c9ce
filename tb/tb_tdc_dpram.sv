// tb_tdc_dpram: random traffic on both ports against a reference array;
// checks the one-cycle read latency and read-first behaviour.
`timescale 1ps/1fs
module tb_tdc_dpram;
  localparam int DEPTH = 512, DW = 21;
  logic clk = 0;
  logic [8:0]    addr_a, addr_b;
  logic          we_a, we_b;
  logic [DW-1:0] din_a, din_b, dout_a, dout_b;
  logic [DW-1:0] refm [DEPTH];
  logic [DW-1:0] exp_a, exp_b;
  int checks = 0, failures = 0;

  always #3810 clk = ~clk;

  tdc_dpram dut (.*);

  initial begin
    we_a = 0; we_b = 0; addr_a = 0; addr_b = 0; din_a = 0; din_b = 0;
    // fill every word through alternating ports
    for (int i = 0; i < DEPTH; i += 2) begin
      @(negedge clk);
      addr_a = 9'(i);     we_a = 1; din_a = DW'($urandom); refm[i]   = din_a;
      addr_b = 9'(i + 1); we_b = 1; din_b = DW'($urandom); refm[i+1] = din_b;
    end
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      addr_a = 9'($urandom); addr_b = 9'($urandom);
      we_a = $urandom % 3 == 0; we_b = $urandom % 3 == 0;
      if (we_a && we_b && addr_a == addr_b) we_b = 0;
      din_a = DW'($urandom); din_b = DW'($urandom);
      exp_a = refm[addr_a]; exp_b = refm[addr_b];
      if (we_a) refm[addr_a] = din_a;
      if (we_b) refm[addr_b] = din_b;
      @(posedge clk); #1;
      checks += 2;
      if (dout_a !== exp_a || dout_b !== exp_b) begin
        failures++;
        $display("FAIL n=%0d a[%0d]=%0h exp %0h  b[%0d]=%0h exp %0h",
                 n, addr_a, dout_a, exp_a, addr_b, dout_b, exp_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
