// tb_tdc_input_mux: exhaustive check of the delay-line input selector.
`timescale 1ps/1fs
module tb_tdc_input_mux;
  logic sel_cal, cal_clk, ch_in, line_in;
  int checks = 0, failures = 0;

  tdc_input_mux dut (.*);

  initial begin
    for (int v = 0; v < 8; v++) begin
      {sel_cal, cal_clk, ch_in} = 3'(v);
      #10;
      checks++;
      if (line_in !== (v[2] ? v[1] : v[0])) begin
        failures++;
        $display("FAIL sel=%0d cal=%0d in=%0d -> %0d", v[2], v[1], v[0], line_in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
