// tdc_input_mux: chooses what drives a channel's delay line.
//
// During calibration the delay line must see the free-running calibration
// oscillator (an external crystal, asynchronous to the system clock); in
// normal operation it sees the channel's discriminator output. The select is
// driven by the top-level state machine. This is plain combinational logic;
// in an FPGA it sits in the fabric right in front of the carry chain.
//
// Ports: sel_cal = 1 routes cal_clk, 0 routes ch_in, to line_in.
`timescale 1ps/1fs
module tdc_input_mux (
  input  logic sel_cal,
  input  logic cal_clk,
  input  logic ch_in,
  output logic line_in
);
  always_comb line_in = sel_cal ? cal_clk : ch_in;
endmodule
