// tdc_coarse_counter: counts system-clock cycles since the measurement start.
//
// The coarse part of every time tag. The TDC has no per-event start signal:
// a measurement starts when the counter is cleared, and every tag is the time
// since then. `clear` zeroes the count on the next clock edge; while `enable`
// is high the count advances by one per cycle and wraps at 2^W. With W = 36
// and a 7.62 ns clock the range is about 524 s.
//
// The 36-bit width and the idea of a start-less, free-running measurement
// follow the published instrument; clear/enable control is this design's.
//
// Timing: count is registered; the edge that captures clear leaves count = 0,
// each following enabled edge adds one.
`timescale 1ps/1fs
module tdc_coarse_counter #(
  parameter int unsigned W = tdc_pkg::DEF_COARSE_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         enable,
  output logic [W-1:0] count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      count <= '0;
    else if (clear)  count <= '0;
    else if (enable) count <= count + 1'b1;
  end
endmodule
