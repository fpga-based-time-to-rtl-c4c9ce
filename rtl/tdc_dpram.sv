// tdc_dpram: true dual-port RAM, the block RAM of each channel.
//
// Two independent ports, A and B, each with its own address, write enable,
// write data and read data, on one clock. Reads are synchronous (data appears
// the cycle after the address), as in FPGA block RAM; a write on a port also
// updates that port's read data with the old contents (read-first). Writing
// the same address from both ports in one cycle is not allowed; an assertion
// flags it. The array has no reset: the calibrator clears it explicitly.
// Dual-port block RAM is what the calibration scheme is built on; the
// read-first behaviour and the collision rule are this design's choices,
// matching common FPGA block RAM.
`timescale 1ps/1fs
module tdc_dpram #(
  parameter int unsigned DEPTH = tdc_pkg::DEF_N_TAPS,
  parameter int unsigned DW    = tdc_pkg::DEF_HITS_LOG2 + 1,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  // port A
  input  logic [AW-1:0] addr_a,
  input  logic          we_a,
  input  logic [DW-1:0] din_a,
  output logic [DW-1:0] dout_a,
  // port B
  input  logic [AW-1:0] addr_b,
  input  logic          we_b,
  input  logic [DW-1:0] din_b,
  output logic [DW-1:0] dout_b
);
  logic [DW-1:0] mem [DEPTH];

  // Both ports in one process so that the array has a single driver.
  always_ff @(posedge clk) begin
    dout_a <= mem[addr_a];
    dout_b <= mem[addr_b];
    if (we_a) mem[addr_a] <= din_a;
    if (we_b) mem[addr_b] <= din_b;
  end

  a_no_write_collision: assert property (@(posedge clk)
    !(we_a && we_b && addr_a == addr_b))
    else $error("tdc_dpram: both ports write address %0d", addr_a);
endmodule
