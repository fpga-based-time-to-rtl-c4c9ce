// tdc_priority_encoder: turns the sampled delay-line thermometer code into a
// bin code.
//
// A rising edge that entered the delay line before the sampling clock edge
// has set every tap it has passed, so the sampled word is a thermometer code:
// ones from tap 0 up to the last tap reached. The encoder finds the highest
// tap that is one (h), which also ignores "bubbles" (isolated zeros below the
// front caused by uneven tap timing). The bin code is N-1-h, i.e. the bitwise
// inverse of h for a power-of-two line: the code grows with the arrival time
// of the edge within the clock period, so that a later edge gets a larger
// fine time and the fine time can be appended to the coarse count directly.
// An all-zero word gives code N-1 (it never comes with a valid hit).
//
// A 512-to-9 priority encoder is part of the published design; the code
// orientation and the highest-one rule are this design's choices.
//
// Timing: one register stage; code_o and valid_o follow therm_i and valid_i
// by one clock. The encoder is the slowest path of the channel.
`timescale 1ps/1fs
module tdc_priority_encoder #(
  parameter int unsigned N  = tdc_pkg::DEF_N_TAPS,
  localparam int unsigned CW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          valid_i,
  input  logic [N-1:0]  therm_i,
  output logic          valid_o,
  output logic [CW-1:0] code_o
);
  logic [CW-1:0] highest;

  always_comb begin
    highest = '0;
    for (int unsigned i = 0; i < N; i++)
      if (therm_i[i]) highest = CW'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_o <= 1'b0;
      code_o  <= '0;
    end else begin
      valid_o <= valid_i;
      code_o  <= CW'(N - 1) - highest;
    end
  end
endmodule
