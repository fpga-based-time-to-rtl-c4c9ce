// tdc_calibrator: statistical code density calibration of one delay line,
// done in a single dual-port block RAM.
//
// The same RAM first holds the histogram of bin codes (the PDF of the bin
// widths) and then, rewritten in place, its running sum (the CDF), which is
// the delay line's transfer function and is used as a look-up table from bin
// code to fine time. The phase is chosen by `mode` from the top-level state
// machine; `done` rises when the work of the current phase is finished and
// stays high until the mode changes.
//
//  MODE_CLEAR  every word is written with 0 through port B, one per cycle
//              (N cycles).
//  MODE_HIST   each hit reads H(code) on port A; the next cycle the value
//              plus one is written back through port B. Exactly 2^HITS_LOG2
//              hits are counted, then further hits are ignored. Hits must be
//              at least two cycles apart (the hit detector guarantees this),
//              so a read never sees a stale value.
//  MODE_CDF    port A reads address j on cycle j; the next cycle the running
//              sum acc + H(j) is written back to j through port B, so word j
//              ends up holding H(0)+...+H(j) (N+1 cycles).
//  MODE_RUN    each hit reads CDF(code) on port A; one cycle later the fine
//              time CDF >> (HITS_LOG2-FINE_W) is registered on fine_o. The
//              total is 2^HITS_LOG2, so the fine time spans 0..2^FINE_W;
//              the one value that does not fit (2^FINE_W, the end of the last
//              bin) is saturated to 2^FINE_W-1.
//
// The RAM words are HITS_LOG2+1 bits wide so that one bin can hold every hit.
// The running-sum register (rather than re-reading word j-1) and the
// saturation are choices of this design.
//
// The assertion uses rst_n in `disable iff`, so lint sees rst_n used both
// asynchronously and synchronously; it is simulation-only.
//
// Latency in MODE_RUN: hit_i at cycle c gives fine_valid_o at cycle c+2.
`timescale 1ps/1fs
module tdc_calibrator
  import tdc_pkg::*;
#(
  parameter int unsigned N         = tdc_pkg::DEF_N_TAPS,
  parameter int unsigned HITS_LOG2 = tdc_pkg::DEF_HITS_LOG2,
  parameter int unsigned FINE_W    = tdc_pkg::DEF_FINE_W,
  localparam int unsigned CW       = $clog2(N),
  localparam int unsigned DW       = HITS_LOG2 + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  tdc_mode_e         mode,
  input  logic              hit_i,
  input  logic [CW-1:0]     code_i,
  output logic              done,
  output logic              fine_valid_o,
  output logic [FINE_W-1:0] fine_o,
  output logic [DW-1:0]     hits_counted  // hits histogrammed so far
);
  localparam logic [DW-1:0] HIT_TARGET = DW'(1) << HITS_LOG2;
  localparam int unsigned   SHIFT      = HITS_LOG2 - FINE_W;

  // RAM ports
  logic [CW-1:0] addr_a, addr_b;
  logic          we_b;
  logic [DW-1:0] din_b, dout_a, dout_b;

  tdc_dpram #(.DEPTH(N), .DW(DW)) u_ram (
    .clk   (clk),
    .addr_a(addr_a), .we_a(1'b0), .din_a('0), .dout_a(dout_a),
    .addr_b(addr_b), .we_b(we_b), .din_b(din_b), .dout_b(dout_b)
  );

  tdc_mode_e     mode_q;
  logic          phase_start;
  logic [CW:0]   sweep;        // address sweep for CLEAR and CDF (one extra bit)
  logic          rd_pend;      // port A read issued last cycle
  logic [CW-1:0] rd_addr;      // its address
  logic [DW-1:0] acc;          // running sum for the CDF
  logic [DW-1:0] sum;

  assign phase_start = (mode != mode_q);
  assign sum         = acc + dout_a;

  // Port A: the bin code of a hit, or the CDF sweep address.
  always_comb begin
    addr_a = code_i;
    if (mode == MODE_CDF) addr_a = sweep[CW-1:0];
  end

  // Port B: clearing, histogram write-back, CDF write-back.
  always_comb begin
    addr_b = rd_addr;
    we_b   = 1'b0;
    din_b  = '0;
    unique case (mode)
      MODE_CLEAR: begin
        addr_b = sweep[CW-1:0];
        we_b   = !phase_start && !sweep[CW];
      end
      MODE_HIST: begin
        we_b  = rd_pend;
        din_b = dout_a + 1'b1;
      end
      MODE_CDF: begin
        we_b  = rd_pend;
        din_b = sum;
      end
      default: ;
    endcase
  end

  logic hist_take;
  assign hist_take = (mode == MODE_HIST) && !phase_start && hit_i
                     && (hits_counted != HIT_TARGET);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q       <= MODE_IDLE;
      sweep        <= '0;
      rd_pend      <= 1'b0;
      rd_addr      <= '0;
      acc          <= '0;
      hits_counted <= '0;
      done         <= 1'b0;
      fine_valid_o <= 1'b0;
      fine_o       <= '0;
    end else begin
      mode_q       <= mode;
      rd_pend      <= 1'b0;
      fine_valid_o <= 1'b0;
      if (phase_start) begin
        sweep   <= '0;
        acc     <= '0;
        done    <= 1'b0;
        if (mode == MODE_HIST) hits_counted <= '0;
      end else begin
        unique case (mode)
          MODE_CLEAR: begin
            if (!sweep[CW]) sweep <= sweep + 1'b1;
            else            done  <= 1'b1;
          end
          MODE_HIST: begin
            if (hist_take) begin
              rd_pend      <= 1'b1;
              rd_addr      <= code_i;
              hits_counted <= hits_counted + 1'b1;
            end
            done <= (hits_counted == HIT_TARGET) && !rd_pend;
          end
          MODE_CDF: begin
            if (!sweep[CW]) begin
              sweep   <= sweep + 1'b1;
              rd_pend <= 1'b1;
              rd_addr <= sweep[CW-1:0];
            end else if (!rd_pend) begin
              done <= 1'b1;
            end
            if (rd_pend) acc <= sum;
          end
          MODE_RUN: begin
            if (hit_i) rd_pend <= 1'b1;
            if (rd_pend) begin
              fine_valid_o <= 1'b1;
              if ((dout_a >> SHIFT) > DW'((1 << FINE_W) - 1))
                fine_o <= '1;
              else
                fine_o <= FINE_W'(dout_a >> SHIFT);
            end
          end
          default: ;
        endcase
      end
    end
  end

  // Histogram read-modify-write needs hits at least two cycles apart.
  a_hit_spacing: assert property (@(posedge clk) disable iff (!rst_n)
    (mode == MODE_HIST && rd_pend) |-> !hist_take)
    else $error("tdc_calibrator: hits on consecutive cycles");

  // unused: port B read data
  logic unused_ok;
  assign unused_ok = ^dout_b;
endmodule
