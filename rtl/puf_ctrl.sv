// PUF-mode controller: measurement window and response register.
//
// The design has two modes, selected by the En pin. In normal mode the PUF
// multiplexers are detached from the hardware multiplier (their inputs are
// held at zero), so the counters see no clock edges. Raising En starts a
// measurement and lowering it ends one:
//
//   edge 0  En sampled high: counters cleared (clr, one cycle), counting
//           enabled (cnt_en)
//   edge 2  multiplexers attached to the multiplier output (attach)
//   ...     the challenge program runs; counters count rising edges
//   edge k  En sampled low: attach and cnt_en drop together, counters freeze
//   edge k+1 bits 9..24 of both counters are copied into the 32-bit response
//           register and resp_valid rises; it stays high until the next start
//
// attach rises only after the clear has ended and cnt_en is steady, and falls
// in the same edge as cnt_en, so no count is made while either changes. The
// counters are frozen when they are copied, so the copy into the clk domain
// is safe. En must be synchronous to clk.
//
// The two modes, the En pin, the bit field 9..24 of each counter and the
// 32-bit response come from the document. The clear at the start, the cycle
// timing and the placement of counter 1 in the upper half are this design's
// choices.
module puf_ctrl
  import mpuf_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,       // asynchronous reset, active low
  input  logic                 en,          // PUF mode pin (En)
  input  logic [CNT_W-1:0]     cnt1,        // PUF-counter 1
  input  logic [CNT_W-1:0]     cnt2,        // PUF-counter 2
  output logic                 cnt_clr,     // clear both counters
  output logic                 cnt_en,      // counter enable
  output logic                 attach,      // connect multiplier output to muxes
  output logic [2*RESP_HALF-1:0] response,  // {cnt1[24:9], cnt2[24:9]}
  output logic                 resp_valid
);

  logic en_q, capture;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_q       <= 1'b0;
      cnt_clr    <= 1'b0;
      attach     <= 1'b0;
      capture    <= 1'b0;
      response   <= '0;
      resp_valid <= 1'b0;
    end else begin
      en_q    <= en;
      cnt_clr <= en & ~en_q;
      attach  <= en & en_q & ~cnt_clr;
      capture <= ~en & en_q;
      if (en & ~en_q) begin
        resp_valid <= 1'b0;
      end else if (capture) begin
        response   <= {cnt1[RESP_MSB:RESP_LSB], cnt2[RESP_MSB:RESP_LSB]};
        resp_valid <= 1'b1;
      end
    end
  end

  assign cnt_en = en_q;

  // The counters must be frozen whenever they are copied.
  a_frozen: assert property (@(posedge clk) disable iff (!rst_n)
                             capture |-> !cnt_en && !attach);

endmodule
