// Multiplier-based physical unclonable function (top level).
//
// The hardware multiplier peripheral of a small microcontroller is reused as
// a delay-based PUF. Its 32-bit result path (the output of the multiplexer
// that chooses product or accumulated sum) feeds two 32-to-1 multiplexers.
// Each multiplexer, steered by 5 challenge bits, picks one result bit and
// uses it as the clock of a 32-bit PUF-counter. While a challenge program
// drives the multiplier through its bus (for instance a loop of
// multiply-accumulate operations), each counter counts how often its bit
// rises; in silicon the glitches on that bit, which depend on the chip's own
// path delays, add to the count. Bits 9..24 of both counters form the 32-bit
// response: counter 1 in bits 31..16, counter 2 in bits 15..0.
//
// The challenge therefore has two parts: the 10 select bits (puf_sel) and the
// program run on the multiplier. The En pin switches between normal mode, in
// which the PUF logic is detached and the multiplier works as an ordinary
// peripheral, and PUF mode, in which the counters run (see puf_ctrl for the
// cycle timing). The CPU that runs the program is not part of this RTL: its
// peripheral bus is brought out as ports.
//
// The structure (multiplier, two multiplexers with 5 select lines, two 32-bit
// counters, bits 9..24, En, detaching in normal mode) follows the document;
// the bus, the counter clear and the response timing are this design's.
module mpuf_top
  import mpuf_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,          // asynchronous reset, active low
  // peripheral bus from the CPU
  input  logic [15:0]            per_addr,
  input  logic [15:0]            per_din,
  input  logic                   per_en,
  input  logic                   per_we,
  output logic [15:0]            per_dout,
  // PUF challenge and response
  input  logic                   puf_en,         // En: 1 = PUF mode
  input  puf_sel_t               puf_sel,        // 2 x 5 select lines
  output logic [2*RESP_HALF-1:0] puf_response,
  output logic                   puf_resp_valid
);

  logic [MULT_OUT_W-1:0] mult_out, mux_in;
  logic                  pclk1, pclk2;
  logic [CNT_W-1:0]      cnt1, cnt2;
  logic                  cnt_clr, cnt_en, attach;

  hw_multiplier u_hwmult (
    .clk     (clk),
    .rst_n   (rst_n),
    .per_addr(per_addr),
    .per_din (per_din),
    .per_en  (per_en),
    .per_we  (per_we),
    .per_dout(per_dout),
    .mult_out(mult_out)
  );

  // Normal mode: the PUF multiplexers are detached from the multiplier.
  assign mux_in = attach ? mult_out : '0;

  puf_mux #(.WIDTH(MULT_OUT_W), .SEL_W(SEL_W)) u_mux1 (
    .din (mux_in),
    .sel (puf_sel.sel1),
    .dout(pclk1)
  );

  puf_mux #(.WIDTH(MULT_OUT_W), .SEL_W(SEL_W)) u_mux2 (
    .din (mux_in),
    .sel (puf_sel.sel2),
    .dout(pclk2)
  );

  puf_counter #(.WIDTH(CNT_W)) u_cnt1 (
    .puf_clk(pclk1),
    .rst_n  (rst_n),
    .clr    (cnt_clr),
    .en     (cnt_en),
    .count  (cnt1)
  );

  puf_counter #(.WIDTH(CNT_W)) u_cnt2 (
    .puf_clk(pclk2),
    .rst_n  (rst_n),
    .clr    (cnt_clr),
    .en     (cnt_en),
    .count  (cnt2)
  );

  puf_ctrl u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (puf_en),
    .cnt1      (cnt1),
    .cnt2      (cnt2),
    .cnt_clr   (cnt_clr),
    .cnt_en    (cnt_en),
    .attach    (attach),
    .response  (puf_response),
    .resp_valid(puf_resp_valid)
  );

endmodule
