// PUF-counter: counts transitions of one multiplier output bit.
//
// The counter's clock is the output of a PUF multiplexer, i.e. one bit of the
// hardware multiplier's result path. Each rising edge of that bit adds one
// while the enable is high, so the count reflects how often the bit switched
// (in silicon, glitches included) while a challenge program ran. The count
// wraps at 2^WIDTH. A high level on clr (asynchronous) or a low level on
// rst_n clears it. The 32-bit width, the bit used as clock and the En input
// are the document's; the asynchronous clear is this design's choice, needed
// because the counter's clock is not a free-running clock.
module puf_counter #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             puf_clk,  // selected multiplier bit
  input  logic             rst_n,    // asynchronous reset, active low
  input  logic             clr,      // asynchronous clear, active high
  input  logic             en,       // count enable (En)
  output logic [WIDTH-1:0] count
);

  logic clear;
  assign clear = clr | ~rst_n;

  always_ff @(posedge puf_clk or posedge clear) begin
    if (clear)   count <= '0;
    else if (en) count <= count + 1'b1;
  end

endmodule
