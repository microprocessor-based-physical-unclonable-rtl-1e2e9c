// PUF multiplexer: picks one of the multiplier's output bits.
//
// A 32-to-1 multiplexer steered by 5 select lines, which are part of the PUF
// challenge. Its output is used as the clock of a PUF-counter, so every rising
// transition of the chosen multiplier bit advances that counter. Purely
// combinational. The input width and the 5 select lines are the document's;
// that sel = k picks bit k is this design's choice.
module puf_mux #(
  parameter int unsigned WIDTH = 32,               // multiplier output bits
  parameter int unsigned SEL_W = $clog2(WIDTH)     // select lines (5 for 32)
) (
  input  logic [WIDTH-1:0] din,  // multiplier output
  input  logic [SEL_W-1:0] sel,  // challenge bits for this multiplexer
  output logic             dout  // selected bit, clock of the PUF-counter
);

  always_comb begin
    dout = 1'b0;
    for (int unsigned i = 0; i < WIDTH; i++) begin
      if (sel == SEL_W'(i)) dout = din[i];
    end
  end

endmodule
