// 32-bit accumulate adder of the hardware multiplier peripheral.
//
// Adds the new product to the previous result held in RESHI:RESLO for the
// multiply-and-accumulate operations and returns the 32-bit sum with the
// carry out of bit 31. The carry is what the peripheral reports in SUMEXT for
// unsigned accumulation. Purely combinational. The adder, its 32-bit width
// and the carry flag come from the multiplier's block diagram; a plain
// addition is this design's choice of structure, left to synthesis.
module adder32 (
  input  logic [31:0] a,      // product
  input  logic [31:0] b,      // previous result RESHI:RESLO
  output logic [31:0] sum,    // a + b modulo 2^32
  output logic        carry   // carry out of bit 31
);

  always_comb begin
    {carry, sum} = {1'b0, a} + {1'b0, b};
  end

endmodule
