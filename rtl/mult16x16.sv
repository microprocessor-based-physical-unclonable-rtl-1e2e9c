// 16 x 16 multiplier of the hardware multiplier peripheral.
//
// Multiplies the two 16-bit operands as unsigned numbers or, when is_signed
// is high, as two's-complement numbers, and returns the full 32-bit product.
// Purely combinational: the product settles in the same cycle as the
// operands. The signed/unsigned choice follows the MPY/MPYS (and MAC/MACS)
// operations of the peripheral; how the array is built is left to synthesis.
module mult16x16 (
  input  logic [15:0] op1,        // first operand
  input  logic [15:0] op2,        // second operand
  input  logic        is_signed,  // 1: two's-complement operands
  output logic [31:0] product     // 32-bit product (two's complement if signed)
);

  // Extend both operands to 17 bits (sign or zero) so one signed multiply
  // serves both cases.
  logic signed [16:0] a_ext, b_ext;

  always_comb begin
    a_ext   = {is_signed & op1[15], op1};
    b_ext   = {is_signed & op2[15], op2};
    product = 32'(a_ext * b_ext);
  end

endmodule
