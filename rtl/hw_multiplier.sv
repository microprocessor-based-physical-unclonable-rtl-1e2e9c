// Hardware multiplier peripheral (MSP430-compatible register model).
//
// The CPU writes the first operand to one of four addresses; the address
// chosen selects the operation: MPY (unsigned multiply), MPYS (signed
// multiply), MAC (unsigned multiply-accumulate) or MACS (signed
// multiply-accumulate). Writing the second operand OP2 starts the operation
// on the stored OP1 and OP2. A 16x16 multiplier forms the product, a 32-bit
// adder adds it to the previous result for MAC/MACS, and a 32-bit multiplexer
// picks product or sum as the new RESHI:RESLO. SUMEXT reports 0000h for MPY,
// the sign of the result (0000h/FFFFh) for MPYS and MACS, and the adder carry
// (0000h/0001h) for MAC. OP1 is kept, so a series of OP2 writes repeats the
// operation with the same first operand; in MAC/MACS this loops the result
// back through the adder.
//
// The output of the 32-bit multiplexer is also brought out as mult_out: it is
// the 32-bit "output of the hardware multiplier" that the PUF multiplexers tap.
//
// Interface: a simple peripheral bus with byte addresses (per_addr), 16-bit
// word writes (per_en & per_we) and combinational reads (per_en & ~per_we,
// data on per_dout in the same cycle, 0 otherwise). Timing: OP2 is stored at
// the end of its write cycle and the result registers load one edge later, so
// a read of RESLO/RESHI/SUMEXT in the cycle right after the OP2 write still
// returns the previous result and a read one cycle later the new one.
// RESLO and RESHI can also be written, to preset an accumulation; if such a
// write coincides with the result load, the result load wins.
//
// The registers, the four operations, the adder/multiplexer structure and the
// SUMEXT sources follow the document's block diagram. The register addresses
// (0130h..013Eh), the bus protocol, the one-cycle latency, word-only writes
// and the reset values (all zero, MPY mode) are this design's choices.
module hw_multiplier
  import mpuf_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,     // asynchronous reset, active low
  // peripheral bus
  input  logic [15:0] per_addr,  // byte address, word aligned
  input  logic [15:0] per_din,   // write data
  input  logic        per_en,    // access strobe
  input  logic        per_we,    // 1: write, 0: read
  output logic [15:0] per_dout,  // read data
  // result path tapped by the PUF
  output logic [31:0] mult_out   // output of the 32-bit result multiplexer
);

  logic [15:0] op1, op2;
  logic [15:0] reslo, reshi, sumext;
  logic        start;            // OP2 was written on the last edge
  mult_mode_e  mode;             // operation chosen by the last OP1 write

  logic [31:0] product, sum;
  logic        carry;
  logic        is_signed, is_acc;
  logic [15:0] sumext_nxt;

  assign is_signed = (mode == MODE_MPYS) || (mode == MODE_MACS);
  assign is_acc    = (mode == MODE_MAC)  || (mode == MODE_MACS);

  mult16x16 u_mult (
    .op1      (op1),
    .op2      (op2),
    .is_signed(is_signed),
    .product  (product)
  );

  adder32 u_add (
    .a    (product),
    .b    ({reshi, reslo}),
    .sum  (sum),
    .carry(carry)
  );

  // 32-bit result multiplexer and SUMEXT multiplexer
  always_comb begin
    mult_out = is_acc ? sum : product;
    unique case (mode)
      MODE_MPY:  sumext_nxt = 16'h0000;
      MODE_MAC:  sumext_nxt = {15'd0, carry};
      default:   sumext_nxt = {16{mult_out[31]}};  // MPYS, MACS: sign bit S
    endcase
  end

  logic wr;
  assign wr = per_en & per_we;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op1    <= '0;
      op2    <= '0;
      reslo  <= '0;
      reshi  <= '0;
      sumext <= '0;
      mode   <= MODE_MPY;
      start  <= 1'b0;
    end else begin
      start <= wr && (per_addr == ADDR_OP2);
      if (wr) begin
        unique case (per_addr)
          ADDR_MPY:   begin op1 <= per_din; mode <= MODE_MPY;  end
          ADDR_MPYS:  begin op1 <= per_din; mode <= MODE_MPYS; end
          ADDR_MAC:   begin op1 <= per_din; mode <= MODE_MAC;  end
          ADDR_MACS:  begin op1 <= per_din; mode <= MODE_MACS; end
          ADDR_OP2:   op2   <= per_din;
          ADDR_RESLO: reslo <= per_din;
          ADDR_RESHI: reshi <= per_din;
          default: ;
        endcase
      end
      if (start) begin
        {reshi, reslo} <= mult_out;
        sumext         <= sumext_nxt;
      end
    end
  end

  always_comb begin
    per_dout = 16'h0000;
    if (per_en && !per_we) begin
      unique case (per_addr)
        ADDR_MPY, ADDR_MPYS, ADDR_MAC, ADDR_MACS: per_dout = op1;
        ADDR_OP2:    per_dout = op2;
        ADDR_RESLO:  per_dout = reslo;
        ADDR_RESHI:  per_dout = reshi;
        ADDR_SUMEXT: per_dout = sumext;
        default:     per_dout = 16'h0000;
      endcase
    end
  end

  // Bus rule: accesses are to whole 16-bit words.
  a_aligned: assert property (@(posedge clk) disable iff (!rst_n)
                              per_en |-> per_addr[0] == 1'b0)
    else $error("hw_multiplier: unaligned access to %h", per_addr);

endmodule
