// Shared types and constants for the multiplier-based PUF.
//
// The hardware multiplier is a memory-mapped peripheral with the register
// layout of the MSP430 family multiplier: first-operand addresses that pick
// the operation (MPY, MPYS, MAC, MACS), the second operand OP2 that starts it,
// and the result registers RESLO, RESHI and SUMEXT. The byte addresses below
// follow the MSP430 peripheral map (0130h upwards, one 16-bit word each).
// The PUF side uses 32-bit counters whose central bits 9..24 form half of the
// 32-bit response each.
package mpuf_pkg;

  // Operation selected by the address OP1 was last written at.
  typedef enum logic [1:0] {
    MODE_MPY  = 2'd0,  // unsigned multiply
    MODE_MPYS = 2'd1,  // signed multiply
    MODE_MAC  = 2'd2,  // unsigned multiply and accumulate
    MODE_MACS = 2'd3   // signed multiply and accumulate
  } mult_mode_e;

  // Peripheral register byte addresses.
  localparam logic [15:0] ADDR_MPY    = 16'h0130;
  localparam logic [15:0] ADDR_MPYS   = 16'h0132;
  localparam logic [15:0] ADDR_MAC    = 16'h0134;
  localparam logic [15:0] ADDR_MACS   = 16'h0136;
  localparam logic [15:0] ADDR_OP2    = 16'h0138;
  localparam logic [15:0] ADDR_RESLO  = 16'h013A;
  localparam logic [15:0] ADDR_RESHI  = 16'h013C;
  localparam logic [15:0] ADDR_SUMEXT = 16'h013E;

  // Widths of the PUF datapath.
  localparam int unsigned MULT_OUT_W = 32;  // multiplier output tapped by the muxes
  localparam int unsigned SEL_W      = 5;   // select lines per multiplexer
  localparam int unsigned CNT_W      = 32;  // PUF-counter width
  localparam int unsigned RESP_LSB   = 9;   // lowest counter bit kept in the response
  localparam int unsigned RESP_MSB   = 24;  // highest counter bit kept in the response
  localparam int unsigned RESP_HALF  = RESP_MSB - RESP_LSB + 1;  // 16 bits per counter

  // A challenge's multiplexer part: one 5-bit select per counter.
  typedef struct packed {
    logic [SEL_W-1:0] sel2;
    logic [SEL_W-1:0] sel1;
  } puf_sel_t;

endpackage
