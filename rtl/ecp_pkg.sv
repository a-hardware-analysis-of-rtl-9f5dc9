// ecp_pkg: types and constants shared by the elliptic curve processor.
//
// The processor keeps every field element in one RAM and works through a
// microcoded program. This package fixes the RAM address width, the memory
// map the programs rely on, the ALU operation codes (the "mode bits" of the
// field ALU) and the microinstruction format.
//
// Memory map: words 0..7 hold the base point P, the accumulator Q and the
// curve constants a and d, in that order, as in the 4-ALU schedule of the
// design. Words 8..10 (R2, ONE, ZERO), the temporaries and the second
// accumulator Q1 used by Double-and-Add-Always are this design's own choice.
package ecp_pkg;

  // RAM address width; the RAM holds 2**ADDR_W field elements.
  localparam int unsigned ADDR_W = 6;

  // Memory map (word addresses).
  localparam logic [ADDR_W-1:0] A_PX   = 6'd0;   // base point P (X, Y, Z)
  localparam logic [ADDR_W-1:0] A_PY   = 6'd1;
  localparam logic [ADDR_W-1:0] A_PZ   = 6'd2;
  localparam logic [ADDR_W-1:0] A_QX   = 6'd3;   // accumulator Q (= Q[0])
  localparam logic [ADDR_W-1:0] A_QY   = 6'd4;
  localparam logic [ADDR_W-1:0] A_QZ   = 6'd5;
  localparam logic [ADDR_W-1:0] A_CA   = 6'd6;   // curve constant a (a4 for Weierstrass)
  localparam logic [ADDR_W-1:0] A_CD   = 6'd7;   // twisted Edwards constant d
  localparam logic [ADDR_W-1:0] A_R2   = 6'd8;   // 2^(2(pb+2)) mod p, to enter Montgomery form
  localparam logic [ADDR_W-1:0] A_ONE  = 6'd9;   // integer 1, to leave Montgomery form
  localparam logic [ADDR_W-1:0] A_ZERO = 6'd10;  // 0, written by the program itself
  localparam logic [ADDR_W-1:0] A_TMP  = 6'd11;  // first temporary (11..31)
  // A slot with ksel set reads its first operand from srcA + KOFF when the
  // current key bit is 1. Q[1] of Double-and-Add-Always lives at Q + KOFF.
  localparam logic [ADDR_W-1:0] KOFF   = 6'd32;
  localparam logic [ADDR_W-1:0] A_Q1X  = A_QX + KOFF;
  localparam logic [ADDR_W-1:0] A_Q1Y  = A_QY + KOFF;
  localparam logic [ADDR_W-1:0] A_Q1Z  = A_QZ + KOFF;

  // Field ALU modes.
  typedef enum logic [1:0] {
    ALU_NOP = 2'd0,
    ALU_ADD = 2'd1,   // (a + b) mod p
    ALU_SUB = 2'd2,   // (a - b) mod p
    ALU_MUL = 2'd3    // a * b * 2^-(pb+2) mod p (Montgomery)
  } alu_op_t;

  // One ALU slot of a stage instruction.
  typedef struct packed {
    alu_op_t             op;
    logic                ksel;   // first operand from srcA + KOFF if key bit = 1
    logic [ADDR_W-1:0]   src_a;
    logic [ADDR_W-1:0]   src_b;
    logic [ADDR_W-1:0]   dst;
  } slot_t;

  // Microinstruction kinds.
  typedef enum logic [2:0] {
    I_STAGE = 3'd0,   // run all slots in parallel on the ALUs
    I_SHIFT = 3'd1,   // move to the next key bit
    I_BRZ   = 3'd2,   // branch if no key bits are left
    I_BRK0  = 3'd3,   // branch if the current key bit is 0
    I_JMP   = 3'd4,   // branch always
    I_HALT  = 3'd5    // end of program
  } iop_t;

  // ROM address width and the four programs.
  localparam int unsigned PC_W = 9;

  typedef enum logic [1:0] {
    ALG_DA   = 2'd0,  // Double-and-Add, Jacobian Weierstrass (Alg. 1, 3, 4)
    ALG_DAA  = 2'd1,  // Double-and-Add-Always, Jacobian Weierstrass (Alg. 2, 3, 4)
    ALG_TE   = 2'd2,  // twisted Edwards, separate PD and PA (Alg. 5, 6)
    ALG_TEU  = 2'd3   // twisted Edwards, strongly unified formula (Alg. 7)
  } alg_t;

  typedef struct packed {
    iop_t              iop;
    logic [PC_W-1:0]   target;
  } ctrl_t;

endpackage
