// pairing_pkg: constants and types shared by the pairing cryptoprocessor.
//
// Field parameters: GF(2^1223) defined by the trinomial f(x) = x^1223 + x^255 + 1,
// which gives 128-bit security with embedding degree k = 4 supersingular curves.
// An irreducible polynomial is passed to the arithmetic modules as FPOLY, the m
// low-order coefficients f_0..f_{m-1} of f(x) (the x^m term is implied).
//
// Instruction word (16 bits): {CMD[3:0], OP2[5:0], OP1[5:0]}. CMD selects the
// operation, OP2 names the destination (or the F-side multiplier operand) and OP1
// the source. Each operand field is {S1,S0, R3..R0}: a 2-bit bank code and a 4-bit
// register enable mask. For the control instructions {OP2,OP1} is a 12-bit constant.
// The 16-bit word and the CMD/OP2/OP1 field widths follow the design; the opcode
// numbers, the position of S1S0 inside an operand field and the bank code numbers
// are this implementation's own assignment.
package pairing_pkg;

  localparam int unsigned FIELD_M = 1223;  // field degree m
  localparam int unsigned FIELD_A = 255;   // middle term of the trinomial x^m + x^a + 1
  localparam int unsigned KOA_S   = 4;     // KOA recursion levels before schoolbook
  localparam int unsigned IP_W    = 12;    // instruction pointer width (4K words)
  localparam int unsigned INSTR_W = 16;    // instruction width
  localparam int unsigned NREG    = 4;     // registers per bank (embedding degree k <= 4)

  typedef enum logic [3:0] {
    OP_ADD       = 4'd0,   // Addition(D[], S[])
    OP_SQR       = 4'd1,   // Squaring(D[], S[])
    OP_SQRT      = 4'd2,   // SquareRoot(D[], S[])
    OP_LOADMULT  = 4'd3,   // LoadMult(S2[], S1[])
    OP_STOREMULT = 4'd4,   // StoreMult(D[])
    OP_MOVEBANK  = 4'd5,   // MoveBank(D, S)
    OP_INCG0     = 4'd6,   // IncG0()
    OP_WAIT      = 4'd7,   // Wait(n)
    OP_FOR       = 4'd8,   // For(n)
    OP_JMP       = 4'd9,   // Jmp(n)
    OP_JZ        = 4'd10   // Jz(n)
  } opcode_e;

  typedef struct packed {
    logic [1:0] bank;   // S1,S0
    logic [3:0] regs;   // R3..R0
  } operand_t;

  typedef struct packed {
    opcode_e  cmd;
    operand_t op2;
    operand_t op1;
  } instr_t;

  // Source bank codes (OP1 of Addition/Squaring/SquareRoot; OP1 and OP2 of LoadMult)
  localparam logic [1:0] SRC_F  = 2'd0;
  localparam logic [1:0] SRC_G  = 2'd1;
  localparam logic [1:0] SRC_FS = 2'd2;
  localparam logic [1:0] SRC_GS = 2'd3;

  // Destination bank codes (OP2 of Addition/Squaring/SquareRoot/StoreMult).
  // DST_S writes the single registers: R0 selects Fs, R1 selects Gs.
  localparam logic [1:0] DST_G  = 2'd0;
  localparam logic [1:0] DST_V  = 2'd1;
  localparam logic [1:0] DST_W  = 2'd2;
  localparam logic [1:0] DST_S  = 2'd3;

  // MoveBank codes. Source (OP1): V, H, W, I. Destination (OP2): F, H, G, I.
  localparam logic [1:0] MV_SRC_V = 2'd0;
  localparam logic [1:0] MV_SRC_H = 2'd1;
  localparam logic [1:0] MV_SRC_W = 2'd2;
  localparam logic [1:0] MV_SRC_I = 2'd3;
  localparam logic [1:0] MV_DST_F = 2'd0;
  localparam logic [1:0] MV_DST_H = 2'd1;
  localparam logic [1:0] MV_DST_G = 2'd2;
  localparam logic [1:0] MV_DST_I = 2'd3;

  // 12-bit constant of a control instruction
  function automatic logic [IP_W-1:0] imm12(instr_t i);
    return {i.op2, i.op1};
  endfunction

endpackage
