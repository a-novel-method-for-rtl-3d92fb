// simd_pkg: types and constants shared by the processing element (PE) of a
// SIMD array that supports guarded instructions and pseudo branches.
//
// The pseudo-branch mechanism follows the published scheme: a pseudo branch
// carries a 5-bit destination tag, NOP instructions carry a tag field of the
// same width in the same position, tag code 0 is reserved, and guard
// conditions are formed from the ALU flags Carry, Zero, Sign (N) and Overflow.
// Everything else below is this design's own choice: the 32-bit context-word
// layout, the opcode numbers and the 16 condition codes, which follow the
// well-known ARM condition set (it contains the MI, GE, LT and GT conditions
// used by the scheme).
//
// Context word layout (bit 31 is the MSB):
//   [31:27] opcode      [26:23] condition code
//   [22:19] rd          [18:15] rs1        [14:11] rs2
//   [15:0]  imm16 (MOVI, MOVHI only; overlaps rs1[0] and rs2)
//   [10:0]  RAM address offset (LDM, STM)
//   [4:0]   tag (NOP, PBR) / shift amount (SHL, SHR, ASR)
// STM stores the register named in the rd field.
package simd_pkg;

  localparam int unsigned INSTR_W = 32;
  localparam int unsigned TAG_W   = 5;
  localparam int unsigned REG_AW  = 4;

  typedef enum logic [4:0] {
    OP_NOP    = 5'd0,   // tag field: pseudo-branch target
    OP_PBR    = 5'd1,   // pseudo branch: cond + tag
    OP_ADD    = 5'd2,
    OP_SUB    = 5'd3,
    OP_AND    = 5'd4,
    OP_OR     = 5'd5,
    OP_XOR    = 5'd6,
    OP_MOV    = 5'd7,   // rd = rs1, flags kept
    OP_MOVI   = 5'd8,   // rd = sign-extended imm16, flags kept
    OP_MOVHI  = 5'd9,   // rd[31:16] = imm16, flags kept
    OP_SHL    = 5'd10,  // rd = rs1 << shamt
    OP_SHR    = 5'd11,  // rd = rs1 >> shamt (logical)
    OP_ASR    = 5'd12,  // rd = rs1 >>> shamt
    OP_ADDSUB = 5'd13,  // cond true: rd = rs1 - rs2, else rd = rs1 + rs2
    OP_INCDEC = 5'd14,  // cond true: rd = rs1 - 1,   else rd = rs1 + 1
    OP_CMP    = 5'd15,  // flags of rs1 - rs2, no register write
    OP_LDX    = 5'd16,  // rd = external data input of the PE, flags kept
    OP_LDM    = 5'd17,  // rd = RAM[rs1 + off11], flags kept
    OP_STM    = 5'd18   // RAM[rs1 + off11] = rd
  } opcode_e;

  typedef enum logic [3:0] {
    CC_EQ = 4'd0,  CC_NE = 4'd1,  CC_CS = 4'd2,  CC_CC = 4'd3,
    CC_MI = 4'd4,  CC_PL = 4'd5,  CC_VS = 4'd6,  CC_VC = 4'd7,
    CC_HI = 4'd8,  CC_LS = 4'd9,  CC_GE = 4'd10, CC_LT = 4'd11,
    CC_GT = 4'd12, CC_LE = 4'd13, CC_AL = 4'd14, CC_NV = 4'd15
  } cond_e;

  typedef struct packed {
    logic n;  // sign
    logic z;  // zero
    logic c;  // carry (no borrow on subtraction)
    logic v;  // two's-complement overflow
  } flags_t;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_PASSA, ALU_PASSB,
    ALU_SHL, ALU_SHR, ALU_ASR, ALU_HI
  } alu_op_e;

  // Decoded control bundle produced by rc_decoder.
  typedef struct packed {
    logic              is_nop;
    logic              is_pbr;
    logic              guarded;    // cond field guards execution
    logic              cond_sel;   // cond field selects the operation
    logic              use_imm;    // ALU operand B is the immediate
    logic              reg_we;
    logic              flags_we;
    logic              mem_we;
    logic              mem_rd;
    logic              ext_rd;     // write data comes from the PE input
    alu_op_e           alu_op;
    alu_op_e           alu_op_alt; // operation when cond_sel and cond true
    cond_e             cond;
    logic [REG_AW-1:0] rd;
    logic [REG_AW-1:0] rs1;
    logic [REG_AW-1:0] rs2;
    logic [15:0]       imm;
    logic [TAG_W-1:0]  tag;
  } ctrl_t;

  // Instruction encoders, used by testbenches to build programs.
  function automatic logic [INSTR_W-1:0] enc_r(opcode_e op, cond_e cc,
      logic [REG_AW-1:0] rd, logic [REG_AW-1:0] rs1, logic [REG_AW-1:0] rs2,
      logic [4:0] sh = '0);
    return {op, cc, rd, rs1, rs2, 6'd0, sh};
  endfunction

  function automatic logic [INSTR_W-1:0] enc_i(opcode_e op, cond_e cc,
      logic [REG_AW-1:0] rd, logic [REG_AW-1:0] rs1, logic [15:0] imm);
    logic [INSTR_W-1:0] w;
    w = {op, cc, rd, rs1, 15'd0};
    if (op == OP_MOVI || op == OP_MOVHI) w[15:0] = imm;
    else w[10:0] = imm[10:0];
    return w;
  endfunction

  function automatic logic [INSTR_W-1:0] enc_nop(logic [TAG_W-1:0] tag);
    return {OP_NOP, CC_AL, 18'd0, tag};
  endfunction

  function automatic logic [INSTR_W-1:0] enc_pbr(cond_e cc, logic [TAG_W-1:0] tag);
    return {OP_PBR, cc, 18'd0, tag};
  endfunction

endpackage
