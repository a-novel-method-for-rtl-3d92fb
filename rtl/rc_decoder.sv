// rc_decoder: instruction decoder of a processing element.
//
// Splits the 32-bit context word (layout in simd_pkg) into its fields and
// derives the control bundle used by the rest of the element: which ALU
// operation to run, whether the condition field guards the instruction or
// selects between two operations (AddSub, IncDec), and which state is written
// (register, flags, internal RAM). The decoder is the one part that stays
// active while the element sleeps, because it must still recognise the NOP
// whose tag wakes the element.
//
// The published scheme gives the classes of instruction (guarded
// instructions with a condition prefix, pseudo branches with a tag, NOPs with
// a tag, AddSub(flag) and IncDec(flag)) and that moves do not disturb the
// flags used by later guarded instructions. The opcode set and field layout
// are this design's own. Unknown opcodes decode as a NOP with tag 0.
//
// Purely combinational.
module rc_decoder
  import simd_pkg::*;
(
  input  logic [INSTR_W-1:0] instr,
  output ctrl_t              ctrl
);

  opcode_e op;
  assign op = opcode_e'(instr[31:27]);

  always_comb begin
    ctrl            = '0;
    ctrl.cond       = cond_e'(instr[26:23]);
    ctrl.rd         = instr[22:19];
    ctrl.rs1        = instr[18:15];
    ctrl.rs2        = instr[14:11];
    ctrl.imm        = instr[15:0];
    ctrl.tag        = instr[TAG_W-1:0];
    ctrl.guarded    = 1'b1;
    ctrl.alu_op     = ALU_ADD;
    ctrl.alu_op_alt = ALU_ADD;
    unique case (op)
      OP_NOP: begin ctrl.is_nop = 1'b1; ctrl.guarded = 1'b0; end
      OP_PBR: begin ctrl.is_pbr = 1'b1; ctrl.guarded = 1'b0; end
      OP_ADD: begin ctrl.alu_op = ALU_ADD; ctrl.reg_we = 1'b1; ctrl.flags_we = 1'b1; end
      OP_SUB: begin ctrl.alu_op = ALU_SUB; ctrl.reg_we = 1'b1; ctrl.flags_we = 1'b1; end
      OP_AND: begin ctrl.alu_op = ALU_AND; ctrl.reg_we = 1'b1; ctrl.flags_we = 1'b1; end
      OP_OR:  begin ctrl.alu_op = ALU_OR;  ctrl.reg_we = 1'b1; ctrl.flags_we = 1'b1; end
      OP_XOR: begin ctrl.alu_op = ALU_XOR; ctrl.reg_we = 1'b1; ctrl.flags_we = 1'b1; end
      OP_MOV: begin ctrl.alu_op = ALU_PASSA; ctrl.reg_we = 1'b1; end
      OP_MOVI: begin
        ctrl.alu_op = ALU_PASSB; ctrl.use_imm = 1'b1; ctrl.reg_we = 1'b1;
      end
      OP_MOVHI: begin
        // keeps the low half of rd: read rd through the rs1 port
        ctrl.alu_op = ALU_HI; ctrl.use_imm = 1'b1; ctrl.reg_we = 1'b1;
        ctrl.rs1 = instr[22:19];
      end
      OP_SHL: begin ctrl.alu_op = ALU_SHL; ctrl.reg_we = 1'b1; ctrl.flags_we = 1'b1; end
      OP_SHR: begin ctrl.alu_op = ALU_SHR; ctrl.reg_we = 1'b1; ctrl.flags_we = 1'b1; end
      OP_ASR: begin ctrl.alu_op = ALU_ASR; ctrl.reg_we = 1'b1; ctrl.flags_we = 1'b1; end
      OP_ADDSUB: begin
        ctrl.guarded = 1'b0; ctrl.cond_sel = 1'b1;
        ctrl.alu_op = ALU_ADD; ctrl.alu_op_alt = ALU_SUB;
        ctrl.reg_we = 1'b1; ctrl.flags_we = 1'b1;
      end
      OP_INCDEC: begin
        ctrl.guarded = 1'b0; ctrl.cond_sel = 1'b1; ctrl.use_imm = 1'b1;
        ctrl.imm = 16'd1;
        ctrl.alu_op = ALU_ADD; ctrl.alu_op_alt = ALU_SUB;
        ctrl.reg_we = 1'b1; ctrl.flags_we = 1'b1;
      end
      OP_CMP: begin ctrl.alu_op = ALU_SUB; ctrl.flags_we = 1'b1; end
      OP_LDX: begin ctrl.ext_rd = 1'b1; ctrl.reg_we = 1'b1; end
      OP_LDM: begin
        ctrl.mem_rd = 1'b1; ctrl.reg_we = 1'b1; ctrl.imm = {5'd0, instr[10:0]};
      end
      OP_STM: begin
        // data register is named by the rd field: read it through rs2
        ctrl.mem_we = 1'b1; ctrl.rs2 = instr[22:19]; ctrl.imm = {5'd0, instr[10:0]};
      end
      default: begin ctrl.is_nop = 1'b1; ctrl.guarded = 1'b0; ctrl.tag = '0; end
    endcase
  end

endmodule
