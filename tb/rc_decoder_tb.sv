// rc_decoder_tb: encodes every opcode with random fields and checks the
// decoded control bundle against an expected table written out here: which
// state each instruction writes, whether its condition guards it or selects
// an operation, and where each field is taken from.
module rc_decoder_tb;
  import simd_pkg::*;

  logic [31:0] instr;
  ctrl_t       ctrl;
  int checks = 0, failures = 0;

  rc_decoder dut (.instr(instr), .ctrl(ctrl));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // expected {reg_we, flags_we, mem_we, mem_rd, ext_rd, guarded, cond_sel, use_imm, is_nop, is_pbr}
  function automatic logic [9:0] expect_bits(opcode_e op);
    unique case (op)
      OP_NOP:    return 10'b00000_000_10;
      OP_PBR:    return 10'b00000_000_01;
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SHL, OP_SHR, OP_ASR:
                 return 10'b11000_100_00;
      OP_MOV:    return 10'b10000_100_00;
      OP_MOVI, OP_MOVHI:
                 return 10'b10000_101_00;
      OP_ADDSUB: return 10'b11000_010_00;
      OP_INCDEC: return 10'b11000_011_00;
      OP_CMP:    return 10'b01000_100_00;
      OP_LDX:    return 10'b10001_100_00;
      OP_LDM:    return 10'b10010_100_00;
      OP_STM:    return 10'b00100_100_00;
      default:   return 10'b00000_000_10;
    endcase
  endfunction

  initial begin
    for (int o = 0; o < 32; o++) begin
      repeat (20) begin
        logic [9:0] got;
        opcode_e op;
        op = opcode_e'(o);
        instr = {5'(o), 27'($urandom)};
        #1;
        got = {ctrl.reg_we, ctrl.flags_we, ctrl.mem_we, ctrl.mem_rd, ctrl.ext_rd,
               ctrl.guarded, ctrl.cond_sel, ctrl.use_imm, ctrl.is_nop, ctrl.is_pbr};
        chk(got == expect_bits(op), $sformatf("op %0d ctrl bits %b exp %b", o, got, expect_bits(op)));
        chk(ctrl.cond == cond_e'(instr[26:23]), $sformatf("op %0d cond", o));
        chk(ctrl.rd == instr[22:19], $sformatf("op %0d rd", o));
        if (o == int'(OP_MOVHI)) chk(ctrl.rs1 == instr[22:19], "MOVHI reads rd");
        else chk(ctrl.rs1 == instr[18:15], $sformatf("op %0d rs1", o));
        if (o == int'(OP_STM)) chk(ctrl.rs2 == instr[22:19], "STM data register");
        else chk(ctrl.rs2 == instr[14:11], $sformatf("op %0d rs2", o));
        if (o == int'(OP_NOP) || o == int'(OP_PBR))
          chk(ctrl.tag == instr[4:0], $sformatf("op %0d tag", o));
        if (o == int'(OP_MOVI) || o == int'(OP_MOVHI))
          chk(ctrl.imm == instr[15:0], $sformatf("op %0d imm", o));
        if (o == int'(OP_LDM) || o == int'(OP_STM))
          chk(ctrl.imm == {5'd0, instr[10:0]}, $sformatf("op %0d offset", o));
        if (o == int'(OP_INCDEC)) chk(ctrl.imm == 16'd1, "INCDEC step");
        if (o == int'(OP_ADDSUB) || o == int'(OP_INCDEC))
          chk(ctrl.alu_op == ALU_ADD && ctrl.alu_op_alt == ALU_SUB, "AddSub/IncDec ops");
        if (o == int'(OP_SUB) || o == int'(OP_CMP)) chk(ctrl.alu_op == ALU_SUB, "SUB/CMP op");
        if (o > 18) chk(ctrl.tag == 5'd0, "unknown opcode is NOP 0");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
