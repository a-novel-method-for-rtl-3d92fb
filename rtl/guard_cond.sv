// guard_cond: condition-code multiplexer of a processing element.
//
// Selects one condition, formed from the registered ALU flags Carry, Zero,
// Sign (N) and Overflow, with the 4-bit condition-code field of the current
// instruction. The result either guards an ordinary instruction (false turns
// it into a NOP), decides whether a pseudo branch is taken, or chooses the
// operation of AddSub/IncDec. Forming guard conditions from the ALU flags and
// feeding the condition field to a multiplexer (inputs such as GE, MI, LT)
// follows the published scheme; the set of 16 conditions and their encoding
// (ARM style, see simd_pkg) are this design's choice.
//
// Purely combinational: cond_true is valid in the same cycle as its inputs.
module guard_cond
  import simd_pkg::*;
(
  input  cond_e  cond,       // condition-code field of the instruction
  input  flags_t flags,      // registered ALU flags
  output logic   cond_true   // selected condition holds
);

  always_comb begin
    unique case (cond)
      CC_EQ: cond_true =  flags.z;
      CC_NE: cond_true = ~flags.z;
      CC_CS: cond_true =  flags.c;
      CC_CC: cond_true = ~flags.c;
      CC_MI: cond_true =  flags.n;
      CC_PL: cond_true = ~flags.n;
      CC_VS: cond_true =  flags.v;
      CC_VC: cond_true = ~flags.v;
      CC_HI: cond_true =  flags.c & ~flags.z;
      CC_LS: cond_true = ~flags.c |  flags.z;
      CC_GE: cond_true = (flags.n == flags.v);
      CC_LT: cond_true = (flags.n != flags.v);
      CC_GT: cond_true = ~flags.z & (flags.n == flags.v);
      CC_LE: cond_true =  flags.z | (flags.n != flags.v);
      CC_AL: cond_true = 1'b1;
      CC_NV: cond_true = 1'b0;
      default: cond_true = 1'b0;
    endcase
  end

endmodule
