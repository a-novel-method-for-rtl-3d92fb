// tag_comp: tag comparator (COMP) of the pseudo-branch logic.
//
// Raises SET when the instruction being executed is a NOP and the NOP's tag
// code equals the Tag Register. SET wakes the processing element and clears
// the Tag Register. The inputs (NOP opcode, NOP tag code, TReg) and the
// equality test follow the published scheme.
//
// Purely combinational.
module tag_comp #(
  parameter int unsigned TAG_W = 5
) (
  input  logic             is_nop,   // current instruction is a NOP
  input  logic [TAG_W-1:0] nop_tag,  // tag field of the NOP
  input  logic [TAG_W-1:0] treg,     // Tag Register contents
  output logic             set       // target reached
);

  assign set = is_nop && (nop_tag == treg);

endmodule
