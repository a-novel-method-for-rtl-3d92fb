// pbranch_unit: pseudo-branch logic of a processing element.
//
// A processing element of a SIMD array has no program counter, so it cannot
// branch. A pseudo branch emulates one: when its condition holds, the element
// records the branch's destination tag in the Tag Register and goes to sleep,
// nullifying every instruction until a NOP carrying the same tag comes by on
// the broadcast stream. That NOP wakes the element (SET) and clears the Tag
// Register. While asleep, the element ignores further pseudo branches, so the
// inner branches of a nested if-then-else skipped by an outer branch have no
// effect, and the Tag Register only ever holds one pending target.
//
// Structure (the published block diagram): the condition multiplexer output
// (cond_true, from guard_cond) and the pseudo-branch opcode form RESET, which
// loads TReg and puts the Sleep/Awake flag to sleep; the comparator forms SET
// from the NOP opcode, the NOP tag code and TReg. Gating RESET with the awake
// state is this design's reading of the published two-PE example, in which
// a sleeping element passes over an unconditional pseudo branch.
//
// Timing: the decision is made in the cycle the instruction executes; awake
// and treg change on the following rising edge, so the instruction right after
// a taken pseudo branch is already nullified and the instruction right after
// the matching NOP already executes.
module pbranch_unit #(
  parameter int unsigned TAG_W = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             is_pbr,     // current instruction is a pseudo branch
  input  logic             is_nop,     // current instruction is a NOP
  input  logic             cond_true,  // condition-code multiplexer output
  input  logic [TAG_W-1:0] tag,        // tag field of the current instruction
  output logic             awake,
  output logic             power_down,
  output logic [TAG_W-1:0] treg,
  output logic             taken,      // pseudo branch taken this cycle
  output logic             wake        // SET: matching NOP this cycle
);

  logic set_w;

  assign taken = is_pbr && cond_true && awake;

  tag_comp #(.TAG_W(TAG_W)) u_comp (
    .is_nop (is_nop),
    .nop_tag(tag),
    .treg   (treg),
    .set    (set_w)
  );

  tag_reg #(.TAG_W(TAG_W)) u_treg (
    .clk  (clk),
    .rst_n(rst_n),
    .load (taken),
    .clear(set_w),
    .d    (tag),
    .q    (treg)
  );

  sleep_awake_flag u_flag (
    .clk       (clk),
    .rst_n     (rst_n),
    .set       (set_w),
    .reset     (taken),
    .awake     (awake),
    .power_down(power_down)
  );

  // A sleeping element must always have a pending, non-reserved target.
  assert property (@(posedge clk) disable iff (!rst_n) !awake |-> treg != '0)
    else $error("pbranch_unit: asleep with empty tag register");

  assign wake = set_w && !awake;

endmodule
