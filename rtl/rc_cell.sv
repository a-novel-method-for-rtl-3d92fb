// rc_cell: processing element (reconfigurable cell) of the SIMD array, with
// guarded execution and pseudo branches.
//
// Every element of a group receives the same broadcast instruction stream,
// yet each one can follow its own path through an if-then-else:
//  * a guarded instruction names a condition on the element's own ALU flags;
//    when it is false the instruction is turned into a NOP in that element;
//  * a pseudo branch, when its condition holds, puts the element to sleep and
//    records a destination tag; the element then nullifies every instruction
//    until the NOP carrying that tag arrives, which wakes it (pbranch_unit).
//  * AddSub and IncDec use the condition to choose between two operations.
// While asleep the element asserts power_down and isolates the ALU operands
// (forces them to 0) so that its datapath does not toggle; the register file,
// internal RAM, decoder and pseudo-branch logic stay active.
//
// Pipeline: the context register latches the broadcast word on a rising edge
// (a NOP with tag 0 when instr_valid is low), together with data_in, which
// is therefore presented in the same cycle as the LDX word; the latched instruction executes
// during the next cycle and its register, flag, RAM, data_out and sleep/awake
// updates take effect on the edge after that. One instruction per cycle, no
// stalls; results are visible to the very next instruction.
//
// The guarded execution on the Carry/Zero/Sign/Overflow flags, the context
// register, the pseudo-branch hardware, the power-down output and the
// powered register file and RAM follow the published scheme. The instruction
// set, the flag rules (moves and loads keep the flags), the single external
// data input that stands in for the neighbour and express-lane multiplexers,
// the data_out register and the operand isolation are this design's choices.
module rc_cell
  import simd_pkg::*;
#(
  parameter int unsigned DATA_W    = 32,
  parameter int unsigned NREGS     = 16,
  parameter int unsigned RAM_WORDS = 64
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [INSTR_W-1:0] instr,        // broadcast context word
  input  logic               instr_valid,
  input  logic [DATA_W-1:0]  data_in,      // operand from outside the element
  output logic [DATA_W-1:0]  data_out,     // last value written to a register
  output logic               awake,        // Sleep/Awake flag
  output logic               power_down,   // power-down request
  output logic [TAG_W-1:0]   treg,         // Tag Register
  output flags_t             flags,        // registered ALU flags
  output logic               executed,     // an operation took effect this cycle
  output logic               nullified,    // an operation was turned into a NOP
  output logic               pbr_taken,    // a pseudo branch was taken
  output logic               woke          // the element woke up this cycle
);

  localparam int unsigned RAM_AW = $clog2(RAM_WORDS);

  logic [INSTR_W-1:0] ctx;
  ctrl_t              ctrl;
  logic               cond_true;
  logic               is_op;
  logic               exec;
  logic [DATA_W-1:0]  rs1_val, rs2_val;
  logic [DATA_W-1:0]  alu_a, alu_b, alu_y, wdata, ram_rdata;
  flags_t             alu_flags;
  alu_op_e            op_sel;
  logic [RAM_AW-1:0]  ram_addr;

  logic [DATA_W-1:0] din_q;

  // Context register, and the input operand latched with it.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctx   <= enc_nop('0);
      din_q <= '0;
    end else begin
      ctx   <= instr_valid ? instr : enc_nop('0);
      din_q <= data_in;
    end
  end

  rc_decoder u_dec (.instr(ctx), .ctrl(ctrl));

  guard_cond u_cond (.cond(ctrl.cond), .flags(flags), .cond_true(cond_true));

  pbranch_unit #(.TAG_W(simd_pkg::TAG_W)) u_pbr (
    .clk       (clk),
    .rst_n     (rst_n),
    .is_pbr    (ctrl.is_pbr),
    .is_nop    (ctrl.is_nop),
    .cond_true (cond_true),
    .tag       (ctrl.tag),
    .awake     (awake),
    .power_down(power_down),
    .treg      (treg),
    .taken     (pbr_taken),
    .wake      (woke)
  );

  assign is_op     = !ctrl.is_nop && !ctrl.is_pbr;
  assign exec      = is_op && awake && (!ctrl.guarded || cond_true);
  assign executed  = exec;
  assign nullified = is_op && !exec;

  rc_regfile #(.DATA_W(DATA_W), .NREGS(NREGS)) u_rf (
    .clk    (clk),
    .rst_n  (rst_n),
    .we     (exec && ctrl.reg_we),
    .waddr  (ctrl.rd),
    .wdata  (wdata),
    .raddr_a(ctrl.rs1),
    .rdata_a(rs1_val),
    .raddr_b(ctrl.rs2),
    .rdata_b(rs2_val)
  );

  // Operand isolation while asleep.
  assign alu_a  = awake ? rs1_val : '0;
  assign alu_b  = !awake      ? '0 :
                  ctrl.use_imm ? DATA_W'($signed(ctrl.imm)) : rs2_val;
  assign op_sel = (ctrl.cond_sel && cond_true) ? ctrl.alu_op_alt : ctrl.alu_op;

  rc_alu #(.DATA_W(DATA_W)) u_alu (
    .op   (op_sel),
    .a    (alu_a),
    .b    (alu_b),
    .shamt(ctrl.tag),
    .y    (alu_y),
    .flags(alu_flags)
  );

  assign ram_addr = RAM_AW'(rs1_val) + RAM_AW'(ctrl.imm);

  rc_ram #(.DATA_W(DATA_W), .WORDS(RAM_WORDS)) u_ram (
    .clk  (clk),
    .we   (exec && ctrl.mem_we),
    .addr (ram_addr),
    .wdata(rs2_val),
    .rdata(ram_rdata)
  );

  assign wdata = ctrl.ext_rd ? din_q :
                 ctrl.mem_rd ? ram_rdata : alu_y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flags    <= '0;
      data_out <= '0;
    end else if (exec) begin
      if (ctrl.flags_we) flags    <= alu_flags;
      if (ctrl.reg_we)   data_out <= wdata;
    end
  end

  // Nothing but the decoder-level NOP/pseudo-branch handling happens asleep.
  assert property (@(posedge clk) disable iff (!rst_n) !awake |-> !exec)
    else $error("rc_cell: operation executed while asleep");

endmodule
