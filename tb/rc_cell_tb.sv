// rc_cell_tb: runs small programs on one processing element and compares
// data_out with results computed here from the same random inputs:
//  * MaxOf(x,y,z) with guarded moves (GT_mov), signed compare;
//  * a nested if-then-else with pseudo branches (three outcomes), checking
//    that the element sleeps (power_down high, nothing executed) inside the
//    skipped regions and wakes at the matching NOP;
//  * AddSub(MI) as an absolute value and IncDec(LT);
//  * internal RAM store/load, including a guarded store that is nullified;
//  * MOVI/MOVHI 32-bit constants and the three shifts;
//  * that moves keep the flags for later guarded instructions;
//  * the latency: a word presented before edge k appears on data_out after
//    edge k+1 and not before.
module rc_cell_tb;
  import simd_pkg::*;

  logic        clk = 0, rst_n = 0, instr_valid = 0;
  logic [31:0] instr = '0, data_in = '0, data_out;
  logic        awake, power_down, executed, nullified, pbr_taken, woke;
  logic [4:0]  treg;
  flags_t      flags;
  int checks = 0, failures = 0;
  int n_sleep_cycles = 0, n_taken = 0, n_woke = 0, n_null = 0;

  rc_cell dut (.clk(clk), .rst_n(rst_n), .instr(instr), .instr_valid(instr_valid),
    .data_in(data_in), .data_out(data_out), .awake(awake), .power_down(power_down),
    .treg(treg), .flags(flags), .executed(executed), .nullified(nullified),
    .pbr_taken(pbr_taken), .woke(woke));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (!awake) begin
      n_sleep_cycles++;
      checks++;
      if (!power_down || executed) begin failures++; $display("FAIL activity while asleep"); end
    end
    if (pbr_taken) n_taken++;
    if (woke) n_woke++;
    if (nullified) n_null++;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic issue(logic [31:0] w, logic [31:0] din = '0);
    @(negedge clk);
    instr = w; instr_valid = 1'b1; data_in = din;
    @(posedge clk);
  endtask

  task automatic flush();
    @(negedge clk);
    instr_valid = 1'b0;
    repeat (2) @(posedge clk);
    #1;
  endtask

  function automatic logic [31:0] smax(logic [31:0] a, logic [31:0] b);
    return ($signed(a) > $signed(b)) ? a : b;
  endfunction

  localparam logic [4:0] T1 = 5'd1, T2 = 5'd2, T3 = 5'd3, T4 = 5'd4;

  initial begin
    logic [31:0] x, y, z, e;
    #22 rst_n = 1;

    // latency
    @(negedge clk); instr = enc_r(OP_LDX, CC_AL, 4'd1, 4'd0, 4'd0); instr_valid = 1; data_in = 32'hCAFE0001;
    @(posedge clk); #1;
    chk(data_out == 32'd0, "result too early (1 edge)");
    @(negedge clk); instr_valid = 0;
    @(posedge clk); #1;
    chk(data_out == 32'hCAFE0001, "result not there after 2 edges");

    repeat (60) begin
      x = $urandom; y = $urandom; z = $urandom;
      if ($urandom % 4 == 0) y = x;
      // ---- MaxOf(x,y,z) with guarded moves
      issue(enc_r(OP_LDX, CC_AL, 4'd1, 0, 0), x);
      issue(enc_r(OP_LDX, CC_AL, 4'd2, 0, 0), y);
      issue(enc_r(OP_LDX, CC_AL, 4'd3, 0, 0), z);
      issue(enc_r(OP_MOV, CC_AL, 4'd4, 4'd1, 0));
      issue(enc_r(OP_CMP, CC_AL, 4'd0, 4'd2, 4'd4));
      issue(enc_r(OP_MOV, CC_GT, 4'd4, 4'd2, 0));
      issue(enc_r(OP_CMP, CC_AL, 4'd0, 4'd3, 4'd4));
      issue(enc_r(OP_MOV, CC_GT, 4'd4, 4'd3, 0));
      issue(enc_r(OP_MOV, CC_AL, 4'd4, 4'd4, 0));
      flush();
      chk(data_out == smax(smax(x, y), z), $sformatf("MaxOf %h %h %h -> %h", x, y, z, data_out));

      // ---- nested if (x<0) { if (y<0) r=1 else r=2 } else r=3
      issue(enc_i(OP_MOVI, CC_AL, 4'd5, 0, 16'd0));
      issue(enc_r(OP_CMP, CC_AL, 0, 4'd1, 4'd0));
      issue(enc_pbr(CC_GE, T1));
      issue(enc_r(OP_CMP, CC_AL, 0, 4'd2, 4'd0));
      issue(enc_pbr(CC_GE, T2));
      issue(enc_i(OP_MOVI, CC_AL, 4'd5, 0, 16'd1));
      issue(enc_pbr(CC_AL, T3));
      issue(enc_nop(T2));
      issue(enc_i(OP_MOVI, CC_AL, 4'd5, 0, 16'd2));
      issue(enc_nop(T3));
      issue(enc_pbr(CC_AL, T4));
      issue(enc_nop(T1));
      issue(enc_i(OP_MOVI, CC_AL, 4'd5, 0, 16'd3));
      issue(enc_nop(T4));
      issue(enc_r(OP_MOV, CC_AL, 4'd5, 4'd5, 0));
      flush();
      e = x[31] ? (y[31] ? 32'd1 : 32'd2) : 32'd3;
      chk(data_out == e, $sformatf("nested x=%h y=%h -> %0d exp %0d", x, y, data_out, e));
      chk(awake && treg == 0, "awake with empty TReg after the construct");

      // ---- AddSub(MI): |x|, IncDec(LT): x<0 ? x-1 : x+1
      issue(enc_r(OP_CMP, CC_AL, 0, 4'd1, 4'd0));
      issue(enc_r(OP_ADDSUB, CC_MI, 4'd6, 4'd0, 4'd1));
      flush();
      e = x[31] ? -x : x;
      chk(data_out == e, $sformatf("AddSub |%h| -> %h", x, data_out));
      issue(enc_r(OP_CMP, CC_AL, 0, 4'd1, 4'd0));
      issue(enc_r(OP_INCDEC, CC_LT, 4'd7, 4'd1, 0));
      flush();
      e = x[31] ? x - 1 : x + 1;
      chk(data_out == e, $sformatf("IncDec %h -> %h", x, data_out));

      // ---- flags survive moves: CMP x,y ; MOVI ; MI_mov
      issue(enc_i(OP_MOVI, CC_AL, 4'd9, 0, 16'h0));
      issue(enc_r(OP_CMP, CC_AL, 0, 4'd1, 4'd2));
      issue(enc_i(OP_MOVI, CC_AL, 4'd10, 0, 16'hFFFF));
      issue(enc_r(OP_MOV, CC_LT, 4'd9, 4'd10, 0));
      issue(enc_r(OP_MOV, CC_AL, 4'd9, 4'd9, 0));
      flush();
      e = ($signed(x) < $signed(y)) ? 32'hFFFFFFFF : 32'h0;
      chk(data_out == e, "guard after MOVI uses the CMP flags");

      // ---- RAM store/load and a nullified guarded store
      issue(enc_i(OP_MOVI, CC_AL, 4'd8, 0, 16'd5));
      issue(enc_i(OP_STM, CC_AL, 4'd1, 4'd8, 16'd3));
      issue(enc_r(OP_CMP, CC_AL, 0, 4'd0, 4'd0));
      issue(enc_i(OP_STM, CC_NE, 4'd2, 4'd8, 16'd3));
      issue(enc_i(OP_LDM, CC_AL, 4'd11, 4'd8, 16'd3));
      flush();
      chk(data_out == x, $sformatf("RAM load %h exp %h", data_out, x));

      // ---- constants and shifts
      issue(enc_i(OP_MOVI, CC_AL, 4'd12, 0, x[15:0]));
      issue(enc_i(OP_MOVHI, CC_AL, 4'd12, 0, x[31:16]));
      flush();
      chk(data_out == x, "MOVI/MOVHI constant");
      issue(enc_r(OP_SHL, CC_AL, 4'd13, 4'd1, 0, 5'(z)));
      flush();
      chk(data_out == x << z[4:0], "SHL");
      issue(enc_r(OP_ASR, CC_AL, 4'd13, 4'd1, 0, 5'(z)));
      flush();
      e = 32'($signed(x) >>> z[4:0]);
      chk(data_out == e, $sformatf("ASR %h >>> %0d -> %h exp %h", x, z[4:0], data_out, e));
      issue(enc_r(OP_SHR, CC_AL, 4'd13, 4'd1, 0, 5'(z)));
      flush();
      chk(data_out == x >> z[4:0], "SHR");
    end
    chk(n_taken > 0 && n_woke > 0 && n_sleep_cycles > 0 && n_null > 0,
        $sformatf("mechanisms seen: taken=%0d woke=%0d sleep=%0d nullified=%0d",
                  n_taken, n_woke, n_sleep_cycles, n_null));
    $display("pseudo branches taken=%0d wake-ups=%0d sleep cycles=%0d nullified=%0d",
             n_taken, n_woke, n_sleep_cycles, n_null);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
