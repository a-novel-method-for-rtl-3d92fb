// rc_array_tb: end-to-end test of the full-size array (default parameters:
// 8 instruction streams x 8 processing elements). Each stream runs a
// different data-dependent program at the same time, on random per-element
// data, and every element's data_out is compared with the result computed
// here:
//   stream type 0: nested if-then-else with pseudo branches
//                  (x<0 ? (y<0 ? 1 : 2) : 3);
//   stream type 1: MaxOf(x,y,z) with guarded moves;
//   stream type 2: AddSub(MI) absolute value followed by IncDec(LT);
//   stream type 3: the clip-code computation with guarded MI_/GT_ moves and
//                  adds (Kl=1, Kr=2, Kb=4, Kt=8).
// Each mechanism is counted and must occur at least once: pseudo branch
// taken, pseudo branch not taken, pseudo branch ignored by a sleeping element
// (nesting), wake-up at the matching NOP, a NOP whose tag does not match a
// sleeping element, guarded instruction executed and nullified, AddSub and
// IncDec in both directions, power-down cycles, and streams running
// different programs in the same cycle. The last element wake-up is also
// checked to happen exactly one cycle after the matching NOP is executed.
module rc_array_tb;
  import simd_pkg::*;

  localparam int NS = 8, PP = 8, NPE = NS * PP;

  logic                     clk = 0, rst_n = 0;
  logic [NS-1:0][31:0]      instr;
  logic [NS-1:0]            instr_valid;
  logic [NPE-1:0][31:0]     data_in, data_out;
  logic [NPE-1:0]           awake, power_down, executed, nullified, pbr_taken, woke;

  rc_array dut (.clk(clk), .rst_n(rst_n), .instr(instr), .instr_valid(instr_valid),
    .data_in(data_in), .data_out(data_out), .awake(awake), .power_down(power_down),
    .executed(executed), .nullified(nullified), .pbr_taken(pbr_taken), .woke(woke));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_taken = 0, n_not_taken = 0, n_ignored = 0, n_wake = 0, n_nomatch = 0;
  int n_guard_exec = 0, n_guard_null = 0, n_pd = 0, n_addsub_sub = 0, n_addsub_add = 0;
  int n_incdec_dec = 0, n_incdec_inc = 0, n_concurrent = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Programs, one per stream, and per-element input words for each slot.
  logic [31:0] prog [NS][$];
  logic [31:0] din  [NPE][$];
  logic [31:0] ex   [NPE];

  // Word executing in each stream (the context registers hold it).
  logic [NS-1:0][31:0] exec_w;
  logic [NS-1:0]       exec_v;
  always_ff @(posedge clk) begin
    exec_w <= instr;
    exec_v <= instr_valid;
  end

  always @(posedge clk) if (rst_n) begin
    int kinds;
    kinds = 0;
    for (int g = 0; g < NS; g++) begin
      opcode_e op;
      op = opcode_e'(exec_w[g][31:27]);
      if (exec_v[g] && op != OP_NOP) kinds |= 1 << (g % 4);
      for (int p = 0; p < PP; p++) begin
        int i;
        logic [3:0] cc;
        i = g * PP + p;
        cc = exec_w[g][26:23];
        if (power_down[i]) n_pd++;
        if (!exec_v[g]) continue;
        if (op == OP_PBR) begin
          if (!awake[i]) n_ignored++;
          else if (pbr_taken[i]) n_taken++;
          else n_not_taken++;
        end
        if (op == OP_NOP && !awake[i] && exec_w[g][4:0] != 0) begin
          if (woke[i]) n_wake++; else n_nomatch++;
        end
        if (awake[i] && cc != CC_AL && op inside {OP_MOV, OP_MOVI, OP_ADD}) begin
          if (executed[i]) n_guard_exec++;
          if (nullified[i]) n_guard_null++;
        end
      end
    end
    if (kinds == 4'hF) n_concurrent++;
  end

  function automatic logic [31:0] smax(logic [31:0] a, logic [31:0] b);
    return ($signed(a) > $signed(b)) ? a : b;
  endfunction

  // Build the program of one stream type; every program starts by loading
  // x, y, z into r1, r2, r3 and ends with a move of its result register.
  task automatic build(int g, int kind);
    prog[g] = {};
    prog[g].push_back(enc_r(OP_LDX, CC_AL, 4'd1, 0, 0));
    prog[g].push_back(enc_r(OP_LDX, CC_AL, 4'd2, 0, 0));
    prog[g].push_back(enc_r(OP_LDX, CC_AL, 4'd3, 0, 0));
    case (kind)
      0: begin
        prog[g].push_back(enc_i(OP_MOVI, CC_AL, 4'd5, 0, 16'd0));
        prog[g].push_back(enc_r(OP_CMP, CC_AL, 0, 4'd1, 4'd0));
        prog[g].push_back(enc_pbr(CC_GE, 5'd1));
        prog[g].push_back(enc_r(OP_CMP, CC_AL, 0, 4'd2, 4'd0));
        prog[g].push_back(enc_pbr(CC_GE, 5'd2));
        prog[g].push_back(enc_i(OP_MOVI, CC_AL, 4'd5, 0, 16'd1));
        prog[g].push_back(enc_pbr(CC_AL, 5'd3));
        prog[g].push_back(enc_nop(5'd2));
        prog[g].push_back(enc_i(OP_MOVI, CC_AL, 4'd5, 0, 16'd2));
        prog[g].push_back(enc_nop(5'd3));
        prog[g].push_back(enc_pbr(CC_AL, 5'd4));
        prog[g].push_back(enc_nop(5'd1));
        prog[g].push_back(enc_i(OP_MOVI, CC_AL, 4'd5, 0, 16'd3));
        prog[g].push_back(enc_nop(5'd4));
        prog[g].push_back(enc_r(OP_MOV, CC_AL, 4'd5, 4'd5, 0));
      end
      1: begin
        prog[g].push_back(enc_r(OP_MOV, CC_AL, 4'd4, 4'd1, 0));
        prog[g].push_back(enc_r(OP_CMP, CC_AL, 0, 4'd2, 4'd4));
        prog[g].push_back(enc_r(OP_MOV, CC_GT, 4'd4, 4'd2, 0));
        prog[g].push_back(enc_r(OP_CMP, CC_AL, 0, 4'd3, 4'd4));
        prog[g].push_back(enc_r(OP_MOV, CC_GT, 4'd4, 4'd3, 0));
        prog[g].push_back(enc_r(OP_MOV, CC_AL, 4'd4, 4'd4, 0));
      end
      2: begin
        prog[g].push_back(enc_r(OP_CMP, CC_AL, 0, 4'd1, 4'd0));
        prog[g].push_back(enc_r(OP_ADDSUB, CC_MI, 4'd6, 4'd0, 4'd1));
        prog[g].push_back(enc_r(OP_CMP, CC_AL, 0, 4'd2, 4'd0));
        prog[g].push_back(enc_r(OP_INCDEC, CC_LT, 4'd6, 4'd6, 0));
        prog[g].push_back(enc_r(OP_MOV, CC_AL, 4'd6, 4'd6, 0));
      end
      default: begin
        prog[g].push_back(enc_r(OP_XOR, CC_AL, 4'd5, 4'd5, 4'd5));
        prog[g].push_back(enc_r(OP_SUB, CC_AL, 4'd7, 4'd0, 4'd3));
        prog[g].push_back(enc_r(OP_SUB, CC_AL, 4'd9, 4'd1, 4'd7));
        prog[g].push_back(enc_i(OP_MOVI, CC_MI, 4'd5, 0, 16'd1));
        prog[g].push_back(enc_r(OP_SUB, CC_AL, 4'd9, 4'd1, 4'd3));
        prog[g].push_back(enc_i(OP_MOVI, CC_GT, 4'd5, 0, 16'd2));
        prog[g].push_back(enc_r(OP_SUB, CC_AL, 4'd9, 4'd2, 4'd7));
        prog[g].push_back(enc_i(OP_MOVI, CC_MI, 4'd9, 0, 16'd4));
        prog[g].push_back(enc_r(OP_ADD, CC_MI, 4'd5, 4'd9, 4'd5));
        prog[g].push_back(enc_r(OP_SUB, CC_AL, 4'd9, 4'd2, 4'd3));
        prog[g].push_back(enc_i(OP_MOVI, CC_GT, 4'd9, 0, 16'd8));
        prog[g].push_back(enc_r(OP_ADD, CC_GT, 4'd5, 4'd9, 4'd5));
        prog[g].push_back(enc_r(OP_MOV, CC_AL, 4'd5, 4'd5, 0));
      end
    endcase
  endtask

  function automatic logic [31:0] rnd16();
    return 32'($signed(16'($urandom)));
  endfunction

  initial begin
    int len, last_wake_slot;
    instr = '0; instr_valid = '0; data_in = '0;
    #22 rst_n = 1;
    repeat (25) begin
      for (int g = 0; g < NS; g++) build(g, g % 4);
      for (int g = 0; g < NS; g++) begin
        for (int p = 0; p < PP; p++) begin
          int i;
          logic [31:0] x, y, z, c;
          i = g * PP + p;
          if (g % 4 == 3) begin
            x = 32'($signed($urandom_range(0, 2000)) - 1000);
            y = 32'($signed($urandom_range(0, 2000)) - 1000);
            z = 32'($urandom_range(0, 1000));
          end else begin
            x = ($urandom % 2) ? $urandom : rnd16();
            y = ($urandom % 3 == 0) ? x : $urandom;
            z = $urandom;
          end
          din[i] = {x, y, z};
          case (g % 4)
            0: ex[i] = x[31] ? (y[31] ? 32'd1 : 32'd2) : 32'd3;
            1: ex[i] = smax(smax(x, y), z);
            2: begin
              c = x[31] ? -x : x;
              ex[i] = y[31] ? c - 1 : c + 1;
              if (x[31]) n_addsub_sub++; else n_addsub_add++;
              if (y[31]) n_incdec_dec++; else n_incdec_inc++;
            end
            default: begin
              c = 0;
              if ($signed(x) < -$signed(z)) c = 1;
              if ($signed(x) > $signed(z)) c = 2;
              if ($signed(y) < -$signed(z)) c += 4;
              if ($signed(y) > $signed(z)) c += 8;
              ex[i] = c;
            end
          endcase
        end
      end
      len = 0;
      for (int g = 0; g < NS; g++) if (prog[g].size() > len) len = prog[g].size();
      for (int s = 0; s < len; s++) begin
        @(negedge clk);
        for (int g = 0; g < NS; g++) begin
          instr_valid[g] = s < prog[g].size();
          instr[g]       = instr_valid[g] ? prog[g][s] : '0;
        end
        for (int i = 0; i < NPE; i++) data_in[i] = (s < 3) ? din[i][s] : '0;
      end
      @(negedge clk);
      instr_valid = '0;
      repeat (2) @(posedge clk);
      #1;
      for (int i = 0; i < NPE; i++)
        chk(data_out[i] == ex[i], $sformatf("PE %0d (stream type %0d): %h exp %h",
                                            i, (i / PP) % 4, data_out[i], ex[i]));
      chk(&awake, "all elements awake at the end of the programs");
    end

    // Wake-up timing: element asleep on tag 9 wakes exactly one edge after
    // the matching NOP executes, and executes the very next instruction.
    @(negedge clk);
    instr = '0; instr_valid = '0;
    instr[0] = enc_pbr(CC_AL, 5'd9); instr_valid[0] = 1;
    @(negedge clk); instr[0] = enc_i(OP_MOVI, CC_AL, 4'd14, 0, 16'd77);
    @(negedge clk); instr[0] = enc_nop(5'd9);
    @(negedge clk); instr[0] = enc_i(OP_MOVI, CC_AL, 4'd14, 0, 16'd55);
    #1 chk(awake[0] == 1'b0 && power_down[0], "asleep while the NOP(9) executes");
    @(posedge clk); #1 chk(awake[0] == 1'b1, "awake one edge after NOP(9)");
    chk(executed[0] == 1'b1, "instruction after the target NOP executes");
    @(negedge clk); instr_valid = '0;
    @(posedge clk); #1;
    chk(data_out[0] == 32'd55, "skipped MOVI nullified, next MOVI executed");

    chk(n_taken > 0, "pseudo branch taken");
    chk(n_not_taken > 0, "pseudo branch not taken");
    chk(n_ignored > 0, "pseudo branch ignored while asleep");
    chk(n_wake > 0, "wake-up at matching NOP");
    chk(n_nomatch > 0, "non-matching NOP while asleep");
    chk(n_guard_exec > 0 && n_guard_null > 0, "guarded executed and nullified");
    chk(n_addsub_sub > 0 && n_addsub_add > 0, "AddSub both ways");
    chk(n_incdec_dec > 0 && n_incdec_inc > 0, "IncDec both ways");
    chk(n_pd > 0, "power-down cycles");
    chk(n_concurrent > 0, "different programs in the same cycle");
    $display("taken=%0d not_taken=%0d ignored=%0d wake=%0d nomatch=%0d guard_exec=%0d guard_null=%0d",
             n_taken, n_not_taken, n_ignored, n_wake, n_nomatch, n_guard_exec, n_guard_null);
    $display("addsub sub/add=%0d/%0d incdec dec/inc=%0d/%0d power-down PE-cycles=%0d concurrent cycles=%0d",
             n_addsub_sub, n_addsub_add, n_incdec_dec, n_incdec_inc, n_pd, n_concurrent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
