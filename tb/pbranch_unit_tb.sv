// pbranch_unit_tb: replays the two-element nested pseudo-branch example
// (pBracc T1 ... pBracc T2 ... pBra T1, Nop(T2) ... Nop(T1), with T1 = 1 and
// T2 = 2) on two pbranch_unit instances. Element 1 does not take the first
// pseudo branch but takes the second; element n takes the first and sleeps to
// Nop(T1). After each instruction the Sleep/Awake flag and the Tag Register of
// both elements are compared with the expected trace, and the taken/wake
// pulses are checked in the cycle they occur.
module pbranch_unit_tb;
  logic clk = 0, rst_n = 0;
  logic is_pbr, is_nop;
  logic [4:0] tag;
  logic c1, cn;
  logic a1, an, pd1, pdn, t1, tn, w1, wn;
  logic [4:0] q1, qn;
  int checks = 0, failures = 0;

  pbranch_unit #(.TAG_W(5)) pe1 (.clk(clk), .rst_n(rst_n), .is_pbr(is_pbr), .is_nop(is_nop),
    .cond_true(c1), .tag(tag), .awake(a1), .power_down(pd1), .treg(q1), .taken(t1), .wake(w1));
  pbranch_unit #(.TAG_W(5)) pen (.clk(clk), .rst_n(rst_n), .is_pbr(is_pbr), .is_nop(is_nop),
    .cond_true(cn), .tag(tag), .awake(an), .power_down(pdn), .treg(qn), .taken(tn), .wake(wn));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // kind: 0 = ordinary instruction, 1 = pseudo branch, 2 = NOP
  typedef struct {
    int kind; int tg; bit cond1; bit condn;
    bit exp_t1; bit exp_tn; bit exp_w1; bit exp_wn;
    bit a1_after; int q1_after; bit an_after; int qn_after;
  } row_t;

  row_t prog [11] = '{
    '{1, 1, 0, 1,  0, 1, 0, 0,  1, 0, 0, 1},  // pBracc T1
    '{0, 0, 0, 0,  0, 0, 0, 0,  1, 0, 0, 1},  // Instr c
    '{0, 0, 0, 0,  0, 0, 0, 0,  1, 0, 0, 1},  // ----
    '{1, 2, 1, 1,  1, 0, 0, 0,  0, 2, 0, 1},  // pBracc T2 (PEn asleep: ignored)
    '{0, 0, 0, 0,  0, 0, 0, 0,  0, 2, 0, 1},  // ----
    '{0, 0, 0, 0,  0, 0, 0, 0,  0, 2, 0, 1},  // Instr i / j
    '{1, 1, 1, 1,  0, 0, 0, 0,  0, 2, 0, 1},  // pBra T1 (both asleep)
    '{2, 2, 0, 0,  0, 0, 1, 0,  1, 0, 0, 1},  // Nop(T2): PE1 wakes
    '{0, 0, 0, 0,  0, 0, 0, 0,  1, 0, 0, 1},  // Instr m
    '{0, 0, 0, 0,  0, 0, 0, 0,  1, 0, 0, 1},  // Instr n
    '{2, 1, 0, 0,  0, 0, 0, 1,  1, 0, 1, 0}   // Nop(T1): PEn wakes
  };

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    is_pbr = 0; is_nop = 0; tag = 0; c1 = 0; cn = 0;
    #12 rst_n = 1;
    chk(a1 && an && q1 == 0 && qn == 0 && !pd1 && !pdn, "reset state");
    foreach (prog[i]) begin
      @(negedge clk);
      is_pbr = (prog[i].kind == 1);
      is_nop = (prog[i].kind == 2);
      tag    = 5'(prog[i].tg);
      c1     = prog[i].cond1;
      cn     = prog[i].condn;
      #1;
      chk(t1 == prog[i].exp_t1 && tn == prog[i].exp_tn, $sformatf("row %0d taken %b%b", i, t1, tn));
      chk(w1 == prog[i].exp_w1 && wn == prog[i].exp_wn, $sformatf("row %0d wake %b%b", i, w1, wn));
      @(posedge clk); #1;
      chk(a1 == prog[i].a1_after && q1 == 5'(prog[i].q1_after),
          $sformatf("row %0d PE1 awake=%b treg=%0d", i, a1, q1));
      chk(an == prog[i].an_after && qn == 5'(prog[i].qn_after),
          $sformatf("row %0d PEn awake=%b treg=%0d", i, an, qn));
      chk(pd1 == !a1 && pdn == !an, $sformatf("row %0d power_down", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
