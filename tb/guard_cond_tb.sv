// guard_cond_tb: checks every condition code of guard_cond against
// comparisons computed directly from two operands. The flags fed to the
// block are those of a - b worked out in the testbench (N = sign of the
// difference, Z = equal, C = no borrow, V = signed overflow), and each
// condition must match the relation it stands for (EQ: a == b, GE: signed
// a >= b, HI: unsigned a > b, ...). Random operands plus edge values.
module guard_cond_tb;
  import simd_pkg::*;

  cond_e  cond;
  flags_t flags;
  logic   cond_true;
  int     checks = 0, failures = 0;

  guard_cond dut (.cond(cond), .flags(flags), .cond_true(cond_true));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_pair(logic [31:0] a, logic [31:0] b);
    logic [31:0] d;
    logic signed [32:0] sd;
    logic exp;
    d  = a - b;
    sd = 33'($signed(a)) - 33'($signed(b));
    flags.n = d[31];
    flags.z = (a == b);
    flags.c = (a >= b);
    flags.v = (sd > 33'sd2147483647) || (sd < -33'sd2147483648);
    for (int k = 0; k < 16; k++) begin
      cond = cond_e'(k);
      #1;
      unique case (cond)
        CC_EQ: exp = (a == b);
        CC_NE: exp = (a != b);
        CC_CS: exp = (a >= b);
        CC_CC: exp = (a < b);
        CC_MI: exp = d[31];
        CC_PL: exp = !d[31];
        CC_VS: exp = flags.v;
        CC_VC: exp = !flags.v;
        CC_HI: exp = (a > b);
        CC_LS: exp = (a <= b);
        CC_GE: exp = ($signed(a) >= $signed(b));
        CC_LT: exp = ($signed(a) <  $signed(b));
        CC_GT: exp = ($signed(a) >  $signed(b));
        CC_LE: exp = ($signed(a) <= $signed(b));
        CC_AL: exp = 1'b1;
        default: exp = 1'b0;
      endcase
      checks++;
      if (cond_true !== exp) begin
        failures++;
        $display("FAIL cond=%0d a=%h b=%h got %b exp %b", k, a, b, cond_true, exp);
      end
    end
  endtask

  initial begin
    logic [31:0] edges [6] = '{32'h0, 32'h1, 32'h7fffffff, 32'h80000000,
                               32'hffffffff, 32'h12345678};
    foreach (edges[i]) foreach (edges[j]) check_pair(edges[i], edges[j]);
    repeat (500) begin
      logic [31:0] a, b;
      a = $urandom;
      b = ($urandom % 4 == 0) ? a : $urandom;
      check_pair(a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
