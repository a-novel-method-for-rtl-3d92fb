// tag_comp_tb: exhaustive check of tag_comp: SET must be high exactly when the
// instruction is a NOP and its tag equals the Tag Register.
module tag_comp_tb;
  logic       is_nop, set;
  logic [4:0] nop_tag, treg;
  int checks = 0, failures = 0;

  tag_comp #(.TAG_W(5)) dut (.is_nop(is_nop), .nop_tag(nop_tag), .treg(treg), .set(set));

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2; n++)
      for (int a = 0; a < 32; a++)
        for (int b = 0; b < 32; b++) begin
          is_nop = 1'(n); nop_tag = 5'(a); treg = 5'(b);
          #1;
          checks++;
          if (set !== (n == 1 && a == b)) begin
            failures++;
            $display("FAIL nop=%0d tag=%0d treg=%0d set=%b", n, a, b, set);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
