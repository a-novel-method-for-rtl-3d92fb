// rc_alu_tb: random and edge-value operands for every ALU operation; results
// and N, Z, C, V are compared with values computed here in 64-bit arithmetic
// (carry = bit 32 of the wide sum, subtraction carry = no borrow, overflow =
// the signed result does not fit in 32 bits).
module rc_alu_tb;
  import simd_pkg::*;

  alu_op_e     op;
  logic [31:0] a, b, y;
  logic [4:0]  shamt;
  flags_t      flags;
  int checks = 0, failures = 0;

  rc_alu #(.DATA_W(32)) dut (.op(op), .a(a), .b(b), .shamt(shamt), .y(y), .flags(flags));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(alu_op_e o, logic [31:0] av, logic [31:0] bv, logic [4:0] sh);
    longint unsigned w;
    longint          s;
    logic [31:0]     ey;
    logic            ec, ev;
    op = o; a = av; b = bv; shamt = sh;
    #1;
    ec = 0; ev = 0;
    unique case (o)
      ALU_ADD: begin
        w = longint'(av) + longint'(bv); ey = w[31:0]; ec = w[32];
        s = longint'($signed(av)) + longint'($signed(bv));
        ev = (s > 64'sd2147483647) || (s < -64'sd2147483648);
      end
      ALU_SUB: begin
        ey = av - bv; ec = (av >= bv);
        s = longint'($signed(av)) - longint'($signed(bv));
        ev = (s > 64'sd2147483647) || (s < -64'sd2147483648);
      end
      ALU_AND: ey = av & bv;
      ALU_OR:  ey = av | bv;
      ALU_XOR: ey = av ^ bv;
      ALU_PASSA: ey = av;
      ALU_PASSB: ey = bv;
      ALU_SHL: begin w = longint'(av) << sh; ey = w[31:0]; ec = w[32]; end
      ALU_SHR: begin ey = av >> sh; ec = (sh == 0) ? 1'b0 : av[sh-1]; end
      ALU_ASR: begin
        s = longint'($signed(av)) >>> sh; ey = s[31:0]; ec = (sh == 0) ? 1'b0 : av[sh-1];
      end
      ALU_HI:  ey = {bv[15:0], av[15:0]};
      default: ey = '0;
    endcase
    checks += 2;
    if (y !== ey) begin
      failures++; $display("FAIL op=%s a=%h b=%h sh=%0d y=%h exp %h", o.name(), av, bv, sh, y, ey);
    end
    if (flags !== {ey[31], ey == 0, ec, ev}) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h flags=%b exp %b", o.name(), av, bv, flags, {ey[31], ey == 0, ec, ev});
    end
  endtask

  initial begin
    logic [31:0] edges [6] = '{32'h0, 32'h1, 32'h7fffffff, 32'h80000000, 32'hffffffff, 32'hfffe0001};
    for (int o = 0; o <= int'(ALU_HI); o++) begin
      foreach (edges[i]) foreach (edges[j]) run(alu_op_e'(o), edges[i], edges[j], 5'(i * 5 + j));
      repeat (300) run(alu_op_e'(o), $urandom, $urandom, 5'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
