// rc_array_workloads_tb: runs the four evaluation functions on the full-size
// array (default parameters), two instruction streams per function, all four
// functions at the same time, with random data in every element:
//   streams 0,1  MaxOf(x,y,z)        two pseudo branches (PBR LE / NOP)
//   streams 2,3  LineClipping        clip codes of both end points with
//                                    guarded MI_/GT_ instructions, then the
//                                    trivial accept / reject test
//   streams 4,5  SquareRoot          32-bit unsigned integer square root,
//                                    bit by bit, one pseudo branch per step
//   streams 6,7  Signed division     32-bit by 16-bit, magnitudes by AddSub,
//                                    restoring steps with guarded CS_sub and
//                                    CS_or, sign fixed by AddSub
// Programs are straight-line (loops unrolled by this testbench), so no
// element ever needs the control processor. Each element's data_out is
// compared with the function computed here; the cycle count of each program
// (one instruction per cycle plus two cycles of pipeline) is also checked.
module rc_array_workloads_tb;
  import simd_pkg::*;

  localparam int NS = 8, PP = 8, NPE = NS * PP;

  logic                 clk = 0, rst_n = 0;
  logic [NS-1:0][31:0]  instr;
  logic [NS-1:0]        instr_valid;
  logic [NPE-1:0][31:0] data_in, data_out;
  logic [NPE-1:0]       awake, power_down, executed, nullified, pbr_taken, woke;

  rc_array dut (.clk(clk), .rst_n(rst_n), .instr(instr), .instr_valid(instr_valid),
    .data_in(data_in), .data_out(data_out), .awake(awake), .power_down(power_down),
    .executed(executed), .nullified(nullified), .pbr_taken(pbr_taken), .woke(woke));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_taken = 0, n_wake = 0, n_null = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    n_taken += $countones(pbr_taken);
    n_wake  += $countones(woke);
    n_null  += $countones(nullified);
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [31:0] prog [4][$];
  logic [31:0] din  [NPE][6];
  logic [31:0] ex   [NPE];

  // register names
  localparam logic [3:0] R0 = 0, X1 = 1, Y1 = 2, Z1 = 3, X2 = 4, Y2 = 5, Z2 = 6,
                         RA = 7, RB = 8, RC = 9, RD = 10, RE = 11, RF = 12, RG = 13;

  task automatic ldx6(int k);
    for (int r = 1; r <= 6; r++) prog[k].push_back(enc_r(OP_LDX, CC_AL, 4'(r), 0, 0));
  endtask

  // clip code of (x, y, z) into dst, using tmp registers RA (=-z) and RB
  task automatic clip(int k, logic [3:0] x, logic [3:0] y, logic [3:0] z, logic [3:0] dst);
    prog[k].push_back(enc_r(OP_XOR,  CC_AL, dst, dst, dst));
    prog[k].push_back(enc_r(OP_SUB,  CC_AL, RA, R0, z));
    prog[k].push_back(enc_r(OP_SUB,  CC_AL, RB, x, RA));
    prog[k].push_back(enc_i(OP_MOVI, CC_MI, dst, 0, 16'd1));
    prog[k].push_back(enc_r(OP_SUB,  CC_AL, RB, x, z));
    prog[k].push_back(enc_i(OP_MOVI, CC_GT, dst, 0, 16'd2));
    prog[k].push_back(enc_r(OP_SUB,  CC_AL, RB, y, RA));
    prog[k].push_back(enc_i(OP_MOVI, CC_MI, RB, 0, 16'd4));
    prog[k].push_back(enc_r(OP_ADD,  CC_MI, dst, RB, dst));
    prog[k].push_back(enc_r(OP_SUB,  CC_AL, RB, y, z));
    prog[k].push_back(enc_i(OP_MOVI, CC_GT, RB, 0, 16'd8));
    prog[k].push_back(enc_r(OP_ADD,  CC_GT, dst, RB, dst));
  endtask

  task automatic build_all();
    for (int k = 0; k < 4; k++) prog[k] = {};
    // MaxOf(x,y,z) with pseudo branches
    ldx6(0);
    prog[0].push_back(enc_r(OP_MOV, CC_AL, RA, X1, 0));
    prog[0].push_back(enc_r(OP_CMP, CC_AL, 0, Y1, RA));
    prog[0].push_back(enc_pbr(CC_LE, 5'd1));
    prog[0].push_back(enc_r(OP_MOV, CC_AL, RA, Y1, 0));
    prog[0].push_back(enc_nop(5'd1));
    prog[0].push_back(enc_r(OP_CMP, CC_AL, 0, Z1, RA));
    prog[0].push_back(enc_pbr(CC_LE, 5'd2));
    prog[0].push_back(enc_r(OP_MOV, CC_AL, RA, Z1, 0));
    prog[0].push_back(enc_nop(5'd2));
    prog[0].push_back(enc_r(OP_MOV, CC_AL, RA, RA, 0));
    // LineClipping: codes c1 (RC), c2 (RD), status RE: 1 accept, 2 reject
    ldx6(1);
    clip(1, X1, Y1, Z1, RC);
    clip(1, X2, Y2, Z2, RD);
    prog[1].push_back(enc_r(OP_XOR, CC_AL, RE, RE, RE));
    prog[1].push_back(enc_r(OP_OR,  CC_AL, RF, RC, RD));
    prog[1].push_back(enc_i(OP_MOVI, CC_EQ, RE, 0, 16'd1));
    prog[1].push_back(enc_r(OP_AND, CC_AL, RF, RC, RD));
    prog[1].push_back(enc_i(OP_MOVI, CC_NE, RE, 0, 16'd2));
    prog[1].push_back(enc_r(OP_SHL, CC_AL, RC, RC, 0, 5'd8));
    prog[1].push_back(enc_r(OP_SHL, CC_AL, RD, RD, 0, 5'd4));
    prog[1].push_back(enc_r(OP_OR,  CC_AL, RE, RE, RC));
    prog[1].push_back(enc_r(OP_OR,  CC_AL, RE, RE, RD));
    // SquareRoot: n in X1, res RA, bit RB, t RC
    ldx6(2);
    prog[2].push_back(enc_r(OP_XOR, CC_AL, RA, RA, RA));
    prog[2].push_back(enc_i(OP_MOVI, CC_AL, RB, 0, 16'd0));
    prog[2].push_back(enc_i(OP_MOVHI, CC_AL, RB, 0, 16'h4000));
    for (int s = 0; s < 16; s++) begin
      prog[2].push_back(enc_r(OP_ADD, CC_AL, RC, RA, RB));
      prog[2].push_back(enc_r(OP_SHR, CC_AL, RA, RA, 0, 5'd1));
      prog[2].push_back(enc_r(OP_CMP, CC_AL, 0, X1, RC));
      prog[2].push_back(enc_pbr(CC_CC, 5'd3));
      prog[2].push_back(enc_r(OP_SUB, CC_AL, X1, X1, RC));
      prog[2].push_back(enc_r(OP_ADD, CC_AL, RA, RA, RB));
      prog[2].push_back(enc_nop(5'd3));
      prog[2].push_back(enc_r(OP_SHR, CC_AL, RB, RB, 0, 5'd2));
    end
    prog[2].push_back(enc_r(OP_MOV, CC_AL, RA, RA, 0));
    // Signed division X1 / Y1: |n| in RA (quotient), |d| in RB, rem RC,
    // one RD, temp RE
    ldx6(3);
    prog[3].push_back(enc_r(OP_CMP, CC_AL, 0, X1, R0));
    prog[3].push_back(enc_r(OP_ADDSUB, CC_MI, RA, R0, X1));
    prog[3].push_back(enc_r(OP_CMP, CC_AL, 0, Y1, R0));
    prog[3].push_back(enc_r(OP_ADDSUB, CC_MI, RB, R0, Y1));
    prog[3].push_back(enc_r(OP_XOR, CC_AL, RC, RC, RC));
    prog[3].push_back(enc_i(OP_MOVI, CC_AL, RD, 0, 16'd1));
    for (int s = 0; s < 32; s++) begin
      prog[3].push_back(enc_r(OP_SHL, CC_AL, RC, RC, 0, 5'd1));
      prog[3].push_back(enc_r(OP_SHR, CC_AL, RE, RA, 0, 5'd31));
      prog[3].push_back(enc_r(OP_OR,  CC_AL, RC, RC, RE));
      prog[3].push_back(enc_r(OP_SHL, CC_AL, RA, RA, 0, 5'd1));
      prog[3].push_back(enc_r(OP_CMP, CC_AL, 0, RC, RB));
      prog[3].push_back(enc_r(OP_SUB, CC_CS, RC, RC, RB));
      prog[3].push_back(enc_r(OP_OR,  CC_CS, RA, RA, RD));
    end
    prog[3].push_back(enc_r(OP_XOR, CC_AL, RE, X1, Y1));
    prog[3].push_back(enc_r(OP_ADDSUB, CC_MI, RA, R0, RA));
  endtask

  function automatic logic [3:0] code(logic [31:0] x, logic [31:0] y, logic [31:0] z);
    logic [3:0] c;
    c = 0;
    if ($signed(x) < -$signed(z)) c = 1;
    if ($signed(x) > $signed(z)) c = 2;
    if ($signed(y) < -$signed(z)) c += 4;
    if ($signed(y) > $signed(z)) c += 8;
    return c;
  endfunction

  function automatic logic [31:0] isqrt(logic [31:0] n);
    longint unsigned r;
    r = 0;
    while ((r + 1) * (r + 1) <= longint'(n)) r++;
    return 32'(r);
  endfunction

  function automatic logic [31:0] smax(logic [31:0] a, logic [31:0] b);
    return ($signed(a) > $signed(b)) ? a : b;
  endfunction

  function automatic logic [31:0] rnd_coord();
    return 32'($signed($urandom_range(0, 2000)) - 1000);
  endfunction

  initial begin
    int len, start, cyc;
    instr = '0; instr_valid = '0; data_in = '0;
    build_all();
    $display("program lengths: MaxOf=%0d LineClipping=%0d SquareRoot=%0d SignedDiv=%0d",
             prog[0].size(), prog[1].size(), prog[2].size(), prog[3].size());
    #22 rst_n = 1;
    repeat (4) begin
      for (int i = 0; i < NPE; i++) begin
        int k;
        k = i / (2 * PP);
        case (k)
          0: begin
            for (int j = 0; j < 6; j++) din[i][j] = $urandom;
            if (i % 3 == 0) din[i][1] = din[i][0];
            ex[i] = smax(smax(din[i][0], din[i][1]), din[i][2]);
          end
          1: begin
            for (int j = 0; j < 6; j++) din[i][j] = rnd_coord();
            din[i][2] = $urandom_range(0, 1000);
            din[i][5] = $urandom_range(0, 1000);
            begin
              logic [3:0] c1, c2;
              logic [31:0] st;
              c1 = code(din[i][0], din[i][1], din[i][2]);
              c2 = code(din[i][3], din[i][4], din[i][5]);
              st = ((c1 | c2) == 0) ? 1 : ((c1 & c2) != 0) ? 2 : 0;
              ex[i] = (32'(c1) << 8) | (32'(c2) << 4) | st;
            end
          end
          2: begin
            for (int j = 0; j < 6; j++) din[i][j] = $urandom;
            if (i % 4 == 0) din[i][0] = 32'hFFFFFFFF;
            if (i % 4 == 1) din[i][0] = ($urandom % 1000) * ($urandom % 1000);
            ex[i] = isqrt(din[i][0]);
          end
          default: begin
            logic signed [31:0] n, d;
            for (int j = 0; j < 6; j++) din[i][j] = $urandom;
            do d = 32'($signed(16'($urandom))); while (d == 0 || d == -1);
            n = $signed(din[i][0]);
            din[i][1] = d;
            ex[i] = n / d;
          end
        endcase
      end
      len = 0;
      for (int k = 0; k < 4; k++) if (prog[k].size() > len) len = prog[k].size();
      start = 0;
      for (int s = 0; s < len; s++) begin
        @(negedge clk);
        for (int g = 0; g < NS; g++) begin
          instr_valid[g] = s < prog[g / 2].size();
          instr[g]       = instr_valid[g] ? prog[g / 2][s] : '0;
        end
        for (int i = 0; i < NPE; i++) data_in[i] = (s < 6) ? din[i][s] : '0;
      end
      @(negedge clk);
      instr_valid = '0;
      repeat (2) @(posedge clk);
      #1;
      for (int i = 0; i < NPE; i++)
        chk(data_out[i] == ex[i], $sformatf("PE %0d workload %0d: %h exp %h (in %h %h %h)",
            i, i / (2 * PP), data_out[i], ex[i], din[i][0], din[i][1], din[i][2]));
      chk(&awake, "all awake at the end");
    end
    // Latency of the longest program: len words plus two pipeline edges.
    instr_valid = '0;
    @(negedge clk);
    cyc = 0;
    for (int s = 0; s < prog[3].size(); s++) begin
      @(negedge clk);
      instr = '0; instr_valid = '0;
      instr[7] = prog[3][s]; instr_valid[7] = 1;
      data_in[NPE-1] = (s == 0) ? 32'd1000 : (s == 1) ? 32'hFFFFFFF9 : 32'd0;
      cyc++;
    end
    @(posedge clk); #1;
    chk(data_out[NPE-1] != 32'hFFFFFF72, "division result must not be ready one edge after its last word");
    @(negedge clk); instr_valid = '0;
    @(posedge clk); #1;
    chk(data_out[NPE-1] == 32'hFFFFFF72, $sformatf("1000 / -7 = -142 after %0d + 2 cycles: %h", cyc, data_out[NPE-1]));
    chk(n_taken > 0 && n_wake > 0 && n_null > 0, "pseudo branches, wake-ups and nullified instructions occurred");
    $display("pseudo branches taken=%0d wake-ups=%0d nullified element-instructions=%0d", n_taken, n_wake, n_null);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
