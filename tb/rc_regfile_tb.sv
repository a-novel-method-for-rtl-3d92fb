// rc_regfile_tb: checks reset to 0, then random writes with two random reads
// per cycle against a reference array.
module rc_regfile_tb;
  logic        clk = 0, rst_n = 0, we = 0;
  logic [3:0]  waddr = 0, ra = 0, rb = 0;
  logic [31:0] wdata = 0, da, db;
  logic [31:0] model [16];
  int checks = 0, failures = 0;

  rc_regfile #(.DATA_W(32), .NREGS(16)) dut (.clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr),
    .wdata(wdata), .raddr_a(ra), .rdata_a(da), .raddr_b(rb), .rdata_b(db));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = '0;
    #12 rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      ra = 4'(i); #1; checks++;
      if (da !== 0) begin failures++; $display("FAIL r%0d not reset", i); end
    end
    repeat (1000) begin
      @(negedge clk);
      we = $urandom % 2; waddr = 4'($urandom); wdata = $urandom;
      ra = 4'($urandom); rb = 4'($urandom);
      #1;
      checks += 2;
      if (da !== model[ra]) begin failures++; $display("FAIL port a r%0d %h exp %h", ra, da, model[ra]); end
      if (db !== model[rb]) begin failures++; $display("FAIL port b r%0d %h exp %h", rb, db, model[rb]); end
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
