// rc_ram_tb: fills the RAM, then mixes random writes and reads, comparing
// every read with a reference array.
module rc_ram_tb;
  logic        clk = 0, we = 0;
  logic [5:0]  addr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [31:0] model [64];
  int checks = 0, failures = 0;

  rc_ram #(.DATA_W(32), .WORDS(64)) dut (.clk(clk), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); we = 1; addr = 6'(i); wdata = $urandom; model[i] = wdata;
    end
    repeat (1500) begin
      @(negedge clk);
      we = ($urandom % 3) == 0; addr = 6'($urandom); wdata = $urandom;
      #1;
      checks++;
      if (rdata !== model[addr]) begin failures++; $display("FAIL [%0d] %h exp %h", addr, rdata, model[addr]); end
      @(posedge clk);
      if (we) model[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
