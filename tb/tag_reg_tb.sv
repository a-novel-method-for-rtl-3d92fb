// tag_reg_tb: drives random load/clear/tag sequences into tag_reg and compares
// the register with a reference model every cycle (clear beats load, reset
// gives 0).
module tag_reg_tb;
  logic       clk = 0, rst_n = 0, load = 0, clear = 0;
  logic [4:0] d = '0, q, model;
  int checks = 0, failures = 0;

  tag_reg #(.TAG_W(5)) dut (.clk(clk), .rst_n(rst_n), .load(load), .clear(clear), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    #12 rst_n = 1;
    checks++; if (q !== 5'd0) begin failures++; $display("FAIL reset value %h", q); end
    repeat (400) begin
      @(negedge clk);
      load  = ($urandom % 3) == 0;
      clear = ($urandom % 5) == 0;
      d     = 5'($urandom);
      @(posedge clk);
      if (clear) model = '0;
      else if (load) model = d;
      #1;
      checks++;
      if (q !== model) begin failures++; $display("FAIL q=%h exp %h", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
