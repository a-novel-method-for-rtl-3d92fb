// sleep_awake_flag_tb: checks that the flag resets to Awake, that RESET puts
// it to Sleep, that SET wakes it (and wins over RESET), and that power_down
// is always the complement of awake, against a reference model.
module sleep_awake_flag_tb;
  logic clk = 0, rst_n = 0, set = 0, reset = 0, awake, power_down, model;
  int checks = 0, failures = 0;

  sleep_awake_flag dut (.clk(clk), .rst_n(rst_n), .set(set), .reset(reset),
                        .awake(awake), .power_down(power_down));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 1'b1;
    #12 rst_n = 1;
    checks++; if (awake !== 1'b1) begin failures++; $display("FAIL not awake after reset"); end
    repeat (400) begin
      @(negedge clk);
      set   = ($urandom % 4) == 0;
      reset = ($urandom % 3) == 0;
      @(posedge clk);
      if (set) model = 1'b1;
      else if (reset) model = 1'b0;
      #1;
      checks += 2;
      if (awake !== model) begin failures++; $display("FAIL awake=%b exp %b", awake, model); end
      if (power_down !== ~model) begin failures++; $display("FAIL power_down=%b", power_down); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
