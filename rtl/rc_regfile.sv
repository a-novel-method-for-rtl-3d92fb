// rc_regfile: register file of a processing element.
//
// NREGS words of DATA_W bits with two asynchronous read ports and one write
// port written on the rising clock edge. It keeps its contents while the
// element sleeps, because instructions after the wake-up use results computed
// before the pseudo branch. A register file that stays powered follows the
// published scheme; its size, the port count and the reset of all registers
// to 0 are this design's choices.
//
// Timing: a write at edge k is visible on the read ports after edge k.
module rc_regfile #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned NREGS  = 16,
  localparam int unsigned AW    = $clog2(NREGS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [AW-1:0]     raddr_a,
  output logic [DATA_W-1:0] rdata_a,
  input  logic [AW-1:0]     raddr_b,
  output logic [DATA_W-1:0] rdata_b
);

  logic [DATA_W-1:0] regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata_a = regs[raddr_a];
  assign rdata_b = regs[raddr_b];

endmodule
