// rc_ram: internal data RAM of a processing element.
//
// WORDS words of DATA_W bits, one port: asynchronous read at addr, write on the
// rising clock edge when we is high. Like the register file it stays powered
// while the element sleeps. The published scheme names this RAM; its size,
// the single port and the asynchronous read are this design's choices. The
// contents are not reset; programs write a word before reading it.
//
// Timing: a write at edge k is visible at rdata after edge k.
module rc_ram #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned WORDS  = 64,
  localparam int unsigned AW    = $clog2(WORDS)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
