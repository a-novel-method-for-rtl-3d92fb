// tag_reg: the Tag Register (TReg) of the pseudo-branch logic.
//
// When a pseudo branch is taken (load), the register copies the branch's
// destination tag. When the target NOP is reached, the wake-up SET signal
// (clear) returns it to 0, the reserved code meaning "no pending target".
// Width, load and clear behaviour follow the published scheme (5 bits, up to
// 31 tags, code 0 reserved). Clear having priority over load and the
// asynchronous active-low reset to 0 are this design's choices; the two never
// coincide in the processing element because load needs a pseudo branch and
// clear needs a NOP.
//
// Timing: q changes on the rising clock edge after load or clear is sampled.
module tag_reg #(
  parameter int unsigned TAG_W = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,   // pseudo branch taken
  input  logic             clear,  // target tag reached (SET)
  input  logic [TAG_W-1:0] d,      // tag field of the pseudo branch
  output logic [TAG_W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (clear) q <= '0;
    else if (load)  q <= d;
  end

endmodule
