// sleep_awake_flag: the 1-bit Sleep/Awake flag of a processing element.
//
// Awake (1) is the normal state in which the element executes instructions.
// RESET (a taken pseudo branch) moves it to Sleep (0): every following
// instruction is nullified and the element is powered down. SET (a NOP whose
// tag matches the Tag Register) returns it to Awake and powers it up again.
// The states, their encoding and the SET/RESET controls follow the published
// scheme. SET having priority and the asynchronous reset to Awake are this
// design's choices; SET and RESET never coincide in the processing element.
//
// Timing: awake changes on the rising clock edge after set/reset is sampled;
// power_down is its complement.
module sleep_awake_flag (
  input  logic clk,
  input  logic rst_n,
  input  logic set,        // wake up
  input  logic reset,      // go to sleep
  output logic awake,
  output logic power_down  // power-down request for the element's logic
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     awake <= 1'b1;
    else if (set)   awake <= 1'b1;
    else if (reset) awake <= 1'b0;
  end

  assign power_down = ~awake;

endmodule
