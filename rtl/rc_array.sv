// rc_array: SIMD array of processing elements with guarded instructions and
// pseudo branches (top level).
//
// The array has NSTREAMS groups of PES_PER_STREAM processing elements (rc_cell).
// Each group receives its own broadcast instruction stream, so up to NSTREAMS
// different SIMD programs run at the same time, and inside a group every
// element still takes its own data-dependent path through if-then-else code
// by guarded execution and pseudo branches, without help from the control
// processor. Element p of group g has flat index g*PES_PER_STREAM + p.
//
// The control processor, context memory, frame buffer, DMA controller and the
// neighbour / express-lane network of the surrounding system are not part of
// this RTL: instruction streams and each element's data input and output are
// ports, and each element's Sleep/Awake state and power-down request are
// brought out for the power switches.
//
// Up to eight concurrent instruction streams follow the published
// description. The group size of 8 (an 8 x 8 array) and all word widths
// are this design's choices.
//
// Timing: a word presented with instr_valid on edge k executes in the cycle
// after edge k and its results appear on data_out after edge k+1.
module rc_array
  import simd_pkg::*;
#(
  parameter int unsigned NSTREAMS       = 8,
  parameter int unsigned PES_PER_STREAM = 8,
  parameter int unsigned DATA_W         = 32,
  parameter int unsigned NREGS          = 16,
  parameter int unsigned RAM_WORDS      = 64,
  localparam int unsigned NPE           = NSTREAMS * PES_PER_STREAM
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [NSTREAMS-1:0][INSTR_W-1:0] instr,
  input  logic [NSTREAMS-1:0]              instr_valid,
  input  logic [NPE-1:0][DATA_W-1:0]       data_in,
  output logic [NPE-1:0][DATA_W-1:0]       data_out,
  output logic [NPE-1:0]                   awake,
  output logic [NPE-1:0]                   power_down,
  output logic [NPE-1:0]                   executed,
  output logic [NPE-1:0]                   nullified,
  output logic [NPE-1:0]                   pbr_taken,
  output logic [NPE-1:0]                   woke
);

  for (genvar g = 0; g < NSTREAMS; g++) begin : g_stream
    for (genvar p = 0; p < PES_PER_STREAM; p++) begin : g_pe
      localparam int unsigned I = g * PES_PER_STREAM + p;
      logic [TAG_W-1:0] treg_unused;
      flags_t           flags_unused;
      rc_cell #(
        .DATA_W   (DATA_W),
        .NREGS    (NREGS),
        .RAM_WORDS(RAM_WORDS)
      ) u_pe (
        .clk        (clk),
        .rst_n      (rst_n),
        .instr      (instr[g]),
        .instr_valid(instr_valid[g]),
        .data_in    (data_in[I]),
        .data_out   (data_out[I]),
        .awake      (awake[I]),
        .power_down (power_down[I]),
        .treg       (treg_unused),
        .flags      (flags_unused),
        .executed   (executed[I]),
        .nullified  (nullified[I]),
        .pbr_taken  (pbr_taken[I]),
        .woke       (woke[I])
      );
    end
  end

endmodule
