// rc_alu: arithmetic and logic unit of a processing element.
//
// Computes y = a OP b and the four flags the guard conditions are built from:
// N (sign of y), Z (y is zero), C and V. For ADD, C is the carry out; for SUB
// (a - b), C is set when there is no borrow, so CS/CC and HI/LS give unsigned
// comparisons and GE/LT/GT/LE signed ones. Logic operations and moves clear
// C and V. Shifts by shamt put the last bit shifted out in C (0 for a shift by
// 0). ALU_HI places the low 16 bits of b in the upper half of y and keeps the
// lower half of a (used to build 32-bit constants).
//
// The flags Carry, Zero, Sign and Overflow are those of the published scheme;
// the operation set and the flag rules for logic and shift operations are this
// design's own. Purely combinational.
module rc_alu
  import simd_pkg::*;
#(
  parameter int unsigned DATA_W = 32
) (
  input  alu_op_e           op,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  logic [4:0]        shamt,
  output logic [DATA_W-1:0] y,
  output flags_t            flags
);

  logic [DATA_W:0] sum;
  logic            c, v;

  always_comb begin
    sum = '0;
    c   = 1'b0;
    v   = 1'b0;
    y   = '0;
    unique case (op)
      ALU_ADD: begin
        sum = {1'b0, a} + {1'b0, b};
        y   = sum[DATA_W-1:0];
        c   = sum[DATA_W];
        v   = (a[DATA_W-1] == b[DATA_W-1]) && (y[DATA_W-1] != a[DATA_W-1]);
      end
      ALU_SUB: begin
        sum = {1'b0, a} + {1'b0, ~b} + {{DATA_W{1'b0}}, 1'b1};
        y   = sum[DATA_W-1:0];
        c   = sum[DATA_W];
        v   = (a[DATA_W-1] != b[DATA_W-1]) && (y[DATA_W-1] != a[DATA_W-1]);
      end
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_PASSA: y = a;
      ALU_PASSB: y = b;
      ALU_SHL: begin
        y = a << shamt;
        c = (shamt != 0) ? a[DATA_W - 32'(shamt)] : 1'b0;
      end
      ALU_SHR: begin
        y = a >> shamt;
        c = (shamt != 0) ? a[32'(shamt) - 1] : 1'b0;
      end
      ALU_ASR: begin
        y = DATA_W'($signed(a) >>> shamt);
        c = (shamt != 0) ? a[32'(shamt) - 1] : 1'b0;
      end
      ALU_HI:    y = {b[15:0], a[DATA_W-17:0]};
      default:   y = '0;
    endcase
    flags.n = y[DATA_W-1];
    flags.z = (y == '0);
    flags.c = c;
    flags.v = v;
  end

endmodule
