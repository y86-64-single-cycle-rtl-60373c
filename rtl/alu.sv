// alu: 64-bit arithmetic/logic unit of the Y86-64 processors.
//
// Four operations, the ones the notes call for: add (addq and all address
// arithmetic), sub (subq), and (andq), xor (xorq). Following the Y86-64
// operand order, sub computes b - a. The zero and sign flags of the result
// are produced for the condition-code register; there is no overflow or
// carry flag, as the notes drop them. Purely combinational.
module alu
  import y86_pkg::*;
(
  input  alu_op_e     op,
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic [63:0] y,
  output logic        zf,
  output logic        sf
);
  always_comb begin
    unique case (op)
      ALU_ADD: y = b + a;
      ALU_SUB: y = b - a;
      ALU_AND: y = b & a;
      default: y = b ^ a;
    endcase
  end
  assign zf = (y == 64'd0);
  assign sf = y[63];
endmodule
