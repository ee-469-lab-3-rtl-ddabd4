// alu: 32-bit arithmetic/logic unit of the Execute stage.
//
// control selects the operation with the ALUControl encoding of the decoder:
// 00 A+B, 01 A-B, 10 A&B, 11 A|B. It is purely combinational. flags is
// {N, Z, C, V}: N is result bit 31, Z is set when the result is zero, C is the
// carry out of the adder (for A-B, computed as A + ~B + 1, so C = 1 means no
// borrow, as on ARM) and V is signed overflow. For AND and OR, C and V are 0.
// The four operations and the flag order (bit 3 negative, bit 2 zero) come from
// the processor's description; the carry and overflow definitions are the
// standard ARM ones.
module alu
  import arm_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] A,
  input  logic [WIDTH-1:0] B,
  input  alu_op_t          control,
  output logic [WIDTH-1:0] result,
  output flags_t           flags
);

  logic [WIDTH-1:0] b_in;
  logic [WIDTH:0]   sum;
  logic             is_arith;

  always_comb begin
    b_in     = (control == ALU_SUB) ? ~B : B;
    sum      = {1'b0, A} + {1'b0, b_in} + {{WIDTH{1'b0}}, control == ALU_SUB};
    is_arith = (control == ALU_ADD) || (control == ALU_SUB);
    unique case (control)
      ALU_ADD, ALU_SUB: result = sum[WIDTH-1:0];
      ALU_AND:          result = A & B;
      ALU_ORR:          result = A | B;
    endcase
    flags.n = result[WIDTH-1];
    flags.z = (result == '0);
    flags.c = is_arith & sum[WIDTH];
    // Overflow: operands (after inversion for SUB) share a sign the sum lacks.
    flags.v = is_arith & (A[WIDTH-1] == b_in[WIDTH-1]) & (sum[WIDTH-1] != A[WIDTH-1]);
  end

endmodule
