// alu: the 8-bit arithmetic and logic unit of the data path.
//
// Operand a is always the accumulator; operand b comes from the operand multiplexer (B, an
// immediate from the control unit, data memory or the constant 1). The operation set is the
// original one: add, subtract, bypass A, bypass B, AND, OR, XOR, shift right, shift left and
// negation. Increment and decrement are not separate operations: they are add and subtract
// with b = 1. Shift right is logical (zero fill) and negation is two's complement (0 - a);
// both are this design's choice. Any encoding outside the list gives zero.
// Purely combinational.
module alu
  import cpu_pkg::*;
(
  input  alu_op_e op,
  input  data_t   a,
  input  data_t   b,
  output data_t   result
);

  always_comb begin
    unique case (op)
      ALU_BYPASS_A: result = a;
      ALU_BYPASS_B: result = b;
      ALU_ADD:      result = a + b;
      ALU_SUB:      result = a - b;
      ALU_AND:      result = a & b;
      ALU_OR:       result = a | b;
      ALU_XOR:      result = a ^ b;
      ALU_SHR:      result = a >> 1;
      ALU_SHL:      result = a << 1;
      ALU_NEG:      result = data_t'(0) - a;
      default:      result = '0;
    endcase
  end

endmodule
