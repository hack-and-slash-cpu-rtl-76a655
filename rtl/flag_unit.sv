// flag_unit: the zero (Z) and overflow (OV) flag registers of the data path.
//
// Z is the NOR of all bits of the value being written into the accumulator, so it is 1 when
// that value is zero. OV is the two's-complement overflow of the adder, from the sign bits of
// the operands and of the result:
//   OV = (a7 & b7 & ~r7) | (~a7 & ~b7 & r7)
// For a subtraction the adder adds the inverted operand, so b7 is inverted first (is_sub).
// Each flag has its own request: hold, update from the current operation, set or clear
// (the Set/Clear Z and Set/Clear OV instructions). Both flags are registers, written on the
// rising clock edge and cleared by the asynchronous reset rst (active high); which operations
// update which flag is decided by the control unit.
module flag_unit
  import cpu_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  flag_op_e z_op,
  input  flag_op_e ov_op,
  input  logic     is_sub,   // the current operation subtracts b from a
  input  data_t    a,        // first adder operand (accumulator)
  input  data_t    b,        // second adder operand, before inversion
  input  data_t    result,   // value going into the accumulator
  output logic     z,
  output logic     ov
);

  logic z_calc, ov_calc, b_sign;

  always_comb begin
    z_calc  = ~|result;
    b_sign  = b[DATA_W-1] ^ is_sub;
    ov_calc = (a[DATA_W-1] & b_sign & ~result[DATA_W-1]) |
              (~a[DATA_W-1] & ~b_sign & result[DATA_W-1]);
  end

  function automatic logic next_flag(flag_op_e fop, logic cur, logic calc);
    unique case (fop)
      FL_HOLD:   return cur;
      FL_UPDATE: return calc;
      FL_SET:    return 1'b1;
      default:   return 1'b0;
    endcase
  endfunction

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      z  <= 1'b0;
      ov <= 1'b0;
    end else begin
      z  <= next_flag(z_op,  z,  z_calc);
      ov <= next_flag(ov_op, ov, ov_calc);
    end
  end

endmodule
