// dpu: the data path (data processing unit) of the CPU.
//
// It holds the accumulator ACC, the general purpose register B and the Z and OV flags. Two
// data inputs enter it: data_cu, an immediate from the control unit, and data_mem, the word
// read from data memory. The wiring follows the original block diagram:
//   * a 4-input multiplexer in front of B chooses B itself (hold), data_cu, data_mem or the
//     ALU result;
//   * a 4-input multiplexer chooses the ALU's second operand: B, data_cu, data_mem or the
//     constant 1 (used for increment and decrement);
//   * the ALU's first operand is always ACC, and its result is written back into ACC.
// When the ALU is idle the command selects "bypass A", so ACC keeps its value.
// Everything the data path does is set by the command word cmd (see cpu_pkg::dpu_cmd_t);
// a command takes effect on the next rising clock edge. acc and b are the register outputs;
// acc is also the data written to memory. flags carries Z at bit 2 and OV at bit 0; bit 1
// is not used and reads 0. rst is asynchronous and active high and clears ACC, B and the flags.
module dpu
  import cpu_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  dpu_cmd_t cmd,
  input  data_t    data_cu,
  input  data_t    data_mem,
  output data_t    acc,
  output data_t    b,
  output logic [2:0] flags
);

  data_t opnd, alu_res, b_next;
  logic  z, ov;

  mux4 #(.WIDTH(DATA_W)) u_opnd_mux (
    .sel (cmd.opnd_sel),
    .in0 (b),
    .in1 (data_cu),
    .in2 (data_mem),
    .in3 (data_t'(1)),
    .out (opnd)
  );

  alu u_alu (
    .op     (cmd.alu_op),
    .a      (acc),
    .b      (opnd),
    .result (alu_res)
  );

  mux4 #(.WIDTH(DATA_W)) u_b_mux (
    .sel (cmd.b_sel),
    .in0 (b),
    .in1 (data_cu),
    .in2 (data_mem),
    .in3 (alu_res),
    .out (b_next)
  );

  flag_unit u_flags (
    .clk    (clk),
    .rst    (rst),
    .z_op   (cmd.z_op),
    .ov_op  (cmd.ov_op),
    .is_sub (cmd.alu_op == ALU_SUB),
    .a      (acc),
    .b      (opnd),
    .result (alu_res),
    .z      (z),
    .ov     (ov)
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      acc <= '0;
      b   <= '0;
    end else begin
      if (cmd.acc_we) acc <= alu_res;
      b <= b_next;
    end
  end

  always_comb begin
    flags          = '0;
    flags[FLAG_Z]  = z;
    flags[FLAG_OV] = ov;
  end

endmodule
