// cpu_top: the complete 8-bit accumulator CPU.
//
// Four blocks, wired as in the original top-level drawing:
//   control_unit  fetches from inst_mem, sequences each instruction in four cycles and
//                 commands the data path and the data memory;
//   dpu           the data path (ACC, B, ALU, Z/OV flags); its flags go back to the control
//                 unit for the conditional jumps;
//   data_mem      256 x 8 RAM; address and write enable from the control unit, write data
//                 from ACC, read data into the data path;
//   inst_mem      256 x 16 program ROM, loaded from PROGRAM_FILE.
// Ports: clk, rst (asynchronous, active high), and observation outputs: halted goes high
// once a HALT has been executed and stays high; pc, acc, b_reg and flags (Z bit 2, OV bit 0)
// show the architectural state.
module cpu_top
  import cpu_pkg::*;
#(
  parameter string PROGRAM_FILE = "rtl/demo_program.hex"
) (
  input  logic       clk,
  input  logic       rst,
  output logic       halted,
  output addr_t      pc,
  output data_t      acc,
  output data_t      b_reg,
  output logic [2:0] flags
);

  instr_word_t instr;
  addr_t       instr_addr, mem_addr;
  logic        mem_rw;
  data_t       data_to_dpu, mem_rdata;
  dpu_cmd_t    cmd;

  control_unit u_cu (
    .clk         (clk),
    .rst         (rst),
    .flags       (flags),
    .instr_in    (instr),
    .instr_addr  (instr_addr),
    .mem_addr    (mem_addr),
    .mem_rw      (mem_rw),
    .data_to_dpu (data_to_dpu),
    .cmd         (cmd),
    .state_o     (),
    .pc_o        (pc),
    .halted      (halted)
  );

  dpu u_dpu (
    .clk      (clk),
    .rst      (rst),
    .cmd      (cmd),
    .data_cu  (data_to_dpu),
    .data_mem (mem_rdata),
    .acc      (acc),
    .b        (b_reg),
    .flags    (flags)
  );

  data_mem #(.WIDTH(DATA_W), .DEPTH(256)) u_dmem (
    .clk      (clk),
    .rst      (rst),
    .we       (mem_rw),
    .addr     (mem_addr),
    .data_in  (acc),
    .data_out (mem_rdata)
  );

  inst_mem #(.DEPTH(256), .INIT_FILE(PROGRAM_FILE)) u_imem (
    .addr (instr_addr),
    .data (instr)
  );

endmodule
