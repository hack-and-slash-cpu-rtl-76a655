// control_unit: the sequencer of the CPU.
//
// A four-state machine runs every instruction in exactly four clock cycles:
//   FETCH      instr_addr shows the PC; the instruction word is loaded into IR at the end
//              of the cycle.
//   DECODE     the 5-to-32 decoder (instr_decoder) works on the IR opcode; nothing else
//              happens.
//   EXECUTE    the data path gets the command of the instruction (cmd). For the *_Mem
//              instructions and Load_Mem_B, mem_addr carries the data field of IR so the
//              data path sees the memory word in the same cycle. LoadBControl sends the
//              data field to the data path on data_to_dpu. Set/Clear Z/OV act here.
//   WRITEBACK  Store_A_Mem drives mem_addr and mem_rw = 1, writing ACC at the end of the
//              cycle. The PC is updated: the IR data field for Jmp, for Jmp_Z when
//              flags[2] (Z) is 1 and for Jmp_OV when flags[0] (OV) is 1, PC + 1 otherwise.
//              HALT keeps the PC and stays in WRITEBACK for good (halted = 1).
// The state sequence, the four registers' roles and the write-back rules follow the original
// design. Outside these uses mem_addr and data_to_dpu are zero and cmd is the idle command
// (ALU bypasses ACC, nothing is written). rst is asynchronous and active high: state FETCH,
// PC 0, IR 0. The PC is 8 bits and wraps from 255 to 0.
module control_unit
  import cpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [2:0]  flags,        // DPU_Flags: Z at bit 2, OV at bit 0
  input  instr_word_t instr_in,     // word read from instruction memory
  output addr_t       instr_addr,
  output addr_t       mem_addr,
  output logic        mem_rw,       // 1: write data memory at the end of this cycle
  output data_t       data_to_dpu,
  output dpu_cmd_t    cmd,
  output logic [1:0]  state_o,      // current state, for observation
  output addr_t       pc_o,
  output logic        halted
);

  typedef enum logic [1:0] {
    S_FETCH     = 2'd0,
    S_DECODE    = 2'd1,
    S_EXECUTE   = 2'd2,
    S_WRITEBACK = 2'd3
  } state_e;

  state_e state, state_next;
  addr_t  pc, pc_next;
  instr_t ir, ir_next;
  instr_e instr;

  instr_decoder u_dec (
    .opcode (ir.opcode),
    .instr  (instr)
  );

  // Registers.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state <= S_FETCH;
      pc    <= '0;
      ir    <= '0;
    end else begin
      state <= state_next;
      pc    <= pc_next;
      ir    <= ir_next;
    end
  end

  // Command of one ALU instruction that writes ACC.
  function automatic dpu_cmd_t alu_cmd(alu_op_e op, opnd_sel_e sel, logic arith);
    dpu_cmd_t c;
    c          = DPU_IDLE;
    c.alu_op   = op;
    c.opnd_sel = sel;
    c.acc_we   = 1'b1;
    c.z_op     = FL_UPDATE;
    c.ov_op    = arith ? FL_UPDATE : FL_HOLD;
    return c;
  endfunction

  always_comb begin
    state_next  = state;
    pc_next     = pc;
    ir_next     = ir;
    instr_addr  = pc;
    mem_addr    = '0;
    mem_rw      = 1'b0;
    data_to_dpu = '0;
    cmd         = DPU_IDLE;

    unique case (state)
      S_FETCH: begin
        ir_next    = instr_t'(instr_in);
        state_next = S_DECODE;
      end

      S_DECODE: begin
        state_next = S_EXECUTE;
      end

      S_EXECUTE: begin
        unique case (instr)
          I_ADD_A_B:   cmd = alu_cmd(ALU_ADD, OPND_B,   1'b1);
          I_ADD_A_MEM: begin
            mem_addr = ir.data;
            cmd      = alu_cmd(ALU_ADD, OPND_MEM, 1'b1);
          end
          I_SUB_A_B:   cmd = alu_cmd(ALU_SUB, OPND_B,   1'b1);
          I_SUB_A_MEM: begin
            mem_addr = ir.data;
            cmd      = alu_cmd(ALU_SUB, OPND_MEM, 1'b1);
          end
          I_INC_A:     cmd = alu_cmd(ALU_ADD, OPND_ONE, 1'b1);
          I_DEC_A:     cmd = alu_cmd(ALU_SUB, OPND_ONE, 1'b1);
          I_SHIFT_A_R: cmd = alu_cmd(ALU_SHR, OPND_B,   1'b0);
          I_SHIFT_A_L: cmd = alu_cmd(ALU_SHL, OPND_B,   1'b0);
          I_AND_A_B:   cmd = alu_cmd(ALU_AND, OPND_B,   1'b0);
          I_OR_A_B:    cmd = alu_cmd(ALU_OR,  OPND_B,   1'b0);
          I_XOR_A_B:   cmd = alu_cmd(ALU_XOR, OPND_B,   1'b0);
          I_NEG_A:     cmd = alu_cmd(ALU_NEG, OPND_B,   1'b0);
          I_LOAD_MEM_B: begin
            mem_addr  = ir.data;
            cmd.b_sel = BSEL_MEM;
          end
          I_LOAD_B_CTRL: begin
            data_to_dpu = ir.data;
            cmd.b_sel   = BSEL_CU;
          end
          I_SET_Z:     cmd.z_op  = FL_SET;
          I_CLEAR_Z:   cmd.z_op  = FL_CLEAR;
          I_SET_OV:    cmd.ov_op = FL_SET;
          I_CLEAR_OV:  cmd.ov_op = FL_CLEAR;
          default:     cmd = DPU_IDLE;   // Store, jumps, NOP, HALT
        endcase
        state_next = S_WRITEBACK;
      end

      default: begin  // S_WRITEBACK
        state_next = S_FETCH;
        pc_next    = pc + 1'b1;
        unique case (instr)
          I_STORE_A_MEM: begin
            mem_addr = ir.data;
            mem_rw   = 1'b1;
          end
          I_HALT: begin
            pc_next    = pc;
            state_next = S_WRITEBACK;
          end
          I_JMP:    pc_next = ir.data;
          I_JMP_Z:  if (flags[FLAG_Z])  pc_next = ir.data;
          I_JMP_OV: if (flags[FLAG_OV]) pc_next = ir.data;
          default: ;
        endcase
      end
    endcase
  end

  assign state_o = state;
  assign pc_o    = pc;
  assign halted  = (state == S_WRITEBACK) && (instr == I_HALT);

  // A memory write may only be issued in WRITEBACK.
  a_write_in_wb: assert property (@(posedge clk) mem_rw |-> state == S_WRITEBACK);

endmodule
