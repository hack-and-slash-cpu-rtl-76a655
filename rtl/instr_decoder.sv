// instr_decoder: the 5-to-32 opcode decoder of the control unit.
//
// It maps the opcode field of the instruction register to the instruction the control logic
// acts on. The 24 defined opcodes are listed in cpu_pkg::opcode_e; every other opcode
// decodes as NOP, as in the original design. Purely combinational.
module instr_decoder
  import cpu_pkg::*;
(
  input  logic [OPCODE_W-1:0] opcode,
  output instr_e              instr
);

  always_comb begin
    unique case (opcode)
      OP_ADD_A_B:     instr = I_ADD_A_B;
      OP_ADD_A_MEM:   instr = I_ADD_A_MEM;
      OP_SUB_A_B:     instr = I_SUB_A_B;
      OP_SUB_A_MEM:   instr = I_SUB_A_MEM;
      OP_INC_A:       instr = I_INC_A;
      OP_DEC_A:       instr = I_DEC_A;
      OP_SHIFT_A_R:   instr = I_SHIFT_A_R;
      OP_SHIFT_A_L:   instr = I_SHIFT_A_L;
      OP_AND_A_B:     instr = I_AND_A_B;
      OP_OR_A_B:      instr = I_OR_A_B;
      OP_XOR_A_B:     instr = I_XOR_A_B;
      OP_LOAD_MEM_B:  instr = I_LOAD_MEM_B;
      OP_STORE_A_MEM: instr = I_STORE_A_MEM;
      OP_JMP:         instr = I_JMP;
      OP_JMP_Z:       instr = I_JMP_Z;
      OP_JMP_OV:      instr = I_JMP_OV;
      OP_SET_Z:       instr = I_SET_Z;
      OP_CLEAR_Z:     instr = I_CLEAR_Z;
      OP_SET_OV:      instr = I_SET_OV;
      OP_CLEAR_OV:    instr = I_CLEAR_OV;
      OP_NOP:         instr = I_NOP;
      OP_HALT:        instr = I_HALT;
      OP_NEG_A:       instr = I_NEG_A;
      OP_LOAD_B_CTRL: instr = I_LOAD_B_CTRL;
      default:        instr = I_NOP;
    endcase
  end

endmodule
