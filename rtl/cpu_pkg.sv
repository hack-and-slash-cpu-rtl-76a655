// cpu_pkg: types and constants shared by the blocks of the 8-bit accumulator CPU.
//
// The machine has 8-bit operands, one accumulator (ACC), one general purpose register (B),
// two flags (Z and OV) and 16-bit instructions laid out as
//   [15:13] unused   [12:8] opcode   [7:0] data (immediate, data address or jump target).
// Opcodes 0..5 and 24..27 are fixed by the original instruction table; the others (6..19)
// follow the order in which the instruction list names them, which is this design's choice.
// Opcodes that name no instruction decode as NOP.
//
// The control unit talks to the data path (DPU) through one command word, dpu_cmd_t: which
// ALU operation to run, what feeds the ALU's second operand, what is loaded into B, whether
// the accumulator and the flags are written, and the set/clear requests for Z and OV.
package cpu_pkg;

  localparam int unsigned DATA_W   = 8;   // operand width
  localparam int unsigned INSTR_W  = 16;  // instruction width
  localparam int unsigned OPCODE_W = 5;   // 32 opcodes
  localparam int unsigned ADDR_W   = 8;   // data and instruction address width

  // DPU_Flags bit positions seen by the control unit (Z at bit 2, OV at bit 0).
  localparam int unsigned FLAG_Z  = 2;
  localparam int unsigned FLAG_OV = 0;

  typedef logic [DATA_W-1:0]  data_t;
  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [INSTR_W-1:0] instr_word_t;

  typedef struct packed {
    logic [2:0]          unused;
    logic [OPCODE_W-1:0] opcode;
    logic [DATA_W-1:0]   data;
  } instr_t;

  // Instruction opcodes.
  typedef enum logic [OPCODE_W-1:0] {
    OP_ADD_A_B      = 5'b00000,
    OP_ADD_A_MEM    = 5'b00001,
    OP_SUB_A_B      = 5'b00010,
    OP_SUB_A_MEM    = 5'b00011,
    OP_INC_A        = 5'b00100,
    OP_DEC_A        = 5'b00101,
    OP_SHIFT_A_R    = 5'b00110,
    OP_SHIFT_A_L    = 5'b00111,
    OP_AND_A_B      = 5'b01000,
    OP_OR_A_B       = 5'b01001,
    OP_XOR_A_B      = 5'b01010,
    OP_LOAD_MEM_B   = 5'b01011,
    OP_STORE_A_MEM  = 5'b01100,
    OP_JMP          = 5'b01101,
    OP_JMP_Z        = 5'b01110,
    OP_JMP_OV       = 5'b01111,
    OP_SET_Z        = 5'b10000,
    OP_CLEAR_Z      = 5'b10001,
    OP_SET_OV       = 5'b10010,
    OP_CLEAR_OV     = 5'b10011,
    OP_NOP          = 5'b11000,
    OP_HALT         = 5'b11001,
    OP_NEG_A        = 5'b11010,
    OP_LOAD_B_CTRL  = 5'b11011
  } opcode_e;

  // Decoded instruction, as the control logic sees it.
  typedef enum logic [4:0] {
    I_ADD_A_B, I_ADD_A_MEM, I_SUB_A_B, I_SUB_A_MEM, I_INC_A, I_DEC_A,
    I_SHIFT_A_R, I_SHIFT_A_L, I_AND_A_B, I_OR_A_B, I_XOR_A_B, I_LOAD_MEM_B,
    I_LOAD_B_CTRL, I_STORE_A_MEM, I_JMP, I_JMP_Z, I_JMP_OV, I_SET_Z, I_CLEAR_Z,
    I_SET_OV, I_CLEAR_OV, I_NOP, I_HALT, I_NEG_A
  } instr_e;

  // ALU operations. BYPASS_A is the idle operation: the accumulator keeps its value.
  typedef enum logic [3:0] {
    ALU_BYPASS_A = 4'd0,
    ALU_BYPASS_B = 4'd1,
    ALU_ADD      = 4'd2,
    ALU_SUB      = 4'd3,
    ALU_AND      = 4'd4,
    ALU_OR       = 4'd5,
    ALU_XOR      = 4'd6,
    ALU_SHR      = 4'd7,
    ALU_SHL      = 4'd8,
    ALU_NEG      = 4'd9
  } alu_op_e;

  // Select of the ALU second-operand multiplexer.
  typedef enum logic [1:0] {
    OPND_B   = 2'b00,
    OPND_CU  = 2'b01,
    OPND_MEM = 2'b10,
    OPND_ONE = 2'b11
  } opnd_sel_e;

  // Select of the multiplexer in front of register B.
  typedef enum logic [1:0] {
    BSEL_HOLD = 2'b00,
    BSEL_CU   = 2'b01,
    BSEL_MEM  = 2'b10,
    BSEL_ALU  = 2'b11
  } b_sel_e;

  // Flag request for one flag.
  typedef enum logic [1:0] {
    FL_HOLD   = 2'b00,  // keep the flag
    FL_UPDATE = 2'b01,  // load the value computed from this ALU operation
    FL_SET    = 2'b10,
    FL_CLEAR  = 2'b11
  } flag_op_e;

  // Command from the control unit to the data path.
  typedef struct packed {
    alu_op_e   alu_op;
    opnd_sel_e opnd_sel;
    b_sel_e    b_sel;
    logic      acc_we;
    flag_op_e  z_op;
    flag_op_e  ov_op;
  } dpu_cmd_t;

  localparam dpu_cmd_t DPU_IDLE = '{
    alu_op:   ALU_BYPASS_A,
    opnd_sel: OPND_B,
    b_sel:    BSEL_HOLD,
    acc_we:   1'b0,
    z_op:     FL_HOLD,
    ov_op:    FL_HOLD
  };

  // Build an instruction word (used by testbenches and program tables).
  function automatic instr_word_t mk_instr(opcode_e op, data_t data);
    return {3'b000, op, data};
  endfunction

endpackage
