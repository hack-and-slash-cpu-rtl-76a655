// tb_instr_decoder: applies all 32 opcodes and compares the decoded instruction with the
// opcode table written out in the testbench; undefined opcodes must decode as NOP.
`timescale 1ns/1ps
module tb_instr_decoder;
  import cpu_pkg::*;
  logic       clk = 1'b0;
  logic [4:0] opcode;
  instr_e     instr, exp;
  instr_e     table_ [32];
  int checks = 0, failures = 0;

  instr_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (table_[i]) table_[i] = I_NOP;
    table_[0]  = I_ADD_A_B;     table_[1]  = I_ADD_A_MEM;  table_[2]  = I_SUB_A_B;
    table_[3]  = I_SUB_A_MEM;   table_[4]  = I_INC_A;      table_[5]  = I_DEC_A;
    table_[6]  = I_SHIFT_A_R;   table_[7]  = I_SHIFT_A_L;  table_[8]  = I_AND_A_B;
    table_[9]  = I_OR_A_B;      table_[10] = I_XOR_A_B;    table_[11] = I_LOAD_MEM_B;
    table_[12] = I_STORE_A_MEM; table_[13] = I_JMP;        table_[14] = I_JMP_Z;
    table_[15] = I_JMP_OV;      table_[16] = I_SET_Z;      table_[17] = I_CLEAR_Z;
    table_[18] = I_SET_OV;      table_[19] = I_CLEAR_OV;   table_[24] = I_NOP;
    table_[25] = I_HALT;        table_[26] = I_NEG_A;      table_[27] = I_LOAD_B_CTRL;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      opcode = 5'(i); #1;
      exp = table_[i];
      checks++;
      if (instr !== exp) begin
        failures++;
        $display("opcode %b: got %0d expected %0d", opcode, instr, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
