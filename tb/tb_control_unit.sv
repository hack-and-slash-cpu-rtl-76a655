// tb_control_unit: runs the control unit against a random program held in the testbench,
// with random flags, and checks every cycle: the four states in order (fetch, decode,
// execute, write-back, one cycle each), the instruction address, the command sent to the
// data path in the execute cycle, the memory address and write strobe, the data sent to the
// data path, and the next PC (PC + 1 or the jump target when the jump's flag is set). A HALT
// must keep the unit in write-back with the PC unchanged.
`timescale 1ns/1ps
module tb_control_unit;
  import cpu_pkg::*;
  logic        clk = 1'b0, rst = 1'b1;
  logic [2:0]  flags;
  instr_word_t instr_in;
  addr_t       instr_addr, mem_addr, pc_o;
  logic        mem_rw, halted;
  data_t       data_to_dpu;
  dpu_cmd_t    cmd;
  logic [1:0]  state_o;

  instr_word_t prog [256];
  int checks = 0, failures = 0, n_jump = 0, n_nojump = 0, n_store = 0;

  control_unit dut (.*);

  assign instr_in = prog[instr_addr];

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // Expected execute-cycle command, written out per opcode.
  function automatic dpu_cmd_t exp_cmd(logic [4:0] op);
    dpu_cmd_t c = DPU_IDLE;
    case (op)
      5'h00: c = '{ALU_ADD, OPND_B,   BSEL_HOLD, 1'b1, FL_UPDATE, FL_UPDATE};
      5'h01: c = '{ALU_ADD, OPND_MEM, BSEL_HOLD, 1'b1, FL_UPDATE, FL_UPDATE};
      5'h02: c = '{ALU_SUB, OPND_B,   BSEL_HOLD, 1'b1, FL_UPDATE, FL_UPDATE};
      5'h03: c = '{ALU_SUB, OPND_MEM, BSEL_HOLD, 1'b1, FL_UPDATE, FL_UPDATE};
      5'h04: c = '{ALU_ADD, OPND_ONE, BSEL_HOLD, 1'b1, FL_UPDATE, FL_UPDATE};
      5'h05: c = '{ALU_SUB, OPND_ONE, BSEL_HOLD, 1'b1, FL_UPDATE, FL_UPDATE};
      5'h06: c = '{ALU_SHR, OPND_B,   BSEL_HOLD, 1'b1, FL_UPDATE, FL_HOLD};
      5'h07: c = '{ALU_SHL, OPND_B,   BSEL_HOLD, 1'b1, FL_UPDATE, FL_HOLD};
      5'h08: c = '{ALU_AND, OPND_B,   BSEL_HOLD, 1'b1, FL_UPDATE, FL_HOLD};
      5'h09: c = '{ALU_OR,  OPND_B,   BSEL_HOLD, 1'b1, FL_UPDATE, FL_HOLD};
      5'h0a: c = '{ALU_XOR, OPND_B,   BSEL_HOLD, 1'b1, FL_UPDATE, FL_HOLD};
      5'h0b: c.b_sel = BSEL_MEM;
      5'h10: c.z_op  = FL_SET;
      5'h11: c.z_op  = FL_CLEAR;
      5'h12: c.ov_op = FL_SET;
      5'h13: c.ov_op = FL_CLEAR;
      5'h1a: c = '{ALU_NEG, OPND_B,   BSEL_HOLD, 1'b1, FL_UPDATE, FL_HOLD};
      5'h1b: c.b_sel = BSEL_CU;
      default: ;
    endcase
    return c;
  endfunction

  initial begin
    logic [7:0]  pc, npc;
    logic [4:0]  op;
    logic [7:0]  d;
    bit          is_mem_ex;
    for (int i = 0; i < 256; i++) begin
      op = 5'($urandom);
      if (op == 5'h19) op = 5'h18;           // no HALT inside the program ...
      prog[i] = {3'($urandom), op, 8'($urandom)};
    end
    prog[200] = {3'b000, 5'h19, 8'h00};      // ... except one, placed far from the start
    flags = 3'b000;
    pc = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      // After 2000 instructions the program is replaced by HALTs, so a HALT is always reached.
      if (n == 2000) foreach (prog[i]) prog[i] = {3'b000, 5'h19, 8'h00};
      // Fetch cycle.
      chk("state F", state_o, 0);
      chk("instr_addr", instr_addr, pc);
      chk("pc", pc_o, pc);
      chk("idle cmd F", cmd, DPU_IDLE);
      chk("mem_rw F", mem_rw, 0);
      op = prog[pc][12:8];
      d  = prog[pc][7:0];
      @(negedge clk);
      chk("state D", state_o, 1);
      chk("idle cmd D", cmd, DPU_IDLE);
      chk("mem_rw D", mem_rw, 0);
      flags = 3'($urandom);                  // flags the write-back will see
      @(negedge clk);
      chk("state E", state_o, 2);
      chk($sformatf("cmd op %0h", op), cmd, exp_cmd(op));
      is_mem_ex = op inside {5'h01, 5'h03, 5'h0b};
      chk("mem_addr E", mem_addr, is_mem_ex ? d : 8'h00);
      chk("data_to_dpu E", data_to_dpu, (op == 5'h1b) ? d : 8'h00);
      chk("mem_rw E", mem_rw, 0);
      @(negedge clk);
      chk("state W", state_o, 3);
      chk("idle cmd W", cmd, DPU_IDLE);
      chk("mem_rw W", mem_rw, op == 5'h0c);
      chk("mem_addr W", mem_addr, (op == 5'h0c) ? d : 8'h00);
      chk("halted W", halted, op == 5'h19);
      if (op == 5'h0c) n_store++;
      npc = pc + 8'd1;
      if (op == 5'h0d || (op == 5'h0e && flags[2]) || (op == 5'h0f && flags[0])) begin
        npc = d; n_jump++;
      end else if (op inside {5'h0e, 5'h0f}) n_nojump++;
      if (op == 5'h19) begin
        repeat (5) begin
          @(negedge clk);
          chk("halt state", state_o, 3);
          chk("halt pc", pc_o, pc);
          chk("halted", halted, 1);
        end
        break;
      end
      @(negedge clk);
      pc = npc;
    end
    if (!halted || n_jump == 0 || n_nojump == 0 || n_store == 0) begin
      failures++;
      $display("halt, jump taken/not taken or store never happened");
    end
    $display("jumps taken=%0d not=%0d stores=%0d", n_jump, n_nojump, n_store);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
