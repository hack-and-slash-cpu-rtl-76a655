// tb_dpu: drives random commands and data into the data path and compares ACC, B and the
// flags after every clock edge with a register-level model kept in the testbench. Every ALU
// operation, every operand source (B, control unit, memory, constant 1) and every B source
// is exercised; the test fails if an overflow or a zero result was never produced.
`timescale 1ns/1ps
module tb_dpu;
  import cpu_pkg::*;
  logic       clk = 1'b0, rst = 1'b1;
  dpu_cmd_t   cmd;
  data_t      data_cu, data_mem, acc, b;
  logic [2:0] flags;
  logic [7:0] m_acc, m_b;
  logic       m_z, m_ov;
  int checks = 0, failures = 0, n_ov = 0, n_z = 0;

  dpu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] opnd, r;
    int s;
    cmd = DPU_IDLE; data_cu = 0; data_mem = 0;
    m_acc = 0; m_b = 0; m_z = 0; m_ov = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      cmd.alu_op   = alu_op_e'($urandom % 10);
      cmd.opnd_sel = opnd_sel_e'($urandom % 4);
      cmd.b_sel    = b_sel_e'($urandom % 4);
      cmd.acc_we   = ($urandom % 4) != 0;
      cmd.z_op     = flag_op_e'($urandom % 4);
      cmd.ov_op    = flag_op_e'($urandom % 4);
      if (cmd.ov_op == FL_UPDATE && !(cmd.alu_op inside {ALU_ADD, ALU_SUB})) cmd.ov_op = FL_HOLD;
      data_cu  = ($urandom % 3 == 0) ? 8'h80 : 8'($urandom);
      data_mem = ($urandom % 3 == 0) ? m_acc : 8'($urandom);
      // Model.
      case (cmd.opnd_sel)
        OPND_B:   opnd = m_b;
        OPND_CU:  opnd = data_cu;
        OPND_MEM: opnd = data_mem;
        default:  opnd = 8'd1;
      endcase
      s = 0;
      case (cmd.alu_op)
        ALU_BYPASS_A: r = m_acc;
        ALU_BYPASS_B: r = opnd;
        ALU_ADD: begin r = m_acc + opnd; s = int'($signed(m_acc)) + int'($signed(opnd)); end
        ALU_SUB: begin r = m_acc - opnd; s = int'($signed(m_acc)) - int'($signed(opnd)); end
        ALU_AND: r = m_acc & opnd;
        ALU_OR:  r = m_acc | opnd;
        ALU_XOR: r = m_acc ^ opnd;
        ALU_SHR: r = m_acc >> 1;
        ALU_SHL: r = m_acc << 1;
        default: r = -m_acc;
      endcase
      case (cmd.z_op)
        FL_UPDATE: begin m_z = (r == 0); if (m_z) n_z++; end
        FL_SET:    m_z = 1;
        FL_CLEAR:  m_z = 0;
        default:   ;
      endcase
      case (cmd.ov_op)
        FL_UPDATE: begin m_ov = (s > 127) || (s < -128); if (m_ov) n_ov++; end
        FL_SET:    m_ov = 1;
        FL_CLEAR:  m_ov = 0;
        default:   ;
      endcase
      case (cmd.b_sel)
        BSEL_HOLD: ;
        BSEL_CU:   m_b = data_cu;
        BSEL_MEM:  m_b = data_mem;
        default:   m_b = r;
      endcase
      if (cmd.acc_we) m_acc = r;
      @(posedge clk); #1;
      checks += 4;
      if (acc !== m_acc)            begin failures++; $display("%0d acc %h exp %h", i, acc, m_acc); end
      if (b !== m_b)                begin failures++; $display("%0d b %h exp %h", i, b, m_b); end
      if (flags[FLAG_Z] !== m_z)    begin failures++; $display("%0d z %b exp %b", i, flags[FLAG_Z], m_z); end
      if (flags[FLAG_OV] !== m_ov)  begin failures++; $display("%0d ov %b exp %b", i, flags[FLAG_OV], m_ov); end
    end
    if (n_ov == 0 || n_z == 0) begin failures++; $display("overflow or zero never produced"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
