// tb_cpu_top: end-to-end test of the whole CPU at its default parameters.
//
// The CPU runs its default program (rtl/demo_program.hex) from reset to HALT. The testbench
// holds its own instruction-level model of the machine, which reads the same program file and
// executes it one instruction at a time. Every instruction must take exactly four clock cycles:
// after each group of four cycles PC, ACC, B, Z and OV of the CPU are compared with the model.
// Data memory is checked through the program itself, which loads back what it stored. halted must rise in the fourth cycle
// of the HALT instruction and not earlier. The test also counts how often each mechanism of
// the design happens (every defined opcode, an undefined opcode, each conditional jump taken
// and not taken, Z and OV set by an operation, a store) and fails if one never did.
`timescale 1ns/1ps
module tb_cpu_top;
  import cpu_pkg::*;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       halted;
  addr_t      pc;
  data_t      acc, b_reg;
  logic [2:0] flags;

  int checks = 0, failures = 0;

  cpu_top dut (.*);

  always #5 clk = ~clk;

  // Watchdog.
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- instruction-level model ----------------
  logic [15:0] prog [256];
  logic [7:0]  m_dmem [256];
  logic [7:0]  m_pc, m_a, m_b;
  logic        m_z, m_ov, m_halt;

  int op_count [32];
  int jz_taken = 0, jz_not = 0, jov_taken = 0, jov_not = 0;
  int z_by_alu = 0, ov_by_alu = 0, undef_ops = 0;

  function automatic bit defined_op(logic [4:0] op);
    return (op <= 5'h13) || (op >= 5'h18 && op <= 5'h1b);
  endfunction

  task automatic model_step();
    logic [15:0] w;
    logic [4:0]  op;
    logic [7:0]  d, r;
    int          sr;
    bit          wr_a, arith;
    w  = prog[m_pc];
    op = w[12:8];
    d  = w[7:0];
    op_count[op]++;
    if (!defined_op(op)) undef_ops++;
    wr_a = 1'b0; arith = 1'b0; r = m_a; sr = 0;
    m_pc = m_pc + 8'd1;
    case (op)
      5'h00: begin sr = int'($signed(m_a)) + int'($signed(m_b));        r = m_a + m_b;        wr_a = 1; arith = 1; end
      5'h01: begin sr = int'($signed(m_a)) + int'($signed(m_dmem[d]));  r = m_a + m_dmem[d];  wr_a = 1; arith = 1; end
      5'h02: begin sr = int'($signed(m_a)) - int'($signed(m_b));        r = m_a - m_b;        wr_a = 1; arith = 1; end
      5'h03: begin sr = int'($signed(m_a)) - int'($signed(m_dmem[d]));  r = m_a - m_dmem[d];  wr_a = 1; arith = 1; end
      5'h04: begin sr = int'($signed(m_a)) + 1;                   r = m_a + 8'd1;       wr_a = 1; arith = 1; end
      5'h05: begin sr = int'($signed(m_a)) - 1;                   r = m_a - 8'd1;       wr_a = 1; arith = 1; end
      5'h06: begin r = {1'b0, m_a[7:1]}; wr_a = 1; end
      5'h07: begin r = {m_a[6:0], 1'b0}; wr_a = 1; end
      5'h08: begin r = m_a & m_b; wr_a = 1; end
      5'h09: begin r = m_a | m_b; wr_a = 1; end
      5'h0a: begin r = m_a ^ m_b; wr_a = 1; end
      5'h0b: m_b = m_dmem[d];
      5'h0c: m_dmem[d] = m_a;
      5'h0d: m_pc = d;
      5'h0e: if (m_z)  begin m_pc = d; jz_taken++;  end else jz_not++;
      5'h0f: if (m_ov) begin m_pc = d; jov_taken++; end else jov_not++;
      5'h10: m_z  = 1'b1;
      5'h11: m_z  = 1'b0;
      5'h12: m_ov = 1'b1;
      5'h13: m_ov = 1'b0;
      5'h19: begin m_halt = 1'b1; m_pc = m_pc - 8'd1; end
      5'h1a: begin r = ~m_a + 8'd1; wr_a = 1; end
      5'h1b: m_b = d;
      default: ;  // NOP and undefined opcodes
    endcase
    if (wr_a) begin
      m_a = r;
      m_z = (r == 8'd0);
      if (m_z) z_by_alu++;
      if (arith) begin
        m_ov = (sr > 127) || (sr < -128);
        if (m_ov) ov_by_alu++;
      end
    end
  endtask

  task automatic check(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("MISMATCH %s: got %0h expected %0h (model pc %0h)", what, got, exp, m_pc);
    end
  endtask

  int n_instr = 0;

  initial begin
    for (int i = 0; i < 256; i++) begin
      prog[i]   = {3'b000, 5'h18, 8'h00};
      m_dmem[i] = 8'h00;
    end
    prog[255] = {3'b000, 5'h19, 8'h00};
    $readmemh("rtl/demo_program.hex", prog);
    for (int i = 0; i < 32; i++) op_count[i] = 0;
    m_pc = 0; m_a = 0; m_b = 0; m_z = 0; m_ov = 0; m_halt = 0;

    repeat (2) @(negedge clk);
    rst = 1'b0;

    while (!m_halt && n_instr < 4000) begin
      // Sampled in the decode, execute and write-back cycles: halted only in the
      // write-back cycle of a HALT.
      for (int c = 1; c <= 3; c++) begin
        @(posedge clk); #1;
        check("halted", int'(halted), int'(c == 3 && prog[m_pc][12:8] == 5'h19));
      end
      model_step();
      n_instr++;
      @(posedge clk); #1;
      if (m_halt) begin
        // HALT stays in write-back.
        check("halted", int'(halted), 1);
      end else begin
        check("pc",    pc,    m_pc);
        check("acc",   acc,   m_a);
        check("b",     b_reg, m_b);
        check("z",     flags[FLAG_Z],  m_z);
        check("ov",    flags[FLAG_OV], m_ov);
      end
    end
    // After HALT the machine holds still.
    repeat (8) @(posedge clk);
    #1;
    check("halted stays", int'(halted), 1);
    check("pc at halt",   pc,    m_pc);
    check("acc at halt",  acc,   m_a);
    check("b at halt",    b_reg, m_b);

    // Mechanism coverage.
    for (int op = 0; op < 32; op++)
      if (defined_op(5'(op)) && op_count[op] == 0) begin
        failures++;
        $display("opcode %0h never executed", op);
      end
    if (undef_ops == 0) begin failures++; $display("no undefined opcode executed"); end
    if (jz_taken == 0 || jz_not == 0)   begin failures++; $display("Jmp_Z not taken both ways"); end
    if (jov_taken == 0 || jov_not == 0) begin failures++; $display("Jmp_OV not taken both ways"); end
    if (z_by_alu == 0)  begin failures++; $display("Z never set by an operation"); end
    if (ov_by_alu == 0) begin failures++; $display("OV never set by an operation"); end
    $display("instructions=%0d cycles=%0d jz taken/not=%0d/%0d jov taken/not=%0d/%0d z_by_alu=%0d ov_by_alu=%0d undefined=%0d",
             n_instr, 4 * n_instr, jz_taken, jz_not, jov_taken, jov_not, z_by_alu, ov_by_alu, undef_ops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
