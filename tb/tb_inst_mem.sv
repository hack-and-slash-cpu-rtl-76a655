// tb_inst_mem: loads a short program file into the instruction memory and checks that it
// appears from address 0, that every other word reads as NOP and that the last word is HALT.
`timescale 1ns/1ps
module tb_inst_mem;
  import cpu_pkg::*;
  logic        clk = 1'b0;
  logic [7:0]  addr;
  instr_word_t data, exp;
  instr_word_t prog [5] = '{16'h1b05, 16'h0000, 16'h0c10, 16'h1900, 16'habcd};
  int checks = 0, failures = 0;

  inst_mem #(.DEPTH(256), .INIT_FILE("tb/imem_test.hex")) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      addr = 8'(i); #1;
      if (i < 5)        exp = prog[i];
      else if (i < 255) exp = 16'h1800;  // NOP
      else              exp = 16'h1900;  // HALT
      checks++;
      if (data !== exp) begin
        failures++;
        $display("addr %0d: got %h expected %h", i, data, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
