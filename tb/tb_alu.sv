// tb_alu: checks every ALU operation on edge-case and random operands against results
// computed bit by bit in the testbench (subtraction as a + ~b + 1, negation as ~a + 1,
// shifts as bit concatenations).
`timescale 1ns/1ps
module tb_alu;
  import cpu_pkg::*;
  logic    clk = 1'b0;
  alu_op_e op;
  data_t   a, b, result, exp;
  int checks = 0, failures = 0;

  alu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic data_t ref_alu(alu_op_e o, data_t x, data_t y);
    case (o)
      ALU_BYPASS_A: return x;
      ALU_BYPASS_B: return y;
      ALU_ADD:      return 8'(9'(x) + 9'(y));
      ALU_SUB:      return 8'(9'(x) + 9'({1'b0, ~y}) + 9'd1);
      ALU_AND:      return x & y;
      ALU_OR:       return x | y;
      ALU_XOR:      return x ^ y;
      ALU_SHR:      return {1'b0, x[7:1]};
      ALU_SHL:      return {x[6:0], 1'b0};
      ALU_NEG:      return ~x + 8'd1;
      default:      return 8'h00;
    endcase
  endfunction

  alu_op_e ops [10] = '{ALU_BYPASS_A, ALU_BYPASS_B, ALU_ADD, ALU_SUB, ALU_AND, ALU_OR,
                        ALU_XOR, ALU_SHR, ALU_SHL, ALU_NEG};
  data_t   edge_v [6] = '{8'h00, 8'h01, 8'h7f, 8'h80, 8'hff, 8'h55};

  task automatic try_one(alu_op_e o, data_t x, data_t y);
    @(negedge clk);
    op = o; a = x; b = y;
    #1;
    exp = ref_alu(o, x, y);
    checks++;
    if (result !== exp) begin
      failures++;
      $display("op=%0d a=%h b=%h result=%h expected %h", o, x, y, result, exp);
    end
  endtask

  initial begin
    foreach (ops[k])
      foreach (edge_v[i])
        foreach (edge_v[j]) try_one(ops[k], edge_v[i], edge_v[j]);
    repeat (2000) try_one(ops[$urandom % 10], 8'($urandom), 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
