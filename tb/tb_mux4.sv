// tb_mux4: checks the 4-input multiplexer with random data on every select value.
`timescale 1ns/1ps
module tb_mux4;
  logic       clk = 1'b0;
  logic [1:0] sel;
  logic [7:0] in0, in1, in2, in3, out, exp;
  int checks = 0, failures = 0;

  mux4 #(.WIDTH(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      sel = 2'(i % 4);
      in0 = 8'($urandom); in1 = 8'($urandom); in2 = 8'($urandom); in3 = 8'($urandom);
      #1;
      exp = (sel == 0) ? in0 : (sel == 1) ? in1 : (sel == 2) ? in2 : in3;
      checks++;
      if (out !== exp) begin
        failures++;
        $display("sel=%0d out=%h expected %h", sel, out, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
