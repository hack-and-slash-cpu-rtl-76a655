// tb_data_mem: writes random words to random addresses of the 256 x 8 data memory, reads them
// back (asynchronously, in the same cycle as the address), checks that a disabled write
// changes nothing and that reset clears every word.
`timescale 1ns/1ps
module tb_data_mem;
  logic       clk = 1'b0, rst = 1'b1, we = 1'b0;
  logic [7:0] addr = '0, data_in = '0, data_out;
  logic [7:0] model [256];
  int checks = 0, failures = 0;

  data_mem #(.WIDTH(8), .DEPTH(256)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_check(logic [7:0] ad);
    @(negedge clk);
    we = 0; addr = ad; #1;
    checks++;
    if (data_out !== model[ad]) begin
      failures++;
      $display("addr %h: got %h expected %h", ad, data_out, model[ad]);
    end
  endtask

  initial begin
    foreach (model[i]) model[i] = 8'h00;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 256; i++) read_check(8'(i));
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      addr = 8'($urandom); data_in = 8'($urandom); we = 1'($urandom);
      if (we) model[addr] = data_in;
      @(posedge clk);
      read_check(8'($urandom));
    end
    for (int i = 0; i < 256; i++) read_check(8'(i));
    @(negedge clk); rst = 1; @(negedge clk); rst = 0;
    foreach (model[i]) model[i] = 8'h00;
    for (int i = 0; i < 256; i++) read_check(8'(i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
