// data_mem: the data memory, DEPTH words of WIDTH bits (256 x 8 by default, as in the
// original design).
//
// Reading is asynchronous: data_out always shows the word at addr. A write takes place on
// the rising clock edge when we (the Mem_RW signal of the control unit) is 1. The reset rst
// is asynchronous and active high, as in the original design, and clears every word to zero.
module data_mem #(
  parameter int unsigned WIDTH  = 8,
  parameter int unsigned DEPTH  = 256,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [WIDTH-1:0]  data_in,
  output logic [WIDTH-1:0]  data_out
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
    end else if (we) begin
      mem[addr] <= data_in;
    end
  end

  assign data_out = mem[addr];

endmodule
