// mux4: four-input multiplexer with a 2-bit select.
//
// The data path uses two of these: one chooses what is loaded into register B, the other
// chooses the ALU's second operand. Select 2'b00 passes in0, 2'b01 in1, 2'b10 in2 and
// 2'b11 in3. Purely combinational. The four-input, two-bit-select structure follows the
// original design; the width parameter is this design's addition.
module mux4 #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [1:0]       sel,
  input  logic [WIDTH-1:0] in0,
  input  logic [WIDTH-1:0] in1,
  input  logic [WIDTH-1:0] in2,
  input  logic [WIDTH-1:0] in3,
  output logic [WIDTH-1:0] out
);

  always_comb begin
    unique case (sel)
      2'b00:   out = in0;
      2'b01:   out = in1;
      2'b10:   out = in2;
      default: out = in3;
    endcase
  end

endmodule
