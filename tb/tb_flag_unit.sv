// tb_flag_unit: drives random flag requests and operands into the flag registers and compares
// Z and OV after each clock edge with a model: Z = (result == 0), OV = the signed result of
// a + b (or a - b) lies outside -128..127, and hold/set/clear as requested.
`timescale 1ns/1ps
module tb_flag_unit;
  import cpu_pkg::*;
  logic     clk = 1'b0, rst = 1'b1;
  flag_op_e z_op, ov_op;
  logic     is_sub, z, ov;
  data_t    a, b, result;
  logic     mz, mov;
  int checks = 0, failures = 0;
  int n_ov = 0, n_z = 0;

  flag_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;
    z_op = FL_HOLD; ov_op = FL_HOLD; is_sub = 0; a = 0; b = 0; result = 0;
    mz = 0; mov = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      z_op   = flag_op_e'($urandom % 4);
      ov_op  = flag_op_e'($urandom % 4);
      is_sub = 1'($urandom);
      a      = ($urandom % 4 == 0) ? 8'h80 : 8'($urandom);
      b      = ($urandom % 4 == 0) ? 8'h7f : 8'($urandom);
      s      = is_sub ? int'($signed(a)) - int'($signed(b)) : int'($signed(a)) + int'($signed(b));
      result = ($urandom % 5 == 0) ? 8'h00 : 8'(s);
      // Model. OV is defined only when result is the true sum/difference.
      if (result == 8'(s)) begin
        case (ov_op)
          FL_UPDATE: mov = (s > 127) || (s < -128);
          FL_SET:    mov = 1;
          FL_CLEAR:  mov = 0;
          default:   ;
        endcase
      end else ov_op = FL_HOLD;
      case (z_op)
        FL_UPDATE: mz = (result == 8'h00);
        FL_SET:    mz = 1;
        FL_CLEAR:  mz = 0;
        default:   ;
      endcase
      @(posedge clk); #1;
      checks += 2;
      if (z !== mz)   begin failures++; $display("z=%b expected %b", z, mz); end
      if (ov !== mov) begin failures++; $display("ov=%b expected %b a=%h b=%h sub=%b", ov, mov, a, b, is_sub); end
      if (ov_op == FL_UPDATE && mov) n_ov++;
      if (z_op == FL_UPDATE && mz) n_z++;
    end
    if (n_ov == 0 || n_z == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
