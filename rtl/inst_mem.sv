// inst_mem: the instruction memory, a read-only table of DEPTH 16-bit instructions
// (256 words by default, as in the original design).
//
// Reading is asynchronous: data always shows the instruction at addr. The contents are fixed
// at elaboration. Every word starts as NOP and the last word as HALT, so a program that runs
// off its end stops; then the program in the hex file INIT_FILE (one 16-bit word per line,
// from address 0) is loaded over it. Taking the program from a file, and the default demo
// program, are this design's choices. An empty INIT_FILE leaves only the NOP/HALT fill.
module inst_mem
  import cpu_pkg::*;
#(
  parameter int unsigned DEPTH     = 256,
  parameter int unsigned AW    = $clog2(DEPTH),
  parameter string       INIT_FILE = "rtl/demo_program.hex"
) (
  input  logic [AW-1:0] addr,
  output instr_word_t       data
);

  instr_word_t rom [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) rom[i] = mk_instr(OP_NOP, '0);
    rom[DEPTH-1] = mk_instr(OP_HALT, '0);
    if (INIT_FILE != "") $readmemh(INIT_FILE, rom);
  end

  assign data = rom[addr];

endmodule
