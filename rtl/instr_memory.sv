// instr_memory: instruction ROM of one MIPS slice.
//
// DEPTH words of 32 bits, read asynchronously: the instruction at word
// address `addr` (the low
// log2(DEPTH) bits of the PC) appears on `instr` in the same cycle, so the
// fetch stage needs one cycle per instruction. Words not named in INIT_FILE
// read as 0, which is the MIPS no-op (sll $0,$0,0). The contents come from
// a hexadecimal file, one instruction per line, read at elaboration.
// The document calls this block the ROM of the fetch stage; its size and
// the file format are this design's choices.
module instr_memory
  import mips_pkg::*;
#(
  parameter int unsigned DEPTH     = 256,
  parameter string       INIT_FILE = "rtl/imem_m1.hex",
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic [AW-1:0] addr,   // low bits of the PC
  output instr_t        instr
);

  instr_t rom [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) rom[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, rom);
  end

  assign instr = rom[addr];

endmodule
