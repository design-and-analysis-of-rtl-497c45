// data_memory: the data RAM reached by loads and stores in the MEM stage.
//
// DEPTH words of WIDTH bits, word addressed (only the low log2(DEPTH) bits of
// the address are used). Reads are asynchronous, so a load's data is available in the same
// MEM cycle; writes happen on the rising clock edge when `we` is set. The
// contents start at zero. Size and word addressing are this design's
// choices: the document names only a RAM.
module data_memory #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    addr,   // low bits of the word address
  input  logic [WIDTH-1:0] wd,
  output logic [WIDTH-1:0] rd
);

  logic [WIDTH-1:0] ram [DEPTH];

  initial for (int i = 0; i < DEPTH; i++) ram[i] = '0;

  always_ff @(posedge clk)
    if (we) ram[addr] <= wd;

  assign rd = ram[addr];

endmodule
