// register_file: the 32 general registers $0..$31 of one MIPS slice.
//
// Two asynchronous read ports (rs, rt) serve the decode stage and one write
// port, clocked on the rising edge, serves write-back. $0 always reads 0
// and ignores writes. A read of the register being written in the same
// cycle returns the new value (write-before-read), so an instruction in
// decode sees the result of the instruction in write-back three stages
// ahead without a separate bypass. `rst` clears all registers.
module register_file #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned NREGS = 32,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [AW-1:0]    ra1,
  input  logic [AW-1:0]    ra2,
  output logic [WIDTH-1:0] rd1,
  output logic [WIDTH-1:0] rd2,
  input  logic             we,
  input  logic [AW-1:0]    wa,
  input  logic [WIDTH-1:0] wd
);

  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  always_comb begin
    if (ra1 == '0)                 rd1 = '0;
    else if (we && wa == ra1)      rd1 = wd;
    else                           rd1 = regs[ra1];
    if (ra2 == '0)                 rd2 = '0;
    else if (we && wa == ra2)      rd2 = wd;
    else                           rd2 = regs[ra2];
  end

endmodule
