// sign_extend: widens the 16-bit immediate of an I-type instruction to the
// data width.
//
// Normally the immediate is sign-extended (addi, slti, loads, stores and
// branch offsets). For the logical immediates (andi, ori, xori) `zero_ext`
// selects zero extension instead, as MIPS defines them. Purely
// combinational.
module sign_extend #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [15:0]      imm,
  input  logic             zero_ext,
  output logic [WIDTH-1:0] ext
);

  always_comb begin
    if (zero_ext) ext = {{(WIDTH-16){1'b0}}, imm};
    else          ext = {{(WIDTH-16){imm[15]}}, imm};
  end

endmodule
