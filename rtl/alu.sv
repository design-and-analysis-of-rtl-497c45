// alu: integer arithmetic and logic unit of the EX stage.
//
// Computes y = a op b for add, subtract, and, or, xor, nor, signed
// set-less-than, logical shifts of b by `shamt`, and lui (b shifted up by
// 16). Branches are compared in ID, so no zero flag is needed. Purely combinational, one cycle in EX.
// The document lists addition, subtraction and logic operations; the
// remaining operations complete the chosen MIPS subset.
module alu
  import mips_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [4:0]       shamt,
  input  alu_ctrl_t        op,
  output logic [WIDTH-1:0] y
);

  always_comb begin
    unique case (op)
      ALU_ADD: y = a + b;
      ALU_SUB: y = a - b;
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_XOR: y = a ^ b;
      ALU_NOR: y = ~(a | b);
      ALU_SLT: y = WIDTH'($signed(a) < $signed(b));
      ALU_SLL: y = b << shamt;
      ALU_SRL: y = b >> shamt;
      ALU_LUI: y = b << 16;
      default: y = a + b;
    endcase
  end

endmodule
