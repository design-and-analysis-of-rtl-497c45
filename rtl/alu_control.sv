// alu_control: turns the control unit's 2-bit ALU operation class, the
// function field and the opcode into the ALU operation of the EX stage.
//
// Class 00 adds, 01 subtracts, 10 follows the R-type function field and 11
// follows the immediate opcode (slti, andi, ori, xori, lui). Function codes
// with no ALU meaning (jr, mult, mfhi, mflo) give an add, whose result is
// then not used. Purely combinational; this split of decoding between the
// control unit and the ALU's own decoder is this design's choice.
module alu_control
  import mips_pkg::*;
(
  input  alu_op_t    alu_op,
  input  logic [5:0] funct,
  input  logic [5:0] opcode,
  output alu_ctrl_t  op
);

  always_comb begin
    op = ALU_ADD;
    unique case (alu_op)
      ALUOP_ADD: op = ALU_ADD;
      ALUOP_SUB: op = ALU_SUB;
      ALUOP_FUNCT: begin
        unique case (funct)
          FN_ADD, FN_ADDU: op = ALU_ADD;
          FN_SUB, FN_SUBU: op = ALU_SUB;
          FN_AND:  op = ALU_AND;
          FN_OR:   op = ALU_OR;
          FN_XOR:  op = ALU_XOR;
          FN_NOR:  op = ALU_NOR;
          FN_SLT:  op = ALU_SLT;
          FN_SLL:  op = ALU_SLL;
          FN_SRL:  op = ALU_SRL;
          default: op = ALU_ADD;
        endcase
      end
      ALUOP_IMM: begin
        unique case (opcode)
          OP_SLTI: op = ALU_SLT;
          OP_ANDI: op = ALU_AND;
          OP_ORI:  op = ALU_OR;
          OP_XORI: op = ALU_XOR;
          OP_LUI:  op = ALU_LUI;
          default: op = ALU_ADD;
        endcase
      end
      default: op = ALU_ADD;
    endcase
  end

endmodule
