// control_unit: main decoder of the ID stage.
//
// From the opcode (and, for R-type instructions, the function field) it
// produces the control word that travels down the pipeline: register and
// memory write enables, operand selects, branch/jump kind, hi/lo access and
// the 2-bit ALU operation class `alu_op` (00 add, 01 subtract, 10 decided by
// the function field, 11 decided by the immediate opcode). Unknown opcodes
// decode to a no-op. Purely combinational.
// The document says the decoder steers every unit from the opcode and that
// the control unit drives an ALU-op output; the instruction subset and the
// exact control bits are this design's choices, using standard MIPS codes.
module control_unit
  import mips_pkg::*;
(
  input  logic [5:0] opcode,
  input  logic [5:0] funct,
  output ctrl_t      ctrl
);

  always_comb begin
    ctrl = '0;
    ctrl.alu_op = ALUOP_ADD;
    unique case (opcode)
      OP_RTYPE: begin
        ctrl.alu_op  = ALUOP_FUNCT;
        ctrl.reg_dst = 1'b1;
        unique case (funct)
          FN_JR:   begin ctrl.jr = 1'b1; ctrl.uses_rs = 1'b1; end
          FN_MULT: begin ctrl.hilo_write = 1'b1; ctrl.uses_rs = 1'b1; ctrl.uses_rt = 1'b1; end
          FN_MFHI: begin ctrl.mfhi = 1'b1; ctrl.reg_write = 1'b1; end
          FN_MFLO: begin ctrl.mflo = 1'b1; ctrl.reg_write = 1'b1; end
          FN_SLL, FN_SRL: begin ctrl.reg_write = 1'b1; ctrl.uses_rt = 1'b1; end
          FN_ADD, FN_ADDU, FN_SUB, FN_SUBU, FN_AND, FN_OR, FN_XOR, FN_NOR, FN_SLT: begin
            ctrl.reg_write = 1'b1; ctrl.uses_rs = 1'b1; ctrl.uses_rt = 1'b1;
          end
          default: ctrl.reg_dst = 1'b1;  // unsupported function: no-op
        endcase
      end
      OP_J:   ctrl.jump = 1'b1;
      OP_JAL: begin ctrl.jump = 1'b1; ctrl.link = 1'b1; ctrl.reg_write = 1'b1; end
      OP_BEQ: begin
        ctrl.branch = 1'b1; ctrl.alu_op = ALUOP_SUB;
        ctrl.uses_rs = 1'b1; ctrl.uses_rt = 1'b1;
      end
      OP_BNE: begin
        ctrl.branch = 1'b1; ctrl.branch_ne = 1'b1; ctrl.alu_op = ALUOP_SUB;
        ctrl.uses_rs = 1'b1; ctrl.uses_rt = 1'b1;
      end
      OP_ADDI, OP_ADDIU: begin
        ctrl.reg_write = 1'b1; ctrl.alu_src = 1'b1; ctrl.uses_rs = 1'b1;
        ctrl.alu_op = ALUOP_ADD;
      end
      OP_SLTI, OP_ANDI, OP_ORI, OP_XORI, OP_LUI: begin
        ctrl.reg_write = 1'b1; ctrl.alu_src = 1'b1; ctrl.alu_op = ALUOP_IMM;
        ctrl.uses_rs  = (opcode != OP_LUI);
        ctrl.zero_ext = (opcode == OP_ANDI) || (opcode == OP_ORI) || (opcode == OP_XORI);
      end
      OP_LW: begin
        ctrl.reg_write = 1'b1; ctrl.mem_to_reg = 1'b1; ctrl.mem_read = 1'b1;
        ctrl.alu_src = 1'b1; ctrl.uses_rs = 1'b1;
      end
      OP_SW: begin
        ctrl.mem_write = 1'b1; ctrl.alu_src = 1'b1;
        ctrl.uses_rs = 1'b1; ctrl.uses_rt = 1'b1;
      end
      default: ;  // unsupported opcode: no-op
    endcase
  end

endmodule
