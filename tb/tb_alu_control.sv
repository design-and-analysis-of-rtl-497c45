// tb_alu_control: checks the ALU operation chosen for each ALU class,
// function code and immediate opcode against a table in the testbench.
module tb_alu_control;
  import mips_pkg::*;
  alu_op_t    alu_op;
  logic [5:0] funct, opcode;
  alu_ctrl_t  op;
  int checks = 0, failures = 0;

  alu_control dut (.alu_op, .funct, .opcode, .op);

  task automatic try(alu_op_t c, logic [5:0] fn, logic [5:0] opc, alu_ctrl_t exp);
    alu_op = c; funct = fn; opcode = opc; #1;
    checks++;
    if (op !== exp) begin
      failures++;
      $display("FAIL class %b funct %h opcode %h: op %0d expected %0d", c, fn, opc, op, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 64; i++) begin
      try(ALUOP_ADD, 6'(i), 6'($urandom), ALU_ADD);
      try(ALUOP_SUB, 6'(i), 6'($urandom), ALU_SUB);
    end
    try(ALUOP_FUNCT, 6'h20, 0, ALU_ADD); try(ALUOP_FUNCT, 6'h21, 0, ALU_ADD);
    try(ALUOP_FUNCT, 6'h22, 0, ALU_SUB); try(ALUOP_FUNCT, 6'h23, 0, ALU_SUB);
    try(ALUOP_FUNCT, 6'h24, 0, ALU_AND); try(ALUOP_FUNCT, 6'h25, 0, ALU_OR);
    try(ALUOP_FUNCT, 6'h26, 0, ALU_XOR); try(ALUOP_FUNCT, 6'h27, 0, ALU_NOR);
    try(ALUOP_FUNCT, 6'h2A, 0, ALU_SLT); try(ALUOP_FUNCT, 6'h00, 0, ALU_SLL);
    try(ALUOP_FUNCT, 6'h02, 0, ALU_SRL); try(ALUOP_FUNCT, 6'h18, 0, ALU_ADD);
    try(ALUOP_IMM, 0, 6'h0A, ALU_SLT); try(ALUOP_IMM, 0, 6'h0C, ALU_AND);
    try(ALUOP_IMM, 0, 6'h0D, ALU_OR);  try(ALUOP_IMM, 0, 6'h0E, ALU_XOR);
    try(ALUOP_IMM, 0, 6'h0F, ALU_LUI);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
