// tb_alu: checks every ALU operation on edge values and random operands
// against expected results computed in the testbench.
module tb_alu;
  import mips_pkg::*;
  logic [31:0] a, b, y, exp;
  logic [4:0]  shamt;
  alu_ctrl_t   op;
  int checks = 0, failures = 0;

  alu #(.WIDTH(32)) dut (.a, .b, .shamt, .op, .y);

  function automatic logic [31:0] model(alu_ctrl_t o, logic [31:0] x, logic [31:0] z, logic [4:0] s);
    case (o)
      ALU_ADD: return x + z;
      ALU_SUB: return x - z;
      ALU_AND: return x & z;
      ALU_OR:  return x | z;
      ALU_XOR: return x ^ z;
      ALU_NOR: return ~(x | z);
      ALU_SLT: return (x[31] != z[31]) ? {31'b0, x[31]} : {31'b0, x < z};
      ALU_SLL: return z << s;
      ALU_SRL: return z >> s;
      ALU_LUI: return {z[15:0], 16'h0};
      default: return 'x;
    endcase
  endfunction

  task automatic try(alu_ctrl_t o, logic [31:0] x, logic [31:0] z, logic [4:0] s);
    op = o; a = x; b = z; shamt = s;
    #1;
    exp = model(o, x, z, s);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h sh=%0d y=%h exp=%h", o, x, z, s, y, exp);
    end
  endtask

  initial begin
    alu_ctrl_t ops [10] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR, ALU_SLT, ALU_SLL, ALU_SRL, ALU_LUI};
    // directed
    try(ALU_ADD, 32'd5, 32'd3, 0);
    try(ALU_SUB, 32'd3, 32'd5, 0);
    try(ALU_SLT, 32'hFFFF_FFFF, 32'd1, 0);   // -1 < 1
    try(ALU_SLT, 32'd1, 32'hFFFF_FFFF, 0);
    try(ALU_SLT, 32'h8000_0000, 32'h7FFF_FFFF, 0);
    try(ALU_SLL, 0, 32'h0000_0005, 2);
    try(ALU_SRL, 0, 32'h8000_0000, 31);
    try(ALU_LUI, 0, 32'h0000_1234, 0);
    for (int i = 0; i < 2000; i++)
      try(ops[i % 10], $urandom, $urandom, 5'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
