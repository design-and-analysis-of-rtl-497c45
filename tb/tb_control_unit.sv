// tb_control_unit: checks the control word of every supported instruction
// against an expected table written out in the testbench, and that unknown
// opcodes and function codes write nothing.
module tb_control_unit;
  import mips_pkg::*;
  logic [5:0] opcode, funct;
  ctrl_t      ctrl;
  int checks = 0, failures = 0;

  control_unit dut (.opcode, .funct, .ctrl);

  // Expected: {reg_write, mem_to_reg, mem_read, mem_write, alu_src, reg_dst,
  //            zero_ext, branch, branch_ne, jump, link, jr, hilo_write,
  //            mfhi, mflo, uses_rs, uses_rt}, alu_op
  task automatic try(string name, logic [5:0] op, logic [5:0] fn, logic [16:0] bits, logic [1:0] aop,
                     bit check_dst = 1);
    logic [16:0] got;
    opcode = op; funct = fn; #1;
    got = {ctrl.reg_write, ctrl.mem_to_reg, ctrl.mem_read, ctrl.mem_write, ctrl.alu_src,
           check_dst ? ctrl.reg_dst : bits[11], ctrl.zero_ext, ctrl.branch, ctrl.branch_ne,
           ctrl.jump, ctrl.link, ctrl.jr, ctrl.hilo_write, ctrl.mfhi, ctrl.mflo,
           ctrl.uses_rs, ctrl.uses_rt};
    checks++;
    if (got !== bits || ctrl.alu_op !== aop) begin
      failures++;
      $display("FAIL %s: got %b/%b expected %b/%b", name, got, ctrl.alu_op, bits, aop);
    end
  endtask

  initial begin
    //                                   rw m2r mr mw as rd ze br bn j  l  jr hw hi lo rs rt
    try("add",  6'h00, 6'h20, 17'b1_0_0_0_0_1_0_0_0_0_0_0_0_0_0_1_1, 2'b10);
    try("sub",  6'h00, 6'h22, 17'b1_0_0_0_0_1_0_0_0_0_0_0_0_0_0_1_1, 2'b10);
    try("slt",  6'h00, 6'h2A, 17'b1_0_0_0_0_1_0_0_0_0_0_0_0_0_0_1_1, 2'b10);
    try("nor",  6'h00, 6'h27, 17'b1_0_0_0_0_1_0_0_0_0_0_0_0_0_0_1_1, 2'b10);
    try("sll",  6'h00, 6'h00, 17'b1_0_0_0_0_1_0_0_0_0_0_0_0_0_0_0_1, 2'b10);
    try("jr",   6'h00, 6'h08, 17'b0_0_0_0_0_1_0_0_0_0_0_1_0_0_0_1_0, 2'b10, 0);
    try("mult", 6'h00, 6'h18, 17'b0_0_0_0_0_1_0_0_0_0_0_0_1_0_0_1_1, 2'b10, 0);
    try("mfhi", 6'h00, 6'h10, 17'b1_0_0_0_0_1_0_0_0_0_0_0_0_1_0_0_0, 2'b10);
    try("mflo", 6'h00, 6'h12, 17'b1_0_0_0_0_1_0_0_0_0_0_0_0_0_1_0_0, 2'b10);
    try("lw",   6'h23, 6'h00, 17'b1_1_1_0_1_0_0_0_0_0_0_0_0_0_0_1_0, 2'b00);
    try("sw",   6'h2B, 6'h00, 17'b0_0_0_1_1_0_0_0_0_0_0_0_0_0_0_1_1, 2'b00);
    try("beq",  6'h04, 6'h00, 17'b0_0_0_0_0_0_0_1_0_0_0_0_0_0_0_1_1, 2'b01);
    try("bne",  6'h05, 6'h00, 17'b0_0_0_0_0_0_0_1_1_0_0_0_0_0_0_1_1, 2'b01);
    try("addi", 6'h08, 6'h00, 17'b1_0_0_0_1_0_0_0_0_0_0_0_0_0_0_1_0, 2'b00);
    try("slti", 6'h0A, 6'h00, 17'b1_0_0_0_1_0_0_0_0_0_0_0_0_0_0_1_0, 2'b11);
    try("andi", 6'h0C, 6'h00, 17'b1_0_0_0_1_0_1_0_0_0_0_0_0_0_0_1_0, 2'b11);
    try("ori",  6'h0D, 6'h00, 17'b1_0_0_0_1_0_1_0_0_0_0_0_0_0_0_1_0, 2'b11);
    try("xori", 6'h0E, 6'h00, 17'b1_0_0_0_1_0_1_0_0_0_0_0_0_0_0_1_0, 2'b11);
    try("lui",  6'h0F, 6'h00, 17'b1_0_0_0_1_0_0_0_0_0_0_0_0_0_0_0_0, 2'b11);
    try("j",    6'h02, 6'h00, 17'b0_0_0_0_0_0_0_0_0_1_0_0_0_0_0_0_0, 2'b00);
    try("jal",  6'h03, 6'h00, 17'b1_0_0_0_0_0_0_0_0_1_1_0_0_0_0_0_0, 2'b00);
    // Unknown opcodes and function codes must not write anything.
    for (int op = 0; op < 64; op++) begin
      if (op inside {6'h00, 6'h02, 6'h03, 6'h04, 6'h05, 6'h08, 6'h09, 6'h0A, 6'h0C, 6'h0D,
                     6'h0E, 6'h0F, 6'h23, 6'h2B}) continue;
      opcode = 6'(op); funct = 6'($urandom); #1; checks++;
      if (ctrl.reg_write || ctrl.mem_write || ctrl.branch || ctrl.jump) begin
        failures++; $display("FAIL opcode %h is not a no-op", op);
      end
    end
    opcode = 6'h00; funct = 6'h3F; #1; checks++;
    if (ctrl.reg_write || ctrl.jr || ctrl.hilo_write) begin failures++; $display("FAIL funct 3F"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
