// tb_program_counter: checks load on start, advance to next_pc and hold
// against a reference register kept in the testbench.
module tb_program_counter;
  import mips_pkg::*;
  logic clk = 0, start, hold;
  pc_t  load_addr, next_pc, pc, exp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  program_counter dut (.clk, .start, .load_addr, .hold, .next_pc, .pc);

  initial begin
    start = 1; hold = 0; load_addr = 32'h40; next_pc = 32'h99;
    @(negedge clk);
    exp = 32'h40;
    for (int i = 0; i < 400; i++) begin
      checks++;
      if (pc !== exp) begin failures++; $display("FAIL cycle %0d pc=%h exp=%h", i, pc, exp); end
      start = ($urandom % 16) == 0;
      hold  = ($urandom % 4) == 0;
      load_addr = $urandom;
      next_pc = pc + 1;
      @(posedge clk);
      if (start) exp = load_addr; else if (!hold) exp = next_pc;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
