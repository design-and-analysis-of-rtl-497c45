// tb_instr_memory: reads the default program of the low slice through the
// ROM and compares it with the file read by the testbench itself, and
// checks that words beyond the program read as no-ops.
module tb_instr_memory;
  logic [7:0]  addr;
  logic [31:0] instr;
  logic [31:0] ref_rom [256];
  int checks = 0, failures = 0;

  instr_memory #(.DEPTH(256), .INIT_FILE("rtl/imem_m1.hex")) dut (.addr, .instr);

  initial begin
    foreach (ref_rom[i]) ref_rom[i] = '0;
    $readmemh("rtl/imem_m1.hex", ref_rom);
    // The first word of the program is addi $1,$0,5.
    addr = 0; #1; checks++;
    if (instr !== 32'h2001_0005) begin failures++; $display("FAIL word 0 = %h", instr); end
    for (int i = 0; i < 256; i++) begin
      addr = 8'(i); #1; checks++;
      if (instr !== ref_rom[i]) begin failures++; $display("FAIL word %0d = %h exp %h", i, instr, ref_rom[i]); end
    end
    addr = 8'd200; #1; checks++;
    if (instr !== '0) begin failures++; $display("FAIL word 200 not a no-op"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
