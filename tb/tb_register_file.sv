// tb_register_file: random reads and writes against a reference array;
// checks that $0 stays zero, that a same-cycle read returns the value being
// written, and that reset clears all registers.
module tb_register_file;
  logic clk = 0, rst, we;
  logic [4:0]  ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  register_file #(.WIDTH(32), .NREGS(32)) dut (.clk, .rst, .ra1, .ra2, .rd1, .rd2, .we, .wa, .wd);

  function automatic logic [31:0] expect_rd(logic [4:0] ra);
    if (ra == 0) return '0;
    if (we && wa == ra) return wd;
    return model[ra];
  endfunction

  initial begin
    rst = 1; we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    foreach (model[i]) model[i] = '0;
    @(negedge clk);
    rst = 0;
    for (int i = 0; i < 2000; i++) begin
      we = 1'($urandom); wa = 5'($urandom); wd = $urandom;
      ra1 = 5'($urandom); ra2 = (i % 4 == 0) ? wa : 5'($urandom);
      #1;
      checks += 2;
      if (rd1 !== expect_rd(ra1)) begin failures++; $display("FAIL rd1 r%0d=%h exp %h", ra1, rd1, expect_rd(ra1)); end
      if (rd2 !== expect_rd(ra2)) begin failures++; $display("FAIL rd2 r%0d=%h exp %h", ra2, rd2, expect_rd(ra2)); end
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
      @(negedge clk);
    end
    rst = 1; we = 0; @(negedge clk); rst = 0;
    for (int r = 0; r < 32; r++) begin
      ra1 = 5'(r); #1; checks++;
      if (rd1 !== '0) begin failures++; $display("FAIL r%0d not cleared", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
