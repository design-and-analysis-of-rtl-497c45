// tb_hilo_register: checks that a write stores the signed 64-bit product in
// hi:lo, that hi/lo hold without a write, and that reset clears them.
module tb_hilo_register;
  logic clk = 0, rst, we;
  logic [31:0] a, b, hi, lo;
  logic [63:0] exp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  hilo_register #(.WIDTH(32)) dut (.clk, .rst, .we, .a, .b, .hi, .lo);

  initial begin
    rst = 1; we = 0; a = 0; b = 0;
    @(negedge clk); rst = 0;
    exp = '0;
    for (int i = 0; i < 1000; i++) begin
      we = 1'($urandom);
      case (i % 4)
        0: begin a = $urandom; b = $urandom; end
        1: begin a = 32'hFFFF_FFF9; b = 32'd123; end     // -7 * 123
        2: begin a = 32'h8000_0000; b = 32'h8000_0000; end
        default: begin a = 32'($urandom % 100) - 50; b = 32'($urandom % 100) - 50; end
      endcase
      @(posedge clk);
      if (we) exp = 64'($signed(a)) * 64'($signed(b));
      @(negedge clk);
      checks++;
      if ({hi, lo} !== exp) begin failures++; $display("FAIL a=%h b=%h hi:lo=%h%h exp %h", a, b, hi, lo, exp); end
    end
    rst = 1; @(negedge clk); checks++;
    if (hi !== 0 || lo !== 0) begin failures++; $display("FAIL reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
