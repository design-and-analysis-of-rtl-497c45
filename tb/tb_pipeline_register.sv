// tb_pipeline_register: checks capture, hold (stall), clear (bubble) and
// reset priority of a pipeline register against a reference model.
module tb_pipeline_register;
  logic clk = 0, rst, clear, hold;
  logic [63:0] d, q, exp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  pipeline_register #(.WIDTH(64)) dut (.clk, .rst, .clear, .hold, .d, .q);

  initial begin
    rst = 1; clear = 0; hold = 0; d = '1;
    @(negedge clk);
    exp = '0;
    for (int i = 0; i < 500; i++) begin
      checks++;
      if (q !== exp) begin failures++; $display("FAIL cycle %0d q=%h exp=%h", i, q, exp); end
      rst   = ($urandom % 20) == 0;
      clear = ($urandom % 6) == 0;
      hold  = ($urandom % 3) == 0;
      d     = {$urandom, $urandom};
      @(posedge clk);
      if (rst || clear) exp = '0; else if (!hold) exp = d;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
