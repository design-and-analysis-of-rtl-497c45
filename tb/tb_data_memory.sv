// tb_data_memory: random stores and loads against a reference array;
// checks the zero initial contents and same-cycle (asynchronous) reads.
module tb_data_memory;
  localparam int DEPTH = 256;
  logic clk = 0, we;
  logic [7:0]  addr;
  logic [31:0] wd, rd;
  logic [31:0] model [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  data_memory #(.WIDTH(32), .DEPTH(DEPTH)) dut (.clk, .we, .addr, .wd, .rd);

  initial begin
    foreach (model[i]) model[i] = '0;
    we = 0; wd = 0; addr = 0;
    for (int i = 0; i < DEPTH; i += 17) begin
      addr = 8'(i); #1; checks++;
      if (rd !== '0) begin failures++; $display("FAIL initial mem[%0d]=%h", i, rd); end
    end
    @(negedge clk);
    for (int i = 0; i < 2000; i++) begin
      we = 1'($urandom); addr = 8'($urandom % 32); wd = $urandom;
      #1; checks++;
      if (rd !== model[addr]) begin failures++; $display("FAIL mem[%0d]=%h exp %h", addr, rd, model[addr]); end
      @(posedge clk);
      if (we) model[addr] = wd;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
