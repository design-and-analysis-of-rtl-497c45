// tb_sign_extend: checks sign and zero extension of 16-bit immediates.
module tb_sign_extend;
  logic [15:0] imm;
  logic        zero_ext;
  logic [31:0] ext;
  int checks = 0, failures = 0;

  sign_extend #(.WIDTH(32)) dut (.imm, .zero_ext, .ext);

  task automatic try(logic [15:0] v, logic z);
    logic [31:0] exp;
    imm = v; zero_ext = z; #1;
    exp = z ? {16'h0000, v} : (v[15] ? {16'hFFFF, v} : {16'h0000, v});
    checks++;
    if (ext !== exp) begin failures++; $display("FAIL imm=%h z=%b ext=%h exp=%h", v, z, ext, exp); end
  endtask

  initial begin
    try(16'h0000, 0); try(16'hFFFF, 0); try(16'h8000, 0); try(16'h7FFF, 0);
    try(16'hFFFF, 1); try(16'h8000, 1);
    for (int i = 0; i < 500; i++) try(16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
