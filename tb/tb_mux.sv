// tb_mux: checks the 2- and 3-input multiplexers for every select value.
module tb_mux;
  logic [1:0][31:0] d2;
  logic [2:0][31:0] d3;
  logic             s2;
  logic [1:0]       s3;
  logic [31:0]      y2, y3;
  int checks = 0, failures = 0;

  mux #(.WIDTH(32), .N(2)) dut2 (.d(d2), .sel(s2), .y(y2));
  mux #(.WIDTH(32), .N(3)) dut3 (.d(d3), .sel(s3), .y(y3));

  initial begin
    for (int i = 0; i < 300; i++) begin
      d2 = {$urandom, $urandom};
      d3 = {$urandom, $urandom, $urandom};
      s2 = 1'($urandom);
      s3 = 2'(i % 3);
      #1;
      checks += 2;
      if (y2 !== (s2 ? d2[1] : d2[0])) begin failures++; $display("FAIL mux2 sel=%0d", s2); end
      if (y3 !== (s3 == 2 ? d3[2] : s3 == 1 ? d3[1] : d3[0])) begin failures++; $display("FAIL mux3 sel=%0d", s3); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
