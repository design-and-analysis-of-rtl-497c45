// tb_hazard_detection_unit: random pipeline situations; the expected stall
// is derived from the rules (load-use; branch/jr operand produced in EX;
// branch/jr operand loaded in MEM; never for $0).
module tb_hazard_detection_unit;
  import mips_pkg::*;
  logic      id_uses_rs, id_uses_rt, id_resolves, ex_reg_write, ex_mem_read, mem_mem_read, stall;
  reg_addr_t id_rs, id_rt, ex_dest, mem_dest;
  int checks = 0, failures = 0, stalls = 0;

  hazard_detection_unit dut (.id_uses_rs, .id_uses_rt, .id_resolves, .id_rs, .id_rt,
    .ex_reg_write, .ex_mem_read, .ex_dest, .mem_mem_read, .mem_dest, .stall);

  function automatic bit reads(reg_addr_t r);
    return r != 0 && ((id_uses_rs && id_rs == r) || (id_uses_rt && id_rt == r));
  endfunction

  initial begin
    for (int i = 0; i < 5000; i++) begin
      bit exp;
      id_uses_rs = 1'($urandom); id_uses_rt = 1'($urandom); id_resolves = 1'($urandom);
      id_rs = 5'($urandom % 4); id_rt = 5'($urandom % 4);
      ex_mem_read = 1'($urandom); ex_reg_write = ex_mem_read | 1'($urandom);
      mem_mem_read = 1'($urandom);
      ex_dest = 5'($urandom % 4); mem_dest = 5'($urandom % 4);
      #1;
      exp = (ex_mem_read && reads(ex_dest)) ||
            (id_resolves && ex_reg_write && reads(ex_dest)) ||
            (id_resolves && mem_mem_read && reads(mem_dest));
      checks++;
      stalls += stall;
      if (stall !== exp) begin
        failures++;
        $display("FAIL rs=%0d rt=%0d use=%b%b res=%b ex(rw=%b mr=%b d=%0d) mem(mr=%b d=%0d) stall=%b",
                 id_rs, id_rt, id_uses_rs, id_uses_rt, id_resolves, ex_reg_write, ex_mem_read, ex_dest,
                 mem_mem_read, mem_dest, stall);
      end
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no stall seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
