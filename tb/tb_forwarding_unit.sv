// tb_forwarding_unit: random register numbers and write enables; checks
// that EX operands prefer EX/MEM over MEM/WB, never forward $0, and that
// ID branch operands forward only non-load EX/MEM results.
module tb_forwarding_unit;
  import mips_pkg::*;
  reg_addr_t ex_rs, ex_rt, id_rs, id_rt, exm_dest, wb_dest;
  logic      exm_reg_write, exm_mem_to_reg, wb_reg_write, id_fwd_a, id_fwd_b;
  fwd_sel_t  fwd_a, fwd_b;
  int checks = 0, failures = 0;

  forwarding_unit dut (.ex_rs, .ex_rt, .id_rs, .id_rt, .exm_reg_write, .exm_mem_to_reg, .exm_dest,
    .wb_reg_write, .wb_dest, .fwd_a, .fwd_b, .id_fwd_a, .id_fwd_b);

  function automatic logic [1:0] exp_sel(reg_addr_t r);
    if (r == 0) return 2'b00;
    if (exm_reg_write && exm_dest == r) return 2'b10;
    if (wb_reg_write && wb_dest == r) return 2'b01;
    return 2'b00;
  endfunction

  initial begin
    for (int i = 0; i < 5000; i++) begin
      ex_rs = 5'($urandom % 4); ex_rt = 5'($urandom % 4);
      id_rs = 5'($urandom % 4); id_rt = 5'($urandom % 4);
      exm_dest = 5'($urandom % 4); wb_dest = 5'($urandom % 4);
      exm_reg_write = 1'($urandom); exm_mem_to_reg = 1'($urandom); wb_reg_write = 1'($urandom);
      #1;
      checks += 4;
      if (fwd_a !== exp_sel(ex_rs)) begin failures++; $display("FAIL fwd_a"); end
      if (fwd_b !== exp_sel(ex_rt)) begin failures++; $display("FAIL fwd_b"); end
      if (id_fwd_a !== (exp_sel(id_rs) == 2'b10 && !exm_mem_to_reg)) begin failures++; $display("FAIL id_fwd_a"); end
      if (id_fwd_b !== (exp_sel(id_rt) == 2'b10 && !exm_mem_to_reg)) begin failures++; $display("FAIL id_fwd_b"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
