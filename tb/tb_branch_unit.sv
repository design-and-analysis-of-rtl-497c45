// tb_branch_unit: checks taken/not-taken decisions and targets of beq, bne,
// j/jal and jr with random operands, against arithmetic in the testbench.
module tb_branch_unit;
  import mips_pkg::*;
  logic        branch, branch_ne, jump, jr, redirect;
  word_t       rs_val, rt_val, imm;
  pc_t         pc_plus1, target;
  logic [25:0] jindex;
  int checks = 0, failures = 0;

  branch_unit dut (.branch, .branch_ne, .jump, .jr, .rs_val, .rt_val, .pc_plus1, .imm, .jindex,
                   .redirect, .target);

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int kind;
      logic exp_take;
      pc_t  exp_tgt;
      logic [15:0] off;
      kind = i % 5;
      branch = (kind == 0) || (kind == 1);
      branch_ne = (kind == 1);
      jump = (kind == 2);
      jr = (kind == 3);
      rs_val = $urandom;
      rt_val = ($urandom % 2) ? rs_val : $urandom;
      off = 16'($urandom);
      imm = {{16{off[15]}}, off};
      pc_plus1 = $urandom;
      jindex = 26'($urandom);
      #1;
      case (kind)
        0: begin exp_take = (rs_val == rt_val); exp_tgt = pc_plus1 + imm; end
        1: begin exp_take = (rs_val != rt_val); exp_tgt = pc_plus1 + imm; end
        2: begin exp_take = 1; exp_tgt = {pc_plus1[31:26], jindex}; end
        3: begin exp_take = 1; exp_tgt = rs_val; end
        default: begin exp_take = 0; exp_tgt = target; end
      endcase
      checks++;
      if (redirect !== exp_take || (exp_take && target !== exp_tgt)) begin
        failures++;
        $display("FAIL kind %0d redirect=%b target=%h exp %b %h", kind, redirect, target, exp_take, exp_tgt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
