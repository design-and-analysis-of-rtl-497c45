// tb_mips64: end-to-end test of the 64-bit machine at its default sizes.
//
// Both slices run their default programs from start at address 0. Each
// slice's write-back stream, final registers, final data memory and halt
// PC are compared with the instruction-level reference model, every hazard
// and forwarding mechanism must occur in each slice, and on every cycle the
// 64-bit top-level buses must be the two slices' buses side by side (m1
// low, m2 high), with cntrl_signals holding each slice's ALU class. The
// two slices must complete instructions in the same cycle at least once.
module tb_mips64;

  logic        clk = 0;
  logic        start = 1;
  logic [63:0] pc_in_address = '0;
  logic [3:0]  cntrl_signals;
  logic [63:0] data_out, instr_out, pc_out;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  mips64 dut (.clk, .start, .pc_in_address, .cntrl_signals, .data_out, .instr_out, .pc_out);

  slice_monitor #(.PROG("rtl/imem_m1.hex")) mon1 (
    .clk, .start,
    .rf_we       (dut.m1.u_rf.we),
    .rf_wa       (dut.m1.u_rf.wa),
    .rf_wd       (dut.m1.u_rf.wd),
    .load_use    (dut.m1.u_hazard.load_use),
    .branch_wait (dut.m1.u_hazard.branch_wait),
    .fwd_a       (dut.m1.fwd_a),
    .fwd_b       (dut.m1.fwd_b),
    .id_fwd      (dut.m1.id_fwd_a || dut.m1.id_fwd_b),
    .redirect    (dut.m1.redirect),
    .stall       (dut.m1.stall),
    .id_branch   (dut.m1.id_ctrl.branch),
    .id_jump     (dut.m1.id_ctrl.jump),
    .id_jr       (dut.m1.id_ctrl.jr),
    .ex_mult     (dut.m1.id_ex_q.ctrl.hilo_write),
    .ex_mfhilo   (dut.m1.id_ex_q.ctrl.mfhi || dut.m1.id_ex_q.ctrl.mflo),
    .mem_load    (dut.m1.ex_mem_q.mem_read),
    .mem_store   (dut.m1.ex_mem_q.mem_write)
  );

  slice_monitor #(.PROG("rtl/imem_m2.hex")) mon2 (
    .clk, .start,
    .rf_we       (dut.m2.u_rf.we),
    .rf_wa       (dut.m2.u_rf.wa),
    .rf_wd       (dut.m2.u_rf.wd),
    .load_use    (dut.m2.u_hazard.load_use),
    .branch_wait (dut.m2.u_hazard.branch_wait),
    .fwd_a       (dut.m2.fwd_a),
    .fwd_b       (dut.m2.fwd_b),
    .id_fwd      (dut.m2.id_fwd_a || dut.m2.id_fwd_b),
    .redirect    (dut.m2.redirect),
    .stall       (dut.m2.stall),
    .id_branch   (dut.m2.id_ctrl.branch),
    .id_jump     (dut.m2.id_ctrl.jump),
    .id_jr       (dut.m2.id_ctrl.jr),
    .ex_mult     (dut.m2.id_ex_q.ctrl.hilo_write),
    .ex_mfhilo   (dut.m2.id_ex_q.ctrl.mfhi || dut.m2.id_ex_q.ctrl.mflo),
    .mem_load    (dut.m2.ex_mem_q.mem_read),
    .mem_store   (dut.m2.ex_mem_q.mem_write)
  );

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endfunction

  function automatic logic [1:0] alu_class(logic [31:0] i);
    case (i[31:26])
      6'h00:                             return 2'b10;
      6'h04, 6'h05:                      return 2'b01;
      6'h0A, 6'h0C, 6'h0D, 6'h0E, 6'h0F: return 2'b11;
      default:                           return 2'b00;
    endcase
  endfunction

  // Cycles in which both slices complete an instruction.
  int dual = 0;
  always @(negedge clk)
    if (!start && dut.m1.u_rf.we && dut.m1.u_rf.wa != 0 && dut.m2.u_rf.we && dut.m2.u_rf.wa != 0) dual++;

  always @(negedge clk) if (!start) begin
    check(pc_out == {dut.m2.pc, dut.m1.pc}, "pc_out is not {m2, m1} PC");
    check(instr_out == {dut.m2.if_id_q.instr, dut.m1.if_id_q.instr}, "instr_out is not {m2, m1} ID instruction");
    check(data_out == {dut.m2.u_rf.wd, dut.m1.u_rf.wd}, "data_out is not {m2, m1} write-back value");
    check(cntrl_signals == {alu_class(instr_out[63:32]), alu_class(instr_out[31:0])},
          $sformatf("cntrl_signals %b for %h", cntrl_signals, instr_out));
  end

  initial begin
    repeat (2) @(negedge clk);
    check(pc_out == 64'h0, "start did not load both PCs");
    start = 0;
    repeat (250) @(negedge clk);
    check(pc_out[31:0] == mon1.iss.pc && pc_out[63:32] == mon2.iss.pc,
          $sformatf("halt PCs %h, expected %0d and %0d", pc_out, mon2.iss.pc, mon1.iss.pc));
    check(dual > 0, "the two slices never completed instructions in the same cycle");
    $display("  cycles with two write-backs: %0d", dual);
    mon1.final_check(dut.m1.u_rf.regs, dut.m1.u_dmem.ram, 1'b1);
    mon2.final_check(dut.m2.u_rf.regs, dut.m2.u_dmem.ram, 1'b1);
    checks += mon1.checks + mon2.checks;
    failures += mon1.failures + mon2.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
