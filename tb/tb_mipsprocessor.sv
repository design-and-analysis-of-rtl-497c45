// tb_mipsprocessor: end-to-end test of one pipelined MIPS slice.
//
// Runs the default program of the low slice twice, the second time after
// re-asserting start mid-flight, and each time compares every write-back,
// the final registers, the final data memory and the halt PC with the
// instruction-level reference model. It also checks the slice outputs
// against the pipeline state (instr_out is the ID instruction, cntrl_signals
// its ALU class, data_out the write-back value) and requires every hazard
// and forwarding mechanism to occur.
module tb_mipsprocessor;
  import mips_pkg::*;

  localparam string PROG = "rtl/imem_m1.hex";

  logic       clk = 0;
  logic       start = 1;
  pc_t        pc_in_address = '0;
  logic [1:0] cntrl_signals;
  word_t      data_out;
  instr_t     instr_out;
  pc_t        pc_out;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  mipsprocessor #(.IMEM_FILE(PROG)) dut (
    .clk, .start, .pc_in_address, .cntrl_signals, .data_out, .instr_out, .pc_out);

  slice_monitor #(.PROG(PROG)) mon (
    .clk, .start,
    .rf_we       (dut.u_rf.we),
    .rf_wa       (dut.u_rf.wa),
    .rf_wd       (dut.u_rf.wd),
    .load_use    (dut.u_hazard.load_use),
    .branch_wait (dut.u_hazard.branch_wait),
    .fwd_a       (dut.fwd_a),
    .fwd_b       (dut.fwd_b),
    .id_fwd      (dut.id_fwd_a || dut.id_fwd_b),
    .redirect    (dut.redirect),
    .stall       (dut.stall),
    .id_branch   (dut.id_ctrl.branch),
    .id_jump     (dut.id_ctrl.jump),
    .id_jr       (dut.id_ctrl.jr),
    .ex_mult     (dut.id_ex_q.ctrl.hilo_write),
    .ex_mfhilo   (dut.id_ex_q.ctrl.mfhi || dut.id_ex_q.ctrl.mflo),
    .mem_load    (dut.ex_mem_q.mem_read),
    .mem_store   (dut.ex_mem_q.mem_write)
  );

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endfunction

  // Expected ALU class of an instruction, from its opcode.
  function automatic logic [1:0] alu_class(instr_t i);
    case (i[31:26])
      6'h00:                      return 2'b10;
      6'h04, 6'h05:               return 2'b01;
      6'h0A, 6'h0C, 6'h0D, 6'h0E, 6'h0F: return 2'b11;
      default:                    return 2'b00;
    endcase
  endfunction

  // Output checks on every cycle of the run.
  always @(negedge clk) if (!start) begin
    check(instr_out == dut.if_id_q.instr, "instr_out is not the ID instruction");
    check(cntrl_signals == alu_class(instr_out), $sformatf("cntrl_signals %b for %h", cntrl_signals, instr_out));
    check(data_out == (dut.mem_wb_q.mem_to_reg ? dut.mem_wb_q.mem_data : dut.mem_wb_q.result),
          "data_out is not the write-back value");
  end

  task automatic run_program(int unsigned cycles, bit need_all);
    start = 1;
    repeat (2) @(negedge clk);
    check(pc_out == '0, "start did not load the PC");
    check(dut.u_rf.regs[5] == '0 && dut.u_rf.regs[31] == '0, "start did not clear registers");
    mon.prepare();
    start = 0;
    repeat (cycles) @(negedge clk);
    check(pc_out == mon.iss.pc, $sformatf("halt PC %0d expected %0d", pc_out, mon.iss.pc));
    mon.final_check(dut.u_rf.regs, dut.u_dmem.ram, need_all);
  endtask

  initial begin
    run_program(200, 1'b1);
    // Interrupt a second run part-way through and start again.
    start = 1; @(negedge clk);
    start = 0; repeat (17) @(negedge clk);
    for (int i = 0; i < 256; i++) dut.u_dmem.ram[i] = '0;
    run_program(200, 1'b0);
    checks += mon.checks;
    failures += mon.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + mon.checks, failures + mon.failures + 1);
    $finish;
  end

endmodule
