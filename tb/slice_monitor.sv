// slice_monitor: testbench checker for one pipelined MIPS slice.
//
// It runs the same program on the instruction-level reference model
// (mips_iss_pkg) and compares, in order, every register write the slice
// performs at write-back with the model's writes. It checks that the first
// write-back of a program happens on the fifth clock edge after start is
// released (five pipeline stages) and that the next three follow on
// consecutive edges (one instruction per cycle), and counts how often each pipeline
// mechanism occurs. final_check() compares the final registers and data
// memory and reports any mechanism that never happened.
module slice_monitor #(
  parameter string       PROG   = "rtl/imem_m1.hex",
  parameter int unsigned IDEPTH = 256,
  parameter int unsigned DDEPTH = 256
) (
  input logic        clk,
  input logic        start,
  input logic        rf_we,
  input logic [4:0]  rf_wa,
  input logic [31:0] rf_wd,
  input logic        load_use,
  input logic        branch_wait,
  input logic [1:0]  fwd_a,
  input logic [1:0]  fwd_b,
  input logic        id_fwd,
  input logic        redirect,
  input logic        stall,
  input logic        id_branch,
  input logic        id_jump,
  input logic        id_jr,
  input logic        ex_mult,
  input logic        ex_mfhilo,
  input logic        mem_load,
  input logic        mem_store
);
  import mips_iss_pkg::*;

  localparam int NMECH = 13;
  localparam string MECH_NAME [NMECH] = '{
    "load-use stall", "branch operand stall", "forward EX/MEM", "forward MEM/WB",
    "forward to ID branch", "branch taken", "branch not taken", "jump", "jump register",
    "multiply to hi/lo", "read hi/lo", "load", "store"};

  mips_iss iss;
  logic [31:0] prog [IDEPTH];
  int checks = 0;
  int failures = 0;
  int widx = 0;
  int cycle = 0;
  int first_wb = -1;
  int mech [NMECH];

  task automatic prepare();
    iss = new(IDEPTH, DDEPTH);
    foreach (prog[i]) prog[i] = '0;
    $readmemh(PROG, prog);
    foreach (prog[i]) iss.load_word(i, prog[i]);
    iss.run(100000);
    widx = 0; cycle = 0; first_wb = -1;
  endtask

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [%s] %s", PROG, what);
    end
  endfunction

  initial begin
    foreach (mech[i]) mech[i] = 0;
    prepare();
  end

  always @(posedge clk) begin
    if (start) begin
      cycle = 0; widx = 0; first_wb = -1;
    end else begin
      cycle++;
      if (rf_we && rf_wa != 0) begin
        if (first_wb < 0) begin
          first_wb = cycle;
          check(first_wb == 5, $sformatf("first write-back on edge %0d, expected 5", first_wb));
        end
        // The first four instructions of each program are independent
        // register writes: one must complete per cycle.
        if (widx < 4)
          check(cycle == 5 + widx, $sformatf("write %0d on edge %0d, expected %0d", widx, cycle, 5 + widx));
        if (widx < iss.wr_dest.size()) begin
          check(rf_wa == iss.wr_dest[widx] && rf_wd == iss.wr_val[widx],
                $sformatf("write %0d: got $%0d=%h expected $%0d=%h", widx, rf_wa, rf_wd,
                          iss.wr_dest[widx], iss.wr_val[widx]));
        end else begin
          check(0, $sformatf("extra write $%0d=%h", rf_wa, rf_wd));
        end
        widx++;
      end
      if (load_use)                          mech[0]++;
      if (branch_wait)                       mech[1]++;
      if (fwd_a == 2'b10 || fwd_b == 2'b10)  mech[2]++;
      if (fwd_a == 2'b01 || fwd_b == 2'b01)  mech[3]++;
      if (id_fwd && (id_branch || id_jr) && !stall) mech[4]++;
      if (redirect && id_branch)             mech[5]++;
      if (id_branch && !redirect && !stall)  mech[6]++;
      if (redirect && id_jump)               mech[7]++;
      if (redirect && id_jr)                 mech[8]++;
      if (ex_mult)                           mech[9]++;
      if (ex_mfhilo)                         mech[10]++;
      if (mem_load)                          mech[11]++;
      if (mem_store)                         mech[12]++;
    end
  end

  // Compare end state with the model; `need_all` demands every mechanism.
  function automatic void final_check(logic [31:0] regs [32], logic [31:0] dmem [DDEPTH],
                                      bit need_all);
    check(widx == iss.wr_dest.size(),
          $sformatf("%0d register writes, expected %0d", widx, iss.wr_dest.size()));
    for (int i = 0; i < 32; i++)
      check(regs[i] == iss.regs[i], $sformatf("$%0d=%h expected %h", i, regs[i], iss.regs[i]));
    for (int i = 0; i < int'(DDEPTH); i++)
      if (dmem[i] != iss.dmem[i]) check(0, $sformatf("mem[%0d]=%h expected %h", i, dmem[i], iss.dmem[i]));
    checks++;
    for (int i = 0; i < NMECH; i++) begin
      $display("  [%s] %-22s %0d", PROG, MECH_NAME[i], mech[i]);
      if (need_all) check(mech[i] > 0, $sformatf("mechanism '%s' never happened", MECH_NAME[i]));
    end
  endfunction

endmodule
