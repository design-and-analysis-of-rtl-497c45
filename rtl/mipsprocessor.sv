// mipsprocessor: one 32-bit, five-stage pipelined MIPS slice.
//
// Stages and what happens in each:
//   IF   the PC addresses the instruction ROM; PC+1 and the instruction are
//        latched into IF/ID.
//   ID   the control unit decodes the instruction, the register file is
//        read, the immediate is extended, and the branch unit resolves
//        beq/bne/j/jal/jr. A taken branch or jump redirects the PC and
//        squashes the instruction fetched behind it (one lost cycle).
//   EX   the ALU (or, for mult/mfhi/mflo, the hi/lo registers) computes
//        the result, with operands forwarded from EX/MEM and MEM/WB.
//   MEM  loads and stores access the data RAM.
//   WB   the ALU result or loaded word is written to the register file.
// The hazard detection unit stalls IF and ID for one cycle on a load-use
// dependence, and for one or two cycles when a branch or jr needs a value
// still being computed in EX or loaded in MEM. Otherwise one instruction
// completes per cycle; the first instruction after start writes back in
// its fifth cycle.
//
// Interface (names and widths as in the slice of the 64-bit top):
//   start          high: load PC from pc_in_address and clear the pipeline,
//                  register file and hi/lo; low: run.
//   pc_out         current PC (word address of the instruction in IF).
//   instr_out      instruction in ID.
//   cntrl_signals  2-bit ALU operation class decoded for the ID instruction.
//   data_out       value on the write-back bus.
// The stage split, the blocks and the ID-stage branch unit follow the
// document; the instruction subset, word addressing of both memories and the
// meaning given to start and to the four outputs are this design's choices.
module mipsprocessor
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 256,
  parameter int unsigned DMEM_DEPTH = 256,
  parameter string       IMEM_FILE  = "rtl/imem_m1.hex"
) (
  input  logic       clk,
  input  logic       start,
  input  pc_t        pc_in_address,
  output logic [1:0] cntrl_signals,
  output word_t      data_out,
  output instr_t     instr_out,
  output pc_t        pc_out
);

  // ---------------------------------------------------------------- IF ---
  pc_t     pc, pc_plus1, next_pc, redirect_target;
  instr_t  if_instr;
  logic    stall, redirect;
  if_id_t  if_id_d, if_id_q;

  program_counter u_pc (
    .clk       (clk),
    .start     (start),
    .load_addr (pc_in_address),
    .hold      (stall),
    .next_pc   (next_pc),
    .pc        (pc)
  );

  assign pc_plus1 = pc + pc_t'(1);

  mux #(.WIDTH(PC_W), .N(2)) u_next_pc_mux (
    .d   ({redirect_target, pc_plus1}),
    .sel (redirect),
    .y   (next_pc)
  );

  instr_memory #(.DEPTH(IMEM_DEPTH), .INIT_FILE(IMEM_FILE)) u_imem (
    .addr  (pc[$clog2(IMEM_DEPTH)-1:0]),
    .instr (if_instr)
  );

  assign if_id_d = '{pc_plus1: pc_plus1, instr: if_instr};

  // A taken branch or jump in ID squashes the instruction just fetched.
  pipeline_register #(.WIDTH($bits(if_id_t))) u_if_id (
    .clk   (clk),
    .rst   (start),
    .clear (redirect),
    .hold  (stall),
    .d     (if_id_d),
    .q     (if_id_q)
  );

  // ---------------------------------------------------------------- ID ---
  instr_t    id_instr;
  reg_addr_t id_rs, id_rt, id_rd;
  ctrl_t     id_ctrl;
  word_t     rf_rd1, rf_rd2, id_rs_val, id_rt_val, id_imm;
  logic      id_fwd_a, id_fwd_b, id_redirect;
  id_ex_t    id_ex_d, id_ex_q;
  ex_mem_t   ex_mem_q;
  mem_wb_t   mem_wb_q;
  word_t     wb_data;

  assign id_instr = if_id_q.instr;
  assign id_rs    = id_instr[25:21];
  assign id_rt    = id_instr[20:16];
  assign id_rd    = id_instr[15:11];

  control_unit u_ctrl (
    .opcode (id_instr[31:26]),
    .funct  (id_instr[5:0]),
    .ctrl   (id_ctrl)
  );

  register_file #(.WIDTH(XLEN), .NREGS(32)) u_rf (
    .clk (clk),
    .rst (start),
    .ra1 (id_rs),
    .ra2 (id_rt),
    .rd1 (rf_rd1),
    .rd2 (rf_rd2),
    .we  (mem_wb_q.reg_write),
    .wa  (mem_wb_q.dest),
    .wd  (wb_data)
  );

  sign_extend #(.WIDTH(XLEN)) u_sext (
    .imm      (id_instr[15:0]),
    .zero_ext (id_ctrl.zero_ext),
    .ext      (id_imm)
  );

  // Branch/jr operands: newest value, taken from EX/MEM when it is there.
  mux #(.WIDTH(XLEN), .N(2)) u_id_fwd_a (
    .d ({ex_mem_q.result, rf_rd1}), .sel (id_fwd_a), .y (id_rs_val));
  mux #(.WIDTH(XLEN), .N(2)) u_id_fwd_b (
    .d ({ex_mem_q.result, rf_rd2}), .sel (id_fwd_b), .y (id_rt_val));

  branch_unit u_branch (
    .branch    (id_ctrl.branch),
    .branch_ne (id_ctrl.branch_ne),
    .jump      (id_ctrl.jump),
    .jr        (id_ctrl.jr),
    .rs_val    (id_rs_val),
    .rt_val    (id_rt_val),
    .pc_plus1  (if_id_q.pc_plus1),
    .imm       (id_imm),
    .jindex    (id_instr[25:0]),
    .redirect  (id_redirect),
    .target    (redirect_target)
  );

  // A stalled branch has not seen its final operands: it may not redirect.
  assign redirect = id_redirect && !stall;

  hazard_detection_unit u_hazard (
    .id_uses_rs   (id_ctrl.uses_rs),
    .id_uses_rt   (id_ctrl.uses_rt),
    .id_resolves  (id_ctrl.branch || id_ctrl.jr),
    .id_rs        (id_rs),
    .id_rt        (id_rt),
    .ex_reg_write (id_ex_q.ctrl.reg_write),
    .ex_mem_read  (id_ex_q.ctrl.mem_read),
    .ex_dest      (id_ex_q.dest),
    .mem_mem_read (ex_mem_q.mem_read),
    .mem_dest     (ex_mem_q.dest),
    .stall        (stall)
  );

  always_comb begin
    id_ex_d          = '0;
    id_ex_d.ctrl     = id_ctrl;
    id_ex_d.pc_plus1 = if_id_q.pc_plus1;
    id_ex_d.rs_val   = rf_rd1;
    id_ex_d.rt_val   = rf_rd2;
    id_ex_d.imm      = id_imm;
    id_ex_d.rs       = id_rs;
    id_ex_d.rt       = id_rt;
    id_ex_d.dest     = id_ctrl.link ? reg_addr_t'(31) : (id_ctrl.reg_dst ? id_rd : id_rt);
    id_ex_d.shamt    = id_instr[10:6];
    id_ex_d.funct    = id_instr[5:0];
    id_ex_d.opcode   = id_instr[31:26];
  end

  // A stall sends a bubble into EX while IF and ID hold.
  pipeline_register #(.WIDTH($bits(id_ex_t))) u_id_ex (
    .clk   (clk),
    .rst   (start),
    .clear (stall),
    .hold  (1'b0),
    .d     (id_ex_d),
    .q     (id_ex_q)
  );

  // ---------------------------------------------------------------- EX ---
  fwd_sel_t  fwd_a, fwd_b;
  word_t     ex_a, ex_b_reg, ex_b, alu_y, hi, lo, ex_result;
  alu_ctrl_t alu_op;
  ex_mem_t   ex_mem_d;

  forwarding_unit u_fwd (
    .ex_rs          (id_ex_q.rs),
    .ex_rt          (id_ex_q.rt),
    .id_rs          (id_rs),
    .id_rt          (id_rt),
    .exm_reg_write  (ex_mem_q.reg_write),
    .exm_mem_to_reg (ex_mem_q.mem_to_reg),
    .exm_dest       (ex_mem_q.dest),
    .wb_reg_write   (mem_wb_q.reg_write),
    .wb_dest        (mem_wb_q.dest),
    .fwd_a          (fwd_a),
    .fwd_b          (fwd_b),
    .id_fwd_a       (id_fwd_a),
    .id_fwd_b       (id_fwd_b)
  );

  mux #(.WIDTH(XLEN), .N(3)) u_fwd_a_mux (
    .d ({ex_mem_q.result, wb_data, id_ex_q.rs_val}), .sel (fwd_a), .y (ex_a));
  mux #(.WIDTH(XLEN), .N(3)) u_fwd_b_mux (
    .d ({ex_mem_q.result, wb_data, id_ex_q.rt_val}), .sel (fwd_b), .y (ex_b_reg));
  mux #(.WIDTH(XLEN), .N(2)) u_alu_src_mux (
    .d ({id_ex_q.imm, ex_b_reg}), .sel (id_ex_q.ctrl.alu_src), .y (ex_b));

  alu_control u_alu_ctrl (
    .alu_op (id_ex_q.ctrl.alu_op),
    .funct  (id_ex_q.funct),
    .opcode (id_ex_q.opcode),
    .op     (alu_op)
  );

  alu #(.WIDTH(XLEN)) u_alu (
    .a     (ex_a),
    .b     (ex_b),
    .shamt (id_ex_q.shamt),
    .op    (alu_op),
    .y     (alu_y)
  );

  hilo_register #(.WIDTH(XLEN)) u_hilo (
    .clk (clk),
    .rst (start),
    .we  (id_ex_q.ctrl.hilo_write),
    .a   (ex_a),
    .b   (ex_b_reg),
    .hi  (hi),
    .lo  (lo)
  );

  always_comb begin
    if (id_ex_q.ctrl.link)      ex_result = word_t'(id_ex_q.pc_plus1);
    else if (id_ex_q.ctrl.mfhi) ex_result = hi;
    else if (id_ex_q.ctrl.mflo) ex_result = lo;
    else                        ex_result = alu_y;
  end

  assign ex_mem_d = '{
    reg_write:  id_ex_q.ctrl.reg_write,
    mem_to_reg: id_ex_q.ctrl.mem_to_reg,
    mem_read:   id_ex_q.ctrl.mem_read,
    mem_write:  id_ex_q.ctrl.mem_write,
    result:     ex_result,
    store_data: ex_b_reg,
    dest:       id_ex_q.dest
  };

  pipeline_register #(.WIDTH($bits(ex_mem_t))) u_ex_mem (
    .clk   (clk),
    .rst   (start),
    .clear (1'b0),
    .hold  (1'b0),
    .d     (ex_mem_d),
    .q     (ex_mem_q)
  );

  // --------------------------------------------------------------- MEM ---
  word_t   mem_rdata;
  mem_wb_t mem_wb_d;

  data_memory #(.WIDTH(XLEN), .DEPTH(DMEM_DEPTH)) u_dmem (
    .clk  (clk),
    .we   (ex_mem_q.mem_write),
    .addr (ex_mem_q.result[$clog2(DMEM_DEPTH)-1:0]),
    .wd   (ex_mem_q.store_data),
    .rd   (mem_rdata)
  );

  assign mem_wb_d = '{
    reg_write:  ex_mem_q.reg_write,
    mem_to_reg: ex_mem_q.mem_to_reg,
    result:     ex_mem_q.result,
    mem_data:   mem_rdata,
    dest:       ex_mem_q.dest
  };

  pipeline_register #(.WIDTH($bits(mem_wb_t))) u_mem_wb (
    .clk   (clk),
    .rst   (start),
    .clear (1'b0),
    .hold  (1'b0),
    .d     (mem_wb_d),
    .q     (mem_wb_q)
  );

  // ---------------------------------------------------------------- WB ---
  mux #(.WIDTH(XLEN), .N(2)) u_wb_mux (
    .d ({mem_wb_q.mem_data, mem_wb_q.result}), .sel (mem_wb_q.mem_to_reg), .y (wb_data));

  // ----------------------------------------------------------- outputs ---
  assign pc_out        = pc;
  assign instr_out     = id_instr;
  assign cntrl_signals = id_ctrl.alu_op;
  assign data_out      = wb_data;

  // A stall and a redirect never coincide.
  a_no_redirect_in_stall: assert property (@(posedge clk) disable iff (start)
    !(stall && redirect));

endmodule
