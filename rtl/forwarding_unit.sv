// forwarding_unit: picks the newest value of each source register.
//
// For the EX stage operands it selects the EX/MEM result (the instruction
// one ahead) before the MEM/WB value (two ahead) before the value read in
// ID. For the ID-stage branch/jr operands it selects the EX/MEM ALU result
// when that instruction is not a load; values in MEM/WB reach ID through
// the register file's write-before-read. Register $0 is never forwarded.
// Purely combinational. The document names a data forwarding unit; these
// paths are this design's.
module forwarding_unit
  import mips_pkg::*;
(
  input  reg_addr_t ex_rs,
  input  reg_addr_t ex_rt,
  input  reg_addr_t id_rs,
  input  reg_addr_t id_rt,
  input  logic      exm_reg_write,
  input  logic      exm_mem_to_reg,
  input  reg_addr_t exm_dest,
  input  logic      wb_reg_write,
  input  reg_addr_t wb_dest,
  output fwd_sel_t  fwd_a,
  output fwd_sel_t  fwd_b,
  output logic      id_fwd_a,
  output logic      id_fwd_b
);

  function automatic fwd_sel_t pick(reg_addr_t src);
    if (exm_reg_write && exm_dest != '0 && exm_dest == src) return FWD_EX_MEM;
    if (wb_reg_write  && wb_dest  != '0 && wb_dest  == src) return FWD_MEM_WB;
    return FWD_NONE;
  endfunction

  assign fwd_a    = pick(ex_rs);
  assign fwd_b    = pick(ex_rt);
  assign id_fwd_a = exm_reg_write && !exm_mem_to_reg && exm_dest != '0 && exm_dest == id_rs;
  assign id_fwd_b = exm_reg_write && !exm_mem_to_reg && exm_dest != '0 && exm_dest == id_rt;

endmodule
