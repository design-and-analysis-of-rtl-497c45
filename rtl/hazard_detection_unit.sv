// hazard_detection_unit: decides when the instruction in ID must wait.
//
// It stalls (holds PC and IF/ID, and sends a bubble into EX) when
//  * a load in EX writes a register the ID instruction reads (load-use);
//  * a branch or jr in ID reads a register written by the instruction in
//    EX, whose result does not exist yet (branches resolve in ID);
//  * a branch or jr in ID reads a register loaded by the instruction in MEM.
// Every other dependence is covered by forwarding. Register $0 never
// causes a stall. Purely combinational. The document names a hazard
// detection unit; these rules are this design's, following from where its
// branches and loads complete.
module hazard_detection_unit
  import mips_pkg::*;
(
  input  logic      id_uses_rs,
  input  logic      id_uses_rt,
  input  logic      id_resolves,   // branch or jr in ID
  input  reg_addr_t id_rs,
  input  reg_addr_t id_rt,
  input  logic      ex_reg_write,
  input  logic      ex_mem_read,
  input  reg_addr_t ex_dest,
  input  logic      mem_mem_read,
  input  reg_addr_t mem_dest,
  output logic      stall
);

  logic ex_match, mem_match;
  logic load_use;      // cause: load in EX
  logic branch_wait;   // cause: branch operand not ready

  assign ex_match  = (ex_dest != '0) &&
                     ((id_uses_rs && id_rs == ex_dest) || (id_uses_rt && id_rt == ex_dest));
  assign mem_match = (mem_dest != '0) &&
                     ((id_uses_rs && id_rs == mem_dest) || (id_uses_rt && id_rt == mem_dest));

  assign load_use    = ex_mem_read && ex_match;
  assign branch_wait = id_resolves && ((ex_reg_write && ex_match) || (mem_mem_read && mem_match));
  assign stall       = load_use || branch_wait;

endmodule
