// program_counter: the PC register of one MIPS slice.
//
// While `start` is high the PC is loaded with `load_addr` (the slice's
// pc_in_address input), which is how execution is (re)started at a chosen
// word address. Otherwise it takes `next_pc` on each rising clock edge
// unless `hold` is set by the hazard unit, in which case it keeps its value.
// The PC counts instruction words, so sequential fetch adds 1, as the
// document's PC+1 path shows; the use of `start` as a load strobe is this
// design's reading of the start pin. One cycle from next_pc to pc.
module program_counter
  import mips_pkg::*;
(
  input  logic clk,
  input  logic start,      // synchronous load of load_addr
  input  pc_t  load_addr,  // start address
  input  logic hold,       // stall: keep current PC
  input  pc_t  next_pc,    // PC for the next cycle
  output pc_t  pc
);

  always_ff @(posedge clk) begin
    if (start)      pc <= load_addr;
    else if (!hold) pc <= next_pc;
  end

endmodule
