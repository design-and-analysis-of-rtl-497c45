// mips64: the 64-bit MIPS machine, built from two 32-bit pipelined slices.
//
// Slice m1 carries the lower 32 bits of every top-level bus and slice m2
// the upper 32 bits: pc_in_address, pc_out, instr_out and data_out are the
// two slices' 32-bit buses side by side, and cntrl_signals[3:2] is m2's
// 2-bit ALU operation class, [1:0] m1's. Both slices share clk and start
// and run independently, each from its own instruction ROM (IMEM_FILE_M1,
// IMEM_FILE_M2) and with its own register file and data RAM, so the
// machine executes two instructions per cycle. This split into two
// 32-bit slices, their names and the port names and widths follow the
// document's synthesised schematic; which half of the buses each slice
// takes is this design's choice.
module mips64 #(
  parameter int unsigned IMEM_DEPTH   = 256,
  parameter int unsigned DMEM_DEPTH   = 256,
  parameter string       IMEM_FILE_M1 = "rtl/imem_m1.hex",
  parameter string       IMEM_FILE_M2 = "rtl/imem_m2.hex"
) (
  input  logic        clk,
  input  logic        start,
  input  logic [63:0] pc_in_address,
  output logic [3:0]  cntrl_signals,
  output logic [63:0] data_out,
  output logic [63:0] instr_out,
  output logic [63:0] pc_out
);

  mipsprocessor #(
    .IMEM_DEPTH (IMEM_DEPTH),
    .DMEM_DEPTH (DMEM_DEPTH),
    .IMEM_FILE  (IMEM_FILE_M1)
  ) m1 (
    .clk           (clk),
    .start         (start),
    .pc_in_address (pc_in_address[31:0]),
    .cntrl_signals (cntrl_signals[1:0]),
    .data_out      (data_out[31:0]),
    .instr_out     (instr_out[31:0]),
    .pc_out        (pc_out[31:0])
  );

  mipsprocessor #(
    .IMEM_DEPTH (IMEM_DEPTH),
    .DMEM_DEPTH (DMEM_DEPTH),
    .IMEM_FILE  (IMEM_FILE_M2)
  ) m2 (
    .clk           (clk),
    .start         (start),
    .pc_in_address (pc_in_address[63:32]),
    .cntrl_signals (cntrl_signals[3:2]),
    .data_out      (data_out[63:32]),
    .instr_out     (instr_out[63:32]),
    .pc_out        (pc_out[63:32])
  );

endmodule
