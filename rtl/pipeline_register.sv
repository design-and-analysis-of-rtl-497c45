// pipeline_register: one of the four registers that separate the stages
// (IF/ID, ID/EX, EX/MEM, MEM/WB).
//
// A WIDTH-bit register clocked on the rising edge. `clear` (or `rst`) loads
// all zeros, which in every stage encodes a bubble: all control bits off,
// so nothing is written. `hold` keeps the current contents (a stall).
// `clear` wins over `hold`. The stage structs of mips_pkg are passed through
// as flat vectors of their $bits width.
module pipeline_register #(
  parameter int unsigned WIDTH = 64
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clear,
  input  logic             hold,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst || clear) q <= '0;
    else if (!hold)   q <= d;
  end

endmodule
