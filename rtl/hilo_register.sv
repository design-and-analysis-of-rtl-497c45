// hilo_register: the hi and lo special registers of a MIPS slice, with the
// signed multiplier that fills them.
//
// When `we` is set (a mult instruction in EX) the signed 2*WIDTH-bit
// product a*b is written on the rising edge: upper half to hi, lower half
// to lo. mfhi/mflo read `hi`/`lo` combinationally in EX. Because the write
// happens at the end of mult's EX cycle, a following mfhi/mflo in EX sees
// the new value with no stall. `rst` clears both. The document shows hi and
// lo beside the PC; the multiplier feeding them is this design's addition
// so that the registers have a writer.
module hilo_register #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             we,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] hi,
  output logic [WIDTH-1:0] lo
);

  logic signed [2*WIDTH-1:0] product;

  assign product = $signed(a) * $signed(b);

  always_ff @(posedge clk) begin
    if (rst) begin
      hi <= '0;
      lo <= '0;
    end else if (we) begin
      hi <= product[2*WIDTH-1:WIDTH];
      lo <= product[WIDTH-1:0];
    end
  end

endmodule
