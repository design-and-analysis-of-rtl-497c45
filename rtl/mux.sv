// mux: N-input, WIDTH-bit multiplexer used throughout the data path
// (ALU operand and forwarding selection, write-back selection, next PC).
//
// `sel` picks d[sel]; a select value of N or above yields d[0].
// Purely combinational.
module mux #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned N     = 2,
  localparam int unsigned SW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0][WIDTH-1:0] d,
  input  logic [SW-1:0]           sel,
  output logic [WIDTH-1:0]        y
);

  always_comb begin
    y = d[0];
    for (int i = 0; i < N; i++)
      if (sel == SW'(i)) y = d[i];
  end

endmodule
