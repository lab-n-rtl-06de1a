// yMux: two-way multiplexer of SIZE-bit words.
//
// z = a when c is 0, b when c is 1. Purely combinational. The port order
// (z, a, b, c) is the one the next-PC logic uses; the width parameter is
// this design's own.
module yMux #(
  parameter int unsigned SIZE = 2
) (
  output logic [SIZE-1:0] z,
  input  logic [SIZE-1:0] a,
  input  logic [SIZE-1:0] b,
  input  logic            c
);
  assign z = c ? b : a;
endmodule
