// register: SIZE-bit register with load enable.
//
// On each rising edge of clk, q takes d when enable is 1 and holds otherwise.
// There is no reset: the CPU is started by an interrupt that loads the
// program counter (see yPC), so nothing needs a reset value. The port order
// (q, d, clk, enable) matches the way the fetch stage instantiates it; the
// rising-edge timing is this design's choice.
module register #(
  parameter int unsigned SIZE = 32
) (
  output logic [SIZE-1:0] q,
  input  logic [SIZE-1:0] d,
  input  logic            clk,
  input  logic            enable
);
  always_ff @(posedge clk) begin
    if (enable) q <= d;
  end
endmodule
