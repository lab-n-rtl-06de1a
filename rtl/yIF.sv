// yIF: instruction fetch.
//
// Holds the program counter PC in a 32-bit register that loads PCin on every
// rising clock edge, reads the instruction at PC from an instruction memory
// (always reading, never writing) and computes PCp4 = PC + 4 with an ALU
// fixed to addition. All outputs are combinational from PC, so an
// instruction is available for the whole cycle after the edge that loaded
// its address. The structure (PC register always enabled, memory, adder
// built from the ALU) follows the lab's fetch unit; the memory depth and
// initial image are parameters of this design.
module yIF
  import cpu_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter string       IMEM_INIT  = "rtl/ram.dat"
) (
  output logic [31:0] ins,
  output logic [31:0] PC,
  output logic [31:0] PCp4,
  input  logic [31:0] PCin,
  input  logic        clk
);
  logic zero_unused;

  register #(.SIZE(32)) pcReg (.q(PC), .d(PCin), .clk(clk), .enable(1'b1));

  mem #(.DEPTH(IMEM_DEPTH), .INIT_FILE(IMEM_INIT)) insMem (
    .memOut(ins), .address(PC), .memIn(32'h0), .clk(clk), .read(1'b1), .write(1'b0)
  );

  yAlu myAlu (.z(PCp4), .ex(zero_unused), .a(32'd4), .b(PC), .op(ALU_ADD));
endmodule
