// yPC: next-PC logic.
//
// Chooses the address of the next instruction, PCin, with three 2-way
// multiplexers in a chain, each overriding the one before:
//   1. PCp4 (sequential), or the branch target when isbranch AND zero
//      (a beq whose registers are equal);
//   2. that result, or the jump target when isjump (jal);
//   3. that result, or entryPoint when INT is 1 (interrupt / context
//      switch; this is also how the first instruction of a program is
//      fetched).
// The branch and jump targets are PC + 4*branchImm and PC + 4*jImm, each
// formed by a shift of two places and an ALU fixed to addition. Purely
// combinational; PCin is loaded into the PC register at the next rising
// clock edge.
//
// The mux chain, the AND that decides the branch and the shift by two are
// the lab's. The lab names both PC and PC+4 as the base of the targets;
// this design adds the offsets to PC, the address of the branch or jump
// itself, which with yID's immediates gives RISC-V branch and jal targets.
module yPC
  import cpu_pkg::*;
(
  output logic [31:0] PCin,
  input  logic [31:0] PC,
  input  logic [31:0] PCp4,
  input  logic        INT,
  input  logic [31:0] entryPoint,
  input  logic [31:0] branchImm,
  input  logic [31:0] jImm,
  input  logic        zero,
  input  logic        isbranch,
  input  logic        isjump
);
  logic [31:0] branchImmX4, jImmX4, bTarget, jTarget, choiceA, choiceB;
  logic        doBranch, bZeroUnused, jZeroUnused;

  assign branchImmX4 = {branchImm[29:0], 2'b00};
  assign jImmX4      = {jImm[29:0], 2'b00};

  yAlu bALU (.z(bTarget), .ex(bZeroUnused), .a(PC), .b(branchImmX4), .op(ALU_ADD));
  yAlu jALU (.z(jTarget), .ex(jZeroUnused), .a(PC), .b(jImmX4),      .op(ALU_ADD));

  assign doBranch = isbranch & zero;

  yMux #(.SIZE(32)) mux1 (.z(choiceA), .a(PCp4),    .b(bTarget),    .c(doBranch));
  yMux #(.SIZE(32)) mux2 (.z(choiceB), .a(choiceA), .b(jTarget),    .c(isjump));
  yMux #(.SIZE(32)) mux3 (.z(PCin),    .a(choiceB), .b(entryPoint), .c(INT));
endmodule
