// yID: instruction decode - register file and immediate extraction.
//
// The register file has 32 registers of 32 bits. rd1 and rd2 are read
// combinationally at rs1 = ins[19:15] and rs2 = ins[24:20]; register x0
// always reads 0. On the rising edge of clk with RegWrite = 1 the value wd
// is written to rd = ins[11:7] (writes to x0 are dropped).
//
// Three sign-extended immediates are produced from the instruction word:
//   imm       - ALU operand: the S-type immediate {ins[31:25], ins[11:7]}
//               for sw, otherwise the I-type immediate ins[31:20]
//               (lw, addi);
//   branchImm - the beq byte offset divided by 4,
//               {ins[31], ins[7], ins[30:25], ins[11:9]};
//   jImm      - the jal byte offset divided by 4,
//               {ins[31], ins[19:12], ins[20], ins[30:22]}.
// The next-PC logic multiplies branchImm and jImm by 4 and adds them to PC,
// which gives the RISC-V branch and jump targets for word-aligned code.
// The register file and the split into these outputs are this design's
// reading of the lab's decode stage, which is only named.
module yID
  import cpu_pkg::*;
(
  output logic [31:0] rd1,
  output logic [31:0] rd2,
  output logic [31:0] imm,
  output logic [31:0] jImm,
  output logic [31:0] branchImm,
  input  logic [31:0] ins,
  input  logic [31:0] wd,
  input  logic        RegWrite,
  input  logic        clk
);
  logic [31:0] regs [32];
  logic [4:0]  rs1, rs2, rd;

  assign rs1 = ins[19:15];
  assign rs2 = ins[24:20];
  assign rd  = ins[11:7];

  always_ff @(posedge clk) begin
    if (RegWrite && rd != 5'd0) regs[rd] <= wd;
  end

  assign rd1 = (rs1 == 5'd0) ? '0 : regs[rs1];
  assign rd2 = (rs2 == 5'd0) ? '0 : regs[rs2];

  always_comb begin
    if (ins[6:0] == OPC_STORE) imm = {{20{ins[31]}}, ins[31:25], ins[11:7]};
    else                       imm = {{20{ins[31]}}, ins[31:20]};
  end

  assign branchImm = {{21{ins[31]}}, ins[31], ins[7], ins[30:25], ins[11:9]};
  assign jImm      = {{13{ins[31]}}, ins[31], ins[19:12], ins[20], ins[30:22]};
endmodule
