// yChip: single-cycle 32-bit RISC-V subset CPU.
//
// One instruction is executed per clock cycle. The rising edge of clk loads
// the PC (and commits the previous instruction's register and memory
// writes); during the cycle the instruction is fetched (yIF), decoded and
// its registers read (yID), the control unit derives every control signal
// from the instruction word (yC1 -> yC2 for the datapath, yC1 -> ALUop ->
// yC4 for the ALU op), the ALU computes (yEX), the data memory is read (yDM),
// the write-back value is chosen (yWB) and the next PC is formed (yPC).
//
// The chip talks to the outside only through clk, INT and entryPoint (and
// its memories, loaded from MEM_INIT). There is no reset: holding INT at 1
// over a rising edge makes entryPoint the next PC, which starts a program
// or switches to another. ins, rd2 and wb are brought out for observation
// only.
//
// Supported: lw, sw, addi, add, and, or, beq, jal (jal without a link
// write). The partition into these units and the control signals between
// them follow the lab; memory depth and initial image are parameters of
// this design.
module yChip
  import cpu_pkg::*;
#(
  parameter int unsigned MEM_DEPTH = 1024,
  parameter string       MEM_INIT  = "rtl/ram.dat"
) (
  output logic [31:0] ins,
  output logic [31:0] rd2,
  output logic [31:0] wb,
  input  logic [31:0] entryPoint,
  input  logic        INT,
  input  logic        clk
);
  logic [31:0] PC, PCp4, PCin;
  logic [31:0] rd1, imm, jImm, branchImm;
  logic [31:0] exeOut, memOut;
  logic        zero;
  logic        isStype, isRtype, isItype, isLw, isjump, isbranch;
  logic        ALUSrc, RegWrite, Mem2Reg, MemRead, MemWrite;
  logic [1:0]  ALUop;
  logic [2:0]  op;

  yIF #(.IMEM_DEPTH(MEM_DEPTH), .IMEM_INIT(MEM_INIT)) myIF (
    .ins(ins), .PC(PC), .PCp4(PCp4), .PCin(PCin), .clk(clk)
  );

  yID myID (
    .rd1(rd1), .rd2(rd2), .imm(imm), .jImm(jImm), .branchImm(branchImm),
    .ins(ins), .wd(wb), .RegWrite(RegWrite), .clk(clk)
  );

  yEX myEx (
    .z(exeOut), .zero(zero), .rd1(rd1), .rd2(rd2), .imm(imm), .op(op), .ALUSrc(ALUSrc)
  );

  yDM #(.DMEM_DEPTH(MEM_DEPTH), .DMEM_INIT(MEM_INIT)) myDM (
    .memOut(memOut), .exeOut(exeOut), .rd2(rd2), .clk(clk),
    .MemRead(MemRead), .MemWrite(MemWrite)
  );

  yWB myWB (.wb(wb), .exeOut(exeOut), .memOut(memOut), .Mem2Reg(Mem2Reg));

  yPC myPC (
    .PCin(PCin), .PC(PC), .PCp4(PCp4), .INT(INT), .entryPoint(entryPoint),
    .branchImm(branchImm), .jImm(jImm), .zero(zero),
    .isbranch(isbranch), .isjump(isjump)
  );

  yC1 myC1 (
    .isStype(isStype), .isRtype(isRtype), .isItype(isItype), .isLw(isLw),
    .isjump(isjump), .isbranch(isbranch), .opCode(ins[6:0])
  );

  yC2 myC2 (
    .ALUSrc(ALUSrc), .RegWrite(RegWrite), .Mem2Reg(Mem2Reg), .MemRead(MemRead),
    .MemWrite(MemWrite), .isStype(isStype), .isRtype(isRtype), .isItype(isItype),
    .isLw(isLw), .isjump(isjump), .isbranch(isbranch)
  );

  // Control part 3: ALUop = 00 add (lw, sw, addi), 01 subtract (beq),
  // 10 decide from funct3 (R-type). It is only wiring: {isRtype, isbranch}.
  assign ALUop = {isRtype, isbranch};

  yC4 myC4 (.op(op), .ALUop(ALUop), .funct3(ins[14:12]));

  // For every supported opcode the control's class flags are one-hot.
  logic [2:0] nFlags;
  logic       supported;
  assign supported = ins[6:0] == OPC_LOAD   || ins[6:0] == OPC_OPIMM || ins[6:0] == OPC_OP ||
                     ins[6:0] == OPC_BRANCH || ins[6:0] == OPC_JAL   || ins[6:0] == OPC_STORE;
  assign nFlags = 3'(isStype) + 3'(isRtype) + 3'(isItype) + 3'(isLw) + 3'(isjump) + 3'(isbranch);

  a_class_onehot: assert property (@(posedge clk)
    supported |-> nFlags == 3'd1)
    else $error("yChip: instruction %h decoded into %0d classes", ins, nFlags);
endmodule
