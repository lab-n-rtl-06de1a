// yC2: control part 2 - datapath control signals from the instruction class.
//
// Takes the class flags of yC1 and sets, for the single-cycle datapath:
//   ALUSrc   = isLw | isStype | isItype   ALU operand B is the immediate
//   RegWrite = isRtype | isItype | isLw   a result is written to rd
//   Mem2Reg  = isLw                       write back the loaded word
//   MemRead  = isLw
//   MemWrite = isStype
// beq compares two registers (ALUSrc 0) and writes nothing. jal changes only
// the PC: the datapath has no path from PC+4 to the register file, so jal
// writes no link register. The isjump and isbranch inputs are part of the
// interface (the unit takes six of yC1's flags) but no output depends on
// them. Purely combinational.
module yC2 (
  output logic ALUSrc,
  output logic RegWrite,
  output logic Mem2Reg,
  output logic MemRead,
  output logic MemWrite,
  input  logic isStype,
  input  logic isRtype,
  input  logic isItype,
  input  logic isLw,
  input  logic isjump,
  input  logic isbranch
);
  assign ALUSrc   = isLw | isStype | isItype;
  assign RegWrite = isRtype | isItype | isLw;
  assign Mem2Reg  = isLw;
  assign MemRead  = isLw;
  assign MemWrite = isStype;
endmodule
