// yC1: control part 1 - instruction class from the opcode.
//
// Looks only at opCode = ins[6:0] (bits 1:0 are 11 for every supported
// instruction and are ignored) and raises one flag for the class:
//   opcode    class     flag
//   0000011   lw        isLw
//   0010011   I-type    isItype   (addi)
//   0110011   R-type    isRtype   (add, and, or)
//   1100011   SB-type   isbranch  (beq)
//   1101111   UJ-type   isjump    (jal)
//   0100011   S-type    isStype   (sw)
// Each flag is a small gate function of single opcode bits, as the lab
// asks, valid for these six opcodes only:
//   isjump   = op[3]                      (only jal has bit 3 set)
//   isLw     = NOR(op[6:2])               (only lw has bits 6:2 all 0)
//   ISselect = XOR(op[6:2])               (odd parity: sw, addi - and not
//                                          jal, whose bits 6:2 are 11011)
//   isStype  = ISselect AND op[5]
//   isItype  = ISselect AND op[4]
//   isRtype  = op[5] AND op[4]
//   isbranch = op[6] AND op[5] AND NOT op[3]
// The parity is taken over five bits: no four opcode bits separate sw and
// addi from jal. Purely combinational.
module yC1 (
  output logic       isStype,
  output logic       isRtype,
  output logic       isItype,
  output logic       isLw,
  output logic       isjump,
  output logic       isbranch,
  input  logic [6:0] opCode
);
  logic ISselect, JBselect;

  assign isjump   = opCode[3];
  assign isLw     = ~|opCode[6:2];
  assign ISselect = ^opCode[6:2];
  assign isStype  = ISselect & opCode[5];
  assign isItype  = ISselect & opCode[4];
  assign isRtype  = opCode[5] & opCode[4];
  assign JBselect = opCode[6] & opCode[5];
  assign isbranch = JBselect & ~opCode[3];
endmodule
