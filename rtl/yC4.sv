// yC4: control part 4 - the ALU control unit.
//
// Produces the 3-bit ALU op from ALUop = {isRtype, isbranch} and
// funct3 = ins[14:12]:
//   ALUop  funct3  op
//   00     any     010  add  (lw, sw, addi)
//   01     any     110  sub  (beq)
//   10     111     000  and
//   10     110     001  or
//   10     000     010  add
// funct3 matters only when ALUop is 10. Eight gates (two NOT, two XOR,
// two AND, two OR) do it:
//   op[2] = ALUop[0] | (ALUop[1] & (f[2] ^ f[1]))
//   op[1] = ~ALUop[1] | ~f[1]
//   op[0] = ALUop[1] & (f[1] ^ f[0])
// Other funct3 values with ALUop 10, and ALUop 11, give whatever these
// equations give. Purely combinational.
module yC4 (
  output logic [2:0] op,
  input  logic [1:0] ALUop,
  input  logic [2:0] funct3
);
  logic x21, x10, a2, notA1, notF1;

  assign x21   = funct3[2] ^ funct3[1];
  assign x10   = funct3[1] ^ funct3[0];
  assign notA1 = ~ALUop[1];
  assign notF1 = ~funct3[1];
  assign a2    = ALUop[1] & x21;
  assign op[2] = ALUop[0] | a2;
  assign op[1] = notA1 | notF1;
  assign op[0] = ALUop[1] & x10;
endmodule
