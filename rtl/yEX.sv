// yEX: execute stage.
//
// The ALU's second operand is rd2 when ALUSrc is 0 (R-type, beq) and the
// decoded immediate when ALUSrc is 1 (lw, sw, addi); the first operand is
// always rd1. z is the ALU result (also the data-memory address) and zero
// is 1 when z is 0, which decides beq. Purely combinational. The operand
// multiplexer in front of the ALU follows the single-cycle datapath figure.
module yEX (
  output logic [31:0] z,
  output logic        zero,
  input  logic [31:0] rd1,
  input  logic [31:0] rd2,
  input  logic [31:0] imm,
  input  logic [2:0]  op,
  input  logic        ALUSrc
);
  logic [31:0] b;

  yMux #(.SIZE(32)) srcMux (.z(b), .a(rd2), .b(imm), .c(ALUSrc));
  yAlu alu (.z(z), .ex(zero), .a(rd1), .b(b), .op(op));
endmodule
