// cpu_pkg: constants shared by the single-cycle RV32 subset CPU.
//
// The CPU executes lw, sw, addi, beq, jal and the R-type add, and, or.
// This package holds the 7-bit opcodes of those instruction classes, the
// 3-bit ALU operation codes and the 2-bit ALUop code that passes from the
// main control to the ALU control (yC4). The opcode values and the
// ALU codes follow the RISC-V base encoding and the lab's ALU convention;
// the names are this design's own.
package cpu_pkg;

  localparam int unsigned XLEN = 32;

  // Opcodes (ins[6:0]) of the supported instruction classes.
  localparam logic [6:0] OPC_LOAD   = 7'b0000011;  // lw
  localparam logic [6:0] OPC_OPIMM  = 7'b0010011;  // addi (I-type)
  localparam logic [6:0] OPC_OP     = 7'b0110011;  // add, and, or (R-type)
  localparam logic [6:0] OPC_BRANCH = 7'b1100011;  // beq (SB-type)
  localparam logic [6:0] OPC_JAL    = 7'b1101111;  // jal (UJ-type)
  localparam logic [6:0] OPC_STORE  = 7'b0100011;  // sw (S-type)

  // funct3 values the ALU control decodes for R-type instructions.
  localparam logic [2:0] F3_ADD = 3'b000;
  localparam logic [2:0] F3_OR  = 3'b110;
  localparam logic [2:0] F3_AND = 3'b111;

  // 3-bit ALU operation (the "op" signal).
  localparam logic [2:0] ALU_AND = 3'b000;
  localparam logic [2:0] ALU_OR  = 3'b001;
  localparam logic [2:0] ALU_ADD = 3'b010;
  localparam logic [2:0] ALU_SUB = 3'b110;

  // 2-bit ALUop into yC4: bit 1 = R-type, bit 0 = branch.
  localparam logic [1:0] ALUOP_ADD   = 2'b00;
  localparam logic [1:0] ALUOP_SUB   = 2'b01;
  localparam logic [1:0] ALUOP_FUNCT = 2'b10;

endpackage
