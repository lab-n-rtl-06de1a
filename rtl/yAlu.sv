// yAlu: 32-bit arithmetic and logic unit.
//
// z = a op b with the 3-bit op encoding used throughout the CPU:
//   000 and, 001 or, 010 add, 110 subtract (a - b).
// Other op codes give 0. ex is 1 when z is zero; the branch logic uses it to
// decide beq. Purely combinational. The four operations and their codes are
// those of the ALU-control table; the zero result for unused codes is this
// design's choice.
module yAlu
  import cpu_pkg::*;
(
  output logic [XLEN-1:0] z,
  output logic            ex,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  logic [2:0]      op
);
  always_comb begin
    unique case (op)
      ALU_AND: z = a & b;
      ALU_OR:  z = a | b;
      ALU_ADD: z = a + b;
      ALU_SUB: z = a - b;
      default: z = '0;
    endcase
  end

  assign ex = (z == '0);
endmodule
