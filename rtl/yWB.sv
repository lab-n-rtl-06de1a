// yWB: write-back selection.
//
// wb is the loaded word memOut when Mem2Reg is 1 (lw) and the ALU result
// exeOut otherwise. Purely combinational; wb goes to the register file's
// write-data input.
module yWB (
  output logic [31:0] wb,
  input  logic [31:0] exeOut,
  input  logic [31:0] memOut,
  input  logic        Mem2Reg
);
  yMux #(.SIZE(32)) wbMux (.z(wb), .a(exeOut), .b(memOut), .c(Mem2Reg));
endmodule
