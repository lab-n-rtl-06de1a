// yDM: data memory stage.
//
// exeOut (the ALU result) is the byte address. With MemRead = 1 the
// addressed word appears combinationally on memOut (0 otherwise); with
// MemWrite = 1 rd2 is written to it on the rising edge of clk. The data
// memory is its own instance of the memory block, loaded with the same
// image as the instruction memory, as in the lab where both read ram.dat.
module yDM #(
  parameter int unsigned DMEM_DEPTH = 1024,
  parameter string       DMEM_INIT  = "rtl/ram.dat"
) (
  output logic [31:0] memOut,
  input  logic [31:0] exeOut,
  input  logic [31:0] rd2,
  input  logic        clk,
  input  logic        MemRead,
  input  logic        MemWrite
);
  mem #(.DEPTH(DMEM_DEPTH), .INIT_FILE(DMEM_INIT)) dataMem (
    .memOut(memOut), .address(exeOut), .memIn(rd2), .clk(clk),
    .read(MemRead), .write(MemWrite)
  );
endmodule
