// tb_yC4: self-checking test of the ALU control unit.
// ALUop 00 and 01 must give add (010) and subtract (110) for all eight
// funct3 values; ALUop 10 must give and (000), or (001) and add (010) for
// funct3 111, 110 and 000.
module tb_yC4;
  logic [2:0] op, funct3;
  logic [1:0] ALUop;
  logic clk = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  yC4 dut (.op(op), .ALUop(ALUop), .funct3(funct3));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic t(input logic [1:0] a, input logic [2:0] f, input logic [2:0] exp);
    ALUop = a; funct3 = f; #1;
    checks++;
    if (op !== exp) begin failures++; $display("FAIL ALUop=%b f3=%b op=%b expected %b", a, f, op, exp); end
  endtask

  initial begin
    for (int f = 0; f < 8; f++) begin
      t(2'b00, 3'(f), 3'b010);
      t(2'b01, 3'(f), 3'b110);
    end
    t(2'b10, 3'b111, 3'b000);
    t(2'b10, 3'b110, 3'b001);
    t(2'b10, 3'b000, 3'b010);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
