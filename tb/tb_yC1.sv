// tb_yC1: self-checking test of control part 1.
// Each supported opcode must raise exactly its own class flag.
module tb_yC1;
  logic isStype, isRtype, isItype, isLw, isjump, isbranch, clk = 0;
  logic [6:0] opCode;
  int checks = 0, failures = 0;
  // {opcode, expected {isStype, isRtype, isItype, isLw, isjump, isbranch}}
  logic [12:0] table_ [6] = '{
    {7'b0000011, 6'b000100},   // lw
    {7'b0010011, 6'b001000},   // addi
    {7'b0110011, 6'b010000},   // add/and/or
    {7'b1100011, 6'b000001},   // beq
    {7'b1101111, 6'b000010},   // jal
    {7'b0100011, 6'b100000}};  // sw
  always #5 clk = ~clk;

  yC1 dut (.isStype(isStype), .isRtype(isRtype), .isItype(isItype), .isLw(isLw),
           .isjump(isjump), .isbranch(isbranch), .opCode(opCode));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 6; i++) begin
      opCode = table_[i][12:6]; #1;
      checks++;
      if ({isStype, isRtype, isItype, isLw, isjump, isbranch} !== table_[i][5:0]) begin
        failures++;
        $display("FAIL opcode %b flags %b expected %b", opCode,
                 {isStype, isRtype, isItype, isLw, isjump, isbranch}, table_[i][5:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
