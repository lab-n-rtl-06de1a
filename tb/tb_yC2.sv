// tb_yC2: self-checking test of control part 2.
// For each instruction class (one flag set) checks
// {ALUSrc, RegWrite, Mem2Reg, MemRead, MemWrite} against the table below.
module tb_yC2;
  logic ALUSrc, RegWrite, Mem2Reg, MemRead, MemWrite, clk = 0;
  logic isStype, isRtype, isItype, isLw, isjump, isbranch;
  int checks = 0, failures = 0;
  // {flags {isStype, isRtype, isItype, isLw, isjump, isbranch}, expected}
  logic [10:0] table_ [6] = '{
    {6'b000100, 5'b11110},   // lw:   ALUSrc RegWrite Mem2Reg MemRead
    {6'b100000, 5'b10001},   // sw:   ALUSrc MemWrite
    {6'b001000, 5'b11000},   // addi: ALUSrc RegWrite
    {6'b010000, 5'b01000},   // R:    RegWrite
    {6'b000001, 5'b00000},   // beq
    {6'b000010, 5'b00000}};  // jal
  always #5 clk = ~clk;

  yC2 dut (.ALUSrc(ALUSrc), .RegWrite(RegWrite), .Mem2Reg(Mem2Reg), .MemRead(MemRead),
           .MemWrite(MemWrite), .isStype(isStype), .isRtype(isRtype), .isItype(isItype),
           .isLw(isLw), .isjump(isjump), .isbranch(isbranch));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 6; i++) begin
      {isStype, isRtype, isItype, isLw, isjump, isbranch} = table_[i][10:5]; #1;
      checks++;
      if ({ALUSrc, RegWrite, Mem2Reg, MemRead, MemWrite} !== table_[i][4:0]) begin
        failures++;
        $display("FAIL flags %b controls %b expected %b", table_[i][10:5],
                 {ALUSrc, RegWrite, Mem2Reg, MemRead, MemWrite}, table_[i][4:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
