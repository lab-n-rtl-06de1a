// tb_yPC: self-checking test of the next-PC logic.
// Random PC, offsets and entry points under every combination of INT,
// isbranch, isjump and zero; the expected next PC follows the priority
// INT > jump > taken branch > PC+4, targets being PC + 4*offset.
module tb_yPC;
  logic [31:0] PCin, PC, PCp4, entryPoint, branchImm, jImm, exp_pc;
  logic INT, zero, isbranch, isjump, clk = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  yPC dut (.PCin(PCin), .PC(PC), .PCp4(PCp4), .INT(INT), .entryPoint(entryPoint),
           .branchImm(branchImm), .jImm(jImm), .zero(zero), .isbranch(isbranch),
           .isjump(isjump));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 3200; k++) begin
      {INT, isbranch, isjump, zero} = 4'(k);
      PC = {$urandom} & ~32'h3; PCp4 = PC + 32'd4;
      entryPoint = $urandom;
      branchImm = $signed(11'($urandom));
      jImm = $signed(19'($urandom));
      #1;
      if (INT)                   exp_pc = entryPoint;
      else if (isjump)           exp_pc = PC + jImm * 4;
      else if (isbranch && zero) exp_pc = PC + branchImm * 4;
      else                       exp_pc = PC + 4;
      checks++;
      if (PCin !== exp_pc) begin
        failures++;
        $display("FAIL INT=%b br=%b j=%b z=%b PC=%h PCin=%h expected %h",
                 INT, isbranch, isjump, zero, PC, PCin, exp_pc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
