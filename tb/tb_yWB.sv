// tb_yWB: self-checking test of the write-back selection.
module tb_yWB;
  logic [31:0] wb, exeOut, memOut;
  logic Mem2Reg, clk = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  yWB dut (.wb(wb), .exeOut(exeOut), .memOut(memOut), .Mem2Reg(Mem2Reg));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 500; k++) begin
      exeOut = $urandom; memOut = $urandom; Mem2Reg = ($urandom % 2) == 1; #1;
      checks++;
      if (wb !== (Mem2Reg ? memOut : exeOut)) begin
        failures++; $display("FAIL Mem2Reg=%b wb=%h", Mem2Reg, wb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
