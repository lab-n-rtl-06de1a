// tb_yIF: self-checking test of the fetch unit.
// Drives PCin, and after each rising edge checks that PC took it, that
// PCp4 = PC + 4, and that ins is the word of the demonstration image at PC.
module tb_yIF;
  logic [31:0] ins, PC, PCp4, PCin;
  logic clk = 0;
  int checks = 0, failures = 0;
  logic [31:0] image [27] = '{
    32'h00000004, 32'h00000008, 32'h12345678, 32'h0, 32'h0, 32'h0, 32'h0, 32'h0, 32'h0, 32'h0,
    32'h00002083, 32'h00402103, 32'h00000193, 32'h00000213, 32'h001181b3, 32'h00120213,
    32'h00220463, 32'hff5ff06f, 32'h0011e3b3, 32'h0033f4b3, 32'h00148433, 32'h00700513,
    32'h00256533, 32'h00802583, 32'h02802023, 32'h02a02223, 32'h0000006f};
  always #5 clk = ~clk;

  yIF dut (.ins(ins), .PC(PC), .PCp4(PCp4), .PCin(PCin), .clk(clk));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      PCin = (k % 3 == 0) ? 32'($urandom_range(0, 40)) * 4 : {$urandom} & ~32'h3;
      @(posedge clk); #1;
      checks++;
      if (PC !== PCin || PCp4 !== PCin + 32'd4) begin
        failures++;
        $display("FAIL PC=%h PCp4=%h expected %h", PC, PCp4, PCin);
      end
      checks++;
      if (PCin[31:2] % 1024 < 27) begin
        if (ins !== image[PCin[31:2] % 1024]) begin
          failures++; $display("FAIL ins@%h=%h", PC, ins);
        end
      end else if (ins !== 32'h0) begin
        failures++; $display("FAIL ins@%h=%h expected 0", PC, ins);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
