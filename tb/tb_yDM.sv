// tb_yDM: self-checking test of the data-memory stage.
// Checks the loaded data words, that MemRead = 0 gives 0, and random
// stores followed by loads against a model kept here.
module tb_yDM;
  logic [31:0] memOut, exeOut, rd2;
  logic MemRead, MemWrite, clk = 0;
  logic [31:0] model [64];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  yDM dut (.memOut(memOut), .exeOut(exeOut), .rd2(rd2), .clk(clk),
           .MemRead(MemRead), .MemWrite(MemWrite));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    MemWrite = 0; MemRead = 1; rd2 = 0;
    exeOut = 32'h0; #1; check(memOut === 32'd4, "word 0");
    exeOut = 32'h4; #1; check(memOut === 32'd8, "word 1");
    exeOut = 32'h8; #1; check(memOut === 32'h12345678, "word 2");
    MemRead = 0; #1; check(memOut === 32'h0, "MemRead=0");
    // Stores into words 0x200..0x2ff (bytes 0x800..0xbff region, 64 words).
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      exeOut = 32'h800 + 32'(i) * 4; rd2 = $urandom; MemWrite = 1; MemRead = 0;
      model[i] = rd2;
      @(posedge clk); #1;
    end
    MemWrite = 0;
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      if ($urandom % 2) begin
        int i = $urandom % 64;
        exeOut = 32'h800 + 32'(i) * 4; rd2 = $urandom; MemWrite = 1; MemRead = 0;
        @(posedge clk); #1;
        model[i] = rd2; MemWrite = 0;
      end else begin
        int i = $urandom % 64;
        exeOut = 32'h800 + 32'(i) * 4; MemRead = 1; #1;
        check(memOut === model[i], $sformatf("load %h=%h expected %h", exeOut, memOut, model[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
