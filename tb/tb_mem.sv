// tb_mem: self-checking test of the word memory.
// Checks the loaded image (the first words of the demonstration program),
// that read = 0 gives 0, that high address bits are ignored, and that
// random word writes read back against a shadow copy kept here.
module tb_mem;
  localparam int DEPTH = 1024;
  logic [31:0] memOut, address, memIn;
  logic clk = 0, read, write;
  logic [31:0] shadow [DEPTH];
  logic        written [DEPTH];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  mem dut (.memOut(memOut), .address(address), .memIn(memIn), .clk(clk),
           .read(read), .write(write));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_word(input logic [31:0] addr, input logic [31:0] exp);
    address = addr; read = 1; #1;
    checks++;
    if (memOut !== exp) begin
      failures++;
      $display("FAIL read %h: %h expected %h", addr, memOut, exp);
    end
  endtask

  initial begin
    write = 0; read = 1; memIn = 0; address = 0;
    // Image: word 0 = 4, word 1 = 8, 0x28 = lw x1,0(x0), 0x68 = halt, rest 0.
    expect_word(32'h00, 32'h0000_0004);
    expect_word(32'h04, 32'h0000_0008);
    expect_word(32'h28, 32'h0000_2083);
    expect_word(32'h68, 32'h0000_006f);
    expect_word(32'h6c, 32'h0000_0000);
    expect_word(32'hffc, 32'h0000_0000);
    expect_word(32'h1000 + 32'h28, 32'h0000_2083);   // address wraps
    address = 32'h28; read = 0; #1;
    checks++;
    if (memOut !== 32'h0) begin failures++; $display("FAIL read=0 gives %h", memOut); end

    for (int i = 0; i < DEPTH; i++) written[i] = 1'b0;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      address = {20'h0, 10'($urandom), 2'b00};
      memIn = $urandom;
      write = ($urandom % 2) == 1;
      read = 1;
      #1;
      if (!write && written[address[11:2]]) begin
        checks++;
        if (memOut !== shadow[address[11:2]]) begin
          failures++;
          $display("FAIL read %h: %h expected %h", address, memOut, shadow[address[11:2]]);
        end
      end
      @(posedge clk); #1;
      if (write) begin
        shadow[address[11:2]] = memIn;
        written[address[11:2]] = 1'b1;
        write = 0; #1;
        checks++;
        if (memOut !== shadow[address[11:2]]) begin
          failures++;
          $display("FAIL after write %h: %h expected %h", address, memOut, shadow[address[11:2]]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
