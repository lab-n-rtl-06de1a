// tb_yID: self-checking test of the decode unit.
// Writes random values to random registers through the write port and
// reads them back through both read ports against a model register file
// (x0 must stay 0). Builds I-, S-, B- and J-format words from random
// offsets and checks imm, branchImm (offset/4) and jImm (offset/4).
module tb_yID;
  logic [31:0] rd1, rd2, imm, jImm, branchImm, ins, wd;
  logic RegWrite, clk = 0;
  logic [31:0] model [32];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  yID dut (.rd1(rd1), .rd2(rd2), .imm(imm), .jImm(jImm), .branchImm(branchImm),
           .ins(ins), .wd(wd), .RegWrite(RegWrite), .clk(clk));

  initial begin
    repeat (20000) @(posedge clk);
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
    logic [4:0] rd, r1, r2;
    int off, q;
    logic [12:0] b13;
    logic [20:0] j21;
    // Fill every register first so that the model is complete.
    RegWrite = 1;
    for (int r = 0; r < 32; r++) begin
      @(negedge clk);
      ins = {20'h0, 5'(r), 7'b0110011}; wd = $urandom;
      @(posedge clk); #1;
      model[r] = (r == 0) ? 32'h0 : wd;
    end
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      rd = 5'($urandom); r1 = 5'($urandom); r2 = 5'($urandom);
      RegWrite = ($urandom % 2) == 1; wd = $urandom;
      ins = {7'h0, r2, r1, 3'b000, rd, 7'b0110011};
      #1;
      check(rd1 === model[r1] && rd2 === model[r2],
            $sformatf("read x%0d=%h x%0d=%h", r1, rd1, r2, rd2));
      @(posedge clk); #1;
      if (RegWrite && rd != 0) model[rd] = wd;
    end
    RegWrite = 0;
    for (int k = 0; k < 500; k++) begin
      // I-type (addi/lw): immediate in ins[31:20].
      off = $signed(12'($urandom));
      ins = {12'(off), 5'($urandom), 3'b000, 5'($urandom), 7'b0010011}; #1;
      check(imm === 32'(off), $sformatf("I imm %h expected %h", imm, off));
      ins[6:0] = 7'b0000011; #1;
      check(imm === 32'(off), $sformatf("lw imm %h expected %h", imm, off));
      // S-type (sw).
      ins = {7'(off >> 5), 5'($urandom), 5'($urandom), 3'b010, 5'(off), 7'b0100011}; #1;
      check(imm === 32'(off), $sformatf("S imm %h expected %h", imm, off));
      // B-type (beq), word-aligned byte offset.
      off = $signed(13'($urandom)) & ~3;
      b13 = 13'(off);
      ins = {b13[12], b13[10:5], 5'($urandom), 5'($urandom), 3'b000, b13[4:1], b13[11], 7'b1100011}; #1;
      q = off / 4;
      check(branchImm === q, $sformatf("B imm %h for offset %0d", branchImm, off));
      // J-type (jal), word-aligned byte offset.
      off = $signed(21'($urandom)) & ~3;
      j21 = 21'(off);
      ins = {j21[20], j21[10:1], j21[11], j21[19:12], 5'($urandom), 7'b1101111}; #1;
      q = off / 4;
      check(jImm === q, $sformatf("J imm %h for offset %0d", jImm, off));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
