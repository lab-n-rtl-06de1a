// tb_yEX: self-checking test of the execute stage.
// Random operands, immediates, ALU ops and ALUSrc; the expected result is
// computed here from the selected operand.
module tb_yEX;
  logic [31:0] z, rd1, rd2, imm, b, exp_z;
  logic [2:0] op;
  logic zero, ALUSrc, clk = 0;
  int checks = 0, failures = 0;
  logic [2:0] ops [4] = '{3'b000, 3'b001, 3'b010, 3'b110};
  always #5 clk = ~clk;

  yEX dut (.z(z), .zero(zero), .rd1(rd1), .rd2(rd2), .imm(imm), .op(op), .ALUSrc(ALUSrc));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      rd1 = $urandom; rd2 = $urandom; imm = $urandom;
      if (k % 5 == 0) rd2 = rd1;
      if (k % 7 == 0) imm = rd1;
      op = ops[$urandom % 4]; ALUSrc = ($urandom % 2) == 1;
      #1;
      b = ALUSrc ? imm : rd2;
      case (op)
        3'b000:  exp_z = rd1 & b;
        3'b001:  exp_z = rd1 | b;
        3'b010:  exp_z = rd1 + b;
        default: exp_z = rd1 - b;
      endcase
      checks++;
      if (z !== exp_z || zero !== (exp_z == 0)) begin
        failures++;
        $display("FAIL op=%b src=%b z=%h expected %h", op, ALUSrc, z, exp_z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
