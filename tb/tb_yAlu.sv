// tb_yAlu: self-checking test of the 32-bit ALU.
// Applies random and corner operands under every supported op code and
// compares z and the zero flag with results computed here; unused op codes
// must give 0.
module tb_yAlu;
  import cpu_pkg::*;
  logic [31:0] a, b, z, exp_z;
  logic [2:0]  op;
  logic        ex;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  yAlu dut (.z(z), .ex(ex), .a(a), .b(b), .op(op));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [31:0] ta, tb_, input logic [2:0] top);
    a = ta; b = tb_; op = top; #1;
    case (top)
      3'b000:  exp_z = ta & tb_;
      3'b001:  exp_z = ta | tb_;
      3'b010:  exp_z = ta + tb_;
      3'b110:  exp_z = ta + ~tb_ + 32'd1;
      default: exp_z = 32'd0;
    endcase
    checks++;
    if (z !== exp_z || ex !== (exp_z == 32'd0)) begin
      failures++;
      $display("FAIL op=%b a=%h b=%h z=%h ex=%b expected %h", top, ta, tb_, z, ex, exp_z);
    end
  endtask

  initial begin
    for (int o = 0; o < 8; o++) begin
      apply(32'h0, 32'h0, 3'(o));
      apply(32'hffff_ffff, 32'h1, 3'(o));
      apply(32'h8000_0000, 32'h8000_0000, 3'(o));
      apply(32'd36, 32'd36, 3'(o));
      for (int k = 0; k < 200; k++) apply($urandom, $urandom, 3'(o));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
