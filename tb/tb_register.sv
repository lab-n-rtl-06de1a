// tb_register: self-checking test of the enabled register.
// Loads random values with enable high and checks they appear after the
// rising edge; with enable low the old value must be held.
module tb_register;
  logic [31:0] q, d, model;
  logic clk = 0, enable;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  register dut (.q(q), .d(d), .clk(clk), .enable(enable));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    enable = 1; d = 32'h1234_5678;
    @(posedge clk); #1; model = 32'h1234_5678;
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      d = $urandom; enable = ($urandom % 3) != 0;
      @(posedge clk); #1;
      if (enable) model = d;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL q=%h expected %h (enable=%b)", q, model, enable);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
