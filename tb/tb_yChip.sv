// tb_yChip: end-to-end test of the CPU at its default parameters.
//
// The CPU runs the demonstration program of its memory image. An
// instruction-level model in this testbench, loaded with the same image,
// executes alongside and after every cycle the testbench compares the
// fetched instruction, the PC, rd2 (for instructions that read rs2) and the
// write-back value (for instructions whose result is defined).
//
// Run 1 starts the program by interrupt at 0x28 and runs 43 cycles: the
// program ends with sw x8,32(x0) (x8 = 36) and sw x10,36(x0) (x10 = 15),
// which must be the 42nd and 43rd instructions, with rd1 = 0, zero = 0 and
// exeOut = wb = the store address. Run 2 restarts the program by
// interrupt, interrupts it again inside its loop with entry point 0x48 and
// lets it run to the final self-loop. The data words stored by the program
// are then checked in the data memory. Every instruction kind, a taken and
// a not-taken beq, and the interrupt must each have been seen.
module tb_yChip;
  logic [31:0] ins, rd2, wb, entryPoint;
  logic INT, clk;
  int checks = 0, failures = 0;

  yChip dut (.ins(ins), .rd2(rd2), .wb(wb), .entryPoint(entryPoint), .INT(INT), .clk(clk));

  // ---------------- reference model ----------------
  logic [31:0] m_mem [1024];
  logic [31:0] m_reg [32];
  logic        m_ok  [32];    // register holds a value the model knows
  logic [31:0] m_pc;
  int n_int = 0, n_taken = 0, n_nottaken = 0, n_jal = 0, n_lw = 0, n_sw = 0;
  int n_addi = 0, n_add = 0, n_and = 0, n_or = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Compare the DUT's current cycle with the model, then advance the model.
  // int_next tells whether INT will be high at the coming rising edge.
  task automatic compare_and_step(input logic int_next, input logic [31:0] ep);
    logic [31:0] w, a, b, iimm, simm, bimm, jimm, res, nextpc;
    logic [4:0] rs1, rs2, rd;
    logic aok, bok;
    w = m_mem[m_pc[11:2]];
    rs1 = w[19:15]; rs2 = w[24:20]; rd = w[11:7];
    a = m_reg[rs1]; b = m_reg[rs2]; aok = m_ok[rs1]; bok = m_ok[rs2];
    iimm = {{20{w[31]}}, w[31:20]};
    simm = {{20{w[31]}}, w[31:25], w[11:7]};
    bimm = {{19{w[31]}}, w[31], w[7], w[30:25], w[11:8], 1'b0};
    jimm = {{11{w[31]}}, w[31], w[19:12], w[20], w[30:21], 1'b0};
    nextpc = m_pc + 4;
    check(dut.myIF.PC === m_pc, $sformatf("PC %h expected %h", dut.myIF.PC, m_pc));
    check(ins === w, $sformatf("ins %h expected %h at %h", ins, w, m_pc));
    case (w[6:0])
      7'b0000011: begin                                    // lw
        n_lw++;
        if (aok) begin
          res = m_mem[(a + iimm) >> 2];
          check(wb === res, $sformatf("lw wb %h expected %h", wb, res));
          if (rd != 0) begin m_reg[rd] = res; m_ok[rd] = 1; end
        end else if (rd != 0) m_ok[rd] = 0;
      end
      7'b0100011: begin                                    // sw
        n_sw++;
        if (bok) check(rd2 === b, $sformatf("sw rd2 %h expected %h", rd2, b));
        if (aok) begin
          check(wb === a + simm, $sformatf("sw wb %h expected %h", wb, a + simm));
          m_mem[(a + simm) >> 2] = b;
        end
      end
      7'b0010011: begin                                    // addi
        n_addi++;
        res = a + iimm;
        if (aok) check(wb === res, $sformatf("addi wb %h expected %h", wb, res));
        if (rd != 0) begin m_reg[rd] = res; m_ok[rd] = aok; end
      end
      7'b0110011: begin                                    // add, and, or
        case (w[14:12])
          3'b000:  begin res = a + b; n_add++; end
          3'b111:  begin res = a & b; n_and++; end
          default: begin res = a | b; n_or++;  end
        endcase
        if (bok) check(rd2 === b, $sformatf("R rd2 %h expected %h", rd2, b));
        if (aok && bok) check(wb === res, $sformatf("R wb %h expected %h", wb, res));
        if (rd != 0) begin m_reg[rd] = res; m_ok[rd] = aok && bok; end
      end
      7'b1100011: begin                                    // beq
        if (bok) check(rd2 === b, $sformatf("beq rd2 %h expected %h", rd2, b));
        if (a == b) begin nextpc = m_pc + bimm; n_taken++; end
        else n_nottaken++;
      end
      7'b1101111: begin                                    // jal (no link write)
        n_jal++;
        nextpc = m_pc + jimm;
      end
      default: check(1'b0, $sformatf("unexpected instruction %h at %h", w, m_pc));
    endcase
    if (int_next) begin nextpc = ep; n_int++; end
    m_pc = nextpc;
  endtask

  // One clock cycle as the lab drives it: rise, drop INT, fall.
  task automatic cycle();
    clk = 1; #1; INT = 0;
    clk = 0; #1;
  endtask

  initial begin
    repeat (5000) #2;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) m_mem[i] = 32'h0;
    $readmemh("rtl/ram.dat", m_mem);
    for (int i = 0; i < 32; i++) begin m_reg[i] = 32'h0; m_ok[i] = (i == 0); end
    clk = 0;

    // ---- Run 1: start at 0x28 by interrupt, 43 instructions ----
    entryPoint = 32'h28; INT = 1; #1;
    m_pc = 32'h28; n_int++;
    for (int k = 1; k <= 43; k++) begin
      cycle();
      $display("%h: rd1=%2d rd2=%2d exeOut=%3d zero=%0d wb=%2d",
               ins, dut.rd1, rd2, dut.exeOut, dut.zero, wb);
      if (k == 42) check(ins === 32'h02802023 && rd2 === 32'd36 && wb === 32'd32,
                         "instruction 42 is not sw x8 with rd2=36 wb=32");
      if (k >= 42) check(dut.rd1 === 32'd0 && dut.exeOut === wb && dut.zero === 1'b0,
                         "final stores: rd1, exeOut or zero");
      if (k == 43) check(ins === 32'h02a02223 && rd2 === 32'd15 && wb === 32'd36,
                         "instruction 43 is not sw x10 with rd2=15 wb=36");
      compare_and_step(1'b0, 32'h0);
    end
    repeat (3) begin cycle(); compare_and_step(1'b0, 32'h0); end  // halt loop
    check(ins === 32'h0000006f, "halt loop not reached");
    check(dut.myDM.dataMem.arr[8] === 32'd36 && dut.myDM.dataMem.arr[9] === 32'd15,
          "stored words 8 and 9");

    // ---- Run 2: restart, then switch context in the middle of the loop ----
    entryPoint = 32'h28; INT = 1;
    // The model's step for the current (halt) cycle takes the interrupt.
    compare_and_step(1'b1, 32'h28);
    for (int k = 0; k < 12; k++) begin
      cycle();
      if (k == 11) begin
        entryPoint = 32'h48; INT = 1;
        compare_and_step(1'b1, 32'h48);
      end else compare_and_step(1'b0, 32'h0);
    end
    for (int k = 0; k < 12; k++) begin cycle(); compare_and_step(1'b0, 32'h0); end
    check(ins === 32'h0000006f, "halt loop not reached after the context switch");
    check(dut.myDM.dataMem.arr[8] === m_mem[8] && dut.myDM.dataMem.arr[9] === m_mem[9],
          "stored words after the context switch");

    // ---- every mechanism must have happened ----
    $display("interrupts=%0d beq-taken=%0d beq-not-taken=%0d jal=%0d lw=%0d sw=%0d addi=%0d add=%0d and=%0d or=%0d",
             n_int, n_taken, n_nottaken, n_jal, n_lw, n_sw, n_addi, n_add, n_and, n_or);
    check(n_int >= 3, "interrupt / context switch never seen");
    check(n_taken > 0, "taken beq never seen");
    check(n_nottaken > 0, "not-taken beq never seen");
    check(n_jal > 0 && n_lw > 0 && n_sw > 0 && n_addi > 0, "jal/lw/sw/addi not all seen");
    check(n_add > 0 && n_and > 0 && n_or > 0, "add/and/or not all seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
