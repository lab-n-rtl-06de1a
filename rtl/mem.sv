// mem: word-organised memory used both as instruction and as data memory.
//
// DEPTH 32-bit words, byte-addressed: word address[$clog2(DEPTH)+1:2] is
// used and the upper address bits are ignored (the memory repeats through
// the address space). Reading is combinational: memOut shows the addressed
// word while read is 1 and 0 otherwise. Writing is synchronous: on the
// rising edge of clk with write = 1 the addressed word takes memIn.
//
// At start-up every word is cleared and then INIT_FILE (hex, one word per
// line, word 0 first) is loaded, so the program and its data are in place
// before the first instruction is fetched; an empty INIT_FILE leaves the
// memory cleared. The port order (memOut, address, memIn, clk, read, write)
// and loading from ram.dat follow the lab's memory; the depth, the
// clearing and the write edge are this design's choices. Only whole-word,
// word-aligned accesses exist in this CPU; a misaligned write is flagged
// by an assertion.
module mem #(
  parameter int unsigned DEPTH     = 1024,
  parameter string       INIT_FILE = "rtl/ram.dat"
) (
  output logic [31:0] memOut,
  input  logic [31:0] address,
  input  logic [31:0] memIn,
  input  logic        clk,
  input  logic        read,
  input  logic        write
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [31:0]   arr [DEPTH];
  logic [AW-1:0] idx;

  assign idx = address[AW+1:2];

  initial begin
    for (int i = 0; i < DEPTH; i++) arr[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, arr);
  end

  always_ff @(posedge clk) begin
    if (write) arr[idx] <= memIn;
  end

  assign memOut = read ? arr[idx] : '0;

  a_aligned_write: assert property (@(posedge clk) write |-> address[1:0] == 2'b00)
    else $error("mem: misaligned write to %h", address);
endmodule
