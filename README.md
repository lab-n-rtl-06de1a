# A single-cycle RV32 subset CPU whose control is built from gates

This is a 32-bit RISC-V processor that executes one instruction per clock
cycle and needs no help from outside to do it: every control signal of the
datapath is computed from the instruction word by four small combinational
units, and the address of the next instruction by a chain of three
multiplexers. The processor has no reset. Its only inputs are the clock, an
interrupt line `INT` and a 32-bit `entryPoint`. Holding `INT` high over a
rising clock edge makes `entryPoint` the next program counter. That single
mechanism starts a program and also switches to another one in the middle
of a run.

The design is a teaching-sized machine. It follows the structure of the
course exercise "Lab N: Automating the Control": a datapath of five units,
next-PC logic, and a control unit split into four parts, `yC1` to `yC4`.
The third part, `yC3`, is pure wiring and lives as one assignment in
`yChip`.
The parts that exercise only names or leaves open are filled in here with
the simplest logic that does the job. They are listed under
[Where this design chooses](#where-this-design-chooses).

## Instruction set

| class   | opcode    | instructions        | what happens                              |
|---------|-----------|---------------------|-------------------------------------------|
| load    | `0000011` | `lw`                | rd = mem[rs1 + imm]                        |
| I-type  | `0010011` | `addi`              | rd = rs1 + imm                             |
| R-type  | `0110011` | `add`, `and`, `or`  | rd = rs1 op rs2 (funct3 000, 111, 110)     |
| S-type  | `0100011` | `sw`                | mem[rs1 + imm] = rs2                       |
| SB-type | `1100011` | `beq`               | if rs1 == rs2: PC = PC + offset            |
| UJ-type | `1101111` | `jal`               | PC = PC + offset (no link register write)  |

Encodings are standard RV32I. The only things that are not standard are the
following:

- `jal` does not write `rd`. The datapath has no path from PC+4 to the
  register file, so use `jal x0, ...`.
- `funct7` is not decoded. `sub` therefore executes as `add`.
- Branch and jump offsets must be multiples of 4. This holds for any
  program without compressed instructions.
- Opcodes outside the table give undefined behaviour. The all-zero word
  decodes as `lw x0, 0(x0)`, which is harmless.

## Datapath

```
            +-----+   ins   +-----+ rd1,rd2,imm +-----+ exeOut +-----+ memOut +-----+
  PCin ---->| yIF |-------->| yID |------------>| yEX |------->| yDM |------->| yWB |--> wb
    ^       +-----+         +-----+             +-----+        +-----+        +-----+   |
    |        PC, PCp4        ^  branchImm,jImm    zero                                    |
    |                        +--------------------------------- wd <----------------------+
    +---- yPC <-- PC, PCp4, branchImm, jImm, zero, isbranch, isjump, INT, entryPoint
```

| unit   | file           | contents |
|--------|----------------|----------|
| `yIF`  | `rtl/yIF.sv`   | PC `register` (always enabled), instruction `mem` (always reading), `yAlu` fixed to add that forms PC+4 |
| `yID`  | `rtl/yID.sv`   | 32 x 32 register file (x0 reads 0), immediate extraction |
| `yEX`  | `rtl/yEX.sv`   | `ALUSrc` multiplexer (rd2 or immediate) and the ALU |
| `yDM`  | `rtl/yDM.sv`   | data `mem`: read with `MemRead`, write `rd2` with `MemWrite`, address = ALU result |
| `yWB`  | `rtl/yWB.sv`   | `Mem2Reg` multiplexer: loaded word or ALU result |
| `yPC`  | `rtl/yPC.sv`   | next-PC logic |
| `yC1`, `yC2`, `yC4` | `rtl/yC*.sv` | control unit (the `ALUop` wiring of part 3 is in `yChip`) |
| `yChip`| `rtl/yChip.sv` | the whole CPU (top) |

Shared leaf modules are `yAlu` (and 000, or 001, add 010, sub 110; other
codes give 0; `ex` flags a zero result), `yMux` (two-way, `z = c ? b : a`),
`register` (load enable, no reset) and `mem` (word memory). `cpu_pkg`
holds the opcodes and the ALU codes.

### Timing

The whole machine changes state on one edge, the rising edge of `clk`. At
that edge the PC takes `PCin`, the register file writes `wb` to `rd` if
`RegWrite` is set, and the data memory writes if `MemWrite` is set. Between
edges everything is combinational: fetch, decode, control, ALU, memory read,
write-back choice and the next PC. So the outputs `ins`, `rd2` and `wb`
describe the instruction that the next rising edge will complete. The
clock period must cover the longest of these paths. That path is `lw`:
instruction memory, register read, ALU, data memory, write-back mux, then
register file setup.

### Starting and switching programs

With no reset, the PC and the register file power up holding anything.
Both memories are cleared and then loaded from the image, so a PC that
points anywhere fetches either an image word or zero. A typical start:

```
entryPoint = 32'h28; INT = 1;   // before a rising edge
clk = 1; ... INT = 0;           // after it: PC = 0x28
```

The instruction that happens to be in flight during that first edge still
commits its writes. `INT` only redirects the PC and does not cancel
anything. Asserting `INT` later does the same thing in mid-program: the
current instruction completes and execution continues at `entryPoint`,
with registers and memory as they were. This is a context switch without
any state saving.

## Next-PC logic (`yPC`)

Three 2-way multiplexers in a chain, each able to override the previous one:

1. `PCp4`, or the branch target when `isbranch & zero`. This is a `beq`
   whose operands are equal, because the ALU subtracts them.
2. That result, or the jump target when `isjump`.
3. That result, or `entryPoint` when `INT`.

So the priority is INT > jal > taken beq > PC+4.

Both targets are formed the same way: an immediate shifted left by two and
added to `PC` by an ALU fixed to addition. The shift by two means `yID`
hands over offsets counted in words. RISC-V encodes B and J offsets in
half-words, with an implicit zero bit. `yID` therefore outputs the byte
offset divided by 4:

- `branchImm = sext({ins[31], ins[7], ins[30:25], ins[11:9]})`
- `jImm = sext({ins[31], ins[19:12], ins[20], ins[30:22]})`

Bit 1 of the offset, `ins[8]` or `ins[21]`, is dropped. It is always 0
for word-aligned code. The base of the addition is the address of the
branch itself (`PC`), as RISC-V requires. The exercise text names PC+4 in
one place and PC in others; see below.

## Control unit

The control is split the way a textbook single-cycle MIPS/RISC-V control is:

```
ins[6:0] --> yC1 --> class flags --> yC2 --> ALUSrc, RegWrite, Mem2Reg, MemRead, MemWrite
                      |   isjump, isbranch -----------------------------------------> yPC
                      +-- isRtype, isbranch --> (yC3) ALUop[1:0] --> yC4 --op[2:0]--> yEX
                                                      ins[14:12] ----^
```

### `yC1`: opcode to class

Bits 1:0 of every supported opcode are `11`. Within bits 6:2, each class is
recognised by a gate or two. These equations only distinguish the six
supported opcodes from each other and do not reject other codes:

| flag       | equation                          | why it works |
|------------|-----------------------------------|--------------|
| `isjump`   | `op[3]`                           | only `jal` (11011) has bit 3 set |
| `isLw`     | `~\|op[6:2]`                      | only `lw` (00000) has all zeros |
| `ISselect` | `^op[6:2]`                        | odd parity: `sw` 01000, `addi` 00100, but not `jal` 11011, R 01100 or beq 11000 |
| `isStype`  | `ISselect & op[5]`                | |
| `isItype`  | `ISselect & op[4]`                | |
| `isRtype`  | `op[5] & op[4]`                   | 01100 is the only class with both |
| `isbranch` | `op[6] & op[5] & ~op[3]`          | 11000 against `jal` 11011 |

The parity has to span all five bits. A parity over four bits, which is
what the exercise suggests, cannot keep `jal` from being taken for `sw` or
`addi`.

### `yC2`: class to datapath controls

| class | ALUSrc | RegWrite | Mem2Reg | MemRead | MemWrite |
|-------|:------:|:--------:|:-------:|:-------:|:--------:|
| lw    | 1 | 1 | 1 | 1 | 0 |
| sw    | 1 | 0 | 0 | 0 | 1 |
| addi  | 1 | 1 | 0 | 0 | 0 |
| R     | 0 | 1 | 0 | 0 | 0 |
| beq   | 0 | 0 | 0 | 0 | 0 |
| jal   | 0 | 0 | 0 | 0 | 0 |

The module takes all six class flags. `isjump` and `isbranch` do not
affect its outputs.

### `ALUop` and `yC4`: the ALU operation in two steps

The third part (yC3) cannot see `funct3`, so it only says what kind of
ALU use the instruction needs: `ALUop = {isRtype, isbranch}`, which gives
00 = add (address or `addi`), 01 = subtract (compare for `beq`) and
10 = "look at funct3". Since that is only wiring, it is an assignment in
`yChip`, not a module. `yC4`, the ALU control, turns this into the 3-bit ALU code:

| ALUop | funct3 | op  |
|-------|--------|-----|
| 00    | any    | 010 add |
| 01    | any    | 110 sub |
| 10    | 111    | 000 and |
| 10    | 110    | 001 or  |
| 10    | 000    | 010 add |

Eight gates do this (two NOT, two XOR, two AND, two OR). When ALUop is 00
or 01, the funct3 terms are masked off:

```
op[2] = ALUop[0] | (ALUop[1] & (f[2] ^ f[1]))
op[1] = ~ALUop[1] | ~f[1]
op[0] = ALUop[1] & (f[1] ^ f[0])
```

## Memory image and the demonstration program

Both memories are instances of `mem`. Each has `MEM_DEPTH` = 1024 words,
is byte-addressed, and ignores the upper address bits. Both are loaded
from `rtl/ram.dat`, one hex word per line, word *n* at byte address 4*n*.
The path is given relative to the directory the simulator is started in,
which should be the repository root. Set the `MEM_INIT` parameter of
`yChip` to use another image. Instruction and data memory are separate
copies, so stores never modify the program.

The image shipped here holds data words at 0x00 to 0x24 and a program at
0x28. The data words are 4 at 0x00, 8 at 0x04 and 0x12345678 at 0x08. The
program does the following:

1. It loads 4 and 8.
2. A loop of `add`/`addi`/`beq`/`jal` runs eight times. The `beq` is not
   taken seven times and taken once.
3. A few `or`/`and`/`add`/`addi` instructions combine the results.
4. It finishes with `sw x8, 32(x0)` (x8 = 36) and `sw x10, 36(x0)`
   (x10 = 15).
5. It then spins on `jal x0, 0`.

Entered at 0x28, the two stores are exactly the 42nd and 43rd
instructions. The end-to-end testbench prints them as

```
02802023: rd1= 0 rd2=36 exeOut= 32 zero=0 wb=32
02a02223: rd1= 0 rd2=15 exeOut= 36 zero=0 wb=36
```

These are the reference lines the exercise gives for its own program.

## Where this design chooses

The exercise describes yIF, yPC, yC1, the ALUop coding, yC4 and the yChip wiring in
detail. For yC2 it gives the function. For yID, yEX, yDM, yWB, the memory,
the register and the ALU it gives little more than the name and ports.
Choices made here:

- **No link write for `jal`.** RegWrite is 0 because the datapath has no
  PC+4 path into the register file.
- **Branch and jump targets are relative to PC, not PC+4.** The exercise's
  prose says PC+4 for the branch target, while its pseudo-code and comments
  add to the PC. PC is what RISC-V encodings need, and `yPC` has a PC
  input for it.
- **Offsets reach `yPC` divided by 4** (see above), so the "shift left
  twice" of the exercise produces true RISC-V targets.
- **Five-bit parity in `yC1`** instead of four bits (see above).
- **`yC2` has five outputs.** The exercise mentions "six control
  signals", but the signals it lists are these five.
- **Memory.** The depth of 1024 words, the clearing before loading, writes
  on the rising edge and a read output of 0 when not reading are all
  choices of this design. A misaligned store raises an assertion.
- **Register file.** x0 is hard-wired to 0, and writes happen on the
  rising edge.
- **ALU codes other than the four in the table** give 0.
- **The program image** is this design's own. It reproduces the reference
  output lines, but it is not the exercise's program, which is not
  published with it.
- `yChip` also checks, by assertion, that every supported opcode raises
  exactly one class flag.

## Simulating

Every module has a self-checking testbench, `tb/tb_<module>.sv`. Each one
ends with a `TB_RESULT checks=N failures=M` line. Run them from the
repository root, because the memory image path is relative:

```
verilator --binary --timing --assert -Irtl -Itb rtl/cpu_pkg.sv \
          tb/tb_yChip.sv --top-module tb_yChip -Mdir obj_yChip
./obj_yChip/Vtb_yChip
```

Replace `yChip` with any other module name for the unit tests. Add
`+verilator+rand+reset+2` to the run to start every register at a random
value. The CPU does not depend on power-up values.

- `tb_yChip` runs the CPU at its default parameters against an
  instruction-level model inside the testbench. The model loads the same
  image and checks PC, `ins`, `rd2` and `wb` every cycle. The test checks
  that the two stores are the 42nd and 43rd instructions, and checks the
  stored words in data memory. It then restarts the program by interrupt
  and interrupts it again inside the loop, with `entryPoint` = 0x48. It
  counts interrupts, taken and not-taken `beq`, `jal` and every ALU
  instruction kind, and fails if any of them never occurred.
- The control testbenches (`tb_yC1`, `tb_yC2`, `tb_yC4`) apply the full
  tables above.
- The datapath testbenches compare against values computed in the
  testbench, using random operands, offsets and register contents.

## Changing it

- **Another program:** write a hex image (at most `MEM_DEPTH` words) and
  point `MEM_INIT` at it. Start it by pulsing `INT` with `entryPoint` at
  its first instruction.
- **A bigger memory:** `MEM_DEPTH` must be a power of two.
- **A new instruction:** add its opcode to `cpu_pkg`, give `yC1` a flag
  for it, give `yC2` its controls, and extend the `ALUop` coding and `yC4` if it needs a
  new ALU operation. The yC1 equations are only valid for the opcode set
  they were designed for, so check them against every opcode again. The
  one-hot assertion in `yChip` catches mistakes when the new opcode is
  added to its list.
