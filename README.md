# Two pipelined MIPS-subset processors

Overlapping the steps of consecutive instructions shortens the clock period, but an
instruction can then need a register that an older instruction, still in flight, has
not yet written. This RTL contains two small processors that show both sides of that
trade-off on the same integer instruction subset:

* **`mips5_core`: a five-stage pipeline** (fetch, decode, execute, memory, write-back)
  with separate instruction and data memories. It detects read-after-write hazards in
  decode and resolves them by **interlocking**: the dependent instruction waits in
  decode while bubbles flow down the pipe.
* **`princeton_core`: a two-stage "Princeton" machine.** Instructions and data share
  one memory. Fetch of the next instruction overlaps execution of the current one, and
  execution finishes within one cycle. The fetch stage gives way whenever the executing
  instruction needs the memory or changes the PC.

`pipelining_top` places the two machines side by side. They share only the clock; each
has its own reset, host ports into its memories and observation outputs.

## Instruction set

Both machines decode the same words, in standard MIPS-I formats. The opcode is in
`[31:26]`, rs in `[25:21]`, rt in `[20:16]`, rd in `[15:11]` and funct in `[5:0]`.
The all-zero word is the NOP, and any encoding not listed here also executes as a NOP.

| Class  | Instructions | Effect | Reads | Writes |
|--------|--------------|--------|-------|--------|
| ALU    | ADD ADDU SUB SUBU AND OR XOR NOR SLT SLTU SLLV SRLV SRAV | rd ← rs op rt (shifts: rt shifted by rs[4:0]) | rs, rt | rd |
| ALUi   | ADDI ADDIU SLTI SLTIU | rt ← rs op sext(imm) | rs | rt |
| ALUiu  | ANDI ORI XORI LUI | rt ← rs op zext(imm) (LUI: imm << 16) | rs | rt |
| LW     | LW | rt ← M[rs + sext(imm)] | rs | rt |
| SW     | SW | M[rs + sext(imm)] ← rt | rs, rt | – |
| BZ     | BEQZ (op 04) / BNEZ (op 05) | if rs == 0 / != 0: PC ← PC + (sext(imm) << 2) | rs | – |
| J, JAL | J (02), JAL (03) | PC ← {PC[31:28], target, 00}; JAL also r31 ← PC | – | r31 (JAL) |
| JR, JALR | JR, JALR (funct 08/09) | PC ← rs; JALR also r31 ← PC | rs | r31 (JALR) |

Arithmetic never traps, so ADD and ADDU behave the same. PC in the branch and link
rows is the address of the control-transfer instruction plus 4. Register r0 always
reads as zero, and writes to it are dropped.

## The five-stage pipeline and its interlock

### Datapath

Each stage has its own copy of the instruction register (`ir_d`, `ir_e`, `ir_m`,
`ir_w`) and decodes its own control from it.

| Stage | Work | Registers loaded at the clock edge |
|-------|------|------------------------------------|
| IF | `pc` addresses instruction memory | `ir_d`, `pc` ← pc+4 |
| ID | read rs/rt; extend the immediate; choose rt or imm for B | `a`, `b`, `md1` (store data), `ir_e` |
| EX | ALU: `a` op `b` | `y`, `md2`, `ir_m` |
| MA | data memory at `y`; SW writes `md2` | `r` (load data or `y`), `ir_w` |
| WB | write `r` to rd, rt or r31 | register file |

Both memories read combinationally, and a write takes effect at the clock edge. The
register file is written at the end of WB and has no write-to-read forwarding inside
it. A value written in cycle *t* can therefore be read in decode in cycle *t+1* at the
earliest.

### When to stall

A register conflict exists when the instruction in ID reads a register that an
instruction in EX, MA or WB will write. The small decoder `reg_use_dec` gives four
facts for any instruction word:

* `ws`, its destination: rd for ALU; rt for ALUi, ALUiu and LW; r31 for JAL and JALR.
* `we`, whether it writes: true for ALU, ALUi, ALUiu and LW when `ws` is not r0; always
  true for JAL and JALR; false otherwise.
* `re1`, whether it reads rs: every class except J and JAL.
* `re2`, whether it reads rt: ALU and SW.

`mips5_core` runs one copy of this decoder on each of `ir_d`, `ir_e`, `ir_m` and
`ir_w`. `stall_ctrl` then forms

```
stall = re1_D & ( we_E&(rs_D==ws_E) | we_M&(rs_D==ws_M) | we_W&(rs_D==ws_W) )
      | re2_D & ( we_E&(rt_D==ws_E) | we_M&(rt_D==ws_M) | we_W&(rt_D==ws_W) )
```

It also reports which stage or stages matched, on `hazard_o[2:0]`: bit 0 is EX, bit 1
is MA and bit 2 is WB. Because `we` is false when the destination is r0, an
instruction that writes r0 never makes its readers wait.

### What a stall does

While `stall` is high, `pc` and `ir_d` keep their values, so fetch and decode repeat.
A NOP is loaded into `ir_e` in place of the decoded instruction, and the stages after
decode keep advancing. The bubble clears the conflict one stage at a time. For the
pair

```
ADDI r1, r0, 10
ADDI r4, r1, 17
```

the second instruction sits in ID for cycles 2, 3 and 4. During those cycles the first
instruction is in EX, then MA, then WB. The second instruction reads r1 in cycle 5 and
reaches write-back three cycles later than it would without the dependence. In
general, with *e(i)* the cycle in which instruction *i* is in EX:

```
e(0) = 2
e(i) = max( e(i-1) + 1,  e(p) + 4 )   for the youngest earlier writer p of a source of i
```

An instruction's register write is visible on `rf_we_o`/`rf_ws_o`/`rf_wd_o` in cycle
*e(i)* + 2. The testbenches predict every write from this formula.

### Memory ordering

A store followed at once by a load of the same word needs no interlock. The store
writes the data memory at the end of its MA cycle, and the load reaches MA in the next
cycle.

### What this pipeline does not do

* It has no bypass (forwarding) paths. Every read-after-write dependence at a distance
  of one to three instructions costs stall cycles.
* It has no jump or branch hardware. BEQZ, BNEZ, J, JAL, JR and JALR take part in the
  interlock as decode sees them: a JR waits for its rs, and a JAL counts as a writer of
  r31. After that they enter EX as NOPs. They neither change the PC nor write r31.
  Programs for this core are straight-line code, and control hazards are not handled.
* Loads are not treated specially, since the only stall source is the interlock above.

## The Princeton machine

`princeton_core` keeps two registers between its stages, `pc` and `ir`. In each cycle
the shared memory is addressed by either `pc` (fetch) or the ALU result (a data access
by LW/SW). The instruction in `ir` is executed completely: register read, ALU,
optional memory access and register write. `princeton_ctrl` turns `ir` and the ALU's
zero test into the control points below.

| `ir` holds | Stall | IR ← | PC ← | Mem addr | Write-back |
|------------|-------|------|------|----------|------------|
| ALU | no | mem | pc+4 | pc | ALU → rd |
| ALUi / ALUiu | no | mem | pc+4 | pc | ALU (sext / zext imm) → rt |
| LW | yes | nop | pc (held) | ALU | mem → rt |
| SW | yes | nop | pc (held) | ALU | – (memory written) |
| BZ taken | yes | nop | branch target | pc | – |
| BZ not taken | no | mem | pc+4 | pc | – |
| J / JAL | yes | nop | jump target | pc | JAL: pc → r31 |
| JR / JALR | yes | nop | rs | pc | JALR: pc → r31 |

The stall signal and the IR source are always complements. On a stall the word on the
memory bus is either data or was fetched from the wrong address, so `ir` gets a NOP
and one cycle is lost. For LW and SW, `pc` still points at the instruction after the
load or store, which is fetched in the following cycle. An instruction takes one cycle,
or two if it is a load, a store, a jump or a taken branch. A program in which a
fraction *f* of instructions are of that kind runs at (1−f)+2f cycles per instruction.

The PC selection has two levels, following the control table. The first picks among
pc+4, the branch target, rs and the absolute jump target. The second either loads that
value or holds the current `pc`. Two assertions in the core check that a stall always
puts a NOP into IR and that a data access always stalls the fetch.

## Top level and memories

`pipelining_top` has these ports:

* **5-stage machine:** `f_rst`; host ports `f_imem_*` and `f_dmem_*`, each with
  address, write enable, write data and read data; `f_stall`; `f_hazard`; and the
  register-write observation `f_rf_we`, `f_rf_ws`, `f_rf_wd`.
* **Princeton machine:** `p_rst`; host port `p_mem_*`; `p_pc`; `p_ir`; `p_stall`;
  `p_rf_we`, `p_rf_ws`, `p_rf_wd`.

Every memory is a `word_mem`: a word array indexed by address bits `[AW+1:2]`, with a
combinational read and a write at the clock edge. Each also has a second host port. A
host write takes precedence over a processor write in the same cycle. The usual way to
use the top is to hold a machine in reset, load its memory through the host port,
release reset, and read results back through the host port afterwards.

| Parameter | Default | Meaning |
|-----------|---------|---------|
| `IMEM_WORDS` | 1024 | 5-stage instruction memory (words) |
| `DMEM_WORDS` | 1024 | 5-stage data memory (words) |
| `PMEM_WORDS` | 2048 | Princeton unified memory (words) |
| `RESET_PC` (cores) | 0 | PC after reset |

These sizes are choices made for simulation; nothing in the design depends on them.

## Files

| File | Contents |
|------|----------|
| `rtl/mips_pkg.sv` | types, opcodes, instruction classes, control-signal enums and structs, decode functions |
| `rtl/alu.sv` | ALU, including the zero test used by branches |
| `rtl/imm_ext.sv` | 16-bit immediate sign or zero extension |
| `rtl/gpr_file.sv` | 32×32 register file, two read ports and one write port, r0 fixed at zero |
| `rtl/word_mem.sv` | word memory with a host port |
| `rtl/reg_use_dec.sv` | source/destination register usage of an instruction |
| `rtl/stall_ctrl.sv` | the interlock equation |
| `rtl/mips5_core.sv` | five-stage pipeline |
| `rtl/princeton_ctrl.sv` | Princeton control table |
| `rtl/princeton_core.sv` | two-stage Princeton pipeline |
| `rtl/pipelining_top.sv` | both machines with their memories |
| `tb/mips_ref_pkg.sv` | instruction encoders, an instruction-level reference model, random program generators, the 5-stage timing model |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself with a
watchdog if the design hangs. The leaf modules are checked exhaustively or with
random vectors against independent expressions.

The core testbenches generate random programs with frequent register reuse and run
them on an instruction-level reference model. They check the following against the
design:

* the value and register of every register write;
* the cycle of every register write, using the *e(i)* recurrence for the pipeline and
  "1 + 1 per stalling instruction" for the Princeton machine;
* the total number of stall cycles;
* the final memory contents.

`tb_pipelining_top` runs both machines at the default sizes. It counts each mechanism
and fails if any of them never happened. For the pipeline these are stalls against EX,
MA and WB, stalls through rs and through rt, an r0 destination that causes no stall,
and a back-to-back store and load of one word. For the Princeton machine they are
stalls for LW, SW, taken branches, J, JAL, JR and JALR, plus untaken branches.

To run a testbench with Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/mips_pkg.sv tb/mips_ref_pkg.sv tb/tb_pipelining_top.sv \
    --top-module tb_pipelining_top -Mdir obj_top
./obj_top/Vtb_pipelining_top
```

Swap in any `tb_<module>.sv` for the last source file and top module. The other RTL
files are found through `-Irtl`. Add `+verilator+seed+<n>` at run time to get other
random programs.

## Where this design makes its own choices

* Binary encodings, the shift instructions, the exact ALU operations and BNEZ (beside
  BEQZ) are this design's own. The machines themselves are specified only at the level
  of instruction classes.
* Branch offsets are in words and relative to the address of the next instruction.
  Absolute jumps keep the top four bits of PC.
* Reset is synchronous and active high. It clears the PC to `RESET_PC`, every
  instruction register to NOP and all general registers to zero.
* Memory sizes, the host ports and the observation outputs were added so that the
  machines can be loaded and checked.
* The pipeline omits bypassing and control transfer, as described above. Adding
  forwarding paths from `y` and `r` into the ID operand muxes is the natural next step.
  The stall equation would then shrink to the load-use case.
