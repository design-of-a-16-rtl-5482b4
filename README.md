# A three-cycle 16-bit RISC CPU for two-phase adiabatic logic

This is the register-transfer description of a small 16-bit load/store CPU
meant to be built in *two-phase drive adiabatic dynamic CMOS logic*
(2PADCL). In that circuit style each gate is powered not from a DC rail but
from a pair of complementary sinusoidal supply clocks; a gate evaluates while
its supply is in the "evaluate" part of the swing and keeps its output in the
"hold" part, and charge is recovered instead of being dumped to ground. The
published design reports roughly a quarter of the power of the same CPU in
static CMOS, at a top clock 20% lower (16 MHz against 20 MHz), from
transistor-level simulation.

None of that is visible at register-transfer level: the RTL here describes
the *logic* of the CPU, which is what both the adiabatic and the static
implementation share. What makes the architecture suit adiabatic logic is
that it is deliberately simple: no pipeline, one shared memory bus, and a
fixed three-step schedule per instruction, so few nodes switch per clock.

## The machine in one paragraph

Eight 16-bit registers `r0`-`r7`, a 16-bit program counter, and one memory
bus (`ADDRESS`, `DATA_IN`, `DATA_OUT`, `WE`) shared by instructions and
data, designed for an asynchronous static RAM. Instructions are one 16-bit
word. Only `LD` and `ST` touch memory. Every instruction takes exactly three
clocks. Words, not bytes, are addressed: the PC steps by 1.

## Instruction set

Format: `op[15:11] d[10:8] s[7:5] 00000` for register forms,
`op[15:11] d[10:8] N[7:0]` for immediate forms. `d` is both the first
source and the destination.

| op-code | mnemonic | effect |
|---|---|---|
| 00000 | MOV d,s | d = s |
| 00001 | AND d,s | d = d & s |
| 00010 | OR d,s | d = d \| s |
| 00011 | XOR d,s | d = d ^ s |
| 00100 | ADD d,s | d = d + s |
| 00101 | SUB d,s | d = d - s |
| 01000 | SL d,s | d = s << 1 (0 shifted in) |
| 01001 | SR d,s | d = s >> 1 (logical) |
| 01010 | RL d,s | d = {s[14:0], s[15]} |
| 01011 | RR d,s | d = {s[0], s[15:1]} |
| 01100 | SWP d,s | d = {s[7:0], s[15:8]} |
| 11101 | LHI d,N | d = {d[15:8], N} (replaces the low byte) |
| 11110 | LLI d,N | d = {N, d[7:0]} (replaces the high byte) |
| 10001 | ANDI d,N | d = d & {8'h00, N} |
| 10010 | ORI d,N | d = d \| {8'hFF, N} |
| 10011 | XORI d,N | d = d ^ {8'h00, N} |
| 10100 | ADDI d,N | d = d + N |
| 10101 | SUBI d,N | d = d - N |
| 10000 | LD d,s | d = MEM[s] |
| 11111 | ST d,s | MEM[s] = d |
| 01111 | JMP d | PC = d |
| 01110 | PCL d | d = PC (the address of the PCL itself) |
| 00110 | JZ d,s | PC = d if s == 0 |
| 00111 | JNZ d,s | PC = d if s != 0 |
| 10110 | JP d,s | PC = d if s >= 0 (signed) |
| 10111 | JM d,s | PC = d if s < 0 (signed) |

The six remaining op-codes (01101, 11000-11100) do nothing. A 16-bit
constant takes two instructions, e.g. `LLI r1,0x12 ; LHI r1,0x34` gives
`r1 = 0x1234`. Note the unusual `ORI`: it sets the whole high byte.
Carry and overflow are computed by the ALU but no instruction reads them;
conditional jumps test a register value, not a flag.

## The three-step instruction cycle

This is the heart of the design. A three-state sequencer, the clock control
unit (`ccu`), steps through three phases, one clock each. Call the rising
edges that end them (b), (c) and (a):

| step | ends at edge | what happens during the step | what the edge does |
|---|---|---|---|
| ID&EX | (b) | decoder holds the instruction; register file reads `d` and `s`; MUX1 picks the ALU's second operand; `ADDRESS` = register `s` (the load/store address) and, for `LD`, `DATA_IN` returns the data | ALU input register captures operands and op-code |
| WB | (c) | ALU result `out_d` is valid; `ST` drives it on `DATA_OUT` with `WE` = 1; the decoder evaluates the jump condition on register `s` | register `d` takes `out_d`; PC takes `out_d` (taken jump) or PC + 1 |
| IF | (a) | `ADDRESS` = PC; memory returns the next instruction on `DATA_IN` | decoder loads `DATA_IN` |

After reset the CCU sits in IF with PC = 0, so the first edge loads the word
at address 0. The enables the CCU drives are each high during the step that
ends with the edge at which their block acts: `IDU_en` and `MUX2_S` in IF,
`REG_en`, `PC_en` and the write window `we_t` in WB.

Three consequences that are easy to miss:

* **Every instruction writes register `d`.** The register file has only the
  sequencer's enable. Instructions that must change no register (`ST`, the
  jumps, unused op-codes) therefore make the ALU pass `d` through unchanged,
  so `d` is rewritten with its own value.
* **Jump targets travel through the ALU.** The PC's load input is the ALU
  result, so a jump passes register `d` through the ALU and the PC takes it
  at edge (c). The condition is evaluated in the decoder from the register
  file's `s` read port; register writes happen at the same edge, so the
  condition always sees the value from before the instruction.
* **`LD` is a single-cycle asynchronous read.** The load address is on the
  bus from the start of ID&EX, so the RAM must return data before edge (b),
  where the ALU captures it (MOV-style pass-through) for write-back at (c).
  `ADDRESS` shows the load/store address for the whole of ID&EX and WB even
  for instructions that do not use memory; only `WE` qualifies a write.

`WE = we_t & we_en`: the CCU's write window and the decoder's "this is a
store". The RAM is expected to write at edge (c), while `WE` is high.
An assertion in the top module checks that `WE` is high only in WB.

## Blocks

Connections:

* `RESET` goes to the CCU and the PC only.
* The CCU drives `IDU_en` (decoder), `REG_en` (register file), `PC_en`
  (PC), `MUX2_S` (address multiplexer) and `we_t` (write window).
* `DATA_IN` feeds the decoder (instructions) and MUX1 (load data).
* The decoder drives the register selects `d_S` and `s_S`, the ALU op-code
  `ALU_S`, the MUX1 select, the immediate `s3`, `jmp` to the PC and
  `we_en`.
* The register file's `s` port (`s0`) feeds MUX1, MUX2 and the decoder; its
  `d` port feeds the ALU's first operand.
* MUX1 (register `s`, `DATA_IN`, PC, immediate) feeds the ALU's second
  operand; MUX2 (PC, register `s`) drives `ADDRESS`.
* The ALU result `out_d` feeds the register file, the PC and `DATA_OUT`.


| module | role |
|---|---|
| `adiabatic_risc_cpu` | top level: wiring of the blocks below, `WE` gate |
| `ccu` | three-step sequencer, all enables |
| `program_counter` | 16-bit PC: increment or load at the end of WB |
| `regfile` | 8 x 16-bit; read/write port on `d`, independent read port on `s` (`s0`) |
| `idu` | instruction register and decoder: register selects, ALU op, MUX1 select, immediate, `jmp`, `we_en` |
| `mux1` | ALU second operand: register `s`, `DATA_IN`, PC or immediate |
| `mux2` | memory address: PC in IF, register `s` otherwise |
| `alu` | input register, then `alu_arith`, `alu_logic`, `alu_shift` in parallel and an output multiplexer |
| `alu_arith` | add/subtract with carry in; carry (borrow on subtract) and signed-overflow flags |
| `alu_logic` | AND/OR/XOR, pass-through of either operand, byte merges for `LHI`/`LLI` |
| `alu_shift` | one-place shifts and rotates, byte swap, shift-carry flag |
| `risc_pkg` | op-codes, ALU op-codes, MUX1 selects, sequencer states |

The ALU's input register clocks on every edge; only the value captured at
(b) matters. Its carry input is tied to 0 in the CPU. The top level brings
the three flags out as `alu_flags = {overflow, carry, shift_carry}`,
meaningful during WB; the CPU does not store them.

## Where this RTL departs from, or fills in, the original description

The original description is brief and in places contradicts itself. These
are the readings taken:

* **Width.** The description says once that the datapath was reduced to
  8 bits and that the PC holds an 8-bit register, but its instruction table
  (`s[15]`, byte swap), its register file ("8 registers of 16-bit") and its
  block diagram (16-bit buses) are all 16-bit. This RTL is 16-bit throughout.
* **Jump fields.** The jumps use the register format: target `d` in
  [10:8], tested register `s` in [7:5].
* **LHI/LLI** follow the operations printed in the instruction table
  (LHI writes the low byte, LLI the high byte), although the names suggest
  the reverse. **ORI** uses `{8'hFF, N}` as printed.
* **Shifts** move by one place, as in the table, though the prose speaks of
  shifts "by a variable distance".
* **MUX1** is described in words borrowed from a design with an instruction
  cache; here it has the four inputs of the block diagram and feeds the ALU.
  **MUX2** has the two inputs of the block diagram (PC, register `s`).
* **Reset** reaches only the CCU and the PC, as in the block diagram. The
  register file and decoder start undefined; software must write a register
  before reading it.
* Encodings of the ALU op-code, MUX1 select and sequencer state, the flag
  definitions (borrow polarity, shift carry = bit shifted out) and the
  treatment of unused op-codes are this design's choices.
* The circuit level (2PADCL gates, the two-phase sinusoidal power clocks,
  power and frequency figures) is not modelled.

## Verification

Every module has a self-checking testbench in `tb/` named `<module>_tb`
(the top's is `cpu_tb`). Each compares against values computed
independently in the testbench, has a watchdog, and ends with a line
`TB_RESULT checks=N failures=M`.

`cpu_tb` runs the CPU against `sram_model` (a behavioural 64K x 16
asynchronous-read RAM) and an instruction-set reference model, in lockstep:
after each instruction it compares the PC and all eight registers; during
each step it checks the address bus (PC in IF, `s` in ID&EX for loads and
stores), that `WE` and the PC change only in their step, the store address
and data, and the ALU flags. It first runs a loop that sums a five-word
array (checked against a sum computed in the testbench), then eight runs of
2,500 instructions over memory filled with random words, so every op-code,
taken and untaken jumps, loads, stores and every flag occur. It fails if
any of these never happened. About 20,000 instructions run in well under a
second.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/risc_pkg.sv tb/cpu_tb.sv \
          --top-module cpu_tb -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Replace `cpu_tb` with any other testbench name. `+verilator+rand+reset+2`
starts un-reset state at random values, which is how the register file's
lack of reset is exercised.
