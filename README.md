# SMaRT — a 16-bit single-cycle teaching processor with a sorting coprocessor

SMaRT is a small 16-bit load/store processor whose instructions are all 16 bits
wide and complete in one clock cycle. Its register file has 16 registers,
which leaves little room in a 16-bit word. SMaRT uses two tricks to live with that:

* **2.5-address instructions.** A two-address ALU instruction (`Rd <= Rs op Rd`)
  normally overwrites one of its operands. In SMaRT the top bit of an R-type word
  (`cdr`) redirects the result to the register *right after* Rd. So
  `sub+ R3, R6` computes `R4 <= R6 - R3` and R3 survives, with no extra
  instruction and no wider word.
* **Hidden register MSBs in branches.** The MSB of each register field in a
  conditional branch is not encoded. It is taken from two flip-flops,
  `msbRs` and `msbRd`, which the last R-type or load/store/addi instruction left
  behind. A branch usually tests registers in the same half of the register file
  as the instruction before it, so this rarely costs anything. The two freed bits
  let the branch offset grow to 7 bits (±64 words). An explicit `sff`
  instruction sets the flip-flops when that guess is wrong.

This repository holds the whole system in synthesizable SystemVerilog:

* the processor;
* its board-level controls: a mode state machine with Init, Step and Run modes,
  manual memory inspection and display selection;
* a pipelined 32-key sorting coprocessor attached through memory-mapped I/O.

By default the memories hold a demonstration program. It sends 32 keys to the
coprocessor and stores them back in descending order.

## Instruction set

The OpCode is always bits 14:12.

| format | 15 | 14:12 | 11 | 10:8 | 7 | 6:4 | 3:0 |
|---|---|---|---|---|---|---|---|
| R-type | cdr | 000 | Rs[3] | Rs[2:0] | Rd[3] | Rd[2:0] | Function |
| LSI-type (addi, lw, sw) | c4 | op | Rs[3] | Rs[2:0] | Rd[3] | Rd[2:0] | c3..c0 |
| B-type (beq, bne) | o6 | op | o5 | Rs[2:0] | o4 | Rd[2:0] | o3..o0 |
| BL-type (baleq, balne) | 1 | op | 1 | Rs[2:0] | 1 | Rd[2:0] | 1111 — then a 16-bit offset word |

The 5-bit LSI constant is `{c4, c3..c0}`. The 7-bit branch offset is
`{o6, o5, o4, o3..o0}`. Both are sign-extended.

| OpCode | instruction | effect |
|---|---|---|
| 000 | R-type | `dest <= Rs op Rd`, where dest is Rd, or Rd+1 when cdr = 1 |
| 001 | addi | `Rd <= Rs + const` |
| 100 | lw | `Rd <= M[Rs + const]` |
| 101 | sw | `M[Rs + const] <= Rd` |
| 010 | beq | if `Rs == Rd`: `PC <= PC + 1 + offset` |
| 011 | bne | if `Rs != Rd`: `PC <= PC + 1 + offset` |
| 010, offset 0 | sff | `msbRs <= bit 10`, `msbRd <= bit 9` |
| 011, offset 0 | rtn | `PC <= R1` |
| 010, offset −1 | baleq | two words; if `Rs == Rd`: `R1 <= address after the offset word`, `PC <= that address + offset word` |
| 011, offset −1 | balne | same, on `Rs != Rd` |
| 110, 111 | — | unused; they execute as no-operation |

R-type functions: add `0000`, and `0001`, or `0010`, sub `1000`, nand `1001`,
nor `1010`, slt `1011`. All other codes act as add. Operand order matters for
two of them: `sub` gives `Rs − Rd` and `slt` gives `1` if `Rs < Rd`, comparing
signed values. In assembly the destination comes first, so `sub R3, R6` means
`R3 <= R6 − R3`.

The OpCodes and the code of `sub` come from published SMaRT machine code. The
other function codes, the signed comparison in `slt`, and treating opcodes
110/111 as no-operation are this implementation's choices.

### The 2.5-address incrementor

Only the three LSBs of Rd are incremented, and they wrap within their half.
Rd = `0111` gives destination `0000`, and Rd = `1111` gives `1000`. The increment
depends only on instruction bits, so it settles long before the ALU result. It
is not on the critical path: the write address is ready at the same time as in
a plain two-address write.

### msbRs / msbRd

These two flip-flops are in `smart_reg_decoder`. Each cycle, one of three things
happens to them:

* **R-type, addi, lw and sw** load them with their own bits 11 and 7, the MSBs
  of their Rs and Rd fields.
* **sff** loads them with its bits 10 and 9.
* **Anything else** leaves them unchanged.

A short or long branch builds its register addresses as `{msbRs, bits 10:8}`
and `{msbRd, bits 6:4}`. Every other instruction uses its own bits 11 and 7.
Programs have to respect this. For example, `bne R7, R0` written right after
`lw R6, 10(R7)` reaches R7 and R0 because the load left both flip-flops at 0.
After an instruction that touched R8–R15, the same encoding would test R15 and
R8. The processor testbench runs programs that branch in both halves.

### Long branches (baleq / balne)

The first word, a B-type word with offset −1, sets the one-bit cell
`balPrevious` in the control unit. The register comparison is made in that
same cycle, while the word holding the register fields is being executed, and is
kept in a second flip-flop. In the next cycle the fetched word is not decoded:

* the ALU computes `PC + 1` (operand m = PC, operand n = 1), which is the
  return address;
* if the branch is taken, that address is written to R1 and the PC loads
  `PC + 1 + offset word`;
* otherwise nothing is written and the PC simply steps past the offset word.

So a long branch always takes two cycles. A subroutine call is
`baleq R0, R0`, and the subroutine ends with `rtn`. R1 is otherwise an ordinary
register.

## Datapath and memory map

`smart_cpu` is one cycle per instruction:

```
PC -> instruction memory (256 x 16, async) -> control + register-address decoder
   -> register file (16 x 16, 2 async reads) -> ALU -> data memory (128 x 16, async read) -> register write
```

* ALU operand m is Rs. In the offset cycle of a long branch it is the PC.
* ALU operand n is Rd, the sign-extended constant, or 1.
* The ALU output is also the address bus `aBus`. The data memory uses its 7
  LSBs.
* Next PC is PC+1, or PC+1+offset on a taken branch, or R1 for `rtn`.
* **I/O is memory-mapped.** Any load or store whose address has bit 15 set is
  an I/O access:
  * a load raises `IORE` and takes its data from `dBusI`;
  * a store raises `IOWE`, puts Rd on `dBusO`, and does not write the data memory.
* Register write data is the ALU output, `dBusI`, or the data-memory output.

A store never writes memory in the same cycle as a long-branch offset word;
an assertion checks this.

## Operation modes

Three debounced pushbuttons (Run, GO, Step; 0 = pressed) drive the state
machine in `smart_mode_ctrl`. Its 8-bit state is shown on LEDs.

| state | meaning |
|---|---|
| 7F | Init mode, idle. This is the reset state. |
| 00 … 7E | Init copy. GO pressed in 7F starts it. One data-ROM word per cycle goes to the data memory at the address given by the state's 7 LSBs. 7E waits for GO to be released. |
| 80 → 81 → 82 | Step. A Step press goes to 80, which waits for the release. 81 enables the processor for exactly one cycle. 82 is the Step-mode rest state. |
| 83 → 84 | Run. A Run press goes to 83, which waits for the release. 84 enables the processor every cycle. |
| 85 | Stop. A GO press in Step or Run mode goes here, waits for the release, then returns to 7F. |

The whole system runs on one clock. The processor's state changes only in
cycles the mode controller enables: PC, registers, msb and long-branch cells,
data-memory stores and the I/O strobes. On a board the step clock would come
from a pushbutton; here it is an enable.

Three switches control inspection:

* **Manual mode (`sw17`).** The data-memory address comes from `sw_man_adrs`,
  and `disp_lo` shows that word.
* **`sw16`.** Selects whether `disp_hi` shows the current instruction or the PC.
* **Init copy.** During the copy, the copy address has priority over both.

The seven-segment decoders and LEDs are left to the board. The top module
outputs the 16-bit values and LED levels they show.

## The sorting coprocessor

The coprocessor (`sort_coprocessor`) has three parts:

* **Key shift register (`sort_shift_reg`).** 32 stages of `{valid, key}`. Each
  key written at the tail shifts the others along and is marked valid.
* **Sorting tree (`sort_tree`).** A binary tree of 31 identical sorting elements
  (`sorter2`) over the shift register, five levels deep.
* **Port logic.** Address decoding and the read multiplexer.

Each element holds one `{valid, key}` output register. It updates only in a
cycle where the tree's EN is high and its own output is either empty or being
taken by its parent. In such a cycle it takes the larger of its two valid
inputs (or the only valid one) and raises Write0 or Write1. That Write marks
the input it took as invalid, whether that input is a child element or a
shift-register stage. With no valid input, its output becomes empty. The root's
Read is tied to 1.

The tree is therefore a pipeline of one stage per level:

* after the shift register is full, the largest key reaches the root on the
  5th EN pulse (log2 32);
* each further pulse brings the next largest key;
* the root's valid bit drops after the last key.

An element refills in the same cycle its parent takes its output, so no
bubbles appear and keys come out one per pulse. With fewer than 32 keys the
empty stages simply never win. Ties take input 0. Keys compare as unsigned
16-bit numbers.

Port map, used with `lw` and `sw`:

| access | address | effect |
|---|---|---|
| `sw` | 0x8001 | write the key on `dBusO` to the tail of the shift register |
| `sw` | 0x8000 | clear every valid bit (shift register and tree) |
| `lw` | 0x8001 | read the root key **and** pulse EN once |
| `lw` | 0x8000 | read the status word `{15'b0, root valid}`, no pulse |

The read multiplexer looks only at address bit 0, as in the original drawing.

## Demonstration program

The instruction memory is preloaded with the program below. The data ROM holds:

* word 0: 0x8000;
* word 1: 32, the key count;
* word 2: 42, the output pointer;
* words 10..41: 32 keys.

The published program gives the keys only in their sorted order, so the
unsorted order in `smart_pkg::example_key` is arbitrary.

```
 0 sub  R0, R0           0x0008   R0 = 0
 1 lw   R2, 0(R0)        0x4020   R2 = 0x8000
 2 addi R1, R2, 1        0x1211   R1 = 0x8001
 3 sw   R2, 0(R2)        0x5220   clear sorter
 4 lw   R7, 1(R0)        0x4071   R7 = 32
 5 addi R7, R7, -1       0x977F
 6 lw   R6, 10(R7)       0x476A
 7 sw   R6, 0(R1)        0x5160   key -> sorter
 8 bne  R7, R0, 5        0xBF8C
 9 lw   R6, 0(R1)        0x4160   pulse sorter
10 lw   R6, 0(R2)        0x4260   status
11 beq  R6, R0, 9        0xAE8D
12 lw   R7, 2(R0)        0x4072   R7 = 42
13 lw   R6, 0(R1)        0x4160   sorted key (and pulse)
14 sw   R6, 0(R7)        0x5760
15 addi R7, R7, 1        0x1771
16 lw   R6, 0(R2)        0x4260   status
17 bne  R6, R0, 13       0xBE8B
18 beq  R0, R0, 17       0xA88E   idle (17 <-> 18)
```

To run it:

1. Press GO to copy the ROM.
2. Press Run.
3. After 309 instructions the program sits in the idle loop. Words 42..73 hold
   the keys in descending order, 0x7027 down to 0x0009.
4. Press GO to stop.
5. Read the results with `sw17` and `sw_man_adrs`.

## Module hierarchy

```
smart_system                  top: processor + coprocessor on the I/O bus
├── smart_cpu                 processor, memories, mode controller, display muxes
│   ├── smart_mode_ctrl       Init / Step / Run state machine
│   ├── smart_pc              PC, +1, branch adder, next-PC select
│   ├── smart_imem            256 x 16 instruction ROM (example program)
│   ├── smart_control         decoder, balPrevious cell
│   ├── smart_reg_decoder     register addresses, msbRs/msbRd, Rd+1
│   ├── smart_regfile         16 x 16 registers
│   ├── smart_alu             add sub and or nand nor slt, equality
│   ├── smart_init_rom        128 x 16 data ROM
│   └── smart_dmem            128 x 16 data memory
└── sort_coprocessor          port decode and read mux
    ├── sort_shift_reg        32-stage key register
    └── sort_tree             31 x sorter2
smart_pkg                     opcodes, function codes, control struct, default memory contents
```

The parameters and their defaults are:

* `smart_system`: `N_KEYS` = 32, `IM_WORDS` = 256, `DM_WORDS` = 128.
* `sort_tree`: `N` must be a power of two. An elaboration-time assertion checks
  this.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each prints one
line `TB_RESULT checks=N failures=M` and stops itself with a watchdog. Files in
`tb/` use the encoders in `tb/tb_smart_asm.sv`. For example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/smart_pkg.sv tb/tb_smart_asm.sv rtl/*.sv tb/tb_smart_system.sv \
  --top-module tb_smart_system -o sim
./obj_dir/sim
```

The testbenches are:

* **`tb_smart_system`.** Runs the demonstration end to end at the default sizes
  through the board controls: Init copy, three Step presses, Run, stop, and
  Manual read-back of all 32 results. It checks the 309-instruction count and
  the 37 EN pulses. It then loads a second program that sorts four keys using
  a subroutine (`baleq`, `rtn`), a not-taken `balne`, 2.5-address `add`/`sub`/`slt`,
  `sff` and a branch in the upper register half. It counts each mechanism and
  fails if one never occurs.
* **`tb_smart_cpu`.** Runs the processor in lockstep with an instruction-level
  model: a directed program plus 40 random programs of 300 cycles. It compares
  the PC, all registers, every I/O write and the final data memory.
* **`tb_sort_tree`.** Reproduces the 8-key walk-through (keys 5 12 6 3 2 9 1 15:
  15 at the root after three pulses) and random 32-key sets, including many
  equal keys.
* **The remaining testbenches** each exercise one unit against values computed
  in the testbench.

The testbenches load programs by writing `u_imem.mem[]` hierarchically.
Initialise anything the design reads: registers, the PC and the cells reset
with `pc_reset`, but the data memory starts undefined until Init.

## Where this implementation makes its own choices

The published description of SMaRT fixes the instruction formats, OpCodes, the
2.5-address and msb-flip-flop rules, the long-branch timing, the mode graph,
and the sorter's structure and port addresses. This RTL adds or differs in the
following:

* **Function codes** other than `sub`, signed `slt`, and opcodes 110/111 as
  no-operation.
* **`rtn` encoding.** `rtn` is `bne` with offset 0. The published text says
  only "B-type with offset 0"; its `sff` encoding shows the `beq` form, so the
  `bne` form is left for `rtn`. `rtn` reads R1 whatever its Rs field holds.
* **Long-branch condition.** It is held in an extra flip-flop beside
  `balPrevious`.
* **Clocking.** One clock plus an enable, instead of a pushbutton-generated
  clock. The processor runs in state 81 (one cycle per Step press) and in
  state 84.
* **Mode graph.** Buttons read as 0 = pressed. Arcs the drawing leaves
  unlabelled are interpreted: 7F→00 on GO, 82→80 on Step, 83→84 on release,
  staying put otherwise. Step beats Run, and Run beats GO.
* **Init copy covers words 0..126.** Word 127 of the data ROM is not copied.
  If the idle state 7F also copied, it would overwrite data word 127 and block
  Manual reads for as long as the machine idles.
* **Manual switch.** `sw17` overrides the data-memory address whatever the
  mode, exactly as the multiplexer is drawn. Leave it off while running.
* **Resets.** `pc_reset` clears the PC, registers, msb and long-branch cells
  and the mode controller, and puts the machine in state 7F. The sorter is
  cleared only by `sw 0x8000`. The data memory is not reset.
* **Memory sizes.**
  * Instruction memory: 256 words, from the 8-bit PC-to-memory bus of the
    datapath drawing.
  * Data memory: 128 words, from its 7-bit address and the 128-word data ROM.
* **Sorter details.** Unsigned key comparison; input 0 wins ties; Clear is
  synchronous and overrides EN; full 16-bit address compare for 0x8000/0x8001.
* **Not included.** A DMA channel between processor and sorter is mentioned in
  the original work but not described.
