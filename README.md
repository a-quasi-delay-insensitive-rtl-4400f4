# NCTUAC18: a dual-rail, quasi-delay-insensitive PIC18-compatible core

This is an 8-bit microcontroller core that runs a subset of the PIC18 instruction set. What
sets it apart is how it is built. It has no pipeline clock. Every value between stages travels
as a **dual-rail** word in a **4-phase handshake**, and every stage decides for itself when its
output is complete. The pipeline is a Muller pipeline: a chain of C-element latches that pass
tokens forward and acknowledges backward. The point is robustness: the circuit works whatever
the delay of its gates and wires. It needs no timing closure and keeps working when voltage or
temperature changes. The cost is area: about two wires per bit, plus completion detection.

The RTL here is synthesizable SystemVerilog. The original design was written as a gate-level
netlist. This version keeps its structure (latches, handshakes, completion detection,
DeMUX/MERGE pairs) but writes the datapath functions at register-transfer level. The
differences are listed in [Departures from the original design](#departures-from-the-original-design).

## Dual-rail words and the 4-phase handshake

Each bit is a pair of wires `(t, f)`:

| (t, f) | meaning |
|--------|---------|
| (0, 0) | null: no data (the spacer) |
| (1, 0) | valid 1 |
| (0, 1) | valid 0 |
| (1, 1) | never used |

A W-bit word is carried as two vectors, `x_t[W-1:0]` and `x_f[W-1:0]`. A word is **complete**
when every bit is valid (`&(x_t | x_f)`). It is **null** when every bit is (0,0). Every
transfer goes valid, then acknowledge, then null, then acknowledge released. So a stream of
data items is always interleaved with null words.

**C-element** (`c_element`). The output copies the two inputs when they agree and keeps its
old value when they differ: `y = ab + ay + by`.

**Pipeline latch** (`dr_latch`). This is one Muller pipeline stage. Each rail of each bit is a
C-element whose inputs are the incoming rail and the *inverted* acknowledge of the next stage.
A valid word is captured only while the next stage is empty. A null word is captured only
while the next stage is full. A completion detector over the stored word produces `ack_out`
for the previous stage: 1 means a valid word is held, 0 means the latch is null. The detector
is a C-element over the per-bit ORs, so it has hysteresis. It rises when all bits are valid
and falls only when all bits are null.

A chain of these latches moves items like this (V = valid item, N = null):

```
time   stage1 stage2 stage3 stage4
 T0      N      N      N      N        D0 waiting at the input
 T1      D0     N      N      N
 T2      N      D0     N      N        D1 waiting
 T3      D1     N      D0     N
 T4      N      D1     N      D0
```

Two different items are never in adjacent stages. So a 4-stage pipeline holds at most two
instructions at a time (50% occupancy). The core relies on this.

**Dual-rail OR gate** (`dr_or`). This gate is built from four C-elements:
`z.f = C(a.f, b.f)` and `z.t = C(a.t, b.f) | C(a.f, b.t) | C(a.t, b.t)`. Its output becomes
valid only when both inputs are valid. It returns to null only when both are null. The ALU
uses it for the inclusive OR.

**Dual-rail register** (`dr_reg`). This is a set/reset latch per bit: `t` sets, `f` clears,
and null leaves the value alone. So the value survives the null phase of the handshake. The
write acknowledge of a bit is `(din.t & q) | (din.f & ~q)`: "the value I was asked to store
is stored". A read gate turns the stored value into a valid dual-rail word while `read` is
high. Otherwise the output is null.

## The pipeline

```
        +-----------------------------------------------------+
        |                                                     |
        v                                                     |
   [PC latch] --> IF --> [IF/ID] --+--> ID --> [NPC latch] ---+
   (holds the    |        latch    |    |
    first token) |                 |    +--> [ID/OF] --> OF --> [OF/EX] --> EX/WB
            program memory         |          latch   |  ^      latch      |   |
                                   |                  |  |                 |   |
                          STATUS, top of stack        registers / data memory  |
                                                      <------- writes ---------+
```

* **PC loop.** The PC is itself a pipeline latch. At reset it holds one valid token,
  `{stall = 0, pc = 0}`; every other latch starts null. The token goes round the loop
  PC → IF → IF/ID → ID → NPC → PC, once per instruction. A 4-phase ring needs at least three
  latches to move one token. That is why an NPC latch sits between ID and the PC.
* **IF** (`if_stage`). The completion of the PC token is the *Read* signal. While it is high,
  the stage reads the program memory and sends `{stall, pc, w1, w0}` on. `w1` is the following
  word, for two-word instructions. When the IF/ID latch acknowledges, the PC latch returns to
  null and Read falls.
* **Fork at IF/ID.** The IF/ID latch feeds both the NPC latch and the ID/OF latch. A C-element
  joins their two acknowledges. So an instruction leaves IF/ID only when both have taken it.
* **ID** (`id_stage`). Instruction Decode produces the control word (`nctu_pkg::idof_t`).
  Branch Control evaluates the branch condition on STATUS. Stall Control and NPC Control
  produce the next PC.
* **OF** (`of_stage`). Forms the 12-bit file address (access bank or BSR bank, as PIC18 does).
  It reads the operand and selects the two sources, S1 and S2. It also resolves the
  destination (`nctu_pkg::ofex_t`).
* **EX/WB** (`exwb_stage`). Computes the result and writes it back. Its completion
  acknowledges the OF/EX latch.

### Why there are no data hazards

Operand fetch of instruction *i+1* must not start before instruction *i* has written its
result. Two rules guarantee this:

1. The OF/EX latch is acknowledged only when write-back has finished. Before that, the ID/OF
   latch cannot take *i+1*, because its next stage is still full.
2. EX/WB starts its writes only once the ID/OF latch has gone null (input `of_busy`).
   Without this rule, OF would still be looking at instruction *i* while its own result is
   being written. OF's output would then change under a full OF/EX latch.

So OF and EX/WB are never active at the same time, and no forwarding logic is needed. The
decode stage does run alongside EX/WB. That is why conditional branches need the next
mechanism.

### Two-pass conditional branches

A conditional branch in ID may be looking at a STATUS value that the instruction ahead of it
(now in EX/WB) has not written yet. So the branch is handled in two passes:

* **First pass.** The Stall bit in the PC token is 0. Stall Control makes NPC Control send the
  *same* PC again, with the Stall bit set. A no-op goes down the pipeline in place of the
  branch.
* **Second pass.** The refetch is possible only after the no-op has entered ID/OF. By then
  the previous instruction has completed write-back, so STATUS is current. Branch Control
  chooses taken (`pc + 2 + 2n`) or not taken (`pc + 2`). The Stall bit is cleared.

RETURN reads the return stack in ID, so it gets the same two-pass treatment. The "Stall
register" is the `stall` bit that travels in the PC token.

### EX/WB: DeMUX and MERGE

```
                +--> Rotate (ex_rot)   --+
 {op, status,   +--> ALU    (ex_alu)   --+             +--> data memory (byte / PRODH:PRODL)
  s2, s1} --DeMUX--> Multiply (ex_mul) --+--MERGE-----DeMUX--> WREG / BSR / STATUS / STKPTR
   by function  +--> bypass (pass s1)  --+   result    +--> none (bypass)
   code[1:0]                                 new STATUS -----> STATUS (flag update, in parallel)
                                             return addr -----> return stack (PUSH/CALL/RCALL)
```

A DeMUX steers the operands to one execution element; the others see null. The MERGE is the
OR of all element outputs plus completion detection. It knows the result is ready when the
merged word is complete, however long the chosen element took. The elements really do
differ in speed: inside the ALU, the inclusive OR goes through the C-element OR gates and
takes one tick longer than the other operations. The ALU is a DeMUX/MERGE pair itself.

Write-back is a second DeMUX/MERGE pair. The result goes to one destination. The flag update
of STATUS and the return-stack write run in parallel. `ack` rises only when every channel
this instruction uses has acknowledged. It falls once the input is null and every channel
acknowledge has fallen. When STATUS is itself the destination (for example `MOVWF STATUS`),
the written value wins over the flag update.

## Registers, memories and remapping

| storage | where | notes |
|---------|-------|-------|
| PC (21 bits) + Stall bit | PC latch | one token in the PC loop |
| WREG, BSR, STATUS, STKPTR | `reg_file`, one `dr_reg` each | own write port and acknowledge per register; no shared bus |
| return stack, 31 × 21 bits | `reg_file` | entry `STKPTR` is the top; entry 0 unused |
| program memory, 4096 × 16 | `prog_mem` | two words per read; loaded through the `ld_*` port |
| data memory, 4096 × 8 | `data_mem` | 12-bit physical address; PRODL/PRODH at FF3h/FF4h |

In PIC18, WREG, BSR, STATUS and STKPTR are memory-mapped. Here they are real registers. OF
redirects any source or destination at FE8h, FE0h, FD8h or FFCh to the register. So
`MOVF 0xE8,W` and `MOVFF 0x011, 0xFE8` work as on a PIC18. Other special-function
addresses are plain memory.

Stack operations run through the ALU. PUSH, CALL and RCALL read STKPTR as the operand, add 1,
write the new STKPTR, and store the return address at the new top. POP and RETURN subtract 1.

## Instruction set

* Byte-oriented: ADDWF, ADDWFC, ANDWF, CLRF, COMF, DECF, INCF, IORWF, MOVF, MOVWF, MULWF,
  NEGF, RLCF, RLNCF, RRCF, RRNCF, SETF, SUBFWB, SUBWF, SUBWFB, XORWF, MOVFF
* Bit-oriented: BCF, BSF, BTG
* Literal: ADDLW, SUBLW, MULLW, MOVLB, MOVLW, IORLW, ANDLW, XORLW
* Control: BC, BNC, BN, BNN, BOV, BNOV, BZ, BNZ, BRA, GOTO, CALL, RETURN, PUSH, POP, RCALL,
  NOP

Encodings and flag rules are those of PIC18. The FAST bit of CALL/RETURN is ignored. There
are no interrupts, skip instructions, table reads, FSR/indirect addressing or stack
overflow flags.

## Timing model

Every state-holding node (C-elements, completion detectors, register bits, write
acknowledges) is a flip-flop advanced by `clk`. `clk` stands for one gate delay. It is not a
pipeline clock: no stage waits for a clock edge to know that its data is ready. Every
hand-over is decided by completion detection. The only effect of the tick is that the delay
of each state-holding gate is one tick. All other logic is combinational between them. The
handshakes are built to be delay-insensitive, so the design intent is that any other delay
assignment gives the same results, only at a different speed. That has not been tested; see
[Verification status](#verification-status). The tick only makes the design simulate and
synthesize with ordinary cycle-based tools.

With this model, one instruction takes about 15–16 ticks, two-pass branches included. The
end-to-end test measured 1293 ticks for 73 instructions, 6361 for 409 and 15531 for 989.

`rst_n` is an active-low asynchronous reset. Load the program with `ld_we`/`ld_addr`/`ld_data`
while `rst_n` is low. Execution starts at address 0 when `rst_n` rises.

## Departures from the original design

* **Gate-level vs RTL.** The original builds everything from QDI gates. Here only the
  storage, latches, handshakes, completion detection and the ALU's OR path are gate-like.
  The stage functions (decode, address formation, ALU arithmetic, rotate, multiply) are
  combinational RTL. Each produces the dual-rail code of its result when its input word is
  complete, and null otherwise. This is safe because each function's inputs come from a
  single latch group with one completion detector. It is not a proof of QDI behaviour at the
  gate level.
* **The tick** described above replaces real gate delays.
* **Memories** are plain arrays with dual-rail handshake wrappers. The original does not
  describe their insides.
* **The Stall register.** The original's block diagram shows Stall as a register next to BSR,
  WREG, STATUS and STKPTR. Here it is one bit of the PC token. It is written by NPC Control
  and read by Stall Control, as before. Keeping it in the token means the refetched
  instruction and its stall state always arrive together, so no separate write handshake is
  needed.
* **Choices where the original is silent:** memory sizes; fetching two words at once; the
  extra NPC latch; the C-element join at the IF/ID fork; two-pass RETURN; the control-word
  encodings; the `of_busy` rule; the return stack; the PRODH:PRODL destination of
  multiplies.
* **CLRF.** The original's instruction table lists ANDWF twice. The second entry is taken to
  be CLRF, and CLRF is implemented.

## Files

| file | contents |
|------|----------|
| `rtl/nctu_pkg.sv` | shared types: control-word structs, encodings, PIC18 addresses |
| `rtl/c_element.sv` | C-element with reset |
| `rtl/dr_cd.sv` | completion detector |
| `rtl/dr_latch.sv` | dual-rail pipeline latch (with an assertion that no bit is ever (1,1)) |
| `rtl/dr_or.sv` | dual-rail OR gate |
| `rtl/dr_reg.sv` | dual-rail register |
| `rtl/prog_mem.sv`, `rtl/data_mem.sv` | memories |
| `rtl/reg_file.sv` | WREG, BSR, STATUS, STKPTR, return stack |
| `rtl/if_stage.sv`, `rtl/id_stage.sv`, `rtl/of_stage.sv`, `rtl/exwb_stage.sv` | the four stages |
| `rtl/ex_alu.sv`, `rtl/ex_rot.sv`, `rtl/ex_mul.sv` | execution elements |
| `rtl/nctuac18_core.sv` | top level |
| `tb/pic18_asm_pkg.sv` | instruction encoders and an independent instruction-set model |
| `tb/tb_*.sv` | one self-checking testbench per module, and `tb_nctuac18_core` for the whole core |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. The packages
must come first, and `nctu_pkg` must be listed only once:

```sh
verilator --binary --timing --assert -Irtl -Itb \
  rtl/nctu_pkg.sv tb/pic18_asm_pkg.sv $(ls rtl/*.sv | grep -v nctu_pkg) \
  tb/tb_nctuac18_core.sv --top-module tb_nctuac18_core -o sim
./obj_dir/sim
```

All sources build without warnings this way. For another testbench, change the last file
and the top module. The whole-core run takes well under a second.

Test programs are written in SystemVerilog with the encoder functions of `pic18_asm_pkg`
(`bo`, `fa7`, `bb`, `lit`, `bcc`, `bra`, `rcall`, `movlb`; see `tb_nctuac18_core`). To run your
own program, write its words into program memory through `ld_we`/`ld_addr`/`ld_data` while
`rst_n` is low. A reference model in the same package, class `iss`, runs the same words so
that the core's final state can be compared with it.

## Verification status

* `tb_nctuac18_core` runs the core at its default sizes. First it runs a directed program
  that uses every instruction in the list above: loops, branches on every condition, banked
  and remapped accesses, MOVFF, multiply, CALL/RCALL/RETURN and PUSH/POP. Then it runs a
  random 400-instruction program with forward conditional branches. Last it runs random
  subroutines with nested CALL/RCALL/RETURN, called from counted backward loops (about 1000
  executed instructions). After each program it compares WREG, BSR, STATUS, STKPTR and all
  of data memory with the reference model. It also checks that the number of fetches is one
  per instruction plus one per two-pass instruction.
* The same test counts each mechanism and fails if one never happened: first passes, taken
  and not-taken branches, every execution element, the OR-gate path, every write-back
  channel (including the parallel flag update and the return-stack write), remapped register
  sources and destinations, and results held back until OF had emptied.
* Every module has its own testbench. Each was shown to fail on a deliberately broken copy of
  its module.
* The random programs depend on the simulator seed (`+verilator+seed+N`). The test has
  passed with more than 120 different seeds. `+trace` prints every fetched PC and every PC
  of the reference model, to find where a failing run first diverges.
* Not verified: behaviour under arbitrary gate delays. That would need an event-driven
  gate-level model, which this RTL deliberately is not.
