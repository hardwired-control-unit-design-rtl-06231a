# LC-3 multi-cycle hardwired control unit

A processor's control unit repeats two jobs forever: it fetches an instruction, then it
executes it. This design does both for the LC-3 instruction set, with only a few pieces
of hardware:

- a **3-bit binary counter** instead of a state register,
- a **128 × 29-bit control ROM** in place of hand-minimised control logic,
- three small gates outside the ROM.

No instruction needs more than eight states. Fetch takes three states. The longest
execute sequences, LDI and STI, take five. So a counter that runs 0…7 can name every
state, and the state after the current one is simply "count + 1". The control logic
never has to compute a next state. It only turns {counter, instruction bits, status}
into control signals. This is *multi-cycle hardwired control*.

Two inputs of the counter let instructions differ in length and cope with a memory
slower than the clock:

| counter input | effect at the next clock edge | used for |
|---|---|---|
| RESET | count becomes 0, which starts the next fetch | ending an instruction early (ADD needs 1 execute state, not 5); skipping the PC update of an untaken branch |
| PAUSE | count is held | repeating a memory state until memory signals ready (R) |

There is no decode state. After the third fetch state, IR holds the instruction, and the
control logic reads the opcode straight from IR.

## Structure

```
            RESET  PAUSE
              |      |
         +----v------v----+ step[2:0]
         |  step_counter  |-----------+
         +----------------+           |        +-------------+
                                      +------->|             |
   bus ---->[ IR  load_register ]--IR[15:12]-->| control_rom |--> ctrl (29 bits)
                                               |  128 x 29   |    to the datapath
   pc_mux -->[ PC load_register ]--> PC        +-------------+
      ^                                               |
      |  PC+1 / bus / adder / SR1           wait_mem, br_reset, inst_done, ir11_pcmux
      |                                               |
      +--- select <-- IR[11] -- ir11_pcmux            |
   PAUSE = !R & wait_mem              RESET = inst_done | !BEN & br_reset
```

Modules in `rtl/`:

| module | role |
|---|---|
| `lc3_ctrl_pkg` | control-word struct, multiplexer encodings, opcodes, step numbers |
| `step_counter` | the counter; PAUSE holds it, RESET clears it, otherwise it counts up and wraps |
| `load_register` | load-enable register, instantiated as IR (loaded from the bus) and PC (loaded from the PCMUX) |
| `control_rom` | 2^7 × 29-bit ROM, address {counter, IR[15:12]} |
| `pause_logic` | PAUSE = !R & WAIT-MEM |
| `reset_logic` | RESET = INST-DONE \| !BEN & BR-RESET |
| `pc_mux` | four-input PCMUX (PC+1, bus, adder, SR1) with the IR[11] select for JSR/JSRR |
| `lc3_control_unit` | the top: all of the above wired together |

The LC-3 datapath is not part of the RTL. That is the register file, ALU, address adder,
MAR, MDR, condition codes, BEN register and bus. Memory is not part of it either. Both
connect through the top's ports. `tb/` holds behavioural models of both, used to
simulate the control unit running real programs.

## Why the ROM has only 7 address bits

The first thing you would write is a ROM addressed by everything the state logic looks at:

- the 3 counter bits,
- the opcode IR[15:12],
- IR[11], which tells JSR from JSRR,
- the memory ready signal R,
- the branch enable BEN.

That is 10 address bits and 27 outputs: the 25 datapath signals, plus RESET and PAUSE.
The ROM would be 2^10 × 27 = 27,648 bits. Three of those inputs are each used by only a
few states, and each one can move into a gate outside the ROM. Each move halves the ROM:

1. **R out.** A new ROM bit, WAIT-MEM, marks states that wait for memory, and
   PAUSE = !R & WAIT-MEM. The ROM becomes 2^9 × 27, because WAIT-MEM replaces PAUSE.
2. **BEN out.** Two new ROM bits replace RESET. BR-RESET is set in the first branch
   state; INST-DONE is set in the last state of every instruction. The logic is
   RESET = INST-DONE | !BEN & BR-RESET. The ROM becomes 2^8 × 28.
3. **IR[11] out.** The PCMUX gets a fourth input, the SR1 register output (the base
   register of JSRR). A new ROM bit, IR11-PCMUX, is set only in the JSR/JSRR state. While
   it is set, IR[11] picks the PCMUX input: 1 selects the adder (PC + offset11, for
   JSR), 0 selects SR1 (for JSRR). JSR and JSRR now share one execute state. The ROM
   becomes 2^7 × 29 = 3,712 bits, less than a seventh of the first one.

This RTL builds only the final version. The ROM is a constant array. `control_rom`
computes it at elaboration time from a function that gives the control word for each
(step, opcode) pair. Yosys maps it to a 3,712-bit memory.

## The state sequences

Counter values 0–2 are fetch and are the same for every opcode. Values 3–7 are the
execute states. "wait" marks a WAIT-MEM state, which repeats until R = 1. "done" marks
INST-DONE.

| step | 0 | 1 | 2 |
|---|---|---|---|
| fetch | MAR←PC, PC←PC+1 | MDR←M[MAR] (wait) | IR←MDR, load BEN |

| opcode | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|
| ADD, AND, NOT | DR←result, set CC, done | | | | |
| BR | BR-RESET (fetch again if BEN=0) | PC←PC+off9, done | | | |
| JMP | PC←BaseR, done | | | | |
| JSR / JSRR | R7←PC, PC←PC+off11 or BaseR by IR[11], done | | | | |
| LD / LDR | MAR←PC+off9 / BaseR+off6 | MDR←M (wait) | DR←MDR, set CC, done | | |
| LDI | MAR←PC+off9 | MDR←M (wait) | MAR←MDR | MDR←M (wait) | DR←MDR, set CC, done |
| ST / STR | MAR←PC+off9 / BaseR+off6 | MDR←SR | M←MDR (wait), done | | |
| STI | MAR←PC+off9 | MDR←M (wait) | MAR←MDR | MDR←SR | M←MDR (wait), done |
| LEA | DR←PC+off9, done | | | | |
| TRAP | MAR←ZEXT(trapvect8) | MDR←M (wait), R7←PC | PC←MDR, done | | |
| RTI, 1101 | done (no operation) | | | | |

An instruction therefore takes 3 + (execute states) + (cycles memory was not ready)
clocks. With memory that is always ready, that is 4 for ADD, 4 for an untaken branch,
5 for a taken one, 6 for LD, and 8 for LDI and STI.

Two timing rules matter:

- **PAUSE beats RESET.** A store's last state both waits for memory and sets INST-DONE.
  The counter must stay put until the write completes, so a held count wins over a
  reset.
- **BEN is loaded in the third fetch state,** together with IR. The first BR execute
  state needs BEN already valid, and there is no decode state to compute it in. The
  datapath must therefore form BEN from the instruction bits on the bus as IR loads.
  The datapath model in `tb/` does this.

## Control word

`lc3_ctrl_pkg::ctrl_word_t` is a packed struct, bit 28 first:

| bits | field | bits | field |
|---|---|---|---|
| 28 | LD.MAR | 13:12 | SR1MUX (0 IR[11:9], 1 IR[8:6], 2 R6) |
| 27 | LD.MDR | 11 | ADDR1MUX (0 PC, 1 BaseR) |
| 26 | LD.IR | 10:9 | ADDR2MUX (0 zero, 1 off6, 2 off9, 3 off11) |
| 25 | LD.BEN | 8 | MARMUX (0 ZEXT IR[7:0], 1 adder) |
| 24 | LD.REG | 7:6 | ALUK (0 ADD, 1 AND, 2 NOT, 3 PASSA) |
| 23 | LD.CC | 5 | MIO.EN |
| 22 | LD.PC | 4 | R.W (1 = write) |
| 21 | GatePC | 3 | WAIT-MEM |
| 20 | GateMDR | 2 | BR-RESET |
| 19 | GateALU | 1 | INST-DONE |
| 18 | GateMARMUX | 0 | IR11-PCMUX |
| 17:16 | PCMUX (0 PC+1, 1 bus, 2 adder, 3 SR1) | | |
| 15:14 | DRMUX (0 IR[11:9], 1 R7, 2 R6) | | |

Bits 28–4 are the 25 signals of the classic LC-3 datapath without interrupt support.
Bits 3–0 are the four this design adds. On the top's `ctrl` output, the PCMUX field
holds the select actually used, after the IR[11] substitution.

## Top-level interface (`lc3_control_unit`)

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset (counter 0, IR 0, PC = `PC_RESET`) |
| bus | in | 16 | datapath bus: IR data and PCMUX input |
| adder | in | 16 | address adder output: PCMUX input |
| sr1 | in | 16 | SR1 register file output: PCMUX input |
| mem_ready | in | 1 | memory ready R |
| ben | in | 1 | branch enable register |
| ctrl | out | 29 | control word |
| ir, pc | out | 16 | IR and PC, for the datapath |
| step | out | 3 | counter value |
| pause, reset | out | 1 | counter controls, for observation |

The only parameter is `PC_RESET` (16 bits, default x3000). Outputs are combinational
from the counter, IR and the status inputs. Counter, IR and PC change on the rising edge.
A memory access follows the usual LC-3 rule. MIO.EN is held for as long as the state
repeats. Read data must be valid in the cycle R is high. A write takes effect at the
edge where R is high.

## Choices not fixed by the architecture

These points are this design's own choices. Change them if your datapath differs.

- The 25 datapath signals, their encodings and the per-state contents follow the
  standard LC-3. Here they are re-timed onto counter steps.
- TRAP uses the older three-state LC-3 sequence: vector read, then R7←PC, then PC←MDR.
  No privilege or stack is involved.
- RTI and the reserved opcode 1101 execute as no-ops. The 25 signals include no
  privilege, stack or interrupt control.
- LEA does not change the condition codes.
- ROM words for steps an opcode never reaches hold only INST-DONE, so a stray step
  returns to fetch.
- The ROM address order is {counter, opcode}.
- PAUSE has priority over RESET, as explained above.
- The power-on reset and the x3000 start address are additions.
- The PAUSE, RESET and PCMUX logic belongs to the datapath in the original
  architecture. Here it sits in the control-unit top, which changes no function.

## Simulation

Every testbench is self-checking. Each prints `TB_RESULT checks=N failures=M` and stops
itself with a watchdog if it hangs. With Verilator 5:

```
verilator --binary --timing --assert --top-module tb_lc3_control_unit \
  -y rtl -y tb +libext+.sv rtl/lc3_ctrl_pkg.sv tb/tb_lc3_control_unit.sv
./obj_dir/Vtb_lc3_control_unit
```

Use the same command with any other testbench name:

| testbench | what it checks |
|---|---|
| `tb_step_counter` | 2000 random RESET/PAUSE cycles against a model; wrap-around; priority |
| `tb_load_register` | load and hold against a model; reset value |
| `tb_pause_logic`, `tb_reset_logic` | exhaustive truth tables |
| `tb_pc_mux` | all four inputs; JSR/JSRR selection overriding the PCMUX field |
| `tb_control_rom` | fetch words for every opcode; the execute length and the number of memory waits for each opcode; 20 individual words written out field by field |
| `tb_lc3_control_unit` | a complete program with every opcode |
| `tb_lc3_random_programs` | 200 random programs of 80 instruction groups each, against the same reference |

`tb_lc3_control_unit` runs the top at its defaults, together with
`tb/lc3_datapath_model.sv` and `tb/lc3_memory_model.sv`. The memory model adds 0–3 wait
cycles at random. The program is a counted loop with loads and stores in every
addressing mode, LDI and STI, JSR and JSRR, a TRAP through the vector table, and RTI and
the reserved opcode. An instruction-level LC-3 interpreter, `tb/lc3_isa_ref_pkg.sv`,
runs the same program in lockstep. After every instruction, the test compares registers,
condition codes and PC. At the end it compares all of memory. The test checks each
instruction's length in cycles against 3 + execute states + memory stall cycles. It
also counts each mechanism and fails if any of them never happened: memory pause, RESET
by INST-DONE, RESET by an untaken branch, taken branch, JSR, JSRR through the SR1
input, a five-state LDI/STI, and TRAP.

`tb_lc3_random_programs` uses the same models and the same lockstep comparison. Its
programs use only forward control flow (BR with a random n/z/p mask, JSR, JSRR, JMP,
TRAP with a random vector), so every program ends. Stores are confined to a data area,
and LDI/STI go through a table of pointers into that area. Over its 200 programs it
makes every counter mechanism happen hundreds of times.

## Limits

- The LC-3 datapath and memory exist only as simulation models.
- Memory-mapped I/O, interrupts, privilege and RTI are not implemented.
- Only the final 2^7 × 29 ROM organisation is built. The larger intermediate versions
  (2^10 × 27, 2^9 × 27, 2^8 × 28) are steps of the derivation above, not built variants.
