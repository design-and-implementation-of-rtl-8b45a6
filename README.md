# Pipelined 8-bit Harvard RISC processor

A small microcontroller-class processor: 16-bit instructions, 8-bit data, separate
instruction and data memories (Harvard organisation), and a two-stage pipeline that
fetches the next instruction while the current one executes, so straight-line code
completes one instruction per clock. Around the core sit an accumulator, an 8-bit
input port and output port, a full-duplex UART (115200 baud), and three prioritised,
vectored interrupts, one of them from a 10-bit interval timer. The target is a
Spartan-3E class FPGA with a 50 MHz board clock; the core runs at 25 MHz.

The instruction set is a reduced MIPS: eight registers, R-, I- and J-formats packed
into 16 bits. The RTL is written in SystemVerilog (IEEE 1800-2017) and is
synthesizable throughout.

## Block structure

```
 clk_src ─► clock_unit ── clk_core, rst, baud_tick, register/data-memory clock enables
                                        │
   ┌──────────── control_unit ──────────┴─────────────────────────────────┐
   │  IR ──► IRX ──► decoder ──► control word (ctl_t)                      │
   │        tstate_counter: TF1 / TX1 / TX2, interrupt acceptance          │
   └───────────────────────────────────────────────────────────────────────┘
 pc_unit (PC, PCR, PCS, STACKPC) ──► instr_mem (2^18 x 16) ──► IR
 regfile (R0..R7) ─► ALU bus A/B ─► alu ─► flags (Z C B P)
                                     └──► accumulator ─► io_ports (out), serial_module (TBUFF)
 system data bus (write-back mux) ◄─ alu | data_mem (4096 x 8) | accumulator op | in port
                                     | RBUFF | status word | jal link
 interrupt_module (INTCON, TIMER, TMF0, I0/timer/I1) ─► irq, vector ─► control, pc_unit
```

| Module | Role |
|---|---|
| `risc8_top` | the processor: wiring, flag register, system data bus (write-back mux) |
| `risc_pkg` | opcodes, funct codes, control-word struct, enums |
| `clock_unit` | board-clock divider, reset synchroniser, baud tick, low-power clock enables |
| `control_unit` | IR, IRX and their PCs; instantiates `tstate_counter` and `decoder` |
| `tstate_counter` | pipeline sequencing (TX1/TX2 cycles) and interrupt acceptance |
| `decoder` | IRX → control word |
| `pc_unit` | PC, branch/jump target register PCR, call-save PCS, interrupt-return STACKPC |
| `instr_mem` | 262,144 × 16 instruction memory with a load port |
| `data_mem` | 4096 × 8 data memory |
| `regfile` | R0..R7, two read ports, one write port |
| `alu` | ADD, SUB, AND, OR, XOR, SLT and the flags |
| `accumulator` | accumulator register with INC, DEC, CPL, ROR, ROL |
| `interrupt_module` | INTCON, TIMER/TMF0, priority and vectors |
| `io_ports` | synchronised input port, output port register |
| `serial_module` | UART transmitter (TBUFF) and receiver (RBUFF), 8N1 |

## Instruction set

### Formats

```
 15   13 12  10 9    7 6    4 3     0
 ┌──────┬──────┬──────┬──────┬───────┐
 │  op  │  rs  │  rt  │  rd  │ funct │   R-format
 ├──────┼──────┼──────┼──────┴───────┤
 │  op  │  rs  │  rt  │   imm7       │   I-format (imm7 zero-extended)
 ├──────┼──────┴──────┴──────────────┤
 │  op  │        target13            │   J-format
 └──────┴────────────────────────────┘
```

| op | mnemonic | operation |
|---|---|---|
| 0 | R-type | see funct |
| 1 | `slti rt, rs, imm` | rt ← (rs < imm) signed compare |
| 2 | `j target` | PC ← {PC[17:13], target13} |
| 3 | `jal target` | as `j`; R7 ← return address (low 8 bits), PCS ← full return address |
| 4 | `lw rt, imm(rs)` | rt ← DM[rs + imm] |
| 5 | `sw rt, imm(rs)` | DM[rs + imm] ← rt |
| 6 | `beq rs, rt, imm` | if rs = rt: PC ← {PC[17:7], imm7} + 1 |
| 7 | `addi rt, rs, imm` | rt ← rs + imm |

| funct | mnemonic | operation |
|---|---|---|
| 0 | `add rd, rs, rt` | rd ← rs + rt (C = carry) |
| 1 | `sub rd, rs, rt` | rd ← rs − rt (B = borrow) |
| 2 / 3 / 5 | `and` / `or` / `xor` | bitwise |
| 4 | `slt rd, rs, rt` | rd ← (rs < rt) signed |
| 6 / 7 | `inc rd` / `dec rd` | ACC ← ACC ± 1, rd ← new ACC |
| 9 | `cpl rd` | ACC ← ~ACC, rd ← new ACC |
| 10 / 11 | `ror rd` / `rol rd` | ACC rotated right / left (not through carry), rd ← new ACC |
| 8 | `jr rs` | PC ← {PCS[17:8], rs} |
| 14 | system group | rt field selects, below |
| others | – | no operation |

| rt (funct 14) | mnemonic | operation |
|---|---|---|
| 0 | `in rd` | ACC, rd ← input port |
| 1 | `out` | output port ← ACC |
| 2 | `send` | TBUFF ← ACC, start transmission (ignored while busy) |
| 3 | `recv rd` | ACC, rd ← RBUFF; clears receive-ready |
| 4 | `stat rd` | rd ← {Z, C, B, P, TMF0, in_isr, tx_busy, rx_ready} |
| 5 | `wintcon rs` | INTCON ← rs[2:0] |
| 6 | `clrtmrf` | TMF0 ← 0 |
| 7 | `reti` | PC ← STACKPC, leave the service routine |

Notes on the semantics:

* **R0 reads as zero.** Writes to it are dropped. Programs use `$0` as the constant zero.
* **Immediates are zero-extended.** `slti $1,$3,100` (word `2CE4`) has to compare with
  +100 for the reference loop to run, and a sign-extended 7-bit 100 would be −28. As a
  result `addi` cannot subtract. Use `sub` with a register instead.
* **The beq target is field + 1.** The immediate names the word *before* the target,
  inside the current 128-word page. The reference program's closing `beq $0,$0,Loop` is
  `C001`: field 1, and execution continues at address 2. `j` and `jal` use the absolute
  13-bit target inside the current 8K-word page.
* **Return addresses and 8-bit registers.** An 8-bit register cannot hold an 18-bit
  return address. So `jal` keeps the full address in PCS and the low byte in R7, and
  `jr` takes its upper bits from PCS. Subroutines therefore do not nest unless they
  save R7 and PCS themselves.
* **The accumulator.** Every ALU instruction (add, sub, and, or, xor, slt, addi, slti)
  also loads its result into the accumulator. The same holds for `in` and `recv`. To
  move a register value into the accumulator, use `or $0, rs, $0`.
* **Flags.** ALU instructions update Z, C, B and P. The accumulator operations update
  Z and P. Loads, stores, branches and the system group leave the flags unchanged.
  P is 1 when the result has an odd number of ones.
* **No operation.** The all-zero word `0000` (`add $0,$0,$0`) is a true no-operation:
  it does not touch the accumulator or the flags.

## Pipeline and timing

This is the part that takes the most care to understand.

There are two overlapped stages:

* **Fetch (TF1).** `instr_mem` is read asynchronously at `fetch_addr`. At the clock edge
  the word goes into IR and its address into `ir_pc`, and PC increments.
* **Execute (TX1).** At the same edge the old IR moves into IRX. During the next cycle
  the decoder decodes IRX and the execute stage does all of its work: register read,
  ALU, data-memory access, accumulator and peripheral strobes. Every result is written
  at the end of that cycle.

Results are written at the end of the execute cycle, and the next instruction reads
its registers during its own execute cycle. So there are **no data hazards**, no
forwarding and no load-use stall. Straight-line code runs at one instruction per
clock.

**Control transfers take a second execute cycle, TX2.** Taken `beq`, `j`, `jal`, `jr`
and `reti` (a *redirect*) work as follows:

1. In the TX1 cycle of the jump (cycle 3 below), `pc_unit` computes the target and
   writes it into PCR. The instruction already in IR is discarded.
2. In the TX2 cycle (cycle 4) the fetch reads at PCR and PC becomes PCR + 1. IRX holds
   a bubble.
3. In cycle 5 the target instruction is in IR and IRX holds a second bubble.
4. The target instruction executes in cycle 6.

A taken branch therefore costs **two cycles** with nothing executing. An untaken `beq`
costs nothing. The reference loop (five instructions and one taken `beq`) takes
**7 cycles per iteration**, and the testbenches check this.

**Interrupt entry works like a redirect.** `tstate_counter` accepts a request only in a
TX1 cycle that has no redirect, and only when IR holds a fetched instruction. In that
cycle:

* the instruction in IRX completes normally;
* the instruction in IR is abandoned, and its address goes into STACKPC;
* the vector goes into PCR, and TX2 follows.

`reti` redirects to STACKPC. After reset, the pipeline needs two cycles to fill before
the instruction at address 0 executes.

```
cycle      1     2     3     4     5     6     7
IR        a     a+1   a+2   (x)   t     t+1
IRX       ...   a     a+1   bub   bub   t     t+1     a+1 = taken beq
state     TX1   TX1   TX1   TX2   TX1   TX1
```

## Interrupts and the timer

There are three sources. From the highest priority to the lowest:

| source | condition | vector |
|---|---|---|
| I0 (pin `int0`) | rising edge; **not maskable** | `0x00010` |
| timer | TMF0 = 1 and INTCON[2] = 1 | `0x00020` |
| I1 (pin `int1`) | rising edge, INTCON[1] = 1 (external interrupts on) and INTCON[0] = 0 (I1 unmasked) | `0x00030` |

How the sources behave:

* **External pins.** Both pins pass through a two-flop synchroniser. A rising edge sets
  a pending bit, which is cleared when that source is accepted. A disabled I1 stays
  pending until it is enabled.
* **Timer.** TIMER is a free-running 10-bit counter clocked by the core clock. TMF0 is
  set when TIMER reaches 1023, so once every 1024 cycles (about 41 µs at 25 MHz). It
  stays set until `clrtmrf`, so a timer service routine must clear it before `reti`.
* **No nesting.** There is a single STACKPC. While a service routine runs (`in_isr`),
  every request waits, including I0, until `reti`.
* **No context save.** The hardware saves no context: no flags, no accumulator and no
  registers. A service routine must leave alone whatever the interrupted code needs.
  INTCON resets to 0, so only I0 is live after reset.

## Serial module

The serial module is a full-duplex UART with 8 data bits, no parity and 1 stop bit,
sent least significant bit first.

* **Timing.** `clock_unit` supplies a tick at 8 × 115200 Hz: one pulse every 27 core
  cycles, 0.5 % fast. A bit lasts 8 ticks, which is 216 core cycles.
* **Transmit.** `send` copies the accumulator into TBUFF. TBUFF shifts out after the
  start bit, and `tx_busy` stays high until the stop bit has been sent.
* **Receive.** A low level on the synchronised `rxin` starts a frame. The start bit is
  checked near its middle, and each data bit is then sampled once per bit period into a
  shift register. If the stop bit is 1, the byte moves to RBUFF and `rx_ready` is set.
  A frame with a bad stop bit is dropped. A new byte overwrites an unread RBUFF.
* **Polling.** There is no serial interrupt. Software polls `tx_busy` and `rx_ready`
  with `stat`.

## Clocks, reset and the low-power unit

* **Core clock.** `clk_src` is divided by `CLK_DIV` (2) into `clk_core`, which clocks
  everything else. The divider runs during reset as well.
* **Reset.** `rst_n` is asserted asynchronously and released through a two-flop
  synchroniser on `clk_core`. All registers clear on reset. The memories do not.
* **Clock gating.** The register set and the data memory are clocked only when they
  are written. This is implemented as clock enables (`rf_clk_en`, `dm_clk_en`) rather
  than as a gated clock net. On the FPGA these map to clock-enable pins, or to a
  clock buffer with an enable, and the simulation stays free of derived-clock races.

## Memories and program loading

* **Instruction memory.** 2^18 words of 16 bits, with an asynchronous read.
* **Data memory.** 2^12 words of `DATA_W` bits, with an asynchronous read. Its address
  is the low 12 bits of rs + imm, so with 8-bit registers a program reaches words 0–255
  directly.
* **Loading.** Both memories are loaded through the top-level load port while `rst_n`
  is low. Drive `ld_im_we` or `ld_dm_we`, with `ld_addr` and `ld_data`, synchronously
  to `clk_core`. The core then starts at address 0.

## Parameters (`risc8_top`)

| parameter | default | meaning |
|---|---|---|
| `DATA_W` | 8 | register, ALU, accumulator and data-memory width |
| `IM_AW` | 18 | instruction address width (262,144 words) |
| `DM_AW` | 12 | data address width (4096 words) |
| `CLK_DIV` | 2 | board clock ÷ core clock |
| `CORE_HZ` | 25,000,000 | core clock, used for the baud divisor |
| `BAUD` | 115,200 | UART rate |
| `OVERSAMPLE` | 8 | baud ticks per bit |
| `TIMER_W` | 10 | timer width |

The I/O ports, TBUFF and RBUFF are 8 bits whatever `DATA_W` is. Setting
`DATA_W = 16` gives the 16-bit register variant. That variant runs the reference
loop with its full result of 4950.

## Departures and interpretations

The original description is brief, and in places inconsistent. The choices made here:

* **Data width.** The processor is described as 8-bit throughout, but its published
  simulation trace shows 16-bit register values (the sum 4950). The default is 8 bits,
  and `DATA_W = 16` reproduces the trace exactly (`tb_loop_program`).
* **Instruction encodings.** Only add, sub, and, or, slt, jr, lw, sw, beq, addi, j, jal
  and slti have published encodings. The description mentions 24 or 34 instructions,
  including XOR, accumulator operations, I/O, serial and interrupt control, but gives no
  encodings for them. Their funct codes and the system group above are this design's
  own. A "SAV" instruction tied to PCS is mentioned but not defined, so it is not
  implemented.
* **PC width.** The PC is called 16 bits in one place, but the address bus, PCS and the
  memory size are all 18 bits. 18 bits is used.
* **Assumed details.** The following are not specified by the original description and
  are this design's choices:
  * the branch penalty of two cycles;
  * the vector addresses;
  * edge-triggered external interrupts;
  * the UART oversampling and framing check;
  * the R0-is-zero convention;
  * the reset values;
  * the load port.
* **Not modelled.** The FPGA's power supply and I/O pads are not modelled.

## Simulation

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. To run one with Verilator 5:

```
verilator --binary --timing -Irtl -y rtl rtl/risc_pkg.sv tb/tb_risc8_top.sv \
          --top-module tb_risc8_top -o sim
./obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_risc8_top` | the whole processor at default parameters. It runs the reference loop, a subroutine call, xor/or/slt, the accumulator operations and their flags, the I/O ports, the status word, a UART byte looped from `txout` to `rxin`, all three interrupts (with I0 beating a pending I1, and I1 waiting while disabled), and the low-power enables. It counts each mechanism and fails any that never occurred. |
| `tb_loop_program` | the reference loop (`8180 2CE4 C407 0E40 ED81 C001`) at `DATA_W = 16`. It checks every executed instruction's ALU output and R1/R3/R4 against the published trace, the final sum 4950, and 7 cycles per iteration, and prints the last rows in the trace's layout. It then reruns the loop with the bound 50 (`2CB2`), which must give 1225. |
| `tb_control_unit` | instruction flow through IR/IRX with `pc_unit`: jump, taken and untaken beq, interrupt entry and return, and two bubbles each |
| `tb_tstate_counter`, `tb_decoder`, `tb_pc_unit` | sequencing, decode of every instruction, target computation |
| `tb_alu`, `tb_accumulator`, `tb_regfile` | datapath units against reference models |
| `tb_data_mem`, `tb_instr_mem` | the full memories, including the clock enable |
| `tb_interrupt_module` | timer period, CLRTMRF, INTCON enables and mask, priority, no nesting |
| `tb_serial_module` | full-duplex frames checked by an independent decoder, bit length, ignored send while busy, framing error |
| `tb_clock_unit`, `tb_io_ports` | clock ratio, baud tick spacing, reset, synchroniser latency |

To write programs, use the small assembler functions at the top of `tb_risc8_top.sv`
(`R`, `I`, `J`, `SYS`). They show how to encode every format.
