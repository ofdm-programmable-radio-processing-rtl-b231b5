# Radio processing engine: a dual-mode DSP core for OFDM baseband

An OFDM receiver spends most of its time on two kinds of arithmetic. Packet
detection, timing recovery, channel estimation and equalisation are complex
multiply-accumulates over sample streams. The control around them is plain
integer work: thresholds, counters, divisions and bit manipulation. This core
runs both kinds on one small pipeline with two instruction sets:

* **Complex mode** uses 16-bit instructions. Each instruction does one complex
  operation on the complex computational unit (CCU): add, subtract, multiply,
  multiply-accumulate, square, conjugate, negate or shift. The same
  instruction can also read up to two complex operands from two data
  memories, CDM0 (X) and CDM1 (Y). Two address generators form those
  addresses, with post-modify, circular buffers and bit reversal.
* **Real mode** uses 32-bit instructions. Each instruction drives up to four
  real computational units (CU0–CU3) in SIMD. Their operands come from eight
  I/O ports, from immediates and from eight general registers.

One MODE instruction switches between the two. The eight real general
registers GR0–GR7 are the same storage as the four complex registers
GCR0–GCR3. Complex-mode results can therefore be handed to real-mode code
without going through memory.

The RTL is in `rtl/` and the testbenches are in `tb/`. The top module is
`rpe_core`.

## Block map

| Module | Role |
|---|---|
| `rpe_pkg` | Shared types: `cplx_t`, status flags `asta_t`, condition codes, opcodes and the decoded-instruction bundle `dop_t`. |
| `imem` | Instruction memory: 32-bit words, synchronous read, and a host write port for loading programs. |
| `ins_sel` | Picks the 32-bit word (real mode), or its upper or lower half (complex mode). |
| `decoder` | Turns either instruction format into `dop_t`. |
| `pcu` | Program control: next-PC selection, conditions, PC stack, loop counter, sleep, mode register and squash signals. |
| `ccu` | Complex unit: MCX, MCY, MCF, MCR, a complex multiplier feeding a complex adder, a shifter, and the status flags. |
| `cu` | Real unit, four instances: MX, MY, MF, MR, multiplier and adder, shifter, abs/negate, division step. |
| `dag` | Address generator, two instances: I, M and L registers ×4, post-modify, circular wrap, bit reversal. |
| `cdm` | Complex data memory, two instances: 32-bit words `{re, im}`, one access per cycle, plus a host write port. |
| `gcr` | GCR0–GCR3, which are also GR0–GR7. |
| `io_ports` | Eight 16-bit ports: sampled inputs, output registers and one-cycle access strobes. |
| `rpe_core` | Pipeline registers, the bus wiring and the per-mode routing. |

Every module starts with a comment that gives its interface and timing.

Parameters of `rpe_core`:

| Parameter | Default | Meaning |
|---|---|---|
| `IMEM_DEPTH` | 32768 | Instruction words of 32 bits (the full 16-bit halfword PC range) |
| `CDM_DEPTH` | 4096 | Complex words per data memory; the bit-reverse width follows it |
| `CFRAC` | 15 | Fraction bits of complex products |
| `RFRAC` | 0 | Fraction bits of real CU products |
| `STACK_DEPTH` | 8 | PC stack entries |

The number of CUs (4), I/O ports (8), GCRs (4) and DAG registers (4 each)
are fixed by the instruction set, so they are not parameters.

## Data formats

* A real value is 16 bits in two's complement. A complex value is
  `{re, im}`, 32 bits.
* Complex products are Q1.15 (`CFRAC = 15`): the 32-bit product is shifted
  right by 15.
* Real CU products are integers (`RFRAC = 0`).
* Sums wrap and set the overflow flag; nothing saturates.
* Right shifts are arithmetic. Shift amounts go up to 255 in complex mode and
  up to 15 in real mode. In real mode, one shift field serves CU0/CU1 and the
  other serves CU2/CU3.

## The pipeline

There are four stages: Fetch, Decode, Execute and Writeback.

```
 Fetch        Decode                   Execute                    Writeback
 imem[PCP] -> ins_sel -> IRD           CCU / CU0-3 compute        mrdata -> MCX..MCR
              decoder -> dop_t -> IRE  DAG address, post-modify               or MX..MR
              pcu: next PCP            CDM / port read & write
                                       register moves, ASTA
```

**Program counter.** The PC is 16 bits and addresses 16-bit halfwords.

* `PCP = PC[15:1]` selects the 32-bit memory word.
* In complex mode, `PC[0]` (PC_s) picks the half. PC_s = 0 selects bits
  [31:16].
* Sequential flow adds 1 in complex mode and 2 in real mode.
* Real-mode code must start on an even address.
* Reset starts the core in complex mode at address 0.

**Memory and port reads** are issued in Execute. Their data (`mrdata`) is
written to the register file in Writeback. The unit's `regs_fwd` output
applies that Writeback data to the operands of the instruction now in
Execute. So an instruction can use a value loaded by the instruction just
before it, with no stall. The complex dot-product loop depends on this:
each MAC uses the pair that the previous MAC loaded.

**Stores** write memory or output ports in Execute. They take data from the
unit registers, including a value arriving in Writeback that same cycle.

## Branches, calls and their cost

The PCU picks the next fetch address from four sources:

1. PC + 1 or PC + 2.
2. The top of the PC stack, for a return.
3. The target of the branch in Decode.
4. The target of the branch in Execute.

The fourth source handles a dependency. A conditional branch may test the
status flags (ASTA) of the instruction immediately ahead of it. Those flags
are only produced at the end of that instruction's Execute cycle. Decode
then marks the branch *deferred*. The branch moves into Execute, where its
condition sees the new flags, and it redirects fetch from there. A counter
branch right after an LCR load is deferred in the same way.

| Case | Cycles lost when taken |
|---|---|
| Branch, call or return resolved in Decode | 1 (the fetched instruction is squashed) |
| Deferred branch (its condition depends on the previous instruction) | 2 |
| Not taken | 0 |
| Two-word instruction | none extra: the extension word is fetched like another instruction |
| MODE switch | 1, like a taken branch |

**Conditions.**

* Each of I, R and C has: > 0, ≤ 0, = 0, ≠ 0, < 0, ≥ 0, overflow and no
  overflow. C has only = 0, ≠ 0 and the two overflow tests.
* I tests the imaginary part and R the real part. C is the whole complex
  result: = 0 means both parts are zero; overflow means either part
  overflowed.
* Two more conditions exist: *counter* and *always*.
* *Counter* is true while the loop counter LCR ≠ 0. A taken counter branch
  decrements LCR. A loop of n passes therefore loads LCR = n−1 and ends with
  a backward `jump(counter)`.

**Where ASTA comes from.** Only arithmetic instructions update it. In
complex mode it comes from the CCU. In real mode it comes from CU0; the
imaginary flags then read as zero.

**Calls.**

* CALL pushes the address of the next instruction onto an 8-deep PC stack.
  The stack wraps on overflow.
* CallPR also pushes LCR and ASTA. The matching return restores them, so a
  subroutine can run its own loop.
* RTS and RTI both pop the stack. No interrupt source exists in this core.

**SLEEP** holds PC, Fetch and Decode (`pc_halt`) and puts NOPs into
Execute. The `wake` input releases the core. `sleeping` shows the state.

**MODE** toggles the mode register. It redirects fetch to the next
instruction:

* entering real mode, the target is rounded up to an even address;
* entering complex mode, the target is PC + 2.

## Instruction encodings

The architecture defines instruction classes, operands and immediate ranges.
The bit layouts are this design's own. They are listed in full in the
opening comment of `rtl/decoder.sv` and the opcode numbers are in `rpe_pkg`.
The main points:

* **Complex mode.** The opcode is `[15:11]`. Examples:
  * `MAC2` is `R = X*Y (+/−R), X = CDM0(Ix), Y = CDM1(Iy)`.
  * `ADDSUB1` and `MAC1` do arithmetic and load one register.
  * There are direct and indirect loads and stores, MOVE between the CCU
    registers and the GCRs, immediates (an 8-bit real or imaginary value, or
    a 4+4-bit complex value), DAG register loads, LCR, CALL, JUMP and MISC.
* **Long immediates.** When an immediate does not fit its field, the `_L`
  opcode is used. The next 16-bit word then supplies the upper bits. Decode
  holds the first word until the extension arrives.
* **Real mode.** The opcode is `[31:28]`. ALU instructions carry:
  * a 4-bit CU enable mask;
  * the operation (add, sub, mul, mac, msu, sqr, sqa, sqs, abs, neg, div,
    adn, shr, shl);
  * the operand and result selects;
  * two shift amounts.
* **Port, GR and store slots.** Port loads (LDP), port stores (STP) and GR
  moves carry four `{register, port/GR}` slots. LDP8 takes a second word
  for four more slots.
* **ALUP** ("arithmetic with port reads", e.g. `R = X+Y, X = IPa, Y = IPb`
  on each enabled CU). It takes its eight port numbers from a configuration
  register written by SETCR, because one 32-bit word cannot also hold them.
  The square forms load only X.
* **Branch offsets** count instructions from the branch's own address.

`tb/rpe_asm_pkg.sv` has one function per instruction form. It is the
easiest way to write programs for the core.

## Address generation

DAG0 owns I0–I3 and serves CDM0. DAG1 owns I4–I7 and serves CDM1.

* Each access uses `I[k]` as the address and then sets `I[k] += M[k]`.
* With `L[k] ≠ 0` the update wraps inside a buffer of `L[k]` words. The
  buffer base is `I[k]` rounded down to a multiple of the next power of two
  ≥ `L[k]`. Place circular buffers on such a boundary and keep `|M| < L`.
* The address can be bit-reversed over the 12 bits of a data-memory address,
  for FFT-ordered data.

## Division

No divider is built. Division uses the non-restoring algorithm, one step per
`DIV` instruction, on each enabled CU:

1. Put the dividend (0–255) in MR and the divisor (1–127) in the low byte
   of MX.
2. Execute 8 × `DIV`.
3. Execute `ADN`, which corrects the final remainder.

The result is MR = `{remainder[15:8], quotient[7:0]}`. Written as the loop
`LCR = 7; L: DIV; jump(counter) L; ADN`, it takes 25 cycles. Writing out the
eight steps takes 9.

## Simulating

You need Verilator 5 with `--timing`. Compile the package first, then the
assembler package, then the RTL:

```
verilator --binary --timing --assert -Wno-fatal rtl/rpe_pkg.sv tb/rpe_asm_pkg.sv \
  rtl/imem.sv rtl/ins_sel.sv rtl/decoder.sv rtl/pcu.sv rtl/ccu.sv rtl/cu.sv \
  rtl/dag.sv rtl/cdm.sv rtl/gcr.sv rtl/io_ports.sv rtl/rpe_core.sv \
  tb/rpe_core_tb.sv --top-module rpe_core_tb -o sim && obj_dir/sim
```

Each unit testbench, `tb/<module>_tb.sv`, is built the same way with its own
module. Each prints `TB_RESULT checks=N failures=M` and has a watchdog.

`rpe_core_tb` runs the core at its default sizes:

* 32 K instruction words and 4 K words per data memory.
* The program is loaded through the host ports.
* In complex mode it runs a pilot correlation over a circular pilot buffer,
  using a counter loop of dual-read MACs. It then runs a deferred branch, a
  call/return and a long immediate.
* It switches to real mode and runs a SIMD multiply-accumulate from the
  ports, GR moves and the division macro. It then runs deferred branches on
  a CU0 sign and on a CU0 overflow, and SLEEP/wake.
* It switches back to complex mode.
* It checks every result against its own model.
* It checks the cycle counts of the loop (1 bubble per taken branch) and of
  the deferred branch (2 bubbles).
* It counts each mechanism: taken and deferred branches, forwarding, call,
  return, mode switches, sleep, two-word instructions, circular wrap, SIMD,
  overflow, division steps and port strobes. Any mechanism that never occurs counts as
  a failure.

`rpe_core_prog_tb` runs a second program on the full-size core. It covers
the forms the first program leaves out:

* a bit-reversed copy from CDM0 to CDM1 (an FFT input reorder);
* a signal-energy sum with the square-accumulate-and-load instruction;
* nested counter loops through CallPR, with a conditional return that is
  not taken;
* complex shifts, direct loads and negation;
* in real mode, the eight-port load, ABS, NEG and shifts with the two shift
  immediates;
* a call, and a call whose condition depends on the instruction before it.

## Departures and open points

* **Encodings, memory sizes and stack depth** are not specified by the
  architecture. Chosen here: 4 K-word data memories, 32 K-word instruction
  memory (the whole 16-bit halfword space) and an 8-deep stack.
* **Loop counter.** The architecture describes it two ways: "enter the loop
  when LCR is zero" and "jump while LCR is not zero". This design uses the
  second.
* **CallPR** saves LCR and ASTA. Which registers it should save is not
  specified.
* **Circular buffer base.** The power-of-two alignment rule is this design's
  choice.
* **Length registers** load only an 8-bit value (0–255). All 32 complex
  opcodes are in use, so there is no two-word L load. I, M and LCR do have
  two-word forms.
* **Interrupts.** There is no interrupt entry. RTI exists only as a return.
* **External peripherals** are outside the core. They see `pout`, `pin`,
  `rd_stb` and `wr_stb`.
* **Fixed-point formats** (Q1.15 for complex, integer for real) are choices.
  Change them with the `CFRAC` and `RFRAC` parameters.
