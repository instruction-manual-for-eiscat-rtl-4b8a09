# EISCAT digital correlator module in SystemVerilog

An incoherent-scatter radar measures the autocorrelation function of the
echo: for every lag `l` it needs the sum over time of `s(t+l)·s*(t)`, where
`s = X + jY` is the complex sample stream. The EISCAT correlator (1981) does
this with a small microprogrammed machine rather than fixed logic: a
64-word program memory holds 128-bit horizontal instructions, and each
instruction steers seven units at once — program sequencing, two address
processors, four multipliers with two adders, two accumulators with their
result memories, a DMA output and a multi-module I/O port. Up to four such
modules (one master, three slaves) can work side by side, exchanging samples
and addresses over shared external buses.

This repository is RTL for one module, `eiscat_correlator`, and its
self-checking testbenches. The unit structure, instruction fields, register
map, condition codes, statusword and control word follow the 1981
instruction manual of the correlator. Where that manual gives only a
function, the simplest circuit that performs it was built; the choices
made are listed at the end.

## The instruction word

| bits      | field | width | drives |
|-----------|-------|-------|--------|
| 127:126   | –     | 2     | unused |
| 125:120   | I/O   | 6     | flag, buffer-address source, I-register strobe, bus drives |
| 119:112   | OUT   | 8     | DMA transfer of one word |
| 111:105   | ACC   | 7     | accumulator strobe, read, write, SET/CLEAR flags |
| 104:69    | ARI   | 36    | operand selection and strobes of 4 multipliers, ALU12/ALU34 function |
| 68:52     | APM   | 17    | result-memory address processor (12 bit) |
| 51:34     | APB   | 18    | buffer-memory address processor (16 bit) + reload value |
| 33:0      | PRO   | 34    | next-PC condition, codes A/B, loop counters, reload |

The packed structs in `rtl/corr_pkg.sv` (`instr_t` and its members) give the
layout of every sub-field. From the outside the program memory is eight
pages of 64 × 16 bits (data-field addresses 8..15, page `p` = instruction
bits `16p+15 : 16p`, sub-address = location); inside, all eight pages are
read in parallel at the PC.

Location 0 is the idle loop and location 63 the stop point after a program
interrupt; neither is executed. A compute program starts at the start
address register (SAR), a transfer program always at 32.

## Instruction cycle and pipeline

One instruction cycle is **two clocks** (phase 0 and phase 1). Everything an
instruction does — register writes, loop counters, the PC, the flag, the
multiplier operand registers, the accumulators — takes effect at the end of
phase 1, with one exception: the I-register on the external data bus is
strobed at the end of phase 0. An instruction is held (its cycle repeated
without effect) while the OUT unit stalls it, and in single-cycle test mode
a cycle only completes when CLOCK ADVANCE is pressed.

Two rules from the hardware's pipelining must be kept by the programmer,
and the RTL behaves exactly as they imply:

* **RELOAD takes two cycles.** A RELOAD writes the APB output of its own
  cycle into SAR, BAR, LCR1, LCR2 or LCR3, but the write lands at the end of
  the *next* instruction. That next instruction must not RELOAD or load a
  loop counter (an assertion in `pro_sequencer` flags a violation).
  Location 0 cannot reload.
* **Result memory: one cycle of separation.** In one instruction the same
  result word may be read, accumulated and written. The accumulators are
  two stages deep: stage 1 reads the memory (or zero) into the I-register
  and registers the ALU value, stage 2 computes `O = (READ ? I : O) + ALU`
  and writes `O` back to the address stage 1 used. An instruction that
  touches the same location in the cycle right after therefore sees stale
  data.

## Program sequencing (PRO)

Each instruction carries a 6-bit condition code and two 4-bit next-PC codes,
A and B. The condition tests whether loop counters LC1–LC3 are zero and
chooses A, B or plain *continue*. Codes with bit 5 set are two-way (A or B);
the others are three-way (B, A or continue). A and B each name a PC source
(PC+1, top of return stack, jump address, SAR) and a stack action (pop,
nothing, push of PC+1). The return stack is four deep; a fifth push loses the
oldest entry.

The loop counters are 12 bits. LC1 can be decremented, loaded from LCR1 or
from LCR1A (a snapshot of LC1), or conditionally reloaded when it reaches 0;
one LC1 code also decrements LC2 when LC1 wraps, which makes two nested
loops out of one instruction. LC2 and LC3 have load and decrement codes.
Conditions test the counter values from before the instruction's own
updates.

**Program interrupt.** After INTERRUPT PROGRAM the sequencer waits for the
first executed instruction whose next PC is PC+1. It does not execute that
instruction: it saves its address and goes to 63, where the program stops.
INTERRUPT RESET restarts it at the saved address.

## Address processors (APB, APM)

Both are modelled on the classic bit-slice ALU: a 16-entry register stack
with A (read) and B (read/write) addresses, a Q register, eight source pairs,
eight functions (add, two subtractions, OR, AND, AND-NOT, XOR, XNOR) and
eight destinations, including shifts of F and Q by one bit (zeros shifted
in). The APB is 16 bits wide and addresses the buffer memory; its output is
also the value written by RELOAD. Its SELECT bit replaces the B address by
LC1, so a loop can walk through the stack. It has a Data I-register as an
extra source; the register stack is loaded through it. The APM is 12 bits
wide, addresses the two result memories (4096 words each) and has neither
SELECT nor Data I.

## Arithmetic and accumulation (ARI, ACC)

Samples are 16 bits: X in the upper, Y in the lower byte, two's complement.
Each multiplier has an A and a B operand register. Each is loaded from
internal X or Y (the module's own buffer memory or test memory) or
external X or Y (the I-register on the external data bus); A can also be 1.
ALU12 combines multipliers 1 and 2 (M2, M1−M2, M1+M2, −1, M1) and feeds
accumulator channel 1; ALU34 does the same for 3 and 4 and channel 2. A
complex product therefore needs one instruction: M1=XX', M2=YY' added, M3=YX',
M4=XY' subtracted.

The accumulator read is controlled by two flags. With READ=1 an instruction
loads the I-register from the result memory if SET 1 or SET 2 is on, and with
zero otherwise. A first pass over an experiment thus starts from zero, and
later passes add to what is stored. Statusword bit 5 ("continue experiment")
sets SET 2 on the first read. Each channel reports signed overflow of its
adder; it sets control-word bit 7 and raises ERROR-INTERRUPT.

## DMA output (OUT)

The OUT field holds TRANSFER, INHIBIT CLOCK, a 2-bit SOURCE and a 3-bit
transfer code. An executed instruction with TRANSFER=1 and code 2–7 loads
one 16-bit word into the DMA register and raises DATA-READY; DMA-REQUEST
follows one clock later, and DATA RECEIVED clears both. Codes 2/3 send the low/high
half of channel 1's result word at the APM address, and 4/5 those of channel 2.
SOURCE 1–3 takes the word from a slave instead, and is copied to statusword
bits 9..8. Codes 6/7 send two test words: test word 1 holds the active next-PC
code and the APB source/function/destination, and test word 2 holds the next
PC and the APB A/B addresses. An instruction with INHIBIT CLOCK waits
until the previous word has been taken. The transfer program can thus run at
the computer's pace. In *transfer inhibit* test mode DATA-READY is
suppressed and every transferring instruction waits for a DATA RECEIVED
pressed by hand.

## Buffer addressing and the external buses (I/O)

In *normal* address mode the buffer address is the APB output. In *mixed*
mode (statusword bit 6) it is APB+BAR in phase 0 and APB in phase 1. The
sample fetched in phase 0 can be caught in the I-register (STROBE I-REG with
ENABLE EDB driving the own samples onto the external data bus). The
multiplier operands are strobed at the end of phase 1. One instruction
can therefore pick up `s(t+l)` as the "external" and `s(t)` as the "internal"
sample, with the lag `l` kept in BAR. SELECT BUFFER ADDRESS takes the address
from the external address bus (a master can address a slave's buffer), and
ENABLE EAB drives the module's address onto it. The bidirectional buses
appear at the top level as separate `_in`, `_out` and `_oe` ports.

## Statusword, control word and commands

| statusword bit | meaning |
|---|---|
| 15..12 | module ident |
| 11..10 | enabled start source: 0 panel, 1 radar controller, 2 computer |
| 9..8   | source of the last transfer |
| 7      | slave operand modification (swaps internal and external selections) |
| 6      | mixed address mode |
| 5      | continue experiment |
| 4      | internal samples from test memory instead of buffer memory |
| 3      | run the fixed program PROM instead of the program RAM |
| 2      | address loaded, waiting for data |
| 1      | busy (PC ≠ 0 and ≠ 63), also the CORRELATOR RUN output |
| 0      | ready for start (data-field address 63) |

The control word holds the error bits: 0 address load while busy, 1 start
in manual operation, 2 start while busy, 3 start while not ready. Bits 6..4
are slave 3..1 overflow and bit 7 master overflow; the error bits stay set
until RESET. The commands are START COMPUTE (PC ← SAR), START TRANSFER
(PC ← 32), RESET (PC ← 0, clears the errors and READY), ADDRESS LOAD + DATA
LOAD, INTERRUPT PROGRAM and INTERRUPT RESET. Each is a one-clock pulse on its
own input. The data-field register map is in `corr_pkg.sv`: STAT 1, SAR 4,
BAR 5, Data I 6, program pages 8–15, APB stack 16, APM stack 17,
LCR1–3 18–20, READY 63.

## Example program

`tb/corr_asm_pkg.sv` builds a complete correlation program. It computes `L`
lags over `T` samples in mixed address mode, with the lag in BAR reloaded
from the APB stack, an inner loop of one instruction per sample held by LC1,
a subroutine call for the lag step, and a transfer program at 32 that sends
every lag and both test words. It is the best starting point for writing
programs.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/corr_pkg.sv rtl/*.sv tb/corr_asm_pkg.sv tb/tb_eiscat_correlator.sv \
  --top-module tb_eiscat_correlator -Mdir obj_top
./obj_top/Vtb_eiscat_correlator
```

| testbench | what it covers |
|---|---|
| `tb_eiscat_correlator` | whole module at default parameters: loads a program over the host interface, runs the 8-lag × 16-sample correlation twice (fresh and accumulating), transfers the results by DMA with stalls, and also checks interrupt/resume, single-cycle mode, command errors, slave overflow and reset. It counts each mechanism and fails on one that never occurred |
| `tb_corr_overflow` | same program from the PROM port with test-memory samples and an 18-bit accumulator, forcing master overflow |
| `tb_multi_module` | a master and a slave module in lock step: the slave takes its buffer address from the master over the external address bus and the master's samples over the external data bus; both result sums are checked |
| `tb_pro_sequencer` | random instructions against a reference model of all condition, PC, stack and counter codes |
| `tb_addr_proc` | all sources, functions, destinations, SELECT, loads |
| `tb_ari_unit`, `tb_acc_unit`, `tb_result_mem` | operand selection, ALU codes, the two-stage accumulator pipeline and its flags |
| `tb_out_unit`, `tb_io_unit`, `tb_rt_control`, `tb_prog_mem` | transfers and stalls, address modes, commands and status, page loading |

The unit testbenches use the same command with their own top module (no
`corr_asm_pkg.sv` needed).

## Design choices and departures

These points are this design's own, either because the manual leaves them
open or by choice:

* Two clocks per instruction cycle, synchronous single-clock design with
  asynchronous reset; commands are synchronous pulses.
* Field order inside PRO (condition, A, B, LC1, LC2, LC3, LCR1A, RELOAD,
  reload address, jump) and inside OUT. The physical bit scrambling of the
  original RAM boards is not reproduced: fields are contiguous.
* OUT transfer codes (2–7 as above) and the INHIBIT CLOCK stall rule.
* Sample format 8+8 bits (`SAMPLE_W`) and a 32-bit accumulator (`ACC_W`).
  Both are parameters.
* Condition code 5 is built as listed in the manual (LC3≠0 → B, else LC2≠0
  → A). Its bit pattern suggests 6 was meant, so code 6 does nothing special.
  Undefined codes act as continue / no operation.
* LC1 code 4 decrements LC2 only if the instruction's LC2 code is no-op;
  counters wrap from 0 to 4095.
* A start from a source not enabled in the statusword is ignored; the
  front-panel start is accepted in manual operation.
* Only one module is built. Slaves are represented by their overflow flags and
  the `ext_mem_data` input. The buffer memory, test memory, PROM, front
  panel and CAMAC interface are outside the module, with their signals on
  ports.
