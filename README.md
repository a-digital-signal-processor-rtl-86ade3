# WCDMA receiver baseband: programmable correlator array + subword-parallel DSP

A third-generation (WCDMA) receiver spends its effort in two very different
places. At the **chip rate** (3.84 Mchip/s) it must correlate the received
samples with long spreading, scrambling and synchronization codes — simple
add/subtract work, but a lot of it and in parallel. At the **symbol rate** it
must post-process those correlations: channel estimation, RAKE combining,
filtering and Viterbi decoding — less data, but complex arithmetic and
irregular control.

This RTL follows a published architecture that splits the work accordingly:

* a **programmable correlator array** of 17 × 8 tri-code correlators that can
  be re-wired at run time, either as 17 independent 8-phase correlators (frame
  synchronization, scrambling-code search, RAKE fingers) or as one 136-phase
  chain that stands in for a chip matched filter (slot synchronization);
* a **symbol-rate DSP**: a 5-stage, 28-bit-instruction, modified-Harvard
  machine whose 40-bit datapath splits into 8-bit I/Q or 24|16-bit lanes, with
  one-cycle complex MAC, two-taps-per-cycle FIR, and a dual add-compare-select
  plus hardware traceback for Viterbi decoding.

The DSP configures the array, dumps its correlators and reads the results over
its I/O bus. Everything is synthesizable SystemVerilog (IEEE 1800-2017) and
runs in plain Verilator.

## Top level: `wcdma_rx_top`

```
 din (6 bit/chip) ─────────────────────────────┐
 code_in[17] ──► dual-code pre ─► mux ─► correlator_bank (17 CBE x 8 TCC)
                  (8 pairs)      ▲         │ oe[136]      ▲ rd select
                                 │ dual    │ results      │
                                 │         ▼              │
 irq[5] ──────────────────► dsp_core ── I/O bus ──────────┘──► status
 pm_we/pm_waddr/pm_wdata ──►  (program load)
```

Ports: `clk`, `rst_n` (asynchronous, active low), `din` (received sample, two's
complement, `DIN_W` = 6), `code_in[NCBE]` (2-bit code per CBE from the code
generators), `irq[5]`, `status[16]` (written by software), and the program-load
port `pm_we/pm_waddr/pm_wdata`. Load the program while `rst_n` is low, then
release reset; execution starts at address 0.

The code generators, the system controller and the RF front end are not part
of this RTL; their signals are the ports above.

I/O map of the DSP bus (this design's choice):

| Access | Address | Meaning |
|---|---|---|
| IN  | `0x0000 + 8*cbe + tcc` | result of correlator `tcc` of CBE `cbe` (sign-extended) |
| OUT | `0x0100` | chain mask: bit `i-1` = 1 feeds CBE `i` with the code leaving CBE `i-1` |
| OUT | `0x0101` | bit 0: dual-code preprocessing of code pairs (2i, 2i+1) |
| OUT | `0x0102` | `status` output register |
| OUT | `0x0110 + i` | one-cycle dump (output enable) of the correlators of CBE `i` selected by data bits 7:0 |

Array and DSP share one clock: one received sample per clock cycle.

## The correlator array

### Tri-code correlator (`tcc`)

A correlator multiplies each sample by a code value of +1, −1 **or 0** and
accumulates. The 2-bit code is `{enable, sign}`: sign 0 means +1, 1 means −1;
enable 0 means "code 0", the accumulator holds. In the published circuit the
enable gates the accumulator clock to save power; here it is a clock enable,
from which synthesis can infer a gating cell. A one-chip register passes the
code on (`code_out`), so neighbouring correlators see the code shifted by one
chip. When `oe` is high the result register takes the finished sum, including
the current sample, and the accumulator restarts at zero (integrate and dump).
`result` is valid the cycle after `oe`.

### Dual-code preprocessing (`dual_code_pre`)

Two binary codes `a`, `b` that must be correlated against the same samples can
share two correlators while each chip clocks only one of them:

```
code1 = { ~(a ^ b), a }   // on when a and b agree
code2 = {  (a ^ b), a }   // on when they differ
corr_a = out1 + out2,  corr_b = out1 - out2   (done by DSP software)
```

The published scheme and its power motivation are followed; the combination
is written with exclusive-or because that is the operator for which the sum
and difference give the two correlations.

### Correlator bank element (`cbe`) and bank (`correlator_bank`)

A CBE is eight TCCs sharing the input sample, the code running through their
delay registers: correlator `k` sees the code `k` chips late, giving eight code
phases from one code stream. The bank has 17 CBEs. In front of CBE `i > 0` a
multiplexer (`chain[i-1]`) chooses its own code or the code leaving CBE `i-1`.
With every chain bit set, CBE `i` correlator `k` works on phase `8i + k` of code
0: a 136-tap matched filter built from correlators. The output bus is a
combinational read select (`rd_cbe`, `rd_tcc`). `oe` has one bit per
correlator, CBE-major.

## The DSP (`dsp_core`)

### Resources

| | |
|---|---|
| Program memory | 1K × 28 bit (`dsp_pmem`), asynchronous fetch read, load port |
| Data memories | 2 × 2K × 16 bit (`dsp_ram`), each one synchronous read + one write port |
| Address generators | one per data memory (`dsp_agu`): 8 pointers, 8 post-modify increments, one circular buffer (start `SB`, length `CB`) |
| Registers | D0, D1 (40 bit); T (16); COUNT (16); SRA (4..8); SR0, SR1 (16); FLG; IMR |
| Datapath | `dsp_alu`, `dsp_cmp`, `dsp_mac`, `dsp_sft`, all 40 bit, multiplier inputs 16 bit |
| Control | 5-stage pipeline, zero-overhead DO loop, 8-deep return stack, 5 interrupt vectors, I/O bus |

Two single-port-pair memories instead of one 2R2W memory are an area choice of
the architecture; the dual ACS is arranged so its two reads and two writes
always go to different memories (an assertion checks the writes).

### Subword formats

The same 40-bit word is read three ways:

* **40-bit**: plain two's complement.
* **16-bit × 2**: high lane `X[39:16]` (24 bits, so sums keep guard bits) and
  low lane `X[15:0]`; the carry between lanes is cut.
* **8-bit × 2**: a packed I/Q word, `I = X[15:8]`, `Q = X[7:0]`; results are
  sign-extended to 40 bits.

The MAC is built from four 8×8 multipliers and a crossbar, so one instruction
can do two byte products (MUL8/MAC8), a full complex product
`(I1 + jQ1)(I2 + jQ2)` → `{re (24 bit), im (16 bit)}` (CMUL/CMAC/CMSUB), a 16×16
product assembled from the four partial products (MUL/MAC/MSUB), two FIR taps
`D += XL·YL + XH·YH` (FIR2) or the I²+Q² energy (SQS/SQSA). A complex MAC thus
takes one cycle and an N-tap FIR N/2 cycles.

### Pipeline

```
IF   fetch at PC; zero-overhead loop check (PC == loop end -> loop start)
ID   decode; address generators drive memory addresses and post-modify
     pointers; memory reads issued; JUMP/CALL/RET/RETI/DO/SETCT/TEST and
     interrupts act here
OR   memory words arrive (synchronous memories)
EX   register operands read, datapath, register writes, I/O access
WB   memory writes
```

Registers are read and written in EX, so a register result is available to
the next instruction without forwarding. Memory is the only place where a
result can be "in flight", and decode **stalls** (holds, inserting a bubble)
when:

1. it reads a memory word that an instruction in OR, EX or WB will write;
2. it uses an address generator that an older `MV` is still writing in EX
   (an `LD #imm` to a pointer register acts in ID and needs no stall);
3. a `TRCBK` follows an instruction still writing SRA (so consecutive
   traceback steps run at one per three cycles);
4. a `TEST`/`TESTZ` waits for OR and EX to drain (it reads registers in ID).

A taken JUMP/CALL/RET/RETI discards the one fetched word (one-cycle penalty).
TEST skips the next word if the tested bit is 0, TESTZ if it is 1.

**DO loops.** `SETCT #n` (or a move to COUNT) sets the count, `DO #end` marks
the next word as loop start and `end` as the last word of the body. When the
fetch address reaches `end` with COUNT ≠ 0, the next fetch goes to the loop
start and COUNT decrements, at no cycle cost; with COUNT = 0 the loop falls
through. The body therefore runs COUNT + 1 times (SETCT 16 runs 17 FIR2 steps of
a 33-tap filter). The check also looks at a DO still in decode, so even a
one-word body right after DO works. Loops do not nest.

**Interrupts.** `irq[i]` is latched as pending; if IMR bit `i` and the global
enable are set, the word in decode is cancelled, its address pushed, and
execution continues at address `i + 1` (lowest number first). Entry clears the
global enable, RETI sets it. No interrupt is taken on a control instruction or
when the words in decode or fetch are the loop end, so loop state stays
consistent without being saved.

### Viterbi support

**Dual ACS.** For a rate-1/2 trellis, two old metrics `MA = Mem0(*Am)` and
`MB = Mem1(*Bm)` and a branch metric `t` (a byte of T, negated by ACSB) give
four candidate metrics in one cycle, computed by two units at once:

```
ALU (ADDSUB):  D0 <= { MA + t , MA - t }    (24-bit | 16-bit lanes)
MAC (ACS):     D1 <= { MB - t , MB + t }
CMP (MIN16):   min(D0, D1) per lane of the PREVIOUS ACS
               -> high lane to Mem(a1), low lane to Mem(b1); lane flags -> SR0
```

So each ACS instruction finishes the compare-select of the previous one: the
add and compare-select of one butterfly are software-pipelined by one
instruction. The two survivor decisions shift into the 16-bit SR0
(`{flag_low, flag_high, SR0[15:2]}`). Because of the one-instruction lag,
SR0 holds the decisions of butterflies 0..7 after the ninth ACS of a stage, and of
each further eight after every eighth ACS after that; a `MV SR0, *Am` (or a
logic operation with a memory destination) then stores the transition word. A
stage of `n` butterflies ends with one extra ACS that only drains the pipeline.
Metrics are treated as distances (minimum survives).

**Traceback.** `CFGTRC *mem, #num` sets SRA to `num + 4` bits (K = 5..9) and
loads the start state from memory. `TRCBK *mem` reads the transition word at
the pointer plus `SRA[7:4]` (word offset, used for K > 5), shifts it right by
`SRA[3:0]` in the barrel shifter, and takes the LSB as the decision bit `b`:

```
SRA <= (b << (L-1)) | (SRA >> 1)      SR1 <= {SR1[14:0], b}
```

i.e. it steps back to the predecessor in a trellis where state `j` is reached
from `j/2` and `j/2 + 2^(K-2)`, and collects the decoded bit. The pointer's
increment register walks the table backwards one stage per step.

**Metric layout.** An ACS reads one metric from each data memory and writes
one to each. So the two old states of a butterfly (`j`, `j + 2^(K-2)`) must sit
in different banks, and so must its two new states (`2j`, `2j+1`). Putting
state `s` in bank `s[K-2] ^ s[0]` at word `s >> 1` meets both rules. Then
butterflies with even `j` read their "A" metric from state `j`. Odd ones read
it from state `j + 2^(K-2)`. For the odd ones the program negates the branch
metric (ACSB), and their two decision bits come out inverted; one XOR of SR0
with the constant mask 0xCCCC corrects the transition word.
Four pointers with unit steps walk the reads: even/odd butterflies × two banks.
Two more pointers walk the writes. The hardware does not fix any of this;
`tb_viterbi` is a worked example for K = 5 and K = 9.

### Instruction encoding

The architecture fixes the mnemonics and the 28-bit word; the bit layout is
this design's own and is documented in `dsp_pkg.sv`. In brief: opcode in
bits 27:21; computational instructions carry 5-bit destination/X/Y codes
(0–7 `*Am`, 8–15 `*Bm`, 16 D0, 17 D1, 18 T, 19 SRA, 20 COUNT, 21 SR0, 22 SR1,
23 FLG) and a "dual" bit that sends the high/low result halves to `*Am`/`*Bm`;
`LD #imm16` reaches a 6-bit register space that adds pointers, increments,
SB/CB and IMR. `tb/dsp_asm_pkg.sv` has one builder function per instruction
form, which is the easiest way to write programs.

## Performance against the target workloads

| Workload | Need | This RTL |
|---|---|---|
| 33-tap FIR | N/2 cycles | 17 FIR2 + SETCT + DO = 19 cycles (measured) |
| Complex MUL/MAC | 1 cycle | 1 cycle (ten CMACs in ten cycles, measured) |
| Viterbi K = 9 (IS-95, 3G) | 128 ACS + 16 SR0 stores = 144 cycles/bit | same, plus 3 cycles per TRCBK step ≈ 147 cycles/bit → 56.4 MHz at 384 kb/s. The simple test program measures 156 cycles per stage + 3.2 per traceback step ≈ 159 cycles/bit (61.1 MHz at 384 kb/s). It reloads six pointers and reads the branch metrics over I/O every stage; a tighter program is needed to stay under 60 MHz |
| Viterbi K = 5 (GSM) | ≈ 10 cycles/bit | 8 ACS + 1 store + 3 = 12 cycles/bit for a tight program; the simple test program measures 21 cycles per stage + 3.2 per traceback step ≈ 24 cycles/bit (0.23 MIPS at 9.6 kb/s) |
| Memory for K = 9 | 256 metrics old/new + 16 words per decoded bit | fits 2 × 2K words |

The published chip ran at 60 MHz; the timing of this RTL has not been
characterised, so whether it reaches that clock is open.

## What is this design's own

Beyond the published structure, these choices were made here and are the
first places to look when adapting the design:

* the instruction bit layout, the operand code space and the I/O address map;
* the division of work between pipeline stages, the hazard stalls, the
  one-cycle branch penalty and the COUNT + 1 loop convention;
* interrupt details (vector `i+1`, IMR, global enable, priority), stack depth 8;
* the address generator's increment registers, single circular buffer per
  generator and wrap rule;
* ACS as *minimum* selection, its lane assignment, the branch-metric byte
  select, the SR0 bit order and the SRA state-update direction;
* correlator accumulator width (16 bits), dump-and-restart on `oe`, clock
  enable instead of a gated clock;
* per-CBE chain bits, dual-code pairing (2i, 2i+1) with the 17th code passed
  through;
* SAT (saturate to 16 bits) and PACK (pack two low bytes) definitions;
* the memories are plain arrays (no SRAM macros); the data memories decode
  only 11 address bits of the 16-bit address space.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and has a watchdog:

| Testbench | What it checks |
|---|---|
| `tb_tcc`, `tb_dual_code_pre`, `tb_cbe`, `tb_correlator_bank` | random samples and codes against reference sums; all phases; chained and independent modes |
| `tb_dsp_alu`, `tb_dsp_cmp`, `tb_dsp_mac`, `tb_dsp_sft` | every operation, random operands, independent reference arithmetic |
| `tb_dsp_agu`, `tb_dsp_ram`, `tb_dsp_pmem`, `tb_dsp_trace` | pointer/modulo stepping, memory ports, SR0/SRA/SR1 behaviour |
| `tb_dsp_core` | a ~270-word program: arithmetic, MUL, CMUL/CMAC timing, 33-tap FIR timing, DO loop with an interrupt, CALL/RET, TEST/TESTZ, DLD/DST, circular buffer, IN, dual ACS, traceback at K = 5 and K = 9; counts every stall type, loop jumps, branches, skips and interrupts |
| `tb_viterbi` | complete rate-1/2 Viterbi decoders as DSP programs, K = 5 (16 states) and K = 9 (256 states); 48 trellis stages with noisy soft symbols each: every transition word against a reference model, decoded bits against the message, ACS issued back to back |
| `tb_wcdma_rx_top` | full-size system (default parameters): a DSP program runs the array in independent, chained and dual-code modes, dumps and reads correlators; results are checked against a model of the array and through the status port |

Run one with Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/dsp_pkg.sv tb/dsp_asm_pkg.sv tb/tb_dsp_core.sv --top-module tb_dsp_core
./obj_dir/Vtb_dsp_core
```

(Replace the testbench name; the two package files are needed by the DSP and
top-level tests.) The full-size top-level test runs about 1,800 clock cycles
and finishes in seconds.

Not verified: gate-level behaviour, timing, and a cell search program (the tests exercise the array modes, not a full receiver
software stack).

## Files

* `rtl/dsp_pkg.sv` — types, opcodes, operand codes, encoding notes
* `rtl/dsp_core.sv` — pipeline, sequencer, register file, hazard logic
* `rtl/dsp_alu.sv`, `dsp_cmp.sv`, `dsp_mac.sv`, `dsp_sft.sv` — datapath units
* `rtl/dsp_agu.sv`, `dsp_ram.sv`, `dsp_pmem.sv`, `dsp_trace.sv` — address
  generators, memories, Viterbi registers
* `rtl/tcc.sv`, `dual_code_pre.sv`, `cbe.sv`, `correlator_bank.sv` — the array
* `rtl/wcdma_rx_top.sv` — top level
* `tb/dsp_asm_pkg.sv` — instruction builders used by the program-level tests
* `tb/tb_*.sv` — testbenches
