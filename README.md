# Scalable radix-4 Montgomery multiplier

This is a modular multiplier for public-key cryptography (RSA, Diffie-Hellman,
ECC). It computes

    RES = A * B * 2^-N  mod M        (M odd)

by Montgomery's method. Each step adds a multiple of the modulus that makes
the partial sum divisible by the radix, then shifts. No trial division is
needed.

Three ideas shape the hardware:

* **Radix 4 with two recodings.** Each iteration consumes two bits of A. A
  plain radix-4 step would need the multiples 3B and 3M, which take an extra
  adder. Two recodings remove them:
  * Booth recoding turns the multiplier digit into qa in {-2,-1,0,+1,+2}.
  * A Montgomery recoding (it uses 3 = -1 mod 4) turns the reduction digit
    into qm in {-1,0,+1,+2}.

  Every multiple is then a shift and/or an inversion of B or M.
* **Word-serial, pipelined ("scalable").** Operands are processed in W-bit
  words, one word per clock.
  * A pipeline of NS processing elements (PEs) works on NS digits of A at
    once. Each PE runs one iteration.
  * A larger N needs only more word storage and more passes, not a wider
    datapath.
* **Low switching activity.**
  * Latches that are open only while the clock is low ("glitch blockers")
    keep recoder glitches off the W-bit wide multiple generators.
  * The select line of a multiple generator is frozen while its digit is
    zero.
  * The select codes are chosen so that successive Booth digits toggle the
    line as little as possible.

The default build is N = 256-bit operands, W = 8-bit words and NS = 16
stages. A multiplication takes 564 clock cycles from `start` to `done`.

## The iteration and its number representation

This part needs the most care. The algorithm, for j = 0, 2, 4, ..., N-2:

    qa = Booth(a[j+1], a[j], a[j-1])           a[-1] = 0
    SP = S + qa*B
    qm = MontRecode(SP mod 4, M bit 1)         makes SP + qm*M = 0 mod 4
    S  = (SP + qm*M) / 4

There are N/2 iterations. The Booth digits give A exactly if A < 2^(N-1).

| SP mod 4 | M = 1 mod 4 | M = 3 mod 4 |
|----------|-------------|-------------|
| 0        | 0           | 0           |
| 1        | -1          | +1          |
| 2        | +2          | +2          |
| 3        | +1          | -1          |

**S is signed and redundant.** Because qa and qm can be negative, S can be
negative. It is kept in carry-save form, as two vectors SS and SC, plus one
extra bit h of weight 1: S = SS + SC + h. The representation has three
rules:

* **Lower words.** All words except the top one hold unsigned bit fields.
  Each carry-save adder row passes the carry out of its top bit to bit 0 of
  the carry vector of the next word, through a register. Each PE has two
  such rows, so two carry bits cross every word boundary.
* **Top word.** Word E-1 is made non-redundant. Its SS and SC halves are
  added by a W-bit adder, and the sum is a two's-complement word whose MSB
  is the sign of S. This is exact because four guard bits are kept above N:
  * the sizes are E = ceil((N+4)/W) words;
  * for the allowed operands, |S + qa*B + qm*M| < 2^(N+2).
* **Hidden bit h.** The division by 4 drops the two low bits of word 0 in
  both vectors. With the hidden bit they always sum to 0 or 4:
  (SS[1:0] + SC[1:0] + h) is 0 or 4. The carry of that 2-bit sum becomes the
  next iteration's h. The datapath never adds h into the adder rows. It is
  used only where the exact value matters:
  * in the 2-bit converter that feeds the Montgomery recoder;
  * in the final conversion to binary.

**Negative multiples** are the one's complement of the magnitude, word by
word. The "+1" enters as the carry-in of the adder row on word 0.

**Doubling** is a one-bit left shift across words: the previous word's MSB
enters at bit 0.

**Result range.** With M odd, M < 2^(N-1), A < 2^(N-1) and B < M, the
result satisfies -M < RES < 4M/3 and RES = A*B*2^-N (mod M). RES is
returned as an E*W-bit two's-complement number. Reducing it into [0, M) is
left to the user: add M if it is negative, subtract M if it is M or more.

## Processing element (`pe`)

One PE performs one iteration on a word stream (least significant word
first, flags `first`/`last`). A register inside the PE splits it into two
sections. The first section works on the word at the PE's inputs. The
second section works, one cycle later, on the same word taken from the
register.

**First section** (only the two low bits of each word):

1. **Booth recoder** (`booth_recoder`). It recodes the stage's 3-bit digit
   triple, loaded once per iteration from the broadcast digit bus, into the
   controls NEG/EN/SEL. A glitch blocker (`glitch_blocker`) sits on these
   controls.
2. **PP generator, low bits** (`multiple_generator`). It forms bits 1:0 of
   the word of qa*B.
3. **CSA0** (`csa`, 2 bits). It adds them to SS[1:0] + SC[1:0]. Its
   carry-in is the +1 of a negative multiple on word 0. On the other words
   it is the carry out of CSA1 for the previous word. The second section
   produces that carry in the same cycle.
4. **CS converter** (`cs_converter`). It forms the two low bits of
   S + PP + h for the recoder.

**Second section:**

5. **PP generator, high bits**, and **CSA1** (W-2 bits). They add bits
   W-1:2 of the word. The result is joined with CSA0's bits.
6. **Montgomery recoder** (`montgomery_recoder`). On word 0 it turns the
   converter's bits and M bit 1 into qm. It holds qm for the remaining
   words. Its controls also pass a glitch blocker.
7. **PM generator** and **CSA2**. They add qm*M.
8. **Shift & alignment** (`shift_align`). It builds output word i-1 from
   the low two bits of word i and the high W-2 bits of word i-1. It
   resolves and sign-extends the top word and produces the next hidden bit.

**Timing.** Word i enters at cycle t+i, passes the register at the end of
that cycle, and leaves in cycle t+i+2. The output is combinational from the
shift & alignment block and goes straight to the next PE's first section. B
and M pass the stage register and one more flip-flop, so that they leave
together with their S word. The next stage therefore starts two cycles
later. `a_load_next` tells it to load its digit in the cycle before its
first word.

**Why the split helps.** The two low bits of each output word come from
registers (bits 3:2 of the previous word). The next PE's first section
therefore gets them early in the cycle. Its path is:

> registered low bits -> CSA0 (2 bits) -> converter -> stage register.

The second section's path is:

> stage register -> CSA1 -> Montgomery recoder (word 0) -> glitch blocker ->
> PM generator -> CSA2 -> shift & alignment -> next PE's stage register.

Neither path contains both the recoder input and the full-word addition.

## Pipeline, passes and timing (`kernel_datapath`, `kernel_control`)

**The pipeline.** `kernel_datapath` chains NS PEs. A 3-bit digit bus is
shared by all stages. Stage s loads its triple 2s cycles after stage 0, so
one stage is loaded every second cycle.

**Passes.** `kernel_control` runs ceil((N/2)/NS) passes. In each pass:

1. It loads the digits pass*NS ... pass*NS+NS-1 into the stages.
2. It streams the E words of B, M, SS and SC from the registers into
   stage 0. On the first pass SS, SC and h are zero.
3. It writes the words leaving the last stage back in place.

The write-back of word k always trails the read of word k, so one set of
arrays is enough.

**Shortened final pass.** If N/2 is not a multiple of NS, the final pass
takes its result from stage `last_stage`, and later stages receive no
words.

**Cycle counts.**

| Step                              | Cycles              |
|-----------------------------------|---------------------|
| one pass with L stages            | E + 2L + 1          |
| `start` to `done`                 | sum of passes + E + 3 |
| default build, one pass (33 + 32 + 1) | 66              |
| default build, whole multiplication (8 passes) | 528 + 36 = 564 |

Passes do not overlap.

## Low-power measures

* **Glitch blockers.** Each recoder output goes through a latch that is
  transparent while the clock is low.
  * Each recoder's controls must settle before the falling clock edge.
  * The latch then passes the controls once, so the multiple generators and
    adder rows see PP and PM controls arrive together.
  * In a zero-delay simulation the latch is transparent for everything the
    rising-edge registers sample. Its effect is on power only.
  * Synthesis reports these latches (6 latch bits per PE). They are
    intended.
* **SEL freeze.** When a digit is 0 (EN = 0) the generated word is zero
  whatever SEL is. SEL then keeps its previous value through a 1-bit
  register loop.
* **SEL coding.** The codes are:

  | Multiple | SEL |
  |----------|-----|
  | +B       | 0   |
  | +2B      | 1   |
  | -B       | 1   |
  | -2B      | 0   |

  +B and +2B have inverse codes, and so do -B and -2B. A Booth digit of
  magnitude 2 cannot follow one of the same sign, which keeps SEL quiet.
  The generator doubles when SEL xor NEG is 1. The Montgomery side uses
  +M: 0, +2M: 1, -M: 1.

## Registers and user interface (`operand_regs`, `io_control`, `io_datapath`, `mwr4mm_top`)

**Protocol.**

1. While `busy` is low, write the E words of A, B and M through
   `ld_valid` / `ld_sel` (`OP_A`, `OP_B`, `OP_M`) / `ld_addr` / `ld_data`.
   Word 0 is the least significant. Unused high words must be written as
   zero.
2. Pulse `start`.
3. When `done` pulses, read the E result words through `rd_addr` /
   `rd_data`. The read is combinational.

**Conversion.** After the kernel finishes, `io_datapath` converts SS + SC
+ h to binary word by word, with a rippling carry. `io_control` sequences
the conversion.

The registers have no reset: every location is written before it is read.
Control state uses an active-low asynchronous reset `rst_n`.

## Parameters

| Parameter | Default | Meaning |
|-----------|---------|---------|
| `N`  | 256 | operand precision in bits (must be even) |
| `W`  | 8   | word size in bits (at least 4) |
| `NS` | 16  | pipeline stages (PEs) |
| `E`  | ceil((N+4)/W) = 33 | words per operand, including the guard bits |

These defaults are the fastest configurations reported for this
architecture:
* W = 8 gave the shortest total times.
* NS = 16 is close to the fastest point for 256-bit operands.

Other reported operating points only change these parameters: 1024-bit
operands, and word sizes of 16 to 128 bits.

## Departures from the published architecture

* **Top-word sign.** The published algorithm takes the top word's sign from
  a carry. Here the top word is made binary by a W-bit adder, with four
  guard bits (E = ceil((N+4)/W) instead of ceil(N/W)).
* **Hidden bit.** The hidden bit appears in the published PE only as a
  signal name. Its function here (the carry of the dropped low bits) is
  this design's reading.
* **Shortened final pass.** `last_stage` handles a digit count that is not
  a multiple of NS. This is an addition.
* **Own designs for named blocks.** The IO blocks, the register file and
  the kernel control are only named in the published architecture. The
  versions here are the simplest that work:
  * non-overlapped passes;
  * binary conversion of the result;
  * no final subtraction.

## Files

Source files:

* `rtl/mwr4mm_pkg.sv`: shared types: the control word `mult_ctrl_t`,
  `operand_e`, `num_words()`.
* Leaf blocks: `booth_recoder`, `montgomery_recoder`, `glitch_blocker`,
  `multiple_generator`, `csa`, `cs_converter`.
* `shift_align`, `pe`, `kernel_datapath`, `kernel_control`.
* `operand_regs`, `io_datapath`, `io_control`.
* `mwr4mm_top`.

Testbenches:

* Each block has a self-checking testbench `tb/tb_<block>.sv`. Each prints
  `TB_RESULT checks=.. failures=..`.
* `tb/tb_mwr4mm_top.sv` runs 44 multiplications at N = 64, NS = 5, which
  includes a shortened last pass. It checks each result against a
  wide-integer reference and checks the latency. It counts:
  * every Booth digit value and every Montgomery digit value;
  * SEL freezes;
  * set hidden bits;
  * negative results;
  * shortened passes.
* `tb/tb_mwr4mm_full.sv` is the same test at the default parameters.
* `tb/tb_mwr4mm_workloads.sv` runs the multiplier through the helper
  `tb/mwr4mm_runner.sv` at three other sizes:
  * N = 1024, W = 8, NS = 16;
  * N = 256, W = 32, NS = 4;
  * N = 1024, W = 64, NS = 2.

To simulate one testbench with Verilator, from the directory above `rtl/`:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/mwr4mm_pkg.sv tb/tb_mwr4mm_top.sv --top-module tb_mwr4mm_top
    ./obj_dir/Vtb_mwr4mm_top

All testbenches finish in well under a second of simulation.

## How far to trust it

**Tested.**

* Every block passes its own randomised testbench. The checks compare
  against values computed independently:
  * Booth digit values;
  * the divisibility condition of qm;
  * exact integer results of PE and pipeline iterations;
  * full modular products.
* Each testbench has been shown to fail on a deliberately broken copy of
  its block.
* Full multiplications are checked at N = 64, 256 and 1024, and at
  W = 8, 32 and 64.

**Not shown.** The power savings are a property of gate-level timing, and a
zero-delay simulation cannot show them. They depend on the recoders
settling within the first half of the clock period.
