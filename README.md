# A numerical processor for robot arm control

This is a single-chip floating point engine meant to sit beside a host
computer and carry the arithmetic of real-time robot arm control: the
inverse dynamics that turn desired joint rates and accelerations into
actuator torques, recomputed for every control tick. The host sends
operands through an input port and reads results from an output port.
Inside, two pipelined floating point units, an adder and a multiplier,
run side by side. A wide ("horizontal") microinstruction controls them.
Each 50-bit word can start one addition and one multiplication in the
same cycle and names all six registers involved. With both units
streaming, the chip delivers two results every 500 ns machine cycle,
which is 4 MFLOPS at the intended speed.

No hardware interlocks check the programmer's work. Each operation's
latency is fixed, so a program stays correct only if every operand has
arrived by the time it is read. The compiler or the microcoder must
schedule for this. Most of this document explains that timing.

## Blocks

| Block | Module | What it is |
|---|---|---|
| Adder unit (AU) | `fp_add` | 3-stage pipeline: align, add, normalize |
| Multiplier unit (MU) | `fp_mul` | 3-stage pipeline: carry-save tree, carry-propagate add, normalize + exponent add |
| (helper) | `cla_adder` | carry-lookahead adder from 4-bit groups, used inside AU and MU |
| Register file (RF) | `reg_file` | 256 x 32, one shared read bus, one shared write bus |
| Input buffer (IB), output buffer (OB) | `async_fifo` | 32 x 32 FIFOs, each side on its own clock |
| Program memory (PM) + PMDR | `prog_mem` | 1K x 50 writeable control store and the instruction register it feeds |
| Program counter stack (PCS) | `pc_stack` | 4 x 10: the PC plus three return addresses |
| Refresh register | `pm_refresh` | 5-bit refresh row counter, one row every 16 M-cycles |
| Delay lines | `dest_delay` | 4-stage lines carrying the destination fields |
| Loop counter (LC) | `loop_counter` | 16-bit down counter |
| Condition code logic (CC) | `cond_code` | adder status flags and branch decisions |
| Control logic | `np_control` | step sequencing, bus multiplexing, issue, stalls, branching, program loader |
| Top | `np_top` | all of the above, wired as one chip |

Shared types and constants are in `np_pkg` (instruction layouts,
condition codes, stack operations).

## The M-cycle and the two shared buses

The basic machine cycle (M-cycle) is 500 ns long. It is divided into four
125 ns steps. `clk` is the step clock. `np_control` counts the steps
(`phase`) and marks the last one with `m_end`. Every pipeline register,
delay line, PCS and PMDR update happens at `m_end`. Only the register
file buses and the operand latches work at step rate.

All 256 registers share one read bus and one write bus. Within an
M-cycle they are time-multiplexed like this:

| Step | Read bus (type 1) | Read bus (type 2) | Write bus |
|---|---|---|---|
| 0 | SA1 to AU operand latch A | register OB to the output buffer tail | |
| 1 | SA2 to AU operand latch B | | AU result to DA, or else the IB head to register IB |
| 2 | SM1 to MU operand latch A | | |
| 3 | SM2 to MU operand B | | MU result to DM |

At the end of the M-cycle the four operands move into the AU and MU
input registers. After that an operation spends one M-cycle in each of
the three stages. Its result therefore sits at the unit's output during
the fourth M-cycle after issue, and it is written in that M-cycle's
first half (AU) or second half (MU).

The destination fields (DA, DM) and the two leading instruction bits are
not needed until then. They travel through the four-stage delay lines
next to the pipelines, so the instruction in the PMDR can move on at
once. The rule for programmers:

> A register written by an operation issued in M-cycle *t* can be read
> by any instruction executing in M-cycle *t+5* or later.

An AU result written at step 1 of M-cycle *t+4* is already visible to
reads at steps 2 and 3 of that M-cycle. Only the fifth cycle is
guaranteed for both units, though.

Nothing ever stops the pipelines or the delay lines. Anything that delays
instruction issue (a stall or a refresh bubble) only adds distance
between an operation and its readers. Such delays never break a
correctly scheduled program.

## Instruction words

The two leftmost bits select the type and which halves are active:

```
type 1:  [49] ign_MU [48] ign_AU | DA[47:40] SA1[39:32] SA2[31:24] | DM[23:16] SM1[15:8] SM2[7:0]
         00 = both units, 01 = MU only, 10 = AU only, 11 = this is a type 2 word
type 2:  [49:48]=11 | [47] ign_OB [46] ign_IB | IB[45:38] OB[37:30] | NA[29:20] | CC[19:0]
         CC = { lc_val[19:4], cond[3:0] }
```

A type 2 word moves the input buffer head into register `IB`, sends
register `OB` to the output buffer, and then evaluates `cond`:

| cond | name | effect |
|---|---|---|
| 0 | NEVER | continue in sequence |
| 1 | IBFULL | jump to NA if the input buffer is full |
| 2 | OBFULL | jump to NA if the output buffer is full |
| 3 / 4 / 5 | POS / NEG / ZERO | jump to NA on the status of the latest adder result |
| 6 | ALWAYS | jump to NA |
| 7 | LOOP | if LC is not 0: decrement LC and jump to NA |
| 8 | CALL | push the return address, jump to NA |
| 9 | RET | pop: continue after the last CALL |
| 10 | LDLC | load LC with `lc_val` |

Either ignore bit suppresses its transfer. With both bits set nothing is
transferred, but the condition is still evaluated. An all-zero CC field
then makes the word a no-operation, and any other CC makes it a pure
branch. The branches have no delay slot: the word at NA executes in the
very next M-cycle.

The adder's status flags change at the end of every M-cycle that has an
adder result. A branch on POS, NEG or ZERO therefore tests the latest
result that has arrived. For an operation issued in cycle *t*, that
means placing the branch in cycle *t+5*, before any later addition
completes.

## When an instruction waits

A type 2 word waits in the PMDR and tries again in the next M-cycle in
three cases:

* its IB transfer finds the input buffer empty;
* its OB transfer finds the output buffer full;
* its IB transfer would need the write-bus half that an adder result is
  due to use in that M-cycle.

The decision is taken at step 0 and held for the rest of the M-cycle, so
a transfer is never half done. The third case happens only when an
adder operation was issued exactly four M-cycles earlier. It resolves
within a few M-cycles, because no new operations are issued while the
word waits.

## Floating point units

Numbers use the 32-bit single format, X = (-1)^S x 2^(E-127) x 1.F. Only
normalized numbers are handled. An exponent field of 0 is read as zero.
Results are truncated, not rounded. A result too small to normalize
becomes +0, and one too large is clamped to the largest finite value
(0x7F7FFFFF with the sign). There are no infinities, NaNs, denormals or
exception flags.

*Adder.* Stage 1 subtracts the 8-bit exponents. It picks the operand
with the larger exponent and shifts the other significand right in a
five-level barrel shifter. Bits shifted out are lost: there are no
guard bits. Stage 2 adds or subtracts the two 24-bit significands and
sets the sign. Stage 3 normalizes. A carry-out shifts right by one;
otherwise a leading-zero count drives a left shift and the exponent is
lowered to match. Because of truncation, 1.0 - 2^-24 gives 1.0, and any
result can be off by up to one unit in the last place of the larger
operand.

*Multiplier.* Stage 1 forms 24 partial products with AND gates. It
reduces them with a tree of 3-to-2 carry-save adders, written as a
generate loop: 24, 16, 11, 8, 6, 4, 3, then 2 rows. Stage 2 adds the
final sum and carry words into the 48-bit product. Stage 3 shifts right
by at most one place and keeps the top 24 bits. It adds the exponents,
including that one-place shift, in a single addition.

The carry-propagate adders are built as carry-lookahead adders from
groups of four bits (`cla_adder`). Each level of the tree combines four
blocks into one group generate and propagate pair, and the carries run
back down. A parameter sets how many levels are looked ahead; above
that, blocks ripple. The multiplier's 48-bit adder is one tree of height
3. The adder's 24-bit significand adder looks ahead only within each
4-bit group, and its two 8-bit exponent subtractors have full lookahead.
The exponent and normalization arithmetic in the third stages, which the
original builds from a ripple adder and shifters, is written with `+`
and `-`.

## Program memory, refresh and the program counter stack

The program memory is written only by the loader. At each `m_end` the
PMDR loads the word at the address the PCS supplies. The top of the PCS
is the address of the next word to fetch. Entries 1 to 3 hold return
addresses, so calls nest three deep. Pushing onto a full stack drops the
oldest entry (`ovf`), and popping an empty one sets `unf`.

The memory is meant to be built from dynamic cells, one row per 32
words. Every 16th M-cycle the refresh register claims the memory's read
port to refresh the next of 32 rows. The instruction fetch of that
M-cycle is lost, the PMDR is empty for one M-cycle, and the same address
is fetched again afterwards. The whole memory is refreshed every 512
M-cycles. The array here is static, so refresh changes only the timing,
not the data. The rate therefore drops by about 1/16 compared with a
schedule that ignores refresh.

## Ports, buffers and loading

`in_clk`, `in_wr`, `in_data` and `in_full` form the host's side of the
input buffer. `out_clk`, `out_rd`, `out_data` and `out_empty` form its
side of the output buffer. Each buffer is a dual-clock FIFO with
Gray-coded pointers and two-flop synchronizers. The flags are
conservative: the writer may see "full" a few words early, and the
reader may see "empty" a few cycles late. The IBFULL branch uses the
processor-side view.

Programs arrive through the same input port. While `load` is high, no
instruction executes and every input word is a loader command:

* `01` in bits 31:30, address in bits 9:0: the next two words are the low
  32 and high 18 bits of the PM word for that address;
* `10` in bits 31:30, address in bits 9:0: set the PC, empty the stack
  and the PMDR, and mark the processor `running`.

Execution starts from that address once `load` falls. Raising `load`
again pauses the processor at an M-cycle boundary. Results already in the
pipelines still land.

## What comes from the original description and what was chosen here

These points follow the original specification: the block set and its
connections; the sizes (256 x 32 RF, 32 x 32 buffers, 1K x 50 PM, 4 x 10
PCS, 16-bit LC, 5-bit refresh counter, refresh every 16 M-cycles); the
three-stage split of both units; the four read steps and two write
halves; the four-stage destination delay; the five-M-cycle round trip;
the order and meaning of the instruction fields and type bits; and the
list of branch conditions.

These are this design's own choices:

* the step clock and the order of reads within an M-cycle;
* the use of the write bus during type 2 words, and all stall rules;
* the bit widths of the type 2 fields beyond NA, and the CC encoding;
* the loop counter instructions (LOOP, LDLC);
* how CALL and RET work: the original says only that NA is "stacked" on a
  taken branch. Plain conditional jumps here replace the PC and do not
  push;
* evaluating CC in a word with both ignore bits set. The original calls
  that word a no-operation that ignores every other field. Here that
  holds only while CC is zero;
* the loader protocol and the `load` pin;
* zero, underflow and overflow handling;
* the synchronizer design.

Two small differences from the original's numbers. The original
estimates the multiplier's carry-save tree at 8 levels; reducing 24 rows
to 2 takes 7, and that is what is built. The original counts the
refresh interval once in instruction fetches and once in M-cycles. This
design counts M-cycles, so a stall does not delay a refresh.

Not built: the host computer, the pads, and the transistor-level memory
cells (the dynamic PM and the static RF are plain arrays). Also not
built is a reciprocal unit, which the original mentions only as a
planned addition.

## Simulating

Every module has a self-checking testbench in `tb/`. Each ends by
printing `TB_RESULT checks=N failures=M`. To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/np_pkg.sv tb/fp_ref_pkg.sv rtl/*.sv tb/tb_np_top.sv \
    --top-module tb_np_top -Mdir obj && ./obj/Vtb_np_top
```

For a unit test, swap in `tb/tb_fp_add.sv` and `--top-module tb_fp_add`
(likewise for the others). `np_pkg.sv` is listed first because the other
files import it. Verilator may warn that it was given twice; that
warning is harmless.

`tb/fp_ref_pkg.sv` holds the reference arithmetic: the same truncating
format, computed with 64-bit integers. The unit tests compare against it
exactly, and also against real-number arithmetic within one unit in the
last place.

`tb_np_top` runs the whole chip at its default sizes with a host model on
both ports:

1. It loads a program through the input port. A small scheduler in the
   testbench builds the program: it packs adder and multiplier
   operations into type 1 words under the five-cycle rule.
2. The program runs the first two steps of the forward recursion of a
   six-link arm's dynamics, with z = (0,0,1):
   w_i = A_i (w_(i-1) + thetadot_i z) for the angular velocity and
   a_i = A_i (a_(i-1) + thetadotdot_i z + w_(i-1) x thetadot_i z) for
   the angular acceleration. From w_i and a_i it then forms the 3x3
   matrix that the linear acceleration step uses: -(wy^2+wz^2),
   wx wy - az, wx wz + ay in the first row, and likewise for the others.
   Each link takes 32 products and 26 sums. The link loop runs on the
   loop counter. Each link's w_i goes out through a nested subroutine
   call, followed by a_i and the nine matrix entries.
3. It tests the ZERO, NEG and POS branches.
4. It waits on IBFULL and then echoes 36 words while the host holds off
   reading.
5. Midway through the link loop it pauses the processor with `load` and
   checks that nothing moves until `load` falls.
6. It loads a second program: 40 words that each start one addition and
   one multiplication. It checks every result, and it checks that the 80
   results arrive in at most 44 M-cycles. That is two per M-cycle, or 4
   MFLOPS at a 2 MHz M-cycle, apart from the refresh bubbles.

Every output word is checked against the reference arithmetic. The test
also fails if any of these never happened:

* a stall of each kind;
* a refresh bubble;
* a taken and a not-taken branch of each condition used;
* a call or a return;
* dual or single issue;
* a pause through `load`.

It runs in well under a second.

## Size

After generic synthesis the top has about 1,000 word-level cells and 850
flip-flop bits. It has 61,440 memory bits: 51,200 in the PM, 8,192 in the
RF and 2 x 1,024 in the buffers. The multiplier and the adder are the
largest blocks of logic; the lookahead adders count as many small gate
cells each.
