# Reconfigurable lifting-based DWT processor

This is a discrete wavelet transform (DWT) engine for images. You choose the
wavelet filter and the decomposition structure at run time, and no hardware
changes. A frame sits in an external frame memory. The processor reads it one
line at a time, transforms each line in one dimension, and writes the low-pass
and high-pass halves back. A small program of such 1-D passes, rows and then
columns, level after level, makes a 2-D transform. That can be a plain
multi-level (dyadic) transform or a full wavelet packet transform.

Two ideas carry the design:

* **Every filter is a chain of lifting steps, and every lifting step has the
  same shape.** A step adds a scaled combination of neighbouring samples of one
  polyphase lane (even or odd samples) to a sample of the other lane. One small
  arithmetic unit can do any such step. Only its coefficient and its operand
  selection change.
* **Filters with more steps than hardware units are folded.** Two processing
  elements (PEs) each run one or two lifting steps per sample pair. A filter
  with 2 steps runs at 2 samples/cycle. A filter with 3 or 4 steps runs at
  1 sample/cycle.

Supported filters and measured rates (2 PEs):

| filter | lifting steps | samples/cycle | MCU slots used |
|--------|---------------|---------------|----------------|
| (5,3)  | 2 | 2 | 2 of 2 (100 %) |
| (9,3)  | 3 | 1 | 3 of 4 (75 %)  |
| (9,7)  | 4 (+ scaling) | 1 | 4 of 4 |
| (2,10) | 4 | 1 | 4 of 4 |
| (13,7) | 4 | 1 | 4 of 4 |

At a 50 MHz clock the (5,3) filter gives 100 Msamples/s. A 720×576 frame
(CCIR 601) with a two-level wavelet packet transform takes 833,438 cycles in
simulation. That is 16.7 ms, which fits the 33.3 ms of a 30 frame/s video.

## Block diagram

```
            +-----------------------------------------------+
 start ---->| rdwt_ctrl (sequencer)                         |--> busy, done
 filt_sel ->|   loads the filter context, walks the passes  |
 prog_sel ->+-------+----------------------+----------------+
                    |                      |
          +---------v--------+   +---------v---------+
          | pe_context_mem   |   | ag_context_mem    |
          | PLA: 5 filters   |   | PLA: 4 programs   |
          | RAM: 4 user      |   | RAM: 16 user pass |
          +---------+--------+   +---------+---------+
                    | filt_cfg_t           | pass_t
                    |            +---------v----------------------+
                    |            | wpt_ag: input + output address |
                    |            | generators (wpt_addr_gen x2)   |
                    |            +----+----------------------+----+
                    |                 | read addresses       | write addresses
 frame    +---------+------+    +-----v--------+       +-----v---------+    frame
 memory ->| rdwt_input_unit|--->| dwt_pe_array |------>|rdwt_output_unit|-> memory
 2 reads  +----------------+pair| PE0->PE1->K  | L,H   +---------------+   2 writes
                                +--------------+
```

## Lifting steps and the MCU

A lifting step updates one lane from the other. The three forms used are:

* (a) `x += c·(y[i] + y[j])`: symmetric. Used by almost every filter.
* (b) `x += c·(y[i] − y[j])`: antisymmetric. Used by (2,10).
* (c) `x += c·y[i]`: one tap only. Used by the first steps of (2,10).

`dwt_mcu` computes `D = A + coef·(B ± C)`, or `D = A + coef·B`. It has one
adder/subtractor, one multiplier and one more adder. Coefficients are Q3.12,
16-bit two's complement with 12 fraction bits. Samples are 16-bit signed
integers. The product is rounded to the nearest integer, with halves going
up, and the sum saturates at the 16-bit range. With the coefficients −1/2 and
1/4, this rounding makes the (5,3) path match the integer 5/3 lifting of
JPEG 2000 exactly.

## The PE: delay chains, slots and folding

`dwt_pe` holds one MCU and three delay chains of 5 registers each:

* chain 1: the even samples of the incoming pairs;
* chain 2: the odd samples of the incoming pairs;
* chain 0: the results of the PE's first slot, fed back for its second slot.

A new pair shifts chains 1 and 2. The PE then runs `fold` time slots (1 or 2).
In each slot a mux picks the MCU inputs A, B and C. Each one is a
(chain, tap) pair, where tap 0 is the newest entry. The result of slot 0 is
shifted into chain 0. After the last slot, two more selections form the output
pair, which is registered. That register is the pipeline cut between PEs.

The context of one PE (`pe_cfg_t` in `rdwt_pkg`) is, per slot, a category, a
coefficient and three tap selections, plus two output selections. For
example, the (5,3) predict step `o[m] += −1/2·(e[m] + e[m+1])` on PE 0 is

```
slot0: OP_SUM, coef -2048, A = odd tap 1, B = even tap 1, C = even tap 0
out_e = even tap 1, out_o = MCU result
```

Because the newest even sample `e[m+1]` is needed, the odd output trails the
input by one pair. In general, each step that looks ahead by one pair delays
its output pair by one pair. The total is the filter's **lag**, stored in its
context: 1 for (5,3), 2 for (9,7), (9,3) and (2,10), and 3 for (13,7). In a
folded PE, slot 1 reads the slot-0 results from chain 0. This is how the (9,7)
update step `e += β·(o[m-1] + o[m])` sees the odd samples that slot 0 has just
predicted.

Timing: a pair accepted at edge *t* leaves the PE at edge *t + fold*. Pairs
may arrive at most once every `fold` cycles.

### Line ends

Each line is extended with zeros at both ends. A pair flagged `first` clears
all three chains before it is shifted in, so no history leaks from the
previous line. The input unit appends `lag` all-zero pairs after each line to
flush the last real outputs out of the pipeline. The output unit drops the
first `lag` output pairs of each line, which belong to the previous line's
flush.

The (5,3) reference used in the testbenches is a plain textbook lifting over a
zero-extended line. Symmetric extension, which JPEG 2000 uses, is not
implemented, so the first and last few coefficients of a line differ from a
JPEG 2000 codec.

## The PE array and scaling

`dwt_pe_array` chains `NUM_PE = 2` PEs. PE 0 runs steps 1–2 and PE 1 runs
steps 3–4. The first PE's feedback therefore stays inside it. `dwt_scale`
follows and multiplies the low band by K and the high band by 1/K, one
register stage later. For (9,7), K = 1.1496. The other filters use K = 1.

The latency from the input pair to the output pair is `NUM_PE·(fold+1)`
cycles, plus `lag` pairs of algorithmic delay. `NUM_PE` is a package constant
in `rdwt_pkg`. Changing it also changes the context struct, and the default
filter table then has to be redone.

Filter coefficients (Q3.12 value / real value):

| filter | step 1 | step 2 | step 3 | step 4 |
|--------|--------|--------|--------|--------|
| (5,3)  | o: −2048 (−1/2) | e: 1024 (1/4) | | |
| (9,7)  | o: −6497 (α) | e: −217 (β) | o: 3616 (γ) | e: 1817 (δ) |
| (9,3)  | o: −2048 (−1/2) | e: 1216 (19/64) | e: −192 (−3/64, taps o[m−2], o[m+1]) | |
| (13,7) | o: −2304 (−9/16) | o: 256 (1/16, taps e[m−1], e[m+2]) | e: 1152 (9/32) | e: −128 (−1/32) |
| (2,10) | o: −4096 (−1, one tap) | e: 2048 (1/2, one tap) | o: 1408 (11/32, difference) | o: −192 (−3/64, difference) |

## Context memories

The two context memories each have a read-only default part and a writable
user part, and they share one address space:

* `pe_context_mem` holds whole filters (`filt_cfg_t`: fold, lag, K, 1/K and
  both PE contexts). Indices 0–4 are the default filters, in the order (5,3),
  (9,7), (9,3), (2,10), (13,7). Indices 5–8 are user RAM. The selected entry
  is registered and held for the whole run.
* `ag_context_mem` holds pass descriptors (`pass_t`). Addresses 0–31 are the
  defaults, built from the frame size. Addresses 32–47 are user RAM.

## Pass programs and the address generator

A pass descriptor gives:

* the direction (row or column);
* the source and destination corners;
* the number of lines and the line length;
* a `last` flag.

A program is the list of descriptors from its start address up to the first
`last`.

The frame memory has two halves, A (rows 0…H−1) and B (rows H…2H−1). A row
pass reads a region of A and writes it to B. A column pass reads it back from
B to A. After each level the result is in A, in the usual quadrant layout:
L at the start of a line and H half a line further.

Default programs (start addresses in `rdwt_pkg`):

| start | program | passes |
|-------|---------|--------|
| 0  | one-level 2-D | 2 |
| 2  | two-level dyadic (LL split again) | 4 |
| 6  | two-level full wavelet packet (all four subbands split again) | 10 |
| 16 | three-level dyadic | 6 |

`wpt_ag` holds two `wpt_addr_gen` instances. The input generator steps two
samples per position. The output generator steps one coefficient per
position. Each generator has:

* a counter with its own small FSM for the position along a line;
* a second counter and FSM for the line number;
* a mux that maps (line, position) onto (row, column), swapping them for
  column passes.

The generators advance on strobes from the I/O units. The output side
therefore follows the input side at whatever distance the PE array's latency
sets.

## Memory interface

The frame memory is outside the design. `rdwt_top` brings out:

* two read ports with a shared enable. The data comes one cycle after the
  address. Port 0 reads the even sample and port 1 the odd sample, at the
  next column in a row pass or the next row in a column pass.
* two write ports with a shared enable. Port 0 writes L at the output
  address. Port 1 writes H half a line further along.

`tb/frame_mem_model.sv` is a behavioural memory of this kind, with 2·H rows.

## Sequencing and timing

Pulse `start` with `filt_sel` (PE context index) and `prog_sel` (AG context
address). `rdwt_ctrl` then:

1. loads the filter;
2. reads a pass descriptor;
3. starts the address generator and the input unit;
4. waits until the output unit has written the last pair;
5. repeats from step 2 until the pass flagged `last`, then pulses `done`.

Passes do not overlap, so a column pass never reads data that has not been
written yet.

Cycles per pass are about `fold · lines · (len/2 + lag)` plus a few cycles to
fill the pipeline. Measured on 720×576:

* (5,3) two-level packet: 833,438 cycles.
* (9,7) two-level dyadic: 1,044,624 cycles.
* (9,7) two-level packet: 1,674,552 cycles. At 50 MHz that is 0.5 % over
  one 30 frame/s period (1,666,666 cycles), because of the per-line flush
  pairs. Real-time packet transforms at this frame size therefore need the
  (5,3) filter or a faster clock.

User contexts are written through `pe_ctx_we/widx/wdata` and
`ag_ctx_we/widx/wdata` while the processor is idle.

## What is this design's own

The overall structure follows the original architecture:

* a linear array of lifting PEs with folding;
* three delay chains and an FSM per PE;
* an MCU of the add, multiply, add form;
* context memories split into default and user parts;
* an address generator made of two counter/FSM pairs and a row/column mux.

These choices are this design's own:

* **Boundary handling:** zero extension, not symmetric extension.
* **Word widths:** 16-bit data and Q3.12 coefficients, with round-to-nearest
  and saturation.
* **Encodings:** the context layouts (`pe_cfg_t`, `pass_t`) and the pass-list
  program format. The original does not publish them.
* **Sequencer:** the original describes no separate sequencer or run
  interface. `rdwt_ctrl` and the start/done handshake are added here.
* **Memory interface:** two read ports and two write ports, so that the (5,3)
  rate can be fed. The buffer A/B layout is also a choice made here.
* **Coefficients:** the (9,3), (2,10) and (13,7) factorisations are standard
  ones chosen for this design. (9,3) uses −1/2, 19/64 and −3/64, which gives
  the low-pass filter (3, −6, −16, 38, 90, 38, −16, −6, 3)/128. The (9,7)
  coefficients are the usual JPEG 2000 ones.
* **Capacity:** at most two slots per PE, so with two PEs a filter may have
  at most four lifting steps, each reaching at most five pairs back into a
  delay chain. Longer factorisations need more PEs (`NUM_PE`) or deeper
  chains (`DEPTH` in `rdwt_pkg`). Folding by more than two would also need
  more states in the slot FSM of `dwt_pe`.
* **Not built:** the inverse transform, the fourth lifting category
  (two multipliers), and any host processor. The clock rate has not been
  timed.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. The testbenches compare against
`tb/dwt_ref_pkg.sv`, a direct software lifting model. For example, with
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/rdwt_pkg.sv tb/dwt_ref_pkg.sv rtl/*.sv tb/frame_mem_model.sv \
  tb/rdwt_top_tb.sv --top-module rdwt_top_tb
./obj_dir/Vrdwt_top_tb
```

`rdwt_top_tb` runs the whole processor on a 16×8 frame. It covers:

* all five filters;
* all four default programs;
* a user filter and a user program loaded into the RAM parts.

It checks every written coefficient against the reference. It also counts
each mechanism:

* fold 1 and fold 2;
* row and column passes;
* flush pairs and discarded lag pairs;
* the user RAM contexts;
* wavelet-packet passes;
* filter changes between runs.

A mechanism that never happens counts as a failure.

`rdwt_top_full_tb` uses the default 720×576 size. It runs a (5,3) two-level
wavelet packet transform, then (9,7) two-level dyadic and packet transforms.
It compares both frame buffers with the reference after each run and checks
the (5,3) cycle budget for 30 frames/s. It finishes in a few seconds.

To run one block, compile the package, the reference package, the block's
modules and its testbench the same way, with the testbench as top.
