# RBF pattern classifier: 1024 prototypes, L1 distance, RCE and PNN in one pipeline

This classifier compares an input vector of up to 256 five-bit features with
1024 stored prototypes at once. It measures the city-block (L1) distance `D`
to every prototype, then produces two answers per vector:

* **RCE:** a list of *fired* classes. Prototype *i* fires when it is in use
  and `D_i < L_i`. `L_i` is the prototype's threshold, its radius of
  influence.
* **PNN:** an un-normalised probability density for each of 64 classes:
  `PDF_k = Σ_{i in class k} C_i · exp(−K_i · D_i)`.

The main idea is brute-force parallelism that is still cheap in area. 512
small distance units sit beside the prototype array. Each unit is
time-shared between two prototypes, one from each half of the array. A
pipelined math unit turns one distance per clock into the class list and
the densities. Every buffer between the stages is doubled: input vector,
distance latches and result RAM. So while one vector is being scored, the
next one is already being measured.

With 1024 prototypes of 256 dimensions:

* a distance pass takes 514 clocks;
* the math unit needs 519 clocks per half-array;
* a new vector is classified every 1032 clocks in steady state.

The RTL covers the whole classify path plus the memories and timer of the
on-chip micro-controller. The controller core itself is left out: its
instruction set is not defined here. Its bus is brought out as ports.

## Block map

```
 host words ──► ibr ──► padcu (proto_array + 512 × dcu) ──► mu ──► mur ──► obr ──► host words
 (32/64 bit)   2×256×5      distance latches 2 × 512 × 13     │  ▲   2 banks        16-bit float or
                 ▲                                            ▼  │                  IEEE-32, packed
                 └──────────── cmc (sequencing) ──────────── ppr (3 × 1K × 16)
 ioc: 16 host/uC registers, mode      gr, timer, pgf: micro-controller side
```

| file | block |
|---|---|
| `pc_pkg.sv` | Constants, the 16-bit float format and its arithmetic, the 48-bit parameter word, the mode enum |
| `dcu.sv` | One distance unit: `|A−B|`, 13-bit accumulator, two distance latches |
| `proto_array.sv` | Prototype array (1024 × 256 × 5): 512-element rows for the distance units, element port for the uC |
| `padcu.sv` | Array, 512 distance units and used flags; runs one pass over one half |
| `ibr.sv` | Double input vector buffer |
| `cmc.sv` | Classification controller |
| `mu.sv` | Math unit: RCE list and PNN sums, one prototype per clock |
| `exp_unit.sv` | `exp(−K·D)` made from a shifter, a 32 × 11 ROM and a shift-add multiplier |
| `ppr.sv` | Three 1K × 16 parameter RAMs, read as one 48-bit word |
| `mur.sv` | Two banks of 64 densities plus fired list and count |
| `obr.sv` | Output buffer: record reader, 64-entry FIFO, float conversion, packing |
| `ioc.sv` | IO controller register file and mode |
| `gr.sv`, `timer.sv`, `pgf.sv` | uC general RAM (256 words), 32-bit clock counter, 4K-word program store |
| `classifier_top.sv` | Wiring, uC bus decoding, status and monitor port |

Everything runs on one clock edge. Reset is asynchronous and active low.

## Distance units and the two-half pass

A prototype element `A` and an input element `B` are five-bit unsigned
values. The unit computes `A + ~B`:

* if the add carries, `A > B` and the difference is `sum + 1`;
* if it does not, the difference is `~sum`.

Every element takes two clocks. In the first clock the array row is read
and latched, and `A + ~B` is latched. In the second clock the difference is
added into the accumulator.

The accumulator is five bits wide, with an 8-bit counter above it that
counts the carries out. Together they hold 13 bits, enough for 256 × 31.

The array is stored as `2·DIM` rows of 512 elements. Row `2j+h` holds
element `j` of every prototype in half `h`. A pass over half `h` reads rows
`h, 2+h, 4+h, …`. The read takes two clocks, so a pass lasts `2·DIM + 2`
clocks: 514 at 256 dimensions.

When the pass ends, each unit copies its total into distance latch `h`.
This happens only if the unit's used flag for that half is set. A unit
whose flag is clear does nothing during that half. This models the chip
gating off unused units to save power.

The second half runs only if at least one prototype in 512–1023 is marked
used. With 512 or fewer prototypes, a vector costs one pass.

## Classification controller (cmc): who may move when

This is the part that needs the most care. Three resources are shared
between neighbouring vectors:

1. **Input banks (2).** The input buffer raises IBFULL when the bank it is
   reading holds a whole vector. `ibr_release` frees that bank.
2. **Distance latches (2 sets, one per half).** Each set is FREE, VALID
   (the pass wrote it) or READ (the math unit is reading it). A set becomes
   FREE again when the math unit has issued its 512th prototype.
3. **Result banks (2).** Each bank is FREE, DONE (the math unit finished a
   vector in it) or OBR (the output buffer is reading it).

The rules:

* **Start a pass** when IBFULL is set, the distance units are idle, and
  the latch set of the half to run is FREE.
  * If the latches are still in use, the pass waits. `dl_wait` is raised,
    and the testbench counts it.
  * Half 1 follows half 0 at once when the upper half is in use.
* **Give a latch set to the math unit** when it is VALID.
  * For half 0, which is the first half of a vector, the math unit must
    also be idle and a result bank must be FREE.
  * Half 1 follows half 0 back to back on the same bank.
* **Release the input bank** when both of these have happened:
  * the last pass of the vector is done;
  * with two halves, the math unit has finished reading half 0.

  Until then the pass holds the bank, so no new vector's pass can start
  too early. Once the bank is released, a vector already waiting in the
  other bank starts its pass on the next clock.
* **MURDY:** when the math unit finishes a vector, its bank becomes DONE.
  Banks are handed to the output buffer in order, one at a time. While the
  output buffer drains one bank, the math unit fills the other.

An assertion checks that the controller never has two passes in flight.
Other assertions cover the input buffer (no overrun) and the math unit (a
first command only with the pipeline empty).

Timing at full size, measured in `tb_classifier_full`:

| event | this RTL | original chip |
|---|---|---|
| pass, one half | 514 | 514 |
| math unit, one half of 512 prototypes | 519 | 519 |
| math unit, two halves back to back | 1032 | 1032 |
| steady state, per vector | 1032 | 1032 |
| single vector, first input word → last output word | 1615 (64-bit normal-mode IO) | 1758 |

In steady state the math unit is the bottleneck: 2 × 512 issue clocks plus
the pipeline drain. A vector's first command can be taken in the same
clock as the previous vector's `done`. By then the last store is two clocks
old. The controller hands the math unit the other result bank in that
clock.

## Math unit (mu)

The math unit reads one prototype per clock:

* its distance, from the latch set of the current half;
* its 48-bit parameter word, from the three parameter RAMs.

It then runs a six-stage pipeline. Clock 0 is the issue clock.

| stage | work |
|---|---|
| 0 | Address the latches and the parameter RAMs |
| 1 | Compare `D < L`; first exp stage (`D·k_man·log2e`, shift by the K exponent) |
| 2 | Fired flag test and set, list append, count; exp ROM and correction multiply |
| 3 | `C · exp` in float; read the old `PDF(N_i)` from the result bank |
| 4 | Float add |
| 5 | Write `PDF(N_i)` back |

The PDF update is a read-modify-write of one of 64 RAM words, one per
clock. Two prototypes of the same class in a row would therefore read a
stale sum. Two forwarding paths feed the adder instead of the RAM value:

* from stage 5, for a prototype one clock ahead;
* from the register holding the last value written, for one two clocks
  ahead.

The `bypass` output pulses when either path is used.

On a vector's first command the unit does two things:

* clears the 64 fired flags;
* marks the result bank empty, using one valid bit per word, so an empty
  entry reads as zero without 64 clear cycles.

The `done` output follows the last store. That is 519 clocks after a
512-prototype command was taken.

### Number formats

* **Densities:** 16-bit float. Bits [15:10] are the exponent `E` and bits
  [9:0] the mantissa `M`. The value is `1.M · 2^(E−32)`. `E = 0` means
  zero, and there is no sign bit.
  * Add and multiply truncate and saturate at the largest value.
  * Because every code is non-negative, codes sort like unsigned integers.
* **Parameter word:** RAM 2, RAM 1, RAM 0, high to low.
  * RAM 2: class (6 bits), used, bad, low-confidence, 3 spare bits,
    K mantissa (4).
  * RAM 1: C (16).
  * RAM 0: K exponent (4), L (12).
  * `K = k_man · 2^−(5+k_exp)`, so K ranges from 2^−20 to 15/32.
  * The bad and low-confidence flags are stored for software and not used
    by the pipeline.

### Exponential without an exponential

`exp(−K·D) = 2^−X` with `X = K·D·log2 e`. The unit keeps `X` with 13
fraction bits and splits it three ways:

* `S = ⌊X⌋`, the integer part. It becomes a subtraction from the float
  exponent (the "shifter").
* `X_M`, the next five bits. They index a 32 × 11 ROM holding
  `round(1024 · 2^(−t/32))`, that is 1024, 1002, … 523.
* `ε`, the last eight bits. They give `1 − ε·ln2`, the first two terms of
  `2^−ε`. It is computed with shifts and adds: `ln2 ≈ 1/2 + 1/8 + 1/16 +
  1/256 + 1/512`.

The product of ROM value and correction is normalised into the 10-bit
mantissa. Results below 2^−31 flush to zero.

`log2 e` is the constant 5909/4096. Measured against a real exponential,
the relative error is below 0.25% (`tb_exp_unit` tests this bound). That is
looser than the 0.1% quoted for the original circuit, because all products
here truncate.

## Buffers and the host interface

Host handshakes are valid/ready: `in_valid/in_ready` for input and
`out_valid/out_ready/out_last` for output.

**Input (ibr).**

* Each byte of a host word carries one element in its low five bits,
  lowest byte first. A 32-bit word holds 4 elements and a 64-bit word
  holds 8.
* Normal mode takes one word every four clocks. Burst mode takes one word
  per clock.
* There are two 256 × 5 banks. The host fills one while the distance units
  read the other.

**Output (obr).**

* After MURDY, the reader reads a record from the result bank: the fired
  count, then the fired class list, then `PDF(0..NCLASS−1)`. CTRL1 can
  leave out the list or the densities.
* Items are 16 bits. When CTRL1 asks for IEEE conversion they are 32 bits:
  densities become IEEE-754 singles, exactly (exponent `E − 32 + 127`), and
  count and list are zero-extended.
* Items are packed lowest first into 32- or 64-bit words through a
  64-entry FIFO. The last word of a record is zero-padded and flagged with
  `out_last`.
* Normal mode sends one word every four clocks; burst sends one per clock.

**IO registers (ioc).** Sixteen 32-bit registers, reached from the host
(`h_*`) and from the uC (16-bit, at 0x01000):

| reg | name | contents |
|---|---|---|
| 0 | CTRL0 | input: [0] 64-bit, [1] burst |
| 1 | CTRL1 | output: [0] 64-bit, [1] burst, [2] IEEE, [3] list, [4] densities, [5] monitor select. Reset 0x18 |
| 2–4 | STATUS0..2 | read-only: busy flags and fired count; records sent; words sent |
| 5 | STATUS3 | free status word, uC to host |
| 6 | DIM | vector dimension, reset 256 |
| 7 | NCLASS | classes reported, reset 64 |
| 8 | MODE | 0 NORMAL, 1 CLASSIFY, 2 MONITOR, 3 PGF, 4 TEST |
| 9 | CHIPID | 0x0C1A |
| 10–15 | — | general data |

The original register summary lists 2 control, 4 status and 11 data
registers, which adds up to 17. This design keeps the total of 16 and has
10 data registers.

## Modes and the micro-controller bus

The micro-controller bus map (20-bit word address, 16-bit data, read data
one clock after the address):

| address | contents |
|---|---|
| 0x00000 | general RAM (256 words) |
| 0x01000 | IO registers |
| 0x02000 / 0x02001 | timer low / high. Reading low captures high |
| 0x03000 + p | used flag of prototype p |
| 0x04000 + p | distance latch of p |
| 0x05000 + s·0x400 + p | parameter RAM s of p |
| 0x06800 + c | density of class c, bank 0. +0x100 for bank 1; +0x80 for the fired list; +0x40 for the fired count |
| 0xC0000 + p·2^log2(DIM) + j | element j of prototype p |

The modes:

* **NORMAL:** software owns everything. The uC loads prototypes and
  parameters and can read distances and results.
* **CLASSIFY:** the controller owns the arrays. uC reads of them return 0
  and its writes are dropped. The registers, GR and timer stay reachable.
* **MONITOR:** the 32-bit `monitor` port shows one of two things, chosen
  by CTRL1 bit 5:
  * the uC address and data bus;
  * the fetch address and instruction.
* **PGF:** the host writes the program store through `pgf_*`. Program
  fetch data (`uc_faddr → uc_fdata`) arrives two clocks after the address.
* **TEST:** uC writes to the IO registers are ignored. The host is meant to
  drive the uC bus ports itself. The `monitor` port carries 24 control
  signals between the classify blocks, from bit 0 upward:
  * IBFULL, input release, both input bank full flags;
  * pass start, half, busy and done, and "upper half in use";
  * math unit command valid/half/first/last/bank, ready, issue done, done,
    bypass;
  * latch wait, controller busy, MURDY and its bank;
  * output release, output busy.

## What departs from the original chip

* The micro-controller core is not included. The original has 61
  instructions, but they are not defined here. Learning (placing
  prototypes, shrinking thresholds) is left to software on whatever drives
  the `uc_*` ports.
* Several parts are plain synchronous RAMs:
  * The flash prototype array, its sense amplifiers and its high-voltage
    programming path.
  * The flash program store.
* The original's clock buffers and non-overlapping clock generators do not
  appear. The design uses one clock.
* TEST mode does not connect array bit lines to pins.
* The original math unit counts 11 half-clock steps over 6 clocks. This
  design registers once per clock, in the same order of operations. The
  bypass and the valid-bit clear are this design's.
* The exp error bound is 0.25%, not 0.1% (see above).
* The single-vector latency depends on the IO timing chosen here:
  * input: four clocks per word, 8 elements per 64-bit word;
  * output: four clocks per word.
* The following are this design's own choices:
  * element packing;
  * register bit fields;
  * record format;
  * the bus map (except the 0x6800 result-RAM base);
  * the K encoding;
  * the float bias.

## Simulating

Each block has a self-checking testbench `tb/tb_<block>.sv`. Each one ends
by printing `TB_RESULT checks=N failures=M`. Build one with Verilator 5
like this:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/pc_pkg.sv tb/tb_classifier_top.sv --top-module tb_classifier_top
./obj_dir/Vtb_classifier_top
```

The end-to-end testbenches share `tb/tb_top_body.svh`. It contains:

* host and uC bus tasks;
* a reference model of distances, fired lists and densities (densities are
  compared within 1.5%);
* counters for each pipeline mechanism.

The end-to-end testbenches:

* **`tb_classifier_top`:** 16 prototypes of 8 dimensions, 8 classes. It
  runs in seconds. It covers every mechanism at least once and fails if
  one never happens:
  * one- and two-half vectors;
  * both input banks full;
  * waiting on busy distance latches;
  * the PDF bypass;
  * IEEE output;
  * 32/64-bit and normal/burst IO;
  * array access dropped in CLASSIFY mode;
  * MONITOR, PGF and TEST modes.
* **`tb_classifier_full`:** the top at its defaults (1024 × 256, 64
  classes). It loads all prototypes over the uC bus and classifies four
  vectors back to back. It checks every result and the 514 / 519 / ≤1032
  clock timings. It runs in under half a minute.

* **`tb_fig1_pdf`:** two small example classes in a 2-D plane. The first
  is a single prototype at (15,15) with C = 1 and K = 15/32. The second has
  four prototypes at (15,15), (17,17), (20,20) and (23,23), with C = 10, 8,
  10 and 5 and K = 1/4 or 15/32. One prototype sits in the upper half, so
  every vector takes both passes. The test sends 64 points through the
  chip, checks every record, and prints the densities along the diagonal.

`tb_mu`, `tb_padcu`, `tb_ppr` and `tb_proto_array` override `NPT`/`DIM`
with small values to stay fast. To change the array size, set `NPT` (a
power of two; half of it is the number of distance units) and `DIM` on
`classifier_top`.
