# Lookup-table digit classifier (45 pair units × R)

This is a handwritten-digit recogniser with no arithmetic in its datapath. It
has no neurons and no weights. Each decision is one table lookup. A binarised
28×28 image (784 bits) goes to many small classifiers. Each classifier is a
memory addressed by a handful of XOR combinations of pixels. Their answers are
counted as votes, and the digit with the most votes wins.

The tables are built directly from the training images. Training treats the
data as a *partially defined function*. The function is known on the training
images and free everywhere else. The tables are built so that every training
image gets its correct answer. The free entries make the classifier generalise
to images it has not seen. On MNIST, this scheme reaches about 90 % test
accuracy with R = 4 (see "Accuracy and size" below).

The RTL here is the inference hardware. Finding the XOR masks and table
contents (training) is done offline. The trained values are loaded through a
write port.

## Structure

```
image[783:0] ──┬─> group 0: 45 pair units (0/1, 0/2, ... 8/9) ──┐ 90 vote lines
               ├─> group 1: 45 pair units                      ──┤
               ├─> ...                                          ──┤
               └─> group R-1                                    ──┘
                                       │ 90·R lines
                                       v
             10 population counters (digit d: 9·R inputs)
                                       │ 10 × ceil(log2(9R+1)) bits
                                       v
   max selector: 10 decoders -> OR array -> priority encoder -> 10 coincidence circuits
                                       │
                                       v
              out_digit, out_winners, out_max, out_counts
```

| file | role |
|---|---|
| `rtl/cls_pkg.sv` | constants (784 pixels, 10 digits, 45 pairs), vote encoding, pair numbering functions |
| `rtl/linear_circuit.sv` | P compound variables: XOR of masked image bits |
| `rtl/unit_lut.sv` | 2^P × 2-bit table, registered read |
| `rtl/pair_unit.sv` | one ternary classifier i/j = linear_circuit + unit_lut |
| `rtl/unit_group45.sv` | the 45 pair units of one training-data group |
| `rtl/popcounter.sv` | vote counter (full-adder leaves, adder tree) |
| `rtl/count_decoder.sv`, `or_array.sv`, `priority_encoder.sv`, `coincidence_circuit.sv` | the four parts of the max selector |
| `rtl/max_selector.sv` | largest count, tied winners, single answer |
| `rtl/digit_classifier.sv` | top: R groups, 10 counters, max selector, pipeline |

## Pair units: compound variables and one table lookup

Pair unit *i/j* answers one narrow question: is the image digit *i*, digit
*j*, or neither? It gives a two-bit *ternary* vote:

| vote | meaning |
|---|---|
| `2'b10` | digit *i* (the smaller digit of the pair) |
| `2'b01` | digit *j* |
| `2'b00` | another digit, or an image the unit knows nothing about |

A table indexed by all 784 pixels is impossible, and it would recognise only
exact copies of its training images. Instead, the unit first forms **P
compound variables**:

    y[j] = x[k1] ^ x[k2] ^ ... ^ x[km]      (the bits selected by mask j)

A mask with one bit set selects a single pixel (a *primitive* variable). A
mask with several bits set gives a *compound* variable. An all-zero mask gives
a constant 0, so an unused variable costs nothing. Training chooses the masks
so that no training image of *i* and one of *j* produce the same P-bit vector
y. With fewer variables, more unseen images map onto entries written from
training images. That is where generalisation comes from. XOR combinations
usually need fewer variables than single pixels to separate the same data.

The vector y then addresses a memory of 2^P two-bit words (`unit_lut`). The
loader writes `10` at the address of each training image of *i*, and `01` at
the address of each training image of *j*. All other entries stay `00`. A unit
is trained only on images of its own two digits. It has no answer for other
digits, and it votes `00` for them when their address was never written.

The XOR network is combinational. The memory read is registered, as in an
FPGA block RAM. A unit's vote therefore appears one clock after its image, and
each classification costs one memory access per unit.

Every unit has the same number of variables, P = 16. In the trained R = 4
design with compound variables, 4 units need 16 inputs, 35 need 15, and the
remaining 141 need at most 14. A unit that needs fewer variables leaves its
last masks at zero. It then uses only the low part of its table.

## Groups (the ensemble)

The training set is split into R groups of similar size. Each group trains its
own full set of 45 pair units. Each unit then sees fewer images, so it needs
fewer variables and a much smaller table. The R groups also vote together as a
simple ensemble, which improves test accuracy up to R = 4. The cost is that a
training image is no longer guaranteed to be recognised, because units of
other groups may vote against it.

To run fewer groups on this hardware, leave the extra groups' tables at `00`.
They then add no votes.

## Counting votes and choosing the digit

**Counters.** Digit *d* takes part in 9 pairs per group. The *d*-side line
of each of those units goes to counter *d*, giving 9·R inputs per counter.
Input `g*9+k` comes from group *g*'s unit that pairs *d* with the *k*-th other
digit. An image that every unit of every group recognises gives its digit
9·R votes, the maximum, and every other digit fewer. `popcounter` is a tree.
Full adders count the inputs three at a time, and a balanced tree of adders
sums their 2-bit results. With R = 4, each counter has 36 inputs and a 6-bit
output.

**Max selector.** It finds the largest count in four steps:

1. Each counter value goes through a **decoder** into a 1-out-of-K code,
   with K = 9·R. Bit *k−1* is set for a count of *k*, and a count of 0 sets
   no bit.
2. The **OR array** ORs the ten codes column by column. Column *k−1* is high
   exactly when some counter holds *k*.
3. The **priority encoder** returns the highest high column, plus one. This is
   the largest count, and 0 when every count is 0.
4. Ten **coincidence circuits** compare each count with that maximum.

Several digits can tie. All of them are flagged in `out_winners`, and
`out_digit` reports the lowest-numbered one. When every count is 0 (no unit
knew the image), all ten digits tie and `out_digit` is 0. To score accuracy,
`out_winners` is the honest output: with *s* tied winners, the right answer
counts as 1/*s*.

## Interface and timing (`digit_classifier`)

Parameters are `R` (groups, default 4), `P` (variables per unit, default 16)
and `N` (pixels, 784). `K`, `CW` and `GW` are derived.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; active-low asynchronous reset (clears masks and output registers) |
| `in_valid`, `image` | in | 1, 784 | image to classify; pixel (row, col) is bit 28·row+col, any consistent order works as long as training used the same |
| `out_valid` | out | 1 | result valid, exactly 2 clocks after `in_valid` |
| `out_digit` | out | 4 | recognised digit (lowest of tied winners) |
| `out_winners` | out | 10 | every digit that has the largest count |
| `out_max` | out | CW | the largest count (0..9R) |
| `out_counts` | out | 10×CW | all ten counts |
| `cfg_group`, `cfg_pair`, `cfg_bcast` | in | GW, 6, 1 | unit to configure: group and pair number, or all units |
| `cfg_mask_we`, `cfg_mask_sel`, `cfg_mask_wdata` | in | 1, log2 P, 784 | write one compound-variable mask |
| `cfg_lut_we`, `cfg_lut_waddr`, `cfg_lut_wdata` | in | 1, P, 2 | write one table word |

Pair numbers run in lexicographic order: 0 = 0/1, 1 = 0/2, …, 8 = 0/9, 9 = 1/2, …,
44 = 8/9. `cls_pkg::pair_i`, `pair_j` and `pair_index` convert between the
two forms.

Pipeline: at the first clock edge the unit tables are read, with addresses
computed combinationally from `image`. During the next cycle the counters and
the max selector work, and their result is registered at the second edge. One
image can enter on every clock. Configuration writes take one clock each and
can be interleaved with classification.

**Loading a trained classifier:**

1. Reset the design. All masks are then zero.
2. Write each unit's masks. Masks that several units share can be sent once
   with `cfg_bcast`.
3. Clear every table to `00`. Use 2^P broadcast writes of `00`, one per
   address.
4. For every unit, write `10` or `01` at the address of each of its training
   images. The address is the vector of its compound variables.

The tables have no reset, so step 3 is required.

An assertion in `digit_classifier` flags a targeted write (no broadcast) to a
group or pair number that does not exist. Such a write would otherwise be
silently dropped.

## Accuracy and size

These are the MNIST results of the method that this hardware implements:
binarised at grey level 96, 59,981 training images, and 9,993 test images
after duplicates were removed.

| groups R | test accuracy (primitive / compound variables) | avg. variables per unit | table memory, Kbit (prim. / comp.) |
|---|---|---|---|
| 1 | 0.878 / 0.870 | 19.42 / 16.86 | 197,935 / 15,901 |
| 2 | 0.896 / 0.891 | 17.04 / 15.03 | 68,108 / 9,167 |
| 4 | 0.907 / 0.905 | 15.08 / 12.77 | 18,830 / 5,321 |
| 8 | 0.903 / 0.903 | 12.34 / 11.43 | 7,093 / 3,068 |
| 16 | 0.900 / 0.899 | 10.18 / 9.60 | 2,814 / 1,665 |

This RTL gives every unit a full 2^16-word table. That is 180 × 65,536 × 2
bits = 23,040 Kbit, against the 5,321 Kbit that the trained R = 4 compound
design needs. On an FPGA, one output bit of a unit with at most 14 variables
is a 14-input table and fits one 18 Kb block RAM. With 15 variables it takes
two, and with 16 it takes four. For R = 4 this comes to 454 BRAM18s
(227 per output bit). Getting there needs a size per unit: `unit_group45`
would take an array of per-unit `P` values instead of one. The masks also
cost 180 × 16 × 784 flip-flops. A fixed trained design would replace them with
constant XOR trees.

With the default sizes, the design can hold the R = 4 compound-variable
classifier, where no unit needs more than 16 variables. R = 1 and some R = 2
classifiers need units with more than 16 variables, so they need a larger
`P`. R = 8 and R = 16 need `R` raised.

## Departures and own choices

- The masks and tables are writable, not fixed logic. This is the main
  difference from a trained, hard-wired circuit. The write ports, the
  broadcast write and the unit numbering are this design's own choices.
- Every unit uses the same `P`, the largest a unit needs.
- The clocking is this design's own choice: a registered table read and a
  registered result, with a latency of 2 clocks and one image per clock.
- The tie rule for `out_digit` is lowest digit first. `out_winners` carries
  the full tie information.
- The counter is a parallel tree. The cheaper sequential counter and the
  sequential max selector, which would suit a slow design, are not built.
- Turning greyscale pixels into bits (threshold 96) is done before the image
  port.
- Not included: the *single-unit* realisation. It is one linear circuit and a
  single table, addressed by 25 compound or 37 primitive variables, that
  outputs the digit directly. Its accuracy is much lower (about 0.15) and it
  is not part of this design. Also not included: the training algorithms that
  choose the variables.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_linear_circuit` | reset clears the masks; primitive, compound, zero and all-ones masks; a mask write takes effect at the clock edge (784 × 16, full size) |
| `tb_unit_lut` | random writes/reads against a model, 1-clock read latency, read-during-write returns the old word (2^16 words) |
| `tb_pair_unit` | training-style table fill, back-to-back images, each vote one clock after its image |
| `tb_unit_group45` | broadcast and targeted mask/table writes, votes of all 45 units |
| `tb_popcounter` | exhaustive for 3 and 9 inputs, random for 18 and 36 |
| `tb_count_decoder`, `tb_or_array`, `tb_priority_encoder`, `tb_coincidence_circuit`, `tb_max_selector` | exhaustive or random against direct models, including ties and the all-zero case |
| `tb_digit_classifier` | the whole design at its default size (R = 4, 180 units, P = 16) |
| `tb_digit_classifier_r1` | the single-group classifier (R = 1, P = 12): every training image gets all 9 votes of its digit and no other digit reaches 9; counts of unseen images against a model |

`tb_digit_classifier` builds a synthetic digit set. Each digit has a random
prototype image, and training images are noisy copies of it. The testbench
loads masks and clears and trains the tables as in the loading procedure
above. It then streams 103 images, one per clock with one bubble. An
independent model gives the expected votes, counts, maximum, winners and
digit, and each result must arrive exactly 2 clocks after its image. All
training images must be recognised. The test also counts the cases the
hardware has to handle and fails if any never happened:

- a unanimous 9·R vote
- a vote from a single group
- a tie
- an image no unit knew
- back-to-back results
- a bubble
- broadcast writes

To run a testbench with Verilator (5.x):

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    --top-module tb_digit_classifier rtl/cls_pkg.sv tb/tb_digit_classifier.sv
./obj_dir/Vtb_digit_classifier
```

The full-size build takes a few minutes, because 2,880 XOR networks of 784
inputs each are flattened into C++. The simulation itself takes a few
seconds. To iterate faster, change `P` or `R` on the `digit_classifier`
instance and the matching localparams in the testbench.
