# Systolic linear discriminant classifier with contraflow and byte-serial I/O

A linear discriminant classifier assigns a feature vector X = [x^1 .. x^n] to
the class i, out of C classes, whose discriminant

    g_i(X) = w_i^{n+1} + x^1 w_i^1 + x^2 w_i^2 + ... + x^n w_i^n

is largest. This RTL computes all C discriminants and picks the winner in a
word-level systolic array. It has four properties:

* **n inner product step cells per class, not n+1.** The constant term
  w_i^{n+1} is not a product. It enters as the starting value of the row's
  running sum, so no multiplier is spent on a constant input of 1.
* **Contraflow at 100 % efficiency.** Feature vectors move down the array and
  weighted vectors move up it. Every cell does useful work on every step, and
  one classification result comes out per step.
* **Weights can be changed on the fly.** The weighted vectors are a data stream
  like the features, so a new weight set is loaded simply by sending it.
* **32 data pins per chip.** Each array chip has four 8-bit byte-serial ports,
  whatever its size. Chips cascade into a taller array, which gives more
  classes.

## The array module (`classifier_array`)

From left to right, a module with C rows and n features has these columns:

| column | cells | what moves through it |
|---|---|---|
| initial-value column | C delay elements (`delay_column`) | w^{n+1}, moving up |
| inner product columns 1..n | C x n `ips_cell` | x^j down, w^j up, partial sums right |
| classification column | C `class_cell` | running (maximum, label) pair, moving down |
| label column | C delay elements (`delay_column`) | class labels l, moving up |

Each cell does one thing per step:

* `ips_cell`: `y <- x`, `v <- u`, `a' <- a + x*u`.
* `class_cell`: `G' <- max(G1, G2)`, together with the label of whichever
  input won. G1 is the row's finished discriminant, arriving from the left.
  Its label comes from the label column on the right. (G2, l2) is the running
  best, arriving from above.

A row's sum starts with the w^{n+1} tapped from the initial-value column. It
gains one product per inner product cell. It then reaches the classification
cell, which keeps the larger of the new discriminant and the best one so far.

### Why contraflow reaches 100 % here

In a plain contraflow array, two streams cross at twice the speed of either
stream. A dense stream would therefore skip every other element of the
opposite stream. The usual fix spaces the data with empty slots, which leaves
the cells idle half of the time.

This array does the opposite: it sends every weighted vector twice in a row,
so each one occupies two consecutive steps. The feature stream is fully dense.
Two facts follow:

* A feature vector moving down one row per step meets a new weighted vector in
  each row. Over C rows it meets C consecutive weighted vectors.
* The C weighted vectors recirculate, with period 2C steps. The C vectors a
  feature meets are therefore always all C classes, in rotated order. Two
  consecutive feature vectors meet the classes in the same order, and the next
  pair meets them rotated by one: 1, 2, ..., C, then 2, 3, ..., C, 1, and so
  on.

Every cell computes on every step. A complete result leaves the bottom of the
classification column on every step.

### Stream format and skew

The two streams are groups of n+2 words, one group per step:

* feature group: `[x^1, ..., x^n, g', l']`
* weight group: `[w^{n+1}, w^1, ..., w^n, l]`

g' is the starting maximum, which should be the most negative word
(`16'h8000` for 16-bit words). l' is any label. l is the class label, which
comes back with the result.

Within a group, word i is delayed by d_i = 0, 1, ..., n, n steps. The last two
words share the largest delay because they enter the classification side
together:

* in the feature group, g' and l' enter the classification column as a pair;
* in the weight group, w^n meets the label l in the same row.

The feature stream must start at least C steps after the weight stream. With
less delay, the first feature vector meets rows that do not yet hold a weighted
vector. `tb_classifier_array` starts exactly C steps later. It has been checked
that starting C-1 steps later makes the first result wrong.

Latency: the result for a vector appears on `g_bot`/`l_bot` n + C - 1 steps
after its x^1 entered row 1.

### Boundary outputs are next-step values

The module's outputs are `x_bot`, `g_bot`, `l_bot`, `w_top`, `winit_top` and
`lab_top`. Each one is the value its boundary row's register will take at the
next step, not that register's current content. A chip's output shift register
loads these values at the same step edge, so it takes the place of the
boundary register. As a result, the link between two chips costs no extra
step, and a stack of K modules behaves exactly like one module with K*C rows.

This matters. With one extra stage per link, a feature crossing a link would
skip one weighted vector. The cascade would then lose its 100 % pairing unless
dummy vectors were inserted into the weight stream.

## Byte-serial grouped I/O

### Array chip (`array_chip`)

One `array_chip` contains:

* one array module;
* two byte-serial/word-parallel shift registers (`bs2wp_sr`), one per input
  port;
* two word-parallel/byte-serial shift registers (`wp2bs_sr`), one per output
  port.

Its ports are `feat_in`, `feat_out`, `wgt_in` and `wgt_out`, each 8 bits wide.

A group of n+2 words takes (n+2)*WORD_BYTES byte cycles; this is a *group
period*. The array takes one systolic step per group period, at the edge that
ends the period. Transfers of the next groups overlap the computation.

Each chip frames the groups with its own `group_counter`. All counters start
from the common reset, so they stay in phase. Bytes travel word 0 first, and
each word least significant byte first.

The input side adds no cycle. During the cycle that carries a group's last
byte, `bs2wp_sr` presents the complete group: the bytes it already holds plus
the one on its input.

### Preprocessing circuit (`preproc`)

The preprocessing circuit (P) turns an unskewed byte stream, one vector per
group period, into the skewed stream an array chip expects. It has three
stages:

1. A `bs2wp_sr` assembles the group.
2. A `delay_wedge` delays word i by d_i group periods (0, 1, ..., n, n).
3. A `wp2bs_sr` sends the skewed group out during the next period.

### System (`classifier_system`)

`classifier_system` puts the blocks together in this order:

    wgt_byte -> P -> A(0) -> A(1) -> ... -> A(K-1) -> wgt_exit     (weights move up)
    result  <- L <- A(0) <- A(1) <- ... <- A(K-1) <- P <- feat_byte (features move down)

The result latch (`result_latch`, L) taps the feature stream that leaves the
bottom chip. At the end of each group it captures words n (the maximum) and
n+1 (its label), then pulses `result_valid` for one cycle.

The source of the streams (the vector memory) must follow these rules:

* send one vector per group period on each input;
* send every weighted vector in two consecutive periods;
* repeat the K*C weighted vectors cyclically;
* put the most negative word in the g' position of every feature vector.

The weight stream leaving the top chip comes out, still skewed, on
`wgt_exit`. Whatever feeds `wgt_byte` can regenerate or loop it back.

A feature vector sent during group period p produces a result that L latches
at the end of period p + n + K*C + 1. It shows on `result_g`/`result_l` from
the following cycle on, and results come one per group period.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 3 | features per vector, so each group has N+2 = 5 words |
| `C` | 4 | rows (classes) per array chip |
| `NUM_CHIPS` | 3 | cascaded array chips; the system has NUM_CHIPS*C classes |
| `WORD_BYTES` | 2 | bytes per word; W = 8*WORD_BYTES |

The byte width of 8 bits is fixed in `lc_pkg`.

## Number format and other choices made here

The original description of this architecture leaves the following points
open. They were chosen as follows:

* **Word width:** 16 bits, set by `WORD_BYTES`. All words are the same width,
  including g and the labels.
* **Arithmetic:** two's complement. The product x*u is truncated to W bits,
  and sums wrap modulo 2^W. Choose weights and features so that every
  discriminant fits in W bits; nothing detects overflow.
* **Ties:** the classification cell compares signed values. When the new
  discriminant only equals the running maximum, it keeps the running maximum
  and its label. Among equal classes, the winner therefore depends on the
  order in which the feature met them.
* **Framing:** groups are framed by counters started by the common reset.
  There is no start-of-group signal on the pins. The 32 pins are the four data
  ports; clock and reset come on top of them.
* **Reset:** asynchronous, active low, and it clears every register.
* **I/O timing:** I/O runs in parallel with computation. A variant that does
  I/O and computation one after the other is known for this kind of system,
  but it is not built here.
* **Weight repetition:** the source sends each weighted vector twice. P does
  not duplicate vectors.
* **Weight recirculation:** the weighted vectors leave the top chip on
  `wgt_exit`. Nothing inside the system routes them back to the input.
* **Pin use:** the chips have no separate pins that say which groups carry
  real feature vectors. The sender knows that from the latency given above.

Not built: the vector memory that holds the feature and weight sets. It lies
outside the classifier, and the testbenches play its part.

## Verification

Each module has a self-checking testbench in `tb/`. The testbench compares the
module against values it computes independently. It ends by printing
`TB_RESULT checks=<n> failures=<n>`, and a watchdog stops it if it hangs.

| testbench | what it checks |
|---|---|
| `tb_ips_cell` | the three cell equations under random operands and random step enables |
| `tb_class_cell` | max/label selection, including ties and the most negative start value |
| `tb_delay_column` | the row taps and the next-step output under random enables |
| `tb_classifier_array` | word-level streams: every result, in its exact step (n+C-1 steps after x^1), one per step; random idle cycles; pass-through streams |
| `tb_bs2wp_sr`, `tb_wp2bs_sr`, `tb_delay_wedge`, `tb_preproc`, `tb_result_latch` | byte order, group timing, skew 0,1,2,3,3 |
| `tb_array_chip` | one chip through its byte ports: results, pass-through of features and weights |
| `tb_classifier_system` | default size (3 chips, 12 classes, n = 3) end to end, see below |
| `tb_system_sizes` (with `system_run`) | four other sizes side by side: one chip; one row per chip; n = 5 with 8-bit words; a 4-chip cascade with 24-bit words |

The end-to-end testbench `tb_classifier_system` runs at the default size.

* It sends 120 random feature vectors and replaces the whole weight set
  halfway through.
* It checks every result against the maximum over the weight set the vector
  met. Results for vectors that met a mixture of the two sets are not checked.
* It checks every byte of the weight stream that leaves on `wgt_exit`.
* It also counts how often the mechanisms occur: results under each weight
  set, winners located in each chip (partial results crossing the chip
  links), and both outcomes of the bottom classification cell's compare.

To run a testbench with Verilator:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/lc_pkg.sv tb/tb_classifier_system.sv --top-module tb_classifier_system
    ./obj_dir/Vtb_classifier_system
