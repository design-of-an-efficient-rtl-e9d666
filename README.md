# PASTA: a parallel self-timed adder and a multiply-accumulate unit built on it

A ripple-carry adder always takes time for the longest *possible* carry chain.
The parallel self-timed adder (PASTA) instead takes time for the longest carry
chain *actually present* in the operands. It uses only half adders and
2:1 multiplexers. Every bit first half-adds its two operand bits. Then all bits
repeatedly half-add their own sum with the carry from the bit below, in
parallel, until no carry is left anywhere. A completion detector sees that
every carry is zero and raises `TERM`.

This repository holds synthesizable SystemVerilog for:

* the PASTA adder (bit slice, completion detector, control);
* an 8 x 8 unsigned array multiplier. A carry-save array reduces the partial
  products, and a PASTA does the final carry-propagate addition in place of the
  usual ripple-carry row;
* a multiply-accumulate (MAC) top, `pasta_mac`. It multiplies two 8-bit
  operands and adds the 16-bit product to a 16-bit accumulator, using a second
  PASTA for the accumulation.

## How PASTA adds

Let `S_i` and `C_{i+1}` be the sum and the carry-out of bit `i`.

Load step (`SEL = 0`), where the multiplexers pass the operands:

    S_i = a_i xor b_i        C_{i+1} = a_i and b_i

Each later iteration (`SEL = 1`), where the multiplexers pass the feedback,
applied to every bit at once:

    S_i' = S_i xor C_i       C_{i+1}' = S_i and C_i

It stops when `C_1 = C_2 = ... = C_{n+1} = 0`. At that point `S_n..S_0` is
`a + b`, and the extra top slice `S_n` is the carry out.

An example with 4-bit operands, 7 + 1:

| step   | S (bit 4..0) | carries out of bits 4..0 |
|--------|--------------|--------------------------|
| load   | 0 0110       | 0 0001                   |
| iter 1 | 0 0100       | 0 0010                   |
| iter 2 | 0 0000       | 0 0100                   |
| iter 3 | 0 1000       | 0 0000  -> TERM          |

Each iteration moves every pending carry one position left. When a carry
lands on a bit whose sum is 0, the carry is absorbed. So the number of
iterations equals the length of the longest carry run: 0 when no bit
generates a carry, and at most `n`. With a carry-in it can be `n + 1`. For
8-bit operands, the average over all 65,536 pairs is 2.16 iterations, and
only 128 pairs need the worst case of 8.

A bit slice built from a half adder can never be in the state
`(C_{i+1}, S_i) = (1, 1)`, because a carry of 1 forces a sum of 0. Every slice
checks this with an assertion. The fact also guarantees progress: a bit that
emits a carry has sum 0, so in the next iteration it cannot emit another one
unless a new carry arrives from below.

### Clocked iterations

The circuit this design follows is clockless: the iterations run around an
asynchronous feedback loop. The recursion above is correct when all bits step
together. This RTL takes that literally: **one iteration per clock cycle**,
with the `(C_{i+1}, S_i)` state of each slice held in two flip-flops. That
makes the design synthesizable with standard flows and simulatable
cycle-accurately. It keeps the defining property: latency depends on the
data and is reported by `TERM`. It gives up the clockless operation and its
power argument. It also uses more flip-flops than a clockless version would.

### Carry-in

The bit-0 slice takes `cin` as its incoming carry during the first iteration
only, so `cin` is added exactly once. The pending `cin` is also fed to the
completion detector. Otherwise `0 + 0 + 1` would report completion before
the carry-in had been added. This handling is this design's own choice.

## Modules

| module              | role |
|---------------------|------|
| `half_adder`        | `s = x ^ y`, `c = x & y` |
| `pasta_cell`        | one PASTA bit: two SEL-steered multiplexers, a half adder, the state flip-flops |
| `completion_detect` | `TERM = SEL & ~(OR of all carries)` |
| `pasta_adder`       | `N + 1` cells, the completion detector, SEL/iteration control; `sum = a + b + cin` (`N + 1` bits) |
| `full_adder`        | carry-save cell: `ps = a ^ b ^ c`, `sc = majority(a, b, c)` |
| `csa_array`         | partial products and carry-save rows of an `N x N` array multiplier |
| `pasta_multiplier`  | `csa_array` plus an `N`-bit `pasta_adder` as the final adder |
| `pasta_mac`         | top: `pasta_multiplier` plus a `2N`-bit `pasta_adder` and the accumulator |
| `pasta_pkg`         | shared constant: width of the iteration counter, `clog2(n + 2)` |

All flip-flops use a synchronous, active-high reset.

### `pasta_adder` interface and timing

    start, a[N-1:0], b[N-1:0], cin  ->  busy, term, sum[N:0], iterations

* `start` is taken only while `busy` is low. At that clock edge, the slices
  load the operand half-sums and `busy` (which is `SEL`) goes high.
* `term` is high for exactly one cycle. It rises `k` cycles after the load
  edge becomes visible, where `k` is the iteration count. If `k = 0`, `term`
  is high in the cycle right after the load edge.
* `sum` is valid while `term` is high, and it holds until the next `start`.
* The operands need to be valid only in the `start` cycle.
* `iterations` reports `k` for the current addition.

### Carry-save array (`csa_array`)

Row 0 holds the partial products `x_0 & y_j`, made with full adders whose
other two inputs are 0. Each later row `i` has `N` full adders. Cell `j` of
row `i` adds three terms:

* the partial product `x_i & y_j`;
* the sum of cell `j+1` of the row above;
* the carry of cell `j` of the row above.

All three have weight `i + j`. Carries therefore move diagonally to the next
row instead of rippling along a row. The sum of cell 0 of each row is a final
product bit (`p[0]` to `p[N-1]`). After the last row, a sum vector and a carry
vector of weight `2^N` remain. Their sum is `p[2N-1:N]`, and it never
overflows `N` bits.

`pasta_multiplier` registers the low half at `start` and hands the two vectors
to an `N`-bit PASTA with `cin = 0`. `done` (the adder's `term`) arrives
`k` cycles after the load edge, with `k` between 0 and 8 for `N = 8`. Over all
8 x 8 operand pairs, the longest run seen is 7 iterations.

### The MAC top (`pasta_mac`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clock`, `rst` | in | 1 | clock; synchronous active-high reset (clears `acc` and `final_out`) |
| `in_valid` / `in_ready` | in / out | 1 | operand handshake; a pair is taken when both are high |
| `Multiplier`, `Multiplicand` | in | 8 | unsigned operands |
| `final_out` | out | 16 | product of the last pair |
| `acc` | out | 16 | running sum of products, modulo 2^16 |
| `out_valid` | out | 1 | `acc` holds the new total (one cycle) |

The controller has three states: `IDLE`, `MULTIPLY` and `ACCUMULATE`.

1. The clock edge that takes a pair starts the multiplier.
2. When the multiplier's `done` is high, the next edge latches `final_out`
   and, at the same edge, starts the accumulation adder with `acc` and the
   product.
3. When that adder's `term` is high, the next edge writes `acc` and sets
   `out_valid`.

Counting the edge that takes the pair, `out_valid` follows after
**`k1 + k2 + 3` edges**. Here `k1` is the multiplier's final-adder iteration
count (0 to 8) and `k2` is the accumulation adder's (0 to 16). `in_ready` is
high again in the `out_valid` cycle. Each pair is accumulated exactly once,
however long `in_valid` stays high.

A reference run with the sequence 25·42, 15·15, 20·20, 20·20, 32·32 gives
products 1050, 225, 400, 400, 1024 and totals 1050, 1275, 1675, 2075, 3099.

## Where this design makes its own choices

* **Clocked iterations** instead of a self-timed loop (see above). Each bit
  slice holds state in flip-flops. The whole MAC has 98 flip-flops, where a
  clockless implementation would need only the 16-bit accumulator register.
* **Handshake at the top.** `in_valid`, `in_ready` and `out_valid` are added,
  because the MAC's latency depends on the data. A design that is fully
  combinational up to the accumulator would add the product on every clock
  edge instead, including twice for a pair held over two edges.
* **Accumulation adder.** The accumulation uses a 16-bit PASTA. The kind of
  adder for this step was an open choice.
* **Partial products** are plain AND gates, with no Booth recoding.
* **Square operands only** (`N x N`).
* **Carry-in** is added in the first iteration only (see above).
* **Reset**: synchronous and active high.
* **No baseline.** The conventional carry-save multiplier with a ripple-carry
  final row, which PASTA is meant to improve on, is not included.

## Simulating

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. `tb/pasta_ref_pkg.sv`
holds integer reference models of the PASTA recursion and of the carry-save
array. The testbenches use these models to predict iteration counts, and so
the exact latency of every operation.

| testbench | what it covers |
|-----------|----------------|
| `half_adder_tb`, `full_adder_tb` | exhaustive truth tables |
| `completion_detect_tb` | zero, single-carry and random carry patterns, SEL low and high |
| `pasta_cell_tb` | random enable, SEL and input sequences against a mux/half-adder model; reset |
| `pasta_adder_tb` | all 65,536 8-bit pairs with `cin = 0` and 5,000 with `cin = 1`: sum, latency, one-cycle `TERM`, every iteration count 0..9, reset mid-addition |
| `csa_array_tb` | all 8 x 8 pairs: low bits and the sum/carry vectors |
| `pasta_multiplier_tb` | all 8 x 8 pairs: product and latency; operands changed right after `start` |
| `pasta_mac_tb` | the reference sequence above, then 3,000 random pairs at default size. Checks exact latency, back-pressure, accumulator wrap-around and reset mid-operation, and counts each of these so that every one must occur |

To run one testbench, for example the top:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/pasta_pkg.sv tb/pasta_ref_pkg.sv tb/pasta_mac_tb.sv --top-module pasta_mac_tb
    ./obj_dir/Vpasta_mac_tb

Replace `pasta_mac_tb` with any other testbench name. Each testbench runs in
under a second.

## Changing the size

`N` (default 8) is the operand width of `csa_array`, `pasta_multiplier` and
`pasta_mac`. The product and the accumulator are `2N` bits. `pasta_adder`
takes any `N`. Its worst-case latency grows linearly with `N`, while its
average for random operands grows roughly with `log2(N)`. The testbenches
are written for `N = 8`. Their exhaustive loops would need to become random
sampling for larger sizes.
