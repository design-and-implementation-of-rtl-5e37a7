# Sorting-network binary counters: (7,3) and (15,4)

A (k,m) counter takes k bits of the same weight and returns their number of
ones as an m-bit binary number. Such counters are the compression cells of
multi-operand adders and multiplier reduction trees (Wallace and Dadda
trees), so their delay sits directly on the critical path.

This design computes the count without any adder chain. The input bits are
first **sorted**: a network of 1-bit sorters moves every 1 to the top and
every 0 to the bottom, which turns any input word into a thermometer code
with the same number of ones. A thermometer code has exactly one place where
a 1 sits directly above a 0, and that place *is* the count. Marking it gives
a **one-hot code** of the count, and a one-hot code converts to binary with a
single layer of AND/OR gates. Splitting the inputs into two groups keeps the
sorting networks shallow; the two one-hot codes are then combined by a
two-level AND/OR "adder" that has no carries.

Two counters are provided, side by side in `binary_counters_top`:

| counter | inputs | groups | sorting networks | one-hot codes | output logic |
|---|---|---|---|---|---|
| (7,3)  | `x7[6:0]`  | 4 + 3 | `sn4`, `sn3` (3 layers each) | P0..P4, Q0..Q3 | three hand-simplified equations |
| (15,4) | `x15[14:0]` | 8 + 7 | bitonic 8-input, bitonic 7-input (6 layers each) | P0..P8, Q0..Q7 | generic one-hot adder |

Both counters are purely combinational. There is no clock, no reset and no
handshake: the output is valid one propagation delay after the inputs
settle. To use one in a pipelined datapath, put registers around it.

## The 1-bit sorter

For two 1-bit values the larger one is their OR and the smaller one their
AND, so a sorter (`sort2`) is a single layer of two 2-input gates. Looking at
it as a swap: the bits exchange places when the upper one is 0 and the lower
one is 1, and pass straight through otherwise. Every network in the design is
built only from this cell. By the 0-1 principle, a network of such
compare-exchange cells that sorts all 0/1 inputs is a correct sorting
network. Because this design only ever handles 1-bit data, the testbenches
can check each network exhaustively.

Convention used everywhere: in a vector `s[N-1:0]` the **top is index N-1**.
A sorted vector with k ones has `s[N-1 -: k]` set.

## Small networks: `sn3` and `sn4`

Both have three sorter layers.

* `sn3`: (2,1), then (1,0), then (2,1). After two layers the minimum is at
  the bottom; the third layer orders the remaining two.
* `sn4`: (3,2)+(1,0), then (3,1)+(2,0), then (2,1). The second layer sends
  the overall maximum to the top and the overall minimum to the bottom; the
  third orders the middle pair. This is the optimal five-comparator network.

The three-layer depth is taken from the description of the design. The exact
comparator pairs are the standard networks of that depth.

## Bitonic networks: `bitonic_sorter` and `sn7_bitonic`

The (15,4) counter sorts its two groups with bitonic networks.
`bitonic_sorter #(LOGN)` sorts `2**LOGN` bits (default 8) in
`LOGN*(LOGN+1)/2` layers (6 layers and 24 sorters for 8 inputs):

1. **Stage kk** (kk = 1..LOGN) works on blocks of `2**kk` bits. Each block
   enters as a *bitonic* sequence: its lower half is sorted one way and its
   upper half the other way.
2. A **merge** compares bits `2**jj` apart, for jj = kk-1 down to 0. The
   first comparison layer splits a bitonic block into two halves, each of
   them bitonic again, with every bit of one half no larger than every bit of
   the other. Repeating on the halves leaves the block sorted.
3. Blocks whose index bit `kk` is 0 sort upwards and the others downwards.
   So two neighbouring sorted blocks form the bitonic input of the next
   stage. In the last stage every block sorts upwards, and the result has its
   ones at the top.

The generate loops map each (stage, merge step) to a layer index with
`counter_pkg::bitonic_layer_index`. Each comparison instantiates one `sort2`,
wired in the up or the down direction.

A bitonic network needs a power-of-two size. `sn7_bitonic` therefore feeds
its 7 inputs into the 8-input network together with a constant 0. The 0 can
never rise above a real input, so it always comes out at the bottom, and that
output is dropped. An immediate assertion checks this in simulation.
Synthesis removes or simplifies the sorters that see the constant. This way
of building the 7-input network is a choice of this design. The description
only says the 7-input network is built with the bitonic method and that
bitonic sorting needs 2^n elements.

## From sorted bits to a one-hot count: `onehot_gen`

The sorted group `s[N-1:0]` is padded with a fixed 1 above the top and a
fixed 0 below the bottom:

```
pad = {1, s[N-1], ..., s[0], 0}        // N+2 bits
oh[k] = pad[N+1-k] & ~pad[N-k]         // k = 0..N
```

Thanks to the padding there is *always* exactly one 1-above-0 junction, even
for all zeros (the junction lies just below the fixed 1, giving oh[0]) and
for all ones (it lies just above the fixed 0, giving oh[N]). The fixed 1 is
not counted. Each code bit costs one 2-input gate.

## Combining two one-hot codes

With P = count of the first group and Q = count of the second, the output is
the binary form of P + Q.

**(7,3) counter** (`counter_7_3`): P0..P4 from the 4-bit group, Q0..Q3 from
the 3-bit group. The three output bits use these simplified equations:

```
y0 = (P1 | P3) ^ (Q1 | Q3)                                   parity of P + parity of Q
y1 = Q0(P2|P3) | Q1(P1|P2) | Q2·~(P2|P3) | Q3·~(P1|P2)       P+Q in {2,3,6,7}
y2 = P4 | P3·~Q0 | P2(Q2|Q3) | P1·Q3                         P+Q >= 4
```

For example, for y1 with Q = 2, the sum has bit 1 set when P + 2 is 2, 3, 6
or 7, that is P in {0, 1, 4}, which is exactly "not P2 and not P3". The
equations rely on P and Q being one-hot, so negations such as ~(P2|P3) stand
for "any other value". P0 appears in none of them.

**(15,4) counter** (`counter_15_4` with `onehot_add`): only the size of this
counter's output logic is given, not its equations. `onehot_add` therefore
builds the unsimplified sum of products with the same shape:

```
y[b] = OR over j of ( Q_j AND ( OR of all P_i with bit b of (i+j) set ) )
```

The OR terms are chosen at elaboration time from the parameters, and
synthesis simplifies them further. The module is generic: with `NP=4, NQ=3,
W=3` it computes the same function as the (7,3) equations.

## Critical paths

* (7,3): 3 sorter layers, then the junction gate, then a two-level AND/OR
  (plus one XOR for y0).
* (15,4): 6 sorter layers, then the junction gate, then the AND/OR network
  of `onehot_add`.

## Files

| file | contents |
|---|---|
| `rtl/counter_pkg.sv` | widths of both counters; layer-count helpers for the bitonic network |
| `rtl/sort2.sv` | 1-bit sorter (OR/AND) |
| `rtl/sn3.sv`, `rtl/sn4.sv` | 3- and 4-input sorting networks |
| `rtl/bitonic_sorter.sv` | parameterised bitonic network, 2**LOGN inputs |
| `rtl/sn7_bitonic.sv` | 7-input network made from the 8-input bitonic network |
| `rtl/onehot_gen.sv` | padding and 0/1-junction detection, parameter N |
| `rtl/onehot_add.sv` | binary sum of two one-hot codes |
| `rtl/counter_7_3.sv` | (7,3) counter |
| `rtl/counter_15_4.sv` | (15,4) counter |
| `rtl/binary_counters_top.sv` | both counters side by side |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification

Every testbench checks against a reference computed independently of the
RTL, usually `$countones` or a thermometer code built from it. Each one
prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog if
the stimulus hangs. All tests are exhaustive over their input space:

* `tb_sort2`, `tb_sn3`, `tb_sn4`, `tb_sn7_bitonic`: all inputs.
* `tb_bitonic_sorter`: all inputs at 4, 8 (the default) and 16 bits.
* `tb_onehot_gen`: every count at N = 3, 4, 7 and 8.
* `tb_onehot_add`: every (P, Q) pair at both sizes.
* `tb_counter_7_3`: all 128 inputs.
* `tb_counter_15_4`: all 32,768 inputs.
* `tb_binary_counters_top`: the end-to-end test with the top at its default
  parameters. It applies all 32,768 words to the (15,4) counter and all 128
  words (repeatedly) to the (7,3) counter, and samples each result in the
  cycle its input is applied, which confirms zero latency. It also counts how
  often each mechanism was exercised, and fails if any never was:
  * every output value of both counters;
  * every position of all four one-hot codes, including the two positions
    where the junction falls on a padding bit;
  * a swap in a sorter of each of the four networks.

Running a test with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_counter_15_4 rtl/counter_pkg.sv tb/tb_counter_15_4.sv
./obj_dir/Vtb_counter_15_4
```

Lint a module on its own with
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/counter_pkg.sv rtl/<module>.sv`.
The remaining lint warnings are the unused P0 in `counter_7_3` (see above)
and package constants that a given module does not use.

## Where this RTL departs from or goes beyond the description

* **Comparator placement** in `sn3`, `sn4` and the bitonic network follows
  the standard networks. The described layer counts (three for the 3- and
  4-input networks) are kept.
* **Input grouping**: the (7,3) counter sends `x[3:0]` to the 4-input network
  and `x[6:4]` to the 3-input one. The (15,4) counter sends `x[7:0]` to the
  8-input network and `x[14:8]` to the 7-input one. The bits have equal
  weight, so any grouping gives the same result.
* **(15,4) output logic** is the generic `onehot_add`, not a hand-simplified
  set of equations, because none is given for this counter.
* **7-input bitonic network** is the 8-input network with a constant-0 input,
  as explained above.
* One passage can be read as saying that the bitonic design sorts all inputs
  in a single network instead of dividing them. The (15,4) counter is more
  specifically described as built from a 7-bit and an 8-bit bitonic network,
  and that reading is implemented here.
* **Not included**: the conventional (7,3) counter made of full adders, which
  serves only as a point of comparison. The Artix-7 pin assignment of the
  (7,3) counter is also not included: inputs on U18, T18, R17, R15, M13, L16
  and J15, outputs on J13, K15 and M17. It belongs in a constraints file.
* The reported FPGA results cannot be checked from this RTL: 0.22 ns and
  5 LUTs for the (7,3) counter, and 0.57 ns and 32 LUTs for the (15,4)
  counter. They depend on the vendor tool flow.
