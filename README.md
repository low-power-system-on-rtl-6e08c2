# Crosstalk-avoiding low-power bus code for on-chip data buses

On a long on-chip bus most of the energy and most of the delay uncertainty come
from the coupling capacitance between neighbouring wires, not from the wire's
capacitance to ground. The worst case is a wire that switches while both of its
neighbours switch the other way (for example `101 -> 010`): the coupling
capacitance it has to charge is four times that of a single neighbour moving.

This RTL implements a bus code that removes that worst case inside every 4-wire
group without needing any statistics of the data. Each group of data bits is sent
either XORed with `Z1 = 0101` or with `Z2 = 1010`. The two candidates are bitwise
complements of each other, and of a word and its complement at most one can
produce the alternating "all three wires move against each other" pattern
relative to what is already on the bus. The encoder checks both candidates
against the current bus state, sends the better one, and adds one decode wire
that tells the receiver which mask to XOR back off. Besides removing the worst
coupling, the choice also lowers ordinary switching, which is where the energy
saving comes from (about 18-20 % on random data and 23-28 % on image-like data
with the testbench's bus energy model; see *Measured behaviour*).

Three bus arrangements are provided, trading extra wires against protection:

| scheme | module        | cluster | extra wires             | 8 / 16 / 32-bit bus becomes |
|--------|---------------|---------|-------------------------|-----------------------------|
| I      | `case1_codec` | 4 bits  | 1 decode wire per 4 bits (25 %) | 10 / 20 / 40 wires |
| II     | `case2_codec` | 4 bits  | decode info on 3 wires per byte + grounded shields (62.5 %) | 13 / 27 / 55 wires |
| III    | `case3_codec` | 8 bits  | 1 decode wire per byte (12.5 %, same as bus-invert) | 9 / 18 / 36 wires |

## Crosstalk classes

Look at three neighbouring wires and the move of the centre one. With each
wire's move written as -1, 0 or +1, the coupling the centre wire sees is
`|d_c - d_left| + |d_c - d_right|` times the wire-to-wire capacitance:

* type 1: the centre is quiet and one neighbour moves (`110 -> 111`);
* type 2: factor 2, e.g. the centre moves alone (`000 -> 010`) or against one
  neighbour while the other moves with it (`001 -> 110`);
* type 3: factor 3, the centre moves against one neighbour, the other is quiet
  (`101 -> 110`);
* type 4: factor 4, all three alternate (`101 -> 010`).

Types 2 to 4 are the harmful ones. The energy estimate used by the testbenches is
the lumped model in which every wire that ends high draws
`delta_i + lambda * sum_over_neighbours(delta_i - delta_j)` units of
`C_L * Vdd^2`, with `lambda = C_I / C_L = 3.2` (minimum-spaced wires in a
0.18 um process). The saving of a code is `(1 - N_coded / N_uncoded) * 100` with
N the total of that quantity over a stream.

## The cluster encoder (`xt_encoder`)

```
 d(n) --+-- XOR Z1 --> x_z1 --+--> n4_count --+   n2_count -+
        |                     |                \            \
        +-- XOR Z2 --> x_z2 --+--> n4_count ---+-> select ---+-> [reg] --> bus x(n), decode bit
                               \-> n2_count --------/             |
                 x(n-1) <-----------------------------------------+
```

Each candidate is checked against the registered bus word `x(n-1)` by a type-4
counter and a type-2 counter. The choice:

1. If one candidate has more type-4 couplings, send the other. For a 4-bit
   cluster at most one candidate can be flagged, so this means "avoid the one
   with a type-4".
2. Otherwise compare the type-2 counts (`count_comparator`): send the Z2
   candidate only if the Z1 candidate has strictly more; ties go to Z1.

The chosen word and its decode bit (1 = Z2) are registered on the rising edge;
that register drives the bus and is also the `x(n-1)` for the next word. There is
no extra latency: a word presented with `en` high is on the bus after one clock
edge. With `en` low the register holds, so an idle bus does not switch. Reset is
asynchronous and active low, and clears the bus and decode bits.

The decoder (`xt_decoder`) is combinational: a 2:1 selector picks `Z1` or `Z2`
by the decode bit and XORs it onto the received word.

### The type-4 counter (`n4_count`)

This is the least obvious piece. With `y_i = x_i(n) XOR x_i(n-1)` marking a
switching wire, "wires 0, 1, 2 all switch" is `y0 & y1 & y2`. That alone cannot
tell `010 -> 101` from `000 -> 111`. Instead of checking both neighbour pairs, the
counter adds one shared term, `y12 = x_1(n) XOR x_2(n)` (the two middle wires
differ in the new word), and forms

```
flag = (y0 & y1 & y2 & y12) | (y1 & y2 & y3 & y12)
```

This is cheap (two 4-input ANDs and an OR) and flags every true type-4 in a
4-wire cluster. It is not an exact type-4 detector: it also flags a few
transitions that are really type-2, such as `110 -> 001` on wires 0..2. Because
the two candidates are complements, the two ANDs can never both fire for both
candidates, so at most one candidate is ever flagged and the selection in step 1
is always possible. The consequence of the approximation is only that such a
candidate is avoided when it need not have been; the guarantee "no type-4 inside
a 4-wire cluster" holds and is checked exhaustively by the testbenches.

For 8-bit clusters the same cell is applied to the centre pairs (1,2), (3,4) and
(5,6) and the three flags are added, giving a 2-bit count of 0..3.

### The type-2 counter (`n2_count`)

For each pair of neighbours, `y_i & y_(i+1) & (x_i(n) XOR x_(i+1)(n))` is 1 when
both switch and end in different states, i.e. they moved in opposite directions.
The W-1 pair flags are added: 0..3 on 2 bits for W = 4, 0..7 on 3 bits for W = 8.

## Bus arrangements

Wire 0 is the least significant wire in all of them.

**Scheme I** (`case1_codec`): data bits `4k..4k+3` form cluster k on wires
`4k..4k+3`; the N/4 decode wires are grouped above the data, wire `N+k` for
cluster k. Type-4 cannot occur inside a cluster, but it still can across a
cluster boundary or at the decode wires.

**Scheme II** (`case2_codec`): each byte becomes a 13-wire group, and groups are
separated by one more shield:

```
wire  0..3   low nibble cluster       wire 9      shield (0)
wire  4      shield (0)               wire 10..12 decode info
wire  5..8   high nibble cluster      wire 13     shield between groups
```

The two decode bits of a byte go out on three wires as
`(low, high) = Z1Z1 -> 000, Z1Z2 -> 001, Z2Z1 -> 011, Z2Z2 -> 111`. On these code
words neighbouring decode wires never move in opposite directions. The
receiver takes the low cluster's mask from wire 11 and the high cluster's from
the parity of the three. With shields every wire's outer neighbours either
belong to its own cluster or are quiet, so no type-4 can occur anywhere on the
bus; the testbenches check this over the whole 55-wire bus. The three decode
wires are registered from the encoders' pre-register choice (`sel_next`) so they
switch on the same edge as the data. The shield outputs are constant 0 on
purpose; lint reports the shield inputs of the receive side as unused.

**Scheme III** (`case3_codec`): byte clusters with masks `01010101` /
`10101010`, one decode wire per byte at wire `N+k`. Fewer extra wires, but the
8-bit cluster can still carry type-4 couplings: it only picks the candidate with
fewer of them, then the one with fewer type-2 couplings.

## Top level (`xt_codec_top`)

The top carries one data stream `d_in` (for example the write data from an IP
core to a memory controller) over all three links at once, so that the same
traffic can be compared:

| port   | width (N = 32) | meaning |
|--------|---------------:|---------|
| `clk`, `rst_n`, `en` | 1 | clock, asynchronous active-low reset, load enable |
| `d_in` | 32 | data to send |
| `bus1` / `bus2` / `bus3` | 40 / 55 / 36 | coded buses of schemes I / II / III |
| `q1` / `q2` / `q3` | 32 | decoded data at the receiving end |

Each `caseN_codec` has separate transmit (`d_in -> bus_out`) and receive
(`bus_in -> d_out`) sides, because each end of a real link holds both an encoder
for what it sends and a decoder for what it receives. The top loops each
`bus_out` back to `bus_in`. A real system picks one scheme per bus, and a
bidirectional data path (write and read data) uses one link per direction. The
bus protocol (addresses, handshakes, arbitration) is untouched by the code and
is not part of this RTL.

`N` must be a multiple of 8 (4 is enough for scheme I); the wire-count
parameters have defaults derived from `N` and are checked by an elaboration-time
assertion.

## Files

| file | contents |
|------|----------|
| `rtl/xt_pkg.sv` | mask constant, `basis_e` (Z1/Z2), 3-wire decode code of scheme II |
| `rtl/n4_count.sv`, `rtl/n2_count.sv` | crosstalk counters |
| `rtl/count_comparator.sv` | greater-than on two counts |
| `rtl/xt_encoder.sv`, `rtl/xt_decoder.sv` | cluster encoder (registered) and decoder |
| `rtl/case1_codec.sv`, `rtl/case2_codec.sv`, `rtl/case3_codec.sv` | the three bus arrangements |
| `rtl/xt_codec_top.sv` | the three links side by side |
| `tb/xt_ref_pkg.sv` | reference models: crosstalk classification, selection rule, lumped-model energy |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_workloads` |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and ends; a watchdog
stops it with a failure if it hangs. For example:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/xt_pkg.sv tb/xt_ref_pkg.sv tb/tb_xt_codec_top.sv --top-module tb_xt_codec_top
./obj_dir/Vtb_xt_codec_top
```

Replace the last file and top name for any other testbench. All of them finish in
well under a second.

* `tb_n4_count`, `tb_n2_count`, `tb_count_comparator`, `tb_xt_decoder`:
  exhaustive over all inputs for 4- and 8-wire clusters. The counters are
  compared with a reference written from the class definitions (moves of -1/0/+1),
  and the type-4 counter is also checked to flag every true type-4 and never
  both candidates.
* `tb_xt_encoder`: 10 000 random words on 4- and 8-bit clusters with idle cycles;
  checks the code, decode bit, one-cycle latency, hold, reset and the absence of
  type-4 in 4-bit clusters.
* `tb_case1_codec`, `tb_case2_codec`, `tb_case3_codec`: 32-bit links, wire map,
  decode codes, grounded shields, round trip, type-4 freedom where guaranteed.
* `tb_xt_codec_top`: the top at its default size, 20 000 cycles of mixed random
  and slowly varying data. It counts how often each selection path was taken
  (Z2 forced by type-4, Z1 forced by type-4, Z2 by the type-2 comparison, tie to
  Z1, equal non-zero type-4 counts in scheme III, idle hold, each scheme II
  decode code) and fails if any never occurred.
* `tb_workloads`: the three schemes at 8, 16 and 32 bits on random data and on
  a synthetic 64 x 64 8-bit picture (smooth shading plus noise, raster order).

## Measured behaviour

`tb_workloads` reports, for the lumped energy model above (saving against the
uncoded bus of the same data width):

| stream | scheme I | scheme II | scheme III |
|--------|---------:|----------:|-----------:|
| random, 8 bit   | 17.6 % | 17.3 % | 19.2 % |
| random, 16 bit  | 18.3 % | 19.3 % | 18.9 % |
| random, 32 bit  | 18.3 % | 20.0 % | 18.6 % |
| image, 8 bit    | 27.5 % | 27.0 % | 24.8 % |
| image, 16 bit   | 27.2 % | 27.5 % | 24.1 % |
| image, 32 bit   | 26.2 % | 27.1 % | 23.1 % |

Wire events of type 4 drop by roughly 75-90 % with schemes I and III and to zero
with scheme II; type-3 events fall by 50 % (random) to 70 % (image) with
scheme I and by 84-94 % with scheme II. The published evaluation of this code reports 21-23 %
(random) and 31-34 % (image) for scheme I, and puts scheme III ahead of
schemes I and II on random data (about 30 %). The numbers here are lower, and
scheme III is not ahead. The difference is expected: the image data is
synthetic, the energy model is evaluated here per wire for every wire (edge
wires included), and the published stream lengths and exact accounting are not
known. The testbench checks only that every scheme saves energy on every stream,
not the size of the saving.

## Choices made in this RTL

These are not fixed by the code itself and can be changed freely:

* wire order: data clusters first, decode wires grouped above them (I and III);
  the scheme II group layout shown above, with the low nibble as the "first"
  cluster of the 3-wire decode code;
* ties: equal type-2 counts send Z1; in scheme III equal non-zero type-4 counts
  fall through to the type-2 comparison;
* the load enable `en`, and reset of all coded wires to 0;
* scheme II decode wires registered from the pre-register choice rather than
  decoded from the registered decode bits;
* default width N = 32, the widest of the 8/16/32-bit data buses the code is
  meant for. Sizes after synthesis are not comparable with published
  cell-library areas.

The type-4 counter is deliberately the cheap approximate form described above,
not an exact detector.
