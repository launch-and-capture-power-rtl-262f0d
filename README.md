# Odd-invert encoding for a low-power on-chip link

A parallel on-chip link burns power every time a wire toggles, and on closely
spaced wires much of that power goes into the coupling capacitance between
neighbours: two adjacent wires switching in opposite directions cost about
twice as much as one wire switching next to a quiet one, while two wires
switching together cost almost nothing in coupling. This design sends data
over a `W`-wire link with one wire reserved as an *inversion line*. Before each
flit is sent, an encoder decides whether to invert all **odd-numbered** wires;
the receiver reads the inversion line and undoes it. Inverting only the odd
wires turns many expensive neighbour transitions into cheap ones, which a
plain whole-word inversion cannot do.

Two ways of making the decision are provided, selectable per flit:

* **Majority (pairwise) encoder** – looks at every pair of neighbouring wires,
  asks "would inverting the odd wire of this pair make this pair cheaper?",
  and inverts if most pairs say yes.
* **Precomputation encoder** – a much smaller circuit. It walks the data wires
  from the most significant one down, stops at the first wire that would
  change, and inverts if (and only if) that wire is an odd one, so the most
  significant transition is removed. Nothing below that wire is examined.

The published scheme this follows reports that the precomputation variant
lowers the power of the encoding circuit itself by about a fifth compared to
the pairwise one (FPGA power reports, 0.035 mW vs 0.022 mW total). Those
numbers are not reproduced here; see *What the switching numbers say* below.

## Link format

```
 bit W-1      W-2 ...                      1   0
 [ inv ][ d(W-2) ... d(1) d(0) ]     W wires, W even (default 32)
```

* A body flit is `W-1` bits (31 by default). It is widened to `W` bits with a
  `0` on the top wire before encoding.
* "Odd" means bit positions 1, 3, 5, …. Because `W` is even, the inversion
  line `W-1` is itself odd, so "invert the odd wires of the widened flit" also
  sets the inversion line to 1. One `odd_inverter` therefore does the whole
  last stage of both encoders.
* The encoders compare the new flit with the word **currently on the link**
  (the previously encoded flit, inversion line included). The link register
  holds its value when no flit is sent, so idle cycles cost nothing and the
  comparison is always against what the wires really show.

## The pair detector (`ty_detect`)

Every neighbouring pair of wires contains exactly one odd wire, the one odd
inversion would flip. For the pair, with `e`/`o` meaning "the even/odd wire
would toggle if the flit were sent as is", the cost model used is

* one unit per wire that toggles (self switching), plus
* one unit per unit change of the voltage difference between the two wires
  (coupling): one wire switching = 1 (Type I), opposite switching = 2
  (Type II), same-direction switching or no switching = 0 (Types III, IV).

Working through the four cases gives:

| even wire | odd wire | sent as is | odd wire inverted | detector |
|-----------|----------|-----------|--------------------|----------|
| still     | still    | 0         | 2                  | 0 |
| toggles   | still    | 2         | 2 or 4             | 0 |
| still     | toggles  | 2 (Type I)| 0                  | **1** |
| toggles   | toggles, same direction (Type III) | 2 | 2 | 0 |
| toggles   | toggles, opposite (Type II) | 4 | 2 | **1** |

So `ty = o & (~e | (y_odd ^ y_even))`, where the last term says the two link
values differ, which makes a double toggle an opposite one. The set of types
(Type I on the odd wire, and Type II) matches the published description of
the detector; the exact weights are this design's choice and would shift if
the coupling-to-ground capacitance ratio were very different from 1.

There are `W-1` pairs, wires (0,1) … (W-2,W-1); the last pair includes the
inversion line, whose new value is taken as 0 before inversion.

## Majority decision (`majority_voter`, `data_encoder`)

`data_encoder` instantiates `W-1` detectors, counts their ones in
`majority_voter` and inverts when the ones strictly outnumber the zeros. With
`W` even the voter has an odd number of inputs, so there is no tie. The
decision is greedy per flit: it does not minimise the total cost, it follows
what most pairs prefer.

## Precomputation decision (`precomp_encoder`)

A ripple chain runs from data wire `W-2` down to wire 0:
`first[i] = diff[i] & ~seen[i+1]`, `seen[i] = seen[i+1] | diff[i]`, where
`diff` is the new flit XOR the data wires on the link. `inv` is the OR of
`first[i]` over odd `i`. If the flit equals the link value, or the first
difference is on an even wire, the flit is sent unchanged. The inversion
line's previous value does not enter this decision.

The published description says only that the bits are compared one at a
time from MSB to LSB and that inversion is performed on the first variation.
Which wires are inverted, and what happens when the first variation is on a
wire that inversion would not touch, are not stated: the odd-wire rule above
is this design's reading, chosen so that the same odd inverter, inversion line
and decoder serve both schemes.

## Decoder (`data_decoder`)

If the inversion line of the received word is 1, the odd data wires are
inverted back; the restored flit is registered. The published text says the
decoder "inverts the received flit"; inverting all wires would not undo an
odd inversion, so only odd wires are re-inverted here.

## Top level and timing (`enc_link_top`)

```
in_data --+--> data_encoder ----+
          |                     +--mode--> link_reg ---> link_data ---> data_decoder ---> out_data
          +--> precomp_encoder -+            |  (W wires)                  (register)
                  ^        ^                 |
                  +--------+---- link_data --+
```

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `mode`      | in  | 1 (`enc_mode_e`) | `ENC_MAJORITY` (0) or `ENC_PRECOMP` (1), per cycle |
| `in_valid`, `in_data` | in | 1, W-1 | body flit to send |
| `link_data`, `link_valid` | out | W, 1 | the link wires, new word flag |
| `out_valid`, `out_data` | out | 1, W-1 | decoded flit |

* The encoders are combinational. A flit presented with `in_valid` in cycle
  *t* appears on `link_data` after the clock edge ending *t* (`link_valid`
  high for one cycle) and on `out_data` one clock later: two clocks end to
  end, one flit per clock, no back-pressure.
* Both encoders read the same link register, so `mode` may change on any
  cycle without breaking either the encoding or the decoding.
* Reset puts an all-zero, not-inverted word on the link.
* Both encoders elaborate a `$error` if `W` is odd or below 2.
* `precomp_encoder` takes the full `W`-bit link word for symmetry with
  `data_encoder` but ignores its top bit; lint reports that bit as unused.

Packing packets into `W-1`-bit body flits, and head/tail flits, belong to the
surrounding network interface and are not part of this RTL. In a network the
encoder/decoder pair would sit on every link.

## What the switching numbers say

`tb_enc_link_top` sends 3000 uniformly random flits (with repeats and idle
cycles) through each mode and adds up the cost model above over all wires:

| stream | cost |
|--------|------|
| unencoded, 32 wires | 93 209 |
| majority encoder | 89 755 (about 3.7 % lower) |
| precomputation encoder | 93 532 (about the same as unencoded) |

On random data the link saves little, as expected for any invert code; on
correlated data the savings are larger. The precomputation encoder does not
reduce link switching on random data. Its benefit is a smaller, quieter
decision circuit (after generic synthesis roughly 75 cells versus 148 for the
pairwise encoder at `W = 32`), which is where the published power comparison
was made. Which data the published comparison used is not known.

## Files

| file | content |
|------|---------|
| `rtl/link_enc_pkg.sv` | `LINK_W` (32) and `enc_mode_e` |
| `rtl/ty_detect.sv` | pair transition-type detector |
| `rtl/majority_voter.sv` | strict-majority vote of `N` inputs |
| `rtl/odd_inverter.sv` | conditional inversion of odd bits |
| `rtl/data_encoder.sv` | pairwise majority encoder |
| `rtl/precomp_encoder.sv` | MSB-first precomputation encoder |
| `rtl/data_decoder.sv` | registered decoder |
| `rtl/link_reg.sv` | link driver register |
| `rtl/enc_link_top.sv` | top level |
| `tb/tb_<module>.sv` | self-checking testbench per module |

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
(each has a watchdog). The block testbenches compare against reference
models written independently of the RTL (the detector and majority encoder
references compute the pair costs directly; the precomputation reference is a
plain loop that breaks at the first difference). `tb_enc_link_top` runs the
top at its default width and also counts each mechanism: inversions and
plain sends by each encoder, mid-stream mode changes, idle cycles, repeated
flits. It fails if any of them never happened, if a flit is lost or altered,
or if the majority encoder fails to beat the unencoded link.

## Simulating

With Verilator 5, from the folder holding `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv \
    rtl/link_enc_pkg.sv tb/tb_enc_link_top.sv --top-module tb_enc_link_top -o sim
./obj_dir/sim
```

Replace `tb_enc_link_top` by any other `tb_*` module to run a block test. All
RTL is synthesizable SystemVerilog-2017 and lints clean with
`verilator --lint-only -Wall` apart from the unused-bit note above and the
package parameter `LINK_W` being reported unused in modules that do not
use it.

## Changing it

* Link width: set `LINK_W` in the package or `W` on `enc_link_top`. It must be
  even. The testbenches' block-level checks also run at `W = 8`.
* Cost model: only `ty_detect` encodes it; a different coupling ratio means a
  different truth table there (and in the testbench references).
* A different precomputation rule changes only the `inv` expression in
  `precomp_encoder`; the decoder needs no change as long as the encoders only
  invert odd wires.
