# Coupling-aware flit encoding for network-on-chip links

On a deep-submicron on-chip link, neighbouring wires are coupled much more
strongly to each other than to ground. Much of a link's energy therefore
depends on how adjacent lines switch *relative to each other*, not only on how
many lines switch. This design encodes each flit before it enters the network
so as to lower that coupling activity. It inverts the odd lines, the even
lines, or all lines of the flit, whichever makes the new value on the wires
differ least, in the coupling sense, from the value already there. One or two
extra link lines tell the receiver which inversion was applied.

Encoding and decoding happen end to end, in the sending and receiving network
interfaces (NIs). The routers and the links between them carry the encoded
flits unchanged, so nothing inside the network has to change.

## Transition classes of a line pair

Take two adjacent lines `i` and `i+1` and compare their previous values
(what is on the wires) with the values about to be sent:

| type | what happens | coupling cost used here |
|------|--------------|-------------------------|
| I    | exactly one of the two lines switches | 1 |
| II   | both switch, in opposite directions (01→10, 10→01) | 2 |
| III  | both switch in the same direction (00→11, 11→00) | 0 |
| IV   | neither switches | 0 |

Every pair has one even-indexed and one odd-indexed line. Inverting one line
of the new value moves the pair between classes:

* **Odd inversion**, applied to the odd line, turns types II, III and IV into
  type I. It turns type I into type III, IV or II, depending on which line
  switched and whether the lines were equal before.
* **Even inversion** does the same with the roles of the lines swapped.
* **Full inversion** turns type II into IV and type III into IV. It turns a
  type IV pair whose lines hold *different* values (01→01, 10→10, called
  T4\*\*) into type II, and leaves type I alone.

With the weights 1 and 2, an odd (or even) inversion changes the cost of
every pair by exactly ±1. The per-pair flags are:

* `Ty`: the pair gains from odd inversion. This is the union of three cases:
  only the odd line switches; only the even line switches while the two lines
  were equal; or a type II transition.
* `Te`: the same with even inversion.
* `T2`: a type II transition.
* `T4**`: type IV with unequal lines.

For `N` pairs, the cost changes are:

    odd inversion    N - 2*Ty
    even inversion   N - 2*Te
    full inversion   2*(T4** - T2)

So odd inversion pays exactly when `Ty > N/2`: a majority vote of the `Ty`
flags. Self-switching (0→1 transitions of single lines) is left out of every
decision. Its weight is about a quarter of the coupling weight, and ignoring
it costs little accuracy for wide links.

## The three schemes

All three share one NI datapath. Only the encoder block in the middle
differs.

| scheme | inversions | link lines for W-1 payload bits | decision |
|--------|-----------|---------------------------------|----------|
| I   | odd, none            | W   (one inversion line, index W-1)  | majority of the `Ty` flags (`Ty > (W-1)/2`) |
| II  | odd, full, none      | W+1 (control lines W-1 and W)       | `module_a`: lowest of 0, N-2Ty, 2(T4\*\*-T2), with N = W |
| III | odd, even, full, none| W+1 (control lines W-1 and W)       | `module_c`: lowest of 0, N-2Ty, N-2Te, 2(T4\*\*-T2), with N = W |

An inversion is taken only when it strictly lowers the cost. Equal gains are
resolved in the order odd, even, full.

**Control lines.** Before encoding, the payload is padded with zero control
lines. These are inverted together with the other lines of their parity, so
they report the inversion themselves:

* Line `W-1` is odd, so it becomes 1 on an odd or full inversion.
* Line `W` is even, so it becomes 1 on an even or full inversion.

`{odd, even}` thus reads `10` for odd, `01` for even, `11` for full and `00`
for none. The receiver inverts the odd payload lines when line `W-1` is high
and the even payload lines when line `W` is high. The control lines are part
of the pair analysis like any other line, so their own switching is counted
in every decision. `W` must be even.

## Datapath and timing

```
 payload (W-1) ─┐
 zeros ─────────┴─► x ──►┌───────────┐ z  ┌──────────┐  link   ┌─────────┐  ┌─────┐
                         │ encoder E │───►│ register │────────►│ decoder │─►│ reg │─► payload
                   y ───►└───────────┘    └──────────┘   │     └─────────┘  └─────┘
                   ▲                                     │
                   └─────── previous encoded flit ───────┘
           ni_encoder (sending NI)                           ni_decoder (receiving NI)
```

* The register that drives the link is also the "previous encoded flit"
  store. The encoder therefore always compares against what is physically on
  the wires.
* A flit offered with `enb`/`in_valid` on a rising edge appears on the link
  one cycle later. Its decoded payload comes out one cycle after that (two
  cycles end to end).
* `link_valid` and `out_valid` pulse once per flit. In idle cycles the link
  holds its value and nothing switches.
* Only body flits are encoded. A header or tail flit (`flit_body = 0`) is sent
  as it is, with the control lines at zero, so routers can read it and the
  decoder leaves it untouched. The next body flit is still encoded against it,
  since it is what the wires hold.
* `rst` is synchronous and active high. It clears the link to all zeros,
  meaning no inversion.

## Modules

| file | role |
|------|------|
| `noc_enc_pkg.sv` | action codes (`inv_action_e`) and the link-width function |
| `pair_detector.sv` | `Ty`, `Te`, `T2`, `T4**` flags of one line pair |
| `ones_counter.sv` | population count ("Ones" block) |
| `majority_voter.sv` | more ones than zeros; Scheme I decision |
| `module_a.sv` | Scheme II decision (odd / full / none) |
| `module_c.sv` | Scheme III decision, `{odd, even}` code |
| `encoder_s1.sv`, `encoder_s2.sv`, `encoder_s3.sv` | encoder block E of each scheme, combinational |
| `decoder_s1.sv`, `decoder_s23.sv` | inverse of the encoders, combinational |
| `ni_encoder.sv` | sending NI: packing, encoder (chosen by `SCHEME`), link register |
| `ni_decoder.sv` | receiving NI: decoder and output register |
| `noc_encoding_top.sv` | top: one channel per scheme side by side, all fed the same flits |

Parameters: `W` (default 8; a flit has `W-1` payload bits) everywhere, and
`SCHEME` (1, 2 or 3, default 3) on the NIs. In the top, the link of each
scheme is a port (`link_s1` has `W` lines, `link_s2` and `link_s3` have
`W+1`). Routers, if any, go between these ports and the decoders.

Some outputs of `encoder_s1` and `decoder_s1` are wires straight from their
inputs. Scheme I never touches the even lines, so those lines have no logic.

## Departures and choices

* The decision rules for Schemes II and III (`module_a`, `module_c`) are
  derived from the coupling model above. They are not a transcription of
  published equations. The same model gives exactly the published Scheme I
  rule, `Ty > (w-1)/2`.
* Scheme II is often drawn with a single inversion line. One line cannot tell
  the receiver whether an odd or a full inversion was applied. Here Scheme II
  uses the same two control lines as Scheme III.
* The Ones counters are `clog2(N+1)` bits wide, so that all `N = W` pairs can
  be counted.
* Body-only encoding, reset values, the one-cycle registers in both NIs and
  the tie-breaking order are this design's choices.
* Not included: the routers and the network, an LDPC coding extension (no
  description available to build from), and any test-data memory inside the
  top. Flits enter through ports.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The expected values come
from `tb/link_ref_pkg.sv`. That package computes the coupling cost directly
from the type table above, tries every inversion a scheme allows, and keeps
the cheapest. It shares no logic with the RTL.

* `tb_pair_detector`: all 16 pair transitions. It also checks the ±1 property.
* `tb_ones_counter`, `tb_majority_voter`, `tb_module_a`, `tb_module_c`:
  exhaustive or random over every count.
* `tb_encoder_s1/2/3`: random and chained flits at `W = 8` and `W = 32`.
  Each checks against the reference encoding, checks the decode round trip,
  and checks that every allowed action occurs.
* `tb_decoder_s1`, `tb_decoder_s23`: every payload under every inversion.
* `tb_ni_encoder`, `tb_ni_decoder`: cycle-accurate link and output values,
  valid pulses, header pass-through, idle hold and reset, for all three
  schemes.
* `tb_noc_encoding_top`: the whole design at its default size. It sends
  packets of random and then of slowly varying (correlated) data, with idle
  gaps and a reset in between. It checks the links every cycle and the
  decoded payloads at exactly two cycles. It checks that no encoded flit costs
  more coupling than the plain flit would have. It requires every action of
  every scheme, header pass-through, idle hold and the reset to occur at least
  once.

The top testbench prints the total coupling activity of the plain payload and
of each scheme. One run of about 1,800 body flits gave:

| traffic    | plain | Scheme I | Scheme II | Scheme III |
|------------|-------|----------|-----------|------------|
| random     | 6375  | 5416     | 5396      | 5080       |
| correlated | 2877  | 2761     | 2608      | 2528       |

`tb_noc_encoding_top_w32` repeats the end-to-end test on a 32-bit link
(31 payload bits), with a random-walk correlated stream:

| traffic    | plain | Scheme I | Scheme II | Scheme III |
|------------|-------|----------|-----------|------------|
| random     | 32230 | 29251    | 28032     | 27126      |
| correlated | 7775  | 7789     | 7405      | 7427       |

On the wide correlated stream, Scheme I saves nothing: its extra line costs
about as much as its inversions save. The decisions are greedy, one flit at a
time. Every flit's choice is never worse than sending it plain against the
same previous value, but that does not guarantee a lower total over a stream.
Schemes II and III also raise self-switching on correlated data, because the
decision rule ignores it.

These figures count the control lines. They are W-bit coupling-cost sums from
this model, not power figures.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/noc_enc_pkg.sv tb/link_ref_pkg.sv tb/tb_noc_encoding_top.sv \
    --top-module tb_noc_encoding_top -o sim
./obj_dir/sim
```

Replace `tb_noc_encoding_top` with any other testbench name. To lint the RTL:
`verilator --lint-only -Wall -Irtl rtl/noc_enc_pkg.sv rtl/noc_encoding_top.sv`.
