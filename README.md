# Coupling-aware flit encoding for network-on-chip links

On-chip links spend much of a network-on-chip's power, and on closely spaced
wires most of it goes into the coupling capacitance between neighbouring
lines, not into the capacitance to substrate. This design lowers coupling
activity by re-coding each body flit in the network interface (NI) before it
enters the network, and undoing the code in the destination NI. Because the
flits of a packet follow each other through every link of the route in the
same order (wormhole switching), coding once at the ends saves the same
transitions on every link and on every router crossing, and the routers stay
as they are.

The coding is a choice, per flit, between sending the word as it is and
sending it with its odd lines, its even lines or all lines inverted,
whichever makes the transition from the word currently on the link cheapest.
A line or two of the link tell the receiver what was done.

Three variants are provided, each one extending the previous:

| scheme | actions | signalled by | payload on a W-line link |
|--------|---------|--------------|--------------------------|
| I   | none, odd inversion | one inv line | W-1 bits |
| II  | none, odd ("half") inversion, full inversion | one inv line | W-1 bits |
| III | none, odd, even, full inversion | two code lines | W-2 bits |

Before the scheme encoder the payload is converted to Gray code, and after
the decoder back to binary, so that payloads that count up change few lines.

## Cost model: transition types of a line pair

Between the word on the link (previous, `y`) and the next word (`x`), each
pair of adjacent lines makes one of four transitions:

| type | what the two lines do | coupling cost |
|------|-----------------------|---------------|
| I   | one switches, the other holds | 1 |
| II  | both switch, in opposite directions | 2 |
| III | both switch, in the same direction | 0 |
| IV  | neither switches | 0 |

The power of a link is taken as proportional to
`T(0->1)*Cs + (T1 + 2*T2)*Cc`, where `T(0->1)` counts single lines rising,
`T1`, `T2` count pairs of type I and II, `Cs` is the line-to-substrate and
`Cc` the coupling capacitance. The encoders minimise the coupling term
`T1 + 2*T2` only; the self term is counted by the link monitor but does not
enter the decisions.

Every pair has one odd-position and one even-position line (positions count
from 0 at the least significant line). Inverting the odd line of the new
word changes the pair's type in a fixed way:

* type II becomes type I (saves 1), type III and IV become type I (cost 1);
* a type I where the odd line switched becomes type IV (saves 1);
* a type I where the even line switched becomes type III if the two previous
  bits were equal (saves 1) or type II if they differed (costs 1). This last
  case is called T1*.

So the odd inversion saves `2*Tb - (w-1)`, where `Tb = T2 + T1 - T1*` is the
number of pairs that gain and `w-1` the number of pairs. The even inversion
is the mirror image (`Tv = T2 + T1 - T1**`, T1** being a type I where the
odd line switched and the previous bits differed). Full inversion turns type
II into type IV (saves 2) and type IV into type II when the previous bits
differ (costs 2; called T4**), and leaves everything else at its cost, so it
saves `2*(T2 - T4**)`.

`pair_type_detect` computes, for one pair, the flags `ty` (pair gains from
odd inversion), `te` (gains from even inversion), `t2` and `t4ss` (T4**).
`ones_count` adds them up over the `w-1` pairs; `majority_voter` tests
`count > (w-1)/2`.

## The schemes

### Scheme I

The word enters the encoder as `W` lines with line `W-1` at 0. `W` is even,
so line `W-1` is an odd position: odd-inverting the word also sets that line,
which thereby becomes the inv line. The encoder odd-inverts exactly when the
TY majority says it saves (`Tb > (w-1)/2`). The decoder inverts the odd
lines back whenever the inv line is 1; no history is needed.

### Scheme II, and how one inv line carries two inversions

Module A compares the savings of odd and full inversion and takes the larger
positive one (odd on a tie; the two savings can only tie at zero since one is
odd and one even). Both inversions set the inv line, so the decoder must tell
them apart from the data. It does so by voting TY between the received word
and the previous received word:

* An odd-inverted word always votes 0. Odd inversion flips every pair's TY
  flag, and the encoder only odd-inverts when more than half the flags were
  1 before.
* A fully inverted word votes 1 only in some cases. Without further care a
  single inv line cannot carry both inversions: two different flits can then
  produce the same link word.

The encoder therefore contains a second TY array and majority voter that
evaluate the decoder's vote on the fully inverted word (`full_ok`). Full
inversion is only chosen if that vote is 1; otherwise the encoder falls back
to odd inversion if that saves, or sends the word as it is. The vote on the
fully inverted word works out to be the same as asking whether even
inversion would save more than full inversion,
`2*(T2 - T4**) < 2*Tv - (w-1)`; the encoder computes it directly with TY
logic instead, because scheme II has no Te counters. With this rule
every word decodes, which the testbenches check over all word pairs at `W=6` and
with random traffic at `W=32`. The price is that some full inversions are
given up: in the end-to-end test at `W=32`, about 3% of body flits are sent
fully inverted.

### Scheme III

Module C chooses among none, odd, even and full inversion by the largest
positive saving (ties keep the earlier in that order). The word enters with
its two top lines at 0; line `W-1` is odd and line `W-2` even, so the
inversion itself writes the action onto them:
`{z[W-1], z[W-2]}` = `10` odd, `01` even, `11` full, `00` none. The decoder
reads these two lines and undoes the inversion; it needs neither TY logic
nor the previous word. Scheme III gives up one payload line for this.

## The NI data path

`ni_encoder` (source side): binary to Gray on the payload, zero-extension to
`W` lines, scheme encoder, and one register. That register drives the link
and is also the "previous word" the encoder compares with, so the link
holds its value between flits and idle cycles cost nothing.

`ni_decoder` (destination side): scheme decoder, Gray to binary, one
register. It keeps the last word received from the link (still coded) as
the previous word for scheme II.

Header flits, marked by a sideband `hdr` signal, are not coded: routers need
to read them. Their payload goes onto the link unchanged with the code
lines at 0, and both ends still take the header word as the previous word,
so encoder and decoder stay in step.

Both blocks use a valid/ready handshake with one register stage: one flit
per clock, one cycle of latency each, two cycles from the source NI input to
the destination NI output when nothing stalls. An assertion in the encoder
checks that a stalled link word is held; one in the decoder checks that the
code lines of every body word decode to 0. Reset is synchronous and active
low, and clears both ends' previous word to 0.

`noc_codec_top` places the three schemes side by side, each as encoder,
link and decoder with its own flit ports, the coded link lines brought out
(`sN_link`) and a `link_monitor` on each link (`sN_stats`, cleared by
`stats_clear`). The monitor adds up, every clock, the 0->1 transitions, the
type I-IV pair transitions and `T1 + 2*T2` (struct `link_stats_t` in
`noc_codec_pkg`). The routers between the NIs are not modelled: with
end-to-end coding they only pass the words along.

## Files

| file | content |
|------|---------|
| `rtl/noc_codec_pkg.sv` | odd/even masks, scheme III action code `inv_code_e`, `link_stats_t` |
| `rtl/pair_type_detect.sv` | TY, Te, T2, T4** flags of one line pair |
| `rtl/ones_count.sv`, `rtl/majority_voter.sv` | flag count, majority test |
| `rtl/coupling_counts.sv` | all pairs of a word, four counts |
| `rtl/module_a.sv`, `rtl/module_c.sv` | decisions of schemes II and III |
| `rtl/scheme{1,2,3}_encoder.sv`, `rtl/scheme{1,2,3}_decoder.sv` | combinational encoders and decoders |
| `rtl/bin2gray.sv`, `rtl/gray2bin.sv` | Gray conversion |
| `rtl/ni_encoder.sv`, `rtl/ni_decoder.sv` | NI paths with registers, parameter `SCHEME` |
| `rtl/link_monitor.sv` | transition counters of the power model |
| `rtl/noc_codec_top.sv` | the three lanes side by side |

Parameters: `W` (link lines, default 32, must be even, 4 to 256) everywhere;
`SCHEME` (1, 2, 3) in the NI blocks; `N` in the counting helpers. The
default width of 32 is a choice made here, not a given of the method.
At `W=32` the whole top synthesises to roughly 4000 word-level cells and
900 flip-flops, most of them in the three link monitors.

## Verification

Every module has a self-checking testbench in `tb/`. The reference models in
`tb/tb_ref_pkg.sv` are written from the cost definition, not from the pair
flags: an encoder reference tries each allowed inversion, computes the
coupling cost of each candidate directly, and keeps the cheapest. The scheme
encoders and decoders are checked exhaustively at `W=6` and with 20000
random words at `W=32`. `tb_ni_lane.sv` is a shared driver and scoreboard:
it checks every link word against the reference encoder, every delivered
flit, the 2-cycle latency, and runs with random stalls at both ends.

* `tb_noc_codec_top` runs the top at its defaults, 3000 flits per scheme. It
  requires every action of each scheme, headers and stalls to occur, the
  monitors to agree with the reference cost, and the coded links to cost
  less than the uncoded streams.
* `tb_workload_w4` runs the same at `W=4`.

Running one with Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/noc_codec_pkg.sv \
  tb/tb_ref_pkg.sv tb/tb_noc_codec_top.sv --top-module tb_noc_codec_top \
  -Mdir obj -o sim && ./obj/sim
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Each also
has a watchdog that counts a failure if the run hangs.

Coupling cost `T1 + 2*T2` measured by `tb_noc_codec_top` (W=32, 3000 flits
per scheme, random and counting payloads, one flit in eight a header):

| scheme | coded link | same payloads in Gray, uncoded | reduction |
|--------|-----------:|-------------------------:|----------:|
| I   | 41459 | 45959 | 9.8% |
| II  | 42519 | 46824 | 9.2% |
| III | 38920 | 44825 | 13.2% |

(Each scheme runs its own random stream, so compare each row only with
itself.) Savings are larger on narrow links: at `W=4` the three schemes cut
the coupling cost by 28% to 32%.

## Where this design makes its own choices

* **Scheme II decodability guard.** The one-bit signalling of odd and full
  inversion is kept, with a majority-vote decoder; the encoder's `full_ok`
  check, which makes that decoder always right, is this design's addition.
* **Scheme III decoder.** The two code lines say which inversion was done,
  so the decoder reads them directly instead of repeating the TY vote.
* **Scheme III width.** The payload is `W-2` bits so that the two code lines
  fit in the same `W`-line word.
* **Decision criterion.** Only the coupling term is minimised; ties go to
  the simpler action (none, odd, even, full).
* **Previous word at the decoder.** It is the last word as received (still
  coded), since the encoder compared against the coded word on the link.
* **Headers, handshake, reset, link width.** Header flits are sent uncoded
  and marked by a sideband bit. The valid/ready handshake, the synchronous
  reset to an all-zero link and the default `W=32` are also choices made
  here.

Not included: the routers, the packetisation of core transactions in the
NI, and any physical link model. Power is reported as transition counts,
which must be weighted by the capacitances, supply voltage and clock
frequency of a given technology.
