# Low-power multiple-output LFSRs: in-place Katti and Lowy schedules

A linear feedback shift register for a polynomial 1 + x^k1 + ... + x^N
normally shifts all N flip-flops on every clock to produce one bit. Because
the nearest feedback tap is k1 positions away, the next k1 bits of the
sequence depend only on bits that already exist, so k1 bits can be produced
at once. The two generators here exploit that and, in addition, never shift:
each new bit is XORed from flip-flops selected by a switch network and written
back *in place* over the oldest bit, so only a few flip-flops are loaded per
clock. That is where the power saving of these architectures comes from.

Two schedules are implemented, both in their race-free ("improved") form:

* **Katti-style** (`rtl/katti_mo_lfsr.sv`): a round of N new bits is split
  into ceil(N/k1) groups of k1 bits. Each flip-flop is written exactly once
  per round. The last group may be short, so some output lanes are then idle.
* **Lowy-style** (`rtl/lowy_mo_lfsr.sv`): every XOR phase delivers k1 valid
  bits, the window simply running on into the next round. The switch map only
  repeats after N XOR phases, every flip-flop is written from several phases,
  and the switch network is correspondingly larger.

`rtl/mo_lfsr_top.sv` places both side by side for the same polynomial; the
default is 1 + x^2 + x^5 (N = 5, k1 = 2). Both generators produce the same
bit sequence from the same seed, only at a different rate and with a
different amount of logic.

## The sequence and where it lives

Both generators produce the sequence

    s[t+N] = s[t] ^ XOR over the inner taps k of s[t+N-k]

with the seed as s[0..N-1]. Flip-flops are numbered 1..N. Value s[m] is
held in flip-flop N - (m mod N): after seeding, flip-flop N holds s[0] and
flip-flop 1 holds s[N-1]. Computing s[m+N] needs s[m] (in the flip-flop about
to be overwritten) and s[m+N-k] for each inner tap, so the XOR pair written
"(5, 2)" below means flip-flop 5 XOR flip-flop 2.

For 1 + x^2 + x^5 the recurrence is s[t+5] = s[t] ^ s[t+3], a maximal-length
sequence of period 31; the benches check that 31 consecutive 5-bit windows are
all distinct.

## Control signals: XOR phase, then trigger phase

The original forms of both schedules use one control signal per step both to
clock the destination flip-flops and to close the switches of the next XOR
operation. In a real circuit that races: the flip-flop is being updated while
the same signal is already routing its output into the next XOR. The fix is
to give every step two control signals, one that routes the operands into the
XOR gates and one that triggers the destination flip-flops, the two
overlapping so the XOR result is still present when the flip-flops capture
it. That doubles the number of control signals (2*ceil(N/k1) for Katti,
2*N for Lowy) but not the work per step.

In this RTL every control signal T1..T(2P) is one period of a single system
clock, generated by a one-hot ring counter (`rtl/phase_ring.sv`, bit 0 =
T1). Even signals T2, T4, ... are XOR phases: the switch network selects the
operands and the results are on `out`. Odd signals are trigger phases: the
destination flip-flops took the results on the clock edge that started the
trigger signal, i.e. at the end of the XOR phase while the selection is still
applied. That is the single-clock equivalent of the overlap, and it is why no
output is valid during trigger phases. All flip-flops share one clock; a
group's flip-flops are enabled by its XOR-phase signal.

### Katti schedule for 1 + x^2 + x^5 (6 control signals)

| signal | tap A | tap B | flip-flops written |
|--------|-------|-------|--------------------|
| T1 |        |        | A -> 1 (from T6) |
| T2 | (5, 2) | (4, 1) | |
| T3 |        |        | A -> 5, B -> 4 |
| T4 | (5, 3) | (4, 2) | |
| T5 |        |        | A -> 3, B -> 2 |
| T6 | (3, 1) | idle   | |

Five bits per six clocks. Tap B is not valid at T6; `out_valid[1]` is low
then and the lane drives 0.

### Lowy schedule for 1 + x^2 + x^5 (10 control signals)

| signal | tap A | tap B | flip-flops written |
|--------|-------|-------|--------------------|
| T1  |        |        | A -> 2, B -> 1 (from T10) |
| T2  | (5, 2) | (4, 1) | |
| T3  |        |        | A -> 5, B -> 4 |
| T4  | (5, 3) | (4, 2) | |
| T5  |        |        | A -> 3, B -> 2 |
| T6  | (3, 1) | (5, 2) | |
| T7  |        |        | A -> 1, B -> 5 |
| T8  | (4, 1) | (5, 3) | |
| T9  |        |        | A -> 4, B -> 3 |
| T10 | (4, 2) | (3, 1) | |

Two bits every two clocks on both taps. Note how (5, 2) appears at T2 and T6
with different destinations: this is the duplicated switching that makes the
Lowy form larger.

### Any polynomial

Both modules derive their switch maps at elaboration time from the
polynomial parameter. For Katti, group g (XOR phase T(2g+2)) produces lanes
j = 0..k1-1 with m = g*k1 + j < N. For Lowy, XOR phase c (T(2c+2)) produces
m = c*k1 + j for all lanes, and the map repeats after N/gcd(N,k1) phases
(N for every polynomial listed below). Lane j of phase m reads flip-flop
N - (m mod N) and, for each inner tap k, flip-flop N - ((m+N-k) mod N), and
writes flip-flop N - (m mod N).

## Interface

`mo_lfsr_top` (and each generator, without the prefixes):

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | system clock, one control signal per period |
| `rst_n` | in | 1 | asynchronous active-low reset: flip-flops to `SEED`, control signals to T1 |
| `load` | in | 1 | synchronous: flip-flops take `seed`, control signals restart at T1 |
| `seed` | in | N | bit i goes to flip-flop i (bit N is s[0]) |
| `katti_out`, `lowy_out` | out | k1 | taps; lane 0 = A, lane 1 = B, ... |
| `katti_valid`, `lowy_valid` | out | k1 | lane carries a new bit this clock |
| `katti_t`, `lowy_t` | out | 2*ceil(N/k1), 2*N | control signals, one-hot, bit 0 = T1 |
| `katti_state`, `lowy_state` | out | N | the flip-flops, bit i = flip-flop i |

Reading the valid lanes of one generator in lane order, clock after clock,
gives s[N], s[N+1], s[N+2], ... . After `load`, the first clock is T1 (no
output), and the first bits appear at T2.

Parameters: `POLY` (type `mo_lfsr_pkg::poly_t`, 64 bits, bit e set for each
term x^e; default `64'h25` = 1 + x^2 + x^5; N may be up to 63) and `SEED`
(reset value, default all ones). Everything else (N, k1, number of control
signals, port widths) is derived in `rtl/mo_lfsr_pkg.sv`.

## Polynomials and cost

The architectures were evaluated on these polynomials; the last four are the
LFSRs of the Bluetooth E0 keystream generator. Each is a separate build with
`POLY` set accordingly, and all seven are simulated by `tb/tb_table5_polys.sv`.

| polynomial | N | k1 | Katti signals | Katti bits / clock | Lowy signals | Lowy bits / clock |
|------------|---|----|---------------|--------------------|--------------|-------------------|
| 1+x^2+x^5 | 5 | 2 | 6 | 5/6 | 10 | 1 |
| 1+x^3+x^16 | 16 | 3 | 12 | 16/12 | 32 | 3/2 |
| 1+x^14+x^15 | 15 | 14 | 4 | 15/4 | 30 | 7 |
| 1+x^8+x^12+x^20+x^25 | 25 | 8 | 8 | 25/8 | 50 | 4 |
| 1+x^12+x^16+x^24+x^31 | 31 | 12 | 6 | 31/6 | 62 | 6 |
| 1+x^4+x^24+x^28+x^33 | 33 | 4 | 18 | 33/18 | 66 | 2 |
| 1+x^4+x^28+x^36+x^39 | 39 | 4 | 20 | 39/20 | 78 | 2 |

Reported results for a 0.13 um standard-cell implementation of the two
improved forms: the Katti form drew 3.5 to 6 times less total power than the
Lowy form on the E0 polynomials (a 72-84 % saving) and 46 % less on the 5-bit
example; for 1 + x^2 + x^5 the Katti form took 126 gates and the Lowy form
191. Those numbers depend on that cell library and are not reproduced by this
RTL; the Lowy form's extra cost shows here too, as a larger switch network
and a longer control ring.

## Where this RTL is its own

* **One clock, enables instead of control-signal clocks.** The original
  circuits clock each flip-flop directly from control signals and rely on
  overlapping pulses. Here a single clock and one-hot enables give the same
  order of events without races. Rates are therefore stated in system clocks
  (one per control signal); the source counts "clock cycles" differently
  (3.5 for a Katti round and 5.5 for a Lowy period of the example).
* **Which signals do what.** XOR phases are the even signals and trigger
  phases the odd ones, as in the published schedules and figures; one prose
  statement of the scheme has it the other way round.
* **Switches become multiplexers** (AND-OR over one-hot selects). The
  transmission-gate circuits of the example need 7 operand switches (Katti)
  and 22 (Lowy); the multiplexers here are not a switch-for-switch copy, but
  the Lowy map is larger in the same way.
* **Control generator** is a one-hot ring counter; its form is not given.
* **Valid flags** per lane mark the idle Katti lanes, which otherwise would
  need extra logic outside the generator; idle lanes drive 0.
* **Seed load and reset** (synchronous `load`, asynchronous reset to
  `SEED`) are not specified by the source.
* **Lowy period** is N/gcd(N,k1) rather than N, which only differs for
  polynomials with gcd(N,k1) > 1 (none of those listed).
* Not included: the serial shift-register LFSR and the original, racing
  schedules, which are only the baselines; pads and power grid of the
  physical layout.

## Files

| file | contents |
|------|----------|
| `rtl/mo_lfsr_pkg.sv` | `poly_t`, polynomial helpers, flip-flop map |
| `rtl/phase_ring.sv` | one-hot control-signal generator |
| `rtl/katti_mo_lfsr.sv` | Katti-style generator |
| `rtl/lowy_mo_lfsr.sv` | Lowy-style generator |
| `rtl/mo_lfsr_top.sv` | both generators side by side |
| `tb/lfsr_stream_ref.sv` | reference model: recomputes every valid bit from the seed |
| `tb/tb_*.sv` | self-checking benches, one per module, plus `tb_table5_polys` |

## Verification

Every bench prints `TB_RESULT checks=<n> failures=<m>` and has a watchdog.

* `tb_katti_mo_lfsr`, `tb_lowy_mo_lfsr`: for 1 + x^2 + x^5, every clock is
  checked against the schedule tables above (XOR pairs, flip-flops written,
  no other flip-flop changing, valid flags); the stream must have period 31
  with 31 distinct windows; a second instance with 1 + x^3 + x^16 is checked
  bit by bit; bit counts per clock are checked; a seed is reloaded mid-round.
* `tb_phase_ring`: reset, stepping, wrap-around, restart.
* `tb_mo_lfsr_top`: both generators at default parameters, checked against the
  reference and against each other, with a mid-round reload and an
  asynchronous reset mid-run; it counts each mechanism (load, reset, XOR
  phases, flip-flop updates, idle Katti lane, Katti round and Lowy period
  wrap-around) and fails if one never occurs.
* `tb_table5_polys`: all seven polynomials, both generators, 2000 clocks
  each; control-signal counts, bit counts and every bit are checked.
* `tb_mo_lfsr_pkg`: the helper functions against hand-worked values.

To run one with plain Verilator from the project root:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
        rtl/mo_lfsr_pkg.sv tb/tb_mo_lfsr_top.sv --top-module tb_mo_lfsr_top
    ./obj_dir/Vtb_mo_lfsr_top

Change the polynomial with `-GPOLY=...` on a generator or top, or by
setting `POLY` on the instance; port widths follow automatically.
