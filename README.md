# Triplicated clock-domain crossings that survive an upset

Triple modular redundancy (TMR) protects FPGA logic against configuration
upsets: three copies of every circuit run side by side and a two-out-of-three
voter masks a single faulty copy. That works inside one clock domain. It breaks
at an asynchronous clock boundary, because the three copies of a signal
arrive over wires of slightly different delay and are sampled by a clock that
has no fixed phase relation to them. Now and then the receiving flip-flops
catch the copies on *different* receiver edges. Without an upset the voter
still sees two good copies that agree. With one copy disabled by an upset, the
two remaining copies may disagree in exactly the cycle the voter needs them,
and a transfer is lost or duplicated.

This RTL implements two crossings that stay correct under that combination,
one for senders that can lengthen their pulses and one for senders that
cannot, and the measurement and test circuits used to characterise them:

| Part | Module | What it does |
|---|---|---|
| Long-pulse crossing | `pulse_stretcher` ×3 → `tmr_long_sync` | sender holds each pulse long enough that all three copies are sampled equal on at least one receiver edge |
| Short-pulse crossing | sender register ×3 → `tmr_short_sync` | a latch per copy catches a short pulse; the receiver stretches it to two cycles so that the three copies always overlap |
| Voter bank | `tmr_voter` ×3 in each crossing | one majority voter per copy, each reading all three copies |
| Output conditioning | `edge_detect` ×3 per crossing | one receiver-cycle pulse per transfer |
| Test fixture | `pulse_generator`, `pulse_counter` | sends a sequence of pulses (default one million) and counts what arrives |
| Sampling-uncertainty measurement | toggling register ×3 → `sync_ff` ×3 → `disagreement_detector` | counts how often the three copies of a fast-changing signal are sampled differently |
| Wire model | `wire_skew_model` | behavioural transport delays of the three wires (simulation only) |

`tmr_cdc_top` instantiates all of them. The three circuits (long crossing,
short crossing, measurement) share only the two clocks and their resets.

## Signal skew and sampling uncertainty

Call the spread between the fastest and slowest of the three wire delays the
skew, `T_skew = delay_max - delay_min`. If a receiver edge falls inside that
window after a data change, some copies are caught on this edge and some on
the next. With a sender clock `f_s`, a receiver clock `f_r` and a signal that
changes `c` times per second, such events happen

    events per second = T_skew * f_r * c

times. The measurement circuit checks this directly. A triplicated register
in the sender domain toggles every `TOGGLE_DIV` sender cycles; the default of 1
is a 50 MHz square wave at 100 MHz, or 10^8 changes per second. Each copy
crosses its own wire, goes through a two-flip-flop synchronizer, and
`disagreement_detector` raises a flag in every receiver cycle in which the
three samples are not all equal and counts those cycles. At 50 MHz receive
and 445 ps skew the count grows by about 2.2 million per second. At the
hand-matched skew of 32 ps it grows by about 160 thousand per second.
`tb_sampling_uncertainty` runs eight such cases. It matches published hardware
measurements at the same settings to within 4 %.

## Long-pulse crossing: make the sender wait

If every pulse lasts at least

    T_pw >= T_rcv + T_skew

then at least one receiver edge finds all three copies already high, even the
latest one. During the cycle after that edge all three synchronized copies
agree. With one copy stuck at 0 or 1, the other two still agree in that cycle,
so every voter sees the pulse. The same applies to the low time between pulses,
so none is merged with the next. Without the `T_skew` term (a pulse of exactly
one receiver period) an upset plus a skewed sample loses the pulse.
`tb_tmr_long_sync` shows this: with one copy stuck at 0 it sees 96 of 100
pulses.

The sender counts time in its own cycles:

    N_LONG = ceil((T_rcv + T_skew) / T_snd)

This is computed by `tmr_cdc_pkg::long_pulse_cycles` from the top's
`T_SND_PS`, `T_RCV_PS` and `T_SKEW_PS`. At the defaults (10 ns, 20 ns,
615 ps) it is 3. `pulse_stretcher` holds a request high for `N_LONG` cycles
and then low for `N_LONG` cycles, so the crossing carries at most one transfer
every `2 * N_LONG` sender cycles. `busy` covers the whole window, and a request
while busy is dropped (an assertion flags it).

The receive side, `tmr_long_sync`, is three `sync_ff` chains (two flip-flops,
for metastability) and three majority voters. A pulse reaches the voter
outputs one receiver edge after the edge that captures it. The voted level
lasts one or more cycles, and `edge_detect` (register plus AND, no added
delay) turns it into a single-cycle pulse.

## Short-pulse crossing: make the receiver stretch

When the sender cannot be changed, its pulse may be shorter than a receiver
period, and sampling alone can miss it. Each copy therefore has its own
`short_pulse_sync`. That is a set/reset latch (`sr_latch`) set directly by the
sender pulse, followed by three receiver flip-flops, FF1 → FF2 → FF3. FF2
clears the latch, and FF3 is the received signal `rcv_sig`. Counting receiver
edges from e1, the first edge that sees the latch set:

```
edge        e1   e2   e3   e4   e5   e6
latch        1   (cleared just after e2)
FF1          1    1    0
FF2 (clear)  0    1    1    0
FF3 rcv_sig  0    0    1    1    0
```

So `rcv_sig` is exactly two receiver cycles wide and arrives two clocks after
the capture edge. Skew means two copies can be captured on e1 and e2. Their
two-cycle signals then still overlap by one cycle, so the voter output lasts:

* no upset: 2 cycles, whether or not the copies were captured together;
* one copy stuck at 1: 2 cycles if the other two were captured together, 3 if
  they were one cycle apart;
* one copy stuck at 0: 2 cycles if captured together, 1 if one cycle apart.

In every case each voter output rises exactly once per transfer.
`tb_tmr_short_sync` checks all of these widths and sees each of them happen.
The unmodified loop, where FF1 clears the latch, gives one-cycle signals.
Copies captured one edge apart then do not overlap at all, and an upset on a
third copy loses the transfer.

The latch brings a protocol that the sender must keep:

1. The pulse must be long enough to set the latch.
2. The pulse must be low again before FF2 clears the latch (set and reset
   together are undefined on a real latch). A pulse of at most one receiver
   period is always safe. `short_pulse_sync` asserts that `snd` and FF2 are
   never high together.
3. The next pulse may only come after the clear has dropped, up to four
   receiver periods after the set. The top spaces short pulses by
   `tmr_cdc_pkg::short_pulse_gap` = ceil(4 * T_rcv / T_snd) + 1 sender cycles,
   9 at the defaults.

`sr_latch` is a real level-sensitive latch (`always_latch`), so expect a latch
warning from synthesis. With both inputs high, its model lets reset win.

## Test fixture and top level

`pulse_generator` (sender domain) emits `NUM_PULSES` single-cycle pulses after
a `start`. It spaces them `2*N_LONG` cycles apart for the long crossing and
`short_pulse_gap` cycles apart for the short one, and reports `sent` and
`done`. The long crossing feeds its pulses to three stretchers. The short
crossing registers them once per copy. After the voters and edge detectors,
`pulse_counter` counts copy A's pulses (`long_rcvd`, `short_rcvd`). All three
voter outputs are brought out as `long_rx_pulse` / `short_rx_pulse`. A run
passes when the received counts equal the sent counts.

Top-level parameters (times in picoseconds):

| Parameter | Default | Meaning |
|---|---|---|
| `T_SND_PS` | 10000 | sender period (100 MHz) |
| `T_RCV_PS` | 20000 | receiver period (50 MHz) |
| `T_SKEW_PS` | 615 | worst wire skew (a routed value for this kind of crossing); sets the long-pulse width and the wire model |
| `NUM_PULSES` | 1000000 | pulses per test sequence |
| `TOGGLE_DIV` | 1 | measurement signal changes every this many sender cycles |

The periods only set the sender-side timing. The actual clocks come in on
`clk_s` and `clk_r`. If the real receiver clock is slower than `T_RCV_PS`
claims, the long crossing's guarantee is void. Both resets are synchronous and
active high, one per domain.

`wire_skew_model` is the one part that is not synthesizable logic: three
`assign #delay` statements. It is instantiated inside the top so that the
simulated design has realistic skew. Synthesis drops the delays and keeps
three wires. For an FPGA build, replace it with plain wires and constrain or
hand-route the three nets instead.

## Simulating

Every file carries `` `timescale 1ns/1ps ``; the package must be read first.
For example, the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_tmr_cdc_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/tmr_cdc_pkg.sv tb/tb_tmr_cdc_top.sv
./obj_dir/Vtb_tmr_cdc_top
```

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
Upsets are emulated with `force` on one copy's synchronizer output, stuck at 0
or 1, so the testbenches need a simulator that supports `force` on
hierarchical variables.

| Testbench | What it shows |
|---|---|
| `tb_tmr_voter`, `tb_sync_ff`, `tb_edge_detect`, `tb_sr_latch`, `tb_pulse_stretcher`, `tb_pulse_generator`, `tb_pulse_counter`, `tb_disagreement_detector`, `tb_wire_skew_model` | each building block against an independent reference |
| `tb_tmr_long_sync` | cycle-exact comparison with a reference model at random phases, 0.615 ns and 3 ns skew, each copy stuck at 0 and at 1; one pulse out per pulse in; the loss when the pulse-width rule is broken |
| `tb_short_pulse_sync` | two-cycle received width, two-clock latency, latch clear gone before the next pulse |
| `tb_tmr_short_sync` | one pulse per transfer on every voter output, widths 1/2/3 as listed above, latency between 2 and 3 receiver periods, with each copy stuck at 0 and at 1 |
| `tb_tmr_cdc_top` | whole design, 400 pulses per sequence, three sequences (no upset, then two different stuck copies per crossing); transfer rate of one per 6 (long) and 9 (short) sender cycles; disagreement rate against the formula |
| `tb_tmr_cdc_top_full` | whole design at its defaults: one million pulses through each crossing with one copy of each stuck for the whole run, about 20 s of run time; the disagreement count over the 90 ms run must be within 10 % of the formula |
| `tb_sampling_uncertainty` | the eight skew / receiver-clock cases described above |

A two-state simulator never goes metastable, so the tests cover sampling
uncertainty and skew, not metastability. The two-flip-flop synchronizers are
there for the latter. With the stated device figures (0.5 ns window,
4.5 ns resolution time) that gives a mean time between failures far beyond
any other failure source.

## How far this follows the published technique

Taken from the published technique:

* the timing rule `T_pw >= T_rcv + T_skew`;
* the sender cycle count `n` and the rate of one transfer per `2n` sender
  cycles;
* the structure of the long-pulse crossing: flip-flop synchronizers per copy
  and a voter bank;
* the latch protocol of the short-pulse crossing, and its voter-output widths
  of 1, 2 and 3 cycles under a stuck copy;
* its latency of two clocks;
* the rate formula for disagreements and the disagreement detector;
* the one-million-pulse test sequence;
* the clock and skew values used as defaults.

Choices made here, where the source gives the function but not the circuit:

* **Inside of the modified short-pulse synchronizer.** Three flip-flops with
  the latch cleared from the second is a reconstruction. It reproduces the
  stated latency and output widths, but the original may be arranged
  differently. Each copy's latch is cleared by that copy's own feedback.
* **Measurement signal rate.** The published rates are consistent with the
  formula only if the "50 MHz" test signal is a 50 MHz square wave, which
  changes 10^8 times per second. That reading is the default.
* **Synchronizers in the measurement circuit.** Two flip-flops per copy, like
  the crossings. One per copy would count the same events.
* **Handshakes and controls**: the request/busy behaviour of the stretcher,
  the pulse spacing, all resets, counter widths (32 bits), counting
  disagreement cycles rather than separate events, and counting received
  pulses on copy A only.
* **Packaging.** The long crossing, the short crossing and the measurement
  circuit sit side by side in one top, where they were characterised one at
  a time.

Not built: the single (unprotected) and naively triplicated synchronizers,
which are only comparison points. Also not built is the configuration-upset
machinery, which is a separate monitor device that rewrites the FPGA bitstream
and has no RTL counterpart here. Its effect is emulated by the stuck-at
forcing in the testbenches.
