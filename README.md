# Flexible scan-in power control for logic BIST

Scan-based logic BIST shifts pseudo-random patterns into the scan chains. A
raw LFSR stream changes value on about half of all shift clocks. Every such
change ripples through the chain, so shift power is far higher than in normal
operation. The resulting IR drop and heating can slow the circuit enough to
cause false test failures. The usual fix is to make the scan-in stream
smoother, so that it toggles less often. Smoothing hard, however, costs fault
coverage.

This design makes the scan-in toggle rate *programmable*. A small filter, the
**pseudo low-pass filter (PLPF)**, sits in front of each scan chain and can
work in two modes:

- n=1: it passes the LFSR bit through (about 50 % toggles);
- n=3: it smooths strongly (about 7 % toggles).

A controller switches the filter between the two modes at set points *within*
each pattern. Part of the chain is therefore loaded with smoothed bits and
part with raw bits. The weighted transition count of the pattern, and with it
the shift power, can thus be set to any level between the two extremes. Only
two numbers need changing to do this.

The RTL is arranged like a 65 nm evaluation chip built around this idea:

- ten copies of a benchmark circuit, with 90 scan chains of 83 or 82
  flip-flops;
- one 22-bit LFSR;
- a phase shifter;
- 90 controllable PLPFs;
- an 11-bit MISR;
- three 51-stage ring oscillators with a frequency counter, which show how
  much the on-die delay suffers at each power level.

## Pseudo low-pass filters

Let T_j be the next LFSR bit for a chain, T_j+1 and T_j+2 the bits the LFSR
will deliver for that chain in the next two shift clocks, and S_j-1, S_j-2
the bits already shifted into the first two scan flip-flops.

**Majority PLPF (`plpf_orig`).** S_j is the majority of 2n-1 bits: n current
and future bits, plus n-1 past bits. The output follows the input only when
several future bits agree, so isolated input changes are filtered out.

**AND/OR PLPF (`plpf_opt`).** The output changes only when the current bit and
all n-1 future bits differ from S_j-1. That gives a cheaper circuit:

    S_j = S_j-1 ? OR(T_j .. T_j+n-1) : AND(T_j .. T_j+n-1)

It reads one past bit instead of n-1. Its toggle rate is the same as the
majority form's: 1/(2^(n+1)-2), i.e. 50 %, 16.67 %, 7.14 % and 3.34 % for
n=1..4.

**Future bits (`psf`).** Future bits cost no extra storage. A Fibonacci LFSR
bit taken as the XOR of a set of stages (a mask) is simply shifted forward in
time by one clock when the mask is transformed. With `m' = (m >> 1) ^ (m[0] ?
POLY : 0)`, the XOR of the stages in m' equals what the XOR of the stages in m
will be one clock later. Each chain gets a base mask of three stages and two
derived masks for T_j+1 and T_j+2. The base masks are spread by a simple
stride rule, so that neighbouring chains do not see shifted copies of one
stream.

## Run-time control of the filter

The dynamic PLPF has a 2-bit control word. A 1 in bit k disables future bit
T_j+k+1:

| word | filter | toggle rate |
|------|--------|-------------|
| `00` | n=3    | 7.14 %      |
| `10` | n=2    | 16.67 %     |
| `11` | n=1    | 50 %        |

Two circuits implement it:

- `dyn_plpf_opt` gates the future bits in front of one n=3 AND/OR PLPF
  (`plpf_opt`). A disabled bit is forced to 1 while S_j-1 = 0 (AND branch)
  and to 0 while S_j-1 = 1 (OR branch), so it can never block a toggle.
  This is the proposed, smaller form.
- `dyn_plpf_orig` builds the n=2 and n=3 majority filters and picks one of
  them, or the raw bit, with a 3:1 mux. This is the form placed on the
  evaluation chip.

The top's `PLPF_STYLE` parameter selects one of the two. The output streams
differ, because the filters' feedback differs. Their steady-state toggle
rates match. At the start of a pattern, the majority form also depends on
the captured value of the second flip-flop (see Verification).

## Switch timing (α, β, γ)

A pattern of length L is split, in order of position along the chain, into
three parts:

- α: the *tail*, the α flip-flops nearest the scan input, shifted last;
- β: the middle part;
- γ: the *head*, nearest the scan output, shifted first.

The head and tail are loaded through the n=3 filter and the middle through
n=1, with L = α + β + γ.

A transition entering at the scan input passes through every flip-flop in
front of it. A change that ends at position i (1-based from the scan input)
has therefore caused i flip-flop toggles. The weighted transition metric of
the scan-in, normalised to the worst case, is

    WTM = ( Σ_{i in α,γ} i · 0.0714 + Σ_{i in β} i · 0.5 ) / Σ_{i=1..L} i

For a target WTM, β is chosen to cover the required weight. α is then chosen
to place the window, which can be centred or pushed to either end.

For the chip (L = 83) the timings are:

| target | α  | β  | γ  |
|--------|----|----|----|
| 7 %    | 83 | 0  | 0  |
| 10 %   | 35 | 12 | 36 |
| 15 %   | 34 | 15 | 34 |
| 20 %   | 29 | 25 | 29 |
| 25 %   | 24 | 35 | 24 |
| 30 %   | 19 | 44 | 20 |
| 50 %   | 0  | 83 | 0  |

**Counter convention.** `scan_shift_counter` counts *down*. Each round starts
with one capture clock, in which `cnt` = L and `se` = 0. L shift clocks follow,
with `cnt` = L-1 … 0. The bit shifted in while the count is c ends the round at
position c (0 = at the scan input). The n=1 window is therefore exactly the
shift clocks with α ≤ cnt < α+β, and a controller needs only two equality
decoders and a toggle flip-flop (`switch_tff`):

- the flip-flop toggles at `cnt == α+β` and at `cnt == α`;
- the two hits are merged with XOR, so β = 0 gives no window at all;
- it is cleared whenever no session runs.

The shift clocks per pattern are L. With one capture clock, a round takes
L+1 clocks.

## The three control approaches

The `approach` input selects the source of the control words:

- `APP_EXTERNAL`: the `ext_ctrl` pins drive every chain.
- `APP_BASIC` (`plpf_ctrl_basic`): one timing (α, β, γ) for all chains and all
  vectors. This is the cheapest option (one toggle flip-flop). Every vector
  puts its raw bits at the same flip-flops.
- `APP_SWAP` (`plpf_ctrl_swap`): two timings, A = (α, β, γ) and its mirror
  B = (γ, β, α). A chain uses A when its 1-based index has the same parity as
  the 1-based vector index, and B otherwise. Neighbouring chains and
  consecutive vectors therefore place their raw window at opposite ends,
  which spreads the random bits over more flip-flops. Half of all chain
  loads use each timing, so the WTM is the mean of the two timings' WTMs.
  Choose α and γ so that this mean, not A alone, meets the target. Cost: two
  toggle flip-flops.
- `APP_MOVING` (`plpf_ctrl_moving`): the window moves by one position per
  vector. α decreases by one per vector and γ grows by one. When α reaches 0,
  it wraps to L-β. Over L-β+1 vectors every flip-flop receives raw bits.
  Cost: one toggle flip-flop and a counter register (`cur_alpha`).

α and β are pins of the top and are sampled continuously. They should be
held stable during a session. For the Moving approach, α is loaded when the
session starts.

## Chip top: `lbist_teg_top`

    start ─► scan_shift_counter ─ cnt, se, vec_odd, last_shift, unload_valid
                   │
    lfsr ─► psf ─► dyn PLPF ×90 ─► scan_in ─► [circuit under test] ─► scan_out ─► misr ─► signature
                        ▲           scan_ff1/scan_ff2 ◄─┘
            ext_ctrl / basic / swap / moving controllers (selected by `approach`)

    ring_osc ×3 ─► ro_sel mux ─► ro_meter ─► ro_count

**Session.**

1. Pulse `start` for one clock while `busy` is low, with `num_patterns` = P.
   The LFSR is reloaded with its seed and the MISR is cleared.
2. P rounds follow, each of one capture clock and L shift clocks. The LFSR
   advances only in shift clocks.
3. The MISR compacts `scan_out` during the shifts of rounds 2..P. Round 1
   only empties the chains of their unknown contents, so P vectors need P+1
   rounds.
4. `done` pulses for one clock after the last shift. `signature` then holds
   the result until the next start.

**Scan interface.**

- `scan_in[c]` feeds the first flip-flop of chain c.
- `scan_ff1[c]` and `scan_ff2[c]` must return that chain's first and second
  flip-flops. They are the filter's past bits; `scan_ff2` is used only by the
  majority style.
- `scan_out[c]` is the chain output.
- `se` is the scan enable.

The benchmark circuit itself is not part of this RTL.

**Ring oscillators.** `ring_osc` is a *behavioural model*, not synthesizable
logic: a 51-stage ring with a fixed stage delay. The three instances run at
about 287.5, 194.8 and 138.0 MHz, matching the chip's NAND2, NAND3 and
OR-NAND4 rings at low shift power. `ro_en[i]` runs ring i.

`ro_meter` counts cycles of the ring chosen by `ro_sel` over `RO_WINDOW` =
2048 system clocks, which is 40.96 µs at 50 MHz:

- `ro_start` opens the gate;
- the gate is synchronised into the ring's clock domain by three flip-flops;
- `ro_done` pulses WINDOW + 4 + 1 clocks after the start, once the count has
  settled.

In silicon, the drop in ring frequency as the programmed WTM rises is the
measure of supply droop during shifting. A behavioural model cannot show
that.

## Departures and choices

- **MISR polynomial.** The chip's 11-bit MISR is specified with the
  polynomial x^9+x^8+1, which cannot close an 11-stage register. The RTL uses
  x^11+x^9+x^8+1. The 90 scan-outs are folded onto 11 stages by index
  modulo 11.
- **Phase-shifter masks** (which three stages each chain uses) are this
  design's own.
- **n=2 control code** `10` is this design's choice. Only `11` (n=1) and `00`
  (n=3) are fixed by the scheme.
- **Decoders.** A hard-wired controller would decode fixed counts. Here α and
  β are run-time inputs compared with the count, so one netlist covers all
  seven chip settings. The decoders are merged with XOR instead of OR, so
  that β = 0 works.
- **Swap rule.** Swap is the general mirror (α, β, γ) ↔ (γ, β, α). This
  covers both the "(L/2-i, i, L/2)" form and arbitrary timings.
- **Moving wrap-around point.** α = 0 → L-β is this design's choice.
- **Approach select.** All three controllers are built and selected at run
  time. A production chip would keep just one.
- **Session protocol.** Reset and seed-reload behaviour, the session protocol
  and the unload of round 1 are this design's choices.
- **Measured WTM.** With the chip's sparse trinomial LFSR seeded with all
  ones, the raw stream toggles less than 50 % for the first few thousand
  clocks: about 37 % in the first 2000 bits, 46–48 % later. The measured WTM
  of a short run therefore sits a few per cent below the formula. The ranking
  of the settings and their linearity are unaffected.

## Files

`rtl/`:

| file | role |
|------|------|
| `lbist_pkg.sv` | control-word codes, approach and style enums, chip constants, polynomials |
| `lfsr.sv` | Fibonacci LFSR (22-bit chip default; 16-bit simulation-study set in the package) |
| `psf.sv` | phase shifter giving T_j, T_j+1, T_j+2 per chain |
| `plpf_orig.sv`, `plpf_opt.sv` | fixed-n majority and AND/OR PLPFs |
| `dyn_plpf_orig.sv`, `dyn_plpf_opt.sv` | controllable PLPFs |
| `scan_shift_counter.sv` | round sequencer and down counter |
| `switch_tff.sv` | two-point window toggle flip-flop |
| `plpf_ctrl_basic.sv`, `plpf_ctrl_swap.sv`, `plpf_ctrl_moving.sv` | the three controllers |
| `misr.sv` | signature register |
| `ring_osc.sv` (model), `ro_meter.sv` | delay monitor |
| `lbist_teg_top.sv` | the chip |

`tb/` holds one self-checking testbench per module, `<module>_tb.sv`, plus:

- `lbist_teg_top_tb.sv`: the whole chip at full size;
- `lbist_teg_top_orig_tb.sv`: the same with the majority PLPF style;
- `wtm_workload_tb.sv` with `wtm_workload_runner.sv`: published switch
  timings for five benchmark circuits, run through the top at each
  circuit's size;
- `b22_scan_model.sv`: a behavioural stand-in for the ten benchmark copies.
  It has 90 chains, 83 or 82 long, with an arbitrary capture function.

## Verification

Each testbench compares the block with a model written independently in the
testbench and prints `TB_RESULT checks=… failures=…`. Highlights:

- **Filters.** These are checked exhaustively for n=2 and n=3. Long random
  runs confirm toggle rates of 49.8 %, 16.6 % and 7.1 %.
- **Phase shifter.** Every chain's T_j+1 and T_j+2 are checked against that
  chain's T_j one and two clocks later. Per-chain ones-balance is checked
  after a warm-up.
- **Controllers.** The window position is checked at every count:
  - Basic: for all chip timings, plus a 4-bit-counter case with (α, β) =
    (3, 10);
  - Swap: for every chain and vector parity;
  - Moving: across a wrap-around.
- **Top, full size, no parameter overrides** (about a minute in Verilator):
  - the scan-in bit of every chain in every shift clock is checked against a
    reference filter fed with that chain's own LFSR stream;
  - the MISR signature is checked against a reference;
  - the measured WTM is checked against the formula: within 12 % relative,
    rising with the target, and correlation > 0.99 over the seven chip
    settings;
  - the three ring-oscillator counts are checked;
  - each mechanism must occur: window switching, swap, move, wrap-around, the
    n=2 code, capture, compaction, and RO measurement.

- **Benchmark switch timings** (`wtm_workload_tb`). Five published
  configurations are run through the top, built with the 16-bit generator
  x^16+x^15+x^13+x^4+1 seeded with 1010…10. Each runs 1500 vectors per
  approach, with chain counts and lengths set to the circuit's:
  - s9234: 3×76;
  - s13207: 7×96;
  - s38417: 9×182;
  - b14: 3×82;
  - b22: 9×92, see below.

  Basic, Swap and Moving all reach the circuit's target WTM within
  0.4 points (the check allows 0.75). For b22, the published timings
  (39, 13, 40) and (46, 13, 33) add up to 92, not to its 82-long chains.
  They reach the 13.12 % target only at L = 92 (at L = 82 they give about
  14.7 %), so b22 is simulated at that length.

  The fixed n=2 and n=3 filters are also run alone and measure 16.8 % and
  7.2 %. s9234 is run again with the majority filters:
  - they read two captured past bits at the start of each pattern, so they
    toggle more at the heavily weighted head;
  - they measure about one point higher (8.2 % for n=3);
  - with the first three shifts left out, they agree with the AND/OR form.

  In silicon, how large this effect is depends on how the captured values
  of the first two flip-flops correlate.

## Simulating

Any testbench builds with plain Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
        -y rtl -y tb +libext+.sv -Irtl rtl/lbist_pkg.sv tb/lbist_teg_top_tb.sv
    ./obj_dir/Vlbist_teg_top_tb

To build a different size, set the top's parameters:

- `N_CHAINS` and `L` for another circuit under test; the counter and the α/β
  pins resize with `L`;
- `LFSR_W`, `LFSR_POLY` and `LFSR_SEED` for another generator, e.g. the
  16-bit `SIM_LFSR_*` set in the package;
- `PLPF_STYLE` for the filter circuit;
- `RO_WINDOW` for the measurement time.

`ring_osc` relies on delays and is for simulation only. A synthesis flow
should leave it out, or replace it with the real rings.
