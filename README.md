# Ring-oscillator PUF with ratio counting

A physical unclonable function (PUF) turns the random manufacturing variation of
a chip into a repeatable bit string that differs from chip to chip, so a key or
an identity never has to be stored in non-volatile memory. This design gets its
randomness from ring oscillators on an FPGA. It does not compare two ring
frequencies to get one bit per pair. It measures the **ratio** of the two
frequencies as a 16-bit number and uses several middle bits of that number. That
gives more than one bit per ring pair, and it needs no reference clock.

This repository holds SystemVerilog RTL for the complete PUF. It includes
behavioural models of the rings, so the whole design can be simulated, and
testbenches that check every block and the whole design. The architecture
follows a published ring-oscillator PUF proposal for Xilinx Spartan-3E devices.
Where that proposal leaves details open, the choices made here are listed in
[Departures and choices](#departures-and-choices).

## Block diagram

```
             sel0 ──┐                                  ┌──────── measure_core ─────────┐
 ro_bank set 0 ──► ro_mux ── f0 ──► ro_counter 0 ─ q ─┤res0                           │
 (N rings)                          │  of ──► rs_flipflop 0 ── s0 ─┐                   │
                                    └ ce ◄── running = enable & s0 & s1                │
 ro_bank set 1 ──► ro_mux ── f1 ──► ro_counter 1 ─ q ─┤res1        │    result = s0 ? res0 : res1
 (N rings)  sel1 ──┘                │  of ──► rs_flipflop 1 ── s1 ─┘                   │
                                    └ ce ◄── running                                    │
                                                       └────────────────┬──────────────┘
                                                                        │ done, result
   ropuf_ctrl (clk domain): challenge, ring enable, clear, enable ◄─────┘ (synchronised)
        │ res_value
        ├──► gray_select (Gray code, positions POS_FIRST..POS_LAST) ──► res_bits
        └──► response_reg (N x WB bits) ──► response
```

The top level is `ropuf_top`. Shared constants, the controller state type and the
Gray-code function are in `ropuf_pkg`.

## The measurement: two counters in a race

This is the part of the design that is easiest to get wrong, so it gets the most
space here.

A challenge `(sel0, sel1)` selects ring `sel0` from set 0 and ring `sel1` from
set 1. Each selected ring drives the **clock** input of its own 16-bit counter
(`ro_counter`). There is no common clock. Both counters start from zero, and they
count while `running` is high:

```
running = enable & s0 & s1
```

`s0` and `s1` are the inverted outputs of two set-reset flip-flops
(`rs_flipflop`). A counter's overflow flag `of` sets its flip-flop. The flag is
high while the count is all ones. Once either flip-flop is set, `running` falls
and both counters stop. The counter of the faster ring has then counted
2^16 − 1 edges and holds `0xFFFF`. In the same time the slower counter has
counted

```
result ≈ (f_slow / f_fast) · 2^16          (more exactly 65535 · T_fast / T_slow)
```

The result multiplexer outputs the counter that did **not** overflow: `res1`
when `s0` is low, `res0` otherwise. For example, if counter 1 stops at `0xFFFF`
and counter 0 holds `0xEB12`, the result is `0xEB12`.

Things to keep in mind:

* **Why the flip-flops.** The overflow flag belongs to one ring's clock domain.
  It must stop the other counter, and it must stay asserted even though no
  further clock edge will come. A level-sensitive set-reset latch does both
  without a clock. `rs_flipflop` is therefore written as a latch on purpose.
* **Offset.** `enable` rises and `running` falls at times unrelated to the two
  ring phases. The first and last count of each counter can therefore move by
  one. In hardware, unequal routing of the stop path adds a small constant offset
  as well. The testbenches accept the result within ±1 of the ideal ratio.
* **Clock-domain crossing.** `done = ~(s0 & s1)` is asynchronous. `ropuf_ctrl`
  brings it into the system clock domain through a two-flop synchroniser
  (`sync2`). It reads `result` only after that, when both counters have stopped
  and the value no longer changes. `clr` (asynchronous clear of both counters
  and reset of both flip-flops) and `enable` come from the system clock domain.
  The challenge changes only while `clr` is held. Multiplexer glitches then
  cannot be counted.
* **Duration.** One measurement lasts 65535 periods of the faster ring. At the
  modelled 100 MHz rings that is about 655 µs. The sequencer adds about
  `SETTLE_CYCLES + 5` system clock cycles.

## From a count to response bits

The bits near the MSB of `result` are stable, but they are the same on every
chip, because all ratios are close to 1. The bits near the LSB change from one
measurement to the next. The chip-specific and repeatable information is in the
middle. Bits are named by **position**: position 1 is the MSB and position 16 is
the LSB, so position `p` is bit `16 − p`. The default selection is positions 7–8
(bits 9..8). The testbench `tb_ropuf_eval` also evaluates positions 6–8, 7–9,
7–10 and 8–9.

Before the bits are selected, the value is converted to reflected Gray code,
`g = b ^ (b >> 1)`. Take a count that sits right at a carry boundary, for
example `...0111_1111` against `...1000_0000`. In plain binary, one count of
difference would flip the whole selected block. In Gray code it flips exactly
one bit of the whole word. `gray_select` forms only the selected window:
bit `i` is `b[i] ^ b[i+1]`, and the MSB is kept as it is.

`ropuf_ctrl` can sweep over pairs `(k, k)` for k = 0..N−1. In that case
`response_reg` stores pair `k`'s bits at `response[k*WB +: WB]`. With the
defaults (150 pairs, 2 bits per pair), the response has 300 bits.

## Sequencing (`ropuf_ctrl`)

The controller runs on the system clock `clk`. Reset is asynchronous and active
low.

| state   | what happens |
|---------|--------------|
| IDLE    | Waits for `start_single` (measure the challenge on `sel0`/`sel1`) or `start_sweep` (measure pairs 0..N−1 and clear the response). Enables both ring sets. |
| SETTLE  | Applies the challenge to the multiplexers. Holds the core in clear with `enable` low for `SETTLE_CYCLES` cycles. |
| RUN     | Releases the clear and raises `enable`. Waits for the synchronised `done`. Aborts with `timeout` after `TIMEOUT_CYCLES` cycles. |
| CAPTURE | Latches the frozen `result`. |
| NEXT    | Pulses `res_valid` with `res_idx`, `result`, `res_bits` and `ovf` (which counter overflowed). In a sweep it also writes the response register and moves to the next pair. Otherwise it pulses `resp_done` (sweep only), disables the rings and returns to IDLE. |

Start pulses are ignored while `busy` is high. `timeout` stays high until the next
start.

## Ring oscillators and their models

Each ring is one NAND gate and four inverters in a loop. The NAND's second input
is the enable. Both sets share a single enable, and all rings run during every
measurement. A ring is a combinational loop, which a cycle-based simulator
cannot run. `ring_oscillator` is therefore a **behavioural model**: it toggles
its output after the sum of the five stage delays. `ro_bank` builds one set of N
such models. Each ring gets the stage delays `NOMINAL_PS + offset`, with
`offset` in `[−SPREAD_PS, +SPREAD_PS]` drawn from an integer hash of
`(SEED, ring, stage)`. Two banks with different seeds behave like the same
layout on two different chips. `ropuf_top` derives the two seeds from
`CHIP_SEED`. `JITTER_PS` adds a uniform random error of ±`JITTER_PS` to every
half period, to stand for ring instability.

Neither model is synthesizable. On an FPGA, replace `ring_oscillator` with a
structural ring of LUT primitives, marked so that synthesis keeps it and placed
by hand. The proposal's measurements favour rings placed so that all of them are
**mutually symmetric**. Frequencies then drift together with voltage and
temperature, and the ratio, which is what the PUF uses, stays stable. Everything
apart from the two `ro_bank` instances is synthesizable RTL.

## Parameters

| parameter (top) | default | meaning |
|---|---|---|
| `N` | 150 | ring pairs (rings per set) |
| `W` | 16 | counter width (`ropuf_pkg::CNT_W`) |
| `POS_FIRST`, `POS_LAST` | 7, 8 | selected positions, 1 = MSB |
| `GRAY_WINDOW` | 0 | 0: Gray code of the whole count; 1: of the selected bits only |
| `SETTLE_CYCLES` | 8 | clear/settle time before each measurement (at least 3) |
| `TIMEOUT_CYCLES` | 2^20 | abort limit for one measurement |
| `CHIP_SEED`, `NOMINAL_PS`, `SPREAD_PS`, `JITTER_PS` | 1, 1000, 20, 0 | ring models only |

The default ring models run at about 100 MHz, with a spread of about ±1 % between
rings.

## Departures and choices

The original proposal fixes the following: the ring structure, the two ring
sets, the challenge multiplexers, the two 16-bit counters, the two RS flip-flops
that stop them, the result multiplexer, the Gray code, the position numbering
and the 150-pair size of the evaluation. The following are choices of this
design:

* **Rings per set.** The evaluation uses 150 ring pairs. Here that means 150
  rings per set, and the sweep uses pairs `(k, k)`. The challenge multiplexers
  still accept any `(sel0, sel1)`.
* **Overflow flag.** `of` is a terminal-count flag (count = `0xFFFF`), so the
  stopped counter reads `0xFFFF` instead of wrapping to 0.
* **Clear.** The counter clear is asynchronous. The flip-flop reset input is
  driven by the measurement clear. When set and reset are both high, set wins.
* **Gray code before selection.** By default the Gray code is applied to the
  whole count, and the positions are taken afterwards. The proposal also
  describes converting only the selected part. `GRAY_WINDOW = 1` selects that
  reading. The two differ only in the first selected bit, which stays plain
  binary in the window-only form.
* **Controller.** The controller, its settle time and timeout, the
  synchroniser, the sweep order and the response packing are this design's own.
  The proposal does not describe how the results leave the chip. Here
  the per-pair `result` and the full `response` are top-level ports.
* **Models.** The models do not include supply voltage, temperature or placement
  symmetry. These are the conditions the proposal studies on real boards. The
  simulation shows the mechanism, not those measurements.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_ropuf_top \
          rtl/ropuf_pkg.sv tb/tb_ropuf_top.sv -o sim && obj_dir/sim
```

The tools find the other modules by file name through `-Irtl`. Put the package
first.

| testbench | what it checks | run time |
|---|---|---|
| `tb_ring_oscillator`, `tb_ro_bank` | ring periods, enable, jitter bounds, per-seed variation | < 1 s |
| `tb_ro_mux`, `tb_ro_counter`, `tb_rs_flipflop`, `tb_response_reg` | the leaf blocks against reference models | < 1 s |
| `tb_gray_select` | all 65536 values for every evaluated position range; one Gray bit per step | < 1 s |
| `tb_measure_core` | result within ±1 of `65535·T_fast/T_slow`, which counter stopped, stop is final, duration of 65535 fast periods | < 1 s |
| `tb_ropuf_ctrl` | sequencing against a model of the core: settle, single, sweep of 5 pairs, timeout, cycle count | < 1 s |
| `tb_ropuf_top` | two chips and a short-timeout instance, 6 pairs each: every result against the ring periods, Gray bits, responses, reproducibility, chips differ; counts single, sweep, both overflow directions, response complete and timeout | ~13 s |
| `tb_ropuf_full` | the top at its default size (300 rings running): three single challenges, including pair 149 and a crossed pair | ~30 s |
| `tb_ropuf_eval` | 3 chips × 10 pairs × 3 sweeps with 100 ps jitter: HD_intra (first-sweep and majority reference) and HD_inter for each position range | ~95 s |

A full 150-pair sweep at the default size takes about 20 minutes of simulation,
because every ring model runs during every measurement. The largest sweep
simulated is 10 pairs per chip. At the default size, single challenges were
simulated.

A typical `tb_ropuf_eval` output follows. The Hamming distances are
percentages of the response bits. HD_intra is measured against the first sweep
of each chip and, in brackets, against the bitwise majority of its sweeps. The
low positions depend on the random jitter and vary from run to run.

```
positions 6-8   w=3  HD_intra  0.00 % (vs majority  0.00 %)  HD_inter 31.11 %
positions 7-8   w=2  HD_intra  0.00 % (vs majority  0.00 %)  HD_inter 43.33 %
positions 7-9   w=3  HD_intra  0.00 % (vs majority  0.00 %)  HD_inter 46.67 %
positions 7-10  w=4  HD_intra  0.42 % (vs majority  0.28 %)  HD_inter 46.67 %
positions 8-9   w=2  HD_intra  0.00 % (vs majority  0.00 %)  HD_inter 50.00 %
positions 13-16 w=4  HD_intra 39.17 % (vs majority 20.00 %)  HD_inter 60.00 %
```

The pattern is the one the design relies on. Positions closer to the MSB give
lower inter-chip distance. Positions closer to the LSB are noisy. The middle
positions are both stable and chip-specific. The absolute numbers come from the
ring model and say nothing about real silicon.
