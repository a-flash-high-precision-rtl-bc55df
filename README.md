# Flash FPGA time-to-digital converter: coarse counter, four-phase interpolator, carry-chain fine lines

This design measures the time between a START edge and a STOP edge to about
one carry-multiplexer delay. It works at any distance between the two edges, up to
several seconds. Three interpolation stages split the job, in the manner of the
classic Nutt method:

1. **Coarse.** A 32-bit binary counter runs freely on a 550 MHz clock (period
   T = 1.818 ns). Each hit samples it.
2. **Phase.** A clock manager supplies four copies of the clock, shifted by 0°, 90°,
   180° and 270°. From them a small state machine finds the quarter of the clock
   period in which each hit arrived. This gives a 454.5 ps bin.
3. **Fine.** Inside that quarter, a tapped carry-chain delay line measures how long
   before the next quarter edge the hit arrived. The unit is τ, the delay of one carry
   multiplexer.

Each line only has to span a quarter period, so the design uses four short lines, one
per clock phase, instead of one long line. Short lines stay inside a small block of
logic, which keeps the clock skew between neighbouring taps low. The design is
synchronous apart from the hit-clocked capture registers and the lines themselves.
Its dead time is about one clock period: a new START may follow the previous STOP
one period later (see "Timing and usage rules").

## What the converter delivers

For every START/STOP pair it gives three numbers and a one-cycle `valid` pulse:

| output | width | meaning |
|---|---|---|
| `nc` | 34 | interval in quarter periods: `{STOP count − START count, sel1 − sel0}` |
| `na` | 6 | START fine code: taps passed between START and the next quarter edge |
| `nb` | 6 | STOP fine code: the same for STOP |

The reader of these numbers works out the interval:

    T_stop − T_start = nc · T/4 + (na − nb) · τ

The error of this formula is below one τ. Here is why. Let `e_a` be the first quarter
edge after START and `e_b` the first after STOP. Then `e_b − e_a` is exactly `nc · T/4`.
Also, START lies between `na·τ` and `(na+1)·τ` before `e_a`, and STOP lies the same way
before `e_b`. The design does not combine the three numbers itself. Adding a
bin-by-bin calibration of τ would be the natural next step; see "Limits".

## The four-phase state counter (the subtle part)

`state_counter` is five flip-flops. The first toggles on every clk0 edge; its output is
`lsb`. `lsb` then runs down a chain of four flip-flops:

```
 lsb --[clk0]--> Ph[3] --[clk270]--> Ph[2] --[clk180]--> Ph[1] --[clk90]--> Ph[0]
```

Each flop takes its input three quarters of a period after that input changed. So
exactly one bit of `Ph[3:0]` changes at every quarter edge. The code runs through
eight values every two clock periods. Quarter q covers q·90° to (q+1)·90° after the
rising edge of clk0:

| quarter (`sel`) | 0 | 1 | 2 | 3 |
|---|---|---|---|---|
| even period | 0101 | 0100 | 0110 | 0010 |
| odd period  | 1010 | 1011 | 1001 | 1101 |

The odd-period codes are the bitwise complements of the even ones. `phase_encoder`
therefore inverts the code when `Ph[3]` is set and looks up one four-entry table. The
other eight codes can only appear in the first four periods after reset.
`phase_encoder` flags them, and an assertion in `phase_fsm` checks that no hit
captures one once the counter has settled. Successive codes differ by one bit, so a
hit that lands right on a quarter edge gives one of the two neighbouring quarters,
never a code far away. The testbench of `state_counter` checks the table, the
single-bit steps and the period parity.

`phase_register` samples `Ph` on the rising edge of the hit, using the hit as its
clock. `phase_encoder` turns the sample into `sel`. A 2-bit `subtractor` gives
`nc[1:0] = sel1 − sel0`.

## Fine interpolation

`fine_tdc` has four lines. All four receive the same hit. Line j is sampled by clock
phase j·90°. When the hit falls in quarter q, the first phase edge after it belongs to
line (q+1) mod 4. `sel` therefore selects that line. Its sample is a thermometer code:
taps 0 to n are high, where n·τ is less than the time from the hit to the edge. The
priority encoder `thermo_encoder` returns the index of the highest set tap. Because it
looks only at the highest one, a bubble below the front does not change the result.

- `carry_chain_delay_line` models one line. It has 64 carry multiplexers with their
  select inputs tied high, each adding τ. Tap 0 is the undelayed hit, which the first
  flip-flop also samples.
- `tap_register` is the row of 64 flip-flops on one line. It samples at every edge of
  its clock, but keeps only the sample from the first edge after the hit, detected as
  "tap 0 high now, low at the previous edge". It holds that sample until the next hit.
  So the slower result of the selected line is still there when the clk0 domain reads
  it.

With τ = 10 ps the 64 taps span 640 ps. That covers a quarter period (454.5 ps), so
`na` and `nb` stay at or below 45 and never saturate.

## Coarse stage and the borrow

`time_register` samples the counter on the rising edge of the hit. This is the count
of the clk0 period in which the hit fell. It also flips a flag, which a two-flop
synchroniser turns into a one-cycle `seen` pulse in the clk0 domain. `coarse_tdc`
subtracts the two samples with a 32-bit `subtractor`. The subtraction is modular, so
counter wrap does not matter.

The phase subtraction and the coarse subtraction are chained through a borrow. When
STOP falls in an earlier quarter than START (`sel1 < sel0`), the 2-bit difference wraps
around. The coarse difference must then lose one count. Without the borrow, `nc` would
be four quarters too large in those cases. With it, `nc` is the true 34-bit
difference `(4·C_stop + sel1) − (4·C_start + sel0)`.

## Timing and usage rules

- Clocks: `clk0`, `clk90`, `clk180` and `clk270` come from the FPGA's clock manager
  (outside this RTL). `rst_n` is an asynchronous, active-low power-up reset. The
  counter is not cleared between measurements.
- A hit must stay high for more than one clock period. It must then be low for at
  least one period before the next hit on the same input. Hits on one input must be
  at least 3 periods apart. STOP may rise while START is still high.
- A hit must not coincide with a clk0 edge. The counter is binary, and the
  hit-clocked register could catch it mid-change. The testbenches keep hits at least
  1 ps from clock edges. Hardware would need a Gray-coded counter, or a cross-check
  against the parity that the state-counter code carries.
- `valid` rises 2 to 4 clk0 periods after STOP. A new START may rise one clock period
  after STOP, before that `valid`. This works because everything about a START (its
  count, quarter and fine code) is copied into clk0 registers when the START is
  synchronised: `held` in `time_register`, `sel0_held` in `phase_fsm` and `na_held`
  in `tdc_top`. The STOP result is read from its own hit-clocked registers. Those
  cannot change before `valid`, because the next STOP is at least 3 periods away.
  If START and STOP are synchronised in the same clk0 cycle, the START values are
  taken directly from the hit-clocked registers.
- A STOP with no START before it is ignored.

## Module map

```
tdc_top                      output register, valid, START-before-STOP tracking
├── coarse_tdc
│   ├── coarse_counter       32-bit free-running counter on clk0
│   ├── time_register  x2    START / STOP register (hit-clocked) + clk0 synchroniser
│   ├── subtractor (32)      Nc[33:2], with borrow in
│   └── phase_fsm
│       ├── state_counter    four-phase Ph[3:0] code
│       ├── phase_register x2
│       ├── phase_encoder  x2
│       └── subtractor (2)   Nc[1:0], borrow out
├── fine_tdc (START: na)
│   ├── carry_chain_delay_line x4   behavioural model
│   ├── tap_register           x4   one per clock phase
│   └── thermo_encoder
└── fine_tdc (STOP: nb)     same
```

`tdc_pkg` holds the shared sizes: `COARSE_W = 32`, `TAPS = 64`, `FINE_W = 6` and
`TAU_PS = 10.0`.

## Where this RTL departs from, or adds to, the published design

- **Delay lines are behavioural.** The delay of a carry multiplexer belongs to the
  silicon. `carry_chain_delay_line` uses `#` delays, with a transport delay per stage.
  For an FPGA build, replace it with a column of the vendor's 4-bit carry primitives,
  with CIN as the hit and the taps taken from the carry outputs. τ is not published:
  10 ps is an assumed value.
- **Tap count.** Each line has 64 taps and a 6-bit code. The source also says each line
  uses 8 slices. At four carry multiplexers per slice that would be only 32 taps; 64
  was kept.
- **Borrow chaining** between the phase and coarse subtractors is an addition (see
  above).
- **Register clocks.** Clocking the capture registers by the hit, the clk0 synchroniser,
  the `valid` pulse and the hold rule in `tap_register` are this design's own choices.
  The block diagrams show clock inputs on the phase registers but do not say how they
  are used. Here the phase registers use only the hit.
- **Line selection.** The rule that `sel = q` selects the line clocked by the next phase
  is this design's reading.
- **The state-counter code table** is derived from the flip-flop chain; it is not
  printed in the source.
- **Dead time.** The published dead time is about one clock period. Here a START may
  follow STOP by one period. Reaching that needs the clk0 copies of the START values
  described above; they are this design's own. The design is single-hit: one START,
  then one STOP.
- **Not included:** the clock manager, the oscillators, the test board and its VME
  read-out, and any calibration or non-linearity correction.

## Simulating

All files use `` `timescale 1ps/1fs ``. The testbenches need Verilator 5 with
`--timing`. They share `tb/tdc_tb_pkg.sv`, a reference timing model: the period index,
quarter, next phase edge and expected fine code of any hit time. They also share
`tb/dcm_model.sv`, a behavioural four-phase clock source. The testbench clock period
is 1818 ps. To run the whole design end to end:

```
verilator --binary --timing --assert -Irtl -Itb rtl/tdc_pkg.sv tb/tdc_tb_pkg.sv \
          tb/tb_tdc_top.sv --top-module tb_tdc_top -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Any block can be run the same way by naming `tb/tb_<module>.sv`. Each testbench ends
with a line `TB_RESULT checks=N failures=M`.

`tb_tdc_top` runs `tdc_top` at its default sizes. It covers:

- the interval swept in 50 ps steps over 1.85 ns;
- intervals from 1 µs to 20 µs in 1 µs steps;
- 150 random intervals, a third of them shorter than the START pulse;
- a lone STOP;
- 60 back-to-back measurements, each START 1.05 to 1.5 periods after the previous
  STOP.

Pairs are queued as they are driven. Every `valid` result is matched with the oldest
queued pair. Its `nc`, `na`, `nb` and `valid` latency are checked against values
computed from the hit times. It also checks the rebuilt interval to within one τ. It
counts each mechanism, and a mechanism that never occurs is a failure. The mechanisms
are all four quarters for START and for STOP, the borrow, sub-period intervals,
overlap, an ignored STOP, back-to-back measurements and the 20 µs interval. In a
typical run the worst interval error is about 8.7 ps with τ = 10 ps. The simulation
takes a few seconds.

## Limits

- The measured resolution of the real device depends on carry-chain
  non-uniformity and clock skew, which this model does not have. Every tap here is
  exactly τ, so the model has no differential or integral non-linearity.
- There is no guard against metastability when a hit is exactly on a clock edge (see
  "Timing and usage rules").
- Changing `TAPS` requires `FINE_W ≥ log2(TAPS)`, and `TAPS · τ` must exceed T/4.
