# Monte Carlo statistical timing on shared pattern units

Monte Carlo statistical static timing analysis (SSTA) estimates the delay
distribution of a circuit by running ordinary static timing analysis (STA)
again and again. Each run, or *sample*, draws every pin-to-output delay from
its own Gaussian distribution. The method is simple and accurate, but it needs
very many samples, so it is slow in software.

STA on a mapped netlist needs only two operations: add a delay to an arrival
time, and take the maximum of two arrival times. The whole circuit is a data
flow graph of sums and maxima. In hardware this graph can be pipelined so that
a new sample enters every clock. A flat copy of the graph for a real circuit is
too large for an FPGA, though. This design shares hardware instead:

* the netlist is covered by copies (*instances*) of a small recurring
  sub-circuit (a *pattern*);
* each pattern becomes one pipelined *functional unit*;
* several instances of the pattern take turns on the same unit.

With `NFU` units for `NINST` instances, a sample enters every
`II = ceil(NINST/NFU)` clocks. `II` is the *initiation interval*. Fewer units
mean less area and a lower sample rate.

The RTL implements this engine for the nine-cell example circuit below. That
circuit is covered by three instances of a three-cell pattern called P1. The
number of shared units is a parameter, from 1 to 3.

The design follows the approach in *Accelerating Monte Carlo based SSTA Using
FPGA*. There, a C-to-hardware compiler generated the RTL for each benchmark
circuit. The RTL here is written directly. Every scheduling and interface
detail below belongs to this RTL; the section on departures lists them.

## Delay model

Every signal carries two arrival times: a rising one and a falling one. Every
pin has a rise delay and a fall delay to the cell output. A pin's *phase*
tells how its edges map to the output edges:

| phase   | output rise                 | output fall                 |
|---------|-----------------------------|-----------------------------|
| INV     | AT_in.fall + D.rise         | AT_in.rise + D.fall         |
| NONINV  | AT_in.rise + D.rise         | AT_in.fall + D.fall         |
| UNKNOWN | max of the INV and NONINV values, for each edge separately |

INV is a negative-unate input (a NOR2 input, for example). NONINV is positive
unate, and UNKNOWN is binate. The output arrival time of a cell is the maximum
over its pins, taken separately for rise and for fall. For a NOR2 with inputs
a and b:

    AT_out.rise = max(AT_a.fall + D_a.rise, AT_b.fall + D_b.rise)
    AT_out.fall = max(AT_a.rise + D_a.fall, AT_b.rise + D_b.fall)

`gate_node` implements this rule for a 2-input cell, with one register stage.
The pin phases are parameters, because a cell's unateness is known once the
netlist is mapped.

## The example circuit and pattern P1

    pattern P1:  cell 1 (pins 1a,1b) --\
                                        cell 3 (pin 3a <- cell 1, 3b <- cell 2) --> out
                 cell 2 (pins 2a,2b) --/

    circuit:     instance 0 = cells 1,2,3   inputs PI0..PI3
                 instance 1 = cells 4,5,6   inputs PI4..PI7
                 instance 2 = cells 7,8,9   port 0 <- instance 0, port 1 <- PI8,
                                            port 2 <- instance 1, port 3 <- PI9
                 circuit output = output of instance 2

A P1 unit (`pattern_p1_dfg`) has two stages. Cells 1 and 2 are evaluated in
the first stage and cell 3 in the second. The delays of cell 3 are held for
one stage so that they meet the results of cells 1 and 2. The unit accepts new
operands every clock.

`pattern_fu` wraps that data flow graph with random delay generation:

* twelve Gaussian generators, one per pin and edge (six pins, rise and fall);
* twelve delay samplers that turn each Gaussian sample into a delay.

Every evaluation therefore uses fresh, independent delays. The unit's latency
is `LAT = 3`: one clock to sample the delays, then one clock per cell level.

## Sharing: the modulo schedule

This is the part to understand before changing anything.

Every instance `i` has a fixed home:

* it is bound to unit `i % NFU`;
* it runs in schedule slot `i / NFU`.

The controller (`mc_ssta_ctrl`) counts slots 0, 1, ..., II-1 continuously. A
new sample is *issued* in every slot 0 while samples of the run remain. In each
clock, every unit takes the operands of the instance that owns the current
slot. A `share_mux` per unit selects them. This is the n-to-1 multiplexer that
sharing costs.

Inside a sample, instance `i` starts `START[i]` clocks after the issue.
`START[i]` is the first clock that satisfies two conditions:

* it falls in the instance's own slot (modulo II);
* it is at least `LAT + 1` clocks after every predecessor started. That is the
  unit latency plus one clock to store the result.

The top module computes these numbers with constant functions while the design
is elaborated:

| NFU | II | START[0..2] | result after issue (LAT_END) | units' busy slots        |
|-----|----|-------------|------------------------------|--------------------------|
| 1   | 3  | 0, 1, 5     | 9 clocks                     | unit 0: all three slots  |
| 2   | 2  | 0, 0, 5     | 9 clocks                     | unit 0: 2 of 2, unit 1: 1 of 2 |
| 3   | 1  | 0, 0, 4     | 8 clocks                     | every unit every clock   |

When a unit's output leaves the pipeline, it is written into a small result
history of the instance that produced it. That instance is the one whose slot
was current `LAT` clocks earlier. The next sample overwrites the entry `II`
clocks later. A consumer reads the entry that still holds its own sample:
entry `floor((START[i] - START[q] - LAT - 1) / II)` of producer `q`. For this
circuit that is always entry 0, so the history depth `HD` is 1. The mechanism
is kept general for other connection tables.

Samples never depend on one another, so nothing ever stalls. Several samples
are in the pipeline at once. A run of N samples ends `(N-1)*II + LAT_END`
clocks after the first issue. The first issue comes at most II clocks after
`start`.

## Random delays

`delay_sampler` computes `delay = mu + round(sigma * z)`, clamped to
[0, 65535]. Here `z` is a standard Gaussian sample in signed Q4.12 format. The
clamp matters only far out in a distribution's tail, where the delay would
otherwise be negative.

`gauss_pwl` produces one `z` per clock. It applies a piecewise linear
approximation of the inverse normal distribution to a 32-bit uniform word from
`urng`, an xorshift generator:

* bit 31 gives the sign;
* the other 31 bits are a fraction `q`, and the magnitude is
  `|z| = Phi^-1((1+q)/2)`.

The curve is split into 64 straight segments:

* The number of leading ones of `q` selects an octave `o` (at most 15).
  Octave `o` covers `q` in `[1-2^-o, 1-2^-(o+1))`. Segments therefore get finer
  in the tail, where the curve bends.
* The next two bits select one of four sub-segments.
* The 12 bits after those give the position `f` within the sub-segment.

The result is `|z| = base[k] + slope[k]*f/4096`, where `k = 4*o + sub`. The
file `rtl/gauss_pwl_table.hex` holds one 32-bit word per segment: `base` in the
upper half and `slope` in the lower half, both scaled by 4096. For a segment
running from `ql` to `qr`, `base = round(4096*|z|(ql))` and
`slope = round(4096*(|z|(qr) - |z|(ql)))`. For the last segment,
`qr = 1 - 2^-31`.

The largest magnitude is about 6.2. In simulation, the largest error against
the exact inverse is about 0.003. Over 200,000 samples, the mean, variance and
tail fractions match the standard normal distribution.

Every generator in the design has its own seed. Each unit's seed is derived
from the top's `SEED`, and each generator in a unit mixes in its own index.

## Interface of `mc_ssta_top`

| port        | dir | type                    | meaning |
|-------------|-----|-------------------------|---------|
| clk, rst_n  | in  | logic                   | clock; asynchronous active-low reset |
| start       | in  | logic                   | one-clock pulse that starts a run (ignored while busy) |
| nsamples    | in  | logic [31:0]            | number of Monte Carlo samples in the run |
| pi_at[NPI]  | in  | at_rf_t                 | rise/fall arrival times of the primary inputs |
| mu[NINST]   | in  | at_rf_t [5:0]           | nominal rise/fall delays of each instance's pins 1a,1b,2a,2b,3a,3b |
| sigma[NINST]| in  | at_rf_t [5:0]           | standard deviations of the same delays |
| out_valid   | out | logic                   | one sample result is present |
| out_at      | out | at_rf_t                 | rise/fall arrival time at the circuit output |
| out_delay   | out | at_t                    | the larger of the two: this sample's circuit delay |
| busy, done  | out | logic                   | run in progress / last result delivered |
| n_done      | out | logic [31:0]            | results delivered in this run |

All times are 16-bit unsigned integers in a time unit of your choice, and all
sums saturate at 65535. Keep `pi_at`, `mu` and `sigma` stable during a run.
Results come out one every II clocks. The distribution is not accumulated on
chip: the result stream is the output.

Parameters: `NFU` (1 by default, which gives II = 3), `NINST`, `NPI`, `SRC`
(the connection table), `PIN_PHASE` (phases of the six pattern pins, all INV
by default) and `SEED`. In `SRC[i][p]`, a value below `NPI` names a primary
input. A value `NPI + q` names the output of instance `q`. Instances must be
listed in topological order.

## Modules

    mc_ssta_top            engine: schedule, operand muxes, result history
      mc_ssta_ctrl         slot counter, sample issue, result marking, start/done
      share_mux            n-to-1 operand multiplexer per unit (n = II)
      pattern_fu           one P1 unit with its delay generation (II 1, latency 3)
        gauss_pwl  x12     Gaussian generator  (urng inside)
        delay_sampler x12  mu + sigma*z
        pattern_p1_dfg     cells 1,2 -> cell 3, two stages
          gate_node x3     sum/max for one cell
    ssta_pkg               widths, at_rf_t, phase_e, fu_op_t, saturating add, max

## Simulating

Every testbench checks itself and prints `TB_RESULT checks=N failures=M`. Each
has a watchdog. To build and run one with Verilator 5 from the folder that
holds `rtl/` and `tb/`:

    verilator --binary --timing --assert --top-module tb_mc_ssta_top \
        -Irtl -Itb -y rtl -y tb rtl/ssta_pkg.sv tb/tb_mc_ssta_top.sv -o sim
    obj_dir/sim

The Gaussian table is read by the path `rtl/gauss_pwl_table.hex`, so run the
simulation from that same folder.

| testbench            | what it establishes |
|----------------------|---------------------|
| tb_gate_node         | all phase combinations against a model, saturation, 1-clock latency |
| tb_pattern_p1_dfg    | a stream of random operands, one per clock, against a pattern model, 2-clock latency |
| tb_urng              | bit-exact sequence, zero seed, bit balance |
| tb_gauss_pwl         | point accuracy against an independent inverse normal; mean, variance, tails |
| tb_delay_sampler     | rounding and both clamps |
| tb_share_mux         | every select, including N = 1 |
| tb_pattern_fu        | exact results when sigma = 0; spread, freshness and bounds when sigma > 0 |
| tb_mc_ssta_ctrl      | issue spacing, result latency, counts, start while busy, empty run |
| tb_mc_ssta_top       | NFU = 1, 2, 3 with mixed phases: exact nominal STA, spacing and latency, equal distributions across NFU, sharing and overlap observed |
| tb_mc_ssta_full      | the default engine: nominal run against a model, then 20,000 Monte Carlo samples, with the exact clock count checked |

The engine is small, so the default configuration simulates in well under a
second.

## How far to trust it, and where it departs

Each of these points follows the published approach:

* the rise/fall delay model with three phases;
* independent Gaussian pin delays;
* the pattern P1 and the way it covers the example circuit;
* one sample per iteration, with samples independent of each other;
* units pipelined with an initiation interval of 1, and `II = ceil(instances/units)`;
* multiplexers in front of shared units.

These are this design's own choices, because the source gives none of them:

* **Schedule.** The binding `i % NFU`, the slot `i / NFU`, the start times
  and the result history are this design's own. A high-level synthesis tool
  might have scheduled differently. Throughput is the same, but latency may
  differ.
* **Gaussian generator.** The segmentation, the table, the xorshift source and
  the Q4.12 format are this design's own. The published work only names the
  piecewise linear method.
* **Widths and arithmetic.** 16-bit times, saturating sums and clamping of
  negative delays are this design's own.
* **Interface.** All ports, the start/done handshake and streamed results are
  this design's own. The original engine ran inside a board wrapper that is not
  reproduced.
* **Pin phases.** The cell types of the example are not known. All pins are
  INV by default, and every phase is supported. Which first-level cell drives
  which pin of cell 3, and which pin of cells 7 and 8 comes from the previous
  instance, are also assumed.

The following are not included:

* the software steps that pick patterns (greedy covering by area gain) and
  choose the number of units (an incremental optimizer under an area budget);
* the C-to-hardware and FPGA tool flow;
* the board and its host link.

Their results enter the RTL as parameters: `SRC`, `NINST`, `NPI` and `NFU`.

The engine is specific to one circuit, as the original was. Only a P1 unit
exists. A benchmark circuit covered by other patterns needs a unit for each of
those patterns and its own connection table. Circuits with a few hundred to a
thousand cells, like the ISCAS benchmarks, do not fit the default
configuration. No clock frequency or FPGA resource figure is claimed for this
RTL. Its sample rate is one sample per `II` clocks.
