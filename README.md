# Space-vector PWM for a five-level cascaded H-bridge inverter (OSVPWM / FOSVPWM)

A five-level inverter phase can sit at any of five levels (-2E … +2E). Three
phases give 125 switching states and 61 distinct space vectors. Doing classic
space-vector PWM on that diagram means searching dozens of small triangles for the
one that holds the reference. This design avoids the search. The five-level
diagram is treated as a set of overlapping **two-level hexagons**. Each one is
centred on a lattice point of the diagram, has side E, and has six vertices
that are valid five-level states. Once per sampling interval the modulator
does four things:

1. It decides, from the reference magnitude, whether the reference lies in
   the **inner region** (|V| < 2E) or in the **outer region**.
2. It picks one hexagon from the reference angle:
   * inner region: one of 6 hexagons (IH1–IH6);
   * outer region, OSVPWM: one of 18 hexagons (OH1–OH18);
   * outer region, FOSVPWM: one of only 12 hexagons.
3. It shifts the origin of the reference to the centre of that hexagon.
4. From then on it runs ordinary two-level SVPWM: sector, dwell times and a
   seven-segment switching sequence. The only difference is that the
   "two-level" states are five-level states built around the hexagon centre.

The resulting phase levels drive, through a small decoder, the 24 switches of
the power stage: three phases, two series H-bridges per phase, four switches
per bridge.

Everything is synthesizable SystemVerilog-2017. No tables are read from files.

## Coordinates: the part to read first

A switching state (a, b, c), with levels in -2…+2 and in units of E, maps to

    alpha = a - (b + c)/2          beta = (sqrt(3)/2) (b - c)

With this mapping the small triangles have side E, the outer corners of the
diagram lie at 4E, and the largest circle inside the diagram has radius
2·sqrt(3)·E. The modulation index is defined against that circle:
**Ma = 1 ⇔ |V_ref| = 2·sqrt(3)·E ≈ 3.464E.**

The datapath does not carry beta. It carries the oblique component
**betap = 2·beta/sqrt(3) = b − c**. In the (alpha, betap) pair:

* every lattice point has an integer betap and an alpha that is a multiple of
  ½, so hexagon centres are exact small integers (`svpwm_pkg::hex_center`
  stores `a2 = 2·alpha` and `bp = betap`);
* the 60° sector boundaries are `betap = ±2·alpha`;
* the dwell-time equations become linear with coefficients 0, ±½ and ±1, so
  the datapath needs no sine table and no angle.

All coordinates are signed 18-bit Q.12 numbers (E = 4096). Angles are unsigned
13-bit numbers in 1/16 degree (0…5759). With that unit every 15° boundary of
the selection tables is an exact integer.

### Hexagon centres

| hexagons | centre | angle |
|---|---|---|
| OH1, OH4, OH7, OH10, OH13, OH16 (corner) | 3E | 0°, 60°, … |
| OH2, OH5, … (edge, after a corner) | sqrt(7)·E ≈ 2.646E | corner + 19.1° |
| OH3, OH6, … (edge, before a corner) | sqrt(7)·E | corner + 40.9° |
| IH1 … IH6 | E | 0°, 60°, … |

The published mapping table gives the edge-hexagon centres as 2.598E at
multiples of 20°. That point is not a lattice point, so a hexagon centred on
it would have vertices that no switching state produces. This design uses the
true lattice points listed above. The corner and inner centres agree exactly
with the published table.

### Zero states and vertices

Each hexagon has a **lower zero state** `base` = (a, b, c) on its centre. It
is chosen so that `base + (1,1,1)` is also valid (every level ≤ +2).
`svpwm_pkg::hex_base` computes it from the centre:

* For the outer hexagons only one such pair exists. For OH1 it is
  P1N2N2 / P2N1N1.
* For the inner hexagons several pairs exist, and the middle one is taken.
  For IH1 this gives ON1N1 / P1OO.

The vertex at k·60° is `base` plus the two-level pattern
100, 110, 010, 011, 001, 101 for k = 0…5. Check for OH1: P2N2N2 at 0° and
P2N1N2 at 60°.

## Hexagon selection (`hex_select`)

* Region: **outer when |V_ref| ≥ 2E**.
* Inner hexagon: IH1 for −30°…+30°, IH2 for +30°…+90°, and so on.
* Outer region, OSVPWM: the circle is cut into 60° slices that start at
  −15°. Within a slice the corner hexagon covers the first 30° (OH1:
  −15°…+15°). Each of the next two edge hexagons then covers 15° (OH2:
  15°…30°, OH3: 30°…45°).
* Outer region, FOSVPWM: the corner hexagons are never used. The twelve edge
  hexagons cover 30° each, in the order OH2, OH3, OH5, OH6, …, OH18 from 0°.

Selecting by angle alone can leave a reference outside the chosen hexagon.
This happens at large magnitude near a range edge. With FOSVPWM it also
happens where the Ma = 1 circle crosses the parts of the diagram that no edge
hexagon covers. The dwell-time stage clamps such samples (see below) and
reports them on `clamped`.

## Dwell times (`sector_dwell`)

Sector I runs from 0° to 60°, counter-clockwise. In a sector the two active
vertices are V_a (at the sector start) and V_b (at its end). Let a = alpha and
b = betap of the reference relative to the hexagon centre, and express times
as fractions of Ts:

| sector | Ta | Tb |
|---|---|---|
| I | a − b/2 | b |
| II | a + b/2 | b/2 − a |
| III | b | −a − b/2 |
| IV | −a + b/2 | −b |
| V | −a − b/2 | a − b/2 |
| VI | −b | a + b/2 |

and T0 = Ts − Ta − Tb. These equal the textbook forms
Ta = Ts·m·sin(60° − θ) and Tb = Ts·m·sin θ, with m = 2|V|/(sqrt(3)E). The
sector comes from the signs of `betap`, `betap − 2a` and `betap + 2a`.

The fractions are converted to clock cycles by a constant multiply by
`TS_CYCLES`, with rounding. A sample outside the hexagon is handled in three
steps:

1. Each time is clamped to 0…Ts.
2. Tb is cut so that Ta + Tb = Ts.
3. `clamped` is raised.

## Seven-segment sequence (`seq_gen`)

Each sampling interval outputs the sequence

    V0L, first, second, V0U, second, first, V0L
    T0/4  Ta/2 or Tb/2 ...  T0/2 ...              remainder

In sectors I, III and V the order is V_a then V_b. In sectors II, IV and VI it
is V_b then V_a. This rule makes every step move exactly one phase by exactly
one level. The last segment absorbs the rounding of the halvings, so the
interval always lasts exactly `TS_CYCLES` cycles.

The sequencer also owns the sampling-interval counter. Its `step` output, in
the first cycle of each interval, triggers the next sample. Results are double
buffered: a sample taken at the start of interval k is applied during
interval k+1. Phase levels are registered. Until the first sample is applied,
all phases sit at level 0.

Two assertions guard the sequencer in simulation:

* every set of times offered to it must add up to exactly one interval;
* within an interval, no phase may move by more than one level per step.

## Reference generation (`ref_gen`)

An angle accumulator advances by `PHASE_STEP` = 5760·F_OUT/FS per sample. At
50 Hz and 1.5 kHz this is 12°, or 30 samples per period. The magnitude is
Ma·2·sqrt(3)·E. A 16-iteration CORDIC in rotation mode produces alpha and
betap:

* the angle is folded into −90°…+90°, and the result is negated when it was
  folded;
* the CORDIC gain is removed by pre-scaling;
* betap is y·2/sqrt(3).

The result is ready 18 cycles after `step`. Accuracy is better than 0.002E.

## Gate signals (`chb_gate_drive`)

Each phase has two series H-bridges, H1 and H2. Each bridge has switches S1,
S2 (upper) and S3, S4 (lower):

* +E: S1 and S4 on;
* −E: S2 and S3 on;
* 0: S1 and S2 on.

A phase level L is split so that H1 provides the first step of E (L ≠ 0) and
H2 the second (|L| = 2). Both switches of a leg are always complementary.
Dead time is not inserted and has to be added by the gate-driver hardware.
The output bundle is `gate[phase][bridge][switch]`, with 1 meaning on.

## Top level (`svpwm_top`)

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset |
| mode | in | 1 | 0 = OSVPWM, 1 = FOSVPWM; sampled per interval |
| ma | in | 16 | modulation index, Q1.15 (32768 = 1.0); sampled per interval |
| gate | out | 3×2×4 | switch commands, phase A–C, bridge H1/H2, S1–S4 |
| levels | out | 3×3 | phase levels −2…+2 behind the gates |
| step | out | 1 | first cycle of each sampling interval |
| hex, outer, sector, clamped | out | 5, 1, 3, 1 | selection and status of the most recent sample |
| seg, running | out | 3, 1 | current segment 0–6; output active |

| parameter | default | note |
|---|---|---|
| CLK_HZ | 50 000 000 | clock frequency (a choice of this design) |
| FS_HZ | 1500 | sampling frequency, 6N × 50 Hz with N = 5 |
| F_OUT_HZ | 50 | output frequency |
| TS_CYCLES | CLK_HZ / FS_HZ = 33333 | must exceed 24 (asserted) |

At the defaults, synthesis gives about 410 word-level cells and 322
flip-flops, with 5 multipliers of at most 18×16 bits. That is a small part of
a Spartan-3 XC3S400-class FPGA.

## Measured behaviour

The end-to-end testbenches connect the gate outputs to a behavioural model of
the power stage and average the output space vector over every sampling
interval. The average matches the reference to 0.02E for every sample that is
not clamped.

Line-voltage results for one 50 Hz period, with E = 600 V and ideal switches. They come from the 300-cycle-interval testbench. At the default 33333-cycle intervals the Ma = 1.0 figures agree to within 0.1 % (2395 V and 2331 V):

| Ma | OSVPWM V1m | OSVPWM THD | FOSVPWM V1m | FOSVPWM THD |
|---|---|---|---|---|
| 0.2 | 480 V | 76.8 % | 480 V | 76.8 % |
| 0.4 | 957 V | 38.6 % | 957 V | 38.6 % |
| 0.6 | 1479 V | 22.8 % | 1440 V | 24.3 % |
| 0.8 | 1916 V | 18.3 % | 1915 V | 18.3 % |
| 1.0 | 2393 V | 14.7 % | 2329 V | 14.5 % |

The fundamental follows 4·Ma·E. The two exceptions are the clamped cases:

* Ma = 0.6, OSVPWM: the magnitude of 2.08E is just outside the inner region,
  so some samples land outside the hexagon chosen by angle;
* Ma = 1.0, FOSVPWM: 6 samples per period fall in the parts of the diagram
  that the 12 edge hexagons do not cover. This is the expected cost of the
  reduced technique.

THD here is computed on the raw line voltage, with no dead time and no load
dynamics. For reference, the method's authors reported different absolute
figures from their own simulation (for example 20.7 % THD and 2348 V at
Ma = 1.0 with OSVPWM). Their V1m also does not scale linearly with Ma, so
their definition of Ma or their measurement set-up probably differs from this
one. Treat the table as this RTL's behaviour, not as a reproduction of those
figures.

## Choices made here and departures from the published method

* Edge outer hexagon centres sit on the lattice (sqrt(7)E at ±19.1°) rather
  than at 2.598E at 20° steps (see above).
* The published sector-II switching sequence is a copy of the sector-I one.
  Even sectors instead use the order that keeps one-leg-per-step switching.
* Dwell times are computed in oblique coordinates instead of with sines.
  This is mathematically identical.
* The following behaviour is unspecified in the method and was chosen here:
  * zero-time split T0/4, T0/2, T0/4;
  * clamping of out-of-hexagon samples;
  * boundaries: a lower bound is inclusive, and |V| = 2E counts as outer;
  * inner-hexagon zero-state pair;
  * one-interval latency;
  * reset to level 0;
  * fixed H1/H2 level split, no dead time;
  * switch polarity;
  * the 50 MHz clock and all fixed-point formats.
* OSVPWM and FOSVPWM are selectable at run time through `mode`. They share
  all hardware except the outer-hexagon table.
* Not included: the SPWM modulator used for comparison, and the power stage
  itself. A behavioural model of the power stage is in
  `tb/chb_inverter_model.sv`.

## Files

| file | content |
|---|---|
| rtl/svpwm_pkg.sv | formats, hexagon enum, centres, zero-state and vertex functions |
| rtl/ref_gen.sv | angle accumulator, magnitude, CORDIC |
| rtl/hex_select.sv | region and hexagon selection, both techniques |
| rtl/ref_map.sv | origin shift to the hexagon centre, zero state |
| rtl/sector_dwell.sv | sector, Ta/Tb/T0 in cycles, clamping |
| rtl/seq_gen.sv | interval timer, seven-segment sequencer |
| rtl/chb_gate_drive.sv | level to H-bridge switch commands |
| rtl/svpwm_top.sv | complete modulator |
| tb/tb_*.sv | self-checking testbench per module |
| tb/tb_svpwm_top.sv | all Ma, both techniques, 300-cycle intervals |
| tb/tb_svpwm_top_full.sv | defaults (33333-cycle intervals), Ma = 1.0 and 0.8, both techniques |
| tb/chb_inverter_model.sv | behavioural power stage for the top-level testbenches |

Every testbench ends with a `TB_RESULT checks=N failures=M` line. To run
one with Verilator:

    verilator --binary --timing --assert -Irtl -y rtl -y tb \
        rtl/svpwm_pkg.sv tb/tb_svpwm_top.sv --top-module tb_svpwm_top
    ./obj_dir/Vtb_svpwm_top

The full-size testbench simulates about 4.3 million clock cycles and takes a
few seconds.
