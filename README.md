# Multilevel space-vector PWM in integer lattice frames

This is synthesizable SystemVerilog for a space-vector PWM (SVPWM) modulator for
multilevel neutral-point-clamped (NPC) inverters. The default size is three levels.
The host gives it a modulation depth `m` and an electrical angle `theta`. From them it
computes, once per carrier period, the switching instants of every upper IGBT, and it
drives the gates from a triangular carrier.

The main idea is to describe the space-vector diagram in a coordinate frame where every
switching vector sits on an integer grid. In such a frame three things become cheap:

- Finding the triangle that holds the reference is a `floor` and one comparison.
- The dwell times of its three corner vectors come from additions alone.
- The switching states come from a closed formula.

This avoids the sector tables, trigonometry and irrational constants of the textbook
method. Two such frames are built, and they run side by side in the top module:

- **alpha'-beta' frame**. The axes are the line voltages `A-C` and `B-A`. Nothing is
  rotated and no sector search is needed. This is the lighter and recommended path.
- **g-h frame**. The axes are 60 degrees apart. The angle is folded into the first
  60-degree sector, all the work is done there, and the resulting switching states are
  turned back to the real sector.

A third method, the **alpha\*-beta\* frame**, is included only up to its dwell times; see
the section on it below. It treats the multilevel diagram as overlapping two-level
hexagons.

Both full paths are general in the number of levels (`LEVELS`). They have been simulated
at 3 and 5 levels.

## Data path at a glance

```
 m, theta ──► reference ─► triangle + dwell times ─► switching sequence ─► time mapping ─► PWM stage ─► gates
             (sine table)   (tri_ontime)              (vec_seq)             (time_map)      (pwm_gen)
```

| Module | Role |
|---|---|
| `svpwm_pkg` | Shared types and constants: Q14 numbers, binary angle, lattice points, switching states. |
| `sin_lut` | 65-entry quarter-wave table of `2 sin x`, folded to the whole turn. |
| `ab_ref_gen` | alpha'-beta' reference `Va' = (L-1) m sin(theta+60°)`, `Vb' = (L-1) m sin(theta-60°)`. |
| `gh_ref_gen` | Sector `s`, angle inside the sector, and the first-sector g-h reference. |
| `tri_ontime` | Origin point, triangle I/II and the three dwell times (frame independent). |
| `vec_seq` | Switching state of each corner, choice of the split vector, four-step sequence, segment boundaries. In g-h it also turns the states into sector `s`. |
| `time_map` | One switching instant per upper IGBT, from the sequence. |
| `pwm_gen` | Up/down carrier, double-buffered instants, gate comparators, period-start request. |
| `svpwm_ab`, `svpwm_gh` | The two modulators: a three-stage pipeline around the blocks above. |
| `astar_ontime` | alpha\*-beta\* front end: centre vector, two-level sector, dwell times. |
| `svpwm_top` | Everything above, side by side. |

## Numbers

| Quantity | Format |
|---|---|
| Modulation depth `m` | Unsigned Q14: 16384 = 1.0. |
| Reference components, dwell times | Signed/unsigned Q14. The dwell times of one sample add up to exactly 16384 (one carrier period `ts`). |
| Angle | 16-bit binary angle: 65536 = 360°, 10923 ≈ 60°. |
| Switching instants | 16 bits: 0 … 65535 spans one carrier period. An instant is the Q14 time times four, saturated at 65535. |

**Sine table.** It holds 65 codes for 0…90° in steps of 90/64 degrees, in offset binary:
`code = 32768 + round(32767·sin x)`. So 32768 stands for `2 sin 0 = 0`, 65535 for
`2 sin 90° = 2`, and 49151 for 1. The other quadrants are folded onto this quarter. The
angle is truncated to the 256-point grid, with no interpolation. `cos` is read as
`sin(x + 90°)`.

**What `m` means.** With `m = 1` the reference lies on the circle inscribed in the
hexagon of reachable voltages, which is the end of the linear range. The line-to-line
amplitude is then `(L-1)·m` voltage levels. Overmodulation (`m > 1`) is not handled: the
times of a reference outside the hexagon are not meaningful.

## The two lattice frames

Let a switching state be `(SA, SB, SC)`, the level of each phase in `0 … L-1`.

| Frame | Coordinates of a state | Reference |
|---|---|---|
| alpha'-beta' | `x = SA - SC`, `y = SB - SA` | `Va' = (L-1)·m·sin(θ+60°)`, `Vb' = (L-1)·m·sin(θ-60°)` |
| g-h | `g = SA - SB`, `h = SB - SC` | `k = (L-1)(√3/2)m`, `Vα = k cos φ`, `Vβ = k sin φ`, then `Vg = Vα - Vβ/√3`, `Vh = 2Vβ/√3` |

In the g-h row, `φ` is the angle inside sector `s = floor(θ/60°)`.

States that differ by `(1,1,1)` map to the same point. They are the redundant states of
one space vector.

In the alpha'-beta' frame the reference comes straight from two table reads and two
multiplies. In the g-h frame the angle is reduced to `0 … 60°` first:

- `s` comes from the top bits of `6θ`.
- `φ = θ − start(s)`, where the sector starts are rounded up so that `φ` is never negative.

The two frames are built to give the same line-to-line voltages for the same `m`. The
testbench checks this.

## Locating the reference and the dwell times

This is the same in both frames (`tri_ontime`). Take the reference `(vx, vy)`:

- The origin is `o = (floor vx, floor vy)`.
- The fractions are `fx = vx - ox` and `fy = vy - oy`.
- The unit cell at `o` is cut by its diagonal. The reference is in **triangle I** when
  `fx + fy ≤ 1`, and in **triangle II** otherwise.

| Triangle | Corners | Dwell times (`ts = 1`) |
|---|---|---|
| I | `o`, `o+(1,0)`, `o+(0,1)` | `1-fx-fy`, `fx`, `fy` |
| II | `o+(1,0)`, `o+(0,1)`, `o+(1,1)` | `1-fy`, `1-fx`, `fx+fy-1` |

These dwell times balance the volt-seconds exactly, and they always add up to 1.

For three levels the g-h path also reports the classic triangle number `n` (1…24):

- `n = 4s+1`: triangle I at the origin cell.
- `n = 4s+2`: triangle II at the origin cell.
- `n = 4s+3`: the triangles with `g = 1`.
- `n = 4s+4`: the triangles with `h = 1`.

## Switching states and the sequence

This is the least obvious part of the design (`vec_seq`).

**1. Lowest state of each corner.** A lattice point has several states, which differ by
`(1,1,1)`. The block first takes the one with the lowest levels:

- alpha'-beta': `a = max(0, −y, x)`, state `(a, a+y, a−x)`.
- g-h, first sector: `a = max(0, −y, −x−y)`, state `(a+x+y, a+y, a)`.

**2. Split vector.** One of the three corners is applied twice, at the start and at the
end of the period, each time for half of its dwell time. It is the corner whose lowest
state has the smallest highest level; ties go to the smaller level sum. Inside a sector
this is the zero vector or the short vector of the triangle. It is the corner that has a
redundant state one level higher.

**3. The other two corners** take the redundant state whose level sum is one or two
above the start state. They are ordered by that sum, so each step of the sequence raises
exactly one phase by one level.

**4. The fourth state** is the start state plus `(1,1,1)`.

This gives the classic symmetric sequence in which every switch changes at most once per
half period. For one carrier half, the four segments end at:

```
tI = t_split/2,   tII = tI + t_second,   tIII = tII + t_third,   ts
```

**g-h frame, other sectors.** The sequence is built in sector 0, then turned into sector `s`:

- Odd sectors first apply the 60-degree turn `(SA,SB,SC) → (K−SB, K−SC, K−SA)`, with
  `K = L−1`. This turn inverts the level order, so the sequence is also reversed and its
  boundaries mirrored (`t → ts − t`).
- Then the phases are rotated right `floor(s/2)` times, `(SA,SB,SC) → (SC,SA,SB)`.

## Time mapping

A phase at level `v` turns on its upper switches `X1 … X(L−1)`. Switch `j` (0 = outermost,
X1) is on when `v ≥ L−1−j`. Across the four segments of the sequence, a switch is off for
`z` segments, and because levels only rise, those off segments come first. Its switching
instant is therefore `0, tI, tII, tIII` or `ts` for `z = 0 … 4`. The gate is on while the
carrier counter is at or above that instant. The carrier counts up and then down, so the
pattern is centred in the period.

**Worked example.** Three levels, `m = 0.8`, `θ = 20°`, alpha'-beta' frame:

1. The reference is `Va' = 1.576`, `Vb' = −1.028`.
2. The origin is `(1, −2)`, with `fx + fy = 1.547`, so the reference is in triangle II.
3. The corners and their dwell times:

   | Corner | Dwell time | Lowest state |
   |---|---|---|
   | `(2,−2)` | 0.028 | `(2,0,0)` |
   | `(1,−1)` | 0.424 | `(1,0,0)` |
   | `(2,−1)` | 0.547 | `(2,1,0)` |

4. The split corner is `(1,0,0)`. The sequence is `(1,0,0) → (2,0,0) → (2,1,0) → (2,1,1)`.
5. The boundaries are `tI = 0.212`, `tII = 0.241`, `tIII = 0.788`.
6. The instants:

   | Switch | Instant |
   |---|---|
   | A1 | tI |
   | A2 | 0 |
   | B1 | ts |
   | B2 | tII |
   | C1 | ts |
   | C2 | tIII |

7. Check: the average levels are A = 1.788, B = 0.759, C = 0.212. So A−C = 1.576 and
   B−A = −1.029, as required.

## PWM stage

`pwm_gen` works as follows:

- **Carrier.** A 16-bit counter counts 0 → 65536−STEP → 0 in steps of `CARRIER_STEP`.
  With the default step of 16, one period is 8192 clocks, for example 6.1 kHz at 50 MHz.
- **Period start.** In the first clock of each period it raises `sample_req`.
- **Loading.** The modulators capture `m` and `θ` on `sample_req`. Their instants arrive
  three clocks later, in a shadow register. They become active at the start of the next
  period, so a sample acts one full period after it was taken.
- **After reset.** All instants are 65535, so the gates stay off until the first sample
  has gone through.
- **Gates.** The gate outputs are registered.
- **Lower switches and dead time.** The lower switches are the complements of the upper
  ones. Dead time is left to the gate drivers.

## alpha\*-beta\* front end

`astar_ontime` is three levels only, combinational, and registered in the top.
It works as follows:

1. It forms the ordinary alpha-beta reference, of length `√3·m` (the same length as the
   g-h path).
2. It picks the small vector `V1…V6` whose two-level hexagon holds the reference. This is
   a band test on `Vβ` plus an angle window, tried in the order V1…V6.
3. It moves the reference to that centre.
4. It finds the two-level sector of the moved reference.
5. It computes the two-level dwell times with sector constants.

Its switching sequence and gate mapping are not built, so this path drives no gates. Its
outputs show what the method computes, and the top-level testbench checks that they
rebuild the same voltage as the g-h path.

## Interface of `svpwm_top`

Parameters: `LEVELS = 3`, `CARRIER_STEP = 16`.

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | Clock and asynchronous active-low reset. |
| `m[15:0]`, `theta[15:0]` | in | Depth (Q14) and angle (binary). They must be held stable in the clock where `sample_req` is high. |
| `sample_req` | out | First clock of a carrier period. `m` and `theta` are captured here. |
| `carrier`, `gate_ab[3][L-1]`, `gate_gh[3][L-1]` | out | Carrier and the upper gates of each path. Index `[phase][j]`: phase A, B, C; `j = 0` is the outermost switch. |
| `tmap_ab`, `tmap_gh` | out | Switching instants of each path. |
| `valid_ab`, `valid_gh` | out | New instants are present. This is three clocks after `sample_req`. |
| `ref_ab[2]`, `ref_gh[2]`, `origin_*`, `upper_*`, `sector_gh`, `tri_n_gh` | out | Observation: reference, origin, triangle half, sector and triangle number, aligned with `valid_*`. |
| `valid_st`, `centre_st`, `sector_st`, `ton_st[3]`, `ref_st[2]` | out | alpha\*-beta\* results, one clock after `sample_req`. |

Both modulator pipelines accept a new sample in every clock, although the top uses one
per period. The two PWM stages are reset together and run in lock step, and an assertion
checks this.

## Size

These are rough figures from a generic synthesis to 4-input LUTs. All multipliers are
built from LUTs here. An FPGA with hard multipliers needs far fewer LUTs.

| Unit | LUT4 | Flip-flops |
|---|---|---|
| `svpwm_ab` | ≈ 3,600 | 417 |
| `svpwm_gh` | ≈ 6,400 | 437 |
| `pwm_gen` (one) | ≈ 150 | 216 |
| Whole `svpwm_top`: both paths, both PWM stages and the alpha\*-beta\* front end | ≈ 18,500 | ≈ 1,240 |

The alpha'-beta' path is the smaller one: it needs no sector logic and no √3 constants.
Most flip-flops are pipeline registers and the double-buffered switching instants.

## Where this design makes its own choices

The method is followed as published, but a few points had to be settled independently:

- **Scale of the reference.** The published equations define `m` inconsistently between
  the g-h form and the alpha'-beta' form. For the same `m`, one gives a reference
  `2/√3` times longer than the other. This design uses the alpha'-beta' scaling for
  every path, with `m = 1` on the inscribed circle. The g-h and alpha\*-beta\* references
  therefore carry a `√3/2` factor.
- **Instant rule.** The switching instant is the start of the first on-segment. The gate
  is on while the carrier is at or above it. So `z = 0` gives a switch on for the whole
  period, and `z = 4` gives a switch off for the whole period. Some of the published
  worked examples state the opposite for individual switches. The rule used here is the
  one that balances the volt-seconds.
- **Odd g-h sectors.** The published rule for odd g-h sectors is replaced by the
  60-degree turn described above. It gives the same vectors.
- **alpha'-beta' states.** They use the lowest-state formula. It agrees with the
  published case formula inside the three-level hexagon and stays valid for more levels.
- **Redundant states.** The redundant state of the split vector is fixed by the rule
  above. Balancing the neutral-point voltage through the choice of redundant states is
  not implemented.
- **No alpha'-beta' triangle number.** The alpha'-beta' path does not number its
  triangles. Its origin point and triangle half identify the triangle instead.
- **Fixed-point details.** The angle is truncated to the table grid. The split time is
  halved by truncation. The Q14 format, the pipeline, double buffering, carrier step and
  reset values are this design's own.
- **alpha\*-beta\* equations.** The published dwell-time equation has a typo, which is
  corrected here. Where the Table-5 windows overlap, the first match wins.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference values come from a
floating-point model (`tb/svpwm_ref_pkg.sv`) that shares no code with the RTL.

| Testbench | Covers |
|---|---|
| `tb_sin_lut` | The table over the whole turn. |
| `tb_ab_ref_gen`, `tb_gh_ref_gen` | References at 3 and 5 levels, sector and angle folding. |
| `tb_tri_ontime` | Exact volt-second balance for random references. |
| `tb_vec_seq` | Both frames at 3 and 5 levels. Every step raises one phase by one level, and the sequence reproduces the reference. |
| `tb_time_map` | Instants against a direct count, plus the worked example. |
| `tb_pwm_gen` | Gate on-times against the instants, period length, reload timing. |
| `tb_svpwm_ab`, `tb_svpwm_gh` | Whole modulators at 3 and 5 levels, three-clock latency, one sample per clock. The g-h one also checks all 24 triangle numbers. |
| `tb_astar_ontime` | Centre choice and sector against the tables, volt-second balance. |
| `tb_svpwm_top` | Default size end to end; see below. |
| `tb_svpwm_top_l5` | The same end-to-end test with the top built for five levels. It also requires every one of the four switch positions to switch inside a period. |

`tb_svpwm_top` runs 150 carrier periods:

- **Inputs.** `m = 0.3` and `m = 0.8` over a full turn, then random points.
- **Checks per period:**
  - volt-seconds of each path;
  - agreement between the paths;
  - the number of clocks each gate is on, compared with its instant;
  - latencies and period length.
- **Coverage.** It counts and requires:
  - every sector, all 24 triangles and both triangle halves;
  - zero-vector and short-vector splits;
  - period reloads;
  - all six alpha\*-beta\* centres.

To run a testbench with plain Verilator from the repository root:

```
verilator --binary --timing --assert -y rtl rtl/svpwm_pkg.sv tb/svpwm_ref_pkg.sv \
          tb/tb_svpwm_top.sv --top-module tb_svpwm_top -o sim
./obj_dir/sim
```

Replace `tb_svpwm_top` with any other testbench name. The top-level test takes about a
second.

To change the design:

- For more levels, set `LEVELS`. The gate and instant arrays grow with it, and the
  triangle number and alpha\*-beta\* outputs are only produced for three levels.
- To change the switching frequency, set `CARRIER_STEP`. It must be a power of two that
  divides 65536.
