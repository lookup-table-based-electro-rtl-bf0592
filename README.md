# Real-time electro-thermal model of an output-series interleaved boost converter

This core is an FPGA real-time simulator for a DC-DC converter of the kind
used between a fuel cell and a DC bus. The converter is an **output-series
interleaved boost converter (OS-IBC)**: two boost legs driven 180 degrees
apart, with their output capacitors in series. Each leg uses one SiC power
module, a MOSFET plus a Schottky diode. Every 200 ns of simulated time (10
clocks at 50 MHz) the core does three things:

1. It solves the converter's circuit: inductor currents, capacitor voltages,
   and the voltage and current of every semiconductor.
2. It estimates the conduction and switching losses of each device from
   lookup tables, using interpolation.
3. It advances a thermal RC network per power module. This gives the
   junction temperatures, which feed back into the loss lookup of the next
   step.

The main idea is to keep all costly work offline. The circuit solution for
each switch configuration is folded into a precomputed state-space matrix.
The device characteristics (on-state voltage, switching energy) sit in
tables that are only interpolated. The thermal network is reduced to two
constant matrices. At run time only multiply-adds, comparisons and table
reads are left, and they fit in one 10-clock time step.

The method follows a published design, the LUT-based electro-thermal model
of an OS-IBC on a NI FlexRIO (Kintex-7) platform. The RTL, its number
formats, its table layout and its load interface are this implementation's
own; see "Where this design departs" below.

## The converter being simulated

Nodes U1..U4, with ground at the input's negative terminal:

| element | between | notes |
|---|---|---|
| L1 | vin -> U1 | current iL1 |
| S1 (MOSFET) | U1 -> ground | |
| D1 (diode) | U1 -> U2 | anode at U1 |
| C1 | U2 - U3 | vC1 = U2 - U3 |
| L2 | vin -> U3 | current iL2 |
| S2 (MOSFET) | U3 -> ground | |
| C2 | U3 - U4 | vC2 = U3 - U4 |
| D2 (diode) | U4 -> ground | carries iL2 and the current of D1 |
| R (load) | U2 - U4 | output voltage vC1 + vC2 |

Reference values: vin = 120 V, L1 = L2 = 400 uH, C1 = C2 = 470 uF,
R = 10 ohm, PWM at 50 kHz, Rg_on = 3.3 ohm, Rg_off = 3.9 ohm. At duty 0.6
the output is 2 vin / (1 - D) = 600 V (36 kW), with 150 A in each inductor
and 300 V on each capacitor.

Inductors and capacitors are replaced by backward-Euler companion models:
a conductance g_L = h/L or g_C = C/h in parallel with a current source from
the previous step. Switches are binary resistors: g_on = 1000 S when on and
g_off = 0 S when off.

## Switch cases and the nine A matrices

`switch_state_id` decides once per step which devices conduct:

* S1 is on when u1 = 1. Otherwise D1 is on if iL1(t-h) > 0, and both are
  off if not.
* S2 is on when u2 = 1. Otherwise D2 is on if iL2(t-h) > 0 **or**
  iL1(t-h) > 0, and both are off if not. D2 also carries D1's current.

Each module is therefore in one of three states: 0 = MOSFET on, 1 = diode
on, 2 = both off. The pair gives `case_idx = 3*m1 + m2`, a value from 0 to 8.
Under these rules case 5 (D1 on while S2 and D2 are off) cannot occur. Its
table slot exists but is never read. In continuous conduction at duty > 0.5
only cases 0, 1 and 3 occur; at duty < 0.5, case 4 (both diodes on)
replaces case 0.

For each case the host computes, offline,

    Y U = C [x(t-h); vin],   x = [iL1 iL2 vC1 vC2]
    x(t) = D [x(t-h); vin] + E U   =>   A = D + E Y^-1 C   (4 x 5)

with

    Y = | gL1+g1+g2   -g2            0                  0          |
        | -g2         g+gC1+g2      -gC1               -g          |
        | 0           -gC1           gC1+gL2+g3+gC2    -gC2        |
        | 0           -g            -gC2                gC2+g+g4   |

    C rows (over iL1 iL2 vC1 vC2 vin):
        [1 0 0 0 gL1], [0 0 gC1 0 0], [0 1 -gC1 gC2 gL2], [0 0 0 -gC2 0]

    iL1(t) = iL1 + gL1 (vin - U1),  iL2(t) = iL2 + gL2 (vin - U3),
    vC1(t) = U2 - U3,               vC2(t) = U3 - U4

Here g = 1/R, and g1..g4 are the conductances of S1, D1, S2 and D2 in that
case. `tb/ets_tb_pkg.sv` (`build_a`) does exactly this, in double precision.

After the state update, `device_vi` recovers the device quantities:

    vDS_k = vin - (iL_k(t) - iL_k(t-h)) * L_k/h
    iD_k  = vDS_k * g(S_k)
    iF1   = iL1 - iD1,   iF2 = iL2 - iD2 + iF1

The ideal-switch model makes these vDS values useless as on-state voltages.
They are used only as blocking voltages and to derive currents. The on-state
voltage comes from the tables.

## One time step, cycle by cycle

`step_sequencer` counts 0..II-1 (II = 10) and strobes one pipeline stage per
cycle:

| cycle | strobe | work |
|---|---|---|
| 0 | `ssi` | sample u(t), vin(t); identify switch states, case index |
| 1 | `a_rd` | read A(case) |
| 2 | `eq7` | x(t) = A [x(t-h) vin], keep iL(t-h) |
| 3 | `eq8` | vDS, iD, iF |
| 4 | `axis` | switching-event detection; table cell and fraction for every lookup |
| 5 | `lut_rd` | read 8 corners (3D) and 4 corners (2D, twice) per module |
| 6 | `interp` | trilinear / bilinear interpolation |
| 7 | `ploss` | P_sw = M v, P_cond = v_on \|i\|, totals |
| 8 | `therm` | T(t) = F T(t-h) + G [Ps Pd Tamb]; shift u, iD, vDS into history |
| 9 | – | `valid` high, results stable |

This gives a latency of 9 clocks and one result every 10 clocks, which is
real time for h = 200 ns at 50 MHz. Results are held until the next step's
stage rewrites them. The loss lookups use the junction temperatures of the
previous step, which is the thermal feedback loop.

## Loss lookups

**Conduction.** Each module has two 2D tables (`lut2d_bilinear`): the MOSFET
drain-source drop v_DS(Tj, i) and the diode forward drop v_F(Tj, i). The
loss is v_on(Tj, |i|) * |i|. It applies only while the identified state says
the device conducts.

**Switching.** The 3D table (`lut3d_trilinear`) holds
M = E(Tj, Rg, iD) / (h * v_const), where E is the switching energy measured
at reference voltage v_const. It has two planes, Mon and Moff. The
`switch_event_sel` block compares u(t) with u(t-h):

* turn-on: P = Mon(Tj, Rg_on, iD(t)) * vDS(t-h)
* turn-off: P = Moff(Tj, Rg_off, iD(t-h)) * vDS(t)

The whole energy is charged in the one step of the event. The Schottky
diodes have no switching loss.

**Axes.** Every axis is uniform. The host gives its origin and the
*reciprocal* of its spacing, so `lut_axis` finds a cell with one multiply:
pos = (x - x0) * inv_step, clamped to [0, N-1]. The integer part is the
cell and the remainder is the fraction. Interpolation runs along current
first, then gate resistance, then temperature, as in the usual nested
linear formula. The default grids are 2 temperatures x 16 currents (2D) and
2 x 4 gate resistances x 16 currents per plane (3D). They are parameters of
the core (`LUT_NT`, `LUT_NR`, `LUT_NI`).

## Thermal network

Each power module has a 7-node Cauer ladder:

* MOSFET nodes 1-2-3 and diode nodes 4-5-6, each with three RC sections
  (Rth = 0.045, 0.041, 0.046 K/W; Cth = 0.283, 0.918, 0.414 J/K).
* Both ladders join at node 7, the case / heat-sink node (0.1 J/K), which
  connects to ambient through 0.01 K/W.
* Losses are injected at nodes 1 and 4.

Backward Euler gives

    C dT/dt = -K T + B [Ps Pd Tamb]
    F = (I + h C^-1 K)^-1,   G = F h C^-1 B      (7x7 and 7x3)

`thermal_model` stores [F G] as one 7x10 matrix and updates all seven nodes
with one parallel matrix-vector product. Node 1 is Tj of the MOSFET, node 4
is Tj of the diode. A reset loads `t_amb` into every node.

## Number format

All words are 40-bit two's complement (`ets_pkg`):

| kind | fraction bits | range | resolution | used for |
|---|---|---|---|---|
| data `fx_t` | 22 | +-131072 | 2.4e-7 | V, A, C, W, table contents, axis origins |
| coefficient `coef_t` | 36 | +-8 | 1.5e-11 | A, F, G entries, reciprocal spacings |
| thermal state (inside `thermal_model`) | 30 | +-512 | 9.3e-10 | node temperatures |

The coefficient format is sized for the thermal input gains (h/C is about
7e-7). The data range is sized for the per-step switching power E/h, which
reaches tens of kW.

The thermal nodes keep 8 extra fraction bits. Near equilibrium the slow
nodes change by less than a data LSB per step, and at 22 bits such changes
would be lost, putting the temperatures off by about 1e-3 K after 0.1 s.
The losses and the ambient temperature are widened to that scale before the
product. `matvec` takes the vector width as a parameter for this.

Matrix products (`matvec`) sum at full width and round once per row. This
keeps the million-step state recursions free of rounding drift. All other
products truncate. Nothing saturates, so the host must keep tables and
operating points in range.

One consequence needs care. iD of a conducting MOSFET is
(vin - dI * L/h) * g_on, which amplifies the current LSB by
L/h * g_on = 2e6. The iD error is then about 0.5 A, a fraction of a
percent at 150 A. The inductor currents and capacitor voltages are much
more accurate: within 0.02 of a double-precision model after 1,000,000
steps.

## Loading and interface

The host loads everything through one write port, `wr` (a `cfg_wr_t`
struct: `we`, `tgt`, `pm`, `addr`, `data`). Write it before raising `run`:

| tgt | pm | addr | content |
|---|---|---|---|
| `CFG_A` | – | case*20 + row*5 + col | A matrices (coefficient format) |
| `CFG_TH` | 0/1 | row*10 + col | [F G] of power module pm |
| `CFG_M` | 0/1 | ((plane*NT + t)*NR + r)*NI + i | Mon (plane 0) / Moff (plane 1) |
| `CFG_M` | 0/1 | 0x800 + 0..5 | T origin, T 1/step, Rg origin, Rg 1/step, I origin, I 1/step |
| `CFG_VS`, `CFG_VD` | 0/1 | t*NI + i | MOSFET / diode on-state voltage |
| `CFG_VS`, `CFG_VD` | 0/1 | 0x800 + 0..3 | T origin, T 1/step, I origin, I 1/step |

Power module 0 is S1/D1 and module 1 is S2/D2.

Ports of `osibc_ets_core`:

* Inputs: `clk`, `rst` (synchronous), `run`, `wr`, `u[1:0]`, `vin`,
  `rg_on`, `rg_off`, `t_amb`.
* Outputs:
  * state: `x[4]` (iL1, iL2, vC1, vC2)
  * device quantities: `vds[2]`, `id[2]`, `if_[2]`
  * switch states: `sw_state[2]`, `case_idx`
  * losses: `p_sw[2]`, `p_cs[2]`, `p_cd[2]`, `p_s[2]`, `p_d[2]`
  * switching events: `ev_on[1:0]`, `ev_off[1:0]`
  * temperatures: `tj_s[2]`, `tj_d[2]`, `t_node[2][7]`
  * step control: `step_start`, `valid`, `step_count`

Parameters: `II`, `L1_H`, `L2_H`, `H_S`, `G_ON`, `G_OFF` and the table sizes.
L/h, g_on and g_off enter the device equations directly. They must match the
values used to build the A matrices.

## Verification

Each module has a self-checking testbench in `tb/`. Each compares against
values computed in double precision by `tb/ets_tb_pkg.sv`, a package that
builds the A, F and G matrices and example device tables:

* on-state voltages linear-plus-quadratic in current;
* switching energies quadratic in current and linear in Rg and Tj;
* all shaped like datasheet data, but **not** data of a real device.

The main runs:

* `tb_osibc_ets_core`: 8000 steps from rest, at duty 0.6 then duty 0.3.
  It compares every step against a real-valued model: electrical state,
  device quantities, losses and all 14 thermal nodes. It checks the 10-clock
  step period and the 9-clock latency. It requires every reachable switch
  case, turn-on and turn-off of both MOSFETs, diode conduction and heating
  of all four junctions.
* `tb_osibc_workload`: 0.2 s of simulated time (1,000,000 steps, 10 million
  clocks) at duty 0.6 with the default parameters, checked the same way.
  At the end each inductor must average 150 A and each capacitor 300 V
  (within 3%), and S2 must end hotter than S1. The last two conditions match
  the behaviour expected of this converter, whose asymmetry puts more
  current stress on S2. It takes about 3 minutes under verilator.

To simulate, for example the end-to-end test:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
        rtl/ets_pkg.sv tb/ets_tb_pkg.sv tb/tb_osibc_ets_core.sv \
        --top-module tb_osibc_ets_core
    ./obj_dir/Vtb_osibc_ets_core

Each testbench ends by printing `TB_RESULT checks=N failures=M`.

## Where this design departs or chooses for itself

* **Fixed-point split, rounding and wrap-around** are chosen here. The
  original fixes only the 40-bit word.
* **Stage-to-cycle assignment** is chosen here. II = 10 and the 9-clock
  latency are kept.
* **D2 commutation rule.** The rule "u2 = 0 and (iL2 > 0 or iL1 > 0)" is
  this design's reading of the original state diagram. With it only 8 of
  the 9 stored cases are reachable.
* **Tables.** The grids are uniform, with one reciprocal spacing per axis,
  and inputs are clamped at the table edges. Grid sizes are chosen here,
  since the original gives none. Mon and Moff share one memory with a plane
  bit.
* **Conduction loss** uses |i| and is gated by the identified device state.
* **Reset and loading.** A reset zeroes the electrical state and puts all
  thermal nodes at ambient. The host write port and its address map are
  chosen here; the original loads its tables from its host environment,
  which is not part of this RTL.
* **Heat-sink capacitance** is taken as 0.1 J/K.
* **Memories** are plain arrays with several simultaneous reads: 8 corners
  for the 3D table and 20 or 70 coefficients for the matrices. A synthesis
  flow maps them to registers or LUT-RAM, not block RAM. Resource figures
  of the original implementation (about 23k slices, 430 DSP48, 121 BRAM on
  an XC7K410T) were not targeted.
* **Example data only.** The testbenches use invented device tables, so the
  absolute junction temperatures they produce are not those of a real SiC
  module.

## Files

`rtl/`:

* `ets_pkg.sv`: types, formats, config targets, stage strobes
* `switch_state_id.sv`: commutation rules, case index
* `coef_a_lut.sv`: the nine A matrices
* `matvec.sv`: parallel matrix-vector product (4x5 and 7x10)
* `device_vi.sv`: vDS, iD, iF
* `electrical_solver.sv`: cycles 0-3
* `switch_event_sel.sv`: turn-on/turn-off operand selection
* `lut_axis.sv`: cell and fraction on a uniform axis
* `lut2d_bilinear.sv`, `lut3d_trilinear.sv`: tables with interpolation
* `power_loss.sv`: losses of one power module, cycles 4-7
* `thermal_model.sv`: Cauer network, cycle 8
* `step_sequencer.sv`: cycle counter and strobes
* `osibc_ets_core.sv`: the top

`tb/`: `ets_tb_pkg.sv` (reference models and load data) and one `tb_<module>.sv`
per module, plus `tb_osibc_workload.sv`.
