# Coarse-fine digital LDO regulator with an auxiliary power stage

A digital low-dropout regulator (D-LDO) keeps its output at a reference
voltage. It does this by switching identical PMOS transistors on or off between
the input supply and the output. A comparator decides on every clock whether
more or less current is needed, and a shift register holds the on/off pattern.
That loop is simple and stable, but after a large load step it rings. Take a
light-to-heavy step. While the output sags, the loop keeps adding switches.
When the output has recovered to the reference, the array is delivering about
twice the load current, so the output overshoots. The loop then swings back
the other way, and this repeats several times before it settles.

This design keeps the usual coarse-fine arrangement: a fast coarse loop for
large excursions and a slow fine loop for steady state. It adds two things:

* **An auxiliary power stage.** During an undershoot, a second array of large
  switches is filled up in lockstep with the coarse array, so current rises
  twice as fast. When the output climbs back into the regulation window, the
  whole auxiliary array turns off in one step. That removes the excess current
  at the moment the loop would otherwise overshoot. What remains, the coarse
  array, roughly matches the load.
* **Comparators that report when they are done.** Each comparator has a DONE
  output, and DONE clocks the shift register. The array therefore changes as
  soon as a decision exists, not one clock later, which keeps the steady-state
  ripple small. The coarse-loop comparators also clock themselves: when both
  have finished, they are reset and start again. This gives a fast
  asynchronous clock without a high-frequency oscillator.

The RTL follows the regulator published as *"Low-ripple coarse-fine digital
low-dropout regulator without ringing in the transient state"* (65 nm, 1.2 V
in, 0.5 to 1.0 V out, 100 mA, 1 nF on-chip capacitor). The control logic is
synthesizable SystemVerilog. Comparators, power switches and the output
capacitor are behavioural models with real-valued ports, so the whole
regulator can be simulated in closed loop with Verilator.

## Block structure

```
                 V_REF_H  V_REF_L
                    |        |
  V_OUT ----+--> peak_detector (CMP2, CMP3) --cmp_h/done_h, cmp_l/done_l--+
            |          ^                                                   |
            |          +------------- clk_self_fast ----------------+      v
            |                                                digital_controller
            |                                     set_aux,clk_aux | inc,clk_coarse | rst_half, clk_f_cmp
            |                                                     v        v               v
            |                                                 aux_sr  coarse_bisr       fine_bisr
            |                                                     |        |               ^   |
            +--> done_comparator CMP1 (V_REF) --cmp_f, done_f-----|--------|---------------+   |
            |                                                     v        v                   v
            |                                        pmos_array x16  pmos_array x16     pmos_array x1
            |                                                     \        |                  /
            +<--------------------------- output_node (C_OUT = 1 nF) <---- I_OUT -----------+
                                                     ^
                                                  I_LOAD
```

| Module | Kind | Role |
|---|---|---|
| `dldo_pkg` | package | array size, unit currents, capacitor, comparator delays |
| `aux_sr` | RTL | 32-stage shift register of the auxiliary array; asynchronous set = all off |
| `coarse_bisr` | RTL | 32-stage coarse register: +1 switch (INC=1) or −2 switches (INC=0) per clock |
| `fine_bisr` | RTL | 32-stage fine register: ±1 switch per DONE_F; asynchronous half-scale preset |
| `digital_controller` | RTL | mode decoding, INC latch, clock gating, self-clock gate |
| `done_comparator` | model | clocked comparator with latched output and DONE |
| `peak_detector` | model | CMP2 (V_OUT > V_REF_H) and CMP3 (V_OUT < V_REF_L) |
| `pmos_array` | model | 32 PMOS switches, current per switch depends on dropout |
| `output_node` | model | 1 nF output capacitor, Euler-integrated |
| `dldo_top` | model (mixed) | the complete regulator core with its output node |

All arrays use a thermometer code on active-low gates. Bit `i-1` drives
switch `i`, a `0` turns it on, and the switches that are on always form a run
of zeros starting at bit 0. A coarse or auxiliary switch carries 16 times the
current of a fine switch. The full fine array (32 units) is therefore worth
two coarse switches, and at half scale it is worth one.

## The two modes

The regulation window is V_REF ± 15 mV, set by the V_REF_H and V_REF_L
inputs.

**Fine mode** applies while both window comparators report "inside":

* `fine_en = 1`, and CMP1 is clocked by the 50 MHz `clk_slow`.
* Every DONE_F edge moves the fine array by one switch. The direction is
  `cmp_f`, which is 1 when V_OUT is below V_REF.
* The coarse array is frozen, and the auxiliary array is held off by
  `set_aux`.

**Coarse mode** applies as soon as CMP2 or CMP3 flags an excursion:

* `fine_en` falls, which stops CMP1's clock. `rst_half` holds the fine array
  at exactly half scale for as long as coarse mode lasts.
* Each fast comparison that reports the excursion gives one `clk_coarse` edge.
  The INC latch remembers the direction of the last excursion: CMP_L sets it,
  CMP_H clears it.
* **Undershoot** (INC = 1): each comparison adds one coarse switch. `set_aux`
  is released, so `clk_aux` also adds one auxiliary switch. Current rises by
  two large switches per fast cycle.
* **Overshoot** (INC = 0): each comparison removes two coarse switches. The
  auxiliary array stays off.

**Leaving coarse mode** is the key event. When V_OUT re-enters the window from
below, CMP_L clears:

* `set_aux` rises and asynchronously empties the auxiliary array. This drops
  the output current by roughly half, to about the load current.
* `fine_en` rises and the fine array starts from half scale. The leftover
  mismatch is at most one coarse step, and the half-scale fine array can
  correct up to one coarse step in either direction. So the fine loop can
  absorb it without another trip into coarse mode.

After a heavy-to-light step, the loop sheds current quickly by removing two
coarse switches per cycle. It can then undershoot once, and that undershoot is
handled as above.

## The asynchronous self clock

`clk_self_fast = NOT (done_h AND done_l)`. While it is high, CMP2 and CMP3
evaluate. Once both have raised DONE, the clock falls. That precharges both
comparators, their DONE outputs fall, and the clock rises again. The loop
period is set by the comparator delays: with the model's 200 ps decision,
10 ps DONE and 150 ps reset delays it runs at about 2.7 GHz. No edge of this
clock is synchronous to `clk_slow`. The two loops only interact through
`fine_en`, which gates the slow clock, and through the asynchronous
`rst_half` and `set_aux` presets.

The controller's clocks are combinational functions of the comparator outputs:
`clk_coarse = cmp_h&done_h | cmp_l&done_l` and `clk_aux = cmp_l&done_l`. They
only work because each comparator settles its output before raising DONE. The
comparator model keeps that order (`T_DONE` after the decision). Any
implementation of the comparators must keep it as well.

## Timing summary

| Path | Timing |
|---|---|
| fine loop | one fine step per 20 ns (`clk_slow` 50 MHz), applied `T_CMP + T_DONE` after the rising clock edge |
| coarse/aux loop | one step per self-clock cycle, about 360 ps with the default model delays |
| mode entry | combinational from CMP_H/CMP_L; `rst_half` and `set_aux` act asynchronously |
| auxiliary release | asynchronous, same time as CMP_L falls |

## Simulated behaviour

These results come from `tb_dldo_top`, at the default size, with V_IN 1.2 V,
V_REF 1.0 V and a window of ±15 mV. The load is resistive: 100 Ω, with
11.1 Ω switched in parallel over a 20 ns ramp.

| Event | Auxiliary stage | Peak deviation | Coarse mode ends after | INC reversals |
|---|---|---|---|---|
| start-up 0 → 1.0 V at 10 mA | on | first fine-mode entry after 9 ns; steady ripple 4.3 mV | — | — |
| 10 → 100 mA | on | −19 mV | 21 ns | 0 |
| 100 → 10 mA | on | +17 mV | 27 ns | 2 |
| 10 → 100 mA | off | −27 mV | 21 ns | 0 |
| 100 → 10 mA | off | +17 mV | 45 ns | 5 |

With the auxiliary stage, the undershoot is smaller and the recovery after the
heavy-to-light step has fewer direction reversals, which is the effect the
auxiliary stage is meant to have.

The testbench also measures the auxiliary release. Start-up is excluded. At
each release, I_OUT lands within 1.2 coarse steps of I_LOAD, and the mean
I_OUT/I_LOAD just after release is 0.97. In fine mode, each fine step lands
exactly one comparison delay (210 ps) after its `clk_slow` edge, once per
cycle.

`tb_dldo_vout05` runs the same load steps at a 0.5 V output. The light-to-heavy
step behaves as at 1.0 V. The heavy-to-light step reverses direction about 20
times before it settles, after about 200 ns.

These results come from an idealised closed-loop model. Do not compare them
with silicon measurements. The absolute numbers depend on the switch model and
on the comparator delays, and both were chosen for this design (see below).

## What is specified and what is chosen

These points follow the published design:

* the array sizes (32/32/32);
* the 16:1 unit ratio;
* the shift-register structures: single-step auxiliary register with a set;
  coarse register that steps +1 or −2; fine register that steps ±1 with a
  half-scale preset;
* the signal set of the controller and its mode behaviour;
* the self-clock principle;
* the 50 MHz fine clock, the ±15 mV window, the 1 nF capacitor, and the
  1.2 V / 1.0 V operating point.

These are this design's own choices:

* **Controller gates.** The gate types are written from the described
  behaviour. The self-clock gate is a NAND, so it rises again as soon as
  either DONE falls.
* **AUX_EN.** This enable switches the auxiliary stage on or off. It gates
  `clk_aux` and forces `set_aux`.
* **Power-on reset `rst`.** It clears the coarse and auxiliary arrays and
  presets the fine array to half scale.
* **Fine-register half preset.** Stages 1 to 16 are reset (switches on) and
  stages 17 to 32 are set (off).
* **Comparator model.** The delays are 200 / 10 / 150 ps, and there is no
  hysteresis.
* **Unit current.** 3.125 mA per coarse switch, so that 32 coarse switches
  give the 100 mA maximum at 0.2 V dropout.
* **Switch model.** Current is linear in dropout up to 0.3 V and flat above
  that. An ideal current-source model was rejected. At 10 mA it puts the loop
  into a limit cycle, because a one-coarse-step mismatch moves 1 nF by tens of
  millivolts per fine clock.
* **Output-node integration step.** 5 ps.

## Known limitations

* **Saturated fine array at heavy load.** After the 10 → 100 mA step, coarse
  mode can end one coarse switch short while V_OUT is already back in the
  window. The fine array then saturates at full scale. V_OUT sits inside the
  window (about 5 mV low) but is no longer trimmed to V_REF. This is the
  regulation-compensation case of coarse-fine LDOs. The half-scale preset
  makes it less likely but does not rule it out.
* **Limit cycle at 0.5 V output.** At large dropout the switch model is
  saturated, so the output node has little self-limiting. The fine loop then
  needs several coarse episodes to settle after a heavy-to-light step, and
  with the auxiliary stage disabled it falls into a limit cycle.
* **Behavioural models.** The models cover only the analog function.
  Headroom effects, comparator offset and noise, and supply coupling are not
  modelled.
* **Conventional baseline.** The shared-clock conventional D-LDO that was used
  for the ripple comparison is not included.

## Simulating

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and
stops itself with a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dldo_top \
          -y rtl -y tb rtl/dldo_pkg.sv tb/tb_dldo_top.sv -o sim
./obj_dir/sim
```

Replace `tb_dldo_top` with any other testbench in `tb/`:

| Testbench | What it does |
|---|---|
| `tb_aux_sr` | unit check of the auxiliary register |
| `tb_coarse_bisr` | unit check of the coarse register |
| `tb_fine_bisr` | unit check of the fine register |
| `tb_digital_controller` | unit check of the controller |
| `tb_done_comparator` | unit check of the comparator model |
| `tb_peak_detector` | unit check of the window detector, with the self-clock loop closed |
| `tb_pmos_array` | unit check of the switch model |
| `tb_output_node` | unit check of the capacitor model |
| `tb_dldo_top` | start-up, both load steps with and without the auxiliary stage, and a count of every mechanism (coarse +1 and −2, auxiliary fill and release, half reset, fine steps both ways, fine-mode re-entry, self-clock cycles) |
| `tb_dldo_vout05` | the 0.5 V output case |

The full-regulator benches simulate 20 µs in about 2 s.

`dldo_top` carries two concurrent assertions, checked on `clk_slow`:

* the auxiliary array is empty in fine mode;
* the fine array is at half scale in coarse mode.

To change the operating point, edit `dldo_pkg`: unit currents, capacitor,
saturation voltage, comparator delays. Array sizes are the `N` parameter of
each register and of `dldo_top`. The control logic is written for any even
`N` ≥ 4. Only `digital_controller` and the three shift registers are meant for
synthesis. Note that the INC latch is a real level-sensitive latch, and the
registers are clocked by comparator DONE signals rather than by a clock tree.
