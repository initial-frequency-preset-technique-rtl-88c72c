# Fast-locking fractional-N PLL with on-chip initial frequency preset

A PLL's lock time grows with the logarithm of how far the VCO starts from
its final frequency. This design shortens the lock of a 4.3-5.3 GHz
delta-sigma fractional-N synthesizer (40 MHz reference, 50 kHz loop
bandwidth) by starting the loop with the VCO almost on frequency. It does not
trust the designed VCO gain: before the loop closes, it measures the VCO on
chip at two tuning voltages. It then places the tuning voltage for the target
by straight-line interpolation, precharges the loop filter to that voltage,
and only then closes the loop. The loop starts in phase with the reference.

```
           f_L, f_H measured by counting            V_target = V_L + (f_t - f_L)/(f_H - f_L) * (V_H - V_L)
  V_tune --> VCO --> FDC --> registers --> V_target calculator --> 10-bit DAC --> precharger --> loop filter
     ^                                                                                            |
     +---------- V_tune controller (V_L, V_H, V_target) ----------------------- S5 (closed loop) -+
```

The digital half (the frequency counter, registers, interpolator, sequencer,
the EN flip-flop, the feedback divider, the MASH 1-1-1 modulator and the PFD)
is synthesizable SystemVerilog. The analog half (the VCO, DAC, precharger,
V_tune controller, charge pump and the switched loop filter) is written as
behavioural models with `real` signals. With them, the whole synthesizer
can be simulated from start-up to lock.

## The preset sequence

All of the preset is open loop and runs on the 40 MHz reference. The
switches are named as in the loop filter drawing: S1 connects the precharger
to the loop-filter node V_LF, S2 the V_tune controller to the VCO, S3 shorts
the series resistor R1, S4 connects the charge pump and S5 the filter to the
VCO.

| step | switches closed | V_tune | length (reference cycles) |
|---|---|---|---|
| SET_L | S2 | V_L | SETTLE = 4 |
| MEAS_L | S2 | V_L | k_IFP (FDC gate open) |
| READ_L | S2 | V_L | READ_WAIT = 2, then count stored as `cnt_l` |
| SET_H, MEAS_H, READ_H | S2 | V_H | the same, giving `cnt_h` |
| CALC | S2 | V_H | 1 + 13 (interpolation) + 2 |
| CHARGE | S1, S2, S3 | V_target | k_charge |
| LOCK | S4, S5 | loop | Flag = 1 |

From the edge that samples `start`, Flag rises after
`1 + 2*(SETTLE + k_IFP + READ_WAIT) + 16 + k_charge` cycles. With the
intended `k_IFP = 64` and `k_charge = 80`, that is 237 cycles (5.9 us). One
reference edge later the EN flip-flop raises EN. EN starts the PFD, charge
pump, divider and modulator together.

During CHARGE the precharger drives the whole filter capacitance (R1 is
shorted) to the DAC voltage. The V_tune controller meanwhile holds the VCO at
the same voltage. When the loop closes, V_LF and V_tune are already equal, so
closing the switches causes no jump.

A new `start` while locked runs the sequence again; Flag and EN drop at once.

## Measuring the VCO: the FDC

`fdc` counts VCO cycles, on the VCO clock itself, while the sequencer's gate
is high. The gate is high for exactly k_IFP reference periods, so the count is
`k_IFP * f_VCO / f_REF`. That is the frequency in units of `f_REF / k_IFP`:
0.625 MHz for k_IFP = 64.

The gate crosses into the VCO domain through two flip-flops. Opening and
closing are delayed alike, so the window length is exact to within one VCO
cycle. The count is read two reference cycles after the gate closes, when it
is static. The worst-case frequency error of such a count is
`1.5 * f_REF / k_IFP`: 0.94 MHz at k_IFP = 64, and below 1 MHz for
k_IFP > 60.

## Computing V_target

The target is given as the division ratio `N_target = f_target / f_REF` in
unsigned 8.20 fixed point. The 20 fraction bits are the modulator's
resolution. At the start of a run the register block forms `kN = k_IFP *
N_target`, which is the target in FDC units (37 bits, 20 of them
fractional). `vtarget_calc` then evaluates

```
P = (kN - cnt_l * 2^20) * (V_H - V_L)        signed
D = (cnt_h - cnt_l) * 2^20
V_target = V_L + sign(P) * round(|P| / D)
```

It uses a restoring divider that produces `floor(2|P|/D)` one bit per cycle
(12 bits), followed by a rounding step: 13 cycles in all. All voltages are
10-bit DAC codes (`code / 1024` volts). Targets outside V_L..V_H are
extrapolated. Results outside 0..1023 clamp and raise `calc_sat`. If
`cnt_h <= cnt_l` (no usable slope), the result is V_L and `calc_err` is
raised.

Two error sources remain, and the tests check both. The first is the count
error above, scaled by the interpolation. The second is the bow of the real
tuning curve between V_L and V_H. The model uses a 1 MHz bow. The design
target keeps the bow under 1.25 MHz.

## Closing the loop in phase

Flag goes through a D flip-flop clocked by f_REF to become EN, so EN rises on
a reference edge. While EN is low:

- the divider holds its counter at `n_int - 1` with its output low;
- the modulator is cleared;
- the PFD flip-flops are held clear.

The reference edge that raises EN is therefore not seen by the PFD. The
divider's first output edge comes exactly `n_int` VCO cycles later, almost on
top of the next reference edge. What is left is the unknown VCO phase (up to
one VCO period) and the gap between `n_int` and the fractional ratio (up to
half a period). At 4.3 GHz that is at most `360 * 1.5 * T_VCO / T_REF`, about
5 degrees. In simulation the first edges are 3-4 degrees apart.

## Blocks

| module | kind | what it is |
|---|---|---|
| `ifp_pll_top` | model (top) | whole synthesizer, digital blocks plus analog models |
| `ifp_digital` | RTL | preset circuit: FDC, registers, calculator, sequencer |
| `fdc` | RTL | VCO-clocked counter with synchronized gate |
| `ifp_registers` | RTL | `cnt_l`, `cnt_h`, `k_IFP*N_target`, V_L/V_H codes |
| `vtarget_calc` | RTL | fixed-point interpolation with a sequential divider |
| `timing_ctrl` | RTL | preset sequencer, switch control, Flag |
| `en_sync` | RTL | Flag-to-EN flip-flop on f_REF |
| `dsm_mash111` | RTL | 20-bit MASH 1-1-1, output -3..+4, clocked by f_DIV |
| `fb_divider` | RTL | divide by `n_int + y`, VCO clocked, held while EN is low |
| `pfd` | RTL | tri-state PFD with EN clear |
| `charge_pump` | model | 100 uA pump; output is cumulative charge, integrated exactly from the UP/DN edge times |
| `loop_filter` | model | third-order passive filter R1, C1, C2, R3, C3 with S1..S5 |
| `precharger` | model | rail-to-rail follower as a current-limited transconductor |
| `dac_r2r` | model | 10-bit DAC, `code/1024` V plus a 0.5 LSB mid-scale bow |
| `vtune_ctrl` | model | drives V_tune with V_L, V_H or V_target |
| `vco` | model | 64 straight tuning curves plus a 1 MHz bow |
| `ifp_pkg` | package | widths, `switches_t`, `vsel_e` |

The top's ports:

- inputs: `k_ifp`, `k_charge` (9 bits each), `n_target` (28 bits),
  `vl_code`, `vh_code` and `cap_code`;
- outputs: the clocks, Flag and EN, the counts, the code, the switch state,
  and the analog node voltages as `real`.

The 6-bit `cap_code` is the VCO band. In a full synthesizer a coarse band
calibration picks it before the preset runs; that calibration is not part of
this RTL, so the code is an input.

## Values this implementation chose

These numbers are not fixed by the technique. Change them with the
parameters named below.

- **V_L, V_H**: 307 and 717 (0.3 V and 0.7 V), the ends of the useful tuning
  range. They are ports.
- **Settling and read waits**: `SETTLE = 4` and `READ_WAIT = 2` reference
  cycles (`timing_ctrl` parameters).
- **k_charge**: the precharge length in reference periods. The default run
  uses 80 (2 us).
- **VCO model**: `F0 = 4288 MHz` and 15.625 MHz per code (1 GHz over 64
  codes). The gain is `K_VCO = 40 MHz/V`, the value assumed in the loop
  design, not a measured silicon value.
- **Loop filter**: R1 = 10 k, C1 = 1.27 nF, C2 = 0.1 nF, R3 = 1 k, C3 = 20 pF.
  - These give a 50 kHz bandwidth with I_CP = 100 uA and N of about 127: the
    zero is at 12.5 kHz and the poles near 170 kHz and 8 MHz.
  - A larger filter (C1 + C2 = 2.3 nF, a realistic precharger load) was
    tried. Its 8 kHz zero left a slow tail, and the 40 ppm lock took
    10.7 us instead of 5.6 us.
- **Precharger**: 50 mS and 3 mA. It settles 2.3 nF to within 1 mV of 0.9 V
  in 0.83 us.
- **PFD**: zero reset delay, so the PFD has no dead-zone model. **Charge
  pump**: perfect current matching (`MISMATCH = 0`).
- **Divider**: EN is sampled by the VCO clock directly. The hold-while-low
  behaviour gives the phase alignment above. A silicon divider needs care
  with metastability here.
- **V_tune during the precharge**: the controller holds V_tune at V_target,
  so the VCO already runs near the target while V_LF charges.

## Simulation results (default parameters)

`tb_ifp_pll_top` runs two start-ups, at 5100 MHz and then 4425 MHz. The
second start is issued while the loop is locked.

| | 5100 MHz (band 51) | 4425 MHz (band 7) |
|---|---|---|
| `cnt_l` / `cnt_h` | 8155 / 8181 | 7055 / 7081 |
| V_target code | 386 (0.377 V) | 701 (0.685 V) |
| frequency after preset | +0.60 MHz | -0.08 MHz |
| first f_DIV vs f_REF edge | -3.8 degrees | -3.4 degrees |
| 40 ppm lock after EN | 5.6 us | already inside 40 ppm |

Adding the 5.9 us preset gives about 11.5 us from `start` to lock at
5100 MHz. With the loop filter models used here, the settling is only
indicative.

`tb_lock_time_sweep` shows why the preset is worth doing. It builds only the
closed loop at 4880 MHz (K_VCO 40 MHz/V, I_CP 100 uA, 50 kHz bandwidth). The
precharger starts the VCO a set number of MHz above target. A phase error is
made by delaying EN at the divider.

| initial error | lock time (40 ppm, from EN) |
|---|---|
| 0 MHz, 0 degrees | 0 us |
| 1 MHz | 8.2 us |
| 2.5 MHz | 17.3 us |
| 5 MHz | 24.2 us |
| 10 MHz | 31.6 us |
| 2.5 MHz, 10 degrees | 18.5 us |
| 0 MHz, 90 degrees | 20.5 us |

Lock stays under 20 us for errors up to 2.5 MHz and 10 degrees. Coarse
calibration alone leaves up to about 8 MHz of error, which costs well over
20 us.

## Running it

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and ends the simulation. Example with plain
Verilator:

```
verilator --binary --timing --assert --no-sched-zero-delay -Irtl -y rtl \
    rtl/ifp_pkg.sv tb/tb_ifp_pll_top.sv --top tb_ifp_pll_top
./obj_dir/Vtb_ifp_pll_top
```

For any other block, use `tb/tb_<module>.sv` and `--top tb_<module>`.
`--no-sched-zero-delay` tells Verilator that no computed delay is zero. The
VCO and some testbenches compute their delays at run time, and without the
flag Verilator stops on a warning about this.

- All files use `timeunit 1ns; timeprecision 1fs`, because the VCO's half
  period is about 100 ps.
- The full top simulates 41 us in well under a second.
- Verilator is two-state, so everything that is read is reset or
  initialised.

What the block tests cover:

- `tb_fdc`: counts at 4.3-5.3 GHz for k = 1..256;
- `tb_vtarget_calc`: 300 random interpolations against a real-number model,
  plus clamping, the no-slope case and latency;
- `tb_timing_ctrl`: the cycle-exact sequence and switch states;
- `tb_ifp_digital`: the preset circuit with VCO gains of 25-120 MHz/V;
- `tb_dsm_mash111`: the running sum of y against `M * frac / 2^20`;
- `tb_fb_divider`: the period lengths and the first edge after EN;
- `tb_pfd`: pulse widths and the EN behaviour;
- `tb_lock_time_sweep`: closed-loop lock time against the starting
  frequency and phase error (table above);
- the model tests: closed-form results for the loop filter, charge pump,
  precharger, DAC, V_tune controller and VCO.
