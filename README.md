# 14-bit sigma-delta D/A converter: pipelined 6-bit modulator and self-calibrated current cells

This converter turns 14-bit samples into a current. It makes three trades.

- **Oversampling.** A fourth-order digital sigma-delta loop runs at 120 MHz. It cuts every 14-bit word to a 6-bit code and pushes the rounding error out of the 5-MHz signal band (oversampling ratio 12).
- **Linearity from calibration.** The 6-bit code switches 63 identical unit current cells. Their matching is kept by recalibrating each cell against a reference current, not by dynamic element matching, which cannot work at so low an oversampling ratio.
- **Calibration without a gap.** A 64th, spare cell means one cell can always be calibrating. The other 63 carry the signal. The converter never stops for calibration.

The digital part, `sd_dac_core`, is synthesizable SystemVerilog. The current cells are analog, so they appear as behavioural models that work at the level of currents. With them, the whole chain can be simulated from input word to output current.

## Signal path and timing

```
din[13:0] ─► sd_modulator ─► code[5:0] ─► thermometer_encoder ─► therm[62:0] ─► cell_select ─► cell_sw[63:0]  ─► 64 × current_cell ─► iout_p / iout_n
 (120 MHz)   4th order,                   (combinational)                        spare-cell skip,  cell_cal[63:0]      (behavioural)
             bit-sliced                                                          one flip-flop bank
                                              cal_controller ─► cal_idx[5:0] ──┘
                                              ÷480 → 250 kHz, pointer 0..63
```

| Point | Timing |
|---|---|
| `din` → first integrator slice | same clock |
| `code` | registered. After clock edge *e* it holds the quantizer output of loop sample *e*−2. An input word first affects the code 6 clocks after it is applied: 4 integrators, plus 2 clocks of slice skew and the output register. |
| `cell_sw`, `cell_cal` | registered, one clock after `code` and `cal_idx` |
| `iout_p`, `iout_n` | follow the cell controls with no delay (behavioural) |
| Calibration pointer | moves every 480 clocks (4 µs). A full round of 64 cells takes 30,720 clocks (256 µs). |

The converter accepts one input word every clock. There is no handshake.

## The modulator loop

`sd_modulator` is a cascade of four delaying integrators with distributed feedback. *y* is the quantizer output and *x* the input word. The quantizer LSB is the unit.

```
s1 ← s1 + x·2^-11 − y/4
s2 ← s2 + s1      − y
s3 ← s3 + s2      − 2y
s4 ← s4 + s3      − 2y
y  = clip(floor(s4), −32, 31)          code = y + 32
```

Every coefficient is a power of two, so the loop needs only wired shifts and adders. The noise transfer function is (1−z⁻¹)⁴ / D(z):

- its four zeros are at DC;
- its four poles are at radius 0.707;
- its peak gain is 4.

A full-scale 14-bit input swings *y* over ±16, half of the 6-bit range. At that scale the loop stays bounded for every input word, DC or sine, and the quantizer never clips. In simulation the four integrator states never need more than 7 integer bits. With twice the input weight, a full-scale input makes the loop diverge.

Truncating in the quantizer costs nothing at DC: its mean error of half an LSB is cancelled by the noise transfer function's zero at DC.

The coefficient values, the input scale and the choice of this loop form are this design's own. The converter they stand for calls for:

- a fourth-order loop with a 6-bit output;
- power-of-two coefficients only;
- stability over the whole input range;
- integrators whose delays serve as the pipeline registers.

The values above meet those requirements, but they are not the original ones.

### Pipelining by bit slices

At 120 MHz a 19-bit ripple-carry adder per integrator is too slow. Each integrator is therefore cut into slices (`sd_int_slice`): two 4-bit slices for the low fraction bits, and one 11-bit top slice holding 3 fraction bits and 8 integer bits. Each slice:

- adds its own bits of the state and the input;
- adds the carry that the slice below produced one clock earlier;
- registers both its new state bits and its carry-out.

Every adder is then at most 11 bits long.

This puts the bits of one integrator value on a time skew:

- slice 0 of every integrator works on sample *n*;
- slice 1 works on sample *n*−1;
- the top slice works on sample *n*−2.

Feed-forward paths keep the skew naturally, because integrator *k*+1 reads integrator *k*'s slice *j* from the same slice position. The input word is skewed to match: its slice *j* passes through *j* extra registers. These input registers and the output register are the only registers that pipelining adds.

The feedback loop stays exact for two reasons:

- the quantizer reads only the top slice;
- every feedback term (*y*/4, *y*, 2*y*, 2*y*) lands only in top-slice bits.

The top slice needs at least 2 fraction bits for *y*/4 to fit. The quantizer output for the top slice's sample then comes back to the top slices within the same clock. The loop sees exactly one register per integrator, as the unpipelined loop does. The pipelined modulator produces, bit for bit, the output of the unpipelined loop two clocks later. `tb_sd_modulator` checks exactly that against an unsliced 64-bit model.

The parameters `SLICE_W`, `N_LO` and `TOP_W` move the slice boundaries. Elaboration checks stop parameter sets that would break the two conditions above. `FRAC_TOP = IN_W − 3 − N_LO·SLICE_W` must be at least 2. The top slice must hold the quantizer range plus headroom.

### Noise shaping, measured

`tb_sd_modulator_snr` drives the modulator with a coherent 0.98-MHz sine. It records 8192 codes and computes the in-band SNR with a Blackman-Harris window and a direct DFT up to 5 MHz:

| Input level (dBFS of 14 bits) | 0 | −6 | −20 | −40 | −60 |
|---|---|---|---|---|---|
| In-band SNR (dB) | 85.2 | 79.0 | 65.9 | 47.3 | 28.2 |

The SNR falls 1 dB per dB of input level, so the noise floor does not depend on the signal. Extrapolated to 0 dB SNR, the dynamic range is about 86 to 88 dB. The original modulator is quoted at 96 dB. This coefficient set and input scale are about 8 to 10 dB short of that. A more aggressive loop, with a larger input weight or poles further out, would trade some of the stability margin for that difference.

## Cells, thermometer code and the spare cell

`thermometer_encoder` turns code *k* into *k* ones on the lowest of 63 outputs. The description of the original speaks of a 64-bit thermometer code. Here the 64th position is the spare cell, and `cell_select` adds it.

`cell_select` routes the 63 bits onto 64 physical cells, skipping the cell *c* that `cal_controller` has selected:

| Physical cell *p* | Gets |
|---|---|
| *p* < *c* | bit *p* |
| *p* = *c* | off; its calibration control is high |
| *p* > *c* | bit *p*−1 |

When the pointer moves from *k* to *k*+1, only two cells change role:

- cell *k* returns to service and takes bit *k*;
- cell *k*+1 leaves for calibration.

The number of cells switched on always equals the code. All 128 controls leave through one bank of flip-flops, so every cell switches on the same clock edge. Assertions in `cell_select` check two rules: at most one cell is calibrating, and a calibrating cell is never switched on.

`cal_controller` divides the 120-MHz clock by 480 to get the 250-kHz calibration clock. It visits the cells in index order. `cal_step` marks the last clock of each 4-µs period, and `round_done` marks the last clock of a round. A low `enable` freezes the rotation where it is.

## The current cell model

Each physical cell has two sources:

- a coarse source, sized for 0.97 × IREF;
- a fine source, whose gate voltage is held on a capacitor.

During its calibration phase the cell is in the reference loop. The fine source is set so that the cell's total current equals the reference, and no current reaches either output. In normal operation the held fine current stays constant, and a differential switch steers coarse + fine to `iout_p` or `iout_n`.

`current_cell` models this at the current level:

- `MISMATCH` is the cell's coarse-source error;
- `CAL_ERR` is a residual calibration error;
- `FINE_INIT` is the fine current before the first calibration;
- the fine current is sampled when `cal` falls.

The model leaves out four things:

- leakage of the held charge;
- switching glitches;
- output impedance;
- the low-swing switch driver.

In `sd_dac_top` the 64 cells get a fixed, deterministic coarse spread of ±1 % (`CELL_SPREAD`). IREF is 20 mA / 63, about 0.317 mA, for a 20-mA full scale.

`tb_sd_dac_top` runs a full-scale sine through the whole converter for 33,000 clocks at the default parameters. Before the first round ends, the output is off by up to 11.5 µA because of the spread. Once every cell has been calibrated, `iout_p` equals code × IREF and `iout_p + iout_n` equals 63 × IREF, both to rounding error.

`tb_sd_dac_top_sndr` measures the in-band SNDR of the differential output current, `iout_p − iout_n`, for a full-scale sine. It uses the same window and DFT as the modulator test.

| Cell calibration | In-band SNDR |
|---|---|
| off (cells keep their ±1 % coarse errors) | 75.4 dB |
| running (measured after one full round) | 84.4 dB |

With calibration running, the converter reaches the noise floor of the modulator itself. The rotation does not disturb it: once calibrated, all cells carry the same current, so moving thermometer bits from one cell to another changes nothing at the output.

## Where this design departs from the original, and how far to trust it

- **Modulator coefficients, input scale and quantizer.** Coefficients 1/4, 1, 2, 2, an input gain of 2⁻¹¹ per LSB, a truncating quantizer and offset-binary output are this design's own choices. The original values are not available. The loop is stable over the whole input range, as required. Its dynamic range is about 86 to 88 dB against the quoted 96 dB.
- **Slice sizes.** The lower slices are 4 bits, as in the 12-bit example adder of the original. The 11-bit top slice is this design's choice.
- **Input rate.** The input is one 14-bit word per 120-MHz clock. There is no interpolator from the 10-MHz Nyquist rate, because none is described.
- **Calibration scheduling.** The clock divider, the cell order and the bit routing around the calibrating cell are this design's own. The 250-kHz rate, 4 µs per cell and 256 µs per round are the original's.
- **Reset.** All registers use an asynchronous, active-low reset. After reset the code is mid-scale, no cell is on and none is calibrating. Calibration then starts at cell 0.
- **Not built as logic.** These parts have no logic function:
  - the all-PMOS switch driver, which sets the switch swing and crossing point;
  - the reference current source;
  - decoupling;
  - the 50-Ω output line.
- **Timing.** Simulation does not show that 120 MHz is reached. It shows only that the longest adder is 11 bits and that no path crosses more than one slice adder per clock, apart from the shift-and-add of the feedback in the top slice.
- **Verification.** Each module has a self-checking testbench against a model written independently of it. Each testbench has also been shown to fail on a deliberately broken copy of its module.

## Files

| File | Contents |
|---|---|
| `rtl/sd_dac_pkg.sv` | shared constants (widths, cell count, clock rates) |
| `rtl/sd_int_slice.sv` | one carry-registered integrator slice |
| `rtl/sd_modulator.sv` | fourth-order 6-bit bit-sliced modulator |
| `rtl/thermometer_encoder.sv` | 6-bit code → 63 thermometer bits |
| `rtl/cal_controller.sv` | 250-kHz calibration clock and cell pointer |
| `rtl/cell_select.sv` | spare-cell routing and the re-timing flip-flop bank |
| `rtl/current_cell.sv` | behavioural self-calibrated unit cell |
| `rtl/sd_dac_core.sv` | all the logic: modulator, encoder, scheduler, cell routing (synthesizable) |
| `rtl/sd_dac_top.sv` | the core plus the 64 behavioural cells and the current summing |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_sd_modulator_snr.sv` | in-band SNR versus input level |
| `tb/tb_sd_dac_top_sndr.sv` | output-current SNDR with and without cell calibration |

`tb_sd_dac_core` shortens the calibration period to 16 clocks, so that it can check several wraps of the rotation.

Every testbench ends by printing `TB_RESULT checks=<n> failures=<m>`, and has a watchdog.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb -Irtl \
          --top-module tb_sd_dac_top rtl/sd_dac_pkg.sv tb/tb_sd_dac_top.sv
./obj_dir/Vtb_sd_dac_top
```

Replace the top module with any other `tb_*` name to run another test. `tb_sd_dac_top` runs the whole converter at its default parameters through one complete calibration round; it takes a few seconds. `tb_sd_modulator_snr` takes under a second.

## Changing it

- **Input and output widths.** `IN_W` and `CODE_W` come from `sd_dac_pkg`. The input weight is tied to `IN_W`, so that a full-scale word always gives ±16 at the quantizer. The cell count follows `CODE_W`: 2^`CODE_W` − 1 signal cells plus the spare. The coefficient set, the 11-bit top slice and the testbench reference models all assume a 6-bit code, however. A different `CODE_W` needs all three revisited.
- **Slicing.** Change `SLICE_W`, `N_LO` and `TOP_W` on `sd_modulator`. `tb_sd_modulator` then still checks the result against the unsliced model, because its comparison does not depend on the slicing.
- **Calibration rate.** Change `CAL_DIVIDE` on `sd_dac_top`.
- **Coefficients.** The feedback weights are the `FB_SHIFT` table in `sd_modulator`. If you change them, change the reference models in `tb_sd_modulator` and `tb_sd_dac_top` to match. Re-run the SNR test and a full-scale DC test for stability.
