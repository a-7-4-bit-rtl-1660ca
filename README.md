# FPGA slope ADC with online calibration

This design is an analog-to-digital converter built only from standard FPGA resources, with no external parts. It converts a 0.3–1.5 V input at 600 MS/s with a 10-bit output code. The voltage is first turned into time, and then the time is measured digitally.

- A single-ended output buffer, toggled by the 600 MHz clock, charges and discharges its own pad capacitance. This gives a reference waveform made of exponential RC ramps.
- An LVDS input buffer works as a comparator: the analog input goes on one leg and the ramp on the other. In every clock period the comparator output makes two transitions. It falls when the rising ramp passes the input, and rises when the falling ramp drops below it. Where those two instants fall depends on the input voltage.
- A tapped-delay-line time-to-digital converter (TDC) on the FPGA carry chains measures both instants, every clock cycle.
- A chain of calibrations turns the raw delay-line positions into volts, because neither the ramp, the comparator nor the delay lines are accurate on their own:
  - bin-by-bin TDC calibration;
  - clock-edge alignment;
  - voltage calibration;
  - online temperature tracking.

The synthesizable part is everything from the delay-line flip-flops onward. The physical parts are behavioural SystemVerilog models, used for simulation only:
- the ramp and comparator;
- the delay lines;
- the ring oscillator.

The top level is `rtl/fpga_slope_adc.sv`.

## Voltage to time: the reference slope

The buffer's output resistance and pad capacitance give RC ≈ 300 ps, and the buffer swings to VU = 1.8 V. Take a half period T/2 = 833 ps and V_A as the input level.

- While the launching clock is high, the ramp charges: V = VU − (VU − V0)·e^(−t/RC).
  - The comparator output (`analog > slope`) falls at t_f = RC·ln((VU − V0)/(VU − V_A)), measured from the rising clock edge.
  - A higher input gives a later falling edge.
- While the clock is low, the ramp discharges: V = V0·e^(−t/RC).
  - The output rises at t_r = RC·ln(V0/V_A), measured from the falling clock edge.
  - A higher input gives an earlier rising edge.

The LVDS receiver works only between 0.3 V and 1.5 V. This sets the input range of the converter.

The two edges carry the same information with opposite sensitivity. The converter measures both and averages their voltage estimates. This cancels part of the comparator's delay and a common time offset.

The ramp and comparator are modelled in `slope_comparator.sv`, a behavioural model:
- At every clock edge it computes the next crossing time in closed form.
- It holds the input constant over each half period.
- It clamps the input to 0.3–1.5 V.

## Time to digital: the four-chain TDC

`tdc_core.sv` runs four identical chains and averages their results. Each chain has the following stages.

**Delay line and flip-flops** (`tdl_model.sv`, behavioural)
- 60 CARRY8 primitives give 480 multiplexer stages, at about 3.6 ps each. That is 1.73 ns, just over one 1.667 ns clock period.
- On every clock edge, flip-flops capture both outputs of every element. C is the carry out. O is the XOR output, which with this configuration is the inverted carry in.
- This double sampling gives 960 samples per line.
- The model gives each element its own delay, between 0.4 and 1.6 × 3.6 ps. Some O samples therefore land after their neighbouring C samples, so the code contains *bubbles*.

**Reordering** (`tap_reorder.sv`)
- The O samples are inverted and interleaved with the C samples.
- The result is reversed, so that index 0 is the earliest instant in the clock period. That is the sample taken at the far end of the line, where the edge has travelled furthest.
- After this, a comparator rising edge appears as a 0→1 step with rising index, and a falling edge as a 1→0 step.

**Adder tree** (`therm_adder_tree.sv`)
- Three registered stages add pairs, fours and eights.
- The output is S(i), the number of ones in each of the 120 groups of 8 samples.

**Edge detector and bubble filter** (`edge_detector.sv`)
- This is the subtle part of the TDC.
- Overlapping sums cover 16 samples: S2(i) = S(i) + S(i+1).
- A transition lies in the window of group i when the windows on either side are on opposite sides of the half-way count 8:
  - rising (0→1): S2(i+1) > 8 and S2(i−1) < 8;
  - falling (1→0): S2(i+1) < 8 and S2(i−1) > 8.
- Because the test uses counts over 16 samples, a bubble of one or two swapped samples moves the count by at most one. It cannot create a false transition.
- Positions:
  - falling edge: i·8 + S2(i), the number of ones before the step;
  - rising edge: i·8 + 16 − S2(i), the number of zeros before the step.
- The lowest qualifying index wins.
- Groups beyond the ends of the line are copies of the end groups. A step in the first or last 8 samples can therefore go unseen. The alignment calibration keeps the pulse away from the ends.
- The published algorithm swaps the labels *rising* and *falling* relative to its own worked example. This design keeps the conditions and follows the example.

**Averaging**
- An edge is reported only when all four chains found it.
- Its code is the mean of the four positions, and it is registered.
- A code reflects the hit at one capturing clock edge. It is valid after the sixth following clock edge (3 tree + 2 detector + 1 average).

`sel_ro` switches the TDC input between the ring oscillator and the delayed comparator output.

## Code density tables

One engine, `code_density_table.sv`, does both the TDC and the voltage calibration. Samples that are spread uniformly over a range fill each code in proportion to its width. So the cumulative histogram at a code gives that code's position in the range.

The engine runs four phases:
1. **CLEAR** – zero Table A, one entry per cycle for 1024 cycles. The tables are memories, not reset flops.
2. **COLLECT** – histogram N samples in Table A by read-modify-write. A code repeated in the next cycle is forwarded from the write stage.
3. **BUILD** – a single pass of 1024 + 2 cycles writes Table B[i] = (F(i−1) + h(i)/2)·2^10/N.
   - F is the running sum and h the count of the bin, so the value is the centre of bin i.
   - The division by N is a multiply by a constant reciprocal.
   - With `INVERT = 1` the result is mirrored.
4. **READY** – each valid code is looked up in Table B, with one cycle of latency.

For N = 1,024,000, a 21-bit counter is enough, even if every sample lands in one bin.

## Bin-by-bin TDC calibration

`bin_by_bin_cal.sv` runs at start-up with the ring oscillator selected. The oscillator (about 140 MHz) is unrelated to the 600 MHz clock, so its edges land at uniformly random phases of the clock period.

- Rising and falling codes get separate tables.
- Each table collects 1,024,000 hits.
- Afterwards every TDC code maps to a calibrated time: 0–1023 over one clock period, counted from the far end of the line.

## Clock edge alignment

Both comparator edges of a period must fall inside the delay-line window, with the pulse centred. `align_cal.sv` does this in two ways.

**Foreground alignment**
- It works on the raw TDC codes and adjusts the output delay of the launching clock.
- It waits 32 cycles, then averages 16 pulse centres (rise + fall)/2 where the rising edge comes first.
- It steps the output delay one tap towards a centre of 480 ± 8.
- If no proper pulse is seen within 256 cycles, it jumps 8 taps.
- It reports failure after a sweep of the whole 9-bit tap range.

**Tracking in measurement**
- The input delay on the comparator path is recomputed from the oscillator frequency ratio: idelay = round((odelay + 64)·f_on/f_off) − odelay.
- This keeps the sum of both programmable delays constant in time as their taps slow down.
- Without it, the 3% slow-down in the end-to-end test moved the ramp against the sampling clock by about 20 ps. That gave errors of up to 40 LSB at the ends of the range.

The output delay, the input delay and the clock manager are vendor primitives. They stay outside the top, which brings their tap settings and clocks out as ports.

## Voltage calibration

`voltage_cal.sv` runs after alignment. It needs a slow triangular wave on the input that covers the range, such as 0.35–1.45 V. A triangle spends equal time at every voltage, so the same code density engine applies.

- One table per edge maps calibrated edge times to voltage codes 0–1023 across the triangle's span.
- Each table collects 1,024,000 edges.
- The rising-edge table is mirrored, because that edge comes earlier for a higher voltage.
- The output is adc_out = (v_rise + v_fall + 1)/2. It is produced every cycle in which both edges were seen, one cycle after the lookups.

The tables absorb all static nonlinearity of the ramp, the comparator and any residual TDC error.

## Online temperature calibration

Delays grow with temperature, so the time tables built at start-up slowly go wrong. The ring oscillator is made of the same kind of logic and slows down alike.

- `freq_counter.sv` counts oscillator edges over 16384 clock cycles, about 3800 counts, after a two-flip-flop synchroniser.
- `online_cal.sv` stores the count at the start of calibration as f_off.
- After each new count f_on, one shared restoring divider computes f_off/f_on and f_on/f_off, with 14 fraction bits.
- A calibrated time t counts from the far end of the line, so the part that stretches with the delays is 1024 − t. The correction is t' = 1024 − (1024 − t)·f_off/f_on, clamped.
- f_on/f_off drives the input-delay tracking described above.

## Start-up sequence

`cal_sequencer.sv` steps through these phases (`phase_e` in `slope_adc_pkg.sv`):

| Phase | What happens |
|---|---|
| `PH_RESET` | 16 cycles. |
| `PH_TDC_CAL` | Ring oscillator selected; f_off captured; bin-by-bin tables collected and built. |
| `PH_SWITCH` | Comparator selected; 32 cycles for the pipeline to drain. |
| `PH_ALIGN` | Foreground alignment. |
| `PH_VCAL` | Triangle input; voltage tables built. |
| `PH_MEASURE` | Conversion, with online correction and input-delay tracking. |

Online correction is enabled from `PH_ALIGN` on.

## Departures from the published design and open points

- **Ring oscillators.** The published design places a ring oscillator beside each delay line. Here one oscillator serves as the hit source and as the temperature probe for all four lines.
- **Modelled oscillator.** It is one gated LUT2, O = Enable & ~feedback, followed by 24 inverters of 142 ps, which gives about 140 MHz. The stage count and delay are this design's values.
- **Averaging and validity.** The four chains are combined as a plain mean, and an edge needs all four chains to be valid. This is this design's choice.
- **Element delay.** The average element delay is taken as 3.6 ps. A 41 ps CARRY8 delay also quoted for the device would mean 5.1 ps per element, which is inconsistent with the 463 elements needed to span the period.
- **Adder tree output.** The published description of the adder tree speaks of a 240-bit output. Here the output is 120 group sums of 4 bits, matching its grouping by 8.
- **Order and details of the calibrations.** These are this design's choices:
  - alignment runs before the voltage calibration;
  - the search and servo strategy of the alignment;
  - which programmable delay serves alignment and which serves tracking;
  - the tracking formula;
  - the 16384-cycle counting window;
  - the fixed-point formats.
- **Not modelled:** the comparator's dynamic behaviour, jitter and noise. So the test results are not a prediction of the published ENOB (7.4 bits), SNDR, SFDR, DNL or INL. What the model does show:
  - A 1 Vpp sine gives an ENOB of 6.6 bits at 11 MHz and 5.9 bits at 191 MHz with the reduced calibration tables.
  - With the full 1,024,000-sample tables it gives SINAD 47.2 dB (ENOB 7.55) at 11 MHz and 38.3 dB (ENOB 6.07) at 191 MHz. The published measurements are 46.15 dB and 38.01 dB.
  - In this model the errors come only from the calibration tables, quantisation and the edge averaging.
  - At 191 MHz the amplitude drops to 0.88. The two edges sample the input about half a period apart, and averaging them acts as a filter, cos(π·f·T/2).
  - A DC input gives the same code every cycle, give or take one, because the model has no noise.

## Sizes

| Quantity | Needed | Built |
|---|---|---|
| Conversion rate | one sample per 1.667 ns | fully pipelined, one sample per cycle (600 MS/s) |
| Delay-line span | 463 elements × 3.6 ps for one period | 480 elements = 1.73 ns, 960 samples, 4 lines |
| Calibration | 1,024,000 hits | 21-bit counters; 1024-entry tables for 960 codes |
| Resolution | 1.2 V range at about 2.6 mV | 10-bit output |
| Temperature (25–70 °C) | oscillator count changes of about 7% | ratios from 0 to 4 with 14 fraction bits; the 9-bit input delay keeps the tracking in range |

## Files

`rtl/`:

| File | Contents |
|---|---|
| `slope_adc_pkg.sv` | Sizes and the phase enum |
| `fpga_slope_adc.sv` | Top |
| `tdc_core.sv`, `tap_reorder.sv`, `therm_adder_tree.sv`, `edge_detector.sv` | TDC |
| `code_density_table.sv`, `bin_by_bin_cal.sv`, `voltage_cal.sv` | Table-based calibrations |
| `freq_counter.sv`, `online_cal.sv`, `align_cal.sv`, `cal_sequencer.sv` | Control |
| `slope_comparator.sv`, `tdl_model.sv`, `ring_oscillator.sv` | Behavioural models, not synthesizable |

Each of the three models has a `real` variable, `delay_scale` (default 1.0). A testbench sets it hierarchically to emulate a temperature change.

`tb/` holds a self-checking testbench per block, `tb_<module>.sv`, and three end-to-end benches. `tap_delay_model.sv` stands in for the programmable delays.

- **`tb_fpga_slope_adc`** (reduced sizes: 16000 TDC hits, 32000 voltage edges, 4096-cycle window).
  - It runs the whole start-up with the triangle input.
  - It checks eleven DC levels from 0.4 to 1.4 V against (V − 0.35)/1.1·1024, within 10 LSB.
  - It then makes every delay 3% slower. It checks that the frequency ratio moves by 3% and the input delay shrinks, and that the DC levels stay within 12 LSB.
  - It counts each mechanism and fails if one never happened: oscillator hits, alignment search and servo steps, triangle cycles, online correction, input-delay tracking, and output samples.
  - It takes about 10 s.
- **`tb_fpga_slope_adc_full`**: the same test with every parameter at its default (1,024,000 hits and edges, 16384-cycle window). It simulates about 9 ms in about 7 minutes, and the DC errors stay within 5 LSB.

- **`tb_fpga_slope_adc_dynamic`** (reduced sizes). It is built like the evaluation of the published converter.
  - It takes 4096 single-shot samples of 1.2 V DC and checks the mean, the standard deviation (at most 3.4 codes, that is 1.4 steps of 2.6 mV) and the peak-to-peak spread (at most 29 codes, that is 12 steps).
  - It applies 1 Vpp sines at about 11 and 191 MHz for 4096 cycles each.
  - A three-term least-squares sine fit at the known frequency gives SINAD and ENOB. The limits are 6.3 and 5.0 bits, and the fitted amplitude must be within 5% of the expected one.

Every testbench ends with the line `TB_RESULT checks=N failures=M`.

To run one with Verilator 5:

```
verilator --binary --timing -Wno-fatal --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/slope_adc_pkg.sv tb/tb_fpga_slope_adc.sv --top-module tb_fpga_slope_adc
./obj_dir/Vtb_fpga_slope_adc
```
