# Memristor emulator: switched-resistor chip with an FPGA model loop

Real memristors are not available as parts, so this design *emulates* one. A
chip holds a digitally switched, binary-weighted resistor array between two
floating terminals. The chip measures the voltage across the terminals and
sends it to an FPGA. The FPGA integrates a memristor model and sends back a
new 10-bit state, which sets the array's switches. Closed at an 11 µs sampling
period, this loop makes the terminals behave like a memristor, showing a pinched
current/voltage hysteresis, potentiation/depression under pulse trains and
pulse-width-dependent plasticity. Because the model lives in the FPGA, it can be
replaced without touching the chip.

The chip carries five emulators and two integrate & fire (I&F) neurons, which
are meant for small spiking networks. This repository contains:

* the whole FPGA side as synthesizable SystemVerilog: the serial links, a
  floating-point DSP unit, a window-function table, and the control FSMs;
* the chip's serial logic as synthesizable SystemVerilog;
* the chip's analog parts as behavioural models using `real` signals: the
  resistor array, the voltage measurement with its ADC, and the neuron;
* a top level, `memristor_emulator_system`, with five emulator loops and two
  neurons.

```
            chip (one emulator)                         FPGA (fpga_channel)
 Inp_A ──┬─[resistor_array]─┬── Inp_B
         └──[voltage_adc]───┘                    ┌───────────────────────────────┐
               │ 10-bit code                     │ clock_divisor ── sclk (1 MHz) │
        asic_parallel_to_serial ── eoc, adc_data ─▶ serial_to_parallel + rx_fsm │
                                                 │        │ sample, run          │
                                                 │     dsp_unit (fpu, fw_rom)    │
                                                 │        │ x, update            │
        asic_serial_to_parallel ◀─ data, new_sample_n ─ parallel_to_serial+tx_fsm│
               │ sw / sw_n (10 transmission gates)└───────────────────────────────┘
         resistor_array
```

## The model the FPGA runs

The state variable x lies in 0..1. It is held as a 10-bit integer X, with
x = X/1023. The model is:

```
I      = G(x) · v
G(x)   = Gmin + x · (Gmax − Gmin)                      (linear conductance map)
dx/dt  = k · G(x) · v · f_w(x)
f_w(x) = 1 − (2x − 1)² + δ,   δ = 0.0003               (window, bounds x to 0..1)
k      = µ / (D² · Gmax),     µ = 1e-14 m²/(V s), D = 10 nm
```

The time discretisation uses the sampling period Ts = 11 µs. Each sample adds
q = f(x, v) · Ts to an accumulator Q. When |Q| reaches the threshold
Xth = 1/1023 (one LSB of x), the DSP unit does three things:

* X steps by sign(Q), saturating at 0 and 1023;
* Q keeps its remainder (Q −= sign(Q) · Xth);
* G is recomputed, and the new X is sent to the chip.

The two emulator types have different constants:

| emulator | Gmin | Gmax | resistance | k |
|---|---|---|---|---|
| 0 | 4.88 nS | 4.99 µS | 204.8 MΩ .. 200 kΩ | 2.004e7 |
| 1..4 | 195 nS | 190 µS | 5.12 MΩ .. 5.2 kΩ | 5.263e5 |

The initial conductance is 3.41 µS. All constants are float32 encodings in
`memristor_pkg`, passed to `dsp_unit` as parameters.

## DSP unit (`dsp_unit`, `fpu`, `fw_rom`)

The DSP unit is a register set, one shared single-precision floating-point unit
and a 1024-entry table of f_w(X). A hard-coded FSM sequences them, doing one
FPU operation per FPGA clock:

| states | work |
|---|---|
| start, I_T0 .. I_CVT | Q = 0; Gmax − Gmin; X = round((Ginit − Gmin)/(Gmax − Gmin) · 1023); then i, j..l |
| idle | wait for `run` from the receiver |
| a, b, c | latch the sample; V = (2·sample − 1023) · 3.3/1023 |
| d, e, f, g1, g2 | k·V, ·G, ·f_w(X) (table), ·Ts, Q += q |
| g3 | compare \|Q\| with Xth; go to idle if below it |
| h | X = X ± 1, Q −= ±Xth |
| i | `update` pulse (one clock), which starts the transmitter |
| j, j2, k, l | G = Gmin + (X/1023)·(Gmax − Gmin) |

A sample takes 9 clocks without a step and 15 clocks with one. At 50 MHz that
is at most 300 ns, well inside the 1 µs serial-clock period that follows a
frame. A `run` that arrives while the unit is busy is held and served next.

The **FPU** (`fpu`) is combinational. It provides add, subtract, multiply,
divide, compare, int→float and float→int:

* Results are rounded to nearest, ties to even.
* Subnormals are flushed to zero, and overflow gives infinity.
* NaN is not produced.

The testbench compares every FPU operation bit-exactly against a double-precision
reference that is then rounded to float32.

The **window table** (`fw_rom`) is computed at elaboration, from integers only,
as f_w(X) = (4X(1023−X)·10⁴ + 3·1023²) / (1023²·10⁴). It is then rounded to
float32. Reads are synchronous: data is valid one clock after the address, and
X is stable long before state f reads the table.

## Serial link timing

The FPGA divides its clock by `CLK_DIV` = 50 to make the 1 MHz serial clock
`sclk`, which it also sends to the chip. Inside the FPGA nothing is clocked by
`sclk`. The link logic runs on the FPGA clock and uses one-cycle enables that
mark the rising and falling edges of `sclk`.

```
sclk       _|‾|_|‾|_|‾|_|‾|_ ... _|‾|_|‾|_      one frame = 11 sclk = 11 µs
chip→FPGA   EOC  b9   b8   b7  ...  b0          chip drives on rising edges,
                                                FPGA samples on falling edges
FPGA       rx_fsm: EOC seen → 10 bits → run (1 clock) → dsp_unit
FPGA→chip  update → new_sample_n low + b9 .. b0 (falling edges) → new_sample_n high
chip       shifts on rising edges while new_sample_n is low; the word goes to
           the switches when new_sample_n returns high (no partial codes)
```

Reception, processing and transmission are independent. A new sample can
arrive while the previous X is still being sent. An update that arrives during
a transfer is sent afterwards, with the value X has at that time. One frame
carries one sample, so the sampling period is 11 µs. The highest usable input
frequency is therefore about 1/(2·11 µs) ≈ 45 kHz.

## Chip side

* `asic_parallel_to_serial` is synthesizable. It repeats the 11-clock frame,
  strobes the ADC two clocks before the frame, and raises EOC in the frame's
  first clock, followed by the code, MSB first.
* `asic_serial_to_parallel` is synthesizable. It is the receiving shift
  register plus the switch register. It drives each transmission gate with a
  true and an inverted line (`sw`, `sw_n`).
* `voltage_adc` is behavioural. Each terminal lies in 0..3.3 V, so the
  differential voltage spans ±3.3 V. The model halves it, adds 1.65 V, and
  converts it to 10 bits: code = round(((va−vb)/2 + 1.65)/3.3 · 1023).
* `resistor_array` is behavioural. It has ten binary-weighted branches, and the
  conductance is G_LSB · code. G_LSB is 1/204.8 MΩ for emulator 0 and
  1/5.12 MΩ for the others.
* `memristor_emulator_asic` wires these four together for one emulator.

## I&F neuron (`if_neuron`, behavioural)

The neuron is an op-amp integrator with a 15 pF feedback capacitor and a
comparator. The input pin is held at the resting potential `vfb`.

* While `vph` is low, the neuron integrates: dVop/dt = −Iin/C. A negative
  (excitatory) current raises Vop, and `vout` goes high once Vop > `vth`.
* While `vph` is high, the neuron is spiking: the capacitor is shorted, Vop
  follows `vfb`, and the neuron cannot fire.

With −1 nA, a 1 V rest and a 2.7 V threshold, it fires after
15 pF · 1.7 V / 1 nA = 25.5 ms. The model reproduces this to one 1 µs time step.
The spike generator and the `vph` control are external, so their pins are
top-level ports.

## How the emulator behaves with these constants

The published constants make the model fast compared with the link. Three
effects follow, and the tests show all three:

1. **Rate limit.** At 3 V and x ≈ 0.68, one sample asks for about 2 LSB of
   x, but X moves by at most one LSB per sample. For large voltages, X
   therefore ramps at 1 LSB per 11 µs, and it reaches 1023 after about 3.6 ms.
2. **Saturation and locking.** At x = 1, f_w is only δ = 0.0003, so X hardly
   moves back. At 20, 35 and 75 Hz the swing is therefore the same, 324 array
   steps from the initial 3.41 µS to 4.99 µS. At 400 Hz the half-period is too
   short to saturate, and the swing is 127 steps. The hysteresis thus shrinks
   with frequency, as expected, but not smoothly.
3. **Zero-volt drift.** (2·code − 1023) is always odd, so the measured voltage
   is never exactly 0. With the terminals shorted, the ADC returns 512, which
   reads as +3.2 mV. At 0 V the state therefore creeps upward by about one
   LSB every few ms.

For plasticity, the 900 µs pulses change the conductance faster than the
500 µs ones. After five 1 V pulses, the change is +1.09 µS against +0.69 µS
for potentiation, and −1.21 µS against −0.71 µS for depression. Over 50 pulses
both widths reach the bound.

## Departures and choices

* **Voltage scale.** The state diagram prints V = (2·Vdigital − 1023)/3.3.
  This design uses (2·Vdigital − 1023)·3.3/1023 instead, so that the codes
  span the ±3.3 V input range the measurement chain is built for.
* **Threshold.** The source expresses the one-LSB threshold as
  D²·Gmax/(µ·(2ⁿ−1)) = 1/(k·1023), which is the threshold for an accumulator
  that excludes k. Here k is inside q, so Xth = 1/1023. The dynamics are the
  same. Xth is a parameter.
* **Initial state.** The state diagram goes straight from start to idle. This
  design adds an initialisation sequence, which derives X from Ginit and sends
  it to the chip.
* **Q after a step.** The remainder is kept (Q −= sign(Q)·Xth); the source
  does not say what happens to Q.
* **Conductance offset.** The DSP's G(X) = Gmin + X/1023·(Gmax − Gmin). The
  array's conductance is X·G_LSB. The two agree at the top of the range and
  differ by up to one LSB (4.88 nS on emulator 0) at the bottom; X = 0 opens
  every switch.
* **Per-emulator channels.** Each emulator has its own FPGA channel and
  link. How one FPGA serves five emulators is not specified.
* **Unspecified details.** The FPGA clock (50 MHz), the frame layout, and the
  new-sample framing are choices where the source gives only the behaviour.
* **Not built:**
  * the off-chip spike generator;
  * the oscilloscope measurement setup;
  * the 12-input × 4-neuron pattern-recognition network, with its
    48 memristors, winner-takes-all and homeostasis. It was only simulated at
    circuit level, and needs more emulators and neurons than one chip has.

## Files

| file | kind | what |
|---|---|---|
| `rtl/memristor_pkg.sv` | package | widths, float32 constants, FPU op codes |
| `rtl/fpu.sv`, `rtl/fw_rom.sv`, `rtl/dsp_unit.sv` | RTL | model processor |
| `rtl/clock_divisor.sv`, `rtl/serial_to_parallel.sv`, `rtl/rx_fsm.sv`, `rtl/parallel_to_serial.sv`, `rtl/tx_fsm.sv` | RTL | FPGA link |
| `rtl/fpga_channel.sv` | RTL | FPGA side of one emulator |
| `rtl/asic_parallel_to_serial.sv`, `rtl/asic_serial_to_parallel.sv` | RTL | chip link |
| `rtl/voltage_adc.sv`, `rtl/resistor_array.sv`, `rtl/if_neuron.sv` | behavioural | analog parts |
| `rtl/memristor_emulator_asic.sv` | behavioural wrapper | one emulator on chip |
| `rtl/memristor_emulator_system.sv` | top | 5 emulator loops + 2 neurons |
| `tb/tb_<module>.sv` | testbench | one per module, self-checking |
| `tb/fp_ref_pkg.sv` | package | float32 reference (double, then rounded) |
| `tb/tb_workloads.sv` | testbench | frequency and pulse-width experiments |

The top's testbench, `tb_memristor_emulator_system`, runs at the default
parameters. It does four things:

* drives a sine and checks the loop: the conductance grows during the
  positive half-wave, and at the same voltage more current flows on the
  falling side than on the rising side;
* checks that every emulator's switch code equals its FPGA state X;
* applies LTP and LTD pulse trains and checks that the conductance rises and
  then falls;
* drives both neurons through integration, firing, the spiking phase and
  inhibition, and checks the 25.5 ms and 12.75 ms integration times;
* counts each mechanism: runs, steps up and down, samples without a step,
  words sent, and neuron fire, spike and inhibit.

## Simulating

The testbenches need Verilator 5 with `--timing`. They print
`TB_RESULT checks=N failures=M` and stop themselves through a watchdog.

```
verilator --binary --timing --assert --timescale 1ns/1ps -Mdir obj_dsp \
  -y rtl rtl/memristor_pkg.sv tb/fp_ref_pkg.sv tb/tb_dsp_unit.sv --top-module tb_dsp_unit
./obj_dsp/Vtb_dsp_unit
```

Substitute any `tb_<module>` or `tb_workloads`. The whole-system benches take
a few seconds (`tb_memristor_emulator_system`) to about ten seconds
(`tb_workloads`).

To change the model, edit the constants in `memristor_pkg` or `dsp_unit`'s
parameters. To use a different window, change the formula in `fw_rom`. For a
different f(x, v), change the operation sequence in states d..g1.
Synthesis covers everything under `fpga_channel` and the two chip-side shift
blocks. The analog models use `real` ports and are for simulation only.
