# FPGA custom logic for an electric kart controller

An electric racing kart is driven by a control loop that runs on a soft
processor inside a Spartan-6 class FPGA. The processor reads the driver's
switches and the analog sensors and sets the lamps and relays. Every few
milliseconds it also computes two driver-assistance corrections:

* **Torque vectoring** shifts torque from the inner to the outer rear wheel
  in a corner. The share is `dM = v^2 * sin^2(delta) * d * 1.85736`, where
  `v` is the speed in m/s, `delta` the steering angle in radians, and `d` a
  driver-selected sensitivity (0, 0.2 … 0.5).
* **Traction control** cuts the torque of a rear wheel that spins. A PI
  controller turns the difference between the measured slip and the set
  point into a torque correction factor between 0.1 and 1.0.

Both calculations are floating-point heavy. They are moved out of software
into two small coprocessors: one for torque vectoring, and one traction
control core per rear wheel. Each does one IEEE-754 single-precision
operation per clock and recomputes its result continuously from whatever the
software last wrote. The software writes parameters and inputs into
registers and reads the newest result whenever it likes. There is no start
command and no interrupt.

This repository holds the custom logic around the processor, in
SystemVerilog:

* the two coprocessor types and their floating-point arithmetic;
* serial interfaces to the board's I/O chips: 74HCT166 input shift
  registers, 74HC595 output shift registers, and an AD7927 8-channel ADC;
* a power-on reset and a divider for the slow peripheral clocks;
* register wrappers and an address decoder that put all of this on the
  processor's register bus.

The processor is not included. Neither are its memories, bus fabric, timer,
interrupt controller, UARTs, GPIOs, CAN controllers and PLL, which are
standard vendor or third-party cores. The top level brings out the register
bus and a forwarding port for them instead.

## Structure

```
ekart_top
├── power_on_reset      reset held low for 1000 oscillator cycles after lock
├── clock_divider       peripheral clocks from the 50 MHz bus clock
├── bus_decoder         selects a peripheral by address bits [31:16]
├── reg_wrapper  x6     register file per peripheral
├── torque_vectoring    6.25 MHz
│   ├── fp_operator     float->fixed, fixed->float, multiplier
│   └── cordic_sin      parallel CORDIC sine
├── traction_control x2 2 kHz, left and right rear wheel
│   └── fp_operator     multiplier, adder, < and > comparators
├── digital_inputs      25 kHz, 3 x 74HCT166
├── digital_outputs     83.3 kHz, 5 x 74HC595
└── analog_inputs       160.3 kHz, AD7927
```

`ekart_pkg` holds the shared types and constants: operator selector, float
constants, fixed-point formats and base addresses. `reg_bus_if` is the
register bus.

### Register map

Each peripheral owns a 64 KB window. Registers are 32 bits wide, 4 bytes
apart. Write registers come first and can be read back; result registers
follow and are read-only. Unused offsets read as zero.

| Base          | Peripheral            | Offsets |
|---------------|-----------------------|---------|
| `0xC9A0_0000` | torque vectoring      | 0 speed, 4 steering angle, 8 factor d, C constant (float, R/W); 10 torque (float, R) |
| `0xC720_0000` | traction control left | 0 sample time, 4 P gain, 8 I gain, C anti-windup gain, 10 slip, 14 slip set point (float, R/W); 18 correction (float, R) |
| `0xC722_0000` | traction control right| as left |
| `0xC500_0000` | digital inputs        | 0 switch states [23:0] (R) |
| `0xC1E0_0000` | digital outputs       | 0 outputs [23:0], 4 output enables [11:0] (R/W) |
| `0xC520_0000` | analog inputs         | 0, 4 … 1C channel 0 … 7, 12-bit straight binary (R) |

Every other address goes out unchanged on the `ext_*` port. That covers the
memory controllers, the UARTs at `0x8400_0000`, the CAN bridges at
`0xC980_0000`, and so on.

### Register bus

`reg_bus_if` carries `req`, `we`, `addr`, `wdata`, `rdata` and `ack`.
The master raises `req` together with the command and holds it until it
sees `ack` on a rising clock edge, then drops it. A wrapper answers every
access with a one-clock `ack` one clock after `req`, with the read data
registered. The interface asserts that `ack` never comes without `req`. A
forwarded access takes as long as the external slave needs.

## Clocks and reset

| Clock           | Frequency  | Source                           | Used by |
|-----------------|------------|----------------------------------|---------|
| `clk_s`         | 50 MHz     | board oscillator                 | power-on reset |
| `clk_50`        | 50 MHz     | PLL output 0                     | bus, wrappers, divider |
| `clk_6m25`      | 6.25 MHz   | PLL output 2                     | torque vectoring |
| divider out 0   | 83.3 kHz   | `clk_50` / `DIV_DO` (600)        | digital outputs |
| divider out 1   | 25 kHz     | `clk_50` / `DIV_DI` (2000)       | digital inputs |
| divider out 2   | 160.3 kHz  | `clk_50` / `DIV_AI` (312)        | analog inputs |
| divider out 3   | 2 kHz      | `clk_50` / `DIV_TCS` (25000)     | traction control |

A division factor is the whole output period. The divider counts to
`DIV/2 - 1` and toggles its output, giving a 50 % duty cycle.

All clocks come from one oscillator, so they are treated as related and no
synchronisers are used between domains:

* Write registers drive the peripheral inputs directly.
* Result registers are resampled into the bus domain every bus clock.

A peripheral result changes at most once per operation, which lasts many
bus clocks. The one exception is the torque vectoring core. It runs on
`clk_6m25`, which must come from the same PLL as `clk_50` for this to be
safe. If you change the clocking, add synchronisers.

The board has no reset button. `power_on_reset` waits for the PLL's
`locked` and then holds the active-low `rst_n` for `POR_THRESHOLD` cycles.
Its flops start from their configuration values: the output starts high and
is pulled low on the first clock edge. Every other block has an
asynchronous active-low reset, and that first edge resets even the blocks
whose divided clock does not yet run.

## Floating-point arithmetic

`fp_operator` is one combinational IEEE-754 single-precision unit. The
parameter `OP` picks multiply, add, less-than, greater-than, float→fixed or
fixed→float. Numerics:

* Results round to nearest, ties to even.
* Subnormal inputs and results are flushed to zero.
* Overflow gives infinity.
* Float→fixed rounds and saturates to the signed 32-bit range.
* Comparators return 1 or 0 in bit 0.

There are no exception flags. The sequencers use each unit as a one-clock
operation, so the longest path is a full float add or multiply. This is
fine at 6.25 MHz and 2 kHz, but it is the critical path if the clocks go up.

`cordic_sin` computes the sine in a fully unrolled 24-stage CORDIC
rotation:

* The angle is Q3.29 radians, with a range of ±π. Angles beyond ±π/2 are
  first folded with `sin(π − t)`.
* The result is Q2.30.
* The atan table is written out for the first ten stages. After that,
  `atan(2^-i)` equals `2^-i` at this precision.
* The error is below 3·10⁻⁷.

## Torque vectoring coprocessor

One shared multiplier and a 7-step counter (`done` pulses at the end):

| Step | Operation |
|------|-----------|
| 0 | capture speed, d, constant; steering angle float → Q3.29 |
| 1 | CORDIC sine; `acc = v * v` |
| 2 | sine Q2.30 → float; `acc *= d` |
| 3 | `acc *= const` |
| 4 | `acc *= sin` |
| 5 | `acc *= sin` |
| 6 | `torque <= acc` |

A new result therefore appears every 7 clocks, which is 1.12 µs at
6.25 MHz. The steering angle must be within ±π rad.

## Traction control coprocessor

Each step of the controller computes, in single precision:

```
e     = slip - set_point
u     = P*e + I*x                      x: integrator state
s1    = clamp(u, -0.5, 0.5)            saturation 1
x    += Ts * (e - Kaw*(u - s1))        back-calculation anti-windup
corr  = clamp(0.5 - s1, 0.1, 1.0)      saturation 2
```

The integrator is forward Euler (`Ts/(z-1)`), so `u` uses the state from
before the update. While saturation 1 clips, the anti-windup term drives
the integrator back toward the range where the controller is linear.

The core has one multiplier, one adder (it subtracts by flipping the sign
of the second operand) and a < / > comparator pair. The pair tests both
bounds of a saturation in the same clock. The 12 steps are:

```
 0 capture inputs, e        4 s1 = sat1(u)        8 dx  = Ts*ein
 1 pe = P*e                 5 du = u - s1         9 x   = x + dx
 2 ix = I*x                 6 w  = Kaw*du        10 c   = 0.5 - s1
 3 u  = pe + ix             7 ein = e - w        11 corr = sat2(c), done
```

The core then waits `LATENCY` clocks before it samples its inputs again.
With `LATENCY = 8` a step takes 20 clocks, which is 10 ms at 2 kHz. That is
the controller's sample period, so the software should write the same
value into the sample-time register (0.01).

The bounds are parameters (`SAT1_LO/HI`, `SAT2_LO/HI`, `CTRL_CONST`):

* Saturation 2, [0.1, 1.0], is the range of the correction factor.
* Saturation 1, [-0.5, 0.5], is this design's choice. It makes `0.5 − s1`
  cover exactly [0, 1].

`sat1_active` and `sat2_active` show whether either bound clipped in the
last step.

## Board interfaces

### Digital inputs: three 74HCT166

24 switches and buttons are read through three chained parallel-in /
serial-out registers. A read cycle takes 25 module clocks, 1 ms at 25 kHz:

* Tick 0 loads the chips (`sh_ld` low).
* Ticks 1–24 shift out one bit each.

The chip clock `clk_out` is the inverted module clock, so the chips
advance on one edge and `rx` is sampled half a period later. The first bit
out, input H of the chip next to the FPGA, ends up in `in_reg[23]`.

### Digital outputs: five 74HC595

24 outputs and 12 output enables are sent as a 40-bit frame
`{4'b0, enables[11:0], outputs[23:0]}`, most significant bit first. An
update takes 42 module clocks:

* 1 clock captures the registers.
* 40 clocks shift the frame, with one `shclk` pulse each.
* 1 clock pulses the store clock `sclk`.

Both chip clocks are the inverted module clock, gated by a registered
enable. Each clock pulse therefore sits in the middle of a data bit and
cannot glitch. After an update, the frame bit `k` is at latch output `k`
of the chain. Board wiring that orders the chips differently only changes
the frame layout in `digital_outputs`.

### Analog inputs: AD7927

The ADC is run in its sequential mode, so that it steps through channels
0–7 on its own. Each conversion is a 16-clock frame:

* `cs` is high for one clock, then low for 15.
* `sclk = clk | cs` gives 15 falling edges in the frame. The converter
  shifts out a leading zero, the channel address and the 12 data bits on
  these edges, and takes `din` on them.

After reset the interface runs these frames:

1. **Two dummy frames** with `din` high, as the converter needs after
   power-up.
2. **A configuration frame** writing the control word `0xDF1`: write,
   sequential, last channel 7, normal power, 0 … 2·REFIN range, straight
   binary. The range gives 0–10 V at the board's inputs.
3. **A check frame.** Its result must come from channel 0. If it does not,
   `config_error` pulses and the sequence starts again from the dummy
   frames.
4. **Run frames** with `din` low, which keeps the converter's setup. Each
   result goes to the register named by its channel address.

All eight channels are refreshed every 128 clocks, 800 µs at 160.3 kHz.

## Parameters of the top

| Parameter       | Default | Meaning |
|-----------------|---------|---------|
| `POR_THRESHOLD` | 1000    | reset length in oscillator cycles after lock |
| `DIV_DO`        | 600     | digital output clock division |
| `DIV_DI`        | 2000    | digital input clock division |
| `DIV_AI`        | 312     | ADC interface clock division |
| `DIV_TCS`       | 25000   | traction control clock division |
| `TCS_LATENCY`   | 8       | idle clocks between traction control steps |

## Where this design departs from, or fills in, the original system

* **Bus.** The original peripherals sit on the vendor processor bus
  through generated bus wrappers. Here a simple request/acknowledge bus
  and `reg_wrapper` replace them. The register order within each window
  is this design's choice.
* **Floating point and CORDIC.** The original uses vendor IP cores with
  configurable latency. Here they are replaced by combinational units with
  the numerics above. The fixed-point formats are this design's choice.
* **Traction control.**
  * The controller structure, the 0.5 constant, the operator set, the
    12-step sequence and the latency wait are the original's.
  * The saturation-1 limits are assumed.
  * The gain `K` after the I gain in the original controller diagram has
    no register, so it is 1 here.
  * The original quotes both "12 clocks, 240 ns" and a 2 kHz clock with a
    10 ms operation time. This design follows the 2 kHz / 10 ms figures.
* **Clock divider.**
  * The original's divider default for output 3 is 2 (25 MHz), but its
    clock table gives 2 kHz for traction control. The top sets
    `DIV_TCS = 25000`.
  * The original's clock table lists 88.33 kHz for the output clock. The
    factor 600 gives 83.33 kHz, and the factor is what is built.
* **Digital outputs.** One block diagram shows a 24-bit enable register;
  the signal list and text give 12 enables. 12 are built. The quoted
  960 µs output update time does not match 42 clocks at either frequency.
  42 clocks is what is built.
* **ADC configuration check.** This is read as "the first result after
  configuration must come from channel 0".
* **Added outputs.** `done`, `valid`, `sent`, `scan_done`,
  `config_error` and `sat*_active` are additions for testing. The top
  leaves them open.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. Results
are compared with independent models in the testbench: real arithmetic
rounded to single precision, `$sin`, and bit-level models of the chips
(`hct166_chain`, `hc595_chain`, `ad7927_model`). Cycle counts are checked
where the design promises them (7, 20, 25, 42 and 128 clocks, and the
divider periods).

| Testbench | What it covers |
|-----------|----------------|
| `tb_fp_operator` | every operator: directed corner cases (ties, overflow, zero, signs) and random operands |
| `tb_cordic_sin` | the whole angle range and random angles |
| `tb_torque_vectoring` | sweep of 0–40 m/s × 0–90° at d = 0.2, plus random inputs; 7-clock period |
| `tb_traction_control` | 200-sample slip ramp 0 → 0.21 → −0.02 against set point 0.1; step-by-step reference; both saturations must clip; factor 1 → dip below 0.5 → factor 1; 20-clock period |
| `tb_digital_inputs`, `tb_digital_outputs` | random words through the chip models |
| `tb_analog_inputs` | control word, dummy frames, a failing check and recovery, all channels refreshed every 128 clocks |
| `tb_power_on_reset`, `tb_clock_divider` | release time and restart on lost lock; all four periods |
| `tb_reg_wrapper`, `tb_bus_decoder` | register access, one-clock acknowledge, address routing |
| `tb_ekart_top` | end to end at reduced reset length and division factors |
| `tb_ekart_top_full` | the same sequence with all defaults (about 30 ms of simulated time) |

The end-to-end sequence lives in `tb/ekart_top_env.sv`. It does the
following over the register bus:

* writes the torque vectoring and traction control inputs and reads the
  results;
* drives the switch chain and reads the switches;
* writes the outputs and checks the output latches;
* lets the ADC model fail the first configuration check, then reads all
  eight channels;
* checks forwarded accesses and an unused offset.

It counts each of these mechanisms and fails if one never happened.

To run a testbench with Verilator 5 (package first):

```
verilator --binary --timing --assert -Mdir obj_tv \
    rtl/ekart_pkg.sv rtl/fp_operator.sv rtl/cordic_sin.sv rtl/torque_vectoring.sv \
    tb/tb_torque_vectoring.sv --top-module tb_torque_vectoring
./obj_tv/Vtb_torque_vectoring
```

For the top, list every file of `rtl/` (with `ekart_pkg.sv` first) plus
`tb/ekart_top_env.sv`, `tb/hct166_chain.sv`, `tb/hc595_chain.sv`,
`tb/ad7927_model.sv` and `tb/tb_ekart_top.sv` (or `tb_ekart_top_full.sv`).

### Limits of the verification

* The slip data used to tune the original controller is not available. The
  slip profile in the testbench is synthetic, and so are the controller
  gains (P = 5, I = 10, anti-windup 1).
* For torque vectoring, the shape of the published curves is reproduced:
  the correction grows with v² and with sin²δ. At 40 m/s, 45° gives half
  and 30° a quarter of the 90° value. The published curves peak near 22 %
  at 40 m/s and 90°, which no listed factor d gives (it would need
  d ≈ 0.0074). Their scaling is therefore unknown, and only the formula
  is checked.
* The chip models follow the data-sheet protocols as used here. They were
  not checked against real parts.
* Nothing was run on hardware.
