# FPGA PID controller with serial A/D and D/A adapters

This design is a digital PID controller for a small FPGA that closes a
feedback loop around an analog plant. It has three parts. An 8-bit serial A/D
converter (AD7823) samples the plant output every 5.4 µs. A one-cycle datapath
evaluates the incremental PID law. An 8-bit serial D/A converter (AD7303)
drives the plant with the result. All of it runs from one 50 MHz clock. The
only arithmetic is one subtractor, three multipliers and three adders, all
combinational, with three registers to hold state. A new control value
therefore appears one clock (20 ns) after each new measurement.

```
            ref_in[7:0]
                 |
 AD7823  ad_data |     +------+ reading  +----------+  u   +------+  dac_sync
 ------->--------+---->| adia |--------->| pid_core |----->| daia |--------> AD7303
 <--- ad_convst/ad_sclk|      |  valid   |          |u_valid|     | dac_sclk/dac_din
                       +------+          +----------+       +------+
```

## The control law

The controller uses the incremental (velocity) form of the discrete PID law:

    e_k = ref - y_k
    u_k = u_{k-1} + b0*e_k + b1*e_{k-1} + b2*e_{k-2}

    b0 = Kp (1 + Td/T)
    b1 = Kp (-1 + T/Ti - 2 Td/T)
    b2 = Kp Td/T

Kp, Ti and Td are the usual proportional gain, integral time and derivative
time, and T is the sampling period. The law does not store an integral.
Instead it stores the previous output u_{k-1} and the two previous errors.
Since b0 + b1 + b2 = Kp T/Ti, a constant error changes u by the integral
gain on every sample. For a P controller (b0 = Kp, b1 = -Kp, b2 = 0), u_k
stays equal to Kp*e_k.

### Datapath (`pid_core`)

`pid_core` is a direct map of the law:

* **Subtractor:** ref - y, 9-bit signed.
* **Multipliers:** three, b0*e_k, b1*e_{k-1} and b2*e_{k-2}.
* **Adders:** three, in a two-level tree. The first adds
  b0*e_k + b1*e_{k-1}. The second adds u_{k-1} + b2*e_{k-2}. The third adds
  the two results.
* **Registers:** three, holding e_{k-1}, e_{k-2} and u_{k-1}. They load when
  `y_valid` is high.

The operators are not shared, so one sample is handled in a single clock.

Number formats. These are this design's own choices:

| quantity      | format                                         |
|---------------|------------------------------------------------|
| ref, y, u     | 8-bit unsigned codes (0 to 255)                |
| e             | 9-bit signed                                   |
| b0, b1, b2    | 32-bit signed, 16 fraction bits (Q15.16)       |
| u_{k-1}       | 32-bit signed, 16 integer and 16 fraction bits |

Sixteen fraction bits are needed because a realistic integral gain is tiny
at a 185 kHz sample rate. With Ti = 4 ms, Kp T/Ti = 0.0027. With only 8
fraction bits that would round to zero.

**Where the clamp sits.** This is the point most easily misread. The
register u_{k-1} holds the unclamped sum. It saturates only at its own
32-bit limits, so it can never wrap. The clamp to 0..255 applies only to the
output `u`, which is the integer part of u_{k-1}.

If the stored value were clamped instead, the velocity form would lose
information each time the output hit a limit. A P or PD controller would
then keep a permanent offset. In simulation such a loop settled at 19 codes
instead of 58. The cost of the chosen arrangement is integral wind-up: while
the output is saturated, the integral part keeps growing and must unwind
afterwards. With the default tuning this is slow, and bounded by the 32-bit
range.

### Tuning and coefficients

The coefficients are parameters of `pid_top` (`B0`, `B1`, `B2`, type
`pid_pkg::coef_t`). `pid_pkg` provides the helpers `pid_b0`, `pid_b1`,
`pid_b2` and `to_coef`, which compute them at elaboration time from Kp, Ti,
Td and T.

The defaults are Kp = 2, Ti = 4 ms, Td = T/2 = 2.7 µs and T = 5.4 µs. That
gives b0 = 3, b1 = -3.9973 and b2 = 1.

The source tuning is quoted as "Kp = 2, KI = 0.5, KD = 1" without units, so
it had to be interpreted:

* **KD = 1** is read per sample: Kp*Td/T = 1.
* **KI = 0.5** is read as Kp/Ti = 0.5 per millisecond, which gives Ti = 4 ms.
  The per-sample reading (Kp*T/Ti = 0.5) makes the loop unstable at a 5.4 µs
  period with the plant described below. `tb_pid_workloads` shows this: the
  reading swings between 128 and 168 and never settles.

## Converter adapters

### A/D adapter (`adia`, AD7823)

The adapter repeats a fixed cycle of 270 clocks, which is 5.4 µs or
185 kS/s. The cycle starts when reset is released:

| clocks  | phase   | pins                                                      |
|---------|---------|-----------------------------------------------------------|
| 2       | CONVST  | `ad_convst` low; its falling edge starts a conversion     |
| 200     | CONVERT | 4 µs, the converter's typical conversion time             |
| 48      | SHIFT   | eight `ad_sclk` pulses of 3 clocks low and 3 clocks high  |
| rest    | IDLE    | `ad_convst` high, `ad_sclk` low                           |

During SHIFT the adapter reads `ad_data` MSB first. It samples `ad_data` in
the last clock of each SCLK high phase. The converter moves to the next bit
on the falling edge.

After the eighth bit, `reading` updates and `valid` pulses for one clock.
The 5.4 µs total and the 4 µs conversion time are given figures. The split
of the period, the 8.33 MHz SCLK and the sampling point are choices based on
the AD7823's serial protocol.

### D/A adapter (`daia`, AD7303)

A `load` pulse starts one 16-bit frame. The frame carries the control byte
`CTRL` followed by the data byte, MSB first:

* `dac_sync` is low for the 16 bits.
* `dac_sclk` runs at 25 MHz, within the converter's 30 MHz limit.
* Each bit is set up while SCLK is low, so the converter takes it on the
  rising edge.
* After the last bit, SYNC stays high for 2 clocks.

One frame is therefore 34 clocks, 680 ns, or 1.47 M updates per second.

A `load` that arrives during a frame is kept, and the latest such load wins.
It is sent as soon as the gap ends, so back-to-back frames stay 34 clocks
apart.

The default `CTRL` = `8'b0000_0011` selects the internal reference, both
channels powered, channel A, and "load input and DAC register". This byte
comes from the AD7303 data sheet. To drive channel B, change `CTRL`.

## Timing of one sample

Counting clocks from 0, the first clock in which `ad_convst` is low:

* **Clocks 0 to 1:** `ad_convst` low.
* **Clock 204:** first `ad_sclk` rising edge, 4.08 µs after the conversion
  started.
* **Clock 249:** `reading` and `valid`.
* **Clock 250:** `u`, `u_valid` and the D/A load.
* **Clocks 251 to 282:** the D/A frame, with SYNC low.
* **Clock 283:** SYNC rises, 5.66 µs after CONVST fell.

The next conversion starts at clock 270, so the D/A frame of sample k
overlaps the conversion of sample k+1. The controller adds one clock to the
path from measurement to output.

## Top level (`pid_top`)

The pins are those of the original controller block. `ref` is renamed
`ref_in` because `ref` is a SystemVerilog keyword.

| pin                              | dir | meaning                                   |
|----------------------------------|-----|-------------------------------------------|
| `clk`                            | in  | 50 MHz                                    |
| `reset`                          | in  | active high, synchronous; also starts sampling |
| `ref_in[7:0]`                    | in  | set point code                            |
| `ad_data`                        | in  | AD7823 serial output                      |
| `ad_convst`, `ad_sclk`           | out | AD7823 control                            |
| `dac_sync`, `dac_sclk`, `dac_din`| out | AD7303 serial interface                   |
| `reading[7:0]`                   | out | last A/D sample y                         |
| `u[7:0]`                         | out | last control value                        |

Parameters:

* `B0`, `B1`, `B2`: the coefficients.
* `PERIOD_CYC`: the acquisition period in clocks.

The converters, the op-amp board and the plant are analog parts and lie
outside the FPGA. Behavioural models of them are in `tb/`.

## Closed-loop behaviour

`tb/plant2_model.sv` models the plant as a second-order op-amp low-pass
filter:

    G(s) = Ks / (1 + 2m s/w0 + s²/w0²)
    Ks = 0.67, w0 = 6.81e3 rad/s

It has two damping settings: m = 1.80, or m = 0.56 with the capacitors
swapped. Codes map 0 to 5 V on both converters. A 2 V step (code 102) gives
these results at 40 ms:

| controller           | plant    | final reading | peak | static error |
|----------------------|----------|---------------|------|--------------|
| P (Kp = 2)           | m = 1.80 | 58            | 58   | 43 %         |
| PI                   | m = 1.80 | 101 to 102    | 102  | 0            |
| P                    | m = 0.56 | 58            | 77   | 43 %         |
| PD                   | m = 0.56 | 58            | 76   | 43 %         |
| PI                   | m = 0.56 | 102           | 102  | 0            |
| PID (default tuning) | m = 0.56 | 102           | 102  | 0            |

The P results match 1/(1 + Kp Ks) = 43 %. Adding the derivative term
lowers the peak only slightly. The integral term removes the static error.
With Ti = 4 ms it does so slowly, over tens of milliseconds, without overshoot.
Responses published for the original controller settle faster and overshoot
with PI and PID, which suggests a stronger integral action than the reading
chosen here.

## Departures and limits

* **Coefficients:** fixed by parameters. The block has no coefficient
  inputs, so retuning means re-synthesis.
* **Error formation:** the error is formed digitally from a digital set
  point. A diagram of the loop places the error summation ahead of the A/D
  converter. The datapath and pin list, however, form it inside the FPGA,
  and this design follows them.
* **Sampling period:** 5.4 µs here. Measurements of the original hardware
  show about 6.7 µs between output steps.
* **Resources:** coarse synthesis gives 132 flip-flop bits and 32 I/O pins.
  The original reports 199 flip-flops and 24 bonded IOBs on a Spartan-3
  xc3s200. The internal widths here are this design's own, and the reason
  for the pin difference is not known.
* **Sampling start:** sampling runs freely from the release of reset. There
  is no separate start input.
* **Converter protocols:** bit order, clock edges and the AD7303 control
  byte come from the converters' data sheets, not from the controller's
  description. Check them against the parts you use.

## Files

`rtl/`:

* `pid_pkg.sv`: widths, formats, default tuning, timing constants and
  coefficient helpers.
* `pid_core.sv`: the PID datapath.
* `adia.sv`: the A/D adapter.
* `daia.sv`: the D/A adapter.
* `pid_top.sv`: the controller.

`tb/`:

* `tb_pid_core.sv`: random samples and tunings, checked against an integer
  model. Also checks the one-clock latency, clamping and register
  saturation.
* `tb_adia.sv`: checks against an AD7823 model: values, 270-clock period,
  pulse counts and conversion time.
* `tb_daia.sv`: checks against an AD7303 model: words, 32-clock SYNC,
  34-clock back-to-back frames and queued loads.
* `tb_pid_top.sv`: closed loop at default parameters. Steps the set point
  0 → 102 → 20 → 102 over 120 ms. Checks every D/A frame against an
  independent model of the law, plus the period and the delay. Counts
  clamping at both ends, integral-only steps and derivative steps.
* `tb_pid_workloads.sv`, with `pid_loop_bench.sv`: the seven closed loops
  in the table above.
* `ad7823_model.sv`, `ad7303_model.sv`, `plant2_model.sv`: behavioural
  models of the converters and the plant.

Each testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

Run with Verilator 5 from the folder that holds `rtl/` and `tb/`. For
example:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
        rtl/pid_pkg.sv tb/tb_pid_top.sv --top-module tb_pid_top -o sim
    ./obj_dir/sim

Approximate run times:

* `tb_pid_top`: about 5 s (6 M clocks).
* `tb_pid_workloads`: about 3 s.
* The block testbenches: under a second each.

To try another tuning, compute the coefficients with the package helpers.
For example:

    pid_top #(.B0(to_coef(pid_b0(KP, TD, T))),
              .B1(to_coef(pid_b1(KP, TI, TD, T))),
              .B2(to_coef(pid_b2(KP, TD, T)))) ...

If you use a clock other than 50 MHz, rescale the cycle counts in `pid_pkg`
(`ADC_*`, `DAC_*`).
