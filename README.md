# Resource-scheduled IIR filters: two multipliers, one adder

An IIR filter written straight from its equations needs one multiplier per
coefficient and one adder per sum. Most of them sit idle most of the time,
and each one draws power. This design is built around the other extreme.
The operations of one output sample are laid out over a fixed number of
clock steps (a *schedule*), so that only **two multipliers and one adder**
are needed. Every value that crosses from one step to the next is held in a
register. Values whose lifetimes do not overlap share the same register,
and small multiplexers put the right operands on the shared units in each
step. The cost is latency: one sample takes five clock steps instead of one.

The RTL contains three filters:

| module | what it is | hardware | rate |
|---|---|---|---|
| `iir_sched_filter` | first-order filter, scheduled over 5 steps | 2 multipliers, 1 adder, 6 schedule registers | 1 sample / 6 clocks |
| `iir_behav` | the same equations (any order), all in one clock | 2·ORDER+2 multipliers, 2·ORDER+1 adders | 1 sample / clock |
| `iir_hp_biquad` | 48-bit high-pass filter, scheduled over 5 steps | 2 multipliers, 1 adder/subtractor | 1 sample / 6 clocks |

The top level `iir_lowpower_top` places all three side by side. `iir_behav`
at order 1 computes exactly what `iir_sched_filter` computes, so the shared
and unshared structures can be compared sample for sample.

## The filter equations

The first-order filter follows a generic behavioural description. It has
coefficient lists `coeffa(0..order)` and `coeffb(0..order-1)` and a delay
line `delay(0..order)`. For each sample:

```
input_sum  = input + Σ_{j<order}  delay(j)*coeffb(j) / 1024
output     = input_sum*coeffa(order)/1024 + Σ_{k≤order} delay(k)*coeffa(k) / 1024
delay(l)  <= delay(l+1)   (l < order);     delay(order) <= input_sum
```

Coefficients are integers with 10 fraction bits. Every product is divided by
1024 on its own, with truncation toward zero as integer division does. This
is done in `iir_qmul`: a negative product is biased by 1023 before the
arithmetic shift. Note that `coeffa(order)` appears twice, once with
`input_sum` and once with `delay(order)`. That is how the description is
written, and the RTL keeps it.

At order 1 this becomes the single-assignment form that is scheduled:

```
input_sum   = input + delay(0)*coeffb(0)
output_sum0 = input_sum*coeffa(1)
output_sum1 = output_sum0 + delay(0)*coeffa(0)
output      = output_sum1 + delay(1)*coeffa(1)
```

That is four multiplications and three additions. With one clock step per
operation, the longest chain (multiply, add, multiply, add, add) is five
steps long.

## The schedule (the core of the design)

Register names R1..R11 number the eleven values that cross a step boundary.
M1 and M2 are the two multipliers.

| step | M1 | M2 | adder | registers loaded at the end of the step |
|---|---|---|---|---|
| strobe | – | – | – | R1 ← input |
| 1 | delay(0)·coeffb(0) | delay(0)·coeffa(0) | – | R2 ← M1, R3 ← M2 |
| 2 | – | delay(1)·coeffa(1) | R1 + R2 = input_sum | R4 ← sum, R6 ← M2, R5 ← R3; delay(0) ← delay(1), delay(1) ← input_sum |
| 3 | R4·coeffa(1) | – | – | R7 ← M1, R8 ← R5, R9 ← R6 |
| 4 | – | – | R7 + R8 | R10 ← sum, R11 ← R9 |
| 5 | – | – | R10 + R11 = output | output register ← sum |

Seen from each value, the lifetimes fit together so that six physical
registers hold all eleven values:

* **R1** holds the input sample.
* **R2/R7** holds M1's product. R2 is made in step 1 and used in step 2; R7
  is made in step 3 and used in step 4.
* **R3/R6 → R5/R9 → R8/R11** is a three-register chain behind M2. It shifts
  in steps 1 to 4. The product of step 1 (delay(0)·coeffa(0)) reaches the
  adder in step 4. The product of step 2 (delay(1)·coeffa(1)) reaches it in
  step 5.
* **R4/R10** holds the adder result. R4 (input_sum) feeds M1 in step 3. R10
  feeds the adder again in step 5.

As a result, each unit needs only small operand multiplexers:

* M1 takes delay(0) or R4/R10, times coeffb(0) or coeffa(1).
* M2 takes delay(0) or delay(1), times coeffa(0) or coeffa(1).
* The adder takes R1, R2/R7 or R4/R10 on the left, and R2/R7 or R8/R11 on
  the right.

The layout of units, registers and multiplexers follows the published
hardware drawing. The delay registers, the output register and the
controller are additions made here, because the drawing leaves them out.

The delay line is updated at the end of step 2, while input_sum is still on
the adder output. The old delays are not read after step 2, so this gives
the same result as updating at the end of the sample.

### Controller (`iir_sched_ctrl`)

The controller is a step register that goes IDLE → C1 → … → C5 → IDLE. A
decoder turns the current step into a control word, the packed struct
`iir_pkg::sched_ctrl_t`. The word holds the operand selects as enums and
the load enables of every register. R1 loads on the clock edge that accepts
the strobe, so the input only has to be valid together with the strobe. The
chain registers and the multipliers' registers load only in busy steps, so
they stay still while the filter is idle. An assertion checks that step 5
is always followed by IDLE.

## The high-pass filter (`iir_hp_biquad`)

This is the application filter. It is a second-order section

```
y[n] = B0·x[n] + B1·x[n-1] + B2·x[n-2] − A1·y[n-1] − A2·y[n-2]
B0 = B2 = 0.96645   B1 = −1.93291   A1 = −1.93178   A2 = 0.93403
```

with 48-bit samples and Q30 coefficients. The default parameters are the
coefficients rounded to Q30, for example B0 = round(0.96645·2³⁰) =
1037717786. The filter's properties:

* Gain is 1 at half the sample rate.
* There is a zero pair at DC.
* There is a pole pair of radius 0.966 at about 0.0054 of the sample rate.
  At a 79 kHz sample rate that is roughly 430 Hz.
* The coefficients are rounded to five decimals, so the DC gain is not
  exactly zero. It is (B0+B1+B2)/(1+A1+A2) ≈ −0.0044 (−47 dB). A full-scale
  step therefore settles at about −0.44 % of full scale, not at 0.

The same resource limit applies here: two multipliers and one adder. Five
products and four sums fit into five steps:

| step | M1 | M2 | adder/subtractor |
|---|---|---|---|
| S1 | B0·x[n] → P1 | B1·x[n-1] → P2 | – |
| S2 | B2·x[n-2] → P1 | A1·y[n-1] → P2 | ACC = P1 + P2 |
| S3 | A2·y[n-2] → P1 | – | ACC = ACC + P1 |
| S4 | – | – | ACC = ACC − P2 |
| S5 | – | – | y = sat(ACC − P1) |

Products are kept at full width (48 + 32 = 80 bits). The accumulator has 4
guard bits above that, so no partial sum can overflow. The result is
`ACC >>> 30`, which truncates toward −∞, then saturated to 48 bits. The
saturated value is also what is fed back as y[n], so an overload clips
instead of wrapping. The schedule, the truncation and the saturation are
choices made here. The source gives the coefficients, the 48-bit width, the
Q30 format, the four guard bits and the resource limit. The port names
(`iCLK`, `iRESET_N`, `iNewValue`, `iIIR_RX`, `oDone`, `oIIR_TX`) and the
delay-line names (`nZX0..2`, `nZY1..2`) follow the original simulation.

The intended system samples at 79 kHz, down from a 10 MHz input stream.
One sample takes 6 clocks, so at a 10 MHz clock the filter has about 21
times the throughput it needs. No decimator is included, because the source
gives no structure for one. `hp_new_value` on the top level is where a
sample-rate strobe or decimator would connect.

## Interfaces and timing

All three filters use a rising-edge clock and an asynchronous active-low
reset. Reset clears every register, so each filter starts from a zero
state.

* **`iir_sched_filter`**: apply `din` together with a one-clock `strobe`
  while `busy` is low. A strobe while busy is ignored. `dout` updates on the
  5th rising edge after the edge that sampled the strobe. `valid` is high
  for the following clock. The next strobe can be taken on the edge after
  that, which gives one sample every 6 clocks.
* **`iir_behav`**: `din` with `strobe`. `dout` updates on that same edge,
  and `valid` is high for the following clock. It takes one sample per
  clock.
* **`iir_hp_biquad`**: `iIIR_RX` with `iNewValue`, accepted when idle.
  `oIIR_TX` updates 5 edges later. `oDone` rises on that edge and stays
  high until the next sample is accepted.

Data are two's complement. In the first-order filters (`DATA_W = 32`,
coefficients as 32-bit `int` parameters) sums and products wrap on
overflow. The high-pass filter saturates.

## Where this RTL departs from the source or fills gaps

* The source gives no coefficient values for the first-order filter. The
  defaults (coeffb(0) = −512, coeffa(0) = 256, coeffa(1) = 512, i.e. −0.5,
  0.25, 0.5) are placeholders; set them as parameters.
* The scheduled form printed in the source leaves out the /1024 scaling of
  the behavioural form. The RTL scales every product, as the behavioural
  form does.
* The source calls the high-pass filter "third order", but its five
  coefficients define a second-order section. That section is what is
  built. A second coefficient set appears in the original simulation
  (B0 = 1058580589, B1 = −2117171916, B2 = 1058580589, A1 = −2116957168,
  A2 = 1043644841, in Q30). It can be passed through the `B0..A2`
  parameters.
* Reset, the strobe/valid handshakes, the data width of the first-order
  filters, rounding and saturation are not specified by the source. They
  are choices made here.
* The power figures reported for the original FPGA implementation cannot
  be reproduced in RTL simulation. They are not claimed here.

## How far it is verified

Each module has a self-checking testbench in `tb/`. Each compares outputs
with an independent integer model of the equations, written in the
testbench: 64-bit for the first-order filters, exact 128-bit for the
high-pass filter.

* `tb_iir_sched_ctrl` checks the control word of every step against the
  schedule table above. It also checks the busy/done timing and that
  strobes during busy are ignored.
* `tb_iir_sched_datapath` drives the five control words by hand and checks
  the output.
* `tb_iir_sched_filter` checks random samples, the 5-edge latency and
  strobes during busy.
* `tb_iir_behav` runs order 1 (the defaults) and order 3 at one sample per
  clock.
* `tb_iir_hp_biquad` runs four stimuli. A full-scale step must start near
  0.966 of full scale, swing negative and settle at −0.0044. An alternating
  sequence at half the sample rate must pass at unit gain. A negative to
  positive full-scale jump must saturate. Random data follow.
* `tb_iir_hp_step_fig` repeats the original simulation of the high-pass
  filter. It uses that simulation's Q30 coefficient set (B0 = B2 =
  1058580589, B1 = −2117171916, A1 = −2116957168, A2 = 1043644841) and a
  full-scale step of 2⁴⁷−1. After 2000 samples the output settles at
  −3518625627123. The original run shows −3509187271274, 0.27 % away. The
  set's DC gain, −10738/429497 ≈ −0.025, predicts the settled value.
* `tb_iir_lowpower_top` runs the top level at its default parameters with a
  10 MHz clock and the high-pass filter at a sample every 127 clocks
  (≈ 79 kHz). It checks that the scheduled and one-clock filters agree on
  every sample. It counts each mechanism (scheduled samples, ignored
  strobes, agreement, high-pass samples, saturations) and fails if any of
  them never happened.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module tb_iir_lowpower_top \
    -y rtl -y tb +libext+.sv rtl/iir_pkg.sv tb/tb_iir_lowpower_top.sv
./obj_dir/Vtb_iir_lowpower_top
```

Replace the testbench name to run another one. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself. A watchdog ends a run that
hangs. Every testbench finishes in well under a second.

## Files

* `rtl/iir_pkg.sv`: step enums, operand-select enums and the control-word
  struct.
* `rtl/iir_qmul.sv`: multiplier with divide-by-2^FRAC, truncating toward
  zero.
* `rtl/iir_sched_ctrl.sv`, `rtl/iir_sched_datapath.sv`,
  `rtl/iir_sched_filter.sv`: the scheduled first-order filter.
* `rtl/iir_behav.sv`: the one-clock generic-order filter.
* `rtl/iir_hp_biquad.sv`: the scheduled high-pass filter.
* `rtl/iir_lowpower_top.sv`: the top level.
* `tb/tb_*.sv`: one self-checking testbench per module.
