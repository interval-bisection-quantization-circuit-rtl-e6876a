# Interval-bisection quantizer for an 8-bit ADC

A successive-approximation ADC settles one bit per clock, so an 8-bit
conversion always takes 8 cycles. This quantizer instead keeps a whole
interval of candidate codes, `[L, R]`, and tests its midpoint every cycle.
Two comparators with built-in offsets of ±½ LSB say whether the input is
above the midpoint, below it, or within half an LSB of it. In the first two
cases one endpoint jumps to the midpoint. In the third the conversion is done.
Because every cycle can end the conversion, the average 8-bit conversion takes
7.04 midpoint tests instead of 8. The best case is 1 test (the input is at
mid-scale) and the worst case is 8.

The design is a mixed-signal circuit. The digital half is synthesizable
SystemVerilog. The analog half has behavioural models with real-valued
voltages:

* the charge-scaling DAC (`ibq_charge_dac`)
* the two offset comparators (`ibq_comparator`)

The RTL follows a published transistor-level design for a 0.6 µm CMOS process.
The blocks, the selection rules, the carry scheme of the adder, the
convergence equation and the clocking of the ready latch all come from that
design. The choices this RTL makes on its own are listed under
[Departures and limits](#departures-and-limits).

## Datapath

```
            vin ──────────────┬──────────────────┐
                              │                  │
                       ┌──────▼─────┐     ┌──────▼─────┐
                 ┌────►│ L-compar.  │     │ R-compar.  │◄────┐
                 │     │ vD - LSB/2 │     │ vD + LSB/2 │     │
                 │     └──────┬─────┘     └──────┬─────┘     │
                 │            │ HL               │ HR        │
 RST ─► falling-edge DFF ─► L-mux  (0 / L / mid)  R-mux (1s / mid / R)
                 │            │                  │           │
                 │        L-register         R-register      │
                 │            └──────┐   ┌───────┘           │
                 │               adder, divide by 2          │
                 │                      │ mid                │
                 └───────── charge-scaling DAC ──────────────┘ vD
                                        │
            convergence logic (HL, HR, mid) ─► RDY latch ─► output register ─► code
```

| HL | HR | meaning                                 | L next | R next |
|----|----|-----------------------------------------|--------|--------|
| 1  | 1  | input above midpoint + ½ LSB            | mid    | R      |
| 0  | 0  | input below midpoint − ½ LSB            | L      | mid    |
| 1  | 0  | midpoint within ½ LSB: converged        | mid    | mid    |
| 0  | 1  | cannot happen (the offsets are ordered) | L      | R      |

When the conversion converges, both registers load the midpoint. The
midpoint therefore stays where it is, and RDY and the output word stay valid
for as long as the clock runs.

Reset loads `L = 0` and `R = 2^N − 1`, so the first midpoint is
`2^(N−1) − 1` (127). The L multiplexor selects ground and the R multiplexor
selects the supply while the registered reset is high.

### The top code

`floor((L + R) / 2)` can never reach 255, because R is at most 255 and L is
less than R. The converter handles this case on its own. If the midpoint is
254 (bits 7..1 all ones) and HR is still 1, the input is above 254.5 LSB and
the answer is 255. The convergence logic then computes:

```
top_code = HR & (mid[N-1:1] == all ones)
conv     = HL & ~HR  |  top_code
```

`top_code` also switches bit 0 of the output register from `mid[0]` to a
constant 1. That register is the only place the code 255 is ever formed.

## Clocking: what happens in one period

The timing is the subtle part. The DAC is only valid for half of each clock
period.

| phase          | DAC                   | comparators | RDY latch   | registers |
|----------------|-----------------------|-------------|-------------|-----------|
| `clk` high     | plates grounded, 0 V  | invalid     | holds       | hold      |
| `clk` low      | `Vref·mid/2^N`        | decide      | transparent | hold      |
| rising edge    | still valid           | still valid | closes      | load L, R |
| falling edge   | becomes valid         | —           | opens       | —         |

* The adder settles the new midpoint during the high phase, while the DAC
  capacitors are discharged.
* During the low phase the comparators decide, and `conv` reaches the RDY
  latch.
* The rising edge does two things at once:
  * the endpoint registers take the decision;
  * the latch freezes RDY for the precharge phase, while the comparator
    outputs are meaningless.
* The output register is clocked by the **rising edge of RDY**, not by
  `clk`. It captures the midpoint at the moment the convergence is seen.

RST is sampled on the **falling** edge (`ibq_reset_dff`). The multiplexor
select lines are therefore stable half a cycle before the rising edge that
loads the reset values.

In the DAC model the grounding switch closes `T_SW` (1 ns) after `clk` rises,
and opens exactly when `clk` falls. As a result, the DAC voltage seen by the
comparators is still valid at the rising edge at which the registers sample
HL and HR. In silicon, the delay of the switch driver plays this part.

### Conversion protocol

```
        ┌─┐ ┌─┐ ┌─┐ ┌─┐ ┌─┐ ┌─┐
clk   ──┘ └─┘ └─┘ └─┘ └─┘ └─┘ └─
rst   ▁▁███▁▁▁▁▁▁▁▁▁▁▁▁▁▁▁▁▁▁▁▁      raised at one rising edge, dropped after the next
vin   ==X=======================    new held value applied with rst
tests        [1] [2] [3] ...        one midpoint test per clock-low phase
```

1. At a rising edge, apply the new held input and raise `rst`.
2. At the next rising edge, which loads the reset values, drop `rst` again.
3. Each following clock-low phase tests one midpoint.
4. The conversion time is the number of tests until RDY is seen high at a
   rising edge. `code` is valid from then on.

Apply the input before the falling edge that samples RST. During that reset
cycle the previous result is re-tested against the new input. This pulls RDY
low unless the old code is also the new code. The RDY latch and the output
register have no reset, so without this step a conversion that converges on
its very first midpoint right after another conversion would produce no new
RDY edge. An external sample-and-hold circuit supplies `vin`. It is not part
of this RTL.

## The midpoint adder

`ibq_midpoint_adder` forms `floor((L + R) / 2)`:

* It drops sum bit 0.
* It uses the final carry out as the MSB.
* Bit 0 therefore contributes only its generate signal.

The carries use a two-bit carry-lookahead ("super-carry") scheme. Bit indices
here are 0-based:

```
p[i] = l[i] | r[i]        g[i] = l[i] & r[i]
C(1) = g[1] | p[1]·g[0]                                  first pair, no carry in
C(i) = g[i] | p[i]·g[i-1] | p[i]·p[i-1]·C(i-2)           odd i ≥ 3: closes bits i-1, i
c(i) = g[i] | p[i]·C(i-1)                                even i ≥ 2: carry into bit i+1
sum[i] = l[i] ^ r[i] ^ carry_in[i]                       i ≥ 1
```

Every propagate and generate signal is computed at once. The chain of
super-carries then skips two bits per stage. With an odd N, a single even bit
is left at the top. It ends the chain with its own carry gate, and that carry
is the MSB.

## Behavioural models

**DAC.** The DAC has two binary-weighted capacitor arrays, each of N/2 bits:

* LSB array: capacitors C/8, C/4, C/2 and C, plus a terminating C/8.
* MSB array: capacitors C/8, C/4, C/2 and C, with no terminator.
* A coupling capacitor of 2C/15 joins the two arrays.

The model evaluates the Thevenin voltages of the two arrays and combines them
by superposition:

```
V_LSB = Vref·low/2^K
V_MSB = Vref·high/(2^M − 1)
vout  = V_LSB/2^M + (2^M−1)/2^M · V_MSB
      = Vref·code/2^N
```

The model has no capacitor mismatch and no settling time. Ideal values agree
within 0.5 LSB with the transistor-level results that were published for
codes 0, 17, 34, ... 255. The testbench checks this.

**Comparators.** The comparators are ideal and have no delay:

* `HL = vin > vD − LSB/2`
* `HR = vin > vD + LSB/2`

The transistor circuit behind each comparator is not modelled. It has four
stages: input and offset differential amplifiers, current mirrors, a
regenerative latch and a self-biased output amplifier. The published
transistor-level results show offsets slightly larger than ½ LSB, which
explains their ±1-code errors at 0.5, 2, 3 and 4.5 V. These models have no
such errors.

## Verified behaviour

`tb_ibq_quantizer` runs with every parameter at its default (8 bits, 5 V,
1 MHz). It applies three groups of inputs:

* **Eleven inputs, 0 V to 5 V in 0.5 V steps.** Codes and times match the
  published final-circuit simulation wherever that simulation had no code
  error:

  | vin (V)   | 0 | 1.0 | 1.5 | 2.5 | 3.5 | 4.0 | 5.0 |
  |-----------|---|-----|-----|-----|-----|-----|-----|
  | code      | 0 | 51  | 77  | 128 | 179 | 205 | 255 |
  | tests     | 8 | 6   | 7   | 8   | 6   | 7   | 8   |

  At the other four inputs the RTL gives the ideally rounded code: 26, 102,
  154 and 230, where the silicon simulation gave 25, 103, 153 and 231.
* **All 256 codes, offset from their ideal voltage by less than ½ LSB.**
  Each code and its conversion time are checked against an independent
  bisection model.
* **All codes at their exact voltage.** The average conversion time is
  7.035 tests.

The testbench also counts the mechanisms it exercises and fails if any of
them never occurs:

* L moves
* R moves
* window convergence
* top-code convergence
* best case and worst case
* RDY dropping in the reset cycle
* the result being held after convergence

`tb_ibq_resolution_sweep` builds converters of 4 to 12 bits and converts
every code of each:

| N                    | 4     | 6     | 8     | 10    | 12     |
|----------------------|-------|-------|-------|-------|--------|
| average tests        | 3.313 | 5.109 | 7.035 | 9.011 | 11.003 |
| successive approx.   | 4     | 6     | 8     | 10    | 12     |

The advantage is close to one cycle at every resolution.

Every block also has its own self-checking testbench under `tb/`. Where a
small block was characterised with a timed stimulus, the testbench replays
that stimulus as well:

* the selector: H toggling every 50 ns, reset from 100 ns;
* the flip-flop: a 20 ns clock against data with a 12 ns half period;
* the convergence gates: pulses of 20 µs and 40 µs period, then the top code;
* the RDY latch: 10 µs clock phases against a CONV pulse of 30 µs period.

## Departures and limits

* **Generic N.** The resolution `N` is a parameter with a default of 8. The
  original converter is 8 bits only. The adder handles odd N with a
  single-bit final group. The DAC model splits its arrays into `N/2` and
  `N − N/2` bits.
* **Gate-level structure.** The original builds its gates from NAND, NOR and
  transmission-gate networks:
  * the convergence logic from two four-input NANDs, a NOR and a NAND;
  * the RDY latch from four NORs;
  * the multiplexor from two transmission-gate stages.

  Here they are written as the same Boolean functions.
* **No resets beyond the original's.** The endpoint registers reset only
  through their multiplexors. The RDY latch and the output register power up
  in an arbitrary state, as in the original.
* **Ideal analog models.** The comparators and the DAC are ideal, so offsets,
  noise and settling are not represented.
* **DAC switch delay.** The 1 ns grounding-switch delay `T_SW` is a modelling
  choice. It keeps the comparator decision stable across the rising edge. An
  event-driven simulator needs it; so would real silicon.
* **Observation port.** The port `mid` exposes the current midpoint for
  observation only.
* **Synthesis.** The top `ibq_quantizer` contains the two real-valued models,
  so only its digital sub-blocks are synthesizable. A silicon implementation
  replaces `ibq_charge_dac` and `ibq_comparator` with the analog macros, using
  the same ports.
* **Not included.** The anti-aliasing filter and the sample-and-hold circuit
  that a complete ADC needs are not included.

## Files

| file | contents |
|------|----------|
| `rtl/ibq_pkg.sv` | resolution, reference voltage, LSB function |
| `rtl/ibq_quantizer.sv` | top level: the whole quantizer |
| `rtl/ibq_reset_dff.sv` | falling-edge reset flip-flop |
| `rtl/ibq_endpoint_mux.sv` | reset / H / not-H selector in front of L and R |
| `rtl/ibq_dff_register.sv` | rising-edge endpoint register |
| `rtl/ibq_midpoint_adder.sv` | adder with super-carries, divide by two |
| `rtl/ibq_charge_dac.sv` | charge-scaling DAC (behavioural) |
| `rtl/ibq_comparator.sv` | ±½ LSB comparator (behavioural) |
| `rtl/ibq_convergence_logic.sv` | CONV and top-code detection |
| `rtl/ibq_ready_latch.sv` | RDY latch, transparent while `clk` is low |
| `rtl/ibq_output_register.sv` | output word, clocked by RDY |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_ibq_resolution_sweep.sv` | average conversion time for 4 to 12 bits |

All files use `` `timescale 1ns/1ps``. Each testbench prints
`TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog.

## Simulating

The testbenches need Verilator 5 with timing support (the DAC model uses a
delay):

```sh
verilator --binary --timing -Wno-fatal --top-module tb_ibq_quantizer \
    -y rtl -y tb +libext+.sv -Irtl rtl/ibq_pkg.sv tb/tb_ibq_quantizer.sv
./obj_dir/Vtb_ibq_quantizer
```

Replace the top module and file name to run any other testbench. The
full-size test simulates about 6 ms of circuit time in well under a second.
For lint alone, use `verilator --lint-only -Wall -y rtl +libext+.sv
rtl/ibq_pkg.sv rtl/<module>.sv`.

To try another resolution, override `N` on `ibq_quantizer`. `VREF` sets the
full-scale voltage, which is also the reference of the comparator offsets.
