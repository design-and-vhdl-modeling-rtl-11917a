# Second-order all-digital PLL with a multi-bit bang-bang phase-frequency detector

This is a phase-locked loop built entirely from digital parts. It multiplies a
reference clock by M. A ring oscillator is set by a digital word. The loop
compares the phases of the reference and of the divided oscillator output,
turns that comparison into a signed number, filters the number and feeds it
back as the oscillator's control word.

Such a PLL is a building block for distributed clock generation: many PLLs,
each locked to its neighbours, replace a clock tree or grid. That use is why
the phase detector is unusual. It does not simply report early or late. It
reports how early or late, as a signed multi-bit code, and it still reports the
sign when the error is too small to measure.

The published configuration, which is the default here, is:

| quantity | value |
|---|---|
| reference `ref_clk` | 250 MHz |
| oscillator output `clk` | 1 GHz |
| feedback division M | 4, so the loop filter runs at 250 MHz |
| TDC code width N | 4 bits: TDC output 0..14, PFD code -15..+15 (5-bit signed) |

```
            +--------------------------- pfd ---------------------------+
 ref_clk -->|  bbpfd --SIGN------------------------->+                 |
            |   ^    --MODE--> tdc --Dout (0..14)--> pfd_arith --ERROR |--> loop_filter --DIN--> dco --> clk
    div --->|---+                                     (SIGN*(Dout+1))  |    (PI, clk = div)       |
    ^       +-----------------------------------------------------------+                         |
    |                                                                                              |
    +-------------------------------------- freq_divider (/M) <------------------------------------+
```

## The phase-frequency detector

The detector (`pfd`) has three parts. The bang-bang detector (`bbpfd`) finds
which edge came first and how long the other one took. The TDC (`tdc`) measures
that time. The arithmetic block (`pfd_arith`) combines the two into a signed
code.

### Bang-bang detector: SIGN and MODE

`bbpfd` is a small self-timed circuit with no clock of its own. It cycles
through four states:

1. **Wait.** MODE is low and both input flags are clear.
2. **Measure.** The first rising edge of either `ref_clk` or `div` sets its
   flag (X1 or X2). MODE = flag_ref XOR flag_div (X9) goes high. This is the
   measure mode.
3. **Decide.** The arbiter sees which flag rose first. The save latch X10 takes
   the decision: SIGN = 1 if ref came first, 0 if div came first. The second
   rising edge sets the other flag, and MODE falls. MODE is therefore high for
   exactly the phase error.
4. **Self-reset.** A three-input Muller C-element (`c_element`) watches the two
   flags and a signal saying "X10 now holds the arbiter's decision". When all
   three are high it raises an internal reset that clears both flags. The
   arbiter then releases, the agreement signal drops, and only when all three
   inputs are low does the C-element drop the reset.

Because it uses a C-element rather than an AND gate, the reset cannot end while
any element is still being cleared. SIGN stays in X10 through the reset, until
the next measure cycle decides again. The internal reset lasts about one
arbiter delay after MODE falls. An input edge that arrives during that time is
lost.

Only the first edge of each input counts in a measure cycle. If `ref_clk` rises
twice before `div` rises once, the second ref edge is ignored. So when the
frequencies differ, the detector keeps reporting the same sign at full scale,
and that is what pulls the frequency in.

### Arbiter and metastability

`pfd_arbiter` models a mutual-exclusion element: two cross-coupled RS latches
followed by a metastability filter. Its inputs are active low, since each flag
falls on the arbiter side when its event arrives.

- With both inputs high, both outputs are low.
- With one input low, that side wins after `DELAY`.
- With both inputs low, the decision already taken is kept.

The metastable case arises when the second input falls before the first
decision has come out, that is, within one `DELAY` (10 ps by default). The
model then draws a random winner and outputs a clean, complementary pair after
`DELAY`. This is how metastability resolution is represented: the decision is
random but never invalid. An assertion checks that both outputs are never high
together.

The delay is inertial. An input change inside the `DELAY` window replaces the
pending output change, so the outputs switch once per decision and never
glitch.

With the default values the random window (10 ps) is shorter than one TDC step
(20 ps). So only the sign of a +/-1 code can be random, which is the behaviour
a real bang-bang detector has near lock.

### TDC and the transfer function

MODE runs into a chain of 2^N-2 = 14 buffers (`tdc_delay_line`), each with
delay TAU = 20 ps. While MODE is high, a row of D-latches (`tdc_encoder`) is
transparent. The falling edge of MODE closes the latches, which then hold a
thermometer code. The encoder counts the ones, so a bubble in the code costs at
most one LSB. This gives

    Dout = min(floor(phase error / TAU), 2^N - 2)

The arithmetic block then forms

    ERROR = SIGN * (Dout + 1)

as an (N+1)-bit two's-complement number. Adding one before applying the sign
keeps the direction of errors smaller than one TAU. Near lock the code is +1 or
-1, a pure bang-bang detector. It grows by one per TAU and saturates at +/-15
once the error exceeds 14 x 20 ps = 280 ps. A positive code means ref leads,
so the oscillator must speed up.

## Loop filter

`loop_filter` is a proportional-integral filter, H(z) = K1 + K2/(1 - z^-1),
clocked by the rising edge of `div`:

    acc  <= sat(acc + K2*e)
    dout <= sat((K1*e + sat(acc + K2*e)) >>> FRAC)

The gains are integers scaled by 2^-FRAC. The defaults K1 = 16, K2 = 1 and
FRAC = 4 give a proportional gain of 1 and an integral gain of 1/16 DCO step
per code step. The accumulator and the output saturate rather than wrap. The
output is registered.

The filter reads the PFD code as it stands at each rising edge of `div`:

- When ref leads, MODE ends on that same `div` edge, and the sampled code is
  the measurement that just finished.
- When div leads, the code comes from the previous cycle.

If no measure cycle ended in a period, the held code is used again.

## Digitally controlled oscillator

`dco` models a ring oscillator whose period follows

    T = DT * W,   W = 2^(K+1) - DIN

DIN is the K-bit signed filter output, and a larger DIN gives a higher
frequency. With K = 8 and DT = 2 ps:

- DIN = 0 gives 976.6 MHz.
- DIN = 12 gives exactly 1 GHz.
- The full range is 781 MHz to 1.30 GHz.

The model re-reads DIN at every half period.

## Divider and reset

`freq_divider` is a modulo-M counter clocked by `clk`. Its output is high for
ceil(M/2) counts, and its rising edges coincide with `clk` rising edges.

`rst` (asynchronous, active high) does the following:

- clears the detector's flags and save latch and the TDC register;
- holds the divider output low;
- loads the filter with its initial value. In the PLL this is `LF_INIT` = -64,
  which starts the oscillator at 868 MHz, well below the lock point.

The oscillator keeps running during reset at the frequency the filter's reset
value selects.

Start-up therefore looks like this. The very first code depends on the
starting phase and can be negative. After that, the reference is faster than
the divided clock, so the detector reports +15 for several tens of reference
cycles while the integrator ramps DIN up. The loop then settles into a
bang-bang limit cycle, with DIN moving around 12 and codes of +/-1 or +/-2.

## What is taken from the original description and what was chosen here

Taken from the original description:

- the loop topology;
- M = 4 and the 250 MHz / 1 GHz operating point;
- the PFD structure: input latches, arbiter with metastability filter, save
  latch, C-element reset, XOR for MODE, tapped delay line with latch register
  and encoder;
- ERROR = SIGN*(Dout+1) and the TDC range 0..2^N-2;
- the behaviour of the arbiter with random resolution;
- the PI filter form;
- the DCO law T = DT*(2^(K+1) - DIN).

N = 4 follows from the reported full-scale code of 15.

Chosen for this design, with no value given by the source:

| item | value | why |
|---|---|---|
| TDC buffer delay `TDC_TAU` | 20 ps | plausible 65 nm buffer |
| arbiter delay `ARB_DELAY_PS` | 10 ps | keeps the random window below one TDC step |
| DCO step `DCO_DT` | 2 ps | W = 500 is exactly 1 GHz |
| DCO word width `K` | 8 bits | 1 GHz well inside the range |
| filter gains | K1 = 1, K2 = 1/16 | stable, overdamped loop with the values above |
| filter reset value in the PLL | -64 | oscillator starts below lock, so start-up shows positive saturation |
| saturation in the filter | yes | |
| encoder | count of ones | |
| gate checking that X10 agrees with the arbiter | AND-OR of the arbiter outputs and SIGN | |
| global reset of X10 and of the TDC register | yes | |

One known departure: the negative full scale. The original results mention a
code of -16. ERROR = SIGN*(Dout+1) with Dout at most 14 can only reach -15, and
this design follows the formula.

## Synthesizable parts and models

Synthesizable logic:

- `c_element`: a latch enabled when all inputs agree;
- `bbpfd`: flags with two asynchronous clears, X10 latch, XOR and
  agreement gate;
- `tdc_encoder`: latches and ones counter;
- `pfd_arith`, `loop_filter`, `freq_divider`.

The detector is self-timed. The loop through the C-element and the flags'
asynchronous clears is intended, and it settles because the arbiter delay lies
inside it.

Timing models that cannot be synthesized, since the real parts are analog:

- `pfd_arbiter`: delay, and a random draw for metastability;
- `tdc_delay_line`: buffer delays;
- `dco`: period from the control word.

Every module sets `timeunit 1ps; timeprecision 1fs;`, and the delays are
`realtime` parameters in picoseconds. Shared defaults are in `adpll_pkg`.

## Simulating

Each testbench in `tb/` is self-checking. It ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog. Run one with Verilator 5
(timing support is required):

    verilator --binary --timing --assert -Wno-fatal --top-module tb_adpll \
        -y rtl -y tb +libext+.sv rtl/adpll_pkg.sv tb/tb_adpll.sv
    ./obj_dir/Vtb_adpll +verilator+rand+reset+2

Replace `tb_adpll` with any other testbench name.
`+verilator+rand+reset+2` starts uninitialised state at random values. The
testbenches create a real reset edge, because the flags and the C-element
start in arbitrary states.

| testbench | what it checks |
|---|---|
| `tb_adpll` | The whole PLL at default parameters, with a 250 MHz reference. Start-up is dominated by +15 codes. After 600 reference cycles the mean `clk` period is 1000 ps within 0.2 %, the mean `div` period equals the reference period, and \|ERROR\| is at most 4. There are four `clk` edges per `div` period. A mid-run reset reloads the filter and the loop locks again. It also counts every mechanism: ref-led and div-led cycles, saturation, +/-1 codes, near-simultaneous edges, DIN changes and reset. It runs in about 2 s. |
| `tb_pfd` | The transfer function over random offsets: +/-1 near zero, one step per 20 ps, saturation at +/-15. |
| `tb_bbpfd` | SIGN, MODE width equal to the offset, self-reset, a second leading edge ignored, ties resolved both ways, global reset. |
| `tb_pfd_arbiter` | Idle state, winner per input, hold, propagation delay, random resolution that is always clean and goes both ways. |
| `tb_c_element` | Random sequences against a reference model. |
| `tb_tdc`, `tb_tdc_delay_line`, `tb_tdc_encoder` | Code = floor(width/TAU) with saturation, tap timing, latch hold and the bubble case. |
| `tb_pfd_arith`, `tb_loop_filter`, `tb_dco`, `tb_freq_divider` | Exhaustive or reference-model checks of the formulas above. |

## Limits

- The model has no internal gate delays except the arbiter delay and the TDC
  buffers. Reset recovery of a transistor-level detector is longer, and it
  would lose more edges than this model does.
- Lock time and jitter depend directly on the assumed TAU, DT and gains.
  Treat them as examples, not as characterised numbers.
- The PLL has a single reference input. Coupling several of these PLLs into a
  clock network, which is what this detector was designed for, is not part of
  this RTL.
