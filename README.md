# Leading-edge bit synchronizer (Ku-band return link)

This bit synchronizer recovers clean clocks and data from a bit stream whose
clock is sent alongside it. The received clock has the right frequency, but
its phase relative to the data is unknown: up to about ±90°. The data itself
may be asymmetric: with 25% asymmetry a "one" can be 1.25 bits long and a
"zero" 0.75 bits, or the other way round. Only the **rising (leading) edges**
of the data stay where they belong, so the synchronizer tracks those. It:

* locks a VCO at twice the bit rate (the **X2 clock**) to the received clock
  with a phase-locked loop;
* divides the VCO by two into two bit-rate clocks half a bit apart. The
  **Q-clock** samples where bit edges should be. The **I-clock** samples in
  mid-bit;
* in a second, slow digital loop, moves the PLL's phase in small steps until
  the rising edge of the Q-clock sits on the leading edge of each data bit;
* re-times the mid-bit samples to the Q-clock as the recovered data. It sends
  them, with the Q-clock and the X2 clock, to a convolutional decoder;
* watches for **false frequency lock** and, if it finds one, removes the
  slow loop's bias so the PLL can re-acquire.

This RTL follows the synchronizer's original description for the loop
structure, the sampling flip-flops, the gates and the update pacing. It fills
in the details that description does not give: widths, gains, the gate
inputs, the clock-domain handling and reset. Each file's header comment says
which parts are which. The section "Where this design departs or guesses"
lists the choices that matter.

## The two loops

```
 rx_clk ──►┌─────┐ up/dn ┌─────────────┐ v_ctrl ┌─────┐ x2_clk ┌──────┐ i_clk
           │ PFD ├──────►│ loop filter ├───────►│ VCO ├───────►│ ÷2   ├──┬──►
    ┌─────►└─────┘       │  amplifier  │        └─────┘        └──────┘  │ q_clk
    │ i_clk              └──────▲──────┘ (DAC voltage subtracted)        ├──►
    │                           │ v_dac                                  │
    │                        ┌──┴──┐  code  ┌──────────┐ cen, dir ┌──────┴──────┐
    │                        │ DAC │◄───────┤ up/down  │◄─────────┤ correction  │
    │                        └─────┘        │ counter  │          │ control     │
    │                                       └─┬──▲─────┘          └──▲───▲──────┘
    │                      tick_clk (1 kHz) ──┘  │ lsb   cen_clr     │   │ trans,
    │                                   ┌────────┴───────────┐───────┘   │ updown
    │                                   │ LSB transition det.│   ┌───────┴──────┐
    │                                   └────────────────────┘   │ bit timing   │◄── rx_data
    │  ┌─────────────────────┐ false_lock (zero bias)            │ detector     ├──► data_out
    └──┤ false-lock detector ├──────────► up/down counter        └──────────────┘
rx_clk►└─────────────────────┘
```

**Fast loop (PLL).** The phase-frequency detector (PFD) compares the received
clock with the I-clock. The loop filter integrates its UP/DN output. With an
integrator in the loop, the PLL can only settle where the filter's mean input
is zero. The DAC voltage is *subtracted* at that input. At rest, the PFD must
therefore produce a mean UP-minus-DN that cancels the DAC term. That means a
fixed phase offset between the received clock and the I-clock:

    offset (bits) = G_DAC × v_dac        (positive: VCO clock later = retard)

With the defaults (`LF_G_DAC = 0.25`, `DAC_VFS = 1 V`) the DAC spans ±0.25 bit,
that is ±90°. An 8-bit DAC gives steps of 90/128 ≈ 0.70°. At zero bias the
I-clock is aligned with the received clock, so the Q-clock edge sits half a
bit after it.

**Slow loop (bit timing).** Each correction is one step of the up/down
counter, which drives the DAC. The direction comes from the data's rising
edges, described next. Steps happen on a 1 kHz clock, and at most every
second 1 kHz period. The PLL has therefore long settled on the new offset
before the next decision counts.

## The early/late decision

This is the heart of the design (`bit_timing_detector`,
`correction_control`). Take a rising data edge near a Q-clock edge at time t0
(T = one bit):

| time          | clock   | flip-flop action                                  |
|---------------|---------|---------------------------------------------------|
| t0            | Q-clock | **FDQ** samples the data: 1 if the edge came before t0 (early), 0 if after (late). **FEQ** takes FDI (still the previous bit, 0) |
| t0 + T/2      | I-clock | **FDI** samples mid-bit: 1                         |
| t0 + T/2 … t0 + T | —   | transition pulse = FDI ∧ ¬FEQ is high; FDQ still holds the sample from t0 |
| t0 + T        | Q-clock | FEQ catches up, the pulse ends; the control flip-flops clock |

* **Transition detector** `trans = FDI ∧ ¬FEQ`. It gives one half-bit pulse
  per 0→1 data transition, half a bit after the leading edge. Falling edges,
  which asymmetry moves, play no part.
* **Up/down gate** `updown = trans ∧ FDQ`. It is high for an early edge and
  low for a late one.
* **Count enable flip-flop** (Q-clock). It is set when `trans` is high at a
  Q-clock edge, and held until the LSB transition detector resets it
  (asynchronously).
* **J-AND** `= updown ∧ ¬cen` and **K-AND** `= trans ∧ ¬updown ∧ ¬cen` drive
  the **FHQ** JK flip-flop (Q-clock). J means advance, K means retard. Both
  gates close once count enable is set. FHQ therefore keeps the decision of
  the edge that armed the counter, however many edges follow before the
  1 kHz clock arrives.

Because the decision needs only the Q-sample at a *rising* edge, asymmetry
does not bias it. With the Q-clock on the leading edge, the I-clock samples
half a bit later. A 25% stretched or shrunk falling edge is still a quarter
bit away from that sample, so the recovered data stay correct.

## Pacing the updates: the 2 ms hold-off

`updown_counter` steps once on a 1 kHz edge if count enable is high: down
for advance, up for retard. `lsb_transition_detector` copies the counter's
LSB into a flip-flop on every 1 kHz edge. The XOR of LSB and copy is high
from the edge on which the counter moved until the next edge, and it resets
count enable. So:

1. edge *k*: the counter steps; the XOR goes high; count enable is cleared;
2. edge *k+1*: the XOR falls; nothing can count on this edge, because count
   enable was clear;
3. the next rising data edge re-arms count enable;
4. edge *k+2*: the next step.

Updates are therefore at least 2 ms apart. After each step the PLL gets at
least one full millisecond to move to the new phase before a new decision is
taken. The end-to-end testbenches check this spacing on every update.

## False frequency lock detector

`false_lock_detector` counts the received clock and the I-clock in two 8-bit
counters (plus carry). When either reaches 256, the other is stopped, and its
count is compared with 256. An error of at most `TOL` counts (8, about 3%)
means true lock; more means false lock. Both counters are then cleared and the
measurement repeats, about every 270 received-clock periods. While false lock
is reported, the up/down counter is held at mid-scale, the code for 0 V. The
PLL then runs without bias and can pull in. The two counters run in
different clock domains. Their stop and clear requests and the full flag
cross through two-flip-flop synchronizers. The stopped count is read after a
settling wait of 8 received-clock cycles, as a quasi-static bus. The
synchronizer latency lets a count overrun by about three, which `TOL` must
cover.

## Clocks, reset, timing

| clock      | drives                                                        |
|------------|---------------------------------------------------------------|
| `x2_clk`   | the divide-by-2 flip-flop                                     |
| `i_clk`    | FDI, PFD feedback input, the false-lock detector's second counter |
| `q_clk`    | FDQ, FEQ, count enable, FHQ; `data_out` changes on its rising edge |
| `rx_clk`   | PFD reference input, false-lock detector control              |
| `tick_clk` | up/down counter, LSB-delayed flip-flop (1 kHz in the system)  |

`rst_n` is an asynchronous, active-low reset for every flip-flop. The counter
resets to mid-scale (zero bias). The divide-by-2 flip-flop is held in reset
too, so the I- and Q-clocks stop while `rst_n` is low. Their flip-flops are
reset only by the falling edge of `rst_n`. In a two-state simulator, drive
`rst_n` high and then low, rather than starting it low, so that this edge
exists. Count enable, FHQ and the up/down counter
sit in different clock domains and are wired directly, as in the original
circuit. Only the false-lock level gets a synchronizer into the 1 kHz domain
(two 1 kHz edges of latency).

## Files

| file (`rtl/`)                | what it is |
|------------------------------|------------|
| `bitsync_pkg.sv`             | shared constants, `dir_e` (advance/retard), zero-bias code |
| `ku_bitsync_top.sv`          | whole loop: digital core + DAC, loop filter and VCO models (simulation model) |
| `bitsync_core.sv`            | all the digital logic; the synthesizable part |
| `clock_divider.sv`           | ÷2 flip-flop: I-clock (Q) and Q-clock (Q̄) |
| `phase_freq_detector.sv`     | three-state PFD |
| `bit_timing_detector.sv`     | FDI, FDQ, FEQ, transition and up/down gates |
| `correction_control.sv`      | count enable flip-flop, J/K gates, FHQ |
| `updown_counter.sv`          | saturating up/down counter, zero-bias preset |
| `lsb_transition_detector.sv` | LSB-delayed flip-flop and XOR |
| `false_lock_detector.sv`     | two-counter false-lock detector |
| `dac_model.sv`, `loop_filter_model.sv`, `vco_model.sv` | behavioural models of the analog parts (real-valued, not synthesizable) |

The analog models hold the PLL dynamics. The loop filter is a
proportional-plus-integral filter with a smoothing pole, stepped every 0.25 ns
(`KI = 0.002 /ns`, `KP = 0.9`, `τ = 40 ns`). The VCO is 100 MHz + 10 MHz/V,
limited to ±10%. It keeps exact edge times in a real variable, so the time
step adds no frequency error. Together they give a PLL natural frequency of
about 0.5 MHz at 50 Mbit/s. For another bit rate, set `F_CENTER_HZ` to twice
that rate and scale `KV_HZ_PER_V` and `LF_KI_PER_NS` with it.

### Parameters of `ku_bitsync_top`

| parameter | default | meaning |
|-----------|---------|---------|
| `DAC_BITS` | 8 | up/down counter and DAC width (chosen) |
| `FLD_BITS` | 8 | false-lock counter width: full count 2^8 = 256 (as in the original) |
| `FLD_TOL` | 8 | largest count error accepted as true lock (chosen) |
| `F_CENTER_HZ` | 100e6 | VCO centre = 2 × bit rate; the original VCO covers 4–100 MHz |
| `KV_HZ_PER_V`, `VCO_PULL` | 10e6, 0.1 | VCO gain and pull range (chosen) |
| `DAC_VFS`, `LF_G_DAC` | 1.0, 0.25 | DAC full scale; their product sets the ±90° span |
| `LF_DT_NS`, `LF_KI_PER_NS`, `LF_KP`, `LF_TAU_NS` | 0.25, 0.002, 0.9, 40 | loop filter model |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ku_bitsync_top \
    -y rtl rtl/bitsync_pkg.sv tb/tb_ku_bitsync_top.sv -o simv
obj_dir/simv
```

| testbench | what it shows | run time |
|-----------|---------------|----------|
| `tb_ku_bitsync_full` | defaults, real 1 kHz clock, 20° late data with 25% asymmetry: the PLL locks; the counter retards about 26 steps, at most one per 2 ms, then dithers between two codes; the data edges end about 2° from the Q-clock edge; 10 000 recovered bits are correct | ≈ 80 s |
| `tb_ku_bitsync_top` | 5-bit counter, 20 µs update clock: retard by 60°, then a 100° jump the other way (advance), then false lock (received clock 25% off: detected, DAC held at zero bias), then true lock again; counts each mechanism | ≈ 2 s |
| `tb_timing_cases` | defaults: first correction direction for leads/lags of 22.5°–100° with 0% and ±25% asymmetry | < 1 s |
| `tb_<block>` | one per block, against values worked out from the inputs | < 1 s each |

`bitsync_core` is plain synthesizable SystemVerilog. The top level and the
three `*_model` files use `real` and delays and are for simulation only.
Simulate with `--timing`.

## How far it is checked

* Each block's testbench compares it with values computed from its inputs.
  Each one also fails against a copy of the block with one deliberate fault
  (for example, swapped early/late, no freezing of FHQ, XOR replaced by AND,
  a wrapping counter).
* Assertions check two rules while simulating: FHQ does not change while
  count enable is set, and the counter moves at most one step per 1 kHz edge
  except when it is preset to zero bias.
* The closed loop corrects in the right direction for every lead and lag up
  to 90°, symmetric or with 25% asymmetry either way. It settles within about
  2° of the leading edge (one step with a 5-bit counter, a few steps with the
  default 8-bit counter). It then dithers by one step, and it recovers the
  data without error. Each decision is taken from a single data edge, so
  jitter in the PLL can make single steps go the wrong way near equilibrium.
* Not checked: noise, jitter on the received clock, metastability in the
  clock-domain crossings (two-state simulation), and bit rates other than
  50 Mbit/s.

## Where this design departs or guesses

* **Gate inputs.** The original names the up/down gate and the J-AND and
  K-AND gates but not their inputs. The inputs above are this design's
  reading. So is the choice that count enable *holds* after it is set (that
  choice is what produces the described 2 ms spacing). FEQ is clocked by the
  Q-clock, and FEQ is used as the recovered data.
* **Beyond ±90°.** In the original analysis, a 190° lag and a 100° lead gave
  *no* correction at all, with count enable never set. In this design the
  transition detector fires on every rising edge whatever the phase. It
  advances in both of those cases (the nearer way round for the 190° case)
  and then saturates at the DAC's -90° end. `tb_timing_cases` prints these
  two cases without judging them. The specified operating range is ±75°,
  inside which both behave the same.
* **Phase-frequency detector.** The original uses a commercial ECL part. Here
  it is the standard two-flip-flop PFD with an AND reset. Its reset pulse has
  zero width in simulation.
* **Counter.** Width (8), direction (advance = down, because the DAC voltage
  is subtracted), saturation at both ends and reset to mid-scale are choices.
* **False-lock tolerance** (8 counts) and all clock-domain crossing details
  are choices.
* **DAC span** (±90°) and all loop filter and VCO constants are choices. The
  original gives only the VCO range (4–100 MHz) and the ±75° requirement.
* **Not built.** The adaptive threshold (asymmetry corrector) in front of the
  synchronizer is an analog circuit whose design was not given, so `rx_data`
  is taken as already sliced. The convolutional decoder is downstream and
  outside this design.
