# Triple-redundant modified hybrid DPWM

A digital pulse-width modulator (DPWM) drives the switches of a closed-loop
power converter from a duty-cycle word. This design builds a *modified hybrid*
DPWM with a 10-bit duty word. Three copies of it run side by side, and a
majority voter combines them (triple modular redundancy, TMR). The voted output
stays correct while any one copy is faulty, and an `error` output flags every
cycle in which the copies disagree. That flag is how a fault is identified.

Everything is synchronous to one clock, Fclk. One PWM period lasts 32 Fclk
cycles.

## How one generator makes its pulse

A hybrid DPWM splits the duty word in two:

* **Counter part (MCDPWM), upper 5 bits `C`.** A free-running 5-bit period
  counter `k` (0…31) is compared with `C`.
* **Delay-line part (MDDPWM), lower 5 bits `D`.** Two 32-stage ring counters
  each circulate a single 1. Reset puts both rings in step with `k`, so stage
  `k` is active in cycle `k`. A 32:1 multiplexer picks one stage of each ring.

The "modified" variant adds set and reset events to both parts. The published
design adds them to cut the turn-on and turn-off delay of the pulse. All the
events are ORed into one SET and one RESET line. These drive a clocked SR
flip-flop, and its output is the PWM.

| event      | source                                            | fires when (period count `k`)      |
|------------|---------------------------------------------------|-------------------------------------|
| SET_C      | period counter = `C`                              | `k == C`                            |
| RESET1_C   | zero detector on the period counter               | `k == 0`                            |
| RESET2_C   | second counter, restarted on the rising edge of SET_C, reaches `C` | `k == (2C+1) mod 32` (once SET_C has occurred) |
| SET1_D     | ring 2 through a mux selected by `1 − D` = `(32 − D) mod 32` | `k == (32 − D) mod 32`   |
| RESET_D    | ring 1 through a mux selected by `D`              | `k == D`                            |

SET = SET_C | SET1_D and RESET = RESET1_C | RESET2_C | RESET_D. On each rising
Fclk edge the flip-flop clears on RESET, otherwise sets on SET, otherwise holds.
**Reset wins when both are asserted.** So the output in cycle `k+1` reflects the
events of cycle `k`.

Two worked examples, which the testbench checks:

* `0101010101` (C = 10, D = 21): sets at k = 10 and 11, resets at 0 and 21.
  The output is high in cycles 11…21, which is 11 of every 32 cycles.
* `0101011111` (C = 10, D = 31): sets at k = 1 and 10, resets at 0, 21 and 31.
  The output is high in cycles 2…21, which is 20 of every 32 cycles.

The high time is therefore not a linear function of the duty word. The table
above is the complete rule. `tb/mhdpwm_ref_pkg.sv` implements it as a
cycle-level model, which can be used to tabulate any word.

### The Fclk term of SET_D

The published design also ORs Fclk itself into SET_D (a term it calls SET2_D).
The output flip-flop samples on the rising Fclk edge, where Fclk is always
high. A literal data term would therefore hold SET asserted at every edge. With
reset-wins, the output would then be simply the inverse of RESET, and SET_C and
SET1_D would have no effect. This RTL treats the Fclk term as the clock edge
that times the set, not as a data input, so SET_D = SET1_D. This is the
largest interpretive choice in the design. If you want the literal
behaviour, OR a constant 1 into `s` of `sr_ff` in `rtl/mhdpwm.sv`.

## Fault identification

`tmr_mhdpwm` instantiates three generators with a shared clock and separate
duty inputs `duty1`, `duty2` and `duty3`. `majority_voter` is purely
combinational:

* `mhdpwm = ab | ac | bc` is the fault-free PWM.
* `error = (a≠b) | (a≠c)` is high in every cycle in which the three outputs are
  not all equal.

A fault is modelled by giving one generator a different duty word, for
example `0101011111` against `0101010101`. The voted output then follows the
healthy pair, and `error` pulses wherever the odd copy's waveform differs.
`channel_pwm[2:0]` brings out the three raw outputs, so the faulty copy can be
named: it is the one that differs from `mhdpwm`. The voter has no registers, so
`mhdpwm` and `error` change in the same cycle as the generator flip-flops.

Redundancy here covers the whole generator, not only its registers. Each copy
has its own counters, rings and flip-flop. The voter itself is a single point
of failure, as in any simple TMR.

## Interface of `tmr_mhdpwm`

| port          | dir | width | meaning                                        |
|---------------|-----|-------|------------------------------------------------|
| `clk`         | in  | 1     | Fclk; all registers on its rising edge         |
| `rst`         | in  | 1     | synchronous, active high; all counters and rings to stage 0, outputs low |
| `duty1..3`    | in  | 10    | duty word of each generator; upper 5 bits to the counter part, lower 5 to the delay line |
| `mhdpwm`      | out | 1     | voted PWM                                      |
| `error`       | out | 1     | generator outputs disagree in this cycle       |
| `channel_pwm` | out | 3     | raw generator outputs, bit i = generator i+1   |

Parameters: `NC` (counter-part bits, default 5) and `ND` (delay-line bits,
default 5). The duty word is `NC+ND` bits, the period is `2^NC` cycles and
each ring has `2^ND` stages. The waveform repeats every `2^max(NC,ND)` cycles.

A duty word changed without a reset takes effect at once. The second counter
may still be running from the previous word, so the first period after a
change can differ from the steady state. Copies that changed word at different
times can then disagree until their state converges, which `error` will show.

## Module hierarchy

```
tmr_mhdpwm                 top: 3 generators + voter
├── mhdpwm  (x3)           one generator: split word, OR events, SR flip-flop
│   ├── mcdpwm             counter part
│   │   ├── pwm_counter        free-running period counter
│   │   ├── nbit_comparator    SET_C (x2: also RESET2_C)
│   │   ├── zero_detector      RESET1_C
│   │   ├── edge_detector      rising edge of SET_C
│   │   └── triggered_counter  second counter, start/stop
│   ├── mddpwm             delay-line part
│   │   ├── ring_counter (x2)  32-stage one-hot rings
│   │   └── delay_line_mux (x2) 32:1 tap selection
│   └── sr_ff              output flip-flop, reset wins
└── majority_voter         2-of-3 vote and error flag
mhdpwm_pkg                 default sizes
```

After synthesis the top is about 100 word-level cells and 231 flip-flops:
3 × (2 × 32 ring stages, 2 × 5 counter bits and 3 single-bit flops).

## Where this RTL departs from, or fills in, the published design

* **Widths.** The published text gives the generator both as two 5-bit halves
  of a 10-bit word and, elsewhere, as a 1024-count counter with a 1024-stage
  ring. The RTL follows the 5 + 5 split, which matches the published module
  names: 5-bit counters and comparators, and 32-stage rings. Setting
  `NC = ND = 10` gives the larger reading, with a 20-bit duty word. The
  end-to-end testbench also passes at that size once its `NC` and `ND` are
  changed and the top is given the same values.
* **Which half goes where.** Upper bits go to the counter and lower bits to
  the delay line, as in a conventional hybrid DPWM. The published design does
  not say.
* **SET2_D** is realised as the clock edge (see above).
* **SR flip-flop with S = R = 1**: reset wins. This is not specified.
* **Second counter**: it counts up from 0 after the SET_C edge and stops after
  its match, so RESET2_C fires once per start. While the duty word is
  steady, the stopped count (one past the match) never equals the duty field
  again. The `active` gate on RESET2_C matters only when the word changes
  while the counter is stopped: it keeps the new word from firing a spurious
  RESET2_C.
* **"1 − duty"** is taken as `(2^ND − D) mod 2^ND`.
* **Scope of redundancy.** One passage of the published description
  triplicates only the storage elements. Its block diagrams triplicate whole
  generators in front of a single voter. The RTL follows the block diagrams.
* **Reset** is added. The published top has only clock and duty inputs.
* **Voter outputs.** The published voter also had a third output (`check`)
  with no defined function. It is omitted. `channel_pwm` is added.
* **Not built.** The published generator also brings out a plain hybrid-DPWM
  output pair for comparison, `hdpwm1` and `hdpwm2`, but does not describe how
  it is made. It is not built. The complementary MHDPWM output exists as
  `mhdpwm.pwm_n` but is not brought to the top.
* **Not reproduced.** The published power and timing figures come from FPGA
  and ASIC tool flows: about 2.0 W on an Artix-7, and WNS −0.222 ns on an
  unnamed library. They are not reproduced here.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. For example,
the end-to-end test at the default sizes:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal --top-module tb_tmr_mhdpwm \
  -y rtl -y tb +libext+.sv rtl/mhdpwm_pkg.sv tb/mhdpwm_ref_pkg.sv \
  tb/tb_tmr_mhdpwm.sv
./obj_dir/Vtb_tmr_mhdpwm
```

`tb_tmr_mhdpwm` runs these cases:

* identical words, where `error` must stay low;
* the single-word fault in each of the three positions;
* the all-zero and all-one words;
* 60 random words with a random faulty copy, half of them without a reset.

It compares every generator output, the vote and the error flag with three
reference models in every cycle. It also counts each mechanism: SET_C,
RESET1_C, RESET2_C, SET1_D, RESET_D, simultaneous set and reset, an error, and
a masked fault. A mechanism that never occurs counts as a failure.
`tb_mhdpwm` checks the two worked examples above and sweeps 120 words against
the model. The leaf testbenches are exhaustive or randomised against
closed-form expectations.
