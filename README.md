# SETTOFF: a flip-flop that corrects its own upsets and flags bad writes

SETTOFF (Soft Error and Timing error Tolerant Flip-Flop) is a radiation-hardened
flip-flop that costs far less than triplication. It handles the three ways a
flip-flop can end up holding a wrong value:

* **Upsets of the stored value (SEU).** A particle flips the flip-flop's own
  storage node. SETTOFF corrects the output *on the fly*. There is no vote
  and no redundant copy: a transition detector notices that the stored node
  moved when nothing should have written it, and an XOR gate then inverts the
  output back.
* **Transient pulses from the logic in front of it (SET).** A particle hits a
  gate upstream and a short pulse gets sampled. SETTOFF *detects* this and
  raises `error_set`, so that the surrounding architecture can replay the
  write.
* **Timing errors.** The input settles after the clock edge. SETTOFF detects
  these by the same mechanism and also raises `error_set`.

This repository holds a simulation model of the cell in SystemVerilog. It
contains the per-bit correction logic and the shared detection stage. A
register of any width can be built from it, with either of the two usual hold
styles. It follows the SETTOFF cell described in "A Low-Cost Radiation
Hardened Flip-Flop" (65 nm implementation). The choices and departures made
here are listed below.

## One clock cycle, two jobs

Everything in SETTOFF hangs on splitting each clock cycle in two at the
falling edge:

```
        rising edge: write               falling edge              next rising edge
             |<------ high phase ------->|<-------- low phase ------->|
             |      TRD interval          |       TD interval          |
             |  detect: d must equal q    |  correct: any flip of N    |
             |  (Part I, shared)          |  is an upset (Part II)     |
```

* **High phase: the TRD (time-redundancy detection) interval.** Once the
  flip-flop has written `d`, its output must equal its input until the clock
  falls. If they differ when the clock falls, one of three things happened.
  A pulse was sampled and has since died out. Or the data arrived late. Or
  the stored node was upset during the high phase. In every case the write
  is suspect, and `error_set` asks for a replay. A pulse no wider than the
  high phase is always caught.
* **Low phase: the TD (transition detector) interval.** No write can happen,
  so any transition of the storage node is an upset. The detector fires and
  the output is corrected within the detection delay.

So the duty cycle trades one duty against the other. A longer high phase
catches wider pulses. A longer low phase protects the stored value for longer
against upsets that could otherwise only be detected. The reference
evaluation uses a 1 GHz symmetric clock (500 ps each) and also an 800 ps high
phase.

## Part II: correcting an upset in place (`settoff_bit`)

Each bit has three pieces:

| piece | module | what it does |
|---|---|---|
| main flip-flop | `settoff_main_ff` | an ordinary flip-flop. Its last inverter pair holds node **N = ~d**. Its output inverter is removed. |
| correction XOR | `settoff_corr_xor` | replaces the output inverter: **q = N xor error_seu_bar**. |
| transition detector | `settoff_td` | drives `error_seu_bar`. It is 1 while `clk` is high. While `clk` is low it drops to 0 as soon as N moves, and stays 0 until the clock next rises. |

In normal operation `error_seu_bar = 1` and the XOR is just the inverter it
replaced, so the data path gets no extra gate. When a particle flips N in the
low phase, q briefly shows the wrong value. After the detection delay the
detector pulls `error_seu_bar` low. The XOR then passes N without inverting
it, which puts q back. The short wrong pulse on q is the **correction
glitch**. Its width is the detection delay, 98 ps by default, which is the
mean measured for the 65 nm cell. If a later SETTOFF stage samples the
glitch, that stage's own TRD check treats it as an SET and flags it.

What happens at the next rising edge depends on the cycle:

1. **Write cycle.** A new value overwrites N, and the detector releases. The
   bit is back to normal.
2. **Hold with a multiplexer** (`HOLD = HOLD_MUX`). The clock keeps running
   and q is fed back to d. The flip-flop therefore samples the *corrected* q
   and rewrites N with it. The detector releases at the same edge.
3. **Hold with a gated clock** (`HOLD = HOLD_CLOCK_GATE`). The flip-flop and
   its detector both sit on the gated clock. N keeps the upset value, but the
   detector stays low, so q stays corrected until the next write.

Case 2 hides a hold race. The detector must not release (which flips q back)
before the flip-flop has sampled q. In the circuit the clock reaches the
detector through an inverter. The model gives that inverter a delay,
`TD_CLK_PS` (10 ps by default). So a bit corrected in the low phase shows the
inverse of its new value on q for 10 ps after the next edge.

Every bit corrects independently. Several bits struck at once (a multiple-bit
upset) are all corrected, which ECC over a register cannot do cheaply.

**Limit.** Once a bit's detector has fired, it cannot fire again until the
clock rises. A second upset of the same bit in the same low phase, or at any
time during a gated hold, puts N back to its correct value while the XOR is
still passing N straight through. q is then wrong. The model reproduces this
limit of the circuit.

**Window before the edge.** Correction takes the detection delay. In a
multiplexer hold, an upset that lands less than that delay (98 ps) before a
rising edge has not been corrected yet when the edge samples q. The wrong
value is then written back, and the detector is already disabled. Nothing is
reported: Part I only checks write cycles. A write cycle simply overwrites
such an upset, and a gated hold still corrects it because its detector's
clock stays low. The model shows this window. The cell's published
description does not discuss it.

## Part I: detecting a bad write (`settoff_trd`)

Each bit has a detection XOR, `d ^ q`. The XOR outputs are ORed into **one
error flip-flop shared by all bits of the register**. That flip-flop
captures on the falling edge of `clk`, and only in write cycles: `we` is
registered at the rising edge, and after a hold cycle `error_set` is 0. In
the circuit the error flip-flop is clocked by an inverted clock delayed by
the XOR delay plus its setup time, so that it samples the XORs over exactly
the high phase. In this zero-delay model the falling edge is that instant.

`error_set` is meant for an architectural replay of the flagged write. For a
timing error, the replay would also need a slower clock or a higher supply
voltage. Neither the replay nor that tuning is part of this design.
`error_set` is a port for whatever implements them.

**Short-path constraint.** The scheme needs `d` to stay stable for the whole
high phase. A new value may only be launched after the falling edge. In
silicon this may mean hold buffers on short paths. In simulation it means
driving `d` and `we` in the low phase.

## Modules

```
settoff_reg            top: WIDTH bits, hold mux or clock gate, one detection stage
├── settoff_bit  [WIDTH]
│   ├── settoff_main_ff     behavioural model (fault-injection input)
│   ├── settoff_td          behavioural model (delays)
│   └── settoff_corr_xor
└── settoff_trd             detection XORs + shared error flip-flop
settoff_pkg            hold_e enum, default delays
```

### `settoff_reg` ports

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | system clock. The rising edge writes. The high phase is the TRD interval, the low phase the TD interval. |
| `rst_n` | in | 1 | asynchronous active-low reset of the detection stage only |
| `we` | in | 1 | 1 = write `d` at the next rising edge, 0 = hold |
| `d` | in | WIDTH | data. Must be stable through the high phase. |
| `seu_strike` | in | WIDTH | simulation only. A rising edge flips that bit's node N. Tie to 0 otherwise. |
| `q` | out | WIDTH | data out |
| `error_seu_bar` | out | WIDTH | per bit. 0 while an upset is being corrected. |
| `error_set` | out | 1 | 1 from a falling edge to the next if the write at the preceding rising edge is suspect. Replay it. |

### Parameters

| parameter | default | meaning |
|---|---|---|
| `WIDTH` | 1 | bits in the register. 1 is the single flip-flop. |
| `HOLD` | `HOLD_MUX` | `HOLD_MUX` or `HOLD_CLOCK_GATE` |
| `TD_DETECT_PS` | 98 | delay from a flip of N to `error_seu_bar` falling. This is the correction glitch width: the measured 65 nm mean. |
| `TD_CHAIN_PS` | 40 | width of the detector's internal pulse (its delay chains). Not given for the 65 nm cell. |
| `TD_CLK_PS` | 10 | delay of the detector's clock inverter (see the hold race above). Not given for the 65 nm cell. |

Times are in picoseconds (`timescale 1ps/1ps` in every file).

## How far the model goes

* `settoff_corr_xor`, `settoff_trd` and the top's hold logic are plain
  synthesizable RTL.
* `settoff_main_ff` is a behavioural model only because of its
  `seu_strike` input. The flip-flop itself is ordinary.
* `settoff_td` is a behavioural model. The real detector is a dynamic
  circuit: two delay chains, a precharged node M with a keeper, a dynamic
  OR. The model keeps its behaviour: a pulse per transition of N (separate
  signals for rising and falling transitions), and node M as a latch that is
  set while the clock is high and cleared by a pulse while it is low. The
  detection delay is lumped at the input. Delays are transport delays, so
  even very short flips are seen.
* Analogue effects are outside the model: pulse amplitudes and thresholds,
  metastability, glitch broadening, power, area, clock-to-q delay.

The design simulates the cell's behaviour at picosecond resolution. It is
not a netlist for a standard-cell flow. Synthesis tools see the detector's
delays as zero and its node M as a latch.

## Departures from the published cell

* The error flip-flop's delayed clock is replaced by the falling edge of the
  same clock, which gives the same zero-delay behaviour.
* The error flip-flop captures 0 in hold cycles instead of holding its
  value, so `error_set` always refers to the last cycle.
* The reset of the detection stage, the register width, the OR that shares
  the error flip-flop, the clock-gate latch and the delays `TD_CHAIN_PS` and
  `TD_CLK_PS` are this design's own choices.
* The main flip-flops have no reset. Their first write defines them.

## Failure-rate experiment

`tb/tb_settoff_failure_rate.sv` repeats the published evaluation as a Monte
Carlo run on the default-parameter register. Each of 2000 trials does the
same thing:

1. It writes a bit.
2. It sends an opposite pulse to `d` at time D + α·T after a rising edge.
3. It checks whether the next edge captured the pulse. Any flip-flop would
   then fail.
4. It checks whether SETTOFF still failed: the pulse was captured and
   `error_set` stayed low, because the pulse outlasted the high phase.

The random values are drawn as follows. α is uniform. The clock period T,
the path delay D and the width w are normal: T = 1000 ± 100 ps,
D = 10 ± 1 ps, w = 530 ± 150 ps for SETs and 98 ± 33 ps for correction
glitches. The testbench also evaluates the closed-form model of the same
experiment and requires agreement within 3.5 points:

```
g1  = Phi(((1-a)·muT - muD) / sqrt(sD² + ((1-a)·sT)²))            pulse arrives before the edge
g2  = Phi((muD + muw - (1-a)·muT) / sqrt(sD² + sw² + ((1-a)·sT)²))  still there at the edge
g2' = same with (1+tau-a) in place of (1-a)                        still there when the clock falls
```

Typical results:

| experiment | captured (plain flip-flop) | SETTOFF fails | closed form | published |
|---|---|---|---|---|
| SETs, 500 ps high phase | 54.9 % | 8.2 % | 53.5 % / 8.3 % | 45 % / 4 % |
| SETs, 800 ps high phase | 54.2 % | 0.55 % | 53.5 % / 0.47 % | – / 0 |
| correction glitches, 500 ps | 10.1 % | 0 | 9.9 % / 0 | – / 0 |

Simulation and the closed form agree. Both sit above the published
averages, even though they use the published distribution parameters. The
published averages could not be reproduced from the stated parameters. The
ordering and the conclusions still hold:

* the high phase removes most SET failures;
* an 800 ps high phase removes nearly all of them;
* correction glitches never cause a failure.

## Testbenches

Each testbench checks itself and prints `TB_RESULT checks=N failures=M`.

| testbench | covers |
|---|---|
| `tb_settoff_corr_xor` | all four input combinations |
| `tb_settoff_main_ff` | N = ~d, strikes in both phases, double strike, overwrite |
| `tb_settoff_td` | ignored while high, rising and falling upsets detected after exactly the detection delay, keeper, gated clock, release delay |
| `tb_settoff_bit` | glitch width measured, correction, gated hold, uncorrected upset in the high phase |
| `tb_settoff_trd` | 4 bits: error only for a write with a mismatch at the falling edge, not for early-ending or low-phase mismatches, reset |
| `tb_settoff_reg` | 8-bit registers in both hold styles side by side against a reference model, with upsets, multiple-bit upsets, SETs, late data and replays. It requires every mechanism to occur: correction cases 1–3, glitch, the three kinds of detection, replay. |
| `tb_settoff_pipeline` | two default flip-flops in a pipeline. Upsets in stage 1 are swept across the low phase. Every correction glitch that stage 2 captures must be flagged there, and fixed by the replayed write. |
| `tb_settoff_failure_rate` | the experiment above, default parameters |

Running one with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/settoff_pkg.sv \
    tb/tb_settoff_reg.sv --top-module tb_settoff_reg -Mdir obj -o sim
./obj/sim
```

`-Irtl` lets Verilator find each module in `rtl/<name>.sv`. Every
testbench resets or writes whatever it reads, so random initial values
(`+verilator+rand+reset+2`) are fine. They all finish in seconds.

## Not included

* **The replay mechanism** and the frequency or voltage tuning needed to
  recover timing errors. Both belong to the surrounding processor. Connect
  them to `error_set`.
* **The logic stages** before and after the register. These are arbitrary
  user logic; the testbenches stand in for them by driving pulses and late
  data onto `d`.
* **Transistor-level figures.** The 65 nm cell is reported at 30 extra
  transistors per bit, 28 % power overhead at 10 % activity and 13.2 %
  clock-to-q overhead. A logic model cannot check these.
