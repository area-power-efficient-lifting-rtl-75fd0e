# Multi-channel, multi-level lifting DWT on one shared arithmetic core

An implanted microelectrode array records many neural channels at once, and
sending the raw samples off the body takes more power than the implant can
spend. A discrete wavelet transform (DWT) turns each channel into a sparse set
of coefficients that compresses well. This RTL computes a 4-level DWT of 32
channels in real time with a single small arithmetic unit. It relies on three
things:

* **Lifting.** The wavelet filter (symmlet-4 in lifting form) becomes five
  steps. Each step has the form `W = X + Bi*Y + Bj*Z`.
* **One computation core, used over and over.** The core performs one step
  per clock, so one pair of samples takes five clocks. All channels and all
  levels take turns on the same core.
* **Parked state.** Between its turns, each (channel, level) keeps its filter
  state in a small memory. This memory, not the logic, grows with the number
  of channels.

The design favours area and power over speed. With 32 channels sampled at
25 kS/s, the clock is only 6.4 MHz.

## The lifting steps

The samples of one channel are taken in pairs: first `h`, then `f`. Each pair
gives one approximation `a` and one detail `d`. The previous pair's values
carry a prime (`f'`, `P'`, `Q'`, `R'`).

```
P = h  + B0*f
Q = f' + B1*P + B2*P'
R = P' + B3*Q + B4*Q'
a = Q  + B5*R + B6*R'
d = R' + B7*a
```

Afterwards `f, P, Q, R` become the primed values for the next pair. They form
the 40-bit state word of that channel and level. A level-`k` approximation is
an input sample of level `k+1`. So level 2 sees one sample per two input
samples, level 3 one per four, and so on. The approximations of the highest
level, and the details of every level, are the outputs.

### Number formats

* Data words are 10-bit **sign-magnitude**: a sign bit and a 9-bit magnitude.
  Coefficients are 5-bit sign-magnitude: a sign bit and a 4-bit magnitude.
* The core multiplies in sign-magnitude. This needs only 10x5 multipliers,
  where two's complement would need 10x10.
* The core adds in two's complement.

Three further arithmetic rules are choices of this RTL:

* **Fixed point.** A coefficient has 4 fraction bits: `{s, m}` means
  `(-1)^s * m/16`.
* **Product scaling.** Each 13-bit product magnitude is shifted right by 4 and
  truncated, toward zero. This leaves a 9-bit magnitude.
* **Overflow.** The three-term sum wraps modulo 2^10. It does not saturate.
  The one unrepresentable result, -512, comes out as sign-magnitude "-0".

The coefficient values in `dwt_pkg::DEFAULT_COEFS` are **placeholders**:
B0..B7 = -6, 2, -5, 9, -3, 7, -2, 11 sixteenths. These are not the symmlet-4
lifting constants. Put your own quantised factorisation in the `COEFS`
parameter of `dwt_top`. B0 goes in the low five bits, in sign-magnitude.

## Time-sharing: slots, phases and the level schedule

This is the part of the design that takes the most care to follow.

Time is divided into **channel slots** of 8 clocks. A **sample period** is
one slot per channel, 256 clocks for 32 channels. A **frame** is 16 sample
periods. The inputs of all channels share one bus. In the first clock of its
slot, a channel's sample is taken from `data_in`.

A single counter in `controller` drives everything. Its bit fields, from the
LSB up:

| bits           | field         | meaning                                            |
|----------------|---------------|----------------------------------------------------|
| `[2:0]`        | phase         | clock within the slot                              |
| `[7:3]`        | channel       | which channel owns the slot                        |
| `[8]`          | pair parity   | 0: this sample is an `h`, 1: it is an `f`          |
| `[11:9]`       | level bits    | with the parity bit, a 4-bit sample count `s`      |

**Which level runs in a slot.** The level is one plus the number of trailing
zeros of `s`:

| s (sample in frame) | 0    | 1,3,5,..,15 | 2,6,10,14 | 4,12 | 8  |
|---------------------|------|-------------|-----------|------|----|
| level computed      | none | 1           | 2         | 3    | 4  |

* **Level 1.** It runs when the second sample of a pair (`f`) arrives. The
  first sample (`h`) was written into the **input buffer** one period earlier.
* **Higher levels.** In an `h` period, level 1 has nothing to do. That slot
  runs level 2, 3 or 4 instead, on inputs taken from the **pairing memory**.
* **Cost.** Per channel and frame there are 8 + 4 + 2 + 1 computations and
  one idle slot. More levels therefore cost no clocks, only memory.

**Where an approximation goes.** An approximation of level `k` below the top
goes into the pairing memory as an input of level `k+1`. If bit `k` of `s` is
1, it is stored as the next level's `h`; if that bit is 0, as its `f`. For
example, level 1 at `s=15` writes `h` and at `s=1` writes `f`. Level 2 at
`s=2` then reads that pair, in the right time order. Level-4
approximations leave on `a_out`.

**The eight phases of a slot:**

| phase | action                                                                  |
|-------|-------------------------------------------------------------------------|
| 0     | read: sample `data_in`; load CC memory from input buffer/bus or pairing memory and from channel/level memory; in an `h` period, write `data_in` to the input buffer |
| 1     | P step                                                                  |
| 2     | Q step                                                                  |
| 3     | R step                                                                  |
| 4     | a step                                                                  |
| 5     | d step, `d` captured in the output register                            |
| 6     | write `f,P,Q,R` back to channel/level memory; `d_out` valid             |
| 7     | write `a` to the pairing memory, or present it on `a_out` (top level)   |

The design specifies one read, five compute and two write clocks. Which write
comes first is this RTL's choice.

## CC memory: the register shuffle

The core reads three registers, X, Y and Z. Three more registers, M1 to M3,
hold values between steps. There are no other operand multiplexers. Instead,
after each step the six registers shift so that the next step's operands are
already in X, Y and Z:

| step | Y    | X    | Z    | M1   | M2   | M3   | computes                 |
|------|------|------|------|------|------|------|--------------------------|
| P    | f    | h    | f'   | P'   | Q'   | R'   | X + B0*Y                 |
| Q    | P    | f'   | P'   | Q'   | R'   | f    | X + B1*Y + B2*Z          |
| R    | Q    | P'   | Q'   | R'   | f    | P    | X + B3*Y + B4*Z          |
| a    | R    | Q    | R'   | f    | P    | Q    | X + B5*Y + B6*Z          |
| d    | a    | R'   | f    | P    | Q    | R    | X + B7*Y                 |

Going down a row, every step applies the same rotation:

```
Y <- W,  M3 <- Y,  M2 <- M3,  M1 <- M2,  Z <- M1,  X <- Z
```

There is one exception. After the R step, X takes Y, which is the new Q. After
the d step nothing moves. At that point Y is the approximation, and Z..M3 are
exactly the new state word. The coefficient ROM gives Bj = 0 for the P and d
steps, so the same core form covers all five steps.

## Blocks

| module                 | role                                                                        |
|------------------------|-----------------------------------------------------------------------------|
| `dwt_top`              | wires the blocks together; input bus and the two output buses              |
| `controller`           | the counter, level decode, strobes, coefficient and memory addresses      |
| `computation_core`     | `W = X + Bi*Y + Bj*Z`: two multipliers, 2's complement stage, three-term adder, back to sign-magnitude |
| `array_multiplier`     | 10x5 sign-magnitude multiplier: AND array, 2-stage Wallace tree (`csa_row`), 13-bit final adder |
| `three_term_adder`     | two cascaded 10-bit ripple adders                                           |
| `ripple_carry_adder`   | ripple chain of `full_adder` cells (10 and 13 bit)                          |
| `full_adder`           | one-bit full adder                                                          |
| `csa_row`              | row of full adders as 3:2 compressors                                       |
| `sm_to_tc`, `tc_to_sm` | format converters around the adder                                          |
| `cc_memory`            | X, Y, Z, M1, M2, M3 with parallel load and the shuffle above               |
| `coefficient_memory`   | hard-wired 8x5-bit ROM, two read ports                                      |
| `input_buffer`         | one word per channel: the `h` sample waiting for its `f`                  |
| `pairing_memory`       | `h` and `f` words per channel and level below the top; one shared address, write one word, read both |
| `channel_level_memory` | 40-bit state word per channel and level (128 words)                        |
| `dwt_pkg`              | word sizes, sign-magnitude struct types, phase enum, default coefficients  |

**Size.** At the default size, the memories hold 7,360 bits:

* channel/level memory: 128 x 40 bits;
* pairing memory: 2 x 96 x 10 bits;
* input buffer: 32 x 10 bits.

The logic adds 82 flip-flops. The address of each channel-and-level memory is
`level_index * NUM_CH + channel`.

## Interface and timing (`dwt_top`)

| port          | dir | width | meaning                                                        |
|---------------|-----|-------|----------------------------------------------------------------|
| `clk`, `rst_n`| in  | 1     | clock; asynchronous active-low reset of the counter           |
| `data_in`     | in  | 10    | sample bus, sign-magnitude                                     |
| `in_strobe`   | out | 1     | `data_in` is taken in this clock (phase 0 of every slot)      |
| `in_ch`       | out | 5     | channel the taken sample belongs to                            |
| `d_out`       | out | 10    | detail coefficient                                             |
| `d_valid`     | out | 1     | `d_out` valid, phase 6 of a computing slot                    |
| `d_ch`, `d_lvl`| out| 5, 2  | channel and level index (0 = level 1) of `d_out`              |
| `a_out`       | out | 10    | approximation of the highest level                             |
| `a_valid`     | out | 1     | `a_out` valid, phase 7 of a highest-level slot                |
| `a_ch`        | out | 5     | channel of `a_out`                                             |

The source of the input bus follows the design: it puts channel `in_ch`'s next
sample on `data_in` whenever `in_strobe` is high. There is no back-pressure.

**Latency.** A detail leaves 6 clocks after the sample that started its slot.
Level 1 details therefore lag the `f` sample by 6 clocks. Level-`k` results
appear in the first `h` period after their inputs are complete.

Each channel produces 15 details and one approximation per frame.

**Reset.** Reset clears only the counter. The memories are not reset, as SRAM
is not. The first few outputs of each channel and level after power-up depend
on the memories' initial contents, until a few pairs have passed through each
level. The lifting filter has a finite memory, so this start-up transient
ends by itself: a level's outputs are exact once a few of its own pairs, and
the pairs of the levels below it, have been computed from real samples.

**Parameters.**

* `NUM_CH` must be a power of two. The default is 32.
* `NUM_LVL` may be any value of 1 or more. The default is 4.
* `COEFS` sets the coefficient table.

At other sizes, the clock needed is `8 * NUM_CH * sample_rate`.

## How far to trust it, and where it departs

Follows the published architecture:

* the five-step lifting equations;
* 10-bit data and 5-bit coefficients;
* multiplication in sign-magnitude, addition in two's complement;
* the core structure: two 10x5 array multipliers with a Wallace tree and a
  13-bit final adder, and a three-term adder of two cascaded ripple adders;
* the six-register shuffle;
* the eight phases;
* the counter layout and the level/idle-slot schedule;
* the sizes and access pattern of the four memories.

Choices of this RTL:

* the coefficient values (placeholders) and their 4-bit binary point;
* truncation of the products, and wrap-around on overflow;
* the input strobe and the output valid and tag signals;
* the order of the two write phases;
* combinational memory reads with synchronous writes;
* no reset of the memories.

**Memories.** The original memories are custom 6T SRAM arrays that cut power
in three ways:

* bit lines divided into sub-lines of 8 cells;
* no sense amplifier;
* a single access pulse per read.

Here the memories are plain register arrays: the function is the same, but
none of those circuit techniques is modelled.

**Full adder.** The original full adder is a 16-transistor pass-gate cell;
only its logic function is modelled.

**Pairing convention.** The first sample of each pair is `h`, and it is the
one held in the input buffer.

**Verification.** Every block has a self-checking testbench:

* The arithmetic blocks are compared against plain integer arithmetic. The
  multiplier is checked exhaustively.
* The controller is checked against a model computed from the clock count. It
  is also checked for the property that every higher-level run finds an `h`
  and then an `f` written since its previous run.
* `tb_dwt_top` runs the full 32-channel, 4-level design for 12 frames. It
  checks every output's tag and cycle against an independent model of the
  schedule and equations. The model tracks which stored values are still
  unknown after power-up, and checks an output's value whenever it is known;
  known outputs are required at every level. It counts each mechanism and fails if one never
  occurred: level 1 to 4 runs, idle slots, input buffer writes, pairing `h`
  and `f` writes, approximation outputs and overflow wraps.
* `tb_dwt_configs` runs the same check on 2 channels with 2 levels, 8 channels
  with 4 levels, 4 channels with 5 levels, and 128 channels with 4 levels.
  The last one shows that one core can serve over 100 channels; that build
  needs a 25.6 MHz clock at 25 kS/s.
* Assertions in `dwt_top` check the schedule rules: outputs only come from
  computing slots, `a_out` only from the top level, and pairing writes never
  happen at the top level.

## Simulating

Everything is SystemVerilog-2017 and needs only Verilator 5. Put the package
files first, then pass the testbench and let Verilator find the rest:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/dwt_pkg.sv tb/dwt_ref_pkg.sv tb/tb_dwt_top.sv --top-module tb_dwt_top
./obj_dir/Vtb_dwt_top
```

Every testbench ends with a line `TB_RESULT checks=<n> failures=<m>`. The other
testbenches are run the same way; replace `tb_dwt_top` with any
`tb/tb_<block>.sv`. `tb/dwt_ref_pkg.sv` holds the integer reference arithmetic
that the testbenches share. `tb/dwt_check_harness.sv` is the parameterised
end-to-end checker used by `tb_dwt_configs`.

To lint a single module:

```
verilator --lint-only -Wall -Irtl rtl/dwt_pkg.sv rtl/<module>.sv
```
