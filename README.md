# Pipelined RBF-kernel SVM classifier with gated-clock stage control

This is the classification half of a small speech-recognition system. Each spoken
command becomes a two-coordinate feature vector. A support vector machine (SVM)
with a radial-basis-function kernel decides whether the vector belongs to a class:

    score = sum over i of  alpha_i * exp( -|SV_i - x|^2 / (2 * sigma^2) )  +  b
    class = +1 if score > 0, else -1

There are 30 support vectors SV_i, and sigma = 0.9. The signed weights alpha_i
and the bias b come from off-line training. A recogniser with 30 words runs 30
such "one-versus-all" machines, one per word. The hardware here evaluates one
machine. Its support vectors, weights and bias sit in registers, so one
instance serves every machine in turn.

The design has two central ideas:

* **A three-stage pipeline.** All 30 kernel terms are computed in parallel, so a
  new test vector can enter on every clock cycle.
* **Per-stage gated clocks.** Each register rank has its own clock gate. A
  one-bit *valid* flag travels down a chain of small controllers, and a rank
  is clocked only in the cycles in which new data is in front of it. Two
  controller designs are provided:
  * one designed from an extended-burst-mode (XBM) state specification. It
    comes as synthesizable RTL and as a timed model of its asynchronous gate
    netlist;
  * one made of two transparent latches and an AND gate.

## Datapath

```
 rank 1   RSV(i,1) RSV(i,2) RTest(1) RTest(2)      (i = 1..30, 18 bits, load strobe LSV)
 stage 1  Square(i,k) = (RSV(i,k) - RTest(k))^2    60 squaring units
 rank 2   60 x 18 bits
 stage 2  Adder1(i) = Square(i,1) + Square(i,2)
          Exp(i)    = EXP(Adder1(i))               30 look-up tables
          Mult(i)   = RAlpha(i) * Exp(i)           30 multipliers, 36-bit product
 rank 3   30 x 36 bits
 stage 3  Adder2 = sum of Mult(i);  Adder3 = Adder2 + RBias;  Class = (Adder3 > 0)
 rank 4   Final_Res (class) and the 36-bit score
```

| module | role |
|---|---|
| `svm_pkg` | widths, the `data_t` / `acc_t` types, the controller selector |
| `svm_square` | one squared difference, stage 1 |
| `svm_exp_lut` | kernel look-up table |
| `svm_kernel_term` | Adder1 + EXP + multiplier for one support vector, stage 2 |
| `svm_decision` | sum, bias, comparison, stage 3 |
| `gated_reg` | a register on a gated clock, with a load strobe |
| `gclk_ctrl_xbm`, `gclk_ctrl_latch` | the two stage controllers |
| `gclk_ctrl_xbm_gates` | timed gate-level model of the asynchronous XBM circuit (simulation only) |
| `gclk_ctrl` | picks one controller by parameter |
| `svm_classifier_top` | the whole classifier |

### Number formats

Every 18-bit quantity is signed fixed point with 4 integer bits and 14 fraction
bits, so it covers -8 to +8 in steps of 2^-14. This applies to coordinates,
squares, distances, kernel values and weights. Products, sums and the bias are
36 bits with 28 fraction bits. The 18- and 36-bit widths and the 14 fraction
bits of the kernel value come from the original architecture. Using the same
4.14 split everywhere is this implementation's choice.

When a value is narrowed, it is rounded to nearest and saturated.

* A square above 8 clamps to the largest value. So does a distance above 8.
  At that distance the kernel is already about 0.007.
* The stage-3 sum keeps guard bits and saturates only at the end. The sign
  that decides the class is therefore never corrupted by overflow.

### The kernel table

`svm_exp_lut` maps a squared distance d (0 <= d < 8) to exp(-d / 1.62).

* The top 10 of the 17 magnitude bits of d form the address. The table has
  1024 entries spaced 1/128 apart.
* Each entry is the kernel at the left end of its interval, rounded to 14
  fraction bits, so entry 0 is exactly 1.0.
* The contents are computed during elaboration from the formula. A Taylor
  series gives r = exp(-step/1.62), and entry i is round(r^i * 2^14). No data
  file is involved.

The depth is a parameter (`EXP_ADDR_W`). At 1024 entries, the 30 tables take
553 kbit, which fits in the block memory of a mid-size FPGA. With one table
entry per input code, each table would need 2^17 entries. The cost of the
coarser table is accuracy: the worst-case error is about 0.005, mostly near
d = 0, where the curve is steepest.

### Signs and classes

`alpha_i` is taken as already multiplied by the label y_i of its support
vector, so the weights are signed. A score of exactly zero gives class -1.

## Gated-clock control

This is the part that differs most from an ordinary enable-based pipeline.

Each rank r has a controller with inputs `clk`, `valid_i` and reset, and outputs
`gclk` and `valid_o`. The controllers form a chain:

* `start_i` is the first controller's `valid_i`.
* Each `valid_o` is the next controller's `valid_i`.
* The last `valid_o` is the pipeline's `valid_o`.

All controllers behave the same at the cycle level:

* `gclk` repeats the high phase of `clk` in every cycle that begins (at the
  rising edge) with `valid_i = 1`, and stays low in every other cycle.
* `valid_o` is `valid_i` as seen at the last rising edge. It changes just after
  that edge and stays stable through the following low phase.

So a valid flag moves one rank per cycle, and a rank's registers see a clock
edge only when the flag reaches them. An idle cycle (a "bubble") in the input
stream travels down the pipeline as a cycle in which each rank in turn is not
clocked.

**Latch controller (`gclk_ctrl_latch`).**

* The first latch is transparent while `clk` is low and holds `valid_i`
  through the high phase.
* `gclk` is that latch's output ANDed with `clk`. This is the standard
  glitch-free clock gate.
* The second latch is transparent while `clk` is high and passes the first
  latch's value on as `valid_o`.

The two latches in opposite phases act like a master-slave flip-flop for the
valid flag.

**XBM controller (`gclk_ctrl_xbm`).** The specification has four states: clock
low or high, each either idle or active.

| from | condition | to | outputs |
|---|---|---|---|
| 0 | CLK rises, Valid-i = 0 | 1 | |
| 0 | CLK rises, Valid-i = 1 | 2 | Valid-o rises, GCLK rises |
| 1 | CLK falls | 0 | |
| 2 | CLK falls | 3 | GCLK falls |
| 3 | CLK rises, Valid-i = 1 | 2 | GCLK rises |
| 3 | CLK rises, Valid-i = 0 | 1 | Valid-o falls |

The module keeps the state as the clock phase plus an "active" bit. The active
bit is a rising-edge flip-flop loaded with `valid_i`, and it drives `valid_o`.
`state_o` reports the state number.

In state 2, GCLK must rise *together with* CLK. The active bit only settles
after the edge, so GCLK cannot be decoded from it. Instead, the module holds
`valid_i` in a low-phase latch, which is the value the specification reads at
the edge, and ANDs it with `clk`. Under the specification's own assumption
that Valid-i is stable when CLK rises, the result matches the table in every
state.

**Gate-level XBM circuit (`gclk_ctrl_xbm_gates`).** The original XBM
controller is an asynchronous gate netlist. Its memory is three feedback
loops:

    zzz00   = CLK & zzz00  |  CLK & Valid-i & ~zzz01     active burst
    zzz01   = CLK & zzz01  |  CLK & ~Valid-i & ~zzz00    idle burst
    Valid-o = zzz00        |  Valid-o & ~zzz01
    GCLK    = zzz00 & CLK

When CLK rises, one of zzz00 and zzz01 sets, depending on Valid-i. Each one
blocks the other until CLK falls and clears both. These equations give the
state table above exactly:

* state 1 is zzz01 set;
* state 2 is zzz00 set;
* state 3 is CLK low with Valid-o held.

The module models every gate with a delay of 20 ps. This model is for
simulation only, because its correctness rests on delay ordering. A
downstream controller reads its Valid-i and locks within two gate delays of
CLK rising. The upstream Valid-o changes only three to four gate delays after
that edge, so it cannot leak into the same cycle. Synthesis tools report the
loops as combinational loops: they are the circuit's state. One addition to
the original netlist: Valid-o is ANDed with a reset, because the netlist has
none.

**How the three controllers compare.** All three are indistinguishable at the
cycle level. `CTRL_XBM_GATES` builds the pipeline from the gate model. The
only difference is that its gated clocks rise 40 ps after CLK, so a weight or
bias loaded at an edge is already visible to rank 3 at that same edge. Any
difference in speed or power between the controller styles cannot be seen in
this RTL.

**Practical notes.**

* The lint and synthesis tools report latches and gated clocks. All of them
  are intended.
* For an FPGA, the AND-gate clock gates would normally become the device's
  clock-control blocks or clock enables.
* The registers on `gclk` use non-blocking assignments. With the two
  synthesizable controllers, every `gclk` edge happens in the same simulation
  time step as its `clk` edge, so the simulation is free of races. With the
  gate model, all `gclk` edges arrive together, 40 ps after `clk`.

## Interface and timing (`svm_classifier_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk_i` | in | 1 | free-running clock |
| `rst_ni` | in | 1 | asynchronous reset, active low; clears the valid flags |
| `start_i` | in | 1 | a sample is presented this cycle |
| `l_sv_i` | in | 1 | load `sv_i` and `test_i` into rank 1 with this sample |
| `sv_i` | in | 30 x 2 x 18 | support vectors |
| `test_i` | in | 2 x 18 | test vector |
| `l_alpha_i`, `alpha_i` | in | 1, 30 x 18 | load the weights (on `clk_i`) |
| `l_bias_i`, `bias_i` | in | 1, 36 | load the bias (on `clk_i`) |
| `valid_o` | out | 1 | a new result is on the outputs |
| `class_pos_o` | out | 1 | 1 = class +1, 0 = class -1 |
| `score_o` | out | 36 | decision value of that result |

Parameters: `NUM_SV` (30), `EXP_ADDR_W` (10), `SIGMA` (0.9), and `CTRL`.
`CTRL` is `CTRL_XBM` (the default), `CTRL_LATCH`, or `CTRL_XBM_GATES`.
`CTRL_XBM_GATES` is for simulation only.

Timing:

* Drive inputs away from the rising edge, for example on the falling edge. A
  sample presented with `start_i = 1` is taken at the next rising edge.
* Its result, with `valid_o = 1`, appears just after the third rising edge
  after that.
* One sample can be taken per cycle, with any gaps.
* With `l_sv_i = 0`, a sample re-uses the support and test vectors already in
  rank 1.
* Do not load the weights at an edge that moves a sample from rank 2 to
  rank 3, and do not load the bias at an edge that moves a sample out of
  rank 3. Two assertions check this. To switch machines safely, wait three
  cycles after the last sample, load, and continue.

## Departures from the original design

The original architecture is a VHDL design for an FPGA. This RTL follows it in:

* stage structure, register ranks and operand widths;
* 30 support vectors, sigma = 0.9, and the decision rule;
* the load strobes LSV, LAlpha and LBias;
* the latch controller's circuit and the XBM state specification.

This implementation's own choices are:

* the 4.14 format for every 18-bit value, with rounding and saturation;
* the depth and sampling of the kernel table;
* signed weights;
* the weight and bias registers loading on the free-running clock;
* the reset;
* the extra `score_o` output;
* the synchronous realisation of the XBM controller, described above;
* the reset gate and the 20 ps gate delays of the gate-level model.

Outside this RTL:

* Feature extraction (windowing, MFCC, DCT) and training are software steps.
  They are not part of the hardware.
* How the results of the 30 per-class machines are combined into one
  recognised word is not specified, so it is not built. Reload the registers
  per machine, then compare the 30 outputs (or scores) outside.

The original reports 50 GOPS and 500 GOPS for the two controllers, at 500 MHz
and 250 MHz. No definition of an operation is given, so these figures cannot be
checked. One way of counting gives about 241 operations per classification. At
one classification per cycle, that is about 60 GOPS at 250 MHz.

## Verification

Every module except the small selector `gclk_ctrl` has a self-checking
testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

* `tb_svm_square`, `tb_svm_exp_lut`, `tb_svm_kernel_term`, `tb_svm_decision`
  compare against integer and floating-point models written from the formulas.
  Kernel values may differ from the table by at most one LSB.
* `tb_gated_reg` checks load and hold.
* `tb_gclk_ctrl_xbm` and `tb_gclk_ctrl_latch` check the controllers phase by
  phase against a random valid pattern. The pattern changes just after each
  rising edge, as an upstream stage would change it. The XBM testbench also
  checks the state sequence.
* `tb_svm_classifier_top` runs the default configuration end to end. It uses
  30 random machines of 30 support vectors and 60 test vectors per machine,
  for 1800 classifications. It checks:
  * each score against the model, and each class wherever the score is not
    within rounding of zero;
  * the latency of exactly 3 cycles;
  * one gated-clock pulse per sample on every rank;
  * input registers that stay put in idle cycles.

  It also counts back-to-back samples, idle cycles, LSV-low re-use, weight
  reloads, both classes and saturated distances.
* `tb_svm_classifier_latch` and `tb_svm_classifier_xbm_gates` are the same
  test with `CTRL = CTRL_LATCH` and `CTRL = CTRL_XBM_GATES`.
* `tb_gclk_ctrl_xbm_gates` checks the gate model against the state table.

To simulate with Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  --top-module tb_svm_classifier_top \
  -y rtl -y tb +libext+.sv rtl/svm_pkg.sv tb/tb_svm_classifier_top.sv
./obj_dir/Vtb_svm_classifier_top
```

The testbenches use only two-state values and `$urandom`. The full-size
end-to-end run takes a few seconds.
