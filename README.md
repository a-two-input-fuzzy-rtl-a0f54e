# Two-input fuzzy processor with active-rule selection

This is a pipelined fuzzy-logic inference processor with two 7-bit inputs and
one 7-bit output. It was built for trigger systems, which need an answer every
few tens of nanoseconds, whatever fuzzy system is loaded. It implements
Sugeno order-zero inference:

    Zo = sum_i(theta_i * Z_i) / sum_i(theta_i)

where `theta_i` is the degree of truth of rule *i* and `Z_i` its crisp
consequent. The key idea is that **only the rules that can fire are
processed**. Each input has 8 membership functions (MFs), and no more than two
of them overlap at any input value. So for any input set only 2 x 2 = 4 of the
64 possible rules have a non-zero degree of truth. The processor finds those
four rules directly from the input values. It fetches them and pushes them one
per clock through a 12-step pipeline. A divider working beside the pipeline
produces the result. A new input set can therefore enter every 4 clocks: that
is 30 ns at the original chip's 133 MHz, and it does not depend on the rule
base.

The RTL reproduces the architecture of a 0.35 um CMOS chip: the block
structure, widths, memory sizes, step-by-step pipeline timing and handshakes.
Where the original description gives only a block's function, this design
fills in a simple implementation. Those places are listed under
[Departures and own choices](#departures-and-own-choices).

## Storing a fuzzy system so that rules can be found by address

A user's fuzzy system may contain any subset of rules, and a rule may use
either input or both. Before loading, it is converted into a *complete*
system of 64 rules, one for every pair (MF of X0, MF of X1). Rule *(i, j)* is
stored at address `{i[2:0], j[2:0]}`, so the antecedent itself is the address.
Each 9-bit rule word holds:

| bits  | field          | meaning |
|-------|----------------|---------|
| [8]   | premise X0     | 1: the original rule tests X0 |
| [7]   | premise X1     | 1: the original rule tests X1 |
| [6:0] | Z              | crisp consequent |

A premise code of `00` marks a rule that did not exist in the original
system, so it contributes nothing. A code of `10` means the rule tests only
X0, so the X1 degree is ignored: the degree is replaced by 1111, the neutral
value of both t-norms.

## Finding the active MFs: interval boundaries

With at most two overlapping MFs, the input range 0..127 splits into 7
intervals. In interval *k* exactly MFs *k* and *k+1* can be non-zero. The
first interval starts at 0 and the last ends at 127, so only six boundaries
per input are stored (`fz_mf_bounds`). `bound[j]` is the first input value of
interval *j+1*, and the words must be ascending. `fz_mf_select` compares the
input with all six at once and counts how many it has reached: that count is
*k*.

The four active rules of an input set (x0, x1) are then

    {k0, k1}, {k0, k1+1}, {k0+1, k1}, {k0+1, k1+1}

and `fz_ars` (the Active Rule Selector) issues them in that order, one per
clock. It tags the first and the last rule so that later stages know where an
input set begins and ends.

## Fuzzification by table look-up

Degrees of truth (alpha) are 4-bit numbers read from a table rather than
computed, so MFs may have any shape. Each input has a 128-word table addressed
by the input value (`fz_fuzzifier`). Two adjacent MFs always have indices of
opposite parity, so one 8-bit word holds both non-zero degrees at that input:

| bits  | holds |
|-------|-------|
| [3:0] | alpha of the active MF with an even index |
| [7:4] | alpha of the active MF with an odd index |

The parity of the MF index in the rule address picks the half. For example,
triangular MFs with peaks at `c_k` are described, for `x` in interval *k*,
by `up = round(15*(x - c_k)/(c_{k+1} - c_k))` for MF *k+1* and `15 - up` for
MF *k*. Each value is then placed in the half that matches the MF's parity.

## The pipeline, clock by clock

One rule occupies one stage per clock. The step numbers are those of the
original chip:

| step | block | work |
|------|-------|------|
| -    | `fz_input_sync` | Load_Input synchronised; input set captured into the input register |
| 1    | `fz_ars` | both inputs compared with the boundaries; k0, k1 registered |
| 2    | `fz_fuzzifier`, rule RAM | fuzzification tables and rule memory read at the rule address |
| 3    | `fz_fuzzifier` | alpha halves selected by MF parity |
| 4-9  | `fz_fuzzifier`, `fz_delay` | alignment registers; the rule word travels beside the alphas |
| 10   | `fz_tnorm` | alpha selectors (premise code), MIN or product gives theta |
| 11   | `fz_defuzz` | sum(theta) updated; partial products theta[1:0]*Z and theta[3:2]*Z |
| 12   | `fz_defuzz` | theta*Z = sum of the partials; sum(theta*Z) updated; after the last rule the sums are loaded into the divider |
| +4   | `fz_divider` | radix-4 division, 2 quotient bits per clock; Zo and Output_Ready |

The 4x7 multiplier is split over steps 11 and 12 so that no stage holds a
full multiply. While the divider works on one input set, the pipeline is
already processing the next one. The divider accepts a new start in the clock
in which it finishes.

**Timing.** From the first clock edge that samples Load_Input high, the
result and Output_Ready appear 21 clock edges later. That is 1 synchroniser
edge, 1 capture edge, 12 steps for the first rule, 3 more clocks for the
other rules, and 4 division clocks. At 7.5 ns this is 157.5 ns, as quoted for
the original chip. With input sets arriving back to back, a result comes out
every 4 clocks.

## Degrees of truth: MIN or product

The `tnorm_sel` pin chooses how the two alphas of a rule combine into theta:

* `0`, MIN: `theta = min(a0, a1)`
* `1`, product: `theta = (a0*a1 + 15) >> 4`

The product is rescaled to 4 bits so that 15 stays neutral (`15 * a = a`) and
0 stays 0. Premise code `00` forces theta to 0. Change `tnorm_sel` only while
no input set is in flight, because it acts at step 10.

## Handshakes

**Input.** The external device may write only while `input_ready` is high. It
drives `x0_in`, `x1_in` and `load_input`, and holds all three for at least
two clocks. `load_input` passes one synchronising flip-flop. On the next edge
the set is captured and `input_ready` drops. The input register is a one-set
buffer: it is freed when the active rule selector takes the set, which can
happen while the previous set is still being processed. A Load_Input edge
while `input_ready` is low is ignored.

**Output.** `output_ready` is a one-clock pulse on the edge that writes a new
`zo`. `zo` then holds its value until the next result, which is at least 4
clocks later.

## Loading the fuzzy system

The memories are written through a synchronous port: `cfg_we`, `cfg_target`
(enum `cfg_target_e` in `fuzzy_pkg`), `cfg_addr` and `cfg_wdata`. Write while
no input set is in flight.

| cfg_target | memory | addresses | data |
|------------|--------|-----------|------|
| `CFG_BP0`/`CFG_BP1` (0/1) | boundaries of X0 / X1 | 0..5 | `wdata[6:0]`, ascending |
| `CFG_LUT0`/`CFG_LUT1` (2/3) | fuzzification tables | input value 0..127 | `wdata[7:0]` = {odd alpha, even alpha} |
| `CFG_RULE` (4) | rule memory | `{mf0, mf1}` 0..63 | `wdata[8:0]` = {premise code, Z} |

Reset sets the boundaries to evenly spaced values, `floor(128*(j+1)/7)`. The
RAMs are not reset.

## Sizes

| item | value |
|------|-------|
| inputs / output | 2 x 7 bits / 7 bits |
| MFs per input, max overlap | 8, 2 |
| alpha, theta | 4 bits |
| rules stored / processed per input set | 64 / 4 |
| memories | rule RAM 64 x 9, two table RAMs 128 x 8, two 6 x 7 boundary register files |
| sums | sum(theta) 6 bits (max 60), sum(theta*Z) 13 bits (max 7620) |
| after synthesis (yosys, coarse) | about 361 flip-flop bits, 2624 RAM bits |

The original chip has about 300 flip-flops. Most of the difference is the
129 bits of alignment registers in steps 4-9: 6 x 11 bits in the
fuzzifier and 7 x 9 bits for the rule word.

The widths live in `fuzzy_pkg`. The fuzzification latency is the `STAGES`
parameter of `fz_fuzzifier` (default 8, `FUZZ_STAGES`). The divider is
parameterised by its operand widths and `STEPS`.

## Departures and own choices

These follow the original chip's behaviour but fill in details it does not
publish:

* **Loading port.** The original chip is loaded through its data pins or a
  serial pin, with an unpublished protocol. Here a separate parallel write
  port is used, and there is no serial loader.
* **Boundary memories** are register files, not RAMs, so that all six words
  can be compared in one clock.
* **Fuzzification steps 4-9.** The original chip spends 8 clocks on
  fuzzification, but its internal split is unknown. Here two clocks do the
  work and six registers keep the original step numbering. Lower `STAGES` to
  shorten the latency; the minimum is 2.
* **Table layout** (even/odd halves), **rule order** within an input set,
  **product rescaling**, **truncating division**, and **Zo = 0 when no rule
  fires** are all this design's choices.
* **Input synchroniser and buffer.** A single flip-flop, plus capture on the
  following edge. The 2-clock hold rule makes this safe for a device that
  runs on the same board clock.
* **Reset.** Asynchronous and active low. It clears every pipeline register
  and handshake flag, not the RAMs.
* The original chip's **clock tree, pads and layout** are physical design and
  are not represented. All registers and RAMs run on one ungated clock, as in
  the original.

## Accuracy

`tb_fuzzy_approx` loads 8 triangular MFs with peaks at 0, 18, 36, 54, 73, 91,
109 and 127. It loads 64 rules that sample a function at those points, then
sweeps 1849 input points:

| function | t-norm | mean error | max error (% of 127) |
|----------|--------|-----------:|---------------------:|
| x0*x1/127 | product | 0.48% | 2.4% |
| 63.5 + 50 sin(pi x0/127) cos(pi x1/127) | product | 0.79% | 3.1% |

The mean error stays under 1% of full scale. The maximum is set by the
curvature of the function between MF peaks 18 apart. To reduce it, move more
MFs to where the function bends.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
compares against values computed independently in the testbench, prints
`TB_RESULT checks=N failures=M`, and has a watchdog.

* `tb_fuzzy_chip` runs the whole processor at its default size. It loads
  random boundaries, triangular and then arbitrary MF tables, and two random
  rule sets. It runs over 550 input sets, streamed or with pauses, in both
  t-norms. Every Zo is compared with a behavioural model of the inference.
  The testbench checks the 21-clock latency and the 4-clock result spacing.
  It also counts each mechanism: MIN, product, each premise code, no rule
  fired, waiting on Input_Ready, rule reload and back-to-back results.
* `tb_fuzzy_approx` runs the accuracy sweep above.
* The block testbenches cover exhaustive t-norm inputs, every input value of
  the MF selector, divider timing and zero divisor, handshake corner cases,
  and more.

Run one with Verilator 5:

    verilator --binary --timing --assert -Irtl --top-module tb_fuzzy_chip \
        rtl/fuzzy_pkg.sv tb/tb_fuzzy_chip.sv -o sim
    ./obj_dir/sim

Verilator finds the other modules in `rtl/` through `-Irtl`. The testbenches
use no constraint solver and no data files.

## Files

| file | contents |
|------|----------|
| `rtl/fuzzy_pkg.sv` | widths, `ptag_t` pipeline tag, `cfg_target_e`, `tnorm_e` |
| `rtl/fuzzy_chip.sv` | top level |
| `rtl/fz_input_sync.sv` | Input_Ready / Load_Input handshake and input register |
| `rtl/fz_ars.sv` | active rule selector |
| `rtl/fz_mf_bounds.sv` | six interval boundaries of one input |
| `rtl/fz_mf_select.sv` | active MF selector |
| `rtl/fz_ram.sv` | synchronous RAM (rule memory, fuzzification tables) |
| `rtl/fz_fuzzifier.sv` | table fuzzification |
| `rtl/fz_delay.sv` | alignment register chain |
| `rtl/fz_tnorm.sv` | alpha selectors, MIN / product |
| `rtl/fz_defuzz.sv` | sum(theta), pipelined theta*Z, sum(theta*Z) |
| `rtl/fz_divider.sv` | divider and Output_Ready |
