# SARA: a simple accuracy-reconfigurable adder

Many signal-processing and recognition workloads tolerate small arithmetic
errors. An adder whose accuracy can be switched at run time lets such a
workload pay for a long carry chain only when it needs an exact sum. This
adder does that in the simplest way possible. It is an ordinary
ripple-carry adder cut into short sub-adders. At each cut, a single
configuration bit chooses the carry that enters the upper sub-adder:

- the real carry out of the sub-adder below (exact, long path), or
- a carry *predicted* from the top bit of the sub-adder below (short path).

No circuit detects or corrects a wrong prediction. Nothing stalls or
computes twice. The adder simply returns a sum that is sometimes a little
too small.

The default build is a 32-bit adder with a 33-bit result. It has eight
4-bit sub-adders and seven cuts. All cuts are switched together by one
`sel` input. It is purely combinational: no clock, no reset, no state.

## Structure

```
        s[3:0]             s[7:4]             s[11:8]   ...   s[31:28]
          |                  |                  |                 |
 cin -> [sub-adder 0] -c_acc0-> MUX -> [sub-adder 1] -c_acc1-> MUX -> ... [sub-adder 7] -> sout[32]
          a[3:0]     \         ^        a[7:4]       \          ^
          b[3:0]      a[3]&b[3]|         b[7:4]       a[7]&b[7] |
                      (predict)                       (predict)
```

| Module               | Role |
|----------------------|------|
| `sara`               | Top level. Builds `N/SUB_W` sub-adders and one predictor and one mux per cut. |
| `sara_subadder`      | `W`-bit ripple-carry adder made of full adders; gives the sum slice and the accurate carry out. |
| `sara_carry_predict` | Predicted carry at one cut: `config_n & a_msb & b_msb`. |
| `sara_carry_mux`     | Carry into the next sub-adder: `config_i ? c_acc : c_prdt`. |
| `sara_pkg`           | Default sizes (`SARA_N = 32`, `SARA_SUB_W = 4`) and the `sara_mode_e` encoding of `sel`. |

### Ports of `sara`

| Port   | Dir | Width | Meaning |
|--------|-----|-------|---------|
| `a`    | in  | N     | operand |
| `b`    | in  | N     | operand |
| `cin`  | in  | 1     | carry into bit 0 (always exact) |
| `sel`  | in  | 1     | 1 = accurate, 0 = approximate (`SARA_ACCURATE` / `SARA_APPROX`) |
| `sout` | out | N+1   | sum; `sout[N]` is the carry out of the top sub-adder |

### Parameters of `sara`

| Parameter     | Default | Meaning |
|---------------|---------|---------|
| `N`           | 32      | operand width; must be a multiple of `SUB_W` with at least two sub-adders (checked at elaboration) |
| `SUB_W`       | 4       | sub-adder width |
| `APPROX_MASK` | all ones, bits `[N/SUB_W-1:1]` | bit *k* set: cut *k* (between sub-adder *k*-1 and *k*) uses the predicted carry when `sel = 0`. A cleared bit keeps that cut exact in both modes. |

## How the carry prediction behaves

The prediction at cut *k* is the generate term of the lower sub-adder's top
bit, `a[4k-1] & b[4k-1]`. If both bits are 1, a carry leaves that sub-adder
whatever comes from below, so a predicted 1 is always right. The predictor
misses only a carry that is *propagated* through the top bit from lower
bits. This gives the error a fixed shape:

- the approximate sum is never larger than the exact sum;
- the difference is a sum of distinct weights `2^(SUB_W*k)`, at most one
  lost carry per cut.

In approximate mode the carry into a sub-adder no longer depends on
anything below bit `SUB_W*k-1`. For example, with the default sizes,
changing `cin` or bits 0-2 of the operands can change only `sout[3:0]`.

Two small consequences are easy to overlook:

- `0xFFFFFFFF + 1` in approximate mode gives `0x0FFFFFFF0`. The lowest
  slice wraps to 0 and drops its carry. The other slices see a predicted
  carry of 0 and stay all ones.
- A cut whose predicted carry is wrong still passes the *accurate* carry
  out of its own sub-adder upward. That carry is computed from the
  predicted carry-in. So errors do not compound beyond one lost carry per
  cut.

The end-to-end bench measures, over uniformly random 32-bit operands with
every cut predicting:

| Metric | Value |
|---|---|
| error rate (sum differs from exact) | about 0.86 |
| mean relative error | about 2% |

Each cut misses a carry with probability about 1/4. So the chance that all
seven cuts are right is about 0.75^7 ≈ 0.13. Workloads with smaller or
correlated operands do much better. Leaving cuts exact with `APPROX_MASK`
moves the balance toward accuracy.

## Where the speed comes from

In approximate mode the longest carry path starts at a predicted carry.
With the default sizes that path runs through at most one 4-bit ripple
chain plus one mux. In accurate mode it runs through all 32 bits.

Partly approximate settings shorten the path less. Take three 4-bit
sub-adders with only the lower cut predicting (`N=12, APPROX_MASK=2'b01`).
Sum bit 8 then waits for a chain that starts at the predicted carry of bit
3, not at bit 0. That saves three bit stages against a full ripple.

The exact path is still present in the netlist, through the muxes. A
static timing analysis that ignores `sel` therefore still reports the full
32-bit ripple. You only get the shorter delay in approximate mode if timing
is constrained per mode or the clock is scaled with the mode. This RTL
contains no such timing machinery.

An FPGA build of the 32-bit design with these ports has 99 I/O bits
(32+32+1+1+33) and no clock. It is reported to use about 50 LUTs with a
worst combinational delay of about 9 ns on a Virtex-6-class part. Those
figures are not checked here.

## Choices made in this RTL

These points are this implementation's own decisions. The published design
leaves them open or shows them only as blocks.

- **Prediction formula.** The published structure has a "carry predict"
  block per cut, fed from the lower sub-adder. `a_msb & b_msb` is the
  simplest predictor that never invents a carry.
- **Predictor gating.** The predictor is enabled by the complemented
  configuration bit. It outputs 0 while its cut is exact, so it does not
  toggle in accurate mode.
- **`sel` polarity.** 1 means accurate. This matches a predictor that is
  enabled by the inverted configuration bit.
- **One `sel` versus per-cut configuration.** The block diagram has one
  configuration bit per cut, but the published top level has a single
  `sel`. `APPROX_MASK` reconciles the two: it fixes at build time which
  cuts `sel` controls. The default (all cuts) is this design's choice.
  `APPROX_MASK = 2'b01` at `N = 12` gives the partly approximate example
  described above.
- **Sub-adder insides.** Ripple-carry full adders. The published delay
  argument counts one stage per bit against a ripple-carry adder.

## Not included

- The delay-adaptive reconfiguration technique that is meant to go with
  this adder. Only its name and purpose are known, so it is not built.
- The approximate multiplier and the DCT datapath used to demonstrate the
  adder. No structure or sizes are available for either.

## Testbenches

Each bench checks its block against values worked out independently,
prints `TB_RESULT checks=<n> failures=<n>`, and has a cycle-count
watchdog. Every vector is held for one period of a testbench clock. The
design itself is combinational.

| Bench | What it does |
|---|---|
| `tb_sara` | Full 32-bit design, default parameters. Checks the two published waveform vectors (350+106 = 456, 10+30 = 40), directed cases for missed and predicted carries, and about 225k random vectors in both modes against a slice-by-slice reference sum. It also checks the shape of the error and counts each mechanism: both modes, mode switches, predicted carries, missed carries, exact approximate results, carry in, carry out. It prints the error statistics. |
| `tb_sara_12bit` | `N = 12` with all cuts predicting and with only the lower cut predicting. Compares both with the reference sum and checks that the carry chain is cut at bit 3. |
| `tb_sara_subadder` | Exhaustive at 4 bits, random at 8 bits. |
| `tb_sara_carry_predict`, `tb_sara_carry_mux` | Exhaustive truth tables. |

Running a bench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
    rtl/sara_pkg.sv tb/tb_sara.sv --top-module tb_sara -Mdir obj -o sim
./obj/sim
```

Replace `tb_sara` with any other bench name. Each run takes well under a
second.
