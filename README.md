# Modulo N accumulation with carry-save sign estimation, and a burst-error acquisition test bed

This repository holds two unrelated pieces of synthesizable SystemVerilog that
sit side by side under one top module, `letters_top`:

1. **`modadd_csa`**: computes `(X_1 + X_2 + ... + X_k) mod N`. It reduces after
   every operand but never waits for a carry to ripple across the word
   during accumulation. The partial sum stays in carry-save form. Whether
   `N` can be subtracted is decided from only the top three bits of the two
   vectors.
2. **`transient_gen` and `error_logger`**: the digital core of a laboratory
   set-up that injects known interference transients into a digital
   transmission link and records the intervals between the resulting
   decision errors. The autocorrelation of those errors can then be used to
   identify what kind of interference caused them.

The two designs share no logic and no clock.

Both follow short published descriptions, the first a sign-estimation
technique for modulo addition with carry-save adders, the second a
laboratory set-up for studying interference through bit-error activity.
Neither description fixes widths, interfaces or timing. Those choices are
this implementation's own, and the section *Design choices and limits*
lists them.

---

## Part 1: multi-operand modulo N addition

### The problem

Reducing after every operand keeps the partial sum small:

    S = X_1
    for i = 2..k:  S = S + X_i;  if S >= N then S = S - N

With an ordinary adder, each step costs a full carry propagation, and the
comparison `S >= N` costs another one. A carry-save adder (CSA) adds in one
full-adder delay, because it keeps the value as two vectors `C + S`. The
catch is that the exact sign of `C + S - N` cannot be known without a full
carry propagation.

### The idea: estimate the sign from the top bits

Define `T(x)` as `x` with its low `t = n - 1` bits cleared, where `n` is the
width of `N`. Then:

    T(C^) + T(S^)  <=  C^ + S^  <  T(C^) + T(S^) + 2^n

Each cycle pair does the following:

- **ADD cycle:** `C + S += X_i`. This is one CSA pass.
- **SUB cycle:** `C^ + S^ = C + S - N`. This is one CSA pass with `~N` as
  the third input and a `1` in the carry vector's empty LSB, which makes
  two's complement subtraction free. If the estimate `T(C^) + T(S^)` is not
  negative, then `C, S <= C^, S^`. Otherwise the partial sum is left alone.

The estimate needs only bits `n+1 .. n-1` of the two vectors. `sign_est`
computes its sign with a 2-bit carry look-ahead:

    SIGN = C^[n+1] ^ S^[n+1] ^ ( G(n) | G(n-1) & P(n) )
    G(i) = C^[i] & S^[i]      P(n) = C^[n] | S^[n]

### Why it is safe

- A reduction is only taken when the estimate is not negative. The true
  value is at least the estimate, so `C + S` never goes negative.
- If the reduction is refused, the estimate is at most `-2^(n-1)`, so the
  true `C^ + S^` is below `2^(n-1)`. The kept `C + S` is therefore below
  `N + 2^(n-1)`.
- By induction, after every SUB cycle `0 <= C + S < N + 2^(n-1)`. During an
  ADD cycle the value can reach `2N + 2^(n-1)`.

This is why `C` and `S` are `n + 3` bits wide, while the subtracted pair
needs only `n + 2` bits.

At the end, `C + S` lies in `[0, N + 2^(n-1))`. If `N >= 2^(n-1)`, exactly
one of `C + S` and `C + S - N` lies in `[0, N)`. **The modulus must
therefore have its top bit (bit n-1) set.** An assertion checks this, and
also that every operand is below `N`.

### Final reduction without a carry-propagate adder

`cs_resolve` turns a carry/sum pair into a binary number. It feeds the pair
back through a CSA whose third input is zero, once per clock. Each pass
empties at least one more low bit of the carry vector, so `n + 2` passes
always finish.

`modadd_csa` resolves both candidates on `n + 2` bits:

- `C + S`;
- `C + S - N`, formed by one more pass through the accumulation CSA.

It picks the second candidate when its sign bit is clear. With
`DUAL_FINAL = 1` (the default) two resolvers run in parallel. With
`DUAL_FINAL = 0`, one resolver is used twice, which saves a register pair
and costs `n + 3` extra cycles.

This serial resolve is a cost model: the arithmetic needs no adder wider
than a full-adder cell anywhere. If you have a fast carry-propagate adder,
`cs_resolve` is the place to put it; the rest of the design does not change.

### Timing

With operands offered back to back, counting from the cycle in which `X_1`
is taken:

| phase | cycles |
|---|---|
| accumulation (`k - 1` operands after `X_1`, two cycles each) | `2k - 2` |
| form `C + S - N` of the final partial sum | 1 |
| resolve, two resolvers (`DUAL_FINAL = 1`) | `n + 2` |
| resolve, one resolver (`DUAL_FINAL = 0`) | `2n + 4`, plus 1 hand-over |
| register the selected result | 1 |

For `n = 16` and `k = 10`, the result appears 38 cycles after `X_1` is
taken. The testbenches check these counts exactly.

### Interface (`modadd_csa`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `modulus` | in | n | `N`, sampled together with `X_1`; `2^(n-1) <= N < 2^n` |
| `x_valid` / `x_ready` | in / out | 1 | operand handshake; a transfer happens when both are high |
| `x` | in | n | operand, `0 <= x < N` |
| `x_last` | in | 1 | marks `X_k`; `k = 1` is allowed |
| `res_valid` | out | 1 | one-cycle pulse |
| `res` | out | n | the sum mod `N`, held until the next result |

`x_ready` is high while the unit waits for `X_1` and in every ADD cycle. It
is low in SUB cycles and during the final reduction. A producer may pause at
any time by dropping `x_valid`.

Parameters:

- `N_BITS` (default 16) is `n`.
- `DUAL_FINAL` (default 1) selects two resolvers or one.

Internal widths follow from `N_BITS`: `n + 3` for accumulation and `n + 2`
for the final stage.

### Relation to the biased-addition alternative

A known alternative keeps `C + S` offset by `2^n - N`. It subtracts `N` or
`2N` whenever the carry vector overflows, and removes the offset and up to
`3N` at the end. That alternative needs simpler per-operand logic but three
sequential additions at the end. It is not implemented here. This design
uses sign estimation because it needs only two final additions, and they run
in parallel.

---

## Part 2: burst-error acquisition test bed

### The set-up

The link under test is a 2 Mbit/s optical transmission system:

- a PRBS pattern source drives an LED transmitter;
- the light travels over optical fibre to a PIN receiver and a decision
  circuit;
- an error detector flags every wrong bit.

An interference transient is added at the LED drive through a D/A
convertor. Two transient shapes are studied, with decay constant `T` given
in bits (typically 10 to 70):

- peak and decay: `A t exp(-t/T)`;
- decaying sine: `A exp(-t/T) sin(wt)`.

The logged error activity is analysed offline through its autocorrelation:
`Gamma(tau) = sum_i e(t_i) e(t_i + tau)`.

Only two blocks of this set-up are logic, and they are what this repository
provides. The pattern source, error detector, D/A convertor, optics and the
controlling workstation are outside the design. Their signals are ports of
`letters_top`.

### `transient_gen`: waveform player

The workstation writes one transient, as 8-bit offset-binary samples, into
a 1024-entry table and gives the index of its last sample. A `trigger`
starts a playback. On every bit tick (the transmit bit clock, used as a
clock enable) the next sample goes to `dac_code`. When the playback ends,
the output returns to mid-scale (`8'h80`, zero volts) and `busy` falls.

Playback timing:

- sample `j` appears on the `(j+1)`-th tick after the trigger;
- triggers arriving while busy are ignored;
- the table can be rewritten at any time.

At one sample per bit, a transient of about `8T` bits fits comfortably
(560 samples at `T = 70`).

### `error_logger`: interval recorder

While `enable` is high, every received-bit tick advances a 16-bit counter. A
tick with `err` set pushes the interval, `counter + 1`, into a 1024-entry
FIFO and restarts the counter. The interval is the number of bit periods
since the previous error, so errors on adjacent bits log `1`.

Details:

- The first interval after `clear` is measured from the clear.
- Intervals longer than 65535 bits saturate at 65535.
- When the FIFO is full, intervals are dropped and the sticky `overflow`
  flag is set. The counter still restarts, so later intervals stay exact.
- `clear` empties the FIFO, restarts the counter and clears `overflow`.
- To read, pulse `rd_en` while `level` is not zero. The oldest interval
  appears on `rd_data` with `rd_valid` one cycle later.
- A push and a pop may happen in the same cycle.

The error pattern, and hence its autocorrelation, can be rebuilt exactly
from the intervals as long as nothing saturated or overflowed.

---

## Top level (`letters_top`)

`letters_top` has no parameters. It instantiates `modadd_csa` (n = 16, two
resolvers), `transient_gen` and `error_logger` with their defaults. There
are two port groups:

- `ma_*`, clocked by `clk` / `rst_n`;
- `tg_*` / `el_*`, clocked by `tb_clk` / `tb_rst_n`.

The external parts connect as follows:

- the D/A convertor takes `tg_dac_code`;
- the transmit bit clock drives `tg_tick`;
- the error detector drives `el_tick` and `el_err`;
- the workstation drives the table, trigger, enable, clear and read ports.

## Files

| file | contents |
|---|---|
| `rtl/csa.sv` | W-bit 3:2 carry-save adder with carry-in at the carry LSB |
| `rtl/sign_est.sv` | 2-bit carry look-ahead sign estimate |
| `rtl/cs_resolve.sv` | iterated-CSA carry/sum to binary converter |
| `rtl/modadd_csa.sv` | modulo N accumulator: datapath and controller |
| `rtl/transient_gen.sv` | interference waveform table and player |
| `rtl/error_logger.sv` | error-interval counter and FIFO |
| `rtl/letters_top.sv` | top level |
| `tb/<module>_tb.sv` | one self-checking testbench per module |
| `tb/modadd_table1_tb.sv` | cycle-count sweep of the adder over `n` and both final-stage variants |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Each has a
watchdog that counts a failure if the test hangs. With Verilator 5:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl \
        --top-module letters_top_tb tb/letters_top_tb.sv
    ./obj_dir/Vletters_top_tb

Replace `letters_top_tb` with any other testbench name to run that one. All
testbenches finish in seconds.

What the testbenches cover:

- **`csa_tb`:** random operands at full width; exhaustive at 4 bits.
- **`sign_est_tb`:** exhaustive at `n = 4`; random at `n = 16`. The
  reference clears the low bits and adds the vectors.
- **`cs_resolve_tb`:** value and exact latency, including the longest carry
  chain.
- **`modadd_csa_tb`:** three configurations (n = 16 with two resolvers,
  n = 16 with one, n = 4). It uses random and extreme moduli and operands,
  `k = 1..40`, with and without input stalls. It compares every result with
  `sum mod N` and every gap-free latency with the table above.
- **`modadd_table1_tb`:** the same latency check for `n = 4, 8, 12, 16, 24,
  30`, for both `DUAL_FINAL` settings and `k = 1, 2, 3, 8, 32`. It prints
  the measured final-stage cycles for each configuration.
- **`transient_gen_tb`:** every played sample against the table, idle code,
  ignored re-triggers and table rewrites.
- **`error_logger_tb`:** every interval read back against a reference list
  built from the bit index of each error, plus level and overflow flag. A
  4-bit / 8-entry instance reaches saturation and overflow.
- **`letters_top_tb`:** both designs end to end at default parameters.
  - For the adder: 200 sums, with counts of accepted and refused reductions,
    stalls, and which final candidate won.
  - For the test bed, the testbench models a PRBS transmitter
    (`x^15 + x^14 + 1`), a link with +-40-code signal plus interference, a
    zero-threshold decision and an error detector. It plays both waveform
    classes for `T = 10..70`. It checks every D/A code and every logged
    interval, and compares the autocorrelation at lags 1..8 computed from
    the raw errors with that rebuilt from the logged intervals. It also
    forces a buffer overflow and a counter saturation.

## Design choices and limits

These points are choices of this implementation rather than parts of the
method:

- **Modulus width.** `n = 16` is a default, not a requirement. Any
  `N_BITS >= 2` works, as long as `N` has its top bit set. A smaller modulus
  needs a smaller `N_BITS`.
- **Final-stage hand-over (a correction to the published method).** The
  published method sums the last SUB cycle's `C^ + S^` as the second
  candidate. When the last reduction was taken, `C^ + S^` equals `C + S`,
  which can still lie anywhere up to `N + 2^(n-1) - 1`. Both candidates
  are then the same, and the result is wrong whenever that value is `N` or
  more.
  This design instead resolves `C + S` and `C + S - N` of the final
  partial sum, and forming the latter takes one extra cycle after the last
  operand. In `modadd_csa_tb`, about one result in ten (43 of 400) falls into
  this case.
- **Two cycles per operand.** Adding `X_i` and subtracting `N` each use one
  CSA pass. A two-level CSA could do both in one cycle; that variant is not
  built.
- **Fixed resolve time.** The resolver always runs `n + 2` passes, even when
  the carry vector empties early.
- **Test-bed sizes and interfaces.** Table depth (1024), sample width
  (8 bits, offset binary), idle code, trigger/busy control, interval
  definition, counter width (16), FIFO depth (1024), saturation and overflow
  policy, and the read port are all choices of this implementation. Change
  them through the parameters `ADDR_W`, `DW`, `IW` and `DEPTH_W`. The top
  level's port widths are written for the defaults.
- **Resets.** All resets are asynchronous and active low. Tables and FIFO
  storage are not reset.
- **Not covered.** Timing closure, area and clock frequency have not been
  evaluated. The analysis software (the autocorrelation statistics) is not
  part of the hardware; the top-level testbench shows how it is computed
  from the logged intervals.
