# Time-shared cubic Farrow interpolator for symbol timing recovery

A receiver that samples with a free-running clock never samples exactly at the
symbol instants. It corrects the timing afterwards: for each wanted instant it
picks a basepoint sample `x(m)` and a fractional interval `mu` (0 <= mu < 1)
and interpolates

    y(m + mu) = x(m+2)·C-2(mu) + x(m+1)·C-1(mu) + x(m)·C0(mu) + x(m-1)·C1(mu)

with the cubic Lagrange weights

    C-2(mu) = ( mu^3 - mu) / 6
    C-1(mu) = -mu^3/2 + mu^2/2 + mu
    C0(mu)  =  mu^3/2 - mu^2 - mu/2 + 1
    C1(mu)  = -mu^3/6 + mu^2/2 - mu/3

A Farrow structure evaluates these four polynomials on line. This design uses
a property of the cubic weights to halve that structure and then shares the
remaining half in time. No sampling-clock PLL is needed. The timing control
unit only delivers `(m, mu)`.

## The idea: one half, used twice

The weights are mirror images of each other:

    C0(mu) = C-1(1 - mu)        C1(mu) = C-2(1 - mu)

So the four-tap sum splits into two evaluations of one function
`H(a, b, v) = a·C-2(v) + b·C-1(v)`:

    y = H(x(m+2), x(m+1), mu)  +  H(x(m-1), x(m), 1 - mu)
        \____ lower pass ____/     \_____ upper pass _____/

Note the order of the pair. In the lower pass the newer sample takes `C-2`. In
the upper pass the older one does.

Both passes see two adjacent samples. The upper pass needs `x(m-1), x(m)` and
the lower pass needs `x(m+1), x(m+2)`, which arrive two samples later. So one
`H` unit fed by the incoming sample and the previous one can do both:

- It runs the upper pass in the sample slot of `x(m)`.
- It holds that result for two slots.
- It runs the lower pass in the slot of `x(m+2)`.
- The two results are added.

That uses one half-Farrow unit plus a few switches, in place of a full
four-branch structure. Published synthesis results for this structure, against
a Farrow structure simplified the conventional way, report about a quarter less
area and over a third less power at the same speed and accuracy.

## Datapath of one half (`farrow_half`)

Collecting `H` by powers of `v` gives a Horner form with three multipliers:

    H = ((p3·v + p2)·v + p1)·v
    p3 = a/6 - b/2      p2 = b/2      p1 = b - a/6

This costs one divide-by-6, one shift (`b/2`), four adders and three
multipliers. The divide-by-6 is a product with the constant
`ceil(2^K / 6)`, where `K = X_W + FRAC_W + 1`, followed by a right shift.
Synthesis turns that constant product into shifts and adds. The unit is purely
combinational.

Number formats:

| signal | format |
|---|---|
| samples `x`, `a`, `b` | signed integer, `X_W` bits (default 10). The output keeps whatever scale the samples have. |
| `mu` | unsigned fraction, `MU_W` bits (default 4): `mu = code / 2^MU_W` |
| `v` (= `mu` or `1 - mu`) | unsigned Q1.`MU_W`, so `1 - 0 = 1.0` is exact |
| `H`, `y` | signed, `FRAC_W` fraction bits (default 12), `X_W + FRAC_W + 2` bits wide |

Each product with `v` is cut back to `FRAC_W` fraction bits by an arithmetic
right shift, which truncates. The error of one half stays within 4 LSB
(2^-12). For the full interpolant it stays within 8 LSB. `v = 0` gives exactly
0 and `v = 1.0` gives exactly `b`.

## Pass schedule (`farrow_ctrl`) and the top (`farrow_cubic_tm`)

Every sample slot (a cycle with `x_valid` high), `farrow_ctrl` chooses one of
three passes:

- **UPPER**: a request (`strobe` with `mu`) arrives with `x(m)`. The MUX gives
  `v = 1 - mu`. The input switch gives `a = x_prev`, `b = x_in`. The result
  `w1` goes into the delay line `w2 -> w3`.
- **LOWER**: the request accepted two slots earlier is due. The MUX gives
  `v = mu`, with that request's `mu`. The input switch gives `a = x_in`,
  `b = x_prev`. The result `w4` goes to the output adder, which registers
  `y = w3 + w4`.
- **IDLE**: otherwise.

With one request every four samples, the timing is:

| slot | m-1 | m | m+1 | m+2 | next cycle |
|---|---|---|---|---|---|
| `x_in` | x(m-1) | x(m), `strobe`, `mu` | x(m+1) | x(m+2) | |
| pass | | UPPER (1-mu) | | LOWER (mu) | |
| `w1` / `w2` / `w3` | | upper / - / - | - / upper / - | - / - / upper | |
| `w4` | | | | lower | |
| `y_valid` | | | | | 1, `y = y(m+mu)` |

So the latency is one clock from accepting `x(m+2)` to `y`. The delay cells are
`x_prev`, `w2` and `w3`. Everything advances only in valid slots, so gaps in
the sample stream simply stall the schedule.

**Requests at any spacing except two.** The upper and lower passes of one
request are two slots apart. A second request exactly two slots after an
accepted one would need the half twice in the same slot:

- The due lower pass wins.
- The new request is refused, and `req_drop` pulses.

Requests one slot apart, or three or more apart, are all served, because the
`w2 -> w3` line holds two upper results at once.

A timing loop at about four samples per symbol asks for one output every 3 to
5 samples, so it never hits the refused case. A loop with an output rate close
to the sample rate would need one shared half per output phase, or two halves
(the unshared structure).

## Ports of `farrow_cubic_tm`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | synchronous, active-low reset |
| `x_valid` | in | 1 | `x_in` is a new sample |
| `x_in` | in | `X_W` | signed sample from the fixed-rate sampler |
| `strobe` | in | 1 | interpolate at the current sample plus `mu` |
| `mu` | in | `MU_W` | fractional interval of the request |
| `y` | out | `X_W+FRAC_W+2` | interpolant, `FRAC_W` fraction bits |
| `y_valid` | out | 1 | one-cycle pulse carrying `y` |
| `req_drop` | out | 1 | a request was refused (see above) |

The sampler (ADC) and the timing control unit are not part of this RTL. The
control unit comprises the timing error detector, loop filter and the counter
that produces `m` and `mu`. Their signals are the ports above.

## Where this RTL departs from, or adds to, the structure it implements

- **Throughput.** A fully unshared version, with one half on `1 - mu` and one
  on `mu`, gives one output per sample slot. The shared version here does both
  passes on one unit. It therefore serves requests at any spacing except
  exactly two slots.
- **Request interface.** The "strobe with `mu` in the slot of `x(m)`" interface
  is this design's own. So are the `x_valid` stall input, the refusal rule,
  the registered output and the synchronous reset. The fixed
  two-samples-then-two-samples sequence of the original is the special case
  of one strobe every four samples.
- **Output register.** The final adder `w3 + w4` is registered, so `y` comes
  one clock after `x(m+2)`. Without that register, the result would be
  combinational in the slot of `x(m+2)` itself.
- **Word lengths.** `MU_W = 4` and `FRAC_W = 12` follow the accuracy example
  the structure was evaluated with. The sample width `X_W = 10` is this
  design's choice.
- **Accuracy.** In that example, samples 1, 2, 3, 4 with `mu = 8/16` should
  give 2.5. The structure was reported to give 2 + 2032/4096 = 2.49609, a
  signal-to-sampling-noise ratio of 56 dB. This RTL returns 2.5 exactly, so
  its rounding differs from the original's. Its error is bounded above.

## Files

| file | content |
|---|---|
| `rtl/farrow_pkg.sv` | default word lengths, `pass_e` enum |
| `rtl/farrow_half.sv` | the shared half-Farrow datapath |
| `rtl/farrow_ctrl.sv` | pass sequencer, with assertions on the schedule |
| `rtl/farrow_cubic_tm.sv` | top: sequencer, MUX, switches, delay cells, output adder |
| `tb/tb_farrow_half.sv` | `H` against floating-point Lagrange weights, all `v`, corner and random samples |
| `tb/tb_farrow_ctrl.sv` | schedule against a slot-history model, with stalls and collisions |
| `tb/tb_farrow_cubic_tm.sv` | end to end at default sizes (see below) |

Synthesized at the defaults (generic word-level cells), the top is 35 cells
and 93 flip-flop bits. Of those cells, 5 are multiply-accumulate cells from
the three multipliers and the divide-by-6.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself through
a watchdog if it hangs. For example:

    verilator --binary --timing --assert -Irtl \
        rtl/farrow_pkg.sv rtl/farrow_half.sv rtl/farrow_ctrl.sv \
        rtl/farrow_cubic_tm.sv tb/tb_farrow_cubic_tm.sv \
        --top-module tb_farrow_cubic_tm
    ./obj_dir/Vtb_farrow_cubic_tm

The end-to-end test plays both the sampler and the timing control unit. It
keeps every sample and every request, and checks each result against the
direct four-coefficient formula in floating point. Each result must arrive
exactly one cycle after `x(m+2)`. It runs in four phases:

1. The accuracy example above. It must reach at least 56 dB.
2. One request every four samples.
3. Request instants 3.7 samples apart on a sine wave, as a timing loop would
   issue them.
4. Random requests with stalls, back-to-back requests, refused requests and
   `mu = 0`. Each of these must occur at least once.

At the defaults it reports an overall signal-to-error ratio of about 120 dB
against exact cubic interpolation.

## Changing it

`X_W`, `MU_W` and `FRAC_W` are parameters of every module, with defaults in
`farrow_pkg`. Internal widths follow from them. The testbenches read the same
package constants, so changing the defaults there retargets them too. A finer
`mu` mainly widens the three multipliers. Adding a pipeline register between
the multipliers of `farrow_half` would shorten the critical path. It would
also move the lower pass by the same number of cycles, so the `w2 -> w3` delay
line and the sequencer would have to be lengthened to match.
