# LINC signal component separator

A LINC transmitter (linear amplification with nonlinear components) gets a
linear, amplitude-modulated RF output out of two power amplifiers that are
driven hard and are therefore efficient but nonlinear. It never lets either
amplifier see a varying envelope. Instead the baseband signal
S = I + jQ, with |S| ≤ 1, is split into two phasors of constant magnitude:

    S1 = S + e        S2 = S − e        e = jS · sqrt(1/|S|² − 1)

Because e is in quadrature with S and sized so that |S1| = |S2| = 1, both
components have a constant envelope and only their phases carry the
information. After up-conversion and amplification, adding them gives back
2S: the quadrature parts cancel.

This RTL is the digital half of such a transmitter: the **signal component
separator**. It takes the 12-bit I/Q samples from two A/D converters and
produces, every clock cycle, the four 14-bit words I1, Q1, I2, Q2 for two
pairs of D/A converters. Written out in Cartesian form the separation is

    SR = sqrt( 1/(I² + Q²) − 1 )
    I1 = I − Q·SR     Q1 = Q + I·SR
    I2 = I + Q·SR     Q2 = Q − I·SR

The multiplications and additions are cheap. The square root of a
reciprocal, SR, is the hard part. Two ways of computing it are implemented
and placed side by side in the top module:

* **table method** (`ndscs_lut`): SR comes from a one-dimensional table of
  16384 × 26-bit words addressed by I² + Q². It is accurate, and the whole
  pipeline is 5 cycles.
* **divide-and-root method** (`ndscs_srfb`): SR is computed by a pipelined
  divider followed by a pipelined square-root block. It needs no large
  memory and has short logic paths, but it is coarser and takes 21 cycles.

Everything analog is outside this RTL: the converters, the reconstruction
filters, the up-converters with their shared local oscillator, the two
amplifiers, and the output combiner (a variable reactive termination
combiner, i.e. a balun with tunable shunt reactances). The top module's
ports are where the converters connect.

## Number formats

| signal | width | format | notes |
|---|---|---|---|
| I, Q in | 12 | signed 1.11 | full scale ±1.0 is taken as r_max = 1 |
| I² + Q² | 24 | unsigned 2.22 | values ≥ 1.0 are beyond full scale |
| SR, table | 26 | unsigned 12.14 | |
| SR, divide-and-root | 12 | unsigned 4.8 | |
| I1, Q1, I2, Q2 out | 14 | signed 2.12 | floor, then saturated |

All of these are in `rtl/linc_pkg.sv`. The package also defines the sample
structs `iq_t` (`{i, q}` input) and `comp_t` (`{i, q}` component). A
component S1 travels as one `comp_t`, so it pairs its I1 and Q1 words for
the quadrature modulator.

Samples with I² + Q² ≥ 1 lie outside the separator's range (there is no real
SR). Both methods treat them as SR = 0, so S1 = S2 = S. Very small inputs
make SR huge. The products stay bounded in theory (|Q·SR| ≤ 1), but
quantisation can push them past the 2.12 range, and the outputs then
saturate.

## Table method (`ndscs_lut`)

```
 s_in ─┬─ iq_power (2) ── sr_lut (1) ──┬── linc_addsub: ×SR (1) ── ±  (1) ── s1, s2
       ├─ delay_line 3 ────────────────┘        (mul_i, mul_q)       ▲
       └─ delay_line 4 ─────────────────────────────────────────────┘ (add_i, add_q)
```

* `iq_power` squares I and Q in two multipliers (one register stage). It then
  adds the squares (second stage).
* The 14 most significant fraction bits of the power, bits 21..8, address
  `sr_lut`. Entry `a` stands for x = a/2¹⁴ and holds
  `floor(sqrt((2¹⁴ − a) · 2²⁸ / a))`, which is SR in 12.14. Entry 0 holds the
  largest code. The table is filled when the memory is initialised, by a
  SystemVerilog function. It uses Newton's integer square root, started from
  the previous entry's root, so each entry takes only a few steps. An FPGA
  flow maps it onto block RAM with those contents. The read is registered.
* `linc_addsub` multiplies SR by Q and by I. Both products are shared by S1
  and S2. One cycle later it adds them to or subtracts them from I and Q.
* I and Q have to meet SR at the multipliers and at the adders. The
  3-stage and 4-stage `delay_line`s hold them back by exactly the latency of
  the blocks in front.

Latency is 5 cycles and throughput one sample per cycle. There is no
backpressure: the separator streams whatever the converters deliver.

## Divide-and-root method (`ndscs_srfb`, `srfb_sr_part`)

This is the least obvious part of the design. SR = sqrt(1/x − 1) is built in
three steps. The binary points matter at each one:

1. **Divide.** d = the 8 most significant fraction bits of x (bits 21..14),
   so x ≈ d/256. `pipe_divider` divides the constant 1024 by d, over 4
   pipeline stages of restoring long division. Because 1024 counts as
   "one", the 10-bit quotient q = ⌊1024/d⌋ equals 1/x with **two fraction
   bits**. The 8-bit remainder is also kept. If d is 0 or 1 the quotient
   does not fit in 10 bits, so it saturates to 1023 (remainder 0).
2. **Minus one and pack** (1 stage). One is 4 in quotient units, so the
   14-bit square-root input is

       rad[13:4] = q − 4         rad[3:0] = remainder[7:4]

   That is 1/x − 1 with six fraction bits. The low four bits come from the
   top of the remainder. This is the packing the original design
   specifies, and it is kept exactly even though remainder/256 only
   approximates the true fraction remainder/d. Since d ≤ 255, q ≥ 4 and the
   subtraction never goes negative.
3. **Square root.** `srfb_sqrt` computes ⌊sqrt(rad · 2¹⁰)⌋. This is a 12-bit
   root of a 14-bit input, two bits narrower than the input. It works digit
   by digit, one root bit per stage: shift in two radicand bits, try to
   subtract (root·4 + 1), and keep the difference if it is not negative.
   Each stage is one subtractor followed by a register, so 12 stages. With
   six fraction bits in, the root has 8 fraction bits: SR in 4.8, at most
   just under 16. The block is parameterized by input and root width
   (root = ⌊sqrt(rad · 2^(2·OUT_W − IN_W))⌋, OUT_W stages); its testbench
   also checks a 12-bit-in, 10-bit-root instance.

A 1-bit `delay_line` carries the beyond-full-scale flag alongside these 17
stages. With `iq_power` in front and `linc_addsub` behind, the whole method
takes 2 + 17 + 2 = 21 cycles. Its I/Q delay lines are therefore 19 and 20
stages deep.

## Timing summary

| path | cycles |
|---|---|
| `iq_power` | 2 |
| `sr_lut` read | 1 |
| `pipe_divider` | 4 |
| pack (q − 4, remainder bits) | 1 |
| `srfb_sqrt` | 12 |
| `linc_addsub` (multiply, add/sub) | 1 + 1 |
| **table method, in → out** | **5** |
| **divide-and-root method, in → out** | **21** |

`out_valid` (`lut_valid`, `srfb_valid` at the top) is `in_valid` delayed by
the same number of cycles. The valid flag only marks samples. It never stalls
anything.

## Modules

```
linc_ndscs_top
├── ndscs_lut
│   ├── iq_power
│   ├── sr_lut
│   ├── delay_line ×3   (I/Q by 3, I/Q by 4, valid by 5)
│   └── linc_addsub
└── ndscs_srfb
    ├── iq_power
    ├── srfb_sr_part
    │   ├── pipe_divider
    │   ├── srfb_sqrt
    │   └── delay_line  (range flag by 17)
    ├── delay_line ×3   (I/Q by 19, I/Q by 20, valid by 21)
    └── linc_addsub
```

`delay_line` (default 12 bits × 29 stages) is a plain flip-flop chain with an
asynchronous active-low clear. `rst_n` only clears the delay lines, which is
what keeps the valid flags clean after reset. The arithmetic registers are not
reset: they flush within one pipeline length.

Carrying both methods in one top is for comparison and test. A product would
build only one of them. The 16384 × 26-bit table (425,984 bits) is the
largest single resource.

## Accuracy

These are measured in `tb_linc_ndscs_top` as the deviation of |S1| from 1,
for input envelopes between 0.3 and 0.99 of full scale:

| method | mean error | max error |
|---|---|---|
| table | 0.012 % | 0.054 % |
| divide-and-root | 1.2 % | 3.5 % |

The table method matches the 0.05 % data error reported for the original
table design. The divide-and-root method is much coarser than the 0.115 %
reported for the original square-root design. Its main limit is the 8-bit
denominator: x is known only to 1/256, which is a large relative error for
small envelopes. The remainder bits packed as fraction add to it. The
reported figure could not be reproduced from the word lengths given, so
treat this path as a faithful structure with unverified accuracy. Both
methods meet S1 + S2 = 2S to within one output code wherever the outputs do
not saturate.

## Departures from the original design and choices made here

* **Delay depths of the divide-and-root method.** The original aligned I/Q
  with delay blocks 22 and 29 stages deep. Their derivation is not
  available, so the depths here (19 and 20) follow from this
  implementation's own stage latencies.
* **Square-root output format.** The original quotes a 12-bit output with 7
  integer and 5 fraction bits. Here the same 12 bits are read as 4.8,
  because with an 8-bit denominator SR cannot reach 16. A 7.5 reading would
  leave the top bits always zero.
* **"Subtract one"** is taken as subtracting 1.0 in the quotient's scale (4
  codes), not one code.
* **Table contents** are computed in SystemVerilog, not loaded from a file.
  They use floor rounding, and entry 0 holds the largest code. The original
  kept the table in a dual-port RAM. Here a single read port is enough,
  because S1 and S2 share SR.
* **Divider internals** are not specified by the original (it used a library
  block). Restoring division spread over 4 stages gives the stated 10-bit
  quotient, 8-bit remainder and 4-cycle latency. The saturation for d ≤ 1 is
  this implementation's.
* **Added here:** the valid flag, the reset of the delay lines, the SR = 0
  treatment beyond full scale, truncation (floor) and saturation at the
  outputs, and the side-by-side top.

## Simulating

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it
hangs. `tb/linc_ref_pkg.sv` holds the reference models the testbenches
compare against. They are written independently of the RTL: real-valued
square roots corrected to the exact floor, and plain integer division.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/linc_pkg.sv tb/linc_ref_pkg.sv tb/tb_linc_ndscs_top.sv \
    --top-module tb_linc_ndscs_top
./obj_dir/Vtb_linc_ndscs_top
```

Replace the testbench name to run another one (`tb_ndscs_lut`,
`tb_ndscs_srfb`, `tb_srfb_sr_part`, `tb_pipe_divider`, `tb_srfb_sqrt`,
`tb_sr_lut`, `tb_linc_addsub`, `tb_iq_power`, `tb_delay_line`).

`tb_linc_ndscs_top` runs the top at its default sizes and covers:

* a two-tone signal;
* a CDMA-like signal: random QPSK chips at 8 samples per chip, shaped and
  scaled to a 0.95 peak envelope. It stands in for the IS-95 signal the
  original design was measured with;
* corner cases: zero, tiny and beyond-full-scale inputs, and idle cycles.

It checks every output of both methods bit for bit, checks the latencies
through the valid flags, and checks the recombination S1 + S2 = 2S. It also
confirms that each case actually occurred: back-to-back samples, idle
cycles, clipping, divider saturation and output saturation. It runs in well
under a second.

To change a word length, edit `linc_pkg`. The module parameters default to
the package values. The delay-line depths in `ndscs_lut` and `ndscs_srfb`
are derived from those values.
