# SA2x: a half-clock-rate signature analyzer for scan-based BIST

In a built-in self-test, the response compactor is clocked once for every
response vector the circuit under test (CUT) produces. Its flip-flops are
clocked all the time, and most of the compactor's switching comes from their
clock inputs, not from the data. SA2x is a compactor that runs at **half the
clock rate** and takes **two response vectors per clock pulse**. The signature
is exactly the one a conventional compactor would produce. The data logic
grows by a few XOR gates and one delay element per CUT output. In exchange,
the clock-input switching per compressed bit is cut in half.

This repository holds synthesizable SystemVerilog for the compactor and for the
test-per-clock BIST around it: pattern generator LFSR, input scan path, SA2x
compactor and clock divider. It also holds self-checking testbenches for
Verilator.

## The test-per-clock BIST

```
            f_CLK                       f_CLK                      f_CLK/2
  +-----------------+  serial  +------------------+  K1   +-----+  S   +--------------------------+
  | TPG LFSR (M1)   |--------->| scan path SP1 (K1)|------>| CUT |----->| SA2x compactor           |
  | tpg_lfsr        |          | scan_path_sp1     |cut_in |     |cut_out| scan path (S) + SA (M)  |
  +-----------------+          +------------------+       +-----+      | + delay gates E1..ES     |
                                                                  y0 ->| sa2x_compactor           |
                                                                       +--------------------------+
```

* **Pattern generator** (`tpg_lfsr`): an M1-stage Fibonacci LFSR. It shifts one
  pseudo-random bit per f_CLK cycle out of its last stage.
* **Scan path SP1** (`scan_path_sp1`): a K1-cell shift register fed by the LFSR.
  Its cells drive the CUT inputs in parallel, so the CUT gets a new pattern every
  cycle ("test per clock").
* **CUT**: not part of this RTL. The top module brings its inputs out as
  `cut_in` and takes its S outputs back on `cut_out`.
* **SA2x compactor** (`sa2x_compactor` = `sa2x_core` + `delay_gate` x S): an
  S-cell scan path with an XOR in front of every cell, feeding an M-stage
  single-input signature analyzer. It is clocked by `clk_half`.
* **Clock divider**: a flip-flop in `sa2x_bist_top` that toggles on the falling
  edge of f_CLK.

## The conventional compactor it replaces

The conventional compactor does one step per vector. Call the scan cells
c1..cS, the signature stages r1..rM, and the CUT outputs y1..yS. The scan-in of
the first cell is y0. One step is:

```
c1 <= y0 ^ y1
ci <= c(i-1) ^ yi                 i = 2..S
r1 <= cS ^ fb(r)                  fb(r) = XOR of the tapped stages
rk <= r(k-1)                      k = 2..M
```

For the default X^4 + X^3 + 1, fb(r) = r3 ^ r4. This structure is not a block
of the design. It appears only as the reference model inside the testbenches.

## How SA2x folds two vectors into one pulse

Take two vectors in a row: first `a`, then `b`. Apply the step above twice and
write the result in terms of the state before `a`:

```
c1 <= y0b ^ y1b
c2 <= (y0a ^ y1a) ^ y2b
ci <= c(i-2) ^ y(i-1)a ^ yib              i = 3..S
r1 <= c(S-1) ^ ySa ^ fb(r')               r' = signature after vector a
r2 <= cS ^ fb(r)
rk <= r(k-2)                              k = 3..M
```

where r'1 = cS ^ fb(r) and r'k = r(k-1). Every term of `a` that is needed is a
single signal: y0a^y1a, y2a, ..., ySa. SA2x does not store `a` in flip-flops.
Instead it passes those S signals through **delay gates** E1..ES, each delaying
by one f_CLK period. Just before a `clk_half` edge, the CUT outputs show `b`
and the delay gates show `a`. One edge then absorbs 2*S response bits.

E1 delays the output of the first XOR (y0 ^ y1), not y1 alone. Ei delays yi for
i >= 2. `sa2x_core` sends these signals out on `dly_in` and takes the delayed
ones back on `dly_out`, so the delay elements stay outside the synthesizable
core.

With the default sizes (S = M = 4, X^4 + X^3 + 1) the network is eleven
two-input XORs. The cells keep the names of the conventional compactor: T1–T4
are the scan cells and T5–T8 the signature stages. Ex is the delayed signal:

| XOR  | inputs                  | drives            |
|------|-------------------------|-------------------|
| SM1  | y0, y1                  | T1, E1            |
| SM2  | E1, y2                  | T2                |
| SM3  | E2, y3                  | SM4               |
| SM4  | T1, SM3                 | T3                |
| SM5  | E3, y4                  | SM6               |
| SM6  | T2, SM5                 | T4                |
| SM11 | T6, T7                  | SM7               |
| SM7  | E4, SM11                | SM8               |
| SM8  | T3, SM7                 | T5                |
| SM10 | T7, T8                  | SM9               |
| SM9  | T4, SM10                | T6                |

T7 takes T5 and T8 takes T6. The two halves of each register are interleaved:
each flip-flop skips one stage, because the clock now moves the data two stages
per pulse.

For general S and M, `sa2x_core` builds the same network from the equations
above. This generalisation is this design's own; the structure is drawn only
for S = M = 4.

## Timing of the half-rate clock and the delay gates

```
f_CLK      _|‾‾|__|‾‾|__|‾‾|__|‾‾|__
cut_out     | a    | b    | c    | d
E outputs      ...  | a    | b    | c          (one f_CLK period later)
clk_half   ______|‾‾‾‾‾‾|______|‾‾‾‾‾‾|        (toggles on falling f_CLK)
                 ^ pulse: takes (prev, a)       ^ pulse: takes (b, c)
```

* The top's divider toggles `clk_half` on the **falling** edge of f_CLK.
  Reset holds it low. The compactor therefore samples in the middle of an f_CLK
  cycle. At that point the CUT output of the current cycle has settled, and the
  delay gates show the previous cycle's value. The CUT and the XORs in front of
  the cells must settle within half an f_CLK period.
* `DELAY` is one f_CLK period by default (10 ns, i.e. 100 MHz). It must lie
  strictly between half and one and a half f_CLK periods, minus the CUT's
  settling time. If it is shorter, the gates already show the current vector
  and the signature is wrong; the testbench of the top checks exactly this
  fault. If it is longer, they show a vector from two cycles back.
* After reset, the first pulse pairs the vector present during reset with the
  first new one. A signature is compared after a known number of pulses from
  reset.
* All flip-flops have an asynchronous active-low reset. The pattern generator
  reloads its seed; everything else clears to zero.

`delay_gate` is a **behavioural model** (a transport delay, not synthesizable).
In silicon it is a delay line tuned to the clock period. Synthesis of
`sa2x_compactor` or `sa2x_bist_top` keeps all the flip-flops and XORs, but the
delay line has to be provided as a cell of the target process. Everything else
is plain synthesizable logic.

## Where the saving comes from

Count the switching that the compactor's own flip-flops cause per compressed
response bit. A conventional compactor clocks S + M flip-flops once per vector
of S bits. That is 2(S+M)/S clock-input transitions per bit. SA2x clocks the
same S + M flip-flops once per 2S bits, which is (S+M)/S. The data side pays a
little extra:

* the flip-flop D inputs now switch twice per pulse where they see CUT data;
* the XORs fed by CUT outputs or delay gates switch at the full rate;
* the S delay gates add switching nodes.

For the S = M = 4 example, take 16 pulses and assume each CUT output toggles on
half of its vectors. Weight each net by the number of gate inputs it drives,
and count a clock input as two transitions per pulse. The estimate is then:

| | clock inputs | D inputs | XOR inputs | delay inputs | total | bits | per bit |
|-|-------------:|---------:|-----------:|-------------:|------:|-----:|--------:|
| conventional, 16 clocks | 256 | 64 | 96 | – | 416 | 64 | 6.5 |
| SA2x, 16 pulses, all changes simultaneous | 256 | 104 | 264 | 64 | 688 | 128 | 5.375 |
| SA2x as built (mid-cycle compactor clock) | 256 | 104 | 296 | 64 | 720 | 128 | 5.625 |

The second row assumes that the flip-flop outputs change at the same instant as
the CUT data. In this implementation the compactor clock rises in the middle of
the f_CLK cycle, so those two events are half a cycle apart. Four XOR outputs
mix flip-flop outputs with CUT data: SM4, SM6, SM7 and SM8. Each of them can
switch at both events, which adds 32 transitions. The reduction over the
conventional compactor is then about 1.16 instead of 1.21. This cost comes with
the design's choice of clock phase (see the timing section): in exchange, the
delay window is centred on one f_CLK period. `tb_sa2x_switching` measures these
counts on the RTL over 6400 pulses of random data. It gets 5.61–5.62 for SA2x
and 6.49–6.51 for a model of the conventional compactor.

In general, the advantage grows with the signature length M, which adds only
clocked stages. It shrinks as the number of CUT outputs S grows. Across the
evaluated range (S = 20 with M = 5..50, and M = 30 with S = 5..50), the
analytic estimate of the reduction lies between roughly 1.24 and 1.77. That
estimate assumes coincident changes, as in the second row above; the mid-cycle
clock of this implementation gives somewhat less.

## Parameters

| module          | parameter | default | meaning |
|-----------------|-----------|---------|---------|
| all SA2x blocks | `S`       | 4       | CUT outputs = compactor scan cells |
|                 | `M`       | 4       | signature stages (>= 2) |
|                 | `TAPS` / `SA_TAPS` | `4'b1100` | bit k-1 set = stage k fed back; default X^4+X^3+1; bit M-1 must be set |
|                 | `DELAY`   | 10.0    | delay gate delay in ns; nominally one f_CLK period, must lie strictly between 0.5 and 1.5 periods |
| `tpg_lfsr`      | `M1`      | 4       | pattern generator stages |
|                 | `TAPS` / `TPG_TAPS` | `4'b1100` | X^4+X^3+1, period 15 |
|                 | `SEED`/`TPG_SEED` | 1 | reset state, non-zero |
| `scan_path_sp1` | `K1`      | 4       | CUT inputs |

Defaults live in `rtl/sa2x_pkg.sv`. The values of S = 4, M = 4 and
X^4 + X^3 + 1 for the compactor follow the published example. Everything else
is this design's own choice: the pattern generator size and polynomial, the
SP1 length, the seed, the delay value and the reset style. No sizes were
published for those.

## What is not here

* **The CUT.** It is whatever circuit is under test. Testbenches use a small
  combinational stand-in, `tb/cut_model.sv`.
* **Test-per-scan use.** The technique could in principle be applied to
  test-per-scan BIST, but that structure is not worked out and not built.
* **Real delay elements.** See above; `delay_gate` is a simulation model only.
* **Compaction of more than two vectors per pulse.** The scheme in principle
  generalises to more vectors per pulse, but only the two-vector version is
  specified and built.

## Files

| file | contents |
|------|----------|
| `rtl/sa2x_pkg.sv` | default sizes and polynomials |
| `rtl/sa2x_core.sv` | SA2x flip-flops and XOR network (synthesizable) |
| `rtl/delay_gate.sv` | behavioural delay element E |
| `rtl/sa2x_compactor.sv` | core + S delay gates |
| `rtl/tpg_lfsr.sv` | pattern generator LFSR |
| `rtl/scan_path_sp1.sv` | input scan path SP1 |
| `rtl/sa2x_bist_top.sv` | the whole BIST, with clock divider; CUT external |

## Verification

Every testbench checks itself against models written independently of the RTL.
Mostly that model is the conventional one-vector-per-clock compactor above.
Each testbench prints `TB_RESULT checks=N failures=F`.

| testbench | what it checks |
|-----------|----------------|
| `tb_sa2x_core` | two steps of the reference per pulse, at S=4/M=4, S=3/M=8 and S=1/M=3; delay-gate inputs; asynchronous reset mid-run |
| `tb_delay_gate` | exact delay of edges, transport of a pulse shorter than the delay, random stream |
| `tb_sa2x_compactor` | timed run at f_CLK = 100 MHz; signature and scan cells after each pulse; 32 vectors (128 bits) per 16 pulses |
| `tb_tpg_lfsr` | output stream against the recurrence, period 15 with all non-zero states, period 127 at M1 = 7, hold, reset |
| `tb_scan_path_sp1` | shifting at 4 and 9 cells, enable, reset |
| `tb_sa2x_bist_top` | whole BIST at default parameters with `cut_model`, four 16-pulse sessions. Checks the pattern generator, SP1, signature and scan cells, and the rate. Counts that each mechanism happened: pulses, two vectors per pulse, delayed vector different from current, signature feedback, LFSR wrap, scan-in, a hold of the pattern generator (`en` low) |
| `tb_sa2x_switching` | fan-out-weighted transition count on the SA2x nets and on a conventional-compactor model: 6.5 and 5.625 transitions per bit within 2 %; each flip-flop loads the XOR the table above gives it |
| `tb_sa2x_workloads` | the compactor at S/M = 4/4, 20/5, 20/30, 20/50, 5/30, 50/30: equivalence with the reference, and 2*S bits per pulse |

To run one, for example the whole system:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/sa2x_pkg.sv tb/tb_sa2x_bist_top.sv --top-module tb_sa2x_bist_top -o sim
./obj_dir/sim
```

The same command works for any other testbench if you replace its name. Every
testbench finishes in well under a second.
