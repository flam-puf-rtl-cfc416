# FLAM-PUF: an arbiter PUF wrapped in a response-controlled LFSR

An arbiter PUF (APUF) on its own is easy to clone in software: its response is
the sign of a weighted sum of challenge features, so a logistic-regression model
trained on a few hundred observed challenge/response pairs (CRPs) predicts it
almost perfectly. FLAM-PUF ("response-Feedback-based Lightweight Anti-ML PUF")
keeps the single cheap APUF but never lets an observer see the pair the APUF
actually computes. The original challenge C is loaded into a Galois LFSR, and the
LFSR state is what the APUF sees (the *direct challenge* C\*). Every clock, the
APUF's 1-bit *direct response* r\* is fed back into one LFSR tap, so the next
direct challenge depends on a secret, chip-specific bit. After N-1 clocks the
N-1 collected direct responses replace the LFSR's whole tap polynomial. Only C
goes in and only later direct responses come out, so the observable mapping is a
long, data-dependent chain of APUF evaluations instead of one linear threshold.

The hardware cost is one N-stage APUF, one N-stage LFSR with N-2 AND-gated taps,
two NAND gates, a buffer for N-1 bits, and a small controller.

This repository holds synthesizable SystemVerilog for everything except the APUF
itself. The APUF is a delay race decided by process variation, so it appears as a
behavioural model of its standard additive delay model.

## Block diagram

```
             challenge C (N bits)
                   |  load
                   v
   G1 (param) --> +-----------------------+   C* (N bits)   +-----------+
   G2 (buffer)--> | flam_lfsr             |---------------->| apuf      |
                  |  Galois, N registers  |                 |  N stages |
                  |  tap FB_POS <- r*     |<-------+--------|  + arbiter|
                  +-----------------------+        |  r*    +-----------+
                                                   |
                 +---------------------+           |
                 | flam_shift_buffer   |<----------+----> flam_shift_buffer (final R)
                 |  R* = r*_1..r*_N-1  |                 r_out / r_valid
                 +---------------------+
                          |  becomes G2
   flam_ctrl: load, step, coefficient source, buffer/response enables, done, err
```

| file | role |
|---|---|
| `rtl/flam_pkg.sv` | default size, controller and coefficient-source enums, hash used to draw APUF instance weights |
| `rtl/flam_fb_module.sv` | the two-NAND response feedback cell |
| `rtl/flam_lfsr.sv` | reconfigurable Galois LFSR with the feedback cell at tap `FB_POS` |
| `rtl/apuf.sv` | behavioural arbiter-PUF model (additive delay model) |
| `rtl/flam_shift_buffer.sv` | serial-in buffer, used for R\* (becomes G2) and for the final response |
| `rtl/flam_ctrl.sv` | evaluation sequencer |
| `rtl/flam_puf.sv` | top level |

## One evaluation, clock by clock

Let i be the index of the LFSR state S^i that the APUF currently sees, and
r\*_i = APUF(S^i). The LFSR advances once per clock, and each step uses the r\*
of the state it leaves:

| i | taps used for S^i -> S^(i+1) | buffer | output |
|---|---|---|---|
| start cycle | C loaded: S^0 = C | cleared | cleared |
| 0 | G1 | - | - |
| 1 .. N-2 | G1 | r\*_i shifted in | - |
| N-1 | G2 = (r\*_1 .. r\*_(N-1)), last bit taken straight from the APUF | r\*_(N-1) shifted in: R\* complete | - |
| N .. | G2 (held in the buffer) | frozen | - |
| K .. K+M-1 | G2 | frozen | r\*_i is final-response bit i-K |

At every step the tap at `FB_POS` is driven by r\*_i, not by a coefficient. This
holds in both phases.

Steps 0 to N-2 form the *first confusion*. It runs on a fixed, public coefficient
set G1, and r\* changes one tap. From step N-1 on, the *secondary confusion*
runs on a polynomial made entirely of the chip's own earlier responses. By
default K = N and M = N, so the final response R = (r\*_N .. r\*_(2N-1)) is
128 bits. `done` rises K+M = 256 clocks after the start cycle.

The switch to G2 happens on the same clock that delivers r\*_(N-1). That takes
a look-ahead path (`q_next`) from the buffer: the step from S^(N-1) to S^N already
uses all N-1 collected bits. This matches the 4-stage worked example of the
original description, in which C\*_4 is computed with G2 = (r\*_1, r\*_2, r\*_3).

## The feedback tap

Register j of a Galois LFSR normally receives `s[j-1] ^ (g[j] & s[N-1])`, and
register 0 receives `s[N-1]`. At the feedback point, the AND gate is replaced by
two NAND gates:

```
tap = NAND(r*, NAND(s[N-1], s[N-1]))  =  !r* | s[N-1]
s[j] <= s[j-1] ^ tap
```

- **r\* = 1:** `tap = s[N-1]`, so the stage behaves as a normal tap with g = 1.
- **r\* = 0:** `tap = 1`, so the register receives the *inverse* of its predecessor.

A response of 0 therefore does more than switch the tap off: it flips a bit of the
next direct challenge. An all-zero LFSR state cannot persist while the feedback
cell inverts. Even so, the controller refuses an all-zero original challenge
with an `err` pulse.

Because that tap always follows r\*, the coefficient bit `g[FB_POS]` is unused in
both phases. The LFSR therefore has N-2 AND gates and N-1 XOR gates, which are the
gate counts given for the original 128-stage design (126 AND, 127 XOR, 2 NAND).

Worked 4-stage example, with C = (s0,s1,s2,s3) = (0,1,1,0), G1 = (1,0,0) and the
feedback point between a1 and a2:

| step | r\* fed back | next direct challenge (s0..s3) |
|---|---|---|
| S^0 -> S^1 | 0 | 0001 |
| S^1 -> S^2 | 1 | 1110 |
| S^2 -> S^3 | 0 | 0101 |
| S^3 -> S^4, with G2 = (1,0,1) | 1 | 1101 |

The value 1101 follows from the transition equation. A version of the example
gives 1001 for this step, which does not agree with the same equation. The RTL
follows the equation. `tb_flam_lfsr` checks all four states.

## The arbiter PUF model

`apuf` evaluates the additive linear delay model:

```
Phi_l = prod_{i=l..N} (1 - 2 c_i)    (l = 1..N),  Phi_(N+1) = 1
Delta = sum_l w_l * Phi_l ;   r* = (Delta > 0)
```

Stage l is steered by challenge bit l-1, which is LFSR register a_(l-1).

- **Weights:** an instance's N+1 weights are Gaussian, with mean 0.1 and standard
  deviation 1. They are stored as integers scaled by 1000.
- **Instances:** the weights come from a fixed hash of the `SEED` parameter and the
  stage index (`flam_pkg::apuf_weight`). Two instances with different `SEED`s
  behave as two different chips.
- **Noise:** `NOISE_SIGMA` adds Gaussian arbiter noise, drawn again for each new
  challenge. The default of 0 makes every chip deterministic. `NOISE_SIGMA = 100`
  corresponds to noise with variance 0.01.

The model has no notion of when the race is launched. The response is valid in the
same clock cycle as its challenge. A silicon implementation needs an APUF macro
whose race resolves within one clock period, plus whatever launch-and-capture
timing that macro requires. That timing is outside this RTL.

Synthesis of `apuf.sv` produces adders and a weight memory. That netlist is
meaningless as hardware; the file exists only for simulation.

## Interface (`flam_puf`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | begin evaluating `challenge` (ignored while `busy`) |
| `challenge` | in | N | original challenge C; bit j loads register a_j |
| `busy` | out | 1 | evaluation running |
| `done` | out | 1 | one-clock pulse K+M clocks after the start cycle; `response` valid |
| `err` | out | 1 | one-clock pulse: all-zero challenge refused, nothing started |
| `response` | out | M | final response; bit b = r\*_(K+b); held until the next start |
| `r_out`, `r_valid` | out | 1 | the same bits serially, one per clock for i = K..K+M-1; `r_out` is 0 at all other times, so no direct response of the first confusion leaves the block |

| parameter | default | meaning |
|---|---|---|
| `N` | 128 | stages of APUF and LFSR (64 and 128 were evaluated originally) |
| `K` | N | cycle of the first final-response bit (must be >= N) |
| `M` | N | number of final-response bits (1 gives the single-bit variant) |
| `FB_POS` | 2 | feedback tap, between a_(FB_POS-1) and a_FB_POS |
| `G1` | only g_1 = 1 | first-confusion coefficients g_1..g_(N-1) |
| `SEED` | 1 | APUF instance (chip) identity |
| `NOISE_SIGMA` | 0 | arbiter noise, std. dev. in 1/1000 delay units |

`FB_POS = 2` and the single-tap `G1` come from the worked example. The original
description gives neither value for its 64- and 128-stage versions. Both are
public design constants, so choose them per product.

## Where this RTL departs from or fills in the original description

- **Response buffer and output register are flip-flops:** the N-1 bit buffer and
  the M-bit output register add 127 + 128 flip-flops at the defaults. The
  original gate count (129 flip-flops, about 1955 GE at 128 stages) covers only
  the LFSR and the arbiter. With the default outputs, this RTL has 395 flip-flops
  including the controller. If R is only needed serially, `r_out`/`r_valid` are
  enough and the output register can be removed.
- **Buffer contents:** the buffer holds r\*_1..r\*_(N-1). r\*_0 only drives the
  feedback tap. One summary of the flow speaks of n repetitions, while the
  detailed description says N-1 cycles; this RTL follows the detailed one.
- **Feedback during the secondary confusion:** the feedback cell stays active.
  The description states that the LFSR receives the response every cycle.
- **Own additions:** the all-zero refusal (`err`), ignoring `start` while busy, and
  the reset values are choices of this RTL. The original only states that the
  LFSR state must not be all zero.
- **Cycle count:** the original counts "cycles" without fixing their origin. Here,
  cycle i is the clock in which state S^i is applied to the APUF, and S^0 is
  loaded in the start cycle.

## Simulating

Everything runs with plain Verilator 5. Example for the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/flam_pkg.sv tb/tb_flam_ref_pkg.sv tb/tb_flam_puf.sv --top-module tb_flam_puf
./obj_dir/Vtb_flam_puf
```

Each testbench prints `TB_RESULT checks=<n> failures=<n>`. Each one also has a
watchdog that ends the run with a failure if it hangs.

| testbench | what it checks |
|---|---|
| `tb_flam_fb_module` | all 8 input combinations of the feedback cell |
| `tb_flam_lfsr` | the 4-stage worked example, and 2000 random steps of a 32-stage LFSR against the reference transition |
| `tb_flam_shift_buffer` | random shift/clear traffic at widths 7 and 1, including the look-ahead output |
| `tb_flam_ctrl` | every control output clock by clock, plus `done` latency, `err`, and start-while-busy |
| `tb_apuf` | 128- and 16-stage instances against a term-by-term evaluation of the delay model |
| `tb_flam_puf` | three reduced configurations (8/16/4 stages; 1-bit at N+1, 16 bits from 2N, 4 bits from N) |
| `tb_flam_puf_full` | the top at its defaults, 20 evaluations of 256 clocks each |
| `tb_flam_puf_metrics` | uniformity, uniqueness and reliability of 4 chips at 64 and at 128 stages |

- **Shared checker for the top:** `tb_flam_puf` and `tb_flam_puf_full` both use
  `tb_flam_puf_drv`.
- **What the checker compares:** every clock, the DUT's direct challenge is
  compared with the reference LFSR/APUF model in `tb_flam_ref_pkg`. It also checks
  the serial output, the final response, and that `done` arrives exactly K+M clocks
  after the start cycle.
- **Mechanism coverage:** a test fails if any of these never occurred:
  - inverting feedback and XOR feedback,
  - the G1-to-G2 switch, with a G2 that differs from G1,
  - the secondary confusion,
  - the all-zero refusal and start-while-busy.

## Quality figures from simulation

`tb_flam_puf_metrics` runs 200 random challenges on 4 model chips per size. Each
response has N bits.

| N | uniformity P1 per chip | uniqueness (mean inter-chip HD) | reliability, noise std. dev. 0.1 |
|---|---|---|---|
| 64 | 49.3 / 53.8 / 59.5 / 51.3 % | 50.0 % | 89.3 % |
| 128 | 45.2 / 52.7 / 49.7 / 52.2 % | 50.1 % | 82.6 % |

The original reports about 50% uniformity and uniqueness, and 95.6% / 96.6%
reliability. The reliability measured here is lower, for two reasons:

- A single flipped direct response changes every later LFSR state, so the figure
  is very sensitive to the noise model. Here every new challenge draws noise
  independently.
- Uniformity of a single chip depends on the chip's own bias term w_(N+1).

The resistance to machine-learning attacks evaluated originally cannot be
reproduced in RTL simulation, since it needs an ML toolchain and about 10^6 CRPs
per chip. The design itself can produce them, at 256 clocks per 128-bit response.
