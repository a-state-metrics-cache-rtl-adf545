# SISO decoder for double binary turbo codes with a compressed state metrics cache

A turbo decoder for the double binary convolutional turbo code (DB-CTC) of
WiMAX / IEEE 802.16m spends much of its power in the state metrics cache
(SMC): the memory that holds the eight forward state metrics of every
trellis step of a window until the backward pass needs them. With 10-bit
metrics that is 80 bits per step.

This design stores far less. After each forward step the eight metrics are
sorted; the cache keeps only

* the **index sequence**: the eight state numbers ordered from the smallest
  metric to the largest (8 x 3 bits), and
* the **increase metric** `alpha_inc = (alpha_max - alpha_min) / 7` (6 bits).

In the backward pass the metrics are rebuilt as a straight line: the state
at position *r* of the sequence gets `r * alpha_inc`. The smallest metric
becomes 0, the largest `7 * alpha_inc`, and the ones between are spaced
evenly. Only the ordering of the states is exact; the spacing is an
approximation. Because every state metric in the log domain carries an
arbitrary common offset, losing `alpha_min` costs nothing. A cache word
shrinks from 80 to 30 bits, so the cache is 37.5 % of its usual size. The
approximation costs some error-rate performance. It is paired with a cheap
max* operator to keep that loss small.

The RTL in `rtl/` implements the SISO (soft-in soft-out) decoder built this
way, plus the constituent encoder of the code. For throughput, a frame is
cut into P independent windows of W trellis steps. All windows are decoded
at the same time, each by its own window decoder with its own cache. The
defaults are P = 20 and W = 20, so a frame of 400 bit pairs (800
information bits) is decoded in one half-iteration of 40 cycles.

## The simplified max* operator

All recursions use the log-domain max* = ln(e^x1 + e^x2). The design uses
the linear approximation

    max*(x1, x2) ~= max{ x1, x2, 0.25 x1 + 0.75 x2 + 0.5, 0.75 x1 + 0.25 x2 + 0.5 }

(`maxstar2`). The state recursions need it over 4 inputs and the LLRs need
it over 8. Nesting the two-input operator would cost 2 or 3 operator
delays. Instead, `maxstar_n` picks the largest and the second largest input
and applies the two-input operator to those two only. When the largest
value occurs twice, the second largest equals the largest.

## Number format

Every metric is a two's complement fixed-point number with **2 fractional
bits** (LSB = 0.25), so 0.25, 0.75 and 0.5 are exact. The 0.25/0.75
products round toward minus infinity.

| quantity | width | notes |
|---|---|---|
| channel LLR `Lc*y` (s1, s2, p1, p2) | 6 | input |
| a priori / extrinsic LLR (symbols 01, 10, 11) | 8 | symbol 00 is the reference, 0 |
| branch metric | 10 | |
| forward / backward state metric | 10 | normalised so the largest is 0, clipped at -512 |
| state index | 3 | |
| increase metric | 6 | unsigned, rounded, saturates at 63 (15.75) |
| regenerated forward metric | 9 | unsigned, 0 .. 7*63 |
| LLR-unit sums / a posteriori LLR | 14 / 16 | |

The state metric, index and increase-metric widths are the ones the cache
size of 30 bits per step is built on. All other widths are this design's
own choice. They are collected in `rtl/ctc_pkg.sv`.

## Code and trellis

The constituent encoder (`ctc_encoder`) has three delay cells D1, D2, D3
and takes a bit pair (A, B) per step:

    fb = A ^ B ^ D1 ^ D3
    D1' = fb,   D2' = D1 ^ B,   D3' = D2 ^ B
    Y = fb ^ D2 ^ D3,   W = fb ^ D3

The state number is {D1, D2, D3}, with D1 as the MSB. A symbol z = {B, A} is
numbered 00, 01, 10, 11: symbol 01 means A = 1. A is carried by systematic
channel s1, B by s2, Y by parity channel p1 and W by p2. Each of the 8
states has 4 outgoing and 4 incoming branches. A branch is fully described
by {z, W, Y}, so a trellis step has only 16 distinct branch metrics:

    gamma(z, W, Y) = A*L_s1 + B*L_s2 + Y*L_p1 + W*L_p2 + La(z)

This is the usual `Lc/2 * sum(x*y) + La` with x = +1/-1, minus a term that is
the same for all branches of the step. `ctc_pkg` holds `next_state`,
`prev_state` and `parity` as functions, and every datapath block wires its
trellis from them.

A positive LLR means "bit = 1". Extrinsic outputs follow

    Lex(z) = delta * (Lapo(z) - La(z) - Lin(z)),  Lin(01)=L_s1, Lin(10)=L_s2, Lin(11)=L_s1+L_s2

with delta = 0.85, realised as 109/128.

## The decoding window and its timing

Each of the P windows is an instance of `siso_window`. `siso_array` runs
them in lockstep: they share `start` and one pair of step addresses, and
each window has its own soft inputs, boundary metrics and outputs (arrays
indexed by window). An assertion checks that the windows stay in step.
The windows are independent and exchange no boundary metrics. Everything
below describes one window.

`siso_window` decodes W trellis steps (default W = 20) in two passes:

```
 forward pass, k = 1..W                    backward pass, k = W..1
 fwd_sym --> BMU_a --> forward recursion    bwd_sym --> BMU_b --> backward recursion
                        | alpha_{k-1}                     gamma_k |  beta_k
                        v                                         v
              compressing module --push--> LIFO SMC --pop--> regeneration --> LLR_apo --> LLR_ex --> out
```

* **Forward pass** (W cycles). In cycle k the alpha register holds
  alpha_{k-1}. `smc_compress` reduces it to a 30-bit word, which is pushed
  into `lifo_smc`. At the same time `fwd_recursion` computes alpha_k from
  the branch metrics of step k.
* **Backward pass** (W cycles). In cycle k (k = W down to 1) the LIFO top
  is the word of alpha_{k-1}. `smc_regen` turns it into alpha_hat_{k-1} in
  the same cycle (asynchronous read). `llr_apo` forms, for each symbol z,
  the 8-input max* of alpha_hat(s) + gamma_k + beta_k(next(s, z)), and
  subtracts the value for symbol 00. `llr_ext` removes the a priori and
  systematic parts and scales the result. `bwd_recursion` moves from beta_k
  to beta_{k-1}.

Soft inputs come from a memory outside the window. The window asks for step
`fwd_idx + 1` in the forward pass and step `bwd_idx + 1` in the backward
pass, and expects the data in the same cycle. The boundary metrics
alpha_0 and beta_W (`alpha_init`, `beta_init`) are sampled with `start`.
Use all zeros for an unknown state, or 0 for one state and -512 for the
others for a known one.

Counting clock edges from the edge that samples `start`:

| edges | activity |
|---|---|
| 1 .. W | forward steps, one push per edge |
| W+1 .. 2W | backward steps, one pop per edge |

The results of each backward step are registered. They appear after its
edge with `out_valid`, `out_idx = k-1`, `out_ex[3]` and `out_apo[3]`, in
the order k = W .. 1. The last result appears 2W edges after start. `done`
is high in the last backward cycle. A new window can start one cycle
later. The two passes of consecutive windows do not overlap.

`smc_full` is high while the cache holds a whole window. `inc_sat` marks a
forward cycle whose increase metric was clipped at 63. This happens when
the spread of the forward metrics exceeds about 111 (in real units), for
example right after a known-state start.

## Blocks

| module | role |
|---|---|
| `ctc_pkg` | widths, types (`sym_in_t`, `smc_word_t`), trellis functions |
| `maxstar2`, `maxstar_n` | two-input linear max*, and the n-input version built on the two largest inputs |
| `bmu` | 16 branch metrics of a step; two instances (BMU_alpha, BMU_beta) |
| `sm_normalize` | shifts 8 metrics so the largest is 0, clips at -512 |
| `fwd_recursion`, `bwd_recursion` | 8 x 4-input max* state recursions with register, `load` and `step` |
| `smc_compress` | 28-comparator rank network -> index sequence, min, max, `alpha_inc` |
| `lifo_smc` | W x 30-bit stack, asynchronous top read, overflow/underflow assertions |
| `smc_regen` | 7-adder chain (r * alpha_inc) and rearrange by the index sequence |
| `llr_apo` | four 8-input max* and the differences to symbol 00 |
| `llr_ext` | extrinsic information, scaling by delta, 8-bit saturation |
| `siso_ctrl` | IDLE / FWD / BWD sequencer and step addresses |
| `siso_window` | the window above |
| `siso_array` | P windows in lockstep, with shared addressing |
| `dbctc_top` | encoder and the P-window decoder side by side, sharing only clock and reset |

Ties in the sorting network go to the lower state number. The division by 7
rounds to nearest. All registers have a synchronous active-high reset `rst`.

## Where this departs from, or goes beyond, the method it implements

* The method fixes the 10-bit metrics, 3-bit indices, 6-bit increase metric,
  W = 20 and delta = 0.85. The fixed-point format, the normalisation, the
  rounding and saturation rules and all interfaces are choices made here.
* The increase metric uses the state metrics' own LSB (0.25), so it
  saturates for spreads above 63 LSB x 7. A coarser LSB for `alpha_inc`
  would avoid this at the cost of resolution. This has not been evaluated
  for error rate.
* The LLR of step k uses beta_k, the register value, as the MAP equations
  require. The block diagram of the method labels that path beta_{k-1}.
* The "recursive addition" of the regeneration is unrolled into an adder
  chain, so a cache word is regenerated every cycle.
* The encoder's tap positions are read from its block diagram and agree
  with the 802.16 constituent code. The interleaver is not included
  (its rule belongs to the standard).
* Not built: the CTC interleaver and the C1/C2 switch, the received-bit and
  extrinsic memories, and the iteration control that alternates the two
  constituent decodings. `dbctc_top` therefore performs one half-iteration
  over a frame, not a complete turbo decoding. The error-rate curves of the
  full iterative decoder (eight iterations) cannot be reproduced with it.

After synthesis each window's cache is 600 bits for W = 20, which is the
30 x W this method gives.

## Verification

Every block has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M`. Most compare against
`tb/tb_model_pkg.sv`, an integer reference model written separately from
the RTL. The model derives its trellis by running the encoder equations
and sorts with a bubble sort rather than rank counting. Outputs must match
it bit for bit. The compressing and regeneration tests also check a
hand-worked example: the metrics 13.26 12.59 10.56 10.29 14.21 10.79 11.24
11.1, in quarter steps, give the sequence 3 2 5 7 6 1 0 4.

* `tb_dbctc_top`: three frames of 20 parallel windows at the defaults
  (P = 20, W = 20) through the top. It checks the encoder output, every
  LLR of every window, the output order, the 2W latency, and error-free
  decisions for noiseless windows. It also requires that
  increase-metric saturation, a full cache, the max* correction term,
  extrinsic saturation, a priori input and known-state starts all occur.
* `tb_frame_workload`: an 800-bit frame (400 bit pairs) over an AWGN
  channel at Eb/N0 = 3 dB, decoded by the 20 parallel windows in one
  40-cycle pass. LLRs are checked against the model, and the decoded bit
  errors must be fewer than the raw channel errors (59 raw errors fall to
  15 with the default seed).
* `tb_siso_array` (P = 4, W = 8) and `tb_siso_window` (W = 8): the array
  and a single window on their own.
* Unit tests for every other module.

Run a testbench with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ctc_pkg.sv tb/tb_model_pkg.sv tb/tb_dbctc_top.sv --top-module tb_dbctc_top
./obj_dir/Vtb_dbctc_top
```

Each testbench runs in well under a second.

## Changing it

* Window length and window count: parameters `W` and `P` of `dbctc_top` /
  `siso_array` (`W` also on `siso_window`). The cache depth follows `W`.
* Extrinsic scaling: `DELTA_NUM / 2^DELTA_SH` on `siso_window` and `siso_array`.
* Widths: `ctc_pkg`. `SM_W`, `INC_W` and `FRAC` are read by every block.
  After changing them, adjust the matching constants of the reference model
  (`SM_FLOOR`, the saturation of the increase metric, the +2 in `ms2`).
