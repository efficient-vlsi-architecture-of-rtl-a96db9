# LTE turbo encoder and iterative max-log-MAP turbo decoder

LTE protects its data channels with a rate-1/3 turbo code. Two copies of a
small 8-state recursive convolutional encoder are used. The first encodes the
information block in its natural order. The second encodes the same block
after a fixed permutation, the interleaver. The receiver runs two soft-in
soft-out MAP decoders, one for each encoder. They take turns, and each passes
its extrinsic information (how much its own code says about each bit) to the
other. Every exchange sharpens the bit estimates. After a fixed number of
iterations the signs of the a-posteriori LLRs are the decoded bits.

This RTL implements both ends of the link:

* `turbo_encoder`: block buffer, QPP interleaver, two constituent encoders and
  trellis termination. One bit step per clock.
* `turbo_decoder`: channel buffers, two max-log-MAP decoders, interleaved and
  de-interleaved exchange of extrinsic values, and an output FIFO.
* `turbo_codec_top`: puts both side by side on one clock. The channel between
  them is outside the chip.

The block size K is chosen at run time, block by block, from 40 up to
`KMAX` = 6144 (the largest LTE block). The QPP coefficients f1 and f2 of the
block arrive with the data.

The architecture follows a published description of an LTE turbo decoder:

* the encoder of the LTE standard, including its polynomials and the
  termination switch;
* the two-MAP-decoder loop, with the interleaver and de-interleaver placed
  between the decoders;
* the split of each MAP decoder into branch metric routing (BMR), add-compare-
  select (ACS), forward/backward state metric units (FBSMU) and a decision
  unit;
* buffering of state metrics, and an output FIFO.

That description gives no block size, word width, iteration count, interleaver
formula or protocol. All of those are choices made here. They are listed under
"Choices and departures" below.

## The constituent code

Both encoders are the LTE recursive systematic code:

* feedback polynomial g0 = 1 + D^2 + D^3
* parity polynomial g1 = 1 + D + D^3

The register holds `{r1, r2, r3}`, where r1 is the newest bit. The same
packing is the state number in the decoder (`state[2] = r1`). For input u:

    a      = u ^ r2 ^ r3          (value entering the register)
    parity = a ^ r1 ^ r3
    next   = {a, r1, r2}

Termination puts the input switch in its second position. The encoder input
then equals the feedback `r2 ^ r3`, so `a = 0`, and after three steps the
register is back at zero. The bits sent during those three steps are the
tail. Each encoder sends 3 systematic and 3 parity tail bits.

`trellis_gen` is this step as a combinational block, with the polynomials as
parameters. `rsc_encoder` uses one instance for its register. Each MAP decoder
uses 16 instances (8 states × 2 inputs) to build its next-state and parity
tables. These tables reduce to constants in synthesis.

## The interleaver

LTE uses a quadratic permutation polynomial:

    pi(i) = (f1*i + f2*i^2) mod K

f1 and f2 come from the LTE table for each K. Examples: K = 40 uses (3, 10);
K = 6144 uses (263, 480).

`qpp_interleaver` needs no multiplier. It keeps the difference
`g(i) = pi(i+1) - pi(i) = f1 + f2*(2i+1)` in a register. Each step is then
two modular additions, and each addition is an add with a conditional
subtraction of K:

    pi(i+1) = (pi(i) + g(i)) mod K
    g(i+1)  = (g(i) + 2*f2) mod K

`start` loads pi(0) = 0. `advance` steps to the next index. Both f1 and f2
must be below K, which holds for every LTE table entry.

The encoder uses one generator to read c'(k) = c(pi(k)) from its block buffer.
The decoder uses two:

* the *interleaver* generates the read addresses for decoder 2's inputs;
* the *de-interleaver* generates the write addresses for decoder 2's outputs.

## Encoder: interface and timing

`turbo_encoder` has these ports:

* inputs: `clock`, `reset` (asynchronous), `srst` (synchronous), `bit_in`,
  `valid_in`, `frm_end_i`, `f1`, `f2`;
* outputs: `in_ready`, `valid_out`, `x_out`, `z_out`, `z2_out`, `x2_out`,
  `tail_out`, `frm_end_o`.

1. While `in_ready` is high, bits are written to the block buffer. The bit
   sent with `frm_end_i` is the last one, and the count of bits sent gives K.
   A block that reaches KMAX bits is cut there.
2. The block is encoded at one step per clock. The first output is valid 2
   cycles after the clock edge that took the last bit. Data step k carries
   `x_out = c(k)`, `z_out = z(k)` and `z2_out = z'(k)`.
3. The three tail steps follow with `tail_out = 1`. Each carries the tail of
   both encoders: `x_out` and `z_out` for encoder 1, `x2_out` and `z2_out` for
   encoder 2. `frm_end_o` marks the last tail step.

`valid_out` stays high for K+3 consecutive cycles. No bits are accepted until
the last tail step has left. Hold `f1` and `f2` from `frm_end_i` until the
first output.

An assertion checks that both encoders are in state 0 after every tail.

## Decoder

### Input

The decoder takes K+3 steps of 3-bit soft symbols, one step per cycle while
`in_ready` is high:

* data steps carry `sym_x`, `sym_z1` and `sym_z2`;
* the last 3 steps carry the tails: `sym_x` and `sym_z1` for encoder 1,
  `sym_x2` and `sym_z2` for encoder 2.

The steps come in the order the encoder sends them. `frm_end_i` marks the
last step, so K is the frame length minus 3. `f1` and `f2` are sampled with
the first step.

K must lie between 1 and `KMAX`, and f1 and f2 must be the pair for that K.
An assertion flags a frame too short to hold a data step. The MAP decoders
assert that a block is started only while they are idle.

A soft symbol `s` runs from 0 (confident '0') to 7 (confident '1'). It is
turned into the channel LLR `L = 2s - 7`, which is odd, lies between -7 and
+7, and is positive for '1'.

The systematic and parity values are stored in `virtual_memory` buffers. Only
the last three `sym_x2` values are kept, in a 3-entry shift register, because
only the tail uses them.

### One iteration

There are two half iterations:

| half | decoder | systematic input | parity | a-priori input      | extrinsic output goes to |
|------|---------|------------------|--------|---------------------|--------------------------|
| 1    | MAP 1   | x(k)             | z(k)   | Le21(k), 0 in iteration 1 | Le12(k)            |
| 2    | MAP 2   | x(pi(k))         | z'(k)  | Le12(pi(k))         | Le21(pi(k))              |

During the tail steps the a-priori input is 0. MAP 2 takes encoder 2's tail
x' in place of x.

Le12 and Le21 are two memories of K extrinsic values each. The interleaver
generator supplies pi(k) as MAP 2 reads its inputs in order k = 0..K+2. MAP 2
produces its outputs in order k = 0..K-1. The de-interleaver generator is
restarted with it and supplies the write address pi(k) for each output.

In the last half iteration, MAP 2's hard decisions are also written to a bit
buffer at address pi(k). This puts them back in natural order. The buffer is
then copied into the output FIFO.

The decoder runs `N_ITER` full iterations (default 6). It does not stop
early.

### Inside a MAP decoder

Max-log-MAP needs three things for every trellis step k:

* the forward metrics alpha(k) of the 8 states;
* the backward metrics beta(k+1) of the 8 states;
* the branch metrics of step k.

Beta is computed from the end of the block, so the whole block is buffered.
`map_decoder` works in three passes, at one trellis step per clock:

1. **LOAD**: K+3 cycles. The channel values (Ls, Lp) and the a-priori value
   La of each step are written to the input buffer.
2. **BWD**: K+3 cycles, for k = K+2 down to 0. The backward `fbsmu` starts in
   state 0, because the trellis is terminated. Each cycle it reads step k and
   computes beta(k). Before each step it stores beta(k+1) at address k, for
   k < K, in the state metric buffer (96 bits × KMAX).
3. **FWD**: K cycles, for k = 0 to K-1. The forward `fbsmu` starts in state 0.
   The `decision_unit` combines alpha(k), the branch metrics of step k and the
   stored beta(k+1). Its result is registered and leaves as `out_valid`,
   `out_idx`, `out_llr`, `out_ext` and `out_hard`.

A single `bmr` feeds both passes. In each BWD and FWD cycle one step is read
from the input buffer. The `bmr` turns it into the four branch metrics, which
are registered. The state metric units and the decision unit use that step in
the next cycle:

    bm[{u,p}] = u*(Ls + La) + p*Lp

This differs from the symmetric form ±(Ls+La)/2 ± Lp/2 only by a constant per
step. Max-log-MAP cancels that constant.

Each `fbsmu` holds 8 state metrics. One `acs` per state adds the branch
metrics to the two candidates, subtracts the two sums and lets the sign select
the larger. The update rules are:

* backward: `beta(k,s) = max over u of beta(k+1, next(s,u)) + bm[{u, par(s,u)}]`
* forward: the two predecessors of s' = {a, r1, r2} are {r1, r2, 0} and
  {r1, r2, 1}; the input bit of each branch is read from the next-state table.

After each step, the metric of state 0 is subtracted from all eight. This
keeps the register small without changing any difference between states.

The decision unit finds the largest `alpha + bm + beta` over the eight u = 1
branches and over the eight u = 0 branches. Their difference is the
a-posteriori LLR (positive means '1'). The extrinsic value is that LLR minus
Ls and La, saturated to ±127.

With continuous input, `done` comes 3K+8 cycles after `start` is sampled.

### Fixed point

| quantity              | format          | why it is wide enough |
|-----------------------|-----------------|-----------------------|
| soft symbol           | 3-bit unsigned  | input format |
| channel LLR           | 4-bit signed    | ±7 |
| extrinsic / a-priori  | 8-bit signed, saturated at ±127 | |
| branch metric         | 10-bit signed   | at most 7 + 127 + 7 = 141 in magnitude |
| state metric          | 12-bit signed   | states differ by at most 3 × 141 = 423; unreachable start states get -1024; the ACS subtractor is 13 bits |
| a-posteriori LLR      | 16-bit signed   | sum of two state metrics and a branch metric |

Any start metric far enough below the others gives the same result as minus
infinity. The MAP testbench checks this: the outputs match, bit for bit, a
plain-integer reference that starts from minus infinity.

### Output

The decoded bits leave through a 16-entry first-word-fall-through FIFO
(`sync_fifo`):

* `bit_out` is valid while `valid_out` is high;
* a bit is taken in each cycle in which `ready_out` is also high;
* `frm_end_o` marks the last bit of the block.

While the FIFO is full the decoder waits, so no bit is lost. `fifo_error` is a
sticky flag. It rises if the FIFO is pushed while full or popped while empty,
which the decoder's own control never does.

### Timing

Measured from the cycle of the last input step to the first valid decoded
bit, the latency is:

    N_ITER * (6K + 18) + 2 cycles

For example, with K = 40 and 6 iterations it is 1550 cycles, and with
K = 6144 it is 221 294 cycles. Each half iteration takes 3K + 9 cycles.

A block occupies the decoder for about (K+3) + N_ITER·(6K+18) + K cycles,
which is about 38 cycles per bit at K = 6144 with 6 iterations. A new block is
accepted only after the previous one has left.

## Top level

`turbo_codec_top` has parameters `KMAX` (6144) and `N_ITER` (6). It has one
clock (`clk`), an asynchronous `reset` and a synchronous `srst`. The
encoder's ports carry the prefix `enc_`, and the decoder's carry `dec_`. The
decoder's ports group as follows:

* `dec_sym_x/z1/z2/x2` are the 3-bit soft symbols;
* `dec_f1` and `dec_f2` are the QPP coefficients;
* `dec_bit_out`, `dec_valid_out`, `dec_ready_out` and `dec_frm_end_o` form the
  output;
* `dec_in_ready`, `dec_busy` and `dec_fifo_error` are status outputs.

## Module map

    turbo_codec_top
    ├── turbo_encoder
    │   ├── qpp_interleaver
    │   └── rsc_encoder ×2 ── trellis_gen
    └── turbo_decoder
        ├── virtual_memory ×6   (x, z, z', Le12, Le21, decoded bits)
        ├── qpp_interleaver ×2  (interleaver, de-interleaver)
        ├── map_decoder ×2
        │   ├── trellis_gen ×16
        │   ├── virtual_memory ×2 (input steps, stored beta)
        │   ├── bmr
        │   ├── fbsmu ×2 (forward, backward) ── acs ×8 each
        │   └── decision_unit
        └── sync_fifo

`turbo_pkg` holds the polynomials, widths, types (`llr_t`, `ext_t`, `bm_t`,
`sm_t`, the metric vectors and trellis tables), `soft_to_llr` and the
saturation function. Each module is in `rtl/<module>.sv`.

## Simulation

Every block has a self-checking testbench in `tb/`. Each compares the block
with an independent model. `tb/tb_ref_pkg.sv` holds the reference code
equations, the interleaver formula and a xorshift random generator. Each
testbench ends by printing `TB_RESULT checks=N failures=M`. Example:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/turbo_pkg.sv tb/tb_ref_pkg.sv rtl/*.sv tb/tb_turbo_codec_top.sv \
        --top-module tb_turbo_codec_top -o sim
    ./obj_dir/sim

What the testbenches check:

| testbench | what it checks |
|---|---|
| `tb_turbo_codec_top` | Full chain at the default parameters (KMAX 6144, 6 iterations). Blocks of K = 40, 48, 1024 and 6144. Every encoded bit is checked against a reference encoder. The codeword then passes through a channel that replaces 12–20 % of the soft symbols with random values, and every decoded bit is checked. Also checks the latency formula, the half-iteration count, FIFO-full stalls with random `ready_out`, a block-size change, and `srst` in the middle of decoding. The K = 6144 block needs about 230 000 cycles, under a second of simulation. |
| `tb_turbo_decoder` | Decoder alone with KMAX 64 and 3 iterations: noiseless and noisy blocks, latency, output held off until the FIFO fills. |
| `tb_turbo_encoder` | Encoder alone with KMAX 64: four block sizes, output timing and no gaps, a cut over-long block. |
| `tb_map_decoder` | MAP decoder against a plain-integer max-log-MAP reference. Every output must match exactly. Also checks the 3K+8 cycle count and gaps in the input. |
| `tb_fbsmu`, `tb_acs`, `tb_bmr`, `tb_decision_unit`, `tb_trellis_gen` | Datapath units against direct formulas, over random and extreme values. |
| `tb_rsc_encoder`, `tb_qpp_interleaver` | Encoder step, termination to state 0, and the permutation for six LTE sizes up to 6144. |
| `tb_virtual_memory`, `tb_sync_fifo` | Memory, and FIFO ordering, flags, error flag and `srst`. |

The design does not rely on X propagation. Every register it reads is reset,
and every memory entry is written before it is read. A two-state simulator
that starts with random values therefore gives the same results as a
four-state one.

## Changing it

* **Block size**: `KMAX` sets every buffer. Smaller values save memory. A
  block of any size K ≤ KMAX, with the right f1/f2, needs no change.
* **Iterations**: `N_ITER`. The latency scales with it.
* **Word widths**: `turbo_pkg`. If branch metrics grow, keep state metrics at
  least about 2 bits wider than the largest spread, 3 × the branch metric
  range. `SM_NEG` must stay below minus that spread.
* **Other polynomials**: `trellis_gen` parameters. The forward state unit
  assumes a 3-bit shift-register trellis.

## Choices and departures

* **Max-log-MAP.** The decoder uses the max-log approximation of MAP. This is
  what the ACS structure (adders, a subtractor, a mux driven by its sign)
  computes. It has no correction term and does not scale the extrinsic
  values.
* **Whole-block schedule.** MAP decoding uses a full backward pass followed
  by a forward pass. There is no sliding window and there are no parallel
  sub-blocks, so throughput is low. At a 230 MHz clock, the rate reported for
  the original FPGA implementation and not verified for this RTL, the decoder
  delivers roughly 6 Mbit/s at K = 6144 with 6 iterations. That is far from LTE peak rates. Radix-4 trellis steps,
  parallel windows and early stopping are not implemented.
* **Critical path.** A pipeline register sits between the branch metric
  unit and the state metric units. The recursion loop is therefore one ACS
  plus the renormalising subtraction. That loop is the critical path,
  together with the asynchronous read of stored beta feeding the decision
  unit.
* **Asynchronous reads.** The memories are written with asynchronous reads,
  like FPGA distributed RAM. Mapping them to block RAM would need one cycle
  of read-ahead in each pass.
* **Parallel output.** The encoder sends x, z and z' in parallel, one step per
  clock, not serialized as x1 z1 z'1 x2 ….
* **Tail order.** Each tail step carries (x, z, x', z'). This is not the 3GPP
  arrangement of the 12 tail bits over the three output streams.
* **Unused ports.** The decoder has no puncturing-pattern input and no
  traceback-related ports (`tb_dir`, traceback error flags). The architecture
  description lists such ports, but nothing in its decoding scheme uses them.
* **One block at a time.** There is no double buffering. The encoder refuses
  bits while it encodes, and the decoder refuses symbols until the previous
  block has left.
* **3-bit soft symbols.** The soft-symbol coding, 0 to 7 with LLR = 2s - 7, is
  chosen here. Only the 3-bit width and the extreme values 000 and 111 come
  from the original description.
