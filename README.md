# Parallel LTE turbo decoder with tail-overlapped decoding

A turbo decoder alternates between two half iterations ("phases"): one
decodes the first constituent code in natural bit order, the other decodes the
second constituent code in interleaved order, and each feeds its extrinsic
information to the next. To reach high throughput the code block is cut into
sub-blocks that many soft-in soft-out (SISO) decoders process at the same
time. With sliding-window SISO decoders, every phase ends with a dead time:
the last window's backward recursion and output stage must finish, and the
next phase's first window must be read in, before new results appear. This
*phase-switching latency* (PSL) is a fixed cost per half iteration, so it
weighs more the more decoders share a code block.

This design is a 16-way parallel, radix-4, sliding-window max-log-MAP decoder
for LTE turbo codes (K up to 6144 bits). It runs in one of two modes chosen
per code block:

* **normal mode**: a phase starts only after the previous one has written
  back all its results, so each phase switch costs one PSL;
* **tail-overlapped decoding (TOD)**: the next phase starts reading right
  behind the previous one, while the previous phase's last window is still in
  its backward pass. The PSL disappears from every phase switch but the last.
  The price is that the first window of a phase may read a few extrinsic
  values that the previous phase has not yet rewritten; those reads return the
  older value.

| Parameter | Value |
|---|---|
| Maximum code length K | 6144 bits |
| Parallel SISO decoders P | 16 (fewer for short blocks, see below) |
| Sliding window L | 64 bits = 32 cycles |
| Bits decoded per cycle per decoder | 2 (radix-4) |
| Channel / extrinsic LLR width | 8 bits, two's complement, log P(1)/P(0) |
| State metric width | 16 bits |

## Block diagram

```
 host ──► main_ctrl ──► qpp_addr_gen (row + per-decoder column)
  │          │
  │  load    ▼ read rows (even, odd)
  └──────► input_memory ──► perm_gather ──┐
           eim (extrinsic) ─► perm_gather ─┼─► 16 x siso_decoder ─► perm_scatter ─► eim
                                            │      (border metrics exchanged
                                            │       between neighbours)
```

Files (all in `rtl/`):

| File | Role |
|---|---|
| `td_pkg.sv` | sizes, types, trellis and max-log-MAP functions |
| `turbo_decoder_top.sv` | top level, wiring |
| `main_ctrl.sv` | configuration, loading, phase sequencing (normal / TOD), read-out |
| `qpp_addr_gen.sv` | vectorised interleaver address generator |
| `input_memory.sv` | channel LLRs (systematic, parity 1, parity 2) |
| `eim.sv` | extrinsic information memory with its write-enable control |
| `perm_gather.sv` | interleaver network, memory row → decoders |
| `perm_scatter.sv` | de-interleaver network, decoders → memory row |
| `siso_decoder.sv` | radix-4 sliding-window SISO decoder |

## Memory organisation and the interleaver

The code block is split into P sub-blocks of M = K/P bits; decoder j owns bits
j·M … j·M+M−1. Both memories store bit i in **row i mod M, column i div M**, so a
row holds the values of all sub-blocks at the same offset. In the natural
phase all decoders read row t at step t, each its own column.

The LTE interleaver is the quadratic permutation polynomial
pi(i) = (f1·i + f2·i²) mod K. For any P that divides K it is contention-free
in a very strong sense: pi(t + j·M) mod M is the same for every j. So at
interleaved step t all decoders again need **one row**, pi(t) mod M, and only
the columns pi(t + j·M) div M differ, and they form a permutation. One row read
per step serves all 16 decoders, and the interleaver network is a column
crossbar (`perm_gather`), with its mirror image (`perm_scatter`) on the write
side.

`qpp_addr_gen` produces these (row, column) pairs without dividing while it
runs. It keeps pi and its first difference g(i) = pi(i+1) − pi(i) in mixed
radix (column, row): adding two such numbers is a row addition with a
carry into a column addition, and the column wraps with a mask because P is a
power of two. Because g(t + j·M) mod M is also the same for every j, one row
adder chain is shared and only the 4-bit column adders are replicated per
decoder. Two steps (t, t+1) come out per cycle. The start values for the 16
sub-blocks are computed once per code block with divisions, one decoder per
cycle (16 cycles).

A radix-4 cycle handles steps t and t+1, which have opposite parity. Since
f1 is odd and f2 even for every LTE code length, pi preserves parity, and M is
even; so in both phases one step's row is even and the other's odd. Each
memory is therefore split into an even-row and an odd-row bank and each
cycle reads one row from each.

The extrinsic memory holds, per bit, the 8-bit extrinsic LLR and the hard
decision of the latest phase. Decoding reads an even and an odd row and, in
the same cycle, writes an even and an odd row (results of an earlier window):
each bank has one read and one write port. The write-enable logic turns the
de-interleaver's column hits into column enables, and during loading enables
a single column to clear the entry. Decoding is done in place: a phase reads
the a priori value of bit i and later overwrites it with its own extrinsic
value for bit i.

## The SISO decoder and its window schedule

This is the part that decides the timing of everything else.

Each cycle a decoder receives one pair of trellis steps (systematic, parity and
a priori LLR for an even and an odd bit). The **forward unit** runs the alpha
recursion two steps per cycle (two radix-2 add-compare-select stages in
series, which is exactly radix-4 under max-log-MAP) and writes the two alpha
vectors and the six LLRs of the pair into a window buffer. After 32 pairs
(one 64-bit window), or at the last pair of the phase, the window is closed
and handed to the **backward unit**, and the forward unit moves on to the
other of the two window buffers.

The backward unit reads the closed window from its last pair to its first,
runs the beta recursion two steps per cycle and, with the stored alphas,
forms two extrinsic LLRs per cycle:

    Le(k) = max over u=1 branches (alpha_k(s) + p·Lp + beta_k+1(s'))
          − max over u=0 branches (alpha_k(s) + p·Lp + beta_k+1(s'))

(the systematic and a priori terms cancel). The hard decision is the sign of
Le + Ls + La. Outputs leave in reverse order within a window and carry the
address tag that came in with the pair, so the write-back needs no address
generator of its own. Metrics are normalised every cycle by subtracting the
metric of state 0.

Timing per window: the backward pass of window w starts the cycle after its
last input and overlaps the forward pass of window w+1; its first output is
registered one cycle later. A phase therefore drains W + 3 cycles after its
last read (W = 32, or the phase length if that is shorter): this is the PSL of
this design, T + 3 with T = L/2 = 32 cycles per window.

**Border metrics.** The forward recursion of the first sub-block starts in
state 0. Every other sub-block starts from the final alpha that its left
neighbour computed in the same phase one iteration earlier. The backward
recursion of a window starts from the beta that this decoder stored at the
start of the following window one iteration earlier. The last window uses
the right neighbour's stored start beta, which the neighbour has already
refreshed earlier in the same phase, since every sub-block has at least two
windows. All stores start uniform (zero) for a new code block. The last
sub-block ends with uniform metrics: termination (tail) bits are not used.

**Window buffer stall.** With two buffers, a new window may only start in a
buffer whose previous window has finished its backward pass. With full
windows this is always so, just in time; `bank_free_next` tells the
controller one cycle ahead. When a phase ends in a short window (M/2 not a
multiple of 32, e.g. K = 160) and the next window is a full one, reading
stalls until the buffer frees. For K = 6144 (six full windows per decoder)
there is no stall.

## Controller: loading, phases, parallel factor

`main_ctrl` runs configuration → interleaver setup → load → decode → read-out.

* **Parallel factor.** P is the largest of 16, 8, 4, 2, 1 that divides K and
  leaves every decoder at least two windows (K/P ≥ 128); otherwise 1. So
  K ≥ 2048 uses all 16 decoders, K = 1024 uses 8, K = 512 uses 4. Unused
  decoders still compute but their outputs are masked in the de-interleaver.
* **Issue.** Each phase issues M/2 reads, one per cycle, all decoders in lock
  step. Memory reads take one cycle; the decoder control signals are delayed
  to match. Interleaved phases take rows and columns from `qpp_addr_gen`;
  natural phases use a counter.
* **Mode.** In normal mode the controller waits after a phase until no
  decoder is busy and no read is in flight. In TOD mode the first read of the
  next phase follows the last read of the previous one in the next cycle.
* **Read-out.** After 2·n_iter phases and the final drain, the hard decisions
  are read from the extrinsic memory in natural order, one per cycle.

Decode time, from the first read to the last write-back (W as above):

    normal: 2·n_iter·(M/2 + W + 3) − 1 cycles
    TOD:    n_iter·M + stalls + W + 2 cycles

For K = 6144 and 3 iterations this is 1361 against 1186 cycles. Per half
iteration, the TOD saving is 35 of 227 cycles. Since each iteration
takes about M = 384 cycles in TOD mode, the throughput at clock f is about
6144·f / (384·n_iter).

## Host interface (`turbo_decoder_top`)

1. Pulse `cfg_start` with `cfg_k`, `cfg_f1`, `cfg_f2` (the LTE interleaver
   coefficients for that K, e.g. 263/480 for 6144, 31/64 for 1024, 3/10 for
   40), `cfg_n_iter` (1–15) and `cfg_tod`.
2. After about 20 cycles `in_ready` rises. Send K triples `in_sys`, `in_p1`,
   `in_p2` in natural order with `in_valid` (one per cycle while `in_ready`).
   LLRs are log P(1)/P(0). The second parity is the one the second encoder
   produced at interleaved position i.
3. Decoded bits appear on `out_bit` with `out_valid`, in natural order.
   `done` pulses with the last bit. `busy` is high from configuration to
   `done`. `stall` marks cycles in which a read waits for a window buffer.

The block length must be an LTE code length (a multiple of 8 between 40 and
6144). Reset is asynchronous and active low. The memories are not reset; the
extrinsic memory is cleared entry by entry during loading.

## What departs from the reference architecture, and what is open

* **Extrinsic memory banking.** The reference architecture builds the
  extrinsic memory from four single-port banks, with a controller that
  classifies every access into one of four types so that reads and writes
  never collide, in both modes. That bank mapping is not reproduced here.
  This design uses two banks (even/odd rows), each with one read and one
  write port. The function is the same, but the memory macros are more
  expensive.
* **Pipeline depth.** The reference SISO has a 16-cycle miscellaneous
  pipeline delay, so its PSL is 32 + 16 = 48 cycles. With that PSL the TOD
  gain for K = 6144 and 16 decoders is 16·(64+32)/6144 = 25%. This design's
  backward stage is a single long combinational path (two ACS stages and two
  LLR max trees) with a 3-cycle drain, so its PSL is 35 cycles and the TOD
  gain is smaller (about 18% per half iteration). Reaching a high clock rate
  would need pipelining here, which would move the numbers toward the
  reference.
* **Algorithm details chosen here.** The following are this design's own
  choices:
  * max-log-MAP without correction term or extrinsic scaling;
  * 8-bit LLRs and 16-bit metrics;
  * the border-metric scheme above;
  * no trellis termination;
  * f1/f2 supplied by the host, with no table of all 188 LTE code lengths;
  * the host interface.
* **Not built.** Only the LTE (QPP) interleaver is supported. HSDPA code
  blocks need a different, not contention-free interleaver and are not
  supported. The multi-processor (ASIP) network-on-chip variant, with its
  routers, pipeline registers and arbitration modules, is not part of this
  design.
* **Error-rate performance** has only been sampled, not measured as BER
  curves. `tb_tod_ber` decodes the same noisy K = 6144 blocks in both modes
  (4 iterations, bounded uniform noise). At noise that flips about one
  systematic bit in five, both modes correct every bit. At a slightly higher
  level, at the edge of what the decoder corrects, the overlapped mode leaves
  noticeably more residual errors (in three seeds, 718 against 554, 919 against 882 and 372 against
  298 residual errors over three blocks; the noise follows the simulator seed). The
  cause is the stale reads at phase switches: a stale value is the decoder's
  own extrinsic output from two phases earlier. Ordering the first window's
  reads to avoid the rows still being written would reduce this; that is not
  done here.

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| Testbench | What it checks |
|---|---|
| `tb_siso_decoder` | every extrinsic LLR, hard decision and tag against an independent integer max-log-MAP model of the same window schedule, over three back-to-back phases (including border-store reuse across iterations), plus window-buffer stall and drain latency |
| `tb_qpp_addr_gen` | (column·M + row) = pi(t + j·M) for every step and decoder, K = 6144/P = 16, 1024/8, 40/1; setup time |
| `tb_input_memory`, `tb_eim` | reads against a model after full fills, random column enables, read and write of one bank in one cycle |
| `tb_perm_gather`, `tb_perm_scatter` | random permutations, masked decoders |
| `tb_main_ctrl` | parallel factor for seven code lengths, load and read-out addresses, rows per phase, normal-mode wait vs TOD back-to-back issue, stall |
| `tb_tod_ber` | normal vs overlapped mode on identical noisy K = 6144 blocks: both must correct nearly everything, and overlapped mode may leave at most 25% (+5) more errors; a harder noise level is reported only |
| `tb_turbo_decoder_top` | end to end at the default parameters. The testbench has its own LTE encoder, adds noise and decodes K = 40, 160, 1024, 2048 and 6144 in both modes (the channel flips about one systematic bit in seven; all must be corrected), checking every bit and the cycle formulas above. It also counts normal and overlapped phase switches, stalls and each parallel factor used (16, 8, 1). |

To run one with Verilator (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl rtl/td_pkg.sv rtl/*.sv \
    tb/tb_turbo_decoder_top.sv --top-module tb_turbo_decoder_top -Mdir obj
./obj/Vtb_turbo_decoder_top
```

The full end-to-end test runs in well under a second of simulation time.
Lint with `verilator --lint-only -Wall -Irtl rtl/td_pkg.sv rtl/<file>.sv`.
The remaining lint warnings are unused package constants, the reset used by
both the flops and the assertions, and address bit 0 that only selects a bank.
