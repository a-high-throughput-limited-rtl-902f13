# Path-parallel SPEC-T decoder for a memory-19 convolutional code

A Viterbi decoder for a code with encoder memory 19 would need 2^19 states.
Breadth-first limited-search decoders such as the T-algorithm keep only
the paths whose metric lies within a threshold T of the best one. They
need only a few tens of paths and do less work when the channel is clean.
Two things normally keep them slow in hardware. Finding the best metric
at every trellis depth is a serial search. And the set of surviving
paths changes from depth to depth, so the path storage has no fixed
access pattern.

This RTL implements a path-parallel decoder that removes both problems.
It follows the SPEC-T architecture (T. Zhang, *A High Throughput Limited
Search Trellis Decoder for Convolutional Code Decoding*):

* **Speculated best metric, corrected late.** The decoder does not search
  for the best metric. It assumes the best path followed the hard decision
  of each received pair. Every v depths, a separate correction module finds
  the true best of a v-depth-old snapshot and sends the error E back.
* **Token-bus re-distribution.** Each of M processing elements (PEs) owns
  a path register array (PD) that holds one survivor. After extension, a
  PD may hold zero, one or two survivors. Two tokens ripple along the PDs
  and move each surplus path into an empty PD over one shared bus, one path
  per cycle.

The default configuration is M = 64 survivors, v = 4, T = 8 and R = 1,
for the rate-1/2 systematic ODP code with generators (2000000, 7144761)
in octal.

## Metric arithmetic: distances instead of metrics

The path metric is the BPSK correlation, where larger is better. The
hardware never stores a metric. Each path stores its distance from the
speculated best metric:

    D = speculated_best - path_metric          (always >= 0)

The speculated best grows by the best branch metric of each input. That
branch is the one matching the hard decision. So a path's D grows by
exactly what its own branch loses against that branch: **2·|r| for every
coded bit that disagrees with the sign of its sample**, and nothing
otherwise. The decoder needs no adders for absolute metrics, no
normalisation and no signed arithmetic. The path purge is one compare,
D > T.

Every v-th depth the correction E is subtracted, floored at 0. E is the
minimum D of the snapshot taken v depths earlier. Because D only grows
between corrections, subtracting E brings the best path of that older
snapshot back to D = 0.

Number formats (`spect_pkg`):

| item | format |
|---|---|
| soft input `r0`, `r1` | 5-bit signed, 4 LSB per unit of received amplitude (±1.0 reads as ±4), saturated to −16…15 |
| BPSK mapping | bit 0 → +1, bit 1 → −1; a hard decision is the sign bit |
| distance D | 10-bit unsigned, saturating; T and R are given in amplitude units and shifted left by 2 |
| path history | 64 information bits per path, newest in bit 0; the newest 19 are the encoder state |
| parity | `p = XOR_j g_j·u[n−j]` with `G_PARITY = 20'hCC9F1`, bit 19 = coefficient of D^0 |

The parity generator is 7144761 in octal. That value has 21 significant
bits, but a memory-19 polynomial has only 20 coefficients. The design uses
the low 20 bits (octal 3144761), whose two end taps are both 1. If your
reference encoder reads the octal value differently, change `G_PARITY`.

## One trellis depth, cycle by cycle

`spect_decoding_module` does one of the following things in each clock
cycle. They are listed in priority order.

1. **Broadcast-receive** (`ev_xfer`). This happens when some PD is
   congested and some PD is empty. The first congested PD drives its second
   path onto the bus, and the first empty PD loads it.
2. **Overflow re-purge** (`ev_overflow`). This happens when a congested PD
   remains but no empty PD is left, meaning more than M paths survive. R is
   added to every stored D, as if the speculated best metric were raised by
   R. Every path whose D now exceeds T is dropped. Re-distribution then
   continues. This gives the same survivor set as repeating the depth with
   the shifted metric, but it takes one cycle and needs no copy of the
   previous depth.
3. **Truncation** (`ev_trunc`). This is a fallback for an overflow in which
   the re-purge would drop every path, because all contenders lie within R
   of T. Instead, every PD that is still congested drops its second path.
4. **Extension** (`ev_depth`). This happens when no PD is congested, an
   input pair is buffered and E is available if needed. All M PEs extend
   their survivor by bit 0 and by bit 1 at once. They charge the
   hard-decision penalties, subtract E on every v-th depth, and purge
   children with D > T. Each PD stores both children. On every v-th depth
   all 2M children go to the correction module as a snapshot.
5. **Underflow retry** (`ev_underflow`). This happens when extension would
   leave no child at all. The speculation is corrected only every v depths,
   so a burst of noise can push every path past T. R is subtracted from the
   parents' D, and the same depth is tried again next cycle.
6. **Wait for E** (`ev_wait_e`). The correction module has not delivered E
   yet. With the built-in correction module this cannot happen, because its
   search takes exactly v cycles and v depths take at least v cycles. The
   stall is kept for other correction implementations.

A depth therefore costs 1 cycle, plus one cycle per broadcast-receive, per
overflow cycle and per underflow retry. Most depths have no overflow or
underflow. The broadcast-receive count equals the number of survivors
whose two children both survive.

## The token bus

`spect_token_bus` implements the two tokens as ripple chains running from
PD 0 to PD M−1:

* the broadcasting token BT passes carefree and empty PDs and stops at the
  first congested one;
* the receiving token RT passes carefree and congested PDs and stops at the
  first empty one.

After a transfer, both PDs become carefree. On the next cycle the chains
settle one position further on. If BT runs off the end, re-distribution is
complete. If RT runs off the end while BT is still held, that is an
overflow. If both run off together, the number of surplus paths exactly
matched the number of empty PDs, which is not an overflow. A PD never holds
more than two paths, because each survivor of a rate-1/2 code has two
children. So a congested PD always gives away exactly one path.

In the original architecture, re-distribution may run on a faster clock
than the PEs. Here everything runs on one clock, and the PEs are idle
during re-distribution cycles. The measured number of transfers per depth
(below) shows what a faster clock would save.

## Lagged correction and output

`spect_correction` receives each snapshot: valid flag, D, and the v oldest
history bits of each of the 2M children. It searches for the minimum D in
v steps, comparing 2M/v entries per cycle. Its speed therefore matches the
decoding module's rate of one snapshot per v depths. On the last step it
forwards E combinationally, so E is ready exactly v cycles after the
snapshot. One cycle later it emits the v bits of the first entry that has
the minimum D:

* `out_bits[0]` is the oldest bit;
* the block covers frame depths `out_block·v+1 … out_block·v+v`.

The decoding delay is 64 depths, which is the path length. Output starts
with the 16th snapshot. To get all N bits of a frame out, feed N + 64 input
pairs: the encoder's zero tail plus more zeros. The last block then covers
the first tail bits.

The T-algorithm also purges paths that disagree with the released output
bits. The SPEC-T decoding module purges only on the speculated metric, and
so does this RTL.

## Interface of `spect_decoder`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `start` | in | 1 | one-cycle pulse before a frame: one all-zero path with D = 0, depth 0 |
| `in_valid`, `in_ready`, `in_r0`, `in_r1` | in/out/in/in | 1,1,5,5 | soft pair per depth (systematic, parity); one-entry input buffer |
| `out_valid`, `out_bits`, `out_block` | out | 1, v, 16 | v decoded bits per pulse |
| `ev_depth`, `ev_xfer`, `ev_overflow`, `ev_trunc`, `ev_underflow`, `ev_wait_e` | out | 1 each | what the coming clock edge does |
| `survivors` | out | ⌈log2(M+1)⌉ | non-empty PDs; at an `ev_depth` cycle, the number of survivors of the previous depth |

Parameters: `M` (64), `V` (4), `T` (8), `R` (1) and `BLK_W` (16), with T
and R in amplitude units. `PATH_LEN` (64), the soft-input width and the
generator are package constants. `PATH_LEN` must be a multiple of V and
larger than 19 + V. M·2 must be a multiple of V.

## Files

| file | content |
|---|---|
| `rtl/spect_pkg.sv` | code, formats, path type, parity and penalty functions |
| `rtl/spect_pe.sv` | PE: two-way extension, penalties, correction, purge (combinational) |
| `rtl/spect_pd.sv` | PD: two path slots, category flags, bus send/receive, re-purge, truncation, relief |
| `rtl/spect_token_bus.sv` | BT/RT ripple chains, data bus, done / overflow detection |
| `rtl/spect_decoding_module.sv` | M PE/PD slices, token bus, input buffer, depth control, snapshot |
| `rtl/spect_correction.sv` | v-step minimum search, E return, output blocks |
| `rtl/spect_decoder.sv` | top: decoding module + correction module |
| `tb/spect_ref_pkg.sv` | set-based algorithm reference, encoder, Gaussian noise, quantiser |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the M = 128 sweep |

At the defaults, yosys coarse synthesis gives about 11,400 flip-flops for
the top. About 9,600 of them are the 64 PDs with two 75-bit slots each,
and about 2,000 are the correction snapshot. There are no memories.

## Verification

Each testbench prints `TB_RESULT checks=… failures=…` and has a watchdog.
To run one with Verilator:

    verilator --binary --timing --assert -Irtl -Itb --top-module tb_spect_decoder \
        rtl/spect_pkg.sv tb/spect_ref_pkg.sv tb/tb_spect_decoder.sv
    ./obj_dir/Vtb_spect_decoder

* `tb_spect_decoder` runs the top at its defaults. It decodes a noiseless
  frame, which must come out error-free. It then decodes 4 frames of 1024
  bits at each Eb/N0 from 2 to 6 dB, and a 1 dB frame. Two more frames
  force the rare cases. One has a burst of strong random samples, which
  forces underflow retries. The other has a run of erased (zero)
  samples: every path ties, so the overflow re-purges would empty the set
  and truncation steps in. A set-based reference runs alongside and
  checks, per depth: the survivor count,
  underflow retries, overflow cycles, transfers (equal to the
  two-child parents when there is no overflow) and the exact cycle count.
  Every output block must be the bits of some minimum-D path of its
  snapshot, with v+1 cycles of latency. The testbench also checks that
  transfers, overflows, underflows, truncations and non-zero corrections
  each happen. After a truncation, the reference can no longer know which
  paths the hardware kept, so per-depth checks stop for the rest of that
  frame.
* `tb_spect_decoder_m128` runs the same checks and sweep with M = 128.
* `tb_spect_decoding_module` replaces the correction module with a model
  that returns E after random delays, which exercises the wait.
* The testbenches for the PE, PD, token bus and correction module compare
  against integer models, using random stimulus.

Throughput figures measured by the two sweeps with the default seed, over
4 frames per point. DL_o is overflow cycles per 1024-bit frame; NC_r is
broadcast-receive cycles per depth. The reference columns are the values
published for the original architecture.

| Eb/N0 | M=64 DL_o | ref | M=64 NC_r | ref | M=128 DL_o | ref | M=128 NC_r | ref |
|---|---|---|---|---|---|---|---|---|
| 2 dB | 84.5 | 50.5 | 6.71 | 6.8 | 42.8 | 20.0 | 9.57 | 7.9 |
| 3 dB | 72.0 | 24.0 | 6.63 | 5.4 | 22.5 | 7.0 | 7.81 | 5.9 |
| 4 dB | 19.5 | 11.5 | 5.36 | 4.6 | 3.8 | 2.0 | 5.99 | 4.8 |
| 5 dB | 16.2 | 5.0 | 5.00 | 4.1 | 4.0 | 0.6 | 5.48 | 4.1 |
| 6 dB | 3.8 | 1.8 | 4.36 | 3.7 | 0.0 | 0.1 | 4.48 | 3.7 |

The trends match: fewer overflows at higher SNR and with more survivors,
and roughly 4–7 transfers per depth. The absolute numbers are higher
here. Four frames is a small sample. The 5-bit input quantisation and the way an
overflow is counted (one count per re-purge cycle) are this design's own
choices and need not match the original simulations. The error rates
printed by the sweeps come from far too few frames to compare with
published BER curves. The sweeps also print the average number of
survivors per depth. Between 2 and 6 dB it falls from 28 to 18 for
M = 64, and from 41 to 19 for M = 128.

## Where this design goes beyond or departs from the source

* **Overflow direction.** The source says an overflow repeats the depth
  after *reducing* the speculated best metric by R. A lower speculated
  best shrinks every D and lets more paths through, so it cannot end an
  overflow. This design shifts the other way: every D grows by R. It also
  re-purges in place instead of re-running the depth.
* **Underflow retry and truncation** are this design's additions. The
  source does not say what happens when no path survives, or when an
  overflow re-purge would remove every path.
* **One clock** for PEs and re-distribution, as described above.
* **Choices the source leaves open:** the generator reading, the
  input quantisation, the 64-bit path length (decoding delay), the
  first-index tie-break in the best-path search, the v-step search
  structure, the frame start (all-zero state, E = 0 at the first correction
  depth) and the output block format.
* **Not built:** the original T-algorithm and the Viterbi decoders, which
  are used only for comparison.
