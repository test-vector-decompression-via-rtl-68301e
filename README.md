# Cyclical-scan-chain test vector decompression

A core-based chip is tested with the fully specified test vectors that come
with each core. Those vectors usually have to be stored on the tester and
shifted in bit by bit. This design cuts both the stored data and the shift
time. It does not ship whole vectors. It ships the *difference* between each
vector and the one before it, run-length encoded, and rebuilds the vectors on
chip with a few flip-flops and an XOR gate per scan chain.

The compression is lossless and needs nothing from the core: no ATPG, no fault
simulation, no don't-care bits. It works because neighbouring vectors of an
ordered test set are strongly correlated. Their XOR is mostly zeros, and runs
of zeros encode well.

## The cyclical scan chain

The key element is a scan chain whose serial output is XORed back into its
serial input (`cyclical_scan_chain`):

```
 decoded bit -->(+)--> [ stage 0 ... stage len-1 ] --+--> test scan chain of the CUT
                 ^___________________________________|
```

Say the chain holds vector `t` and you shift in a difference vector `d` of the
same length. Each new bit is `d[j] ^ t[j]`, so afterwards the chain holds
`t ^ d`. Start from all zeros and shift `t1`, then `t1^t2`, then `t2^t3`, and so
on: the chain holds `t1`, `t2`, `t3`, ... in turn. While it shifts, its serial
output replays the vector it held before. That output feeds the scan chain of
the circuit under test (CUT).

This has two consequences that the rest of the design is built around:

* **The cyclical chain must never capture.** The CUT's system clock loads the
  response into the test scan chain. The cyclical chain has no capture path,
  so it keeps its vector across the capture. Physically it can be any scan
  chain the integrator controls: the chip's boundary scan, a core's boundary
  collar, or another core's internal scan plus some scan cells in the
  user-defined logic. What matters is that it is not clocked with the CUT.
* **The test scan chain runs one vector behind.** After the first `len` bits
  the cyclical chain holds `t1`, but the test chain has received the old
  contents (all zeros). `t_k` reaches the test chain while `t_(k+1)` is being
  built. The scan counter therefore skips the capture of the first full chain.
  The tester ends a session with `len` zero bits. These move `t_n` into the
  test chain without changing the cyclical chain.

The chain is longer than it needs to be for most CUTs. The runtime input
`len` closes the loop at stage `len-1`, so one physical chain of `N` stages
can serve CUTs of any scan length up to `N`. Stage numbering is the same in
both chains: bit `j` of a vector (`j = 0` is shifted first) ends up in stage
`len-1-j`.

A boundary scan that drives a CUT's inputs and does not capture can be its own
cyclical chain. Then there is no separate test chain and no lag.
`self_cyclic` selects this arrangement for a lane: the vector applied is the
cyclical chain's contents (`cyc_vec`), and every full chain is captured,
including the first.

## Run-length codes and the decoder

Difference vectors are encoded with a fixed-width *variable-to-block* code:
each codeword stands for a run of bits. `rl_decoder` emits one decoded bit
per clock, first bit first. Three codes are provided (`csd_pkg::rl_code_e`):

| codeword | `CODE_MOD3` (default) | `CODE_COUNT3` | `CODE_COUNT2` |
|---|---|---|---|
| 000 / 00 | `10` | `1` | `1` |
| 001 / 01 | `11` | `01` | `01` |
| 010 / 10 | `01` | `001` | `001` |
| 011 / 11 | `001` | `0001` | `000` |
| 100 | `0001` | `00001` | |
| 101 | `00001` | `000001` | |
| 110 | `000001` | `0000001` | |
| 111 | `000000` | `0000000` | |

The two counting codes are decoded by a down counter. The counter is loaded
with the codeword, emits a 0 for each step down, and emits a 1 when it reaches
zero. The all-ones codeword is the exception: its run ends after the zeros,
with no 1.

The modified code `CODE_MOD3` is the one the design is built for. It handles
runs of ones better, and **every codeword decodes to 2 to 6 bits**. An FSM
decodes it: a 6-bit pattern register shifts out MSB first, and a 3-bit count
holds the bits left. Both are loaded from a table.

Handshake: `ready` is high when the decoder is idle or is presenting the last
bit of its run. A load in that cycle follows without a gap. A load at any other
time cuts the run short and sets the sticky `overrun` flag. `en` low freezes
the decoder.

Literal mode (`literal` sampled with `load`) passes the `K` loaded bits
through unencoded, MSB first. It turns compression off for vectors that do not
compress well. Those difference bits are then sent as they are, three per
codeword, and the cyclical chain stays in step.

## One tester channel, two decompressors

Because no codeword takes more than 6 cycles to decode, one tester channel can
keep two decompressors busy (`csd_top`, `NDEC = 2`):

```
 tdi --> [s0][s1][s2] -> codeword of lane 0 --> rl_decoder --> (+) cyclical chain 0 --> test chain 0
         [s3][s4][s5] -> codeword of lane 1 --> rl_decoder --> (+) cyclical chain 1 --> test chain 1
```

The tester shifts six encoded bits into `channel_shift_reg`, one per cycle.
It then pulses `tload`, which hands three bits to each decoder at once. While
the decoders work, the tester shifts in the next six bits. By the time it
loads again, both decoders are guaranteed to have finished. A single channel
therefore fills two scan chains with compressed data in about the time one
uncompressed chain would take.

**Bit order.** A new bit enters stage `s0` and moves towards `s5`. Lane `i`
takes stages `3i..3i+2`, with the highest stage as the MSB. The tester sends
lane 1's codeword first and lane 0's last, each MSB first.

**Load timing.** `tload` hands over the register contents as they were
*before* any shift in the same cycle. The tester can therefore stream without
gaps: it shifts bits 0-5 of group g in cycles c..c+5. In cycle c+6 it shifts
bit 0 of group g+1 and asserts `tload`. The decoders take group g at that
edge and emit its first bits from cycle c+7. After the last group, the tester
sends one cycle with `tload` alone. Then it keeps clocking with `tshift` low,
so the decoders drain and the final vectors are captured.

**Stall.** Applying a CUT's system clock takes one cycle in which no chain may
shift. The scan counter of a lane raises `cut_capture[i]` for the one cycle
after the shift that completed a vector. `tstall` is the OR of these. While it
is high, the whole chip freezes: the channel register, every decoder and every
chain. The chip ignores `tshift` and `tload` in that cycle. The tester must
present the same bit and load pulse again in the next cycle. Freezing all
lanes together keeps the six-cycle rhythm intact, measured in non-stall
cycles. Each vector costs one extra cycle per lane, or one for both lanes when
their captures coincide.

Only `CODE_MOD3` guarantees the six-cycle bound. With `CODE_COUNT3` a codeword
can take 7 cycles, and `overrun` reports when the tester got ahead of a
decoder. With `CODE_COUNT2` the channel register is 4 bits and each codeword
takes at most 3 cycles, so the same rhythm holds with a load every fourth
cycle.

## Running a test session

1. Set `vec_len[i]` (the CUT's scan length), `self_cyclic[i]` and `literal[i]`.
   Pulse `clear`: the cyclical chains and scan counters go to zero.
2. For each lane, build the bit stream `t1`, `t1^t2`, ..., `t(n-1)^tn`. Unless
   the lane is self-cyclic, add `vec_len` zeros. Encode the stream with the
   chosen code. Pad the end with zero runs (`111`). The extra decoded zeros
   only rotate the last vector back into place.
3. Interleave the two lanes' codewords into groups of six bits and send them
   as described above, honouring `tstall`. `literal` may change at any load,
   but only where a lane's codeword boundary falls, so a lane can switch from
   compressed to uncompressed part way through.
4. At each `cut_capture[i]`, `cut_vec[i]` (or `cyc_vec[i]` when self-cyclic)
   holds the next test vector. The CUT's logic drives `cut_resp[i]`, which is
   captured. The response leaves on `scan_out[i]` while the next vector
   shifts in.

Ordering the test set so that neighbours differ little is done offline. The
ideal ordering is a minimum-cost Hamiltonian path, where the cost of an edge
is the encoded length of the difference vector; greedy heuristics do well.
The encoding is also done offline. Neither is part of the RTL. The testbench
package `tb/tb_csd_pkg.sv` contains a reference encoder.

## Modules

| file | what it is |
|---|---|
| `rtl/csd_pkg.sv` | code enum, code tables and helper functions |
| `rtl/rl_decoder.sv` | run-length decoder: counter engine, modified-code FSM, literal mode |
| `rtl/channel_shift_reg.sv` | tester-channel codeword register (`NDEC*K` bits) |
| `rtl/cyclical_scan_chain.sv` | XOR-feedback scan chain with runtime loop length |
| `rtl/scan_counter.sv` | counts shifted bits, times the CUT capture, skips the first fill |
| `rtl/test_scan_chain.sv` | mux-D scan chain standing in for the CUT's internal scan |
| `rtl/csd_lane.sv` | one decompressor: decoder, cyclical chain, scan counter, test chain |
| `rtl/csd_top.sv` | one tester channel, `NDEC` lanes, stall logic |

Parameters of `csd_top`: `CODE` (default `CODE_MOD3`), `NDEC` (default 2),
`N` (default 1664, the chain length), and `K` and `LW`, which are derived.
The default `N` is the scan length of the largest circuit listed below, so
every one of them fits without a change.

After coarse synthesis the default top has about 6,700 flip-flops. Nearly all
of them are the two 1664-stage cyclical chains and the two 1664-stage test
chains. The decompression logic proper is a few dozen flip-flops and under 200
word-level cells. On a real chip the chains are existing scan chains that are
reused, so only that logic is added.

The CUT logic itself is not modelled. `cut_vec`, `cut_capture` and `cyc_vec`
go out of the top, and `cut_resp` comes in. The tester is external.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Run one with Verilator, for example:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/csd_pkg.sv tb/tb_csd_pkg.sv tb/tb_csd_top.sv --top-module tb_csd_top
./obj_dir/Vtb_csd_top
```

* `tb_rl_decoder` runs all three codes against an independent table of runs.
  It checks every bit, that each run takes exactly as many cycles as it has
  bits (at most 6 for the modified code), literal mode, stalls and the
  overrun flag.
* `tb_channel_shift_reg`, `tb_cyclical_scan_chain`, `tb_test_scan_chain` and
  `tb_scan_counter` check each block against a software model. The
  cyclical-chain test uses loops closed inside a longer chain.
* `tb_csd_lane` covers one lane end to end: compressed, looped back, literal
  and self-cyclic sessions. It checks every applied vector, the shifted-out
  responses, and that the lane needs exactly one cycle per decoded bit.
* `tb_csd_top` runs the default-size top: two 1664-stage lanes on one channel.
  Its sessions cover coincident captures, a literal lane next to a lane looped
  at stage 700, and a self-cyclic 36-stage lane. It checks every vector, that
  no overrun occurs, and that each lane's last vector arrives within one group
  time of its last codeword. It also counts loads, stalls, coincident
  captures, skipped first fills, literal codewords, self-cyclic captures,
  loop-backs, six-cycle runs and the use of all eight codewords. Any of these
  that never happens counts as a failure.
* `tb_csd_top_codes` builds small tops in other configurations. Two of them
  must deliver every vector with no overrun: the 2-bit code on two lanes
  (a load every 4 cycles) and the modified code on three lanes sharing one
  channel (a load every 9 cycles). The third uses the 3-bit counting code.
  There loads come every 6 cycles but some codewords need 7, so the overrun
  flag must be raised.
* `tb_csd_workloads` runs the default top at the sizes of the ISCAS-85 and
  ISCAS-89 benchmark experiments. These have scan lengths from 32 to 1664 and
  36 to 1199 vectors per circuit, two circuits at a time. It uses synthetic,
  correlated vectors, because the real test sets are not part of this
  release. For the four large sequential circuits it runs a second time with
  compression turned off for the last fifth of the vectors. The compressed
  sizes it prints describe the synthetic data only. For reference, published
  results on real test sets are 11-39 % smaller than the raw data with the
  modified code, and about 5 points better with partial compression.

## Where this design makes its own choices

These are not fixed by the original technique and can be changed freely:

* the stall handshake (`tstall`) and the one-cycle capture slot;
* the scan counter skipping the first fill, and the zero flush at the end of
  a session;
* the bit order in the channel register and the same-cycle load timing;
* literal mode as the way to "turn compression off";
* the runtime loop length, the `clear` input, the asynchronous active-low
  reset;
* the FSM structure of the modified-code decoder, whose behaviour (the code
  table and the 6-cycle bound) is fixed.

Not included: the CUT logic, the tester, and the offline ordering and
encoding. Also not included are the scan-path multiplexing that turns a
particular boundary scan or core scan into a cyclical chain on a real chip,
and any scan cells placed between the decoder and the XOR. Both are wiring
that depends on the chip.
