# Parallel contention-free turbo decoder for the CCSDS turbo code

A turbo decoder runs two soft-in/soft-out (SISO) decoders in turn. One works on the
frame in natural order and the other in interleaved order, and they exchange
*extrinsic* values through a memory. To go faster, this design cuts the frame into
`P` sub-blocks and decodes all of them at once with `P` SISOs running in lock step.
The difficulty is memory access. In every cycle the `P` SISOs each read and write one
extrinsic value. In natural order, sub-block `t` at time `j` touches position
`t*W + j`, so banking by sub-block would be enough. In interleaved order, the
positions `pi(t*W + j)` fall into arbitrary sub-blocks, and two SISOs would often hit
the same bank.

The design removes these collisions with a **contention-free bank map**. Position `x`
is stored in bank `C(x)` at address `x mod W`. `C` is chosen off line so that, for
every time index `j`, the `P` positions of that cycle lie in `P` different banks. This
holds in natural order and in interleaved order alike. With such a map the extrinsic
banks can be plain **single-port** RAMs. A small **temporary buffer** holds the writes
that arrive while the banks are still being read. Extrinsic values are also compressed
to 4 bits by a **non-linear mapping** before they are stored.

The code is the CCSDS one:
- two 16-state recursive systematic constituent encoders, with feedback 1+D³+D⁴ and
  parities 1+D+D³+D⁴, 1+D²+D⁴ and 1+D+D²+D³+D⁴;
- rates 1/2, 1/3, 1/4 and 1/6;
- the CCSDS permutation, generated on line.

The defaults are:

| | |
|---|---|
| parallel SISOs | P = 16 |
| frame | 1784 bits (sub-block W = 112) |
| sliding window | 32 |
| iterations | 8 |
| received values | (5,2) |
| extrinsic values | (6,2) |
| branch metrics | (6,2) |
| state metrics | (9,2) |

## The contention-free map

Think of the positions as the edges of a bipartite graph:

- the left vertex of position `x` is its natural time index `x mod W`;
- the right vertex is the time index `y mod W` at which the interleaved pass visits
  it, where `pi(y) = x`.

Every vertex has degree `P`. The map is contention free exactly when `C` is a proper
edge colouring with `P` colours: no two edges that share a vertex get the same
colour. Such a colouring always exists for a regular bipartite graph (König's
theorem), for any frame size and any `P`.

How to obtain `C`:
- The published approach searches for it with simulated annealing.
- The testbenches colour the graph directly with the classic alternating-path method.
  This takes a few milliseconds of simulation.
- Either way, the result is just a table. It is loaded into the decoder through the
  `map_ld_*` port.

Padding positions (`x >= FRAME`, when `P*W > FRAME`) map to themselves, so that the
graph stays regular.

How the hardware uses the map:
- `bank_map_lut` keeps two tables, indexed by (sub-block `t`, time `j`): the bank of
  `t*W+j` and the bank of `pi(t*W+j)`.
- In each cycle every SISO looks up its bank.
- `bank_xbar` routes the `P` requests to the `P` banks. It returns the read data one
  cycle later using a registered select.
- The crossbar flags (and asserts against) two requests to one bank. This never
  happens with a valid map.

The map is used in two places:
- The systematic values are banked the same way in the input buffer, because the
  interleaved half needs them in interleaved order together with the extrinsic values.
- The parity values need no map. Decoder `t` always reads its own sub-block, since the
  second encoder's parity at time `k` belongs to interleaved index `k`.

## One SISO: sliding-window log-MAP (`log_map_siso`)

Each SISO decodes one sub-block of `NWIN = ceil(W/SW)` windows with three recursion
units, each of which completes one trellis step per cycle:

| slot | dummy-backward unit | forward unit | backward unit + LLR |
|------|---------------------|--------------|---------------------|
| 0 | window 0 (stream) | | |
| 1 | window 1 | window 0 | |
| 2 | window 2 | window 1 | window 0 |
| … | … | … | … |
| NWIN+1 | | | window NWIN−1 |

How the windows are fed and processed:
- The symbols of a window arrive **back to front**. The dummy-backward unit can then
  run on the incoming stream, starting from all-zero metrics. It produces the starting
  backward metric for the previous window.
- Meanwhile the symbols are written into one of two sliding-window memories.
- One slot later the forward unit reads the window front to back and stores its
  forward metrics.
- One more slot later the backward unit reads the same window back to front. It
  combines its metrics with the stored forward metrics in the LLR unit.

Each unit has its own branch-metric calculator (`bmc`), placed behind the
sliding-window memory. The memory therefore stores received symbols, not 16 branch
metrics.

The arithmetic:
- `smc` performs one add-compare-select step over all 16 states. It uses
  `max*(a,b) = max(a,b) + ln(1+e^-|a-b|)`, with the correction taken from a 4-entry
  table in quarter units. It then rescales by subtracting the largest metric.
- `llrc` forms the LLR as the difference of two 16-input max* trees, with three
  pipeline stages.
- The extrinsic output is `LLR − (a-priori + Lc·ys)`, saturated to six bits.

Timing:
- The first output appears `2*SW + 4` cycles after the first input.
- A sub-block takes `(NWIN+2)*SW` cycles plus a short drain.
- Positions marked invalid (padding) pass through the trellis unchanged.

Sub-block edges:
- Decoder 0 starts in state 0.
- The end of the last sub-block is left open (equal metrics).
- Between neighbouring sub-blocks, the forward metric at the end of sub-block `t−1`
  and the backward metric at the start of sub-block `t+1` from the previous iteration
  initialise sub-block `t`. In the first iteration they are equiprobable.

## Single-port extrinsic memory with temporary buffer (`ext_mem_sp`)

A half iteration first reads the a-priori values of every position. After the SISO
latency it writes the new extrinsic values back. With `P` SISOs the read phase lasts
`NWIN*SW` cycles and the writes start after about `2*SW`. The two phases therefore
overlap for roughly `(NWIN−2)*SW` cycles.

The banks are single-port:
- A cycle that reads has priority.
- A row of `P` writes arriving in such a cycle is parked in the temporary buffer. Each
  row holds one `{valid, address, data}` entry per bank.
- Writes in a cycle without reads go directly to the banks.
- Parked rows are written back, one row per cycle, whenever the banks are idle.
- The controller does not start the next half iteration before the buffer is empty.
- Every position is written exactly once per half, so the drain order
  (last in, first out) does not matter.
- Buffer depth is `TD = (NWIN−2)*SW` rows. `ovf` reports an overflow.

What each bank stores:
- The 4-bit non-linear code of the extrinsic value (`ext_nl_codec`): sign plus a
  magnitude rounded down to 0, 1, 2, 4, 8 or 16 quarter units.
- The hard decision of the position, which the read-out uses after the last half.

## Interleaver (`ccsds_intlv_addr`)

The CCSDS permutation is `pi(s) = 2(t + 4c + 1) − m`, where:
- `m = (s−1) mod 2`;
- `t = (19i+1) mod 4`;
- `c = (p_q·j + 21m) mod k2`;
- `p_q` is 31, 37, 43 or 47.

The generator produces one address per cycle by adding either 21 or `p_q − 21` to
`c`, modulo `k2`. It selects `k2` from 223, 446, 892, 1115 and 2048 (frame sizes 1784
to 16384 bits), or from an input for other sizes. `mark` and `rewind` save and restore
its state.

The top uses it as follows:
- It holds one generator per SISO.
- After reset it advances generator `t` to the start of sub-block `t` and marks that
  point.
- It rewinds all generators before each interleaved half.
- A small per-SISO buffer turns each window's addresses back to front.

## Top level (`pturbo_dec_top`) and how to drive it

1. Wait for `ready`. After reset the generators take about `FRAME` cycles to
   initialise.
2. Load the map: for every `t < P` and `j < W`, write `C(t*W+j)` with `map_ld_int=0`
   and `C(pi(t*W+j))` with `map_ld_int=1`.
3. Load a frame into a page of the double input buffer, one position per cycle:
   - `ld_pos` = transmission index;
   - `ld_ys`;
   - `ld_pa[0..2]` = parities 1–3 of encoder a;
   - `ld_pb[0..2]` = parities 1–3 of encoder b.

   Give punctured values as 0.
4. Pulse `go` with `dec_page`, `rate` (0: 1/2, 1: 1/3, 2: 1/4, 3: 1/6) and `lc` (Lc
   with two fractional bits; 4 means 1.0). The other page may be loaded during
   decoding.
5. The decoded bits come out in natural order, one per cycle:
   `out_valid`/`out_pos`/`out_bit`, then `frame_done`.

At the defaults a frame takes about 5,000 cycles:
- 16 half iterations of about 200–260 cycles each, including the buffer drains;
- a 1784-cycle read-out.

## Where this design departs from the published architecture

- **Bank map:** loaded from outside. Simulated annealing is not built; any proper
  edge colouring works.
- **Trellis termination:** the four termination bits are not processed. The last
  sub-block ends with open metrics.
- **Sub-block boundaries:** the metric exchange between sub-blocks from one iteration
  to the next is this design's choice. The source does not say how parallel SISOs
  start their edge windows.
- **Retiming:** the add-compare-select step is the plain form. The retimed
  (offset-ACS) version is not applied, and the BMC is not pipelined.
- **Buffer depth:** the temporary buffer is sized from this design's own SISO schedule
  (`(NWIN−2)*SW` rows). The published evaluation gives `|ceil(N/P) − L|` rows with a
  measured latency of L = 104.
- **Non-linear mapping:** the level set (0, 1, 2, 4, 8, 16) is this design's choice.
- **Interfaces:** all handshakes, the read-out and the load ports are this design's
  own.
- **Other frame sizes:** frames above 1784 bits need a larger `FRAME` parameter. The
  interleaver already supports them.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=.. failures=..`.

- `tb_ccsds_intlv_addr`: full sequences for k2 = 223 and 446 and for a short frame,
  checked against the closed-form permutation; also mark/rewind.
- `tb_ext_nl_codec`: all 64 inputs and all 16 codes.
- `tb_bmc`, `tb_smc`, `tb_llrc`: random vectors against independent models. The
  models enumerate the trellis with their own shift-register encoder.
- `tb_log_map_siso`: encoded frames with noise and flipped systematic bits. Checks the
  decisions, the extrinsic output, the tags and the latency.
- `tb_ext_mem_sp`: direct writes, parked writes, drain, overflow.
- `tb_bank_map_lut`, `tb_bank_xbar`, `tb_in_buf`: table reads, routing, conflict
  detection, two pages.
- `tb_pturbo_dec_top` runs end to end at a reduced size (P=4, 120-bit frames, SW=8,
  4 iterations). It:
  - builds the map by edge colouring;
  - encodes two random frames;
  - adds bounded noise and flips 3% of the systematic signs;
  - decodes both frames back to back, the second loaded during the first;
  - requires the decoded frame to keep at most a third of the channel's sign errors;
  - counts how often each mechanism occurred: parked writes, drains, interleaved
    halves, padding positions, top-level extrinsic codes, page swaps and boundary
    exchanges.
- `tb_pturbo_dec_full`: the same at the default parameters (P=16, 1784 bits, SW=32,
  8 iterations). It leaves 0–1 residual errors out of about 240 channel sign errors
  per frame.
- `tb_pturbo_dec_p8` and `tb_pturbo_dec_p32` run the 8- and 32-decoder
  configurations on 1784-bit frames.
  - With P=8 (seven windows per sub-block) thousands of writes pass through the
    temporary buffer.
  - With P=32 (two windows) reads finish before the first write, and the test
    requires the buffer to stay unused.

To simulate with plain Verilator, put the package first and add `tb/` to the include
path:

```
verilator --binary --timing --assert -Itb rtl/turbo_pkg.sv \
  rtl/bmc.sv rtl/smc.sv rtl/llrc.sv rtl/log_map_siso.sv rtl/ext_nl_codec.sv \
  rtl/ccsds_intlv_addr.sv rtl/bank_map_lut.sv rtl/bank_xbar.sv rtl/ext_mem_sp.sv \
  rtl/in_buf.sv rtl/pturbo_dec_top.sv tb/tb_pturbo_dec_full.sv \
  --top-module tb_pturbo_dec_full -o sim && obj_dir/sim
```

The full-size run takes about a minute to build and seconds to simulate.
