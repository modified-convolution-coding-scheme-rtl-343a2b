# Modified convolution codec with a one-bit state

This is a rate-1/2 forward error correction codec built around a
convolution code with a single memory bit, together with its hard-decision
Viterbi decoder. Instead of the usual generators (1 0) and (1 1), the code
uses (0 1) and (1 1): each transmitted pair is the *previous* data bit
followed by the modulo-2 sum of the previous and the current bit. So the data
bits sit at the odd positions of the code stream and the XOR of neighbouring
data bits sits between them. With only two trellis states the decoder is very
small: two path metrics, one add-compare-select per state and one survivor
bit per state and step.

The RTL covers the encoder and the decoder. The modulator (QAM or PSK), the
channel and the demodulator that sit between them in a radio link are not
part of it; the top level brings the encoder output and the decoder input out
as ports.

## The code

The encoder keeps one state bit `s`, the previous data bit, which is 0 at the
start of every block. For a data bit `b`:

| state `s` | data bit `b` | pair sent (first, second) | next state |
|---|---|---|---|
| 0 | 0 | 00 | 0 |
| 0 | 1 | 01 | 1 |
| 1 | 0 | 11 | 0 |
| 1 | 1 | 10 | 1 |

The pair is `(s, s xor b)` and the next state is `b`. The impulse response of
a single 1 is `01 11 00`; the data `1010` encodes to `01 11 01 11 00 00`.

In the trellis, the two branches leaving state 0 carry `00`/`01` and those
leaving state 1 carry `11`/`10`. The two pairs that compete at a node
therefore differ in one bit, not two as in the standard rate-1/2,
two-register code, where they are `00`/`11` or `01`/`10`.

Blocks are `BLOCK_BITS` data bits (1000 by default). The encoder then adds
`FLUSH` pairs with a zero data bit (2 by default). The first flush pair
carries the last data bit, and the flush pairs bring the state back to 0. A
block is therefore `BLOCK_BITS + FLUSH` pairs long.

### Error-correcting power, as measured

The lightest nonzero code sequence is the impulse response `01 11 00`, of
weight 3. So the code's free distance is 3, and one error inside a span of a
few pairs is always corrected. The end-to-end test shows this: blocks with
isolated single errors every 7 pairs always decode correctly. The scheme was
proposed for two-bit errors. With the maximum-likelihood decoding built here,
however, flipping both bits of one pair is **not** corrected: in the test, 0 of
20 such blocks came out clean. The flipped pair `(~s, ~s xor b)` is a valid
branch leaving the other state. The path through that state is one bit away
from the received sequence, while the true path is two bits away, so the
decoder picks the wrong path and one data bit comes out wrong. Treat the
double-error claim as unproven for this decoder.

## Decoder

`mcc_viterbi_decoder` takes one received pair per clock.

1. **Branch metrics** (`mcc_branch_metric`). This block gives the Hamming
   distance from the received pair to each of `00`, `01`, `10` and `11`
   (0 to 2). The input is hard decisions. Soft-decision metrics are not
   supported.
2. **Add-compare-select** (`mcc_acs`). For each state `j`, both states `i`
   can lead into it over the branch `{i, i xor j}`. The unit adds that
   branch's metric to the path metric of `i`, keeps the smaller sum, and
   records the winning predecessor as a one-bit decision. If the sums are
   equal, predecessor 0 wins.
3. **Metric normalisation.** After every step, the smaller of the two new
   metrics is subtracted from both. A state is always one branch (metric at
   most 2) away from the better state, so normalised metrics stay in 0..2.
   Three bits (`PM_W`) are more than enough, and overflow cannot happen.
   Because both metrics shift by the same amount, no decision changes.
   State 1 starts with metric 7 (all ones), which no path from state 0 can
   reach, so the trellis starts in state 0.
4. **Survivor memory and traceback** (`mcc_traceback`). The two-bit decision
   columns of the whole block are stored, 1002 × 2 bits by default. After the
   last pair, the two final metrics are compared. The state with the smaller
   metric is chosen, and state 0 wins a tie. The flush normally makes state 0
   the winner, but it is not forced. The unit then walks the decisions
   backwards, one step per clock. The state after pair `k` is data bit `k`,
   so each visited state is written into a 1000-bit output buffer. The states
   of the flush steps are dropped. Finally the buffer is read out in order.

### Timing

Let `T = BLOCK_BITS + FLUSH`.

- **Input:** `in_ready` stays high for the whole block, so the `T` pairs can
  arrive on `T` consecutive clocks.
- **Traceback:** this takes `T` clocks. The first decoded bit is valid `T`
  clock edges after the edge that took the last pair.
- **Output:** one bit leaves per clock while `out_ready` is high. `out_last`
  marks the last bit of the block.
- **Hold-off:** `in_ready` stays low from the last pair until the last decoded
  bit has left.

Blocks are not overlapped. A block takes about `3T` clocks in the decoder,
while the encoder needs `T` clocks. A link that must keep up with a
continuous stream would need a second buffer or a sliding-window traceback.
Neither is built here.

## Encoder timing

`mcc_encoder` forms the pair combinationally from the state register and the
input bit:

- **Throughput:** one pair per clock.
- **Latency:** a data bit is accepted (`in_ready`, which follows `out_ready`)
  in the same clock cycle that its pair is offered.
- **Flush:** during the `FLUSH` pairs, `out_valid` stays high and `in_ready`
  is low.
- **End of block:** `out_last` marks the final flush pair.

## Files and interfaces

| file | role |
|---|---|
| `rtl/mcc_pkg.sv` | pair and metric types, the branch-pair function `{from, from xor to}` |
| `rtl/mcc_encoder.sv` | encoder with block framing and flush |
| `rtl/mcc_branch_metric.sv` | four Hamming distances of a received pair |
| `rtl/mcc_acs.sv` | two-state add-compare-select with normalisation |
| `rtl/mcc_traceback.sv` | survivor memory, final-state choice input, traceback, output buffer |
| `rtl/mcc_viterbi_decoder.sv` | decoder: the three blocks above plus metric registers and pair counter |
| `rtl/mcc_top.sv` | encoder and decoder side by side |

A pair is `logic [1:0]`. Bit `[1]` is sent first: the state bit, at the odd
position of the stream. Bit `[0]` is sent second: the XOR bit.

- **Handshake:** every stream uses valid/ready. A transfer happens on a
  clock edge where both are high.
- **Reset:** `rst_n` is synchronous and active low.

The ports of `mcc_top`:

- `tx_*`: data bits in.
- `code_*`: code pairs out, to the modulator.
- `rx_*`: received pairs in, from the demodulator.
- `dec_*`: decoded bits out.

Wiring `code_*` to `rx_*` gives a loopback codec.

Parameters: `BLOCK_BITS` (1000), `FLUSH` (2, must be at least 1), and on the
decoder `PM_W` (3).

## What follows the scheme and what is an implementation choice

These parts follow the scheme as proposed:

- the state table and output pairs
- the initial state 0
- two flush pairs, 1000 bits per block, rate 1/2
- Viterbi decoding with a metric per hypothesis pair, survivor selection per
  node, and a comparison of the final metrics before the decoded path is
  read out

These are choices made here:

- Hamming-distance branch metrics
- the tie rules: predecessor 0 wins, and state 0 wins at the end
- metric normalisation
- whole-block traceback with a readout buffer and no overlap between blocks
- the valid/ready handshakes and synchronous reset
- the encoder inserting the flush itself

## Verification

Every testbench checks itself and ends with a `TB_RESULT` line.

- `tb_mcc_encoder`:
  - the `1010` example at full rate: six pairs in six clocks, `out_last`
    on the sixth
  - random multi-block data under random valid/ready
- `tb_mcc_branch_metric`: all 16 combinations.
- `tb_mcc_acs`: exhaustive over path metrics 0..7 and branch metrics 0..2
  (10368 cases). Each case is compared against a direct enumeration of the
  four branches.
- `tb_mcc_traceback`:
  - random decision columns and final states, with and without gaps between
    columns
  - traceback time of exactly `T` clocks
  - output backpressure
- `tb_mcc_viterbi_decoder` (40-bit blocks):
  - channel classes: error-free, one error, isolated errors and dense random
    errors
  - every bit compared with a reference Viterbi search that uses unbounded
    integer metrics
  - exact data required for the first three classes
  - full input rate and latency checked
- `tb_mcc_top`: default parameters, 100 blocks of 1000 bits (100000 bits)
  through a bit-flip channel, with random stalls on all four ports.
  - every code pair and every decoded bit is checked
  - it counts flush pairs, held encoder input, decoder input held during
    traceback, output stalls, corrected error blocks and injected
    double errors, and fails if any of them never happened

Not verified: performance over QAM/PSK and AWGN, because no modulator or
channel model is included.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/mcc_pkg.sv tb/tb_mcc_top.sv --top-module tb_mcc_top -o sim
./obj_dir/sim
```

Replace `tb_mcc_top` with any other testbench name. The full-size end-to-end
test runs in a few seconds.
