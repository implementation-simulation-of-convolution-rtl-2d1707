# Rate-2/3 convolutional encoder and 4-state Viterbi decoder for 8-PSK

This is a forward-error-correction link in SystemVerilog. Two information bits per clock are
encoded into a 3-bit symbol, which is sent as one of eight phases of an 8-PSK carrier. At the
receiver, a Viterbi decoder finds the most likely input sequence from the eight distances
between each received phase and the constellation points. The code has constraint length 3
and four trellis states. One of the two input bits is left uncoded. As a result, every trellis
transition carries two parallel branches, 180 degrees apart on the circle. This is the classic
trellis-coded 8-PSK arrangement.

The decoder is built from a branch-metric unit, an add-compare-select (ACS) unit, a next-state
(trellis lookup) block, a trace-back block and a decoding (output) block. All modules are
synthesizable. Each one has a self-checking testbench.

## The code

Inputs at step n are `X2N` and `X1N`. The state is the last two values of `X1N`:
`X1N_1` (one step ago) and `X1N_2` (two steps ago). The outputs are

    Y2N = X2N
    Y1N = X1N xor X1N_2
    Y0N = X1N_1

The states are named S0..S3: S0 = {X1N_1, X1N_2} = {0,0}, S1 = {1,0}, S2 = {0,1} and
S3 = {1,1}. In the RTL a state is coded as the 2-bit value `{X1N_2, X1N_1}`, so S1 is `2'b01`.
From state s, input `X1N` leads to `{X1N_1, X1N}`. That means S0 and S2 go to S0 or S1, and S1
and S3 go to S2 or S3.

| state | X = 00 | X = 01 | X = 10 | X = 11 | next state for X1N = 0 / 1 |
|-------|--------|--------|--------|--------|----------------------------|
| S0    | 000    | 010    | 100    | 110    | S0 / S1                    |
| S1    | 001    | 011    | 101    | 111    | S2 / S3                    |
| S2    | 010    | 000    | 110    | 100    | S0 / S1                    |
| S3    | 011    | 001    | 111    | 101    | S2 / S3                    |

(Entries are Y = Y2N Y1N Y0N for the input X = X2N X1N.)

### Parallel branches and subsets

`X2N` does not touch the state. So each transition (state, X1N) fixes only the pair
`{Y1N, Y0N}`, called the *subset*, and `Y2N` selects one of two parallel branches. With the
natural 8-PSK mapping (symbol value Y at phase Y x 45 degrees), the two branches are the points
`subset` and `subset + 4`, which are opposite each other on the circle. The decoder therefore
settles each parallel pair first, in the branch-metric unit. It keeps the closer point and
remembers its `Y2N`. The ACS then works on four subset metrics instead of eight branch metrics.

## Receiver metric

`viterbi_distances` gives eight 3-bit distances (`pt_dist[0..7]`, also called in0..in7). Each
is the squared Euclidean distance on the unit circle between the received phase and point k,
scaled by 7/4 and rounded:

    d = round(7/4 * (2 - 2 cos(45deg * (Y - k))))  ->  {0, 1, 4, 6, 7, 6, 4, 1} for 0..7 steps apart

This table is a function in `viterbi_pkg` (`psk_distance`). The testbench recomputes it with
real arithmetic.

Here is what the metric means for error correction. A received point off by +-45 degrees costs 1
on the true path. Any other path costs at least 1 + 6 on its parallel branch, or about 9 on a
diverging path. Isolated +-45-degree errors are therefore always corrected. A 180-degree error
lands exactly on the parallel branch and cannot be corrected by any decoder for this code. A
90-degree error ties with the parallel branch, and the tie rule picks `Y2N = 0`.

## Decoder datapath (`viterbi_decoder`)

```
pt_dist[8] -> viterbi_bmu -> bm[4], x2_sel[4]
           -> viterbi_acs -> dec_col (4 x {x2, pred}), pm[4], best_state
           -> viterbi_traceback (17 columns, chain of viterbi_next_state)
           -> viterbi_decode_out -> X2N_out, X1N_out, out_valid
```

* **Branch metric (`viterbi_bmu`)**: `bm[s] = min(d[s], d[s+4])`.
  `x2_sel[s] = (d[s+4] < d[s])`. It is purely combinational.
* **Add-compare-select (`viterbi_acs`)**: the predecessors of state s' are `{b, s'[1]}` for
  b = 0, 1. The branch subset is `{s'[0] xor b, s'[1]}`. The smaller of `pm[pred] + bm[subset]`
  survives; a tie keeps b = 0. The decision word for s' is `{x2, pred = b}`. The new metrics
  have the minimum of the old metrics subtracted, so they never wrap. With 3-bit branch metrics
  and 6-bit path metrics, the spread stays below 2 x 7 + 7 + `RESET_PM`. After reset, S0 starts
  at 0 and the other states at `RESET_PM` = 15, because the encoder also starts in S0.
* **Trace-back (`viterbi_traceback`)**: a shift register of `TB_DEPTH` = 17 decision columns,
  column 0 newest. Each cycle the walk starts at the state with the smallest path metric and
  goes back through all 17 columns. It uses one `viterbi_next_state` per column, all within one
  clock. The branch out of the oldest column gives the decision. The depth of 17 matches a trace
  from t = 17 back to t = 0. This is more than five constraint lengths, so the survivors have
  merged by then.
* **Next state (`viterbi_next_state`)**: one trace-back step. From state s' and its decision
  `{x2, pred}` it returns the predecessor `{pred, s'[1]}` and the decoded pair
  `{x2, s'[0]}` (X1N is the destination's X1N_1).
* **Decoding block (`viterbi_decode_out`)**: registers the pair and counts fill. `out_valid`
  pulses once per accepted symbol, but only after `TB_DEPTH` columns are in the memory.

State is held in the distance registers, the path metrics, the survivor memory and the output
register. The branch metrics, the ACS compare and the 17-step trace-back chain are all
combinational within one cycle. The trace-back chain is the critical path. A pipelined or
multi-cycle trace-back would shorten it, but it would change the latency.

## Timing and interfaces

All blocks take one symbol per clock. Reset `res` is active high and asynchronous. The top,
`viterbi_system`, connects:

* `X2N`, `X1N`: input pair, one per clock.
* `Y`: transmitted symbol. It is combinational in the current input and the encoder state.
* `err_rot[2:0]`: channel model. The received phase is `Y + err_rot` (mod 8); 0 means a clean
  channel.
* `pt_dist`: registered distances of the received phase.
* `X2N_out`, `X1N_out`, `out_valid`: decoded pair.
* `enc_state`, `pm`: encoder state and decoder path metrics, brought out for observation.

Latency: a pair applied before rising edge n comes out with `out_valid` high after edge
n + 1 + `TB_DEPTH` (18 clocks at the defaults). After reset, the first 17 pairs only fill the
survivor memory. To flush the last pairs of a stream, feed 17 more pairs (zeros, for example).
The decoder alone has `in_valid`, so it can be stalled. The top runs without stalls, since the
encoder's flip-flops have no enable.

Parameters (top and decoder): `TB_DEPTH` = 17, `PM_W` = 6, `RESET_PM` = 15.

## Files

| file | contents |
|------|----------|
| `rtl/viterbi_pkg.sv` | state/symbol types, decision struct, trellis functions, distance table |
| `rtl/d_ff.sv` | D flip-flop with asynchronous reset |
| `rtl/viterbi_encode.sv` | encoder built from two `d_ff` |
| `rtl/viterbi_distances.sv` | 8-PSK distance front end |
| `rtl/viterbi_bmu.sv`, `viterbi_acs.sv`, `viterbi_next_state.sv`, `viterbi_traceback.sv`, `viterbi_decode_out.sv` | decoder stages |
| `rtl/viterbi_decoder.sv` | decoder |
| `rtl/viterbi_system.sv` | top: encoder, channel, front end and decoder |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_viterbi_reference_stream.sv` | reference input stream 10, 11, 00, 01, ... with its known symbols and distances |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

* The encoder test compares against the state table above.
* The distance test compares against the cosine formula.
* The BMU, ACS, next-state and trace-back tests compare against independent models. The ACS
  model walks the trellis forwards. The trace-back model keeps its own history.
* `tb_viterbi_decoder` (depth 10) encodes a random stream in the testbench and adds isolated
  +-45-degree errors. It stalls `in_valid` at random. It checks every decoded pair and its
  latency in symbols.
* `tb_viterbi_system` runs the top at its default parameters on 4000 random pairs with about
  200 injected errors. It checks every decoded pair, the latency of 18 clocks and the
  transmitted symbols. It also requires each mechanism to occur: survivor-memory fill, an
  error corrected, metric normalisation, a `Y2N = 1` branch surviving, a trace-back starting
  outside S0, and a decision for the predecessor with `X1N_2 = 1`.
* `tb_viterbi_reference_stream` checks the first six symbols (100, 110, 001, 000, 101, 100)
  and their distances to points 0..4 for the input stream 10, 11, 00, 01, ... It then decodes
  400 pairs.

To run one testbench with plain Verilator:

```
verilator --binary --timing --assert -Irtl --top-module tb_viterbi_system \
    rtl/viterbi_pkg.sv tb/tb_viterbi_system.sv -o sim
./obj_dir/sim
```

(`-Irtl` lets Verilator find the other modules by their file names.) Each run takes well under a
second.

## Departures and choices to be aware of

* **Serial output.** A rate-1/3 style drawing of this kind of encoder shows a SEL A/B/C
  multiplexer that sends the three bits one after another at three times the input rate. This
  design emits the three bits in parallel, as one 8-PSK symbol per clock.
* **Modem.** The 8-PSK modulator, the channel and the demodulator are not circuits here. The
  received signal is taken to be exactly a constellation point, possibly rotated by `err_rot`,
  so there is no soft-decision quantiser of I/Q samples.
* **Distance.** The receiver metric is a phase (squared Euclidean) distance, not a Hamming
  distance between 3-bit words. A Hamming distance of 3-bit words is never more than 3, so it
  could not produce the 3-bit values 4, 6 and 7 that the reference distances contain.
* **Registered distances.** The front end's outputs are registered, which adds one clock of
  latency.
* **Designer's choices.** The decoder's internals are this design's own: the subset-first
  branch metric, minimum-subtraction normalisation, the tie rules, the one-cycle register-chain
  trace-back and the fill counter. So are the reset values and polarity, the 6-bit path metric
  and the channel's phase-rotation input.
* **Not included.** The rate-1/2, constraint-length-3 hard-decision code that often illustrates
  Viterbi decoding (generators 111/101, two output bits) is not part of this design.
