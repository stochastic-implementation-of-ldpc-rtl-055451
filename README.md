# Stochastic decoder for a (16,8) LDPC code

An LDPC decoder normally passes multi-bit probability messages between the
nodes of the code's factor graph for a number of iterations. This design
represents each message as a **Bernoulli bit stream** instead: a probability
*P* is the fraction of ones in the stream, and each graph edge carries one
bit per clock in each direction. With that representation the two functions
of the sum-product algorithm become a handful of gates:

| node function | formula | circuit |
|---|---|---|
| parity check (soft XOR) | Pc = Pa(1−Pb) + (1−Pa)Pb | XOR gate + D flip-flop (`stoch_xor_gate`) |
| equality (soft AND, normalized) | Pc = PaPb / (PaPb + (1−Pa)(1−Pb)) | J-K flip-flop, J = a·b, K = ā·b̄ (`stoch_eq_gate`) |

Every node of the graph is built in parallel, so a decoder for the 16-bit
code is a few hundred flip-flops with two wires per edge. Decoding time is
not fixed: the decoder runs until its hard decisions satisfy every parity
check.

The decoder (`stoch_ldpc_decoder`) sits inside an on-chip trial set-up
(`stoch_ldpc_demo`). Two lanes each generate random codewords, pass them
through a simulated Gaussian channel, decode them and count the errors, so
bit error rate and throughput can be measured at hardware speed. The RTL is
SystemVerilog (IEEE 1800-2017), synthesizable, with one module per file in
`rtl/` and a self-checking testbench for each module in `tb/`.

## How the J-K gate divides

The equality function needs a product and a division. The product is an AND:
the two inputs agree on a one with probability PaPb and agree on a zero with
probability (1−Pa)(1−Pb). The J-K flip-flop sets on the first, clears on the
second and holds when the inputs disagree. Its output is therefore a one with
the probability that the most recent *agreeing* pair was a pair of ones,
which is exactly the normalized ratio above. The hold is also the weak spot:
when the two input streams are correlated, the gate can sit in the hold state
for long stretches and its output stops tracking the inputs. That is why the
graph contains supernodes (below).

A node with more than two inputs is a chain of 2-input gates. `var_node`
computes, for every edge, the equality of the channel stream and all the
*other* incoming edges (the extrinsic message), and one extra output `dec`
that combines the channel with *all* incoming edges; `dec` feeds the output
counter. `check_node` does the same with XOR gates.

## The code

The code has 16 bits and 8 parity checks arranged in a ring. Check *j*
(0..7) joins bits 2j−1 (mod 16), 2j and 2j+1:

```
check 0: bits 15, 0, 1      check 4: bits 7, 8, 9
check 1: bits  1, 2, 3      check 5: bits 9, 10, 11
check 2: bits  3, 4, 5      check 6: bits 11, 12, 13
check 3: bits  5, 6, 7      check 7: bits 13, 14, 15
```

Odd-numbered bits sit on two checks, even-numbered bits on one. The odd bits
can be chosen freely, so they are the information bits (`out_info[i]` is code
bit 2i+1), and each even bit is `c[2j] = c[2j-1] ^ c[2j+1]`. All of this is
derived from one formula in `ldpc_pkg` (`edge_var`, `edge_chk`; `encode`
builds a codeword from 8 information bits); edge
*e* = 3j + k joins check j to bit (2j − 1 + k) mod 16.

## Keeping the streams random

Stochastic arithmetic is only right when the streams it combines are
independent. Two mechanisms provide that:

**Supernodes** (`supernode`). A supernode measures the probability of its
input stream and re-emits it with fresh random bits. A 3-bit counter tallies
the ones of the input over a window of 8 cycles; at the end of the window the
tally goes to a hold register, which drives a digital-to-stochastic converter
for the whole next window. The width trades precision against how fast a
change propagates through the graph: 3 bits is the published choice. One
supernode sits on every edge in the check-to-equality direction, i.e. on every
input of a J-K gate (24 in all). A count of 8 in a window saturates at 7, and
the hold register starts at 4 after a clear.

**LHCA noise** (`lhca`, `noise_gen`). Each input converter needs 5 random
bits per cycle and each supernode 4, 176 in total. They come from three
linear hybrid cellular automata (rules 90 and 150, null boundaries) of 31, 61
and 89 cells whose cells are concatenated. Cell *i* updates as
`q[i] <= q[i-1] ^ q[i+1] ^ (RULE[i] & q[i])`. Unlike the bits of an LFSR,
which are shifted copies of each other, neighbouring LHCA cells are only
weakly correlated. The lengths are Mersenne-prime exponents, so a rule vector
whose characteristic polynomial is irreducible is automatically primitive;
the three rule vectors in `ldpc_pkg` were found by searching random rule
vectors for that property (the characteristic polynomial of the tridiagonal
update matrix follows the recurrence p_k(x) = (x + r_k) p_{k−1}(x) + p_{k−2}(x)).
Each automaton therefore runs through all 2^N − 1 non-zero states.

## From samples to streams and back

**Signal level to probability** (`llr_to_prob`). Each received bit arrives
as a quantized log-likelihood ratio L: 6 bits, signed, 2 fraction bits
(range −8 .. +7.75), positive meaning "1". For BPSK over a Gaussian channel
L = 2y/σ², a scaling left to the sample source. A 64-entry table, computed at
elaboration, maps L to the 4-bit code
`d = min(15, floor(16 / (1 + exp(-L))))`.

**Digital to stochastic** (`d2s_conv`). A chain of four 2:1 multiplexers,
each selected by a random bit, picks bit d[3] with probability 1/2, else d[2]
with probability 1/4, and so on; when no select bit is set the output is a
fifth random bit. The stream then has P(1) = (2d + 1)/32, from 1/32 to 31/32.
Using a random bit rather than a constant for the last input keeps the levels
symmetric, so neither 0 nor 1 can be represented exactly and a stream can
never be stuck at a constant value.

**Stochastic to digital** (`updown_counter`). One 6-bit saturating up/down
counter per bit counts up on a one and down on a zero of the `dec` stream;
its sign bit gives the hard decision (non-negative means 1).

## Decoding a codeword

`decode_ctrl` runs each codeword through four phases:

| phase | length | what happens |
|---|---|---|
| LOAD | 1 cycle | the buffered codeword is copied to the converters; all graph state, supernodes and counters are cleared |
| INIT | `t_init` cycles | the graph runs, counters frozen, so the start-up transient is not counted |
| CHECK | `t_check` cycles | the graph runs, counters count |
| RUN | until done | each cycle the parity of the hard decisions is tested; if every check holds the word is done, otherwise the counters count one more cycle |

A limit `t_max` ends RUN without a codeword; the result is then flagged
`out_converged = 0`. `out_cycles` is the number of graph cycles from the end
of LOAD to the decision, so it is at least `t_init + t_check`. A codeword
occupies the decoder for `out_cycles + 2` clocks; the next codeword loads in
parallel (the input buffer is double-buffered), so with a steady input the
results follow each other without gaps.

## Decoder interface: `stoch_ldpc_decoder`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid`, `in_ready` | in/out | 1 | one sample is taken per cycle with both high |
| `in_llr` | in | 6 | quantized LLR, bit 0 of a codeword first |
| `t_init`, `t_check`, `t_max` | in | 16 | phase lengths and cycle limit; change them only while idle |
| `out_valid` | out | 1 | one-cycle strobe per decoded codeword |
| `out_bits` | out | 16 | decoded codeword |
| `out_info` | out | 8 | information bits (code bits 1, 3, ..., 15) |
| `out_converged` | out | 1 | `out_bits` satisfies every parity check |
| `out_cycles` | out | 16 | decoding cycles used |

Parameters: `LLR_W` (6), `LLR_FRAC` (2), `CNT_W` (6, up/down counter width),
`TW` (16, phase counter width). The code, the 4-bit input precision and the
3-bit supernode width are constants in `ldpc_pkg`.

`in_ready` is low only while a complete codeword waits in the buffer for the
decoder to finish the previous one.

## On-chip trials: `stoch_ldpc_demo`

The trial set-up runs `N_COPY` = 2 lanes side by side. Each lane has three
parts:

- **`chan_source`** picks 8 random information bits from an 89-cell LHCA
  and encodes them. It sends each code bit as BPSK through Gaussian noise,
  already scaled to the decoder's LLR format:
  `llr = ±mu + (S − 510) · sd_gain`, in units of 2^-8 LSB, rounded and
  saturated. S is the sum of four random bytes, an Irwin–Hall approximation
  of a Gaussian with standard deviation 147.8. For noise variance s2 (BPSK,
  rate 1/2: s2 = 1 / (10^(Eb/N0 / 10))), set `mu = 2/s2 · 1024` and
  `sd_gain = 2/sqrt(s2) · 1024 / 147.8`. The four-byte sum cannot go beyond
  about ±3.4 standard deviations. That approximation is adequate for the
  error rates a short trial can resolve, but it makes the tail of very low
  error rates too thin.
- **`stoch_ldpc_decoder`** decodes the samples.
- **`err_monitor`** queues the information bits of each word sent and
  compares them with each result. It counts results, wrong information bits,
  wrong words, words stopped at `t_max` and decoding cycles. `seq_err` flags
  a result without a queued word; it never happens in a working design.

A trial starts with a one-cycle `start` pulse while idle. The counters are
cleared, and lane k sends ceil((n_words − k) / N_COPY) of the `n_words`
words. When all words are decoded, `busy` falls and `done` rises. The outputs
are the sums over the lanes, plus `clocks`, the length of the trial, so:

- BER = `bit_errs / (8 · words)`;
- throughput = `8 · words / clocks` information bits per clock.

The 32-bit counters hold a trial of 2^26 information bits (2^23 words). The
lanes share no state. Their decoders use identical noise-generator seeds,
but since they decode different words this does not matter.

## Measured behaviour

`tb_ber_sweep` decodes 200 random codewords per point, sent as BPSK through
Gaussian noise, for the five (T_INIT, T_CHECK) settings below, with
`t_max = 4000`. Of the 8000 codewords, 7 reached the cycle limit without
satisfying the checks; all others converged. Mean decoding cycles per
codeword:

| (T_INIT,T_CHECK) | 0 dB | 1 | 2 | 3 | 4 | 5 | 6 | 7 dB |
|---|---|---|---|---|---|---|---|---|
| (128,128) | 369 | 346 | 311 | 291 | 311 | 266 | 277 | 262 |
| (64,64) | 199 | 182 | 189 | 155 | 165 | 152 | 137 | 135 |
| (96,32) | 251 | 217 | 206 | 177 | 150 | 148 | 141 | 132 |
| (32,96) | 233 | 196 | 176 | 184 | 167 | 145 | 152 | 141 |
| (32,32) | 157 | 145 | 112 | 91 | 98 | 92 | 81 | 64 |

Bit error rate over all 16 code bits (3200 bits per point, so values under
about 3e-4 are not resolved):

| (T_INIT,T_CHECK) | 0 dB | 2 dB | 4 dB | 5 dB | 6 dB | 7 dB |
|---|---|---|---|---|---|---|
| (128,128) | 9.4e-2 | 3.7e-2 | 5.6e-3 | 4.1e-3 | 3.8e-3 | 9.4e-4 |
| (64,64) | 8.7e-2 | 3.8e-2 | 1.4e-2 | 3.8e-3 | 1.9e-3 | 0 |
| (32,32) | 1.0e-1 | 4.4e-2 | 8.4e-3 | 4.1e-3 | 3.8e-3 | 0 |

Published FPGA measurements of this decoder architecture give, read from
their plots, a BER of about 8.5e-2 at 0 dB, 3e-2 at 2 dB, 5.7e-3 at 4 dB,
1.8e-3 at 5 dB, 4.5e-4 at 6 dB and 8e-5 at 7 dB, nearly the same for every
setting. Their mean decoding time runs from about 1600 cycles (0 dB) to 560
(7 dB) for (128,128), and from about 1070 to 155 cycles for (32,32). That is
about 19.5 clocks per information bit at high SNR.

This RTL matches the published error rate up to about 4 dB. At 5–6 dB its
error rate is 2–8 times higher, although with only a dozen errors per point
the spread is wide. It is faster: about 64–69 cycles per word at 7 dB with
(32,32), near 9 clocks per information bit. Its decoding time also depends
much less on SNR, because the narrow output counters change sign quickly.
Wider counters make the times rise towards the published curves, but they
also make more words miss the checks. With 10- or 16-bit counters the same
sweep needs 928 cycles at 0 dB and 313 at 7 dB for (128,128). But 625 of the
8000 words then reach the 4000-cycle limit, and the error rate gets worse.
A wide counter that has drifted the wrong way takes hundreds of cycles to
change sign again. The 6-bit width is the best trade found between the two
effects.

Generic synthesis with Yosys gives about 1460 word-level cells for the whole
decoder. It has 752 flip-flop bits plus the 64×4 input table. The graph
alone takes 776 cells and 272 flip-flops. The two-lane trial set-up comes to
about 3430 cells and 2170 flip-flop bits. Its memory is 576 bits: the two
input tables and the two result queues.

In the trial testbench the two lanes together take about 4.2 clocks per
information bit at 7 dB with (32,32), and about 15 at 0 dB.

## What is this design's own

The gates, the ring-shaped graph, the 4-bit input precision and its mux
converter, 3-bit supernodes, LHCA noise, the up/down counters with their sign
rule, and the INIT/CHECK/run-until-valid control follow the published
architecture. Filled in here:

- supernodes only in front of the equality nodes (both directions were tried
  and decoded about half as fast, with more errors);
- decision stream = equality of the channel and all check inputs;
- the supernode window/hold arrangement, saturation and reset value;
- LHCA lengths, rule vectors and seeds;
- LLR input format and the table's rounding;
- serial, double-buffered input with valid/ready;
- 6-bit saturating up/down counters, cleared at every codeword;
- run-time `t_init`, `t_check` and a cycle limit `t_max`;
- reset and clear values of every flip-flop (all 0, supernode hold at 4);
- information bits on the odd code positions.

The trial set-up follows the published practice: samples are generated on
the same chip, results are checked there, and two copies run in parallel. How
the samples are made and counted is this design's own. The published set-up
also had push buttons, LEDs and seven-segment displays; they are not
included, and the counters are ports instead.

## Files

| file | contents |
|---|---|
| `rtl/ldpc_pkg.sv` | code constants, edge formulas, syndrome function, LHCA rule vectors |
| `rtl/stoch_xor_gate.sv`, `rtl/stoch_eq_gate.sv` | the two stochastic gates |
| `rtl/check_node.sv`, `rtl/var_node.sv` | parity-check and equality nodes |
| `rtl/supernode.sv`, `rtl/d2s_conv.sv` | stream regenerator, mux converter |
| `rtl/lhca.sv`, `rtl/noise_gen.sv` | cellular-automaton random bits |
| `rtl/stoch_graph.sv` | the whole factor graph |
| `rtl/llr_to_prob.sv`, `rtl/input_regs.sv` | input table and codeword buffer |
| `rtl/updown_counter.sv`, `rtl/parity_check.sv`, `rtl/decode_ctrl.sv` | output counters, parity check, phase control |
| `rtl/stoch_ldpc_decoder.sv` | the decoder |
| `rtl/chan_source.sv`, `rtl/err_monitor.sv` | channel sample source, result checker |
| `rtl/stoch_ldpc_demo.sv` | top level: two-lane trial set-up |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_ber_sweep.sv` | error-rate and decoding-time sweep |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/ldpc_pkg.sv tb/tb_stoch_ldpc_demo.sv \
    --top-module tb_stoch_ldpc_demo -o sim
./obj_dir/sim
```

Replace the testbench name for any other test. `tb_stoch_ldpc_demo` runs
three trials of the top level at its default parameters: 0 dB, 7 dB, and
0 dB with a 70-cycle limit. It checks every counter against its own tally
taken from the lanes' ports. It also checks that words in error, words at
the limit, source stalls and parallel lanes all occur.
`tb_stoch_ldpc_decoder` runs the decoder at its default parameters:
noiseless words (exact result after
exactly `t_init + t_check` cycles), noisy words at 7, 5, 3 and 0 dB, a cycle
limit, input stalls and loading during decoding. Each takes about a second;
`tb_ber_sweep` takes a few seconds. The testbenches use only standard system tasks and functions (`$urandom`,
real-number math, `$countones`), so other simulators should run them too.
