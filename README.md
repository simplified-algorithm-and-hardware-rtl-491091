# Soft-decision decoder for the (24,12,8) extended Golay code, up to four errors

The extended Golay code has minimum distance 8. Hard-decision decoding corrects
three errors and, with four, only knows that the word is damaged: a received word
four bit flips from the code is equally far from **six** codewords. This decoder
uses the soft channel values to choose among those six. The winner is the
candidate error pattern whose bits the channel was least sure about.

The scoring needs no probabilities, exponentials or products. Take the
log-ratio of bit-error to bit-correct probability for BPSK in Gaussian noise.
Then assume that the amplitude and the noise power are constant over one word.
Under those assumptions the score of bit k reduces to

    p_k = -|x_k|

where x_k is the received soft sample. The score of a candidate pattern is the
sum of p_k over its ones, and the candidate with the **largest** score wins. This
is the same as the **smallest** sum of |x_k|.

The architecture follows the one published in *Simplified Algorithm and Hardware
Implementation for the (24, 12, 8) Extended Golay Soft Decoder Up to 4 Errors*.
It is a pipeline that accepts a word every twelve clocks. A hard decoder produces
an error pattern E_P, and 22 search engines try every alternative in twelve
clocks. Some details are this design's own choices. The section
[Departures and choices](#departures-and-choices) lists them.

## Where the candidates come from

This is the part that takes the most explaining.

Bits 0..22 of a word form the cyclic (23,12,7) Golay code, and bit 23 is an even
overall parity bit. Suppose the received word r has exactly four errors. Then:

* The (23,12,7) code is perfect, so the 23-bit hard decoder always returns a
  pattern of weight ≤ 3. The parity bit then has to be corrected as well, which
  gives a 24-bit E_P of weight exactly **4**: three bits in 0..22, plus bit 23.
  That is why the four-error detector only checks `weight(E_P) == 4`. With three
  errors or fewer, E_P is the true error and has weight ≤ 3.
* Any other pattern e that explains r satisfies `e xor E_P = codeword`. For e
  to have weight 4 as well, that codeword must be an octad (weight 8) containing
  all four ones of E_P. E_P includes bit 23, so every such octad also includes
  bit 23. Those octads are exactly the 253 weight-7 codewords of the (23,12)
  code, extended by a parity 1. Five of them contain E_P's three low bits, and
  they give the five other weight-4 candidates, which lie entirely in bits 0..22.

The hardware does not first pick out the five. It scores `E_P xor v` for
**all 253** weight-7 codewords v, using only bits 0..22: the parity bits cancel.
It also scores E_P itself, including bit 23. The candidates that do not contain
E_P's three bits have weight 6, 8 or 10. They are also valid explanations of r,
only with more flips, and they win only when their bits are even less reliable.
The search is therefore a maximum-likelihood choice over 254 nearby codewords,
not only over the six.

The 253 words are 11 cyclic orbits of 23 rotations each. `golay_pkg::GOLAY_V`
holds one base word per orbit: the numerically smallest member of the orbit,
with bit k the coefficient of x^k. Rotating a base word left by one place
multiplies it by x modulo x^23 − 1, which gives the next word of the orbit.

## Pipeline

| clock  | what happens                                                         | block |
|--------|----------------------------------------------------------------------|-------|
| 0      | word accepted (`in_valid && in_ready`)                               | top |
| 1      | p_k and hard decisions registered; written into the FIFO            | `golay_calc_pk`, `golay_fifo` |
| 2      | 11-bit syndrome of the hard decisions                                | `golay_hard_decoder` |
| 3      | E_P out of the coset-leader ROM; four-error test; FIFO read; search starts | `golay_hard_decoder`, `golay_four_err_detect` |
| 3..14  | 22 engines, 12 candidates per engine pair per orbit                  | `golay_search_engine` ×22 |
| 15..27 | reduction of the 22 results and comparison with E_P                  | `golay_final_select` |
| 28     | `out_valid`, corrected word                                          | top |

The pipeline stage is twelve clocks. `in_ready` drops for eleven clocks after
each accepted word, so words enter at most once every 12 clocks. The engines of
one word then run in the same clocks as the final selection of the word before.
The latency is 28 clocks. The engines run only for words flagged as having four
errors. Every other word still passes through the same stages with E_P as its
result, so the output order and timing never depend on the data.

## Search engines (`golay_search_engine`, `golay_error_search`)

Each engine holds a rotating 23-bit codeword v. Every clock it forms
`e = E_P xor v`. It then passes p_k through 23 multiplexers where e has a one,
adds them, and keeps the best sum and its pattern. The stored value is replaced
only by a strictly greater sum. In its start clock an engine loads its first
candidate unconditionally, and it rotates v by one place each clock.

The engines work in pairs, one pair per orbit. Engine a_i starts at v_i and
covers rotations 0..11 in twelve clocks. Engine b_i starts at v_i rotated by 12
and covers rotations 12..22 in eleven clocks; its twelfth clock is masked. All
253 words are thus tried exactly once. The two rotated start words are constants
worked out at elaboration.

`golay_error_search` also captures E_P, p_k and a side tag during the start
clock, while the engines read the live inputs in that same clock. The tag is the
24 hard decisions. The block also computes the score of E_P itself, including
bit 23.

## Final selection (`golay_final_select`)

The 22 engine results are captured in two 11-deep shift registers, group a and
group b, and shifted out one pair per clock. For each pair, the better member
wins: a if its score is strictly greater, otherwise b. That winner then replaces
the running best only if it is strictly greater. The running best starts at
E_P's own score, so E_P wins every tie. Eleven compare clocks plus the load
clock make up the second twelve-clock stage.

## Hard decoder and four-error detection

`golay_hard_decoder` uses the fact that the (23,12,7) code is perfect. The
syndrome `r(x) mod g(x)` picks a coset leader from a 2048 × 23-bit ROM. A
constant function fills the ROM at elaboration by enumerating every pattern of
weight 1, 2 and 3, which is exactly 2047 patterns, one per non-zero syndrome.
The generator polynomial is `g(x) = x^11 + x^10 + x^6 + x^5 + x^4 + x^2 + 1`.
E_P[23] is set when the word corrected in bits 0..22 still has odd overall
parity. `golay_four_err_detect` counts the ones of E_P.

## Interface (`golay_soft_decoder`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `in_valid` / `in_ready` | in / out | 1 | word handshake; `in_ready` is high at most once every 12 clocks |
| `in_x[24]` | in | XW signed | soft samples; a sample ≥ 0 is read as bit 0 |
| `out_valid` | out | 1 | one-clock pulse per decoded word; there is no back-pressure |
| `out_codeword` | out | 24 | corrected codeword (bit 23 = overall parity) |
| `out_msg` | out | 12 | information bits = `out_codeword[22:11]` under systematic encoding |
| `out_error` | out | 24 | the error pattern that was removed |
| `out_four_err` | out | 1 | four errors were detected and the soft search chose the pattern |
| `out_score` | out | XW+5 signed | sum of p_k over `out_error` |

Parameters: `XW` (sample width, default 8) and `FIFO_DEPTH` (default 4). Internal
scores are `XW+5` bits, so a sum over all 24 samples cannot overflow. The code
constants are in `golay_pkg`: the twelve-clock stage, the 11 base words and the
generator polynomial.

To send a message m: form the systematic codeword `c = m·x^11 + (m·x^11 mod g)`,
append its parity bit, and map bit 0 to +A and bit 1 to −A.

## Departures and choices

* **Hard decoder.** The published design uses Elia's algebraic decoder. This
  design uses a syndrome-table decoder, which gives the same E_P for every input
  but costs a 47-kbit ROM.
* **Four-error detection** is the weight test described above, not a separate
  detector circuit.
* **Sign convention.** The published description starts each engine's maximum
  at 0 and the final comparison at the sum of |x_k| over E_P, while using
  p_k = −|x_k|. Those do not fit together: a sum of non-positive values never
  beats 0. Here each engine loads its first candidate unconditionally, and the
  final comparison starts at E_P's score computed with p_k = −|x_k|. "Greater"
  then consistently means "more likely".
* **Engine pairing.** The description says each base word yields 22 codewords;
  11 × 22 would be 242, not 253. The a/b pairing covers all 253 exactly once.
* **Throughput.** One 24-bit word per 12 clocks at 100 MHz is 200 Mbit/s of code
  bits, or 100 Mbit/s of information. The published prototype reports 240 Mbit/s
  at 100 MHz, which does not follow from its own 12-clock stage. This design
  keeps the 12 clocks.
* **Own choices**, not given by the published description:
  * the sample width, the bit mapping and the systematic bit order;
  * the whole-word input handshake and reset behaviour;
  * a FIFO that holds the hard decisions as well as p_k;
  * the tag path that carries the hard decisions to the output;
  * the `out_score` port;
  * the choice of the 11 base words.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The reference model `tb/golay_tb_pkg.sv` builds
the code by brute force: all 4096 products m(x)·g(x). It hard-decodes by
searching all of them, so it shares no algorithm with the RTL.

| testbench | what it checks |
|-----------|----------------|
| `tb_golay_calc_pk` | p_k = −\|x_k\|, hard bits and one-clock latency, including −128, 0 and 127 |
| `tb_golay_fifo` | random push/pop against a queue; data and full/empty flags |
| `tb_golay_hard_decoder` | 0–3 errors give the true pattern; 4 errors give weight-4 E_P equal to the reference; 2-clock latency |
| `tb_golay_four_err_detect` | flag for every weight 0..24 |
| `tb_golay_search_engine` | 12 steps with idle clocks in between; ties resolved to the earliest |
| `tb_golay_final_select` | pairwise and running comparisons, E_P kept on ties, done 12 clocks after load, back-to-back loads |
| `tb_golay_error_search` | chosen pattern is a codeword offset that scores as high as the best of the 254 candidates; 24-clock latency; search disabled gives E_P |
| `tb_golay_soft_decoder` | end to end at default parameters, 600 words |
| `tb_golay_ber` | 1500 words over AWGN at Eb/N0 = 2 dB; soft versus hard decoding |

`tb_golay_soft_decoder` checks these words:

* words with 0–3 errors must be corrected exactly, without the search;
* words with 4 weak errors must come back exactly;
* words with 4 random errors must give an optimal-score codeword.

It also checks the 28-clock latency and the 12-clock input spacing. It fails
unless every mechanism has occurred: hard-only words, searched words, E_P kept
by the search, E_P replaced, input stalls and full-rate input.

In `tb_golay_ber`, every output must be a codeword. Words with ≤ 3 errors must
match hard decoding, and soft decoding must make fewer word errors than hard
decoding. A typical run gives a message BER of about 3.2e-2 for soft decoding
against 6.6e-2 for hard decoding.

To run a testbench with Verilator (5.x):

    verilator --binary --timing --assert --top-module tb_golay_soft_decoder \
        -y rtl -y tb +libext+.sv rtl/golay_pkg.sv tb/golay_tb_pkg.sv \
        tb/tb_golay_soft_decoder.sv -o sim
    ./obj_dir/sim

Each testbench finishes in seconds.

## Size

A generic synthesis of the top gives about 3.0k flip-flop bits plus the 47-kbit
coset-leader ROM. Most of the logic is in the 22 engines, each with a 23-input
adder and two registers.
