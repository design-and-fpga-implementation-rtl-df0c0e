# Baseband 16-QAM modem with convolutional and differential coding

This is a small baseband modem of the kind used in the coding and
modulation stage of a WiMAX (IEEE 802.16) physical layer. The transmitter
protects the information bits with a rate-1/2 convolutional code and then
differentially encodes the coded stream. It groups the result four bits
at a time into Gray-coded 16-QAM symbols. The receiver reverses each step.
It turns every received I/Q sample into four bits with a simplified soft-bit
(piecewise-linear log-likelihood) demapper, serialises them, undoes the
differential coding and pairs the bits. A hard-decision Viterbi decoder
then recovers the information bits.

The modem stops at complex baseband symbols. The rest of an 802.16 PHY is
not part of it: interleaving, OFDM (IFFT/FFT), cyclic prefix, DAC/ADC, RF
conversion, synchronisation and channel estimation. The channel between
transmitter and receiver is also outside the RTL. The testbenches model
it as added noise.

## Signal chain

```
 tx_bit ─► conv_encoder ─► tx_par2ser ─► diff_encoder ─► tx_ser2par ─► qam16_mapper ─► tx_i, tx_q
           (K=3, 1/2)      (2 → 1)       y=y₋₁⊕x          (1 → 4)       (2 ROMs)

 rx_i, rx_q ─► qam16_demapper ─► rx_par2ser ─► diff_decoder ─► rx_ser2par ─► viterbi_decoder ─► rx_bit
               (4 soft-bit units) (4 → 1)       x=y₋₁⊕y         (1 → 2)       (4 states)         └► rs232_dte_txd
```

`wimax_modem` is the top. It holds both chains side by side. `tx_i`/`tx_q`
leave the module and `rx_i`/`rx_q` enter it, so any channel model (or a
plain loopback wire) can sit between them. The decoded bit stream also
drives `rs232_dte_txd`. That pin is meant to reach a serial-port level
translator so the stream can be watched on an oscilloscope. It carries the
raw bit stream, not UART characters.

| block | what it does |
|---|---|
| `conv_encoder` | rate 1/2, constraint length 3, generators G1 = 110, G2 = 111: v1 = u ⊕ u₋₁, v2 = u ⊕ u₋₁ ⊕ u₋₂ |
| `tx_par2ser` | sends each code pair as two serial bits, v1 first |
| `diff_encoder` | y_i = y_{i-1} ⊕ x_i (one register, one XOR) |
| `tx_ser2par` | four-stage shift register and an output word register loaded every fourth bit |
| `qam16_mapper` | two 16-entry ROMs (I and Q) addressed by the 4-bit word, one cycle of latency |
| `qam16_demapper` | four soft-bit units, concatenated as {b0, b1, b2, b3} |
| `soft_bit_b0` | soft bit of an axis' outer bit (b0 on I, b2 on Q) |
| `soft_bit_b1` | soft bit of an axis' inner bit (b1 on I, b3 on Q) |
| `rx_par2ser` | counter-driven registered 4:1 multiplexer, b0 first |
| `diff_decoder` | x_i = y_{i-1} ⊕ y_i |
| `rx_ser2par` | pairs serial bits: first bit → `d[0]` (first code input), second → `d[1]` |
| `viterbi_decoder` | 4-state hard-decision Viterbi decoder, register-exchange survivors |
| `modem_pkg` | code generators, sample format and the Gray level function |

## Bit order through the chain

Bit order is the part of this design most easily broken by a change. Every
stage has to agree on it for the loop to close. The convention is:

* **Code pairs.** `code[0]` is v1 (generator G1 = 110) and `code[1]` is v2
  (G2 = 111). v1 goes on the line first. In the receiver the first bit of a
  pair becomes `d[0]`, which feeds `data_in0` (the G1 input) of the decoder.
* **Symbol words.** The word is D0 D1 D2 D3, with D0 in bit 3. D0 is the
  first serial bit of its group of four. D0 D1 select the in-phase level and
  D2 D3 the quadrature level.
* **Gray mapping**, for each axis separately:

  | first, second bit | 00 | 01 | 11 | 10 |
  |---|---|---|---|---|
  | level | −3 | −1 | +1 | +3 |

  For example, word 0010 is the point (−3, +3) and 1000 is (+3, −3).
  Neighbouring points differ in one bit.
* **Demapped words.** The demapper returns {b0, b1, b2, b3} with b0 in
  bit 3, which is the same layout as D0..D3. `rx_par2ser` sends bit 3 first.
* **Framing.** Groups of two (pairs) and four (symbols) are aligned to the
  first bit after reset. No frame marker is sent. Both ends must be reset
  together, and every stream must end on a whole symbol. A stream of an even
  number of information bits gives whole symbols.

## The soft-bit demapper

Each received coordinate y (in units of the constellation level, so the
points sit at ±1 and ±3) gives two soft bits. They are piecewise-linear
approximations of the bits' log-likelihood ratios:

```
outer bit (b0 from I, b2 from Q)          inner bit (b1 from I, b3 from Q)
  sb = 2(y+1)   for y < -2                  sb = y + 2   for y <= 0
  sb = y        for -2 <= y < 2             sb = 2 - y   for y > 0
  sb = 2(y-1)   for y >= 2
```

The hard bit is `sb >= 0`. For the outer bit that is the sign of y. For
the inner bit it is |y| ≤ 2. Each unit is a pair of compares, two
add-and-double paths and two multiplexers, followed by an output register
with an enable. The doubling is a one-bit shift. The soft values are kept
and brought out of the top on `rx_soft` (b0 in the top 10-bit field). The
Viterbi decoder uses only the hard bits, as in the design this follows.

**Number format.** Samples are 8-bit two's complement with 4 fractional
bits (`SAMPLE_W`, `FRAC_W` in `modem_pkg`). Level 1.0 is 16, the points
are ±16 and ±48, and the range is −8 to +7.94. Soft values are two bits
wider, so 2(y ± 1) never overflows. This format is a choice of this
implementation.

## Differential coding

The encoder is recursive, y_i = y_{i-1} ⊕ x_i. The decoder is
feed-forward, x_i = y_{i-1} ⊕ y_i. The decoded bit depends only on whether
two consecutive received bits differ. So if a wrongly recovered carrier
inverts the whole bit stream, every bit after the first still decodes
correctly. `tb_diff_decoder` checks this.

This is where the RTL departs from the circuits it was drawn from. There,
the transmitter's circuit XORs the input with its own delayed copy (a
feed-forward structure). The receiver's circuit feeds its output back
through the delay (a recursive structure). The stated equations and the
stated purpose (immunity to stream inversion) both need the opposite
pairing, so that pairing is the one implemented. Swapping the two modules'
bodies gives the drawn version. The loop still closes, but an inverted
stream is then no longer decoded correctly.

## The Viterbi decoder

The code has four trellis states: the last two encoder inputs, the most
recent in the top bit. For every received pair the decoder:

1. computes the Hamming distance between the pair and the code word of
   each of the 8 branches;
2. for each state, adds these to the metrics of its two predecessors and
   keeps the smaller sum. On a tie it keeps the predecessor whose oldest bit
   is 0;
3. copies the winner's survivor register, shifted by one, with the new
   input bit appended (register exchange);
4. outputs the oldest bit of the survivor of the state with the smallest
   new metric.

Metrics are renormalised every step by subtracting the previous minimum.
Decoding starts in state 0, with the other states' metrics set high. The
survivor depth `TB_DEPTH` is 15 (five constraint lengths) and the metric
width `PM_W` is 6. Both are this design's choices. The original used a
vendor Viterbi core whose traceback length is not known.

**Latency.** No output appears until `TB_DEPTH` pairs have arrived. After
that, each pair yields one bit one clock later. That bit belongs to the pair
received `TB_DEPTH − 1` pairs earlier. To get the last information bits
out, append `TB_DEPTH` zero bits after the data. The encoder then also
returns to state 0.

## What the coding can and cannot correct

The code G1 = 110, G2 = 111 (octal 6, 7) has free distance 4, not 5. The
input pattern 1 1 produces code pairs 11 00 10 01. The differential
decoder turns each channel bit error into two adjacent errors. So:

* An error on an **inner** bit (b1 or b3) puts its two errors into two
  different code pairs. This always decodes correctly when the errors are
  isolated. The end-to-end testbench injects about 100 of these and
  requires every information bit to come back.
* An error on an **outer** bit (b0 or b2) puts both errors into the same
  code pair. That can tie with a wrong path of weight 4, and the decoder
  may then output a short burst of wrong bits.

Because of this, hard-decision decoding behind a differential decoder gains
little against Gaussian noise. `tb_awgn_sweep` measured the following bit
error rates, over 20,000 bits per level, with σ in level units:

| σ | raw BER (hard decisions on symbols) | decoded BER |
|---|---|---|
| 0 | 0 | 0 |
| 0.35 | 9.0e-4 | 9.5e-4 |
| 0.45 | 8.2e-3 | 6.6e-3 |
| 0.60 | 3.3e-2 | 5.0e-2 |

Better error rates need changes to the design. One would be to feed the
soft values (already computed) to a soft-decision decoder, which needs
the differential coding to move or go. Another would be a code with
larger free distance. The G2 = 111 code, paired with G1 = 101, has free
distance 5. Both generators are parameters of `conv_encoder` and
`viterbi_decoder`.

## Timing and flow control

Everything runs on one clock, `clk`, with a synchronous active-high reset,
`rst`. Each stage passes a valid strobe with its data. The original design
instead aligned a multirate model with fixed enable delays.

* **Transmitter.** `tx_bit` is taken when `tx_bit_valid && tx_bit_ready`.
  The 2:1 serialiser limits input to one bit every two clocks. At that rate
  the serial line runs without gaps, and a symbol leaves every four clocks
  with `tx_iq_valid` high for one cycle. `tx_i`/`tx_q` have no back-pressure.
  Whatever follows must take each symbol when it is valid.
* **Receiver.** A symbol is taken when `rx_iq_valid && rx_iq_ready`, at
  most one every four clocks. `rx_iq_ready` looks one cycle ahead, because
  the demapper adds a cycle before `rx_par2ser`. An assertion flags a word
  reaching a busy serialiser. Each decoded bit comes with `rx_bit_valid`.
* **Latencies.** Measured from the clock edge on which the input is
  accepted:
  * encoder: 1 clock
  * differential coder/decoder: 1 clock each
  * mapper: 1 clock
  * demapper: 1 clock
  * serialisers and deserialisers: 1 clock after the last bit of a group
  * Viterbi decoder: see above.

## Parameters

| parameter | default | where | source |
|---|---|---|---|
| `K` | 3 | `conv_encoder`, `viterbi_decoder` | code definition |
| `G1`, `G2` | 110, 111 | same | code definition |
| `SAMPLE_W`, `FRAC_W` | 8, 4 | mapper, demapper, top | this design |
| `TB_DEPTH` | 15 | `viterbi_decoder`, top | this design |
| `PM_W` | 6 | `viterbi_decoder` | this design |

`viterbi_decoder` works for any K. `conv_encoder` does too. The
serialisers and the 16-QAM blocks are fixed to this modem's 2-bit and
4-bit groupings.

At the defaults, coarse synthesis of the whole modem gives 92 flip-flop
bits, 340 bits of ROM/array storage and no multipliers. The FPGA build
this design follows reported 269 flip-flops, 270 LUTs, three block RAMs
and four 18×18 multipliers on a Spartan-3AN. The multipliers there did the
doublings in the soft-bit units, which are shifts here.

## Departures and choices, in one place

* The differential encoder and decoder follow their equations rather than
  the circuits drawn for them (see above).
* The Viterbi decoder is this design's own implementation of the algorithm
  for the given code (hard decisions, register exchange, depth 15). The
  original used a vendor IP core.
* The serial-to-parallel converter's load strobe comes from a bit counter.
  The original drew an LFSR there.
* Bit orders inside pairs and words are chosen as described above. They are
  consistent end to end.
* Valid/ready signalling replaces the original's fixed enable delays.
* Not included: the random bit source and the AWGN channel (simulation
  models, provided by the testbenches), the RS-232 level translator
  (analog), and the surrounding OFDM PHY blocks.

## Files and simulation

`rtl/` holds one module or package per file. `modem_pkg.sv` must be
compiled first. `tb/` holds one self-checking testbench per block
(`tb_<module>.sv`) plus `tb_awgn_sweep.sv`. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

```sh
# one block
verilator --binary --timing --assert -Irtl -y rtl rtl/modem_pkg.sv \
          tb/tb_viterbi_decoder.sv --top-module tb_viterbi_decoder -o sim
./obj_dir/sim

# whole modem end to end, defaults: 6000 bits with injected errors and stalls
verilator --binary --timing --assert -Irtl -y rtl rtl/modem_pkg.sv \
          tb/tb_wimax_modem.sv --top-module tb_wimax_modem -o sim
./obj_dir/sim

# lint one module
verilator --lint-only -Wall -Irtl -y rtl rtl/modem_pkg.sv rtl/wimax_modem.sv
```

What the testbenches establish:

* **Reference models.** Each block is checked against a reference written
  in the testbench from the defining equations or tables. These cover the
  code equations, Gray table, soft-bit formulas and bit orders. The soft-bit
  units are checked over all 256 input values.
* **Throughput.** Full-rate throughput is checked for the serialisers and
  the transmitter.
* **Decoder.** The Viterbi decoder must correct isolated single errors,
  about 250 of them, and meet its exact output latency.
* **End to end.** `tb_wimax_modem` runs the top at its default parameters.
  It requires every bit to come back through noise plus injected inner-bit
  errors. It also requires transmitter and receiver stalls to have occurred.
* **Noise sweep.** `tb_awgn_sweep` produces the table above.
