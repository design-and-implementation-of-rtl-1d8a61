# IEEE 802.15.4 PHY baseband with concatenated channel coding

This is a digital baseband for an IEEE 802.15.4 (ZigBee) physical layer that adds
forward error correction on top of what the standard requires. The standard's PHY
only spreads each data symbol with a PN sequence. Here the frame first goes through
two codes and an interleaver, and only then through the standard's spreading:

* a (6,3) linear block code (outer code),
* a 6x6 block interleaver,
* a rate 1/2, constraint length 3 convolutional code (inner code).

The receiver undoes each step in reverse order. Despreading picks the nearest PN
sequence. A pipelined Viterbi decoder removes isolated coded-bit errors. The
deinterleaver spreads a burst of up to six wrong bits across six block codewords,
and the block decoder corrects the one error left in each. The target is short links
of about 10–15 m, where one or two correctable bit errors per codeword are enough.

Both chip formats of the 2003 standard are supported and chosen at run time:

* 2450 MHz band: O-QPSK, 16 quasi-orthogonal sequences of 32 chips, 4 bits per symbol.
* 868/915 MHz bands: BPSK, one 15-chip sequence per bit.

The RTL stops at hard chips. Pulse shaping, modulation and the radio are outside it.

## Data path at a glance

```
 MAC ──psdu──► ppdu_framer ──3b──► block_encoder ──6b──► interleaver ──6b──► conv_encoder
                 (1080-bit buf)      (6,3)                 6x6                K=3, r=1/2
                                                                               │ 12b
                                       tx_buffer ◄──96/180 chips── oqpsk_spreader | bpsk_spreader
                                    (360 x 180 bits) ──► modulator (not included)

 demodulator ──chips──► oqpsk_despreader | bpsk_despreader ──12b──► viterbi_decoder ──6b──►
   deinterleaver ──6b──► block_decoder ──3b──► psdu_extractor ──► MAC (length, octets)

 tx_counter / rx_counter: clock enables for every stage, lined up with the stage latencies
```

Each stage handles one word per clock. A frame moves as a stream of 3-bit words:
one 3-bit message becomes one 6-bit codeword, then one 6-bit interleaved word,
then one 12-bit convolutional codeword, then one chip word. A chip word is 96
chips for O-QPSK (3 symbols) or 180 chips for BPSK (12 bits).

## Frame format and bit order

The framer holds a 1080-bit buffer. When `tx` rises it writes the synchronisation
header and the PHR in front of the PSDU octets that the MAC has already written:

| field    | bits | content                          |
|----------|------|----------------------------------|
| preamble | 32   | all zero                         |
| SFD      | 8    | 0xA7 (bits b0..b7 = 1,1,1,0,0,1,0,1) |
| PHR      | 8    | 7-bit length, reserved bit 0     |
| PSDU     | 8·len| 0 … 127 octets                   |

Each octet is sent LSB first. The frame is padded with zeros to a multiple of
18 bits. 18 bits is six 3-bit words, which is exactly one interleaver block after
block coding. A frame with the largest PSDU is 1064 bits, and it pads to 1080 bits,
the size of the buffer.

A lot of this design depends on bit order, and the standard does not fix the order
for the added coding stages. These conventions are used throughout:

* **3-bit word**: the earliest bit in time is in bit 2.
* **Block codeword**: `c[5:3]` is the message. The parity bits are
  `c2 = m2^m1`, `c1 = m2^m0`, `c0 = m1^m0`, from generator rows 100110, 010101 and
  001011. So 110 becomes 110011, and 111 becomes 111000.
* **Interleaver**: the six codewords of a block are the rows. Output word `j`
  (j = 0..5) is column `5-j`. Row `k` lands in bit `5-k` of the output word.
* **Convolutional codeword**: the six input bits are coded LSB first, starting
  from the zero state. The output pair of input bit `i` is
  `{V2,V1} = out[2i+1:2i]`, with `V1 = u^R1^R2` and `V2 = u^R2`. For example,
  110110 → 100010101100.
* **O-QPSK**: symbol `k` is `conv[4k+3:4k]`, with bit `4k` as b0. Its 32 chips
  are in `chips[32k+31:32k]`, with chip c0 (sent first) in the top bit.
* **BPSK**: bit `i` maps to `chips[15i+14:15i]`, with c0 in the top bit. The
  sequence for 0 is 111101011001000, and the sequence for 1 is its complement.

## The Viterbi decoder

Each 12-bit codeword is decoded alone. The encoder restarts from state 00 for every
6-bit word and sends no tail bits, so the decoder knows the starting state, but the
final state is free. Because of this, the decoder is a fixed trellis of six stages,
unrolled into a pipeline. A new codeword enters on every clock.

Each state is named by the last two input bits: a = 00, b = 10 (last bit 1),
c = 01, d = 11. The branches are labelled with the output pair V1V2:

```
 a --00--> a     a --11--> b     b --10--> c     b --01--> d
 c --11--> a     c --00--> b     d --01--> c     d --10--> d
```

* **Stage 1** compares the first pair with 00 and 11. Only states a and b can be
  reached.
* **Stage 2** extends those two states to all four. No state needs a comparison
  yet.
* **Stages 3–6** are add-compare-select stages. Each state adds the branch Hamming
  distance to both of its predecessors and keeps the smaller sum. On a tie it keeps
  the upper predecessor (a or b).
* **Survivors**: every state carries its path metric (4 bits) and the decoded bits
  of its survivor, which grow by one bit per stage. The received word travels down
  the pipeline next to them.
* **Decision stage**: outputs the survivor bits of the state with the smallest
  metric (lowest state on a tie). `path_metric` is the distance between the
  received word and the chosen codeword, so a non-zero value means errors were
  corrected.

The latency is seven enabled clocks: six trellis stages plus the decision stage.
After that, one decoded word comes out per clock. Because the codewords are short
and unterminated, the free distance is not reached. An error in the last pair can
leave a tie. The testbench compares the decoder with an exhaustive nearest-codeword
search instead of assuming every single error is corrected.

## Interleaving, bursts and the block decoder

The interleaver and deinterleaver each have two 6x6 bit buffers and one 0..5
counter:

* On each enabled clock, one word is written into the write buffer. The
  interleaver writes a row; the deinterleaver writes a column.
* At the same time, one word is read from the read buffer. The interleaver reads a
  column; the deinterleaver reads a row.
* When the sixth word of a block is written, the whole block is copied to the read
  buffer.

This gives a continuous stream with a block latency of seven clocks. After the last
block, the enable must stay high for six more clocks to flush it.

A burst of up to six wrong bits inside one received 6-bit word becomes, after
deinterleaving, one wrong bit in each of six codewords. The block decoder fixes each
one in three steps:

1. It computes the syndrome with three XOR trees:
   `s2 = r5^r4^r2`, `s1 = r5^r3^r1`, `s0 = r4^r3^r0`.
2. It looks up an error pattern, using the syndrome as the address. The table holds
   the six single-bit patterns, plus 100001 for syndrome 111.
3. It corrects only the three message bits.

## Control: tx_counter and rx_counter

Every stage register has a clock enable. The enables take the place of the clock
gating that the original low-power implementation used. The two counters generate
the enables from the single "word valid" signal at the front of each chain, delaying
it by the latency in front of each stage.

| transmit enable    | delay after framer `data_valid` |
|--------------------|---------------------------------|
| `flag_interleaver` | 1, held 6 extra clocks (flush)  |
| `flag_conv_enc`    | 8                               |
| `flag_spreader`    | 9                               |
| `flag_out_buffer`  | 10 (TX buffer write)            |

| receive enable       | delay after `rx_valid`          |
|----------------------|---------------------------------|
| `flag_despreader`    | 0                               |
| `flag_viterbi`       | 1, held 7 extra clocks (flush)  |
| `flag_deinterleaver` | 8, held 6 extra clocks (flush)  |
| `flag_block_dec`     | 15                              |
| decoded word valid   | 16                              |

The receiver expects a frame as consecutive chip words, block-aligned and starting
with the first word. There is no preamble search or chip synchronisation.

## Using the top level (`phy_baseband_top`)

1. Select the band with `bpsk_mode`: 0 for O-QPSK, 1 for BPSK. Only the selected
   spreader and despreader are clocked.
2. Write the PSDU, one octet per `psdu_wr` strobe.
3. Set `psdu_len` and raise `tx`. The framer sends the frame while `tx_busy` is
   high. About ten clocks later, the TX buffer holds `tx_words` chip words (24 for a
   one-octet PSDU, 360 for 127 octets).
4. The modulator pops chip words with `mod_rd_en`. Each word appears on
   `mod_chips`, with `mod_valid` one clock later.
5. To receive, raise `rx` (its rising edge restarts the PSDU extractor). Then
   present the chip words on `rx_chips` on consecutive clocks, with `rx_valid`.
6. The receiver reports:
   * `rx_psdu_len` with `rx_len_valid`,
   * each octet on `rx_psdu` with an `rx_psdu_valid` strobe,
   * `rx_sfd_ok` or `rx_sfd_err`,
   * `rx_frame_done` after the last octet.
7. Three status outputs show the corrections: `rx_chip_err`, `rx_vit_metric` and
   `rx_syndrome`.

All resets are asynchronous and active low (`nrst`). Every stage is fully parallel
on one clock, so one chip word is produced or consumed per clock. At the intended
100 MHz clock this is far faster than the air chip rate (2 Mchip/s, or 300/600
kchip/s). The TX buffer and the modulator take up that difference.

## Where this RTL departs from, or fills in, the original description

* **Filled in**: the framer's write strobe and zero padding, the bit orders above,
  and how the two counters work inside. The TX buffer, the PSDU extractor and the
  status outputs are also this design's own; the description only names them or
  gives their function.
* **Chip word width**: the chip word is 180 bits, wide enough for BPSK. O-QPSK uses
  the low 96 bits, which is the spreader width of the original pin interface. The
  mode input that switches between the bands is an addition.
* **Differential encoding**: the standard's BPSK differential encoder is not used.
  The convolutional encoder drives the spreader directly, as in the original
  transmitter drawing.
* **Viterbi survivors**: the original tracks survivors as path addresses that grow
  by one bit per stage. This RTL carries the decoded bits, which hold the same
  information.
* **Viterbi latency**: it is seven clocks. The original quotes 24 clocks from
  enable to first output without saying how they arise.
* **Interleaver counter**: it counts 0..5 (six rows). One drawing shows a
  five-state cycle; the waveforms and the 6x6 size call for six.
* **Clock gating**: it is replaced by clock enables.
* **Not included**: modulation and radio, the PHY management functions (energy
  detection, link quality, CCA) and the MAC.

## Files

* `rtl/phy_pkg.sv`: shared constants (SFD, PN tables), the types and the code
  equations.
* `rtl/<block>.sv`: one module per block, named as in the diagram above.
  `rtl/phy_baseband_top.sv` wires them together.
* `tb/tb_<block>.sv`: a self-checking testbench for each block. Each one prints
  `TB_RESULT checks=N failures=M`, and each computes its expected values
  independently. For example, the PN sequences are rebuilt from the standard's
  shift/conjugate rule, the Viterbi results are checked by exhaustive search, and
  the interleaver is checked with a transpose.
* `tb/tb_phy_baseband_top.sv` runs the whole design at its default sizes. It covers
  both bands and PSDU lengths 0, 1, 20 and 127. It checks every transmitted chip
  word against a reference chain, then loops the chips back with injected errors:
  * up to 5 wrong chips per O-QPSK symbol, or 7 per BPSK bit,
  * a single coded-bit error,
  * a six-bit burst once per block.

  It checks that every PSDU octet comes back and that each correction mechanism
  actually fired.

* `tb/tb_appendix_vectors.sv` sends a one-octet PSDU (0xFF) through the top and
  probes the chain. It checks the block codewords and interleaver columns against
  the reference loopback vectors, the original design's test case. It also checks
  that every receiver stage gives back what the matching transmitter stage sent.

Simulate with Verilator 5, for example:

```
verilator --binary --timing -Irtl -y rtl rtl/phy_pkg.sv tb/tb_phy_baseband_top.sv \
          --top-module tb_phy_baseband_top -o sim && ./obj_dir/sim
```

Substitute any other testbench to run it the same way. Each testbench finishes in
well under a second.
