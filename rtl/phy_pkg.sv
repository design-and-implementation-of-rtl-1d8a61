// phy_pkg: constants, types and small functions shared by the IEEE 802.15.4
// baseband transmitter and receiver.
//
// Holds the frame constants (32-bit all-zero preamble, SFD 0xA7, 7-bit frame
// length), the 16 O-QPSK PN sequences of the 2450 MHz band and the two BPSK
// PN sequences of the 868/915 MHz band exactly as the standard lists them,
// the (6,3) block code equations and the convolutional encoder equations.
//
// Bit-order conventions used across the design (this design's choice where
// the standard is silent):
//  * A 3-bit data word from the framer holds the earliest bit in time in
//    bit 2. The block codeword keeps those three bits in c[5:3].
//  * A 6-bit word entering the convolutional encoder is coded LSB first;
//    the output pair of input bit i sits at out[2i+1:2i] with V1 in out[2i]
//    and V2 in out[2i+1].
//  * A 32-chip PN word holds chip c0 (sent first) in bit 31; a 15-chip BPSK
//    word holds c0 in bit 14, matching the printed order of the tables.
package phy_pkg;

  localparam logic [7:0]  SFD           = 8'hA7;   // b0..b7 = 1,1,1,0,0,1,0,1
  localparam int unsigned HDR_BITS      = 48;      // preamble + SFD + PHR
  localparam int unsigned MAX_PSDU      = 127;     // octets

  localparam int unsigned CHIPW         = 180;     // widest chip word (12 x 15 BPSK chips)

  typedef logic [2:0]  tri_t;       // message word of the block code
  typedef logic [5:0]  cw_t;        // block codeword / interleaver word
  typedef logic [11:0] conv_t;      // convolutional codeword of one 6-bit word

  // 2450 MHz band: symbol-to-chip table, chip c0 in bit 31.
  localparam logic [31:0] PN_OQPSK [16] = '{
    32'b11011001110000110101001000101110,
    32'b11101101100111000011010100100010,
    32'b00101110110110011100001101010010,
    32'b00100010111011011001110000110101,
    32'b01010010001011101101100111000011,
    32'b00110101001000101110110110011100,
    32'b11000011010100100010111011011001,
    32'b10011100001101010010001011101101,
    32'b10001100100101100000011101111011,
    32'b10111000110010010110000001110111,
    32'b01111011100011001001011000000111,
    32'b01110111101110001100100101100000,
    32'b00000111011110111000110010010110,
    32'b01100000011101111011100011001001,
    32'b10010110000001110111101110001100,
    32'b11001001011000000111011110111000
  };

  // 868/915 MHz band: bit-to-chip table, chip c0 in bit 14.
  localparam logic [14:0] PN_BPSK0 = 15'b111101011001000;
  localparam logic [14:0] PN_BPSK1 = 15'b000010100110111;

  // (6,3) systematic code: c[5:3] = m, parity from the generator matrix
  // rows 100110, 010101, 001011.
  function automatic cw_t block_encode(tri_t m);
    return {m, m[2] ^ m[1], m[2] ^ m[0], m[1] ^ m[0]};
  endfunction

  // Syndrome of a received codeword: H^T rows 110,101,011,100,010,001.
  function automatic logic [2:0] block_syndrome(cw_t r);
    return {r[5] ^ r[4] ^ r[2], r[5] ^ r[3] ^ r[1], r[4] ^ r[3] ^ r[0]};
  endfunction

  // Number of ones in a word of up to 32 bits.
  function automatic logic [5:0] popcount32(logic [31:0] v);
    logic [5:0] n;
    n = '0;
    for (int i = 0; i < 32; i++) n += 6'(v[i]);
    return n;
  endfunction

endpackage
