// bpsk_despreader: despreading of twelve 15-chip BPSK bits.
//
// For each bit (chips in rx[15i+14:15i], c0 in the top bit) two
// Hamming-distance blocks compute b, the distance to the '0' sequence
// 111101011001000, and a, the distance to the '1' sequence
// 000010100110111; the comparator drives the 2:1 multiplexer with a < b,
// so the bit is 1 when the chips are nearer the '1' sequence. The two
// sequences are complements, so a + b = 15 and there is no tie; up to seven
// wrong chips per bit are corrected. Output registered, one clock after rx
// while flag_despreader is high. n_corrected counts bits that held at least
// one wrong chip.
module bpsk_despreader
  import phy_pkg::*;
(
  input  logic         clk,
  input  logic         nrst,              // asynchronous, active low
  input  logic         flag_despreader,   // clock enable
  input  logic [179:0] rx,
  output conv_t        bits_12,
  output logic [3:0]   n_corrected
);
  conv_t      bits_c;
  logic [3:0] ncorr_c;

  always_comb begin
    ncorr_c = '0;
    for (int i = 0; i < 12; i++) begin
      logic [5:0] a, b;
      a = popcount32({17'b0, rx[15*i +: 15] ^ PN_BPSK1});
      b = popcount32({17'b0, rx[15*i +: 15] ^ PN_BPSK0});
      bits_c[i] = (a < b);
      if (a != 0 && b != 0) ncorr_c = ncorr_c + 4'd1;
    end
  end

  always_ff @(posedge clk or negedge nrst) begin
    if (!nrst) begin
      bits_12     <= '0;
      n_corrected <= '0;
    end else if (flag_despreader) begin
      bits_12     <= bits_c;
      n_corrected <= ncorr_c;
    end
  end
endmodule
