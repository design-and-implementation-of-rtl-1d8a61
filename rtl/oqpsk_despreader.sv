// oqpsk_despreader: maximum-likelihood despreading of three 32-chip symbols.
//
// For each of the three symbols in Rx1 (symbol k in Rx1[32k+31:32k], chip c0
// in the top bit) sixteen Hamming-distance blocks compare the received chips
// with the 16 PN sequences of the look-up table, and a comparator returns the
// 4-bit index of the smallest distance (on a tie the lower index wins; a
// zero distance is simply the smallest). The three indices form symbol_12,
// the received convolutional codeword, registered one clock after Rx1 while
// flag_despreader is high. Any five wrong chips per symbol are corrected,
// since the sequences differ in at least twelve chips.
module oqpsk_despreader
  import phy_pkg::*;
(
  input  logic        clk,
  input  logic        nrst,              // asynchronous, active low
  input  logic        flag_despreader,   // clock enable
  input  logic [95:0] Rx1,
  output conv_t       symbol_12,
  output logic [5:0]  min_dist [3]       // distance of the chosen sequence
);
  conv_t      sym_c;
  logic [5:0] dist_c [3];

  always_comb begin
    for (int k = 0; k < 3; k++) begin
      logic [5:0] best;
      logic [3:0] idx;
      best = 6'd63;
      idx  = '0;
      for (int s = 0; s < 16; s++) begin
        logic [5:0] d;
        d = popcount32(Rx1[32*k +: 32] ^ PN_OQPSK[s]);
        if (d < best) begin
          best = d;
          idx  = 4'(s);
        end
      end
      sym_c[4*k +: 4] = idx;
      dist_c[k] = best;
    end
  end

  always_ff @(posedge clk or negedge nrst) begin
    if (!nrst) begin
      symbol_12 <= '0;
      for (int k = 0; k < 3; k++) min_dist[k] <= '0;
    end else if (flag_despreader) begin
      symbol_12 <= sym_c;
      for (int k = 0; k < 3; k++) min_dist[k] <= dist_c[k];
    end
  end
endmodule
