// bpsk_spreader: 868/915 MHz band bit-to-chip mapping.
//
// Each of the 12 bits of the convolutional codeword selects one of the two
// 15-chip PN sequences (a 2x15 look-up table and 15 multiplexers per bit,
// the bit being the common select). Bit i's chips go to
// spreaded[15i+14:15i], chip c0 in the top bit. The standard also
// differentially encodes the bits before spreading (E_n = R_n ^ E_{n-1});
// the convolutional code is used here instead, as in the described
// transmitter, so no differential encoder is placed. Output registered, one
// clock after the input while flag_spreader is high.
module bpsk_spreader
  import phy_pkg::*;
(
  input  logic         clk,
  input  logic         nrst,            // asynchronous, active low
  input  logic         flag_spreader,   // clock enable
  input  conv_t        conv_data_out,
  output logic [179:0] spreaded
);
  always_ff @(posedge clk or negedge nrst) begin
    if (!nrst) spreaded <= '0;
    else if (flag_spreader) begin
      for (int i = 0; i < 12; i++)
        spreaded[15*i +: 15] <= conv_data_out[i] ? PN_BPSK1 : PN_BPSK0;
    end
  end
endmodule
