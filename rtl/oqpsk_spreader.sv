// oqpsk_spreader: 2450 MHz band symbol-to-chip mapping.
//
// The 12-bit convolutional codeword is cut into three 4-bit data symbols,
// symbol k = conv_data_out[4k+3:4k] (bit 4k is b0). Each symbol selects one
// of the 16 32-chip PN sequences of the standard, a 16x32 look-up table
// followed by 32 multiplexers sharing the symbol as select. Symbol k's chips
// go to spreaded[32k+31:32k], chip c0 in the top bit. The output is
// registered and appears one clock after the input while flag_spreader is
// high. The 96-bit width is the published pin interface.
module oqpsk_spreader
  import phy_pkg::*;
(
  input  logic        clk,
  input  logic        nrst,            // asynchronous, active low
  input  logic        flag_spreader,   // clock enable
  input  conv_t       conv_data_out,
  output logic [95:0] spreaded
);
  always_ff @(posedge clk or negedge nrst) begin
    if (!nrst) spreaded <= '0;
    else if (flag_spreader) begin
      for (int k = 0; k < 3; k++)
        spreaded[32*k +: 32] <= PN_OQPSK[conv_data_out[4*k +: 4]];
    end
  end
endmodule
