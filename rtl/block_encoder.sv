// block_encoder: (6,3) systematic linear block encoder.
//
// The three message bits pass to block_out[5:3]; the parity bits are
// block_out[2] = m2^m1, block_out[1] = m2^m0, block_out[0] = m1^m0, the
// combination of the generator rows 100110, 010101 and 001011 (three
// two-input XOR gates). The codeword is registered: it appears one clock
// after block_data. The pins follow the published pin interface; the
// generator matrix is the one the worked example and the test vectors imply.
module block_encoder
  import phy_pkg::*;
(
  input  logic clk,
  input  logic nrst,          // asynchronous, active low
  input  tri_t block_data,
  output cw_t  block_out
);
  always_ff @(posedge clk or negedge nrst) begin
    if (!nrst) block_out <= '0;
    else       block_out <= block_encode(block_data);
  end
endmodule
