// conv_encoder: rate 1/2, constraint length 3 convolutional encoder.
//
// Each enabled clock encodes one 6-bit word, LSB first, starting from the
// all-zero register state (the registers are flushed before every word). For
// input bit u with previous bits R1, R2 the outputs are V1 = u^R1^R2 and
// V2 = u^R2 (generators 7 and 5 octal). The pair of bit i goes to
// conv_data_out[2i] (V1) and conv_data_out[2i+1] (V2). The six shifts are
// unrolled into one clock; the output is registered and appears one clock
// after conv_data_in while TX is high.
//
// From the description: K = 3, rate 1/2, three registers, flush before each
// word, LSB first. The tap positions are read from the encoder drawing and
// agree with the printed trellis and test vectors; the bit packing of the
// output follows the printed test vectors.
module conv_encoder
  import phy_pkg::*;
(
  input  logic  clk,
  input  logic  nrst,           // asynchronous, active low
  input  logic  TX,             // clock enable
  input  cw_t   conv_data_in,
  output conv_t conv_data_out
);
  conv_t coded;

  always_comb begin
    logic r0, r1, r2;
    r1 = 1'b0;
    r2 = 1'b0;
    coded = '0;
    for (int b = 0; b < 6; b++) begin
      r0 = conv_data_in[b];
      coded[2*b]   = r0 ^ r1 ^ r2;
      coded[2*b+1] = r0 ^ r2;
      r2 = r1;
      r1 = r0;
    end
  end

  always_ff @(posedge clk or negedge nrst) begin
    if (!nrst)   conv_data_out <= '0;
    else if (TX) conv_data_out <= coded;
  end
endmodule
