// tx_counter: enable sequencer of the transmit chain.
//
// While Tx is high, the framer's data_en marks the clocks on which a 3-bit
// word leaves the framer. The counter turns that window into the enables of
// the later stages, each delayed by the latency in front of it: the block
// encoder registers every clock (1), the interleaver holds a block for seven
// clocks, and the convolutional encoder and the spreader register once each.
//   flag_interleaver : data_en delayed 1, held 6 clocks longer to read out
//                      the last block
//   flag_conv_enc    : data_en delayed 8
//   flag_spreader    : data_en delayed 9
//   flag_out_buffer  : data_en delayed 10 (write strobe of the TX buffer)
// A 3-bit down counter times the six extra interleaver clocks; a shift
// register carries data_en. The pin names follow the published pin
// interface; what the counter does inside is this design's choice.
module tx_counter (
  input  logic clk,
  input  logic nrst,        // asynchronous, active low
  input  logic Tx,
  input  logic data_en,
  output logic flag_interleaver,
  output logic flag_conv_enc,
  output logic flag_spreader,
  output logic flag_out_buffer
);
  logic [10:1] dly;
  logic [2:0]  flush;

  always_ff @(posedge clk or negedge nrst) begin
    if (!nrst) begin
      dly   <= '0;
      flush <= '0;
    end else begin
      dly <= {dly[9:1], data_en & Tx};
      if (dly[1])            flush <= 3'd6;
      else if (flush != '0)  flush <= flush - 3'd1;
    end
  end

  assign flag_interleaver = dly[1] | (flush != '0);
  assign flag_conv_enc    = dly[8];
  assign flag_spreader    = dly[9];
  assign flag_out_buffer  = dly[10];
endmodule
