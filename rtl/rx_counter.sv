// rx_counter: enable sequencer of the receive chain.
//
// flag_ready marks the clocks on which a received chip word is presented
// (while Rx is high). The enables of the later stages are that window
// delayed by the latency in front of each stage:
//   flag_despreader    : flag_ready itself
//   flag_viterbi       : delayed 1, held 7 clocks longer to empty the
//                        seven-stage Viterbi pipeline
//   flag_deinterleaver : delayed 8, held 6 clocks longer to read out the
//                        last block
//   flag_block_dec     : delayed 15
//   dec_valid          : delayed 16, a decoded 3-bit word is valid
// The pin names follow the published pin interface (dec_valid and
// flag_despreader are added); the inside is this design's choice.
module rx_counter (
  input  logic clk,
  input  logic nrst,        // asynchronous, active low
  input  logic Rx,
  input  logic flag_ready,
  output logic flag_despreader,
  output logic flag_viterbi,
  output logic flag_deinterleaver,
  output logic flag_block_dec,
  output logic dec_valid
);
  logic [16:1] dly;
  logic [2:0]  flush_v, flush_d;

  always_ff @(posedge clk or negedge nrst) begin
    if (!nrst) begin
      dly     <= '0;
      flush_v <= '0;
      flush_d <= '0;
    end else begin
      dly <= {dly[15:1], flag_ready & Rx};
      if (dly[1])              flush_v <= 3'd7;
      else if (flush_v != '0)  flush_v <= flush_v - 3'd1;
      if (dly[8])              flush_d <= 3'd6;
      else if (flush_d != '0)  flush_d <= flush_d - 3'd1;
    end
  end

  assign flag_despreader    = flag_ready & Rx;
  assign flag_viterbi       = dly[1] | (flush_v != '0);
  assign flag_deinterleaver = dly[8] | (flush_d != '0);
  assign flag_block_dec     = dly[15];
  assign dec_valid          = dly[16];
endmodule
