// phy_baseband_top: IEEE 802.15.4 PHY baseband transmitter and receiver with
// concatenated channel coding.
//
// Transmit chain (clock enables from tx_counter):
//   ppdu_framer -> block_encoder (6,3) -> interleaver 6x6
//   -> conv_encoder (K=3, r=1/2) -> oqpsk_spreader | bpsk_spreader -> tx_buffer
// Receive chain (clock enables from rx_counter):
//   oqpsk_despreader | bpsk_despreader -> viterbi_decoder -> deinterleaver 6x6
//   -> block_decoder (6,3) -> psdu_extractor
//
// bpsk_mode selects the band: 0 uses the 2450 MHz O-QPSK spreading (three
// 32-chip symbols per 12-bit codeword, chips in the low 96 bits of a chip
// word), 1 the 868/915 MHz BPSK spreading (twelve 15-chip bits, all 180
// bits). Only the selected spreader and despreader are enabled. The modulator
// is outside this design: it pops chip words from the TX buffer with
// mod_rd_en, and received chip words (already demodulated to hard chips) come
// back on rx_chips with rx_valid.
//
// Use: write psdu_len octets with psdu_wr, raise tx. The frame occupies
// tx_words chip words once tx_busy falls and the pipeline has drained (ten
// clocks). For reception raise rx, then present the chip words one per
// clock with rx_valid; the PHR and PSDU octets appear on the rx_* outputs
// about 17 clocks after the first word and rx_frame_done pulses after the
// last octet. Words must be presented on consecutive clocks, as a frame is
// decoded in whole 6x6 interleaver blocks.
module phy_baseband_top
  import phy_pkg::*;
(
  input  logic             clk,
  input  logic             nrst,            // asynchronous, active low
  input  logic             bpsk_mode,
  // MAC side, transmit
  input  logic [6:0]       psdu_len,
  input  logic [7:0]       psdu,
  input  logic             psdu_wr,
  input  logic             tx,
  output logic             tx_busy,
  // modulator side, transmit
  input  logic             mod_rd_en,
  output logic [CHIPW-1:0] mod_chips,
  output logic             mod_valid,
  output logic [8:0]       tx_words,
  // demodulator side, receive
  input  logic             rx,
  input  logic             rx_valid,
  input  logic [CHIPW-1:0] rx_chips,
  // MAC side, receive
  output logic [6:0]       rx_psdu_len,
  output logic             rx_len_valid,
  output logic [7:0]       rx_psdu,
  output logic             rx_psdu_valid,
  output logic             rx_sfd_ok,
  output logic             rx_sfd_err,
  output logic             rx_frame_done,
  // receiver status, valid with the stage enables
  output logic             rx_chip_err,     // a despread word held wrong chips
  output logic [3:0]       rx_vit_metric,   // Viterbi distance of the last word
  output logic [2:0]       rx_syndrome      // block syndrome of the last word
);
  // ---------------- transmitter ----------------
  tri_t         f_data;
  logic         f_valid;
  cw_t          blk_cw;
  cw_t          il_word;
  conv_t        cv_word;
  logic [95:0]  chips_oq;
  logic [179:0] chips_bp;
  logic         fl_il, fl_cv, fl_sp, fl_ob;
  logic         tx_q, rx_q;

  always_ff @(posedge clk or negedge nrst) begin
    if (!nrst) begin
      tx_q <= 1'b0;
      rx_q <= 1'b0;
    end else begin
      tx_q <= tx;
      rx_q <= rx;
    end
  end

  ppdu_framer u_framer (
    .clk, .nrst, .psdu_len, .psdu, .psdu_wr, .tx,
    .data(f_data), .data_valid(f_valid), .n_words(), .busy(tx_busy)
  );

  tx_counter u_txcnt (
    .clk, .nrst, .Tx(tx), .data_en(f_valid),
    .flag_interleaver(fl_il), .flag_conv_enc(fl_cv),
    .flag_spreader(fl_sp), .flag_out_buffer(fl_ob)
  );

  block_encoder u_blkenc (.clk, .nrst, .block_data(f_data), .block_out(blk_cw));

  interleaver u_il (.clk, .nrst, .flag_interleaver(fl_il), .code(blk_cw),
                    .interleaved(il_word));

  conv_encoder u_cv (.clk, .nrst, .TX(fl_cv), .conv_data_in(il_word),
                     .conv_data_out(cv_word));

  oqpsk_spreader u_sp_oq (.clk, .nrst, .flag_spreader(fl_sp & ~bpsk_mode),
                          .conv_data_out(cv_word), .spreaded(chips_oq));

  bpsk_spreader u_sp_bp (.clk, .nrst, .flag_spreader(fl_sp & bpsk_mode),
                         .conv_data_out(cv_word), .spreaded(chips_bp));

  tx_buffer #(.DEPTH(360), .W(CHIPW)) u_txbuf (
    .clk, .nrst, .clear(tx & ~tx_q), .wr_en(fl_ob),
    .wr_data(bpsk_mode ? chips_bp : {84'b0, chips_oq}),
    .rd_en(mod_rd_en), .rd_data(mod_chips), .rd_valid(mod_valid), .count(tx_words)
  );

  // ---------------- receiver ----------------
  logic        fl_ds, fl_vt, fl_dil, fl_bd, d_valid;
  conv_t       ds_oq, ds_bp;
  logic [5:0]  ds_dist [3];
  logic [3:0]  ds_ncorr;
  cw_t         vt_word;
  logic [3:0]  vt_metric;
  cw_t         dil_word;
  tri_t        bd_data;
  logic [2:0]  bd_syn;

  rx_counter u_rxcnt (
    .clk, .nrst, .Rx(rx), .flag_ready(rx_valid),
    .flag_despreader(fl_ds), .flag_viterbi(fl_vt),
    .flag_deinterleaver(fl_dil), .flag_block_dec(fl_bd), .dec_valid(d_valid)
  );

  oqpsk_despreader u_ds_oq (.clk, .nrst, .flag_despreader(fl_ds & ~bpsk_mode),
                            .Rx1(rx_chips[95:0]), .symbol_12(ds_oq), .min_dist(ds_dist));

  bpsk_despreader u_ds_bp (.clk, .nrst, .flag_despreader(fl_ds & bpsk_mode),
                           .rx(rx_chips), .bits_12(ds_bp), .n_corrected(ds_ncorr));

  viterbi_decoder u_vit (.clk, .nrst, .RX(fl_vt),
                         .conv_data_rx(bpsk_mode ? ds_bp : ds_oq),
                         .conv_out_rx(vt_word), .path_metric(vt_metric));

  deinterleaver u_dil (.clk, .nrst, .flag_deinterleaver(fl_dil), .code(vt_word),
                       .deinterleaved(dil_word));

  block_decoder u_blkdec (.clk, .nrst, .flag_block_dec(fl_bd), .dec_data(dil_word),
                          .dec_data_out(bd_data), .syndrome(bd_syn));

  always_comb begin
    rx_chip_err = bpsk_mode ? (ds_ncorr != '0)
                            : (ds_dist[0] != '0 || ds_dist[1] != '0 || ds_dist[2] != '0);
  end
  assign rx_vit_metric = vt_metric;
  assign rx_syndrome   = bd_syn;

  psdu_extractor u_ext (
    .clk, .nrst, .clear(rx & ~rx_q), .dec_valid(d_valid), .dec(bd_data),
    .psdu_len(rx_psdu_len), .len_valid(rx_len_valid), .psdu(rx_psdu),
    .psdu_valid(rx_psdu_valid), .sfd_ok(rx_sfd_ok), .sfd_err(rx_sfd_err),
    .frame_done(rx_frame_done)
  );
endmodule
