// tb_appendix_vectors: the published loopback test case through the whole
// top level. A one-octet PSDU (0xFF) is sent in the O-QPSK band and looped
// back without errors. Inside the transmitter, the block encoder's first 18
// codewords must be the published sequence (ten 000000, then 001011 110011
// 010101 110011 000000 000000 111000 111000) and the interleaver's second and
// third blocks the published column words. Inside the receiver, the Viterbi
// output must equal the transmitted interleaved words, the deinterleaver
// output the transmitted codewords, and the decoded PSDU must be 0xFF.
module tb_appendix_vectors;
  import phy_pkg::*;
  logic             clk = 0, nrst = 0, bpsk_mode = 0;
  logic [6:0]       psdu_len = '0;
  logic [7:0]       psdu = '0;
  logic             psdu_wr = 0, tx = 0, tx_busy;
  logic             mod_rd_en = 0, mod_valid;
  logic [CHIPW-1:0] mod_chips;
  logic [8:0]       tx_words;
  logic             rx = 0, rx_valid = 0;
  logic [CHIPW-1:0] rx_chips = '0;
  logic [6:0]       rx_psdu_len;
  logic             rx_len_valid, rx_psdu_valid, rx_sfd_ok, rx_sfd_err, rx_frame_done;
  logic [7:0]       rx_psdu;
  logic             rx_chip_err;
  logic [3:0]       rx_vit_metric;
  logic [2:0]       rx_syndrome;
  int checks = 0, failures = 0;

  phy_baseband_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // probes: sample each stage output while the next stage's enable marks it
  // valid; nothing is sampled while reset is held
  cw_t tx_cw [$], tx_il [$], rx_vt [$], rx_dil [$];
  always @(posedge clk) if (nrst) begin
    if (dut.u_txcnt.dly[1]) tx_cw.push_back(dut.blk_cw);
    if (dut.fl_cv)          tx_il.push_back(dut.il_word);
    if (dut.u_rxcnt.dly[8]) rx_vt.push_back(dut.vt_word);
    if (dut.fl_bd)          rx_dil.push_back(dut.dil_word);
  end

  task automatic expect_eq(cw_t got, cw_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b exp %b", what, got, exp);
    end
  endtask

  initial begin
    static cw_t pub_cw [18] = '{6'o00, 6'o00, 6'o00, 6'o00, 6'o00, 6'o00, 6'o00, 6'o00, 6'o00, 6'o00,
                         6'b001011, 6'b110011, 6'b010101, 6'b110011, 6'b000000, 6'b000000,
                         6'b111000, 6'b111000};
    static cw_t pub_il [12] = '{6'b000001, 6'b000001, 6'b000010, 6'b000000, 6'b000011, 6'b000011,
                         6'b010011, 6'b110011, 6'b000011, 6'b100000, 6'b010000, 6'b110000};
    logic [CHIPW-1:0] words [$];
    logic [7:0] got [$];
    repeat (2) @(posedge clk);
    nrst = 1;
    @(negedge clk) psdu_wr = 1; psdu = 8'hFF;
    @(negedge clk) psdu_wr = 0; psdu_len = 7'd1; tx = 1;
    repeat (60) @(negedge clk);
    tx = 0;
    checks++;
    if (tx_words != 9'd24 || tx_cw.size() != 24 || tx_il.size() != 24) begin
      failures++;
      $display("FAIL sizes: words %0d cw %0d il %0d", tx_words, tx_cw.size(), tx_il.size());
    end
    for (int i = 0; i < 18; i++) expect_eq(tx_cw[i], pub_cw[i], $sformatf("codeword %0d", i));
    for (int i = 0; i < 12; i++) expect_eq(tx_il[6 + i], pub_il[i], $sformatf("interleaved %0d", 6 + i));
    mod_rd_en = 1;
    for (int w = 0; w < 26; w++) begin
      @(posedge clk); #1;
      if (mod_valid) words.push_back(mod_chips);
    end
    @(negedge clk) mod_rd_en = 0; rx = 1;
    @(negedge clk);
    foreach (words[w]) begin
      rx_valid = 1; rx_chips = words[w];
      @(negedge clk);
    end
    rx_valid = 0;
    for (int t = 0; t < 40; t++) begin
      @(posedge clk); #1;
      if (rx_psdu_valid) got.push_back(rx_psdu);
    end
    checks++;
    if (rx_vt.size() != 24 || rx_dil.size() != 24) begin
      failures++; $display("FAIL rx sizes %0d %0d", rx_vt.size(), rx_dil.size());
    end
    for (int i = 0; i < 24 && i < rx_vt.size(); i++) expect_eq(rx_vt[i], tx_il[i], $sformatf("viterbi %0d", i));
    for (int i = 0; i < 24 && i < rx_dil.size(); i++) expect_eq(rx_dil[i], tx_cw[i], $sformatf("deinterleaved %0d", i));
    checks++;
    if (got.size() != 1 || got[0] !== 8'hFF || rx_psdu_len != 7'd1 || !rx_sfd_ok) begin
      failures++; $display("FAIL decoded PSDU");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
