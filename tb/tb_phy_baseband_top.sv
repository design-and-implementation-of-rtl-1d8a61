// tb_phy_baseband_top: end-to-end loopback of the whole baseband at its
// default sizes.
//
// For each frame the testbench writes a PSDU, lets the transmitter build the
// frame, reads every chip word from the TX buffer and compares it with a
// reference chain written here (frame bits, generator-matrix block code,
// 6x6 transpose, shift-register convolutional code, PN sequences built from
// the shift/conjugate rule or the BPSK pair). It then feeds the chip words,
// with injected errors, to the receiver and checks the recovered length and
// PSDU octets. Injected errors, each within what the coding guarantees:
//   chip errors   up to 5 wrong chips per O-QPSK symbol, up to 7 per BPSK bit
//                 (corrected by the despreaders)
//   coded bit     one wrong bit in the first pair of a convolutional
//                 codeword, only where an exhaustive search shows the nearest
//                 codeword is still the sent one (corrected by Viterbi)
//   burst         all six bits of one interleaved word inverted, at most one
//                 word per 6x6 block (one error per block codeword after
//                 deinterleaving, corrected by the block decoder)
// Frames cover both bands (mode switch), PSDU lengths 0, 1, 20 and the
// maximum 127 octets (full 1080-bit frame buffer, full TX buffer). Every
// mechanism must be seen at least once.
module tb_phy_baseband_top;
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
  int n_chip_fix = 0, n_vit_fix = 0, n_blk_fix = 0, n_bpsk = 0, n_oqpsk = 0, n_max = 0;
  int inj_chip = 0, inj_coded = 0, inj_burst = 0;
  logic [31:0] pn [16];
  localparam logic [14:0] ZERO_SEQ = 15'b111101011001000;

  phy_baseband_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism monitors: a stage's status output is new one clock after its enable
  logic ds_q, vt_q, bd_q;
  always @(posedge clk) begin
    if (ds_q && rx_chip_err) n_chip_fix++;
    if (vt_q && rx_vit_metric != 0) n_vit_fix++;
    if (bd_q && rx_syndrome != 0) n_blk_fix++;
    ds_q <= dut.fl_ds;
    vt_q <= dut.fl_vt;
    bd_q <= dut.fl_bd;
  end

  // ---------------- reference chain ----------------
  function automatic cw_t ref_block(tri_t m);
    cw_t c = '0;
    if (m[2]) c ^= 6'b100110;
    if (m[1]) c ^= 6'b010101;
    if (m[0]) c ^= 6'b001011;
    return c;
  endfunction

  function automatic conv_t ref_conv(cw_t d);
    logic r1, r2;
    conv_t o;
    r1 = 0; r2 = 0;
    for (int i = 0; i < 6; i++) begin
      o[2*i] = d[i] ^ r1 ^ r2;
      o[2*i+1] = d[i] ^ r2;
      r2 = r1; r1 = d[i];
    end
    return o;
  endfunction

  function automatic logic [CHIPW-1:0] ref_spread(conv_t c, bit bp);
    logic [CHIPW-1:0] v = '0;
    if (bp) for (int i = 0; i < 12; i++) v[15*i +: 15] = c[i] ? ~ZERO_SEQ : ZERO_SEQ;
    else    for (int k = 0; k < 3; k++) v[32*k +: 32] = pn[c[4*k +: 4]];
    return v;
  endfunction

  // true when the nearest codeword to r is unique and equals enc(d)
  function automatic bit unique_ml(conv_t r, cw_t d);
    int best = 99, nbest = 0, bd = 0;
    for (int c = 0; c < 64; c++) begin
      int dd = $countones(r ^ ref_conv(cw_t'(c)));
      if (dd < best) begin best = dd; nbest = 1; bd = c; end
      else if (dd == best) nbest++;
    end
    return nbest == 1 && bd == int'(d);
  endfunction

  task automatic run_frame(bit bp, int len, bit errors);
    bit bits [$];
    logic [7:0] oct [$], got [$];
    tri_t tri_w [$];
    cw_t  cw [$], il [$];
    logic [CHIPW-1:0] chips [$], rxw [$];
    int nw, c;
    logic [7:0] sfd_bits = 8'hA7;

    bpsk_mode = bp;
    if (bp) n_bpsk++; else n_oqpsk++;
    if (len == 127) n_max++;
    for (int i = 0; i < len; i++) oct.push_back((len == 1) ? 8'hFF : 8'($urandom));
    // reference frame
    for (int i = 0; i < 32; i++) bits.push_back(0);
    for (int i = 0; i < 8; i++) bits.push_back(sfd_bits[i]);
    for (int i = 0; i < 7; i++) bits.push_back(len[i]);
    bits.push_back(0);
    foreach (oct[k]) for (int i = 0; i < 8; i++) bits.push_back(oct[k][i]);
    while (bits.size() % 18 != 0) bits.push_back(0);
    nw = bits.size() / 3;
    for (int w = 0; w < nw; w++) begin
      tri_w.push_back({bits[3*w], bits[3*w+1], bits[3*w+2]});
      cw.push_back(ref_block(tri_w[w]));
    end
    for (int w = 0; w < nw; w++) begin
      cw_t x;
      for (int k = 0; k < 6; k++) x[5-k] = cw[(w / 6) * 6 + k][5 - (w % 6)];
      il.push_back(x);
    end

    // transmit
    foreach (oct[k]) begin
      @(negedge clk) psdu_wr = 1; psdu = oct[k];
    end
    @(negedge clk) psdu_wr = 0; psdu_len = 7'(len); tx = 1;
    @(negedge clk);
    c = 0;
    while ((tx_busy || c < 12) && c < 2000) begin
      @(negedge clk);
      if (!tx_busy) c++;
    end
    tx = 0;
    checks++;
    if (tx_words != 9'(nw)) begin
      failures++; $display("FAIL frame len %0d: tx_words %0d exp %0d", len, tx_words, nw);
    end
    mod_rd_en = 1;
    for (int w = 0; w < nw + 2; w++) begin
      @(posedge clk); #1;
      if (mod_valid) chips.push_back(mod_chips);
    end
    @(negedge clk) mod_rd_en = 0;
    for (int w = 0; w < nw; w++) begin
      checks++;
      if (w >= chips.size() || chips[w] !== ref_spread(ref_conv(il[w]), bp)) begin
        failures++;
        if (failures < 10) $display("FAIL chip word %0d of frame len %0d", w, len);
      end
    end

    // channel: inject errors
    for (int w = 0; w < nw; w++) begin
      logic [CHIPW-1:0] v;
      v = (w < chips.size()) ? chips[w] : '0;
      if (errors) begin
        if (w % 18 == 9) begin
          // burst: the whole interleaved word inverted
          v = ref_spread(ref_conv(il[w] ^ 6'h3f), bp);
          inj_burst++;
        end else if (w % 6 == 2) begin
          conv_t r;
          r = ref_conv(il[w]) ^ conv_t'(1 << $urandom_range(1, 0));
          if (unique_ml(r, il[w])) begin
            v = ref_spread(r, bp);
            inj_coded++;
          end
        end
        if (bp) begin
          for (int i = 0; i < 12; i++) begin
            int n = $urandom_range(7, 0);
            logic [14:0] m = '0;
            while ($countones(m) < n) m[$urandom_range(14, 0)] = 1'b1;
            v[15*i +: 15] ^= m;
            if (n != 0) inj_chip++;
          end
        end else begin
          for (int k = 0; k < 3; k++) begin
            int n = $urandom_range(5, 0);
            logic [31:0] m = '0;
            while ($countones(m) < n) m[$urandom_range(31, 0)] = 1'b1;
            v[32*k +: 32] ^= m;
            if (n != 0) inj_chip++;
          end
        end
      end
      rxw.push_back(v);
    end

    // receive
    @(negedge clk) rx = 1;
    @(negedge clk);
    fork
      begin
        for (int w = 0; w < nw; w++) begin
          rx_valid = 1; rx_chips = rxw[w];
          @(negedge clk);
        end
        rx_valid = 0;
      end
      begin
        int t = 0;
        while (t < nw + 60) begin
          @(posedge clk); #1;
          if (rx_psdu_valid) got.push_back(rx_psdu);
          t++;
        end
      end
    join
    checks += 3;
    if (!rx_len_valid || rx_psdu_len != 7'(len)) begin
      failures++; $display("FAIL rx length %0d exp %0d", rx_psdu_len, len);
    end
    if (!rx_sfd_ok || rx_sfd_err) begin failures++; $display("FAIL rx SFD"); end
    if (got.size() != len) begin failures++; $display("FAIL rx octets %0d exp %0d", got.size(), len); end
    foreach (oct[k]) begin
      checks++;
      if (k >= got.size() || got[k] !== oct[k]) begin
        failures++;
        if (failures < 20) $display("FAIL rx octet %0d of len %0d: got %h exp %h", k, len, got[k], oct[k]);
      end
    end
    @(negedge clk) rx = 0;
    repeat (3) @(negedge clk);
    $display("frame %s len %0d: %0d chip words checked and decoded", bp ? "BPSK " : "OQPSK", len, nw);
  endtask

  initial begin
    logic [31:0] s0;
    s0 = 32'b11011001110000110101001000101110;
    for (int k = 0; k < 8; k++) begin
      pn[k] = (k == 0) ? s0 : ((s0 >> (4 * k)) | (s0 << (32 - 4 * k)));
      pn[k + 8] = pn[k] ^ 32'h5555_5555;
    end
    ds_q = 0; vt_q = 0; bd_q = 0;
    repeat (2) @(posedge clk);
    nrst = 1;
    repeat (2) @(negedge clk);
    run_frame(0, 1, 0);
    run_frame(0, 20, 1);
    run_frame(1, 20, 1);
    run_frame(0, 0, 1);
    run_frame(0, 127, 1);
    run_frame(1, 127, 1);
    $display("mechanisms: oqpsk frames %0d bpsk frames %0d max-length frames %0d", n_oqpsk, n_bpsk, n_max);
    $display("injected: chip %0d coded-bit %0d burst %0d", inj_chip, inj_coded, inj_burst);
    $display("seen: despreader corrections %0d viterbi corrections %0d block corrections %0d",
             n_chip_fix, n_vit_fix, n_blk_fix);
    checks += 6;
    if (n_oqpsk == 0 || n_bpsk == 0 || n_max == 0) begin failures++; $display("FAIL mode coverage"); end
    if (n_chip_fix == 0) begin failures++; $display("FAIL no despreader correction seen"); end
    if (n_vit_fix == 0 || inj_coded == 0) begin failures++; $display("FAIL no Viterbi correction seen"); end
    if (n_blk_fix == 0 || inj_burst == 0) begin failures++; $display("FAIL no block correction seen"); end
    if (inj_chip == 0) begin failures++; $display("FAIL no chip errors injected"); end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
