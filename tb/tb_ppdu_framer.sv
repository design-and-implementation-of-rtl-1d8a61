// tb_ppdu_framer: writes PSDUs of several lengths (0, 1, 5, 40, 127
// octets), starts the frame and checks the 3-bit word stream against a bit
// list built here: 32 zeros, SFD bits 1,1,1,0,0,1,0,1, the 7 length bits and
// a zero reserved bit, the PSDU LSB first, then zeros up to a multiple of 18
// bits; the earliest bit in data[2]. Also checks that the words come on
// consecutive clocks, n_words, and the published framer words for a
// one-octet 0xFF PSDU (000 x10, 001, 110, 010, 110, 000, 000, 111, 111).
module tb_ppdu_framer;
  import phy_pkg::*;
  logic       clk = 0, nrst = 0, psdu_wr = 0, tx = 0;
  logic [6:0] psdu_len;
  logic [7:0] psdu;
  tri_t       data;
  logic       data_valid, busy;
  logic [8:0] n_words;
  int checks = 0, failures = 0;

  ppdu_framer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame(int len, bit use_ff);
    bit bits [$];
    logic [7:0] oct [$];
    tri_t got [$];
    int nexp, c, gaps;
    logic [7:0] sfd_bits = 8'b1010_0111;
    for (int i = 0; i < len; i++) oct.push_back(use_ff ? 8'hFF : 8'($urandom));
    for (int i = 0; i < 32; i++) bits.push_back(0);
    for (int i = 0; i < 8; i++) bits.push_back(sfd_bits[i]);
    for (int i = 0; i < 7; i++) bits.push_back(len[i]);
    bits.push_back(0);
    foreach (oct[k]) for (int i = 0; i < 8; i++) bits.push_back(oct[k][i]);
    while (bits.size() % 18 != 0) bits.push_back(0);
    nexp = bits.size() / 3;
    foreach (oct[k]) begin
      @(negedge clk) psdu_wr = 1; psdu = oct[k];
    end
    @(negedge clk) psdu_wr = 0; psdu_len = 7'(len); tx = 1;
    c = 0; gaps = 0;
    while (got.size() < nexp && c < 1000) begin
      @(posedge clk); #1;
      if (data_valid) got.push_back(data);
      else if (got.size() > 0) gaps++;
      c++;
    end
    @(negedge clk) tx = 0;
    checks++;
    if (n_words != 9'(nexp) || gaps != 0) begin
      failures++; $display("FAIL len %0d: n_words %0d exp %0d gaps %0d", len, n_words, nexp, gaps);
    end
    for (int w = 0; w < nexp; w++) begin
      tri_t exp;
      exp = {bits[3*w], bits[3*w+1], bits[3*w+2]};
      checks++;
      if (w >= got.size() || got[w] !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL len %0d word %0d: got %b exp %b", len, w, got[w], exp);
      end
    end
    if (use_ff) begin
      tri_t pub [18] = '{3'b000, 3'b000, 3'b000, 3'b000, 3'b000, 3'b000, 3'b000, 3'b000,
                         3'b000, 3'b000, 3'b001, 3'b110, 3'b010, 3'b110, 3'b000, 3'b000,
                         3'b111, 3'b111};
      for (int w = 0; w < 18; w++) begin
        checks++;
        if (got[w] !== pub[w]) begin failures++; $display("FAIL published word %0d", w); end
      end
    end
    repeat (3) @(posedge clk);
    checks++;
    if (busy || data_valid) begin failures++; $display("FAIL framer still busy"); end
  endtask

  initial begin
    psdu = '0; psdu_len = '0;
    repeat (2) @(posedge clk);
    nrst = 1;
    frame(1, 1);
    frame(0, 0);
    frame(5, 0);
    frame(40, 0);
    frame(127, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
