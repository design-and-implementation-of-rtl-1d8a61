// tb_psdu_extractor: feeds 3-bit word streams built here (preamble, SFD,
// PHR, PSDU LSB first, zero padding to 18-bit groups) and checks the
// recovered length, every PSDU octet in order, frame_done and the SFD flags;
// one frame carries a corrupted SFD and must raise sfd_err. Words are fed
// with gaps in dec_valid to check that only valid words count.
module tb_psdu_extractor;
  import phy_pkg::*;
  logic       clk = 0, nrst = 0, clear = 0, dec_valid = 0;
  tri_t       dec;
  logic [6:0] psdu_len;
  logic       len_valid, psdu_valid, sfd_ok, sfd_err, frame_done;
  logic [7:0] psdu;
  int checks = 0, failures = 0;
  logic [7:0] rx_oct [$];
  int dones = 0;

  psdu_extractor dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (psdu_valid) rx_oct.push_back(psdu);
    if (frame_done) dones++;
  end

  task automatic frame(int len, bit bad_sfd);
    bit bits [$];
    logic [7:0] oct [$];
    logic [7:0] sfd_bits;
    sfd_bits = bad_sfd ? 8'hA6 : 8'hA7;
    for (int i = 0; i < len; i++) oct.push_back(8'($urandom));
    for (int i = 0; i < 32; i++) bits.push_back(0);
    for (int i = 0; i < 8; i++) bits.push_back(sfd_bits[i]);
    for (int i = 0; i < 7; i++) bits.push_back(len[i]);
    bits.push_back(0);
    foreach (oct[k]) for (int i = 0; i < 8; i++) bits.push_back(oct[k][i]);
    while (bits.size() % 18 != 0) bits.push_back(1);   // padding content must not matter
    rx_oct.delete(); dones = 0;
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    for (int w = 0; w < bits.size() / 3; w++) begin
      @(negedge clk);
      if ($urandom_range(3, 0) == 0) begin dec_valid = 0; @(negedge clk); end
      dec_valid = 1; dec = {bits[3*w], bits[3*w+1], bits[3*w+2]};
    end
    @(negedge clk) dec_valid = 0;
    repeat (3) @(posedge clk);
    #1;
    checks += 4;
    if (!len_valid || psdu_len != 7'(len)) begin failures++; $display("FAIL length %0d", psdu_len); end
    if (sfd_ok == bad_sfd || sfd_err != bad_sfd) begin failures++; $display("FAIL sfd flags"); end
    if (dones != 1) begin failures++; $display("FAIL frame_done count %0d", dones); end
    if (rx_oct.size() != len) begin failures++; $display("FAIL octets %0d exp %0d", rx_oct.size(), len); end
    foreach (oct[k]) begin
      checks++;
      if (k >= rx_oct.size() || rx_oct[k] !== oct[k]) begin
        failures++;
        if (failures < 10) $display("FAIL octet %0d", k);
      end
    end
  endtask

  initial begin
    dec = '0;
    repeat (2) @(posedge clk);
    nrst = 1;
    frame(1, 0);
    frame(0, 0);
    frame(20, 1);
    frame(127, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
