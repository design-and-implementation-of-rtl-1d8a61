// tb_rx_counter: drives flag_ready windows and checks every enable on every
// clock against the window shifted by the receive latencies: despreader 0,
// Viterbi 1 (+7 flush clocks), deinterleaver 8 (+6 flush clocks), block
// decoder 15, decoded data valid 16. Also checks that nothing is enabled
// while Rx is low.
module tb_rx_counter;
  logic clk = 0, nrst = 0, Rx = 0, flag_ready = 0;
  logic flag_despreader, flag_viterbi, flag_deinterleaver, flag_block_dec, dec_valid;
  int checks = 0, failures = 0;
  localparam int T = 400;
  bit en_hist [T];

  rx_counter dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit h(int c);
    return (c >= 0 && c < T) ? en_hist[c] : 1'b0;
  endfunction

  initial begin
    int lens [3] = '{6, 24, 72};
    int start;
    for (int c = 0; c < T; c++) en_hist[c] = 0;
    start = 5;
    foreach (lens[i]) begin
      for (int c = start; c < start + lens[i]; c++) en_hist[c] = 1;
      start += lens[i] + 30;
    end
    repeat (2) @(posedge clk);
    nrst = 1;
    for (int c = 0; c < T; c++) begin
      bit ev, ed;
      @(negedge clk);
      Rx = 1;
      flag_ready = en_hist[c];
      #1;
      ev = 0; ed = 0;
      for (int d = 1; d <= 8; d++) ev |= h(c - d);
      for (int d = 8; d <= 14; d++) ed |= h(c - d);
      checks += 5;
      if (flag_despreader !== h(c) || flag_viterbi !== ev || flag_deinterleaver !== ed ||
          flag_block_dec !== h(c - 15) || dec_valid !== h(c - 16)) begin
        failures++;
        if (failures < 10)
          $display("FAIL cycle %0d: ds %b vt %b/%b dil %b/%b bd %b dv %b", c, flag_despreader,
                   flag_viterbi, ev, flag_deinterleaver, ed, flag_block_dec, dec_valid);
      end
    end
    @(negedge clk) Rx = 0; flag_ready = 1;
    repeat (20) @(posedge clk);
    #1;
    checks++;
    if (flag_despreader || flag_viterbi || flag_deinterleaver || flag_block_dec || dec_valid) begin
      failures++; $display("FAIL enables raised with Rx low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
