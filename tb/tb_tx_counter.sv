// tb_tx_counter: drives data_en windows of several lengths (multiples of
// six, as the framer produces) and checks every flag on every clock against
// the window shifted by the stage latencies: interleaver 1 (+6 flush
// clocks), convolutional encoder 8, spreader 9, output buffer 10. Also
// checks that nothing is enabled while Tx is low.
module tb_tx_counter;
  logic clk = 0, nrst = 0, Tx = 0, data_en = 0;
  logic flag_interleaver, flag_conv_enc, flag_spreader, flag_out_buffer;
  int checks = 0, failures = 0;
  localparam int T = 400;
  bit en_hist [T];

  tx_counter dut (.*);
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
    int lens [3] = '{6, 18, 60};
    int start;
    for (int c = 0; c < T; c++) en_hist[c] = 0;
    start = 5;
    foreach (lens[i]) begin
      for (int c = start; c < start + lens[i]; c++) en_hist[c] = 1;
      start += lens[i] + 25;
    end
    repeat (2) @(posedge clk);
    nrst = 1;
    for (int c = 0; c < T; c++) begin
      bit exp_il;
      @(negedge clk);
      Tx = 1;
      data_en = en_hist[c];
      #1;
      exp_il = 0;
      for (int d = 1; d <= 7; d++) exp_il |= h(c - d);
      checks += 4;
      if (flag_interleaver !== exp_il || flag_conv_enc !== h(c - 8) ||
          flag_spreader !== h(c - 9) || flag_out_buffer !== h(c - 10)) begin
        failures++;
        if (failures < 10)
          $display("FAIL cycle %0d: il %b/%b cv %b/%b sp %b/%b ob %b/%b", c,
                   flag_interleaver, exp_il, flag_conv_enc, h(c - 8),
                   flag_spreader, h(c - 9), flag_out_buffer, h(c - 10));
      end
    end
    // Tx low: data_en ignored
    @(negedge clk) Tx = 0; data_en = 1;
    repeat (12) @(posedge clk);
    #1;
    checks++;
    if (flag_interleaver || flag_conv_enc || flag_spreader || flag_out_buffer) begin
      failures++; $display("FAIL flags raised with Tx low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
