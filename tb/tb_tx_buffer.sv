// tb_tx_buffer: fills the buffer to its full 360 words with random chip
// words, reads them back in order (with gaps in rd_en), checks count,
// rd_valid timing, that reads stop at the write pointer, that writes beyond
// the depth are dropped and that clear restarts both pointers.
module tb_tx_buffer;
  localparam int DEPTH = 360, W = 180;
  logic         clk = 0, nrst = 0, clear = 0, wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data, rd_data;
  logic         rd_valid;
  logic [8:0]   count;
  int checks = 0, failures = 0;
  logic [W-1:0] ref_q [$];

  tx_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int i = 0; i < W; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    wr_data = '0;
    repeat (2) @(posedge clk);
    nrst = 1;
    for (int f = 0; f < 2; f++) begin
      int n, got;
      n = (f == 0) ? DEPTH + 5 : 37;
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      ref_q.delete();
      for (int i = 0; i < n; i++) begin
        @(negedge clk) wr_en = 1; wr_data = rnd();
        if (i < DEPTH) ref_q.push_back(wr_data);
      end
      @(negedge clk) wr_en = 0;
      checks++;
      if (count != 9'(ref_q.size())) begin failures++; $display("FAIL count %0d", count); end
      got = 0;
      for (int c = 0; c < 2 * DEPTH + 20; c++) begin
        @(negedge clk);
        rd_en = (c % 3 != 1);
        @(posedge clk); #1;
        if (rd_en && got < ref_q.size()) begin
          checks++;
          if (!rd_valid || rd_data !== ref_q[got]) begin
            failures++;
            if (failures < 10) $display("FAIL frame %0d word %0d", f, got);
          end
          got++;
        end else begin
          checks++;
          if (rd_valid) begin failures++; $display("FAIL rd_valid without data"); end
        end
      end
      @(negedge clk) rd_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
