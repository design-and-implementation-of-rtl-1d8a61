// tb_interleaver: streams blocks of six codewords through the interleaver,
// including the three published blocks, and compares every output word with
// a transpose computed here (output word j, bit 5-k = row k, bit 5-j). Also
// checks the seven-clock block latency and that a disabled clock holds.
module tb_interleaver;
  import phy_pkg::*;
  logic clk = 0, nrst = 0, flag_interleaver = 0;
  cw_t  code, interleaved;
  int checks = 0, failures = 0;
  localparam int NBLK = 8;
  cw_t rows [NBLK][6];

  interleaver dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    code = '0;
    // published blocks
    rows[0] = '{6'h00, 6'h00, 6'h00, 6'h00, 6'h00, 6'h00};
    rows[1] = '{6'b000000, 6'b000000, 6'b000000, 6'b000000, 6'b001011, 6'b110011};
    rows[2] = '{6'b010101, 6'b110011, 6'b000000, 6'b000000, 6'b111000, 6'b111000};
    for (int b = 3; b < NBLK; b++) for (int r = 0; r < 6; r++) rows[b][r] = cw_t'($urandom);
    repeat (2) @(posedge clk);
    nrst = 1;
    // cycle t (t = 0..) drives row t%6 of block t/6; output of block b column j
    // is visible after the edge of cycle 6b + 6 + j
    for (int t = 0; t < NBLK * 6 + 6; t++) begin
      @(negedge clk);
      flag_interleaver = 1;
      code = (t < NBLK * 6) ? rows[t / 6][t % 6] : cw_t'($urandom);
      @(posedge clk); #1;
      if (t >= 6) begin
        int b, j;
        cw_t exp;
        b = (t - 6) / 6; j = (t - 6) % 6;
        for (int k = 0; k < 6; k++) exp[5-k] = rows[b][k][5-j];
        checks++;
        if (interleaved !== exp) begin
          failures++;
          $display("FAIL block %0d column %0d: got %b exp %b", b, j, interleaved, exp);
        end
      end
    end
    // published outputs of block 2
    // (columns 110011 etc. were checked above; spot check one here)
    // hold when disabled
    begin
      cw_t keep;
      keep = interleaved;
      @(negedge clk) flag_interleaver = 0; code = 6'h2a;
      repeat (3) @(posedge clk); #1;
      checks++;
      if (interleaved !== keep) begin failures++; $display("FAIL output moved while disabled"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
