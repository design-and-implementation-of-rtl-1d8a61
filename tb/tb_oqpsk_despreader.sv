// tb_oqpsk_despreader: spreads random codewords with PN sequences built here
// from the shift/conjugate rule, flips up to five random chips per symbol
// (always correctable) and checks that the despreader returns the codeword
// and the number of flipped chips as the distance; then checks that a clean
// word gives distance 0 and that an arbitrary chip word returns an index of
// minimum distance (lowest on a tie).
module tb_oqpsk_despreader;
  import phy_pkg::*;
  logic        clk = 0, nrst = 0, flag_despreader = 0;
  logic [95:0] Rx1;
  conv_t       symbol_12;
  logic [5:0]  min_dist [3];
  int checks = 0, failures = 0;
  logic [31:0] pn [16];

  oqpsk_despreader dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] flips(int n);
    logic [31:0] m = '0;
    while ($countones(m) < n) m[$urandom_range(31, 0)] = 1'b1;
    return m;
  endfunction

  initial begin
    logic [31:0] s0;
    s0 = 32'b11011001110000110101001000101110;
    for (int k = 0; k < 8; k++) begin
      pn[k] = (k == 0) ? s0 : ((s0 >> (4 * k)) | (s0 << (32 - 4 * k)));
      pn[k + 8] = pn[k] ^ 32'h5555_5555;
    end
    Rx1 = '0;
    repeat (2) @(posedge clk);
    nrst = 1;
    for (int t = 0; t < 2000; t++) begin
      conv_t w; int ne [3];
      w = conv_t'($urandom);
      @(negedge clk);
      flag_despreader = 1;
      for (int k = 0; k < 3; k++) begin
        ne[k] = (t < 16) ? 0 : $urandom_range(5, 0);
        Rx1[32*k +: 32] = pn[w[4*k +: 4]] ^ flips(ne[k]);
      end
      @(posedge clk); #1;
      checks++;
      if (symbol_12 !== w) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d: got %h exp %h", t, symbol_12, w);
      end
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (min_dist[k] != 6'(ne[k])) begin
          failures++;
          if (failures < 10) $display("FAIL distance %0d exp %0d", min_dist[k], ne[k]);
        end
      end
    end
    // arbitrary chip words: the chosen index has the minimum distance
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      Rx1 = {$urandom, $urandom, $urandom};
      @(posedge clk); #1;
      for (int k = 0; k < 3; k++) begin
        int best, bi;
        best = 99; bi = 0;
        for (int s = 0; s < 16; s++)
          if ($countones(Rx1[32*k +: 32] ^ pn[s]) < best) begin
            best = $countones(Rx1[32*k +: 32] ^ pn[s]); bi = s;
          end
        checks++;
        if (symbol_12[4*k +: 4] != 4'(bi)) begin
          failures++;
          if (failures < 10) $display("FAIL random word: got %0d exp %0d", symbol_12[4*k +: 4], bi);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
