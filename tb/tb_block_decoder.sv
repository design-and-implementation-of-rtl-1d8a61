// tb_block_decoder: for every message and every error pattern of weight 0
// or 1 the decoder must return the message; the published syndrome example
// (111001 -> 001) and the burst-error role (one error per codeword) are
// covered by that sweep. Weight-2 patterns are checked against a
// nearest-codeword search wherever that codeword is unique.
module tb_block_decoder;
  import phy_pkg::*;
  logic clk = 0, nrst = 0, flag_block_dec = 0;
  cw_t  dec_data;
  tri_t dec_data_out;
  logic [2:0] syndrome;
  int checks = 0, failures = 0;

  block_decoder dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cw_t enc(int m);
    // generator rows 100110, 010101, 001011
    cw_t c = '0;
    if (m & 4) c ^= 6'b100110;
    if (m & 2) c ^= 6'b010101;
    if (m & 1) c ^= 6'b001011;
    return c;
  endfunction

  task automatic apply(cw_t w, int exp_m, string what);
    @(negedge clk) dec_data = w; flag_block_dec = 1;
    @(posedge clk); #1;
    checks++;
    if (dec_data_out !== tri_t'(exp_m)) begin
      failures++;
      $display("FAIL %s: word %b got %b exp %0d", what, w, dec_data_out, exp_m);
    end
  endtask

  initial begin
    dec_data = '0;
    repeat (2) @(posedge clk);
    nrst = 1;
    for (int m = 0; m < 8; m++) begin
      apply(enc(m), m, "clean");
      for (int e = 0; e < 6; e++) apply(enc(m) ^ cw_t'(1 << e), m, "1-bit error");
    end
    // syndrome example from the description
    apply(6'b111001, 7, "example");   // nearest codeword 111000
    checks++;
    if (syndrome !== 3'b001) begin failures++; $display("FAIL syndrome %b", syndrome); end
    // weight-2 patterns where the nearest codeword is unique
    for (int m = 0; m < 8; m++)
      for (int e1 = 0; e1 < 6; e1++)
        for (int e2 = e1 + 1; e2 < 6; e2++) begin
          cw_t w; int best, nbest, bm;
          w = enc(m) ^ cw_t'(1 << e1) ^ cw_t'(1 << e2);
          best = 99; nbest = 0; bm = 0;
          for (int c = 0; c < 8; c++) begin
            int d = $countones(w ^ enc(c));
            if (d < best) begin best = d; nbest = 1; bm = c; end
            else if (d == best) nbest++;
          end
          if (nbest == 1) apply(w, bm, "2-bit unique");
        end
    // enable low: output holds
    @(negedge clk) flag_block_dec = 0; dec_data = enc(5);
    @(posedge clk); #1;
    checks++;
    if (dec_data_out === 3'd5) begin failures++; $display("FAIL output changed while disabled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
