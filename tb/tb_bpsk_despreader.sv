// tb_bpsk_despreader: spreads random codewords with the two BPSK sequences,
// flips up to seven chips per bit and checks that every bit is recovered and
// that n_corrected counts the bits that had wrong chips; eight or more flips
// must turn the bit over.
module tb_bpsk_despreader;
  import phy_pkg::*;
  logic         clk = 0, nrst = 0, flag_despreader = 0;
  logic [179:0] rx;
  conv_t        bits_12;
  logic [3:0]   n_corrected;
  int checks = 0, failures = 0;
  localparam logic [14:0] ZERO_SEQ = 15'b111101011001000;

  bpsk_despreader dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [14:0] flips(int n);
    logic [14:0] m = '0;
    while ($countones(m) < n) m[$urandom_range(14, 0)] = 1'b1;
    return m;
  endfunction

  initial begin
    rx = '0;
    repeat (2) @(posedge clk);
    nrst = 1;
    for (int t = 0; t < 3000; t++) begin
      conv_t w, exp; int nbad;
      w = conv_t'($urandom);
      exp = w; nbad = 0;
      @(negedge clk);
      flag_despreader = 1;
      for (int i = 0; i < 12; i++) begin
        int ne;
        ne = (t < 10) ? 0 : (t < 2000) ? $urandom_range(7, 0) : $urandom_range(15, 0);
        if (ne > 7) exp[i] = ~w[i];
        if (ne != 0 && ne != 15) nbad++;   // 15 flips give the other sequence exactly
        rx[15*i +: 15] = (w[i] ? ~ZERO_SEQ : ZERO_SEQ) ^ flips(ne);
      end
      @(posedge clk); #1;
      checks++;
      if (bits_12 !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d got %h exp %h", t, bits_12, exp);
      end
      checks++;
      if (n_corrected != 4'(nbad)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d n_corrected %0d exp %0d", t, n_corrected, nbad);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
