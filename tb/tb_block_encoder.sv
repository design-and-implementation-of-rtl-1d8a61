// tb_block_encoder: checks the (6,3) encoder against a generator-matrix
// product for all eight messages, against the published example and test
// vectors, and checks the one-clock latency.
module tb_block_encoder;
  import phy_pkg::*;
  logic clk = 0, nrst = 0;
  tri_t block_data;
  cw_t  block_out;
  int checks = 0, failures = 0;
  localparam cw_t G [3] = '{6'b100110, 6'b010101, 6'b001011};  // rows for m2, m1, m0

  block_encoder dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(cw_t got, cw_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b exp %b", what, got, exp);
    end
  endtask

  initial begin
    block_data = '0;
    repeat (2) @(posedge clk);
    nrst = 1;
    for (int m = 0; m < 8; m++) begin
      cw_t exp;
      exp = '0;
      for (int r = 0; r < 3; r++) if (m[2-r]) exp ^= G[r];
      @(negedge clk) block_data = tri_t'(m);
      @(posedge clk); #1;
      check(block_out, exp, $sformatf("message %b", m[2:0]));
    end
    // published example and vectors: 110 -> 110011, 001 -> 001011, 111 -> 111000
    @(negedge clk) block_data = 3'b110; @(posedge clk); #1; check(block_out, 6'b110011, "110");
    @(negedge clk) block_data = 3'b001; @(posedge clk); #1; check(block_out, 6'b001011, "001");
    @(negedge clk) block_data = 3'b111; @(posedge clk); #1; check(block_out, 6'b111000, "111");
    // latency: output must not change before the clock edge
    @(negedge clk) block_data = 3'b010; #1; check(block_out, 6'b111000, "held before edge");
    @(posedge clk); #1; check(block_out, 6'b010101, "010 after one clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
