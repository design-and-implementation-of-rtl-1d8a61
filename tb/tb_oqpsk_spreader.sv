// tb_oqpsk_spreader: builds the 16 PN sequences from the rule the standard
// gives (symbols 1..7 are symbol 0 cyclically shifted by 4k chips, symbols
// 8..15 are symbols 0..7 with the odd-indexed chips inverted) and checks the
// spreader for all 4096 codewords, plus the one-clock latency and enable.
module tb_oqpsk_spreader;
  import phy_pkg::*;
  logic        clk = 0, nrst = 0, flag_spreader = 0;
  conv_t       conv_data_out;
  logic [95:0] spreaded;
  int checks = 0, failures = 0;
  logic [31:0] pn [16];   // chip c_n in bit 31-n

  oqpsk_spreader dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] s0;
    s0 = 32'b11011001110000110101001000101110;
    for (int k = 0; k < 8; k++) begin
      // right cyclic shift of the chip sequence by 4k positions
      pn[k] = (k == 0) ? s0 : ((s0 >> (4 * k)) | (s0 << (32 - 4 * k)));
      pn[k + 8] = pn[k] ^ 32'h5555_5555;   // odd chips sit in even bit positions
    end
    conv_data_out = '0;
    repeat (2) @(posedge clk);
    nrst = 1;
    for (int w = 0; w < 4096; w++) begin
      @(negedge clk) conv_data_out = conv_t'(w); flag_spreader = 1;
      @(posedge clk); #1;
      checks++;
      if (spreaded !== {pn[w >> 8], pn[(w >> 4) & 15], pn[w & 15]}) begin
        failures++;
        if (failures < 10) $display("FAIL word %h: got %h", w, spreaded);
      end
    end
    @(negedge clk) flag_spreader = 0; conv_data_out = 12'h000;
    @(posedge clk); #1;
    checks++;
    if (spreaded !== {pn[15], pn[15], pn[15]}) begin failures++; $display("FAIL changed while disabled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
