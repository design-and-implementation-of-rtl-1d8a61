// tb_bpsk_spreader: every bit must become the 15-chip sequence
// 111101011001000 for 0 or its complement for 1, chip c0 first; checked for
// all 4096 codewords, with the one-clock latency and the enable.
module tb_bpsk_spreader;
  import phy_pkg::*;
  logic         clk = 0, nrst = 0, flag_spreader = 0;
  conv_t        conv_data_out;
  logic [179:0] spreaded;
  int checks = 0, failures = 0;
  localparam logic [14:0] ZERO_SEQ = 15'b111101011001000;

  bpsk_spreader dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    conv_data_out = '0;
    repeat (2) @(posedge clk);
    nrst = 1;
    for (int w = 0; w < 4096; w++) begin
      logic [179:0] exp;
      for (int i = 0; i < 12; i++) exp[15*i +: 15] = w[i] ? ~ZERO_SEQ : ZERO_SEQ;
      @(negedge clk) conv_data_out = conv_t'(w); flag_spreader = 1;
      @(posedge clk); #1;
      checks++;
      if (spreaded !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL word %h", w);
      end
    end
    @(negedge clk) flag_spreader = 0; conv_data_out = 12'h000;
    @(posedge clk); #1;
    checks++;
    if (spreaded[14:0] !== ~ZERO_SEQ) begin failures++; $display("FAIL changed while disabled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
