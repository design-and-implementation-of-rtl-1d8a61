// tb_conv_encoder: checks the three published encoder vectors
// (110110 -> 100010101100, 111000 -> 011011000000, 110011 -> 101111101011)
// and all 64 inputs against a shift-register model written here as a state
// machine over (R1, R2), with the one-clock latency and the TX enable.
module tb_conv_encoder;
  import phy_pkg::*;
  logic  clk = 0, nrst = 0, TX = 0;
  cw_t   conv_data_in;
  conv_t conv_data_out;
  int checks = 0, failures = 0;

  conv_encoder dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic conv_t model(cw_t d);
    logic [1:0] st;   // {R2, R1}
    conv_t o;
    st = 2'b00;
    for (int i = 0; i < 6; i++) begin
      logic [2:0] taps;
      taps = {st, d[i]};            // R2 R1 R0
      o[2*i]   = ^taps;             // 111
      o[2*i+1] = taps[2] ^ taps[0]; // 101
      st = {st[0], d[i]};
    end
    return o;
  endfunction

  task automatic run(cw_t d, conv_t exp, string what);
    @(negedge clk) conv_data_in = d; TX = 1;
    @(posedge clk); #1;
    checks++;
    if (conv_data_out !== exp) begin
      failures++;
      $display("FAIL %s: in %b got %b exp %b", what, d, conv_data_out, exp);
    end
  endtask

  initial begin
    conv_data_in = '0;
    repeat (2) @(posedge clk);
    nrst = 1;
    run(6'b110110, 12'b100010101100, "published 1");
    run(6'b111000, 12'b011011000000, "published 2");
    run(6'b110011, 12'b101111101011, "published 3");
    for (int d = 0; d < 64; d++) run(cw_t'(d), model(cw_t'(d)), "sweep");
    @(negedge clk) TX = 0; conv_data_in = 6'b000001;
    @(posedge clk); #1;
    checks++;
    if (conv_data_out !== model(6'd63)) begin failures++; $display("FAIL changed while TX low"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
