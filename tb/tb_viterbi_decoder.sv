// tb_viterbi_decoder: feeds one received 12-bit word per clock and checks
// each result after the seventh clock edge against an exhaustive maximum-likelihood
// search over all 64 codewords (encoder model written here). Where the
// nearest codeword is unique the decoder must return it; on a tie it must
// return one of the tied words. The reported path metric must equal the
// minimum distance. Includes the published vector 011011000000 -> 111000,
// error-free words, words with one and two flipped bits, and random words.
module tb_viterbi_decoder;
  import phy_pkg::*;
  logic       clk = 0, nrst = 0, RX = 0;
  conv_t      conv_data_rx;
  cw_t        conv_out_rx;
  logic [3:0] path_metric;
  int checks = 0, failures = 0, corrected = 0;
  localparam int LAT = 6;   // visible after the 7th edge, counting the one that samples
  localparam int N = 3000;
  conv_t sent [N];

  viterbi_decoder dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (N + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic conv_t enc(cw_t d);
    logic r1, r2;
    conv_t o;
    r1 = 0; r2 = 0;
    for (int i = 0; i < 6; i++) begin
      o[2*i]   = d[i] ^ r1 ^ r2;
      o[2*i+1] = d[i] ^ r2;
      r2 = r1; r1 = d[i];
    end
    return o;
  endfunction

  task automatic judge(conv_t r);
    int best, nbest;
    best = 99; nbest = 0;
    for (int c = 0; c < 64; c++) begin
      int d = $countones(r ^ enc(cw_t'(c)));
      if (d < best) begin best = d; nbest = 1; end
      else if (d == best) nbest++;
    end
    checks++;
    if ($countones(r ^ enc(conv_out_rx)) != best || path_metric != 4'(best)) begin
      failures++;
      if (failures < 10)
        $display("FAIL rx %b: got %b (distance %0d, metric %0d) best %0d", r, conv_out_rx,
                 $countones(r ^ enc(conv_out_rx)), path_metric, best);
    end
    if (best > 0 && nbest == 1) corrected++;
  endtask

  initial begin
    conv_data_rx = '0;
    repeat (2) @(posedge clk);
    nrst = 1;
    for (int t = 0; t < N + LAT; t++) begin
      @(negedge clk);
      RX = 1;
      if (t == 0) sent[t] = 12'b011011000000;
      else if (t < N) begin
        conv_t c;
        c = enc(cw_t'($urandom));
        case (t % 4)
          0: sent[t] = c;
          1: sent[t] = c ^ conv_t'(1 << $urandom_range(11, 0));
          2: sent[t] = c ^ conv_t'(1 << $urandom_range(11, 0)) ^ conv_t'(1 << $urandom_range(11, 0));
          default: sent[t] = conv_t'($urandom);
        endcase
      end
      if (t < N) conv_data_rx = sent[t];
      @(posedge clk); #1;
      if (t >= LAT) begin
        if (t - LAT == 0) begin
          checks++;
          if (conv_out_rx !== 6'b111000) begin
            failures++; $display("FAIL published vector: got %b", conv_out_rx);
          end
        end
        judge(sent[t - LAT]);
      end
    end
    checks++;
    if (corrected < 100) begin failures++; $display("FAIL too few corrections: %0d", corrected); end
    $display("corrected words: %0d", corrected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
