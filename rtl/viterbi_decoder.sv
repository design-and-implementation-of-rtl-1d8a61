// viterbi_decoder: pipelined hard-decision Viterbi decoder for the K = 3,
// rate 1/2 code, one 12-bit codeword (six bit pairs) in and six bits out per
// clock.
//
// The trellis has four states named by the last two input bits: a = 00,
// b = 10 (last bit 1), c = 01, d = 11. Each of the six trellis stages is one
// pipeline stage. Stage 1 compares the first pair with 00 and 11 (states a
// and b); stage 2 extends them to all four states (a->a 00, a->b 11,
// b->c 10, b->d 01). Stages 3 to 6 are add-compare-select stages: every
// state has two predecessors (a <- a 00 | c 11, b <- a 11 | c 00,
// c <- b 10 | d 01, d <- b 01 | d 10), the path metric plus the branch
// Hamming distance is formed for all eight paths and the smaller survives,
// the upper path (from a or b) on a tie. Each state carries the decoded bits
// of its survivor; that history grows by one bit per stage. The decision
// stage picks the state with the smallest final metric (lowest state on a
// tie) and outputs its six bits, bit i being the decoder input bit i of the
// encoder (LSB first). The codeword is not terminated, so the final state is
// free.
//
// Timing: all seven pipeline registers advance while RX is high; a codeword
// is decoded seven enabled clocks after it is presented, and one result
// leaves per clock. path_metric gives the Hamming distance between the
// received word and the chosen codeword.
//
// From the description: six trellis stages plus a decision stage, Hamming
// branch metrics, the stage 1 and 2 structure and branch labels, the
// pipeline. This design's choice: survivor bits are carried in place of the
// described path addresses (the same information), tie rules, latency.
module viterbi_decoder
  import phy_pkg::*;
(
  input  logic       clk,
  input  logic       nrst,            // asynchronous, active low
  input  logic       RX,              // pipeline enable
  input  conv_t      conv_data_rx,
  output cw_t        conv_out_rx,
  output logic [3:0] path_metric
);
  typedef struct packed {
    logic [3:0][3:0] pm;     // path metric per state, index = state
    logic [3:0][5:0] hist;   // survivor bits per state
    conv_t           rx;     // received word travelling with the metrics
  } stage_t;

  stage_t st [1:6];

  function automatic logic [3:0] ham(logic [1:0] pair, logic [1:0] label);
    // pair = {V2, V1} as received, label = {V1, V2} as printed on the trellis
    return 4'(pair[0] ^ label[1]) + 4'(pair[1] ^ label[0]);
  endfunction

  function automatic stage_t acs(stage_t s, int unsigned n);
    stage_t     o;
    logic [1:0] p;
    logic [3:0] up, lo;
    p = s.rx[2*n +: 2];
    o = s;
    // state a: from a (00) or c (11), new bit 0
    up = s.pm[0] + ham(p, 2'b00); lo = s.pm[2] + ham(p, 2'b11);
    o.pm[0] = (lo < up) ? lo : up;  o.hist[0] = (lo < up) ? s.hist[2] : s.hist[0];
    // state b: from a (11) or c (00), new bit 1
    up = s.pm[0] + ham(p, 2'b11); lo = s.pm[2] + ham(p, 2'b00);
    o.pm[1] = (lo < up) ? lo : up;  o.hist[1] = (lo < up) ? s.hist[2] : s.hist[0];
    o.hist[1][n] = 1'b1;
    // state c: from b (10) or d (01), new bit 0
    up = s.pm[1] + ham(p, 2'b10); lo = s.pm[3] + ham(p, 2'b01);
    o.pm[2] = (lo < up) ? lo : up;  o.hist[2] = (lo < up) ? s.hist[3] : s.hist[1];
    // state d: from b (01) or d (10), new bit 1
    up = s.pm[1] + ham(p, 2'b01); lo = s.pm[3] + ham(p, 2'b10);
    o.pm[3] = (lo < up) ? lo : up;  o.hist[3] = (lo < up) ? s.hist[3] : s.hist[1];
    o.hist[3][n] = 1'b1;
    return o;
  endfunction

  stage_t s1_c, s2_c;

  always_comb begin
    // stage 1: first pair against 00 (stay in a) and 11 (go to b)
    s1_c      = '0;
    s1_c.rx   = conv_data_rx;
    s1_c.pm[0] = ham(conv_data_rx[1:0], 2'b00);
    s1_c.pm[1] = ham(conv_data_rx[1:0], 2'b11);
    s1_c.hist[1][0] = 1'b1;
    // stage 2: a -> a (00), a -> b (11), b -> c (10), b -> d (01)
    s2_c      = st[1];
    s2_c.pm[0] = st[1].pm[0] + ham(st[1].rx[3:2], 2'b00);
    s2_c.pm[1] = st[1].pm[0] + ham(st[1].rx[3:2], 2'b11);
    s2_c.pm[2] = st[1].pm[1] + ham(st[1].rx[3:2], 2'b10);
    s2_c.pm[3] = st[1].pm[1] + ham(st[1].rx[3:2], 2'b01);
    s2_c.hist[0] = st[1].hist[0];
    s2_c.hist[1] = st[1].hist[0] | 6'b000010;
    s2_c.hist[2] = st[1].hist[1];
    s2_c.hist[3] = st[1].hist[1] | 6'b000010;
  end

  always_ff @(posedge clk or negedge nrst) begin
    if (!nrst) begin
      for (int s = 1; s <= 6; s++) st[s] <= '0;
      conv_out_rx <= '0;
      path_metric <= '0;
    end else if (RX) begin
      st[1] <= s1_c;
      st[2] <= s2_c;
      for (int s = 3; s <= 6; s++) st[s] <= acs(st[s-1], s - 1);
      // decision stage
      begin
        int unsigned best;
        best = 0;
        for (int q = 1; q < 4; q++)
          if (st[6].pm[q] < st[6].pm[best]) best = q;
        conv_out_rx <= st[6].hist[best];
        path_metric <= st[6].pm[best];
      end
    end
  end
endmodule
