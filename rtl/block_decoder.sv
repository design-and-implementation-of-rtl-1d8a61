// block_decoder: (6,3) syndrome decoder.
//
// The syndrome is the received word times the parity check matrix, three
// three-input XORs: s2 = r5^r4^r2, s1 = r5^r3^r1, s0 = r4^r3^r0. A zero
// syndrome means a valid codeword. Otherwise an 8-entry look-up table,
// addressed by the syndrome, gives the error pattern: the six single-bit
// errors, plus one two-bit pattern (r5 and r0 wrong) for syndrome 111. Only
// the three message bits r5..r3 are corrected (three XOR gates), and they
// form dec_data_out, registered one clock after dec_data while
// flag_block_dec is high. Every single-bit error is corrected.
//
// From the description: syndrome equations, LUT, correction of the message
// bits only. This design's choice: the two-bit pattern for syndrome 111
// (three patterns of weight two share it).
module block_decoder
  import phy_pkg::*;
(
  input  logic       clk,
  input  logic       nrst,             // asynchronous, active low
  input  logic       flag_block_dec,   // clock enable
  input  cw_t        dec_data,
  output tri_t       dec_data_out,
  output logic [2:0] syndrome          // syndrome of the registered word
);
  logic [2:0] syn_c;
  cw_t        err_c;

  assign syn_c = block_syndrome(dec_data);

  always_comb begin
    unique case (syn_c)
      3'b000: err_c = 6'b000000;
      3'b110: err_c = 6'b100000;
      3'b101: err_c = 6'b010000;
      3'b011: err_c = 6'b001000;
      3'b100: err_c = 6'b000100;
      3'b010: err_c = 6'b000010;
      3'b001: err_c = 6'b000001;
      3'b111: err_c = 6'b100001;
      default: err_c = 6'b000000;
    endcase
  end

  always_ff @(posedge clk or negedge nrst) begin
    if (!nrst) begin
      dec_data_out <= '0;
      syndrome     <= '0;
    end else if (flag_block_dec) begin
      dec_data_out <= dec_data[5:3] ^ err_c[5:3];
      syndrome     <= syn_c;
    end
  end
endmodule
