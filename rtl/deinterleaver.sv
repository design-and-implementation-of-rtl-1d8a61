// deinterleaver: 6x6 block deinterleaver, the inverse of the interleaver.
//
// A 0..5 counter selects the column of the write buffer that takes each
// received 6-bit word: word j fills column 5-j, its bit 5-k going to row k.
// When the sixth word of a block arrives the write buffer is copied to the
// read buffer, and rows 0..5 are read out one per enabled clock while the
// next block is written. The output is registered and a block's first row
// appears seven enabled clocks after its first word; after the last block
// the enable must stay high six more clocks. A burst of up to six wrong bits
// inside one received word ends up as at most one wrong bit per row, which
// the (6,3) block decoder then corrects.
//
// From the description: same buffers and counter as the interleaver, column
// write and row read. This design's choice: word and bit order.
module deinterleaver
  import phy_pkg::*;
(
  input  logic clk,
  input  logic nrst,                 // asynchronous, active low
  input  logic flag_deinterleaver,   // clock enable
  input  cw_t  code,
  output cw_t  deinterleaved
);
  cw_t        wbuf [6];
  cw_t        wnext [6];
  cw_t        rbuf [6];
  logic [2:0] j;

  always_comb begin
    for (int k = 0; k < 6; k++) begin
      wnext[k] = wbuf[k];
      wnext[k][5-j] = code[5-k];
    end
  end

  always_ff @(posedge clk or negedge nrst) begin
    if (!nrst) begin
      j             <= '0;
      deinterleaved <= '0;
      for (int k = 0; k < 6; k++) begin
        wbuf[k] <= '0;
        rbuf[k] <= '0;
      end
    end else if (flag_deinterleaver) begin
      for (int k = 0; k < 6; k++) wbuf[k] <= wnext[k];
      deinterleaved <= rbuf[j];
      if (j == 3'd5) begin
        for (int k = 0; k < 6; k++) rbuf[k] <= wnext[k];
        j <= '0;
      end else begin
        j <= j + 3'd1;
      end
    end
  end
endmodule
