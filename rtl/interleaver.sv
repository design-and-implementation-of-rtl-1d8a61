// interleaver: 6x6 block interleaver.
//
// One 3-bit counter (0..5, wraps to 0) selects, on each enabled clock, the
// row of the write buffer that takes the incoming 6-bit codeword and the
// column of the read buffer that goes out. When row 5 is written the full
// write buffer is copied to the read buffer, so writing the next block and
// reading the previous one overlap and the stream runs at one word per clock.
// Columns are read from bit 5 down to bit 0; in the output word, row k's bit
// sits at position 5-k. The output is registered: the first column of a block
// appears one clock after the block's sixth row is written, seven enabled
// clocks after its first row. After the last block the enable must stay high
// for six more clocks to read it out.
//
// From the description: depth 6, two 6x6 buffers, row-wise write, column-wise
// read, a 0..5 counter with asynchronous reset. This design's choice: column
// order and bit placement, chosen to reproduce the published test vectors.
module interleaver
  import phy_pkg::*;
(
  input  logic clk,
  input  logic nrst,               // asynchronous, active low
  input  logic flag_interleaver,   // clock enable
  input  cw_t  code,
  output cw_t  interleaved
);
  cw_t        wbuf [6];
  cw_t        rbuf [6];
  logic [2:0] i;

  always_ff @(posedge clk or negedge nrst) begin
    if (!nrst) begin
      i           <= '0;
      interleaved <= '0;
      for (int k = 0; k < 6; k++) begin
        wbuf[k] <= '0;
        rbuf[k] <= '0;
      end
    end else if (flag_interleaver) begin
      wbuf[i] <= code;
      for (int k = 0; k < 6; k++) interleaved[5-k] <= rbuf[k][5-i];
      if (i == 3'd5) begin
        for (int k = 0; k < 5; k++) rbuf[k] <= wbuf[k];
        rbuf[5] <= code;
        i <= '0;
      end else begin
        i <= i + 3'd1;
      end
    end
  end
endmodule
