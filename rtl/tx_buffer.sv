// tx_buffer: holds the spread chip words of one frame for the modulator.
//
// A simple two-port memory of DEPTH words of W chips. Writes go to
// consecutive addresses while wr_en is high; clear (at the start of a frame)
// resets both pointers. The modulator pops words in the same order with
// rd_en; rd_data and rd_valid follow one clock later. count is the number of
// words written. DEPTH = 360 holds the longest frame (127-octet PSDU:
// 1080 bits, 360 three-bit words, one chip word each). The description only
// names this buffer; its organisation is this design's choice.
module tx_buffer #(
  parameter int unsigned DEPTH = 360,
  parameter int unsigned W     = 180
) (
  input  logic         clk,
  input  logic         nrst,      // asynchronous, active low
  input  logic         clear,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         rd_valid,
  output logic [8:0]   count
);
  logic [W-1:0] mem [DEPTH];
  logic [8:0]   wr_ptr, rd_ptr;

  always_ff @(posedge clk) begin
    if (wr_en && 32'(wr_ptr) < DEPTH) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge nrst) begin
    if (!nrst) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      rd_data  <= '0;
      rd_valid <= 1'b0;
    end else begin
      rd_valid <= 1'b0;
      if (clear) begin
        wr_ptr <= '0;
        rd_ptr <= '0;
      end else begin
        if (wr_en && 32'(wr_ptr) < DEPTH) wr_ptr <= wr_ptr + 9'd1;
        if (rd_en && rd_ptr < wr_ptr) begin
          rd_data  <= mem[rd_ptr];
          rd_valid <= 1'b1;
          rd_ptr   <= rd_ptr + 9'd1;
        end
      end
    end
  end

  assign count = wr_ptr;
endmodule
