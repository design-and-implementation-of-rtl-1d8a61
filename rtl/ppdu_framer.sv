// ppdu_framer: builds the PHY protocol data unit and feeds it, three bits per
// clock, to the block encoder.
//
// The MAC writes the PSDU one octet per psdu_wr strobe; a write counter places
// octet k at octet position 6+k of a 1080-bit buffer. When tx rises the
// synchronisation header (32 zero bits, SFD 0xA7) and the PHR (7-bit length,
// reserved bit 0) are written into octets 0..5 and a read counter walks the
// buffer in steps of three bits, least significant bit of each octet first.
// The frame is padded with zeros to a whole number of 18-bit groups, the
// amount that fills one 6x6 interleaver block after (6,3) coding; 1080 bits
// is the 1064-bit maximum PPDU rounded up that way. data[2] holds the
// earliest of the three bits. data_valid is high for n_words consecutive
// clocks starting one clock after the tx rising edge.
//
// From the description: the 1080-bit buffer, the length and PSDU inputs and
// the two counters. This design's choice: the write strobe, zero padding,
// in-buffer placement and bit order inside the 3-bit word.
module ppdu_framer
  import phy_pkg::*;
#(
  parameter int unsigned BUF_BITS = 1080
) (
  input  logic       clk,
  input  logic       nrst,       // asynchronous, active low
  input  logic [6:0] psdu_len,   // sampled at the tx rising edge
  input  logic [7:0] psdu,
  input  logic       psdu_wr,    // write one PSDU octet
  input  logic       tx,         // rising edge starts a frame
  output tri_t       data,
  output logic       data_valid,
  output logic [8:0] n_words,    // 3-bit words in the current frame
  output logic       busy
);
  localparam int unsigned OCTETS = BUF_BITS / 8;

  logic [BUF_BITS-1:0] buffer;
  logic [7:0]  wr_cnt;           // octets written
  logic [10:0] rd_bit;           // next bit to read
  logic [8:0]  rd_word;
  logic [10:0] frame_bits;
  logic [6:0]  len_q;
  logic        tx_q;
  logic        start;

  assign start = tx & ~tx_q & ~busy;
  assign frame_bits = 11'(HDR_BITS) + {1'b0, len_q, 3'b000};

  // bits rounded up to a multiple of 18, expressed in 3-bit words
  function automatic logic [8:0] words_for(logic [6:0] len);
    logic [10:0] bits;
    logic [6:0]  groups;
    bits   = 11'(HDR_BITS) + {1'b0, len, 3'b000};
    groups = 7'((bits + 11'd17) / 11'd18);
    return 9'(groups * 6);
  endfunction

  always_ff @(posedge clk or negedge nrst) begin
    if (!nrst) begin
      buffer     <= '0;
      wr_cnt     <= '0;
      rd_bit     <= '0;
      rd_word    <= '0;
      len_q      <= '0;
      tx_q       <= 1'b0;
      busy       <= 1'b0;
      data       <= '0;
      data_valid <= 1'b0;
      n_words    <= '0;
    end else begin
      tx_q <= tx;
      if (psdu_wr && !busy && wr_cnt < 8'(MAX_PSDU) && (32'(wr_cnt) + 6) < OCTETS) begin
        buffer[8*(6+int'(wr_cnt)) +: 8] <= psdu;
        wr_cnt <= wr_cnt + 8'd1;
      end
      if (start) begin
        buffer[39:0]  <= {SFD, 32'h0000_0000};
        buffer[47:40] <= {1'b0, psdu_len};
        len_q   <= psdu_len;
        n_words <= words_for(psdu_len);
        rd_bit  <= '0;
        rd_word <= '0;
        busy    <= 1'b1;
      end
      data_valid <= 1'b0;
      if (busy) begin
        if (rd_word < n_words) begin
          for (int b = 0; b < 3; b++) begin
            data[2-b] <= ((rd_bit + 11'(b)) < frame_bits) ? buffer[int'(rd_bit) + b] : 1'b0;
          end
          data_valid <= 1'b1;
          rd_bit  <= rd_bit + 11'd3;
          rd_word <= rd_word + 9'd1;
        end else begin
          busy   <= 1'b0;
          wr_cnt <= '0;
        end
      end
    end
  end
endmodule
