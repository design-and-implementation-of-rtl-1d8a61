// psdu_extractor: recovers the PHR and the PSDU from the decoded bit stream.
//
// Takes the 3-bit words of the block decoder (earliest bit in bit 2) while
// dec_valid is high and walks the PPDU bit by bit, least significant bit of
// each octet first: bits 0..31 are the preamble, bits 32..39 the SFD, which
// is compared with 0xA7 (sfd_ok / sfd_err), bits 40..46 the frame length
// and bit 47 the reserved bit. psdu_len and len_valid are set after the
// PHR; every completed PSDU octet is output on psdu with a one-clock
// psdu_valid strobe, and frame_done pulses after the last one. Padding bits
// after the PSDU are ignored. clear restarts the walk for a new frame. The
// block is named in the receiver drawing; how it works is this design's
// choice.
module psdu_extractor
  import phy_pkg::*;
(
  input  logic       clk,
  input  logic       nrst,        // asynchronous, active low
  input  logic       clear,
  input  logic       dec_valid,
  input  tri_t       dec,
  output logic [6:0] psdu_len,
  output logic       len_valid,
  output logic [7:0] psdu,
  output logic       psdu_valid,
  output logic       sfd_ok,
  output logic       sfd_err,
  output logic       frame_done
);
  logic [10:0] bitcnt;
  logic [7:0]  shreg;
  logic [7:0]  octets;
  logic        done;

  always_ff @(posedge clk or negedge nrst) begin
    if (!nrst) begin
      bitcnt <= '0; shreg <= '0; octets <= '0; done <= 1'b0;
      psdu_len <= '0; len_valid <= 1'b0; psdu <= '0; psdu_valid <= 1'b0;
      sfd_ok <= 1'b0; sfd_err <= 1'b0; frame_done <= 1'b0;
    end else begin
      psdu_valid <= 1'b0;
      frame_done <= 1'b0;
      if (clear) begin
        bitcnt <= '0; shreg <= '0; octets <= '0; done <= 1'b0;
        len_valid <= 1'b0; sfd_ok <= 1'b0; sfd_err <= 1'b0;
      end else if (dec_valid && !done) begin
        logic [10:0] n;
        logic [7:0]  sh;
        logic [7:0]  oc;
        logic [6:0]  len;
        logic        lv, fin;
        n = bitcnt; sh = shreg; oc = octets; len = psdu_len; lv = len_valid;
        fin = 1'b0;
        for (int b = 0; b < 3; b++) begin
          if (!fin) begin
            sh = {dec[2-b], sh[7:1]};   // LSB arrives first
            if (n == 11'd39) begin
              if (sh == SFD) sfd_ok <= 1'b1;
              else           sfd_err <= 1'b1;
            end
            if (n == 11'd47) begin
              len = sh[6:0];
              lv  = 1'b1;
              if (sh[6:0] == 7'd0) fin = 1'b1;
            end
            if (n > 11'd47 && n[2:0] == 3'd7) begin
              psdu       <= sh;
              psdu_valid <= 1'b1;
              oc = oc + 8'd1;
              if (oc == {1'b0, len}) fin = 1'b1;
            end
            n = n + 11'd1;
          end
        end
        bitcnt <= n; shreg <= sh; octets <= oc; psdu_len <= len; len_valid <= lv;
        if (fin) begin
          done       <= 1'b1;
          frame_done <= 1'b1;
        end
      end
    end
  end
endmodule
