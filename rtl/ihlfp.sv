// ihlfp: IP header length extraction FP.
//
// For IPv4 the header length is the IHL field (low nibble of byte 14) in
// 4-byte units, shifted left by two; for IPv6 the base header is always 40
// bytes (extension headers are followed by the next-header FP). hdr_end
// pulses once when the received bytes reach the end of the header. An IPv4
// IHL below 5 raises discard (this design's check).
//
// hdr_len is a whole number of 4-byte words, so its two low bits are always
// zero; they are kept so that the port carries a plain byte count.
//
// Interface: general FP interface plus the version flags from the version
// FP. hdr_len/len_valid are valid from the cycle after byte 14 (and the
// version) are known until the next start.
module ihlfp
  import gppp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       start,
  input  beat_t      beat,
  input  logic       v4,
  input  logic       v6,
  output logic [7:0] hdr_len,
  output logic       len_valid,
  output logic       hdr_end,
  output logic       discard
);

  logic [7:0] b14;
  logic       got;

  field_grab #(.MAXLEN(1)) u_ihl (
    .clk, .rst_n, .en, .start, .beat,
    .off(POS_W'(14)), .len(5'd1), .val(b14), .done(got)
  );

  always_comb begin
    hdr_len   = 8'd0;
    len_valid = 1'b0;
    if (got && v4) begin
      hdr_len   = {2'b00, b14[3:0], 2'b00};
      len_valid = 1'b1;
    end else if (got && v6) begin
      hdr_len   = 8'd40;
      len_valid = 1'b1;
    end
  end
  assign discard = got && v4 && b14[3:0] < 4'd5;

  logic fired_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fired_q <= 1'b0;
      hdr_end <= 1'b0;
    end else begin
      hdr_end <= 1'b0;
      if (en) begin
        if (start) fired_q <= 1'b0;
        else if (!fired_q && len_valid && beat.valid &&
                 ({1'b0, beat.pos} + (POS_W+1)'(beat.nbytes)) >= (POS_W+1)'(14 + int'(hdr_len))) begin
          hdr_end <= 1'b1;
          fired_q <= 1'b1;
        end
      end
    end
  end

endmodule
