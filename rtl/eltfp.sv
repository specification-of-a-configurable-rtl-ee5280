// eltfp: Ethernet length/ethertype field extraction FP.
//
// Extracts bytes 12..13. A value of 1500 or less is an IEEE 802.3 length;
// 0x0600 and above is an ethertype, and the payload length then comes from
// the IP total length FP (ip_len, routed through the controller). The FP
// classifies the ethertype for the controller (IPv4, IPv6, ARP, RARP, other)
// and counts the received bytes; when the count reaches 14 + length it
// pulses frame_end. A frame that ends before the announced length is
// reached raises discard. The document gives the extraction, the counter and
// the frame-end flag; the truncation check is this design's.
//
// Interface: general FP interface plus ip_len/ip_len_valid in and etype,
// etype_cls, pay_end (byte position one past the layer-2 payload) and
// pay_end_valid out. frame_end is a one-cycle pulse.
module eltfp
  import gppp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             start,
  input  beat_t            beat,
  input  logic [15:0]      ip_len,
  input  logic             ip_len_valid,
  output logic [15:0]      etype,
  output etype_e           etype_cls,
  output logic             etype_valid,
  output logic [POS_W-1:0] pay_end,
  output logic             pay_end_valid,
  output logic             frame_end,
  output logic             discard
);

  logic [15:0] lt;
  logic        lt_got;

  field_grab #(.MAXLEN(2)) u_lt (
    .clk, .rst_n, .en, .start, .beat,
    .off(POS_W'(12)), .len(5'd2), .val(lt), .done(lt_got)
  );

  always_comb begin
    etype_cls = ET_NONE;
    if (lt_got) begin
      if (lt <= 16'd1500)       etype_cls = ET_LEN;
      else if (lt == 16'h0800)  etype_cls = ET_IPV4;
      else if (lt == 16'h86DD)  etype_cls = ET_IPV6;
      else if (lt == 16'h0806)  etype_cls = ET_ARP;
      else if (lt == 16'h8035)  etype_cls = ET_RARP;
      else                      etype_cls = ET_OTHER;
    end
  end
  assign etype       = lt;
  assign etype_valid = lt_got;

  // Layer-2 payload end: fixed for a length field, from the IP layer for IP.
  always_comb begin
    pay_end       = '0;
    pay_end_valid = 1'b0;
    if (etype_cls == ET_LEN) begin
      pay_end       = POS_W'(14) + POS_W'(lt);
      pay_end_valid = 1'b1;
    end else if ((etype_cls == ET_IPV4 || etype_cls == ET_IPV6) && ip_len_valid) begin
      pay_end       = POS_W'(14) + POS_W'(ip_len);
      pay_end_valid = 1'b1;
    end
  end

  logic [POS_W:0] cnt_q;     // bytes received so far
  logic           fired_q;   // frame_end already given for this frame

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q     <= '0;
      fired_q   <= 1'b0;
      frame_end <= 1'b0;
      discard   <= 1'b0;
    end else begin
      frame_end <= 1'b0;
      if (en) begin
        if (start) begin
          fired_q <= 1'b0;
          discard <= 1'b0;
          cnt_q   <= '0;
        end
        if (beat.valid) cnt_q <= {1'b0, beat.pos} + (POS_W+1)'(beat.nbytes);
        if (!start && !fired_q && pay_end_valid && cnt_q >= {1'b0, pay_end}) begin
          frame_end <= 1'b1;
          fired_q   <= 1'b1;
        end
        if (beat.valid && beat.eof && pay_end_valid &&
            ({1'b0, beat.pos} + (POS_W+1)'(beat.nbytes)) < {1'b0, pay_end})
          discard <= 1'b1;
      end
    end
  end

endmodule
