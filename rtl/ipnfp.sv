// ipnfp: IP protocol / next header extraction FP.
//
// IPv4: takes the protocol field (byte 23); the upper layer starts at
// 14 + header length. IPv6: starts from the next-header field (byte 20) and
// walks the extension header chain from byte 54, reading each header's
// next-header and length bytes as they stream past, until a known upper
// layer (TCP 6, UDP 17, ICMP 1, IGMP 2, ICMPv6 58) or a header it cannot
// skip is reached. Skippable headers are hop-by-hop (0), routing (43) and
// destination options (60), size (len+1)*8, authentication (51), size
// (len+2)*4, and fragment (44), always 8 bytes, whose position is reported
// to the reassembly FP. The chain walk follows the document; the set of
// skippable headers beyond those it names is this design's.
//
// Interface: general FP interface plus version flags and IPv4 header length.
// proto, l4_cls and l4_start are valid while done is high (from the cycle
// after the deciding byte until the next start). frag_seen/frag_pos report
// an IPv6 fragment header. Unknown upper layers raise discard.
module ipnfp
  import gppp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             start,
  input  beat_t            beat,
  input  logic             v4,
  input  logic             v6,
  input  logic [7:0]       hdr_len,
  input  logic             len_valid,
  output logic [7:0]       proto,
  output l4_e              l4_cls,
  output logic [POS_W-1:0] l4_start,
  output logic             done,
  output logic             frag_seen,
  output logic [POS_W-1:0] frag_pos,
  output logic             discard
);

  function automatic logic is_ext(input logic [7:0] nh);
    return nh == 8'd0 || nh == 8'd43 || nh == 8'd60 || nh == 8'd44 || nh == 8'd51;
  endfunction

  function automatic l4_e classify(input logic [7:0] nh);
    case (nh)
      8'd6:    return L4_TCP;
      8'd17:   return L4_UDP;
      8'd1:    return L4_ICMP;
      8'd2:    return L4_IGMP;
      8'd58:   return L4_ICMP6;
      default: return L4_UNKNOWN;
    endcase
  endfunction

  // IPv6 chain walker state.
  logic [7:0]       nh_q, nxt_q;   // type of the header at cur_q, its next header
  logic [POS_W-1:0] cur_q;         // start of the header being walked
  logic             have_q;        // nh_q is known
  logic             v6done_q;
  logic [7:0]       p23_q;         // IPv4 protocol byte
  logic             p23got_q;
  logic             fseen_q;
  logic [POS_W-1:0] fpos_q;

  logic [7:0]       nh_d, nxt_d;
  logic [POS_W-1:0] cur_d, fpos_d;
  logic             have_d, v6done_d, fseen_d, p23got_d;
  logic [7:0]       p23_d;

  always_comb begin
    logic [POS_W-1:0] p;
    logic [7:0]       b;
    p        = '0;
    b        = '0;
    nh_d     = start ? '0 : nh_q;
    nxt_d    = start ? '0 : nxt_q;
    cur_d    = start ? POS_W'(54) : cur_q;
    have_d   = start ? 1'b0 : have_q;
    v6done_d = start ? 1'b0 : v6done_q;
    fseen_d  = start ? 1'b0 : fseen_q;
    fpos_d   = start ? '0 : fpos_q;
    p23_d    = start ? '0 : p23_q;
    p23got_d = start ? 1'b0 : p23got_q;
    if (beat.valid) begin
      for (int unsigned i = 0; i < NBYTE; i++) begin
        p = beat.pos + POS_W'(i);
        b = lane_byte(beat.data, i);
        if (i < beat.nbytes) begin
          if (p == POS_W'(23)) begin
            p23_d    = b;
            p23got_d = 1'b1;
          end
          if (p == POS_W'(20)) begin
            nh_d   = b;
            have_d = 1'b1;
            if (!is_ext(b)) v6done_d = 1'b1;
          end else if (have_d && !v6done_d) begin
            if (p == cur_d) begin
              nxt_d = b;
              if (nh_d == 8'd44) begin
                fseen_d = 1'b1;
                fpos_d  = cur_d;
              end
            end else if (p == cur_d + POS_W'(1)) begin
              case (nh_d)
                8'd44:   cur_d = cur_d + POS_W'(8);
                8'd51:   cur_d = cur_d + (POS_W'(b) + POS_W'(2)) * POS_W'(4);
                default: cur_d = cur_d + (POS_W'(b) + POS_W'(1)) * POS_W'(8);
              endcase
              nh_d = nxt_d;
              if (!is_ext(nxt_d)) v6done_d = 1'b1;
            end
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nh_q <= '0; nxt_q <= '0; cur_q <= POS_W'(54); have_q <= 1'b0;
      v6done_q <= 1'b0; fseen_q <= 1'b0; fpos_q <= '0;
      p23_q <= '0; p23got_q <= 1'b0;
    end else if (en || start) begin
      nh_q <= nh_d; nxt_q <= nxt_d; cur_q <= cur_d; have_q <= have_d;
      v6done_q <= v6done_d; fseen_q <= fseen_d; fpos_q <= fpos_d;
      p23_q <= p23_d; p23got_q <= p23got_d;
    end
  end

  always_comb begin
    proto    = '0;
    l4_start = '0;
    done     = 1'b0;
    if (v4 && p23got_q && len_valid) begin
      proto    = p23_q;
      l4_start = POS_W'(14) + POS_W'(hdr_len);
      done     = 1'b1;
    end else if (v6 && v6done_q) begin
      proto    = nh_q;
      l4_start = cur_q;
      done     = 1'b1;
    end
  end
  assign l4_cls    = done ? classify(proto) : L4_NONE;
  assign frag_seen = v6 && fseen_q;
  assign frag_pos  = fpos_q;
  assign discard   = done && l4_cls == L4_UNKNOWN;

endmodule
