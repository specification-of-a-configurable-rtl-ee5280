// tucfp: TCP-UDP checksum calculation FP.
//
// Adds, in 16-bit one's complement arithmetic, the pseudo header (source and
// destination addresses, protocol and upper-layer length) and every 16-bit
// word of the IP payload from the upper-layer start to the IP packet end (an
// odd last byte is padded with zero). The upper-layer length is the IP end
// minus the upper-layer start, i.e. IP total length minus the IP header
// length, as the document prescribes. Unfragmented packets are checked when
// their last beat passes: a folded sum other than 0xFFFF raises discard
// (IPv4 UDP with checksum field 0 carries no checksum and is accepted).
//
// Fragments are summed one by one. When the controller commits an accepted
// fragment, its partial sum is added into the back-up accumulator of its
// reassembly slot, with the pseudo header (without the length) only for the
// first fragment of the slot, so the pseudo header is counted exactly once.
// When the reassembly FP reports the slot complete, the total length is
// added and the result is checked (reasm_ok or reasm_bad pulses). The
// document gives the pseudo-header rules and the back-up accumulators per
// nested packet; the commit/complete sequencing is this design's.
//
// Interface: general FP interface plus IP/upper-layer positions and the
// reassembly FP's lookup and completion signals. done/discard are valid from
// the cycle after the eof beat until the next start.
module tucfp
  import gppp_pkg::*;
#(
  parameter int unsigned SLOTS = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic                     start,
  input  beat_t                    beat,
  input  logic                     v4,
  input  logic                     v6,
  input  logic [POS_W-1:0]         l4_start,
  input  logic                     l4_valid,
  input  l4_e                      l4_cls,
  input  logic [7:0]               proto,
  input  logic [15:0]              ip_len,
  input  logic                     ip_len_valid,
  input  logic                     is_frag,
  input  logic                     frag_first,
  input  logic [$clog2(SLOTS)-1:0] frag_slot,
  input  logic                     commit,
  input  logic                     complete,
  input  logic [$clog2(SLOTS)-1:0] complete_slot,
  input  logic [15:0]              complete_len,
  output logic                     done,
  output logic                     discard,
  output logic                     reasm_ok,
  output logic                     reasm_bad
);

  logic [31:0] dsum_q, psum_q, dsum_d, psum_d;
  logic [15:0] ck_q, ck_d;   // checksum field (UDP zero-checksum test)
  logic        done_d;

  logic [POS_W:0] ip_end;
  assign ip_end = (POS_W+1)'(14) + (POS_W+1)'(ip_len);

  always_comb begin
    logic [POS_W:0] p;
    logic [15:0]    h;
    logic [POS_W:0] alo, ahi;
    p      = '0;
    h      = '0;
    alo    = v6 ? (POS_W+1)'(22) : (POS_W+1)'(26);
    ahi    = v6 ? (POS_W+1)'(54) : (POS_W+1)'(34);
    dsum_d = start ? '0 : dsum_q;
    psum_d = start ? '0 : psum_q;
    ck_d   = start ? '0 : ck_q;
    done_d = start ? 1'b0 : done;
    if (beat.valid) begin
      for (int unsigned k = 0; k < 2; k++) begin
        p = {1'b0, beat.pos} + (POS_W+1)'(2*k);
        h = beat.data[31-16*k -: 16];
        if (2*k < beat.nbytes) begin
          if ((v4 || v6) && p >= alo && p < ahi) psum_d = psum_d + {16'd0, h};
          if (l4_valid && ip_len_valid && p >= {1'b0, l4_start} && p < ip_end) begin
            if (p + 1 == ip_end) h[7:0] = 8'd0;
            dsum_d = dsum_d + {16'd0, h};
            if (p == {1'b0, l4_start} + (POS_W+1)'(6)) ck_d = h;
          end
        end
      end
      if (beat.eof) done_d = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dsum_q <= '0;
      psum_q <= '0;
      ck_q   <= '0;
      done   <= 1'b0;
    end else if (en || start) begin
      dsum_q <= dsum_d;
      psum_q <= psum_d;
      ck_q   <= ck_d;
      done   <= done_d;
    end
  end

  // Per-packet result.
  logic [15:0] l4len, psum_f, dsum_f, total;
  assign l4len  = 16'(ip_end - {1'b0, l4_start});
  assign psum_f = oc_add(oc_fold(psum_q), {8'd0, proto});
  assign dsum_f = oc_fold(dsum_q);
  assign total  = oc_add(oc_add(psum_f, dsum_f), l4len);

  logic udp_nock;
  assign udp_nock = v4 && l4_cls == L4_UDP && ck_q == 16'd0;
  assign discard  = done && (l4_cls == L4_TCP || l4_cls == L4_UDP) && !is_frag &&
                    total != 16'hFFFF && !udp_nock;

  // Back-up accumulators, one per reassembly slot.
  logic [15:0] acc_q [SLOTS];
  logic [15:0] fin;
  assign fin = oc_add(acc_q[complete_slot], complete_len);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SLOTS; s++) acc_q[s] <= '0;
      reasm_ok  <= 1'b0;
      reasm_bad <= 1'b0;
    end else begin
      reasm_ok  <= 1'b0;
      reasm_bad <= 1'b0;
      if (commit && is_frag)
        acc_q[frag_slot] <= frag_first ? oc_add(dsum_f, psum_f)
                                       : oc_add(acc_q[frag_slot], dsum_f);
      if (complete) begin
        reasm_ok  <= fin == 16'hFFFF;
        reasm_bad <= fin != 16'hFFFF;
      end
    end
  end

endmodule
