// tulfp: TCP-UDP packet length counter FP.
//
// Works out the upper-layer length of the packet (IP end minus upper-layer
// start, which for IPv4 is total length minus header length) for the host
// and for the checksum and reassembly logic, and counts the upper-layer bytes
// as they pass; done rises when the count reaches that length. For an
// unfragmented UDP datagram it also extracts the UDP length field and raises
// discard when it disagrees with the IP length (this design's check).
//
// Interface: general FP interface plus the IP length and upper-layer start.
// l4_len/len_valid are valid as soon as both inputs are; done and discard
// from the cycle after the last upper-layer byte until the next start.
module tulfp
  import gppp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             start,
  input  beat_t            beat,
  input  logic [POS_W-1:0] l4_start,
  input  logic             l4_valid,
  input  l4_e              l4_cls,
  input  logic [15:0]      ip_len,
  input  logic             ip_len_valid,
  input  logic             is_frag,
  output logic [15:0]      l4_len,
  output logic             len_valid,
  output logic [15:0]      l4_count,
  output logic             done,
  output logic             discard
);

  logic [15:0] ulen;
  logic        ulen_got;

  field_grab #(.MAXLEN(2)) u_ul (
    .clk, .rst_n, .en, .start, .beat,
    .off(l4_valid ? l4_start + POS_W'(4) : '1), .len(5'd2), .val(ulen), .done(ulen_got)
  );

  logic [15:0] ip_end;
  assign ip_end    = 16'd14 + ip_len;
  assign len_valid = l4_valid && ip_len_valid;
  assign l4_len    = len_valid ? ip_end - 16'(l4_start) : 16'd0;

  // Bytes of the current beat that lie inside [l4_start, ip_end).
  logic [15:0] lo, hi;
  assign lo = 16'(beat.pos) < 16'(l4_start) ? 16'(l4_start) : 16'(beat.pos);
  assign hi = (16'(beat.pos) + 16'(beat.nbytes)) > ip_end ? ip_end
                                                          : 16'(beat.pos) + 16'(beat.nbytes);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l4_count <= '0;
      done     <= 1'b0;
    end else if (en) begin
      if (start) begin
        l4_count <= '0;
        done     <= 1'b0;
      end else if (beat.valid && len_valid) begin
        if (hi > lo) l4_count <= l4_count + (hi - lo);
        if (hi >= ip_end) done <= 1'b1;
      end
    end
  end

  assign discard = ulen_got && l4_cls == L4_UDP && !is_frag && ulen != l4_len;

endmodule
