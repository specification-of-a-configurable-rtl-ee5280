// idafp: IP destination address extraction and comparison FP.
//
// Extracts the destination address (IPv4 bytes 30..33, IPv6 bytes 38..53,
// chosen by the version flags) and compares it with the configured address
// of the terminal. It also recognises multicast (IPv4 224.0.0.0/4, IPv6
// ff00::/8) and the IPv4 limited broadcast. An unrecognised address raises
// discard; multicast is accepted when accept_mcast is set, broadcast always.
// The document gives the comparison and the multicast check; the accept
// rules are this design's.
//
// Interface: general FP interface plus the version flags and configured
// addresses. done/discard/mcast are valid from the cycle after the address's
// last byte until the next start.
module idafp
  import gppp_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         start,
  input  beat_t        beat,
  input  logic         v4,
  input  logic         v6,
  input  logic [31:0]  ipv4,
  input  logic [127:0] ipv6,
  input  logic         accept_mcast,
  output logic         mcast,
  output logic         done,
  output logic         discard
);

  logic [127:0] a;
  logic         got;

  field_grab #(.MAXLEN(16)) u_da (
    .clk, .rst_n, .en, .start, .beat,
    .off(v6 ? POS_W'(38) : POS_W'(30)), .len(v6 ? 5'd16 : 5'd4),
    .val(a), .done(got)
  );

  logic match, bcast;
  always_comb begin
    match = 1'b0;
    mcast = 1'b0;
    bcast = 1'b0;
    if (got && v4) begin
      match = a[31:0] == ipv4;
      mcast = a[31:28] == 4'hE;
      bcast = a[31:0] == 32'hFFFF_FFFF;
    end else if (got && v6) begin
      match = a == ipv6;
      mcast = a[127:120] == 8'hFF;
    end
  end

  assign done    = got && (v4 || v6);
  assign discard = done && !(match || bcast || (mcast && accept_mcast));

endmodule
