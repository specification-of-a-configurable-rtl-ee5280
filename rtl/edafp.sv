// edafp: Ethernet destination address extraction and comparison FP.
//
// Extracts the 6-byte destination address (bytes 0..5) and compares it with
// the configured station address. Broadcast is always accepted; other group
// addresses (I/G bit set) are accepted when accept_mcast is set, and every
// address when promisc is set. Otherwise discard is raised. The document
// gives the comparison and the multicast check; the accept rules for
// broadcast/multicast/promiscuous are this design's.
//
// Interface: general FP interface. done/discard/mcast are valid from the
// cycle after the beat holding byte 5 until the next start.
module edafp
  import gppp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        start,
  input  beat_t       beat,
  input  logic [47:0] mac,
  input  logic        promisc,
  input  logic        accept_mcast,
  output logic        discard,
  output logic        mcast,
  output logic        done
);

  logic [47:0] da;
  logic        got;

  field_grab #(.MAXLEN(6)) u_da (
    .clk, .rst_n, .en, .start, .beat,
    .off(POS_W'(0)), .len(5'd6), .val(da), .done(got)
  );

  logic bcast, grp;
  assign bcast   = (da == 48'hFFFF_FFFF_FFFF);
  assign grp     = da[40];  // I/G bit: LSB of the first byte
  assign done    = got;
  assign mcast   = got && grp;
  assign discard = got && !(promisc || da == mac || bcast || (grp && accept_mcast));

endmodule
