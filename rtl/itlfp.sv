// itlfp: IP total length extraction FP.
//
// Extracts the IP length and hands it, through the controller, to the
// Ethernet length/ethertype FP and to the upper-layer FPs. For IPv4 it is the
// total length field (bytes 16..17); for IPv6 the payload length field
// (bytes 18..19) plus the 40-byte base header, so that ip_len is always the
// number of bytes from the first IP header byte to the end of the packet.
// Bytes 16..19 are captured together and the version selects the field.
// An IPv4 total length below 20 raises discard (this design's check).
//
// Interface: general FP interface plus the version flags; ip_len/len_valid
// are valid from the cycle after byte 19 is seen until the next start.
module itlfp
  import gppp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        start,
  input  beat_t       beat,
  input  logic        v4,
  input  logic        v6,
  output logic [15:0] ip_len,
  output logic        len_valid,
  output logic        discard
);

  logic [31:0] f;
  logic        got;

  field_grab #(.MAXLEN(4)) u_tl (
    .clk, .rst_n, .en, .start, .beat,
    .off(POS_W'(16)), .len(5'd4), .val(f), .done(got)
  );

  always_comb begin
    ip_len    = 16'd0;
    len_valid = 1'b0;
    if (got && v4) begin
      ip_len    = f[31:16];
      len_valid = 1'b1;
    end else if (got && v6) begin
      ip_len    = f[15:0] + 16'd40;
      len_valid = 1'b1;
    end
  end
  assign discard = got && v4 && f[31:16] < 16'd20;

endmodule
