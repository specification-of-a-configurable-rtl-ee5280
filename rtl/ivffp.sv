// ivffp: IP version field extraction FP.
//
// Extracts the version nibble (upper half of byte 14, the first IP header
// byte) and flags IPv4 or IPv6 to the controller. Any other version raises
// discard (this design's choice; the controller ignores the flag for frames
// that are not IP).
//
// Interface: general FP interface; v4, v6, done and discard are valid from
// the cycle after the beat holding byte 14 until the next start.
module ivffp
  import gppp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  start,
  input  beat_t beat,
  output logic  v4,
  output logic  v6,
  output logic  done,
  output logic  discard
);

  logic [7:0] b14;

  field_grab #(.MAXLEN(1)) u_v (
    .clk, .rst_n, .en, .start, .beat,
    .off(POS_W'(14)), .len(5'd1), .val(b14), .done(done)
  );

  assign v4      = done && b14[7:4] == 4'd4;
  assign v6      = done && b14[7:4] == 4'd6;
  assign discard = done && !(v4 || v6);

endmodule
