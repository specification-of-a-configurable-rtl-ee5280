// tb_eltfp: ethertype classes, the 802.3 length case, the payload end from
// the IP length, the frame-end pulse when the byte count reaches it, and
// the truncation discard.
module tb_eltfp;
  `include "fp_tb_common.svh"
  logic [15:0] ip_len = '0, etype;
  logic        ip_len_valid = 0, etype_valid, pay_end_valid, frame_end, discard;
  etype_e      etype_cls;
  logic [POS_W-1:0] pay_end;
  int          n_fe = 0;
  eltfp dut (.clk, .rst_n, .en, .start, .beat, .ip_len, .ip_len_valid, .etype, .etype_cls,
             .etype_valid, .pay_end, .pay_end_valid, .frame_end, .discard);
  always @(posedge clk) if (rst_n && frame_end) n_fe++;

  initial begin
    bytes_t f;
    wait (rst_n);
    // IPv4, IP length 100: payload ends at byte 114.
    ip_len = 16'd100; ip_len_valid = 1;
    n_fe = 0;
    drive(eth_frame(48'h1, 48'h2, 16'h0800, rand_bytes(100)));
    check(etype_cls == ET_IPV4 && etype == 16'h0800, "IPv4 class");
    check(pay_end_valid && pay_end == 14'd114, "IPv4 payload end");
    check(n_fe == 1 && !discard, "one frame-end pulse, no discard");
    // IPv6 and ARP classes.
    drive(eth_frame(48'h1, 48'h2, 16'h86DD, rand_bytes(100)));
    check(etype_cls == ET_IPV6, "IPv6 class");
    drive(eth_frame(48'h1, 48'h2, 16'h0806, rand_bytes(28)));
    check(etype_cls == ET_ARP, "ARP class");
    drive(eth_frame(48'h1, 48'h2, 16'h8035, rand_bytes(28)));
    check(etype_cls == ET_RARP, "RARP class");
    drive(eth_frame(48'h1, 48'h2, 16'h88CC, rand_bytes(28)));
    check(etype_cls == ET_OTHER, "other class");
    // 802.3 length field 50.
    n_fe = 0;
    ip_len_valid = 0;
    drive(eth_frame(48'h1, 48'h2, 16'd50, rand_bytes(50)));
    check(etype_cls == ET_LEN && pay_end == 14'd64 && n_fe == 1, "802.3 length");
    // Truncated: the IP length claims 200 bytes, the frame carries 100.
    ip_len = 16'd200; ip_len_valid = 1;
    n_fe = 0;
    drive(eth_frame(48'h1, 48'h2, 16'h0800, rand_bytes(100)));
    check(discard && n_fe == 0, "truncated frame discarded");
    finish();
  end
endmodule
