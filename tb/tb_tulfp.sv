// tb_tulfp: upper-layer length (IP end minus upper-layer start) for IPv4
// with options and IPv6, the byte counter reaching it, and the UDP length
// field consistency check.
module tb_tulfp;
  `include "fp_tb_common.svh"
  logic l4_valid = 0, ip_len_valid = 0, is_frag = 0, len_valid, done, discard;
  logic [POS_W-1:0] l4_start = '0;
  l4_e  l4_cls = L4_NONE;
  logic [15:0] ip_len = '0, l4_len, l4_count;
  tulfp dut (.clk, .rst_n, .en, .start, .beat, .l4_start, .l4_valid, .l4_cls, .ip_len,
             .ip_len_valid, .is_frag, .l4_len, .len_valid, .l4_count, .done, .discard);

  initial begin
    bytes_t seg;
    int n;
    wait (rst_n);
    for (int i = 0; i < 6; i++) begin
      n   = $urandom_range(1, 150);
      seg = l4_segment(17, rand_bytes(n), 0);
      l4_valid = 1; ip_len_valid = 1; l4_cls = L4_UDP; is_frag = 0;
      l4_start = 14'(34 + 4*i); ip_len = 16'(20 + 4*i + seg.size());
      drive(eth_frame(48'h1, 48'h2, 16'h0800, ipv4_packet(1, 2, 17, 0, 0, 0, seg, i)));
      check(len_valid && l4_len == 16'(seg.size()), $sformatf("v4 length, %0d option words", i));
      check(done && l4_count == 16'(seg.size()), "byte count reached");
      check(!discard, "UDP length consistent");
    end
    seg = l4_segment(17, rand_bytes(40), 0);
    seg[5] = seg[5] + 8'd2;
    l4_start = 14'd54; ip_len = 16'(40 + seg.size());
    drive(eth_frame(48'h1, 48'h2, 16'h86DD, ipv6_packet(1, 2, 17, seg)));
    check(l4_len == 16'(seg.size()) && discard, "v6 UDP length field wrong");
    l4_cls = L4_TCP;
    seg = l4_segment(6, rand_bytes(40), 0);
    ip_len = 16'(40 + seg.size());
    drive(eth_frame(48'h1, 48'h2, 16'h86DD, ipv6_packet(1, 2, 6, seg)));
    check(l4_len == 16'(seg.size()) && !discard && done, "v6 TCP length");
    finish();
  end
endmodule
