// tb_itlfp: IP length for IPv4 (total length) and IPv6 (payload length +
// 40) over random sizes, and the discard for an IPv4 total length below 20.
module tb_itlfp;
  `include "fp_tb_common.svh"
  logic v4 = 0, v6 = 0, len_valid, discard;
  logic [15:0] ip_len;
  itlfp dut (.clk, .rst_n, .en, .start, .beat, .v4, .v6, .ip_len, .len_valid, .discard);

  initial begin
    bytes_t p;
    int n;
    wait (rst_n);
    for (int i = 0; i < 8; i++) begin
      n = $urandom_range(200);
      v4 = 1; v6 = 0;
      drive(eth_frame(48'h1, 48'h2, 16'h0800, ipv4_packet(1, 2, 17, 0, 0, 0, rand_bytes(n))));
      check(len_valid && ip_len == 16'(20 + n) && !discard, "IPv4 total length");
      v4 = 0; v6 = 1;
      drive(eth_frame(48'h1, 48'h2, 16'h86DD, ipv6_packet(1, 2, 17, rand_bytes(n))));
      check(len_valid && ip_len == 16'(40 + n) && !discard, "IPv6 payload length + 40");
    end
    v4 = 1; v6 = 0;
    p = ipv4_packet(1, 2, 17, 0, 0, 0, rand_bytes(30));
    p[2] = 0; p[3] = 8'd19;
    drive(eth_frame(48'h1, 48'h2, 16'h0800, p));
    check(discard, "total length 19 discarded");
    finish();
  end
endmodule
