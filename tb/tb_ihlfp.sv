// tb_ihlfp: IPv4 header lengths 20..60 bytes with the header-end pulse at
// the right byte count, IPv6's fixed 40 bytes and the IHL < 5 discard.
module tb_ihlfp;
  `include "fp_tb_common.svh"
  logic v4 = 0, v6 = 0, len_valid, hdr_end, discard;
  logic [7:0] hdr_len;
  int n_he = 0;
  ihlfp dut (.clk, .rst_n, .en, .start, .beat, .v4, .v6, .hdr_len, .len_valid, .hdr_end, .discard);
  always @(posedge clk) if (rst_n && hdr_end) n_he++;

  initial begin
    bytes_t p;
    wait (rst_n);
    for (int o = 0; o <= 10; o++) begin
      v4 = 1; v6 = 0; n_he = 0;
      drive(eth_frame(48'h1, 48'h2, 16'h0800, ipv4_packet(1, 2, 6, 0, 0, 0, rand_bytes(20), o)));
      check(len_valid && hdr_len == 8'(20 + 4*o) && !discard, $sformatf("IHL %0d", 5 + o));
      check(n_he == 1, "one header-end pulse");
    end
    v4 = 0; v6 = 1;
    drive(eth_frame(48'h1, 48'h2, 16'h86DD, ipv6_packet(1, 2, 6, rand_bytes(20))));
    check(len_valid && hdr_len == 8'd40, "IPv6 40 bytes");
    v4 = 1; v6 = 0;
    p = ipv4_packet(1, 2, 6, 0, 0, 0, rand_bytes(20));
    p[0] = 8'h44;
    drive(eth_frame(48'h1, 48'h2, 16'h0800, p));
    check(discard, "IHL 4 discarded");
    finish();
  end
endmodule
