// tb_ipnfp: protocol and upper-layer start for IPv4 (with options) and for
// IPv6 with extension header chains (hop-by-hop, routing, destination
// options, authentication, fragment), the fragment header position, and the
// unknown-protocol discard; random extension chains and every IPv4 header
// length.
module tb_ipnfp;
  `include "fp_tb_common.svh"
  logic v4 = 0, v6 = 0, len_valid = 0, done, frag_seen, discard;
  logic [7:0] hdr_len = '0, proto;
  l4_e l4_cls;
  logic [POS_W-1:0] l4_start, frag_pos;
  ipnfp dut (.clk, .rst_n, .en, .start, .beat, .v4, .v6, .hdr_len, .len_valid, .proto,
             .l4_cls, .l4_start, .done, .frag_seen, .frag_pos, .discard);

  function automatic bytes_t ah(input int unsigned nh);
    bytes_t h;
    h.push_back(8'(nh)); h.push_back(8'd4);   // (4+2)*4 = 24 bytes
    for (int i = 2; i < 24; i++) h.push_back(8'h00);
    return h;
  endfunction

  initial begin
    bytes_t x;
    wait (rst_n);
    v4 = 1; v6 = 0; len_valid = 1;
    hdr_len = 8'd28;
    drive(eth_frame(48'h1, 48'h2, 16'h0800, ipv4_packet(1, 2, 6, 0, 0, 0, rand_bytes(20), 2)));
    check(done && proto == 8'd6 && l4_cls == L4_TCP && l4_start == 14'd42 && !discard, "v4 TCP");
    hdr_len = 8'd20;
    drive(eth_frame(48'h1, 48'h2, 16'h0800, ipv4_packet(1, 2, 2, 0, 0, 0, rand_bytes(20))));
    check(done && l4_cls == L4_IGMP && !discard, "v4 IGMP");
    drive(eth_frame(48'h1, 48'h2, 16'h0800, ipv4_packet(1, 2, 132, 0, 0, 0, rand_bytes(20))));
    check(done && l4_cls == L4_UNKNOWN && discard, "v4 unknown protocol");
    v4 = 0; v6 = 1; hdr_len = 8'd40;
    drive(eth_frame(48'h1, 48'h2, 16'h86DD, ipv6_packet(1, 2, 17, rand_bytes(30))));
    check(done && l4_cls == L4_UDP && l4_start == 14'd54 && !frag_seen, "v6 UDP, no extension");
    // hop-by-hop (16 B) -> routing (8 B) -> AH (24 B) -> fragment (8 B) -> TCP
    x = cat(v6_ext(43, 1), v6_ext(51, 0));
    x = cat(x, ah(44));
    x = cat(x, v6_frag(6, 0, 1, 5));
    drive(eth_frame(48'h1, 48'h2, 16'h86DD, ipv6_packet(1, 2, 0, cat(x, rand_bytes(40)))));
    check(done && l4_cls == L4_TCP && l4_start == 14'(54 + 56), "v6 chain to TCP");
    check(frag_seen && frag_pos == 14'(54 + 48), "v6 fragment header position");
    drive(eth_frame(48'h1, 48'h2, 16'h86DD, ipv6_packet(1, 2, 60, cat(v6_ext(58, 2), rand_bytes(30)))));
    check(done && l4_cls == L4_ICMP6 && l4_start == 14'(54 + 24) && !frag_seen, "v6 dest options to ICMPv6");
    drive(eth_frame(48'h1, 48'h2, 16'h86DD, ipv6_packet(1, 2, 0, cat(v6_ext(59, 0), rand_bytes(30)))));
    check(done && l4_cls == L4_UNKNOWN && discard, "v6 no-next-header discarded");
    // Random chains of 0..4 extension headers (types 0, 43, 60 with random
    // lengths) ending in TCP or UDP.
    for (int t = 0; t < 20; t++) begin
      int unsigned n, first, nh, len8, off, fin;
      int unsigned types[3] = '{0, 43, 60};
      bytes_t chain;
      n   = $urandom_range(0, 4);
      fin = $urandom_range(0, 1) ? 6 : 17;
      chain.delete();
      off = 0;
      first = fin;
      for (int i = n - 1; i >= 0; i--) begin
        // Built back to front so each header names the one after it.
        nh    = (i == n - 1) ? fin : first;
        first = types[$urandom_range(0, 2)];
        len8  = $urandom_range(0, 3);
        chain = cat(v6_ext(nh, len8), chain);
        off  += 8 * (len8 + 1);
      end
      drive(eth_frame(48'h1, 48'h2, 16'h86DD, ipv6_packet(1, 2, first, cat(chain, rand_bytes(30)))));
      check(done && !discard && proto == 8'(fin) && l4_start == 14'(54 + off),
            $sformatf("v6 random chain %0d: %0d headers, start %0d expected %0d", t, n, l4_start, 54 + off));
    end
    // IPv4 with every IHL from 5 to 15.
    v4 = 1; v6 = 0;
    for (int o = 0; o <= 10; o++) begin
      hdr_len = 8'(20 + 4 * o);
      drive(eth_frame(48'h1, 48'h2, 16'h0800, ipv4_packet(1, 2, 17, 0, 0, 0, rand_bytes(20), o)));
      check(done && l4_cls == L4_UDP && l4_start == 14'(34 + 4 * o) && !discard,
            $sformatf("v4 with %0d option words", o));
    end
    finish();
  end
endmodule
