// tb_ihcfp: IPv4 header checksum over headers with 0..10 option words, good
// and with one corrupted header byte; an IPv6 packet is ignored.
module tb_ihcfp;
  `include "fp_tb_common.svh"
  logic v4 = 1, len_valid = 1, done, discard;
  logic [7:0] hdr_len = 8'd20;
  ihcfp dut (.clk, .rst_n, .en, .start, .beat, .v4, .hdr_len, .len_valid, .done, .discard);

  initial begin
    bytes_t p;
    wait (rst_n);
    for (int o = 0; o <= 10; o++) begin
      v4 = 1;
      hdr_len = 8'(20 + 4*o);
      p = ipv4_packet($urandom, $urandom, 6, $urandom, 0, 0, rand_bytes(30), o);
      drive(eth_frame(48'h1, 48'h2, 16'h0800, p), o % 2);
      check(done && !discard, $sformatf("good header, %0d option words", o));
      p[$urandom_range(4*(5+o) - 1)] ^= 8'h20;
      drive(eth_frame(48'h1, 48'h2, 16'h0800, p));
      check(done && discard, $sformatf("bad header, %0d option words", o));
    end
    v4 = 0;
    hdr_len = 8'd40;
    drive(eth_frame(48'h1, 48'h2, 16'h86DD, ipv6_packet(1, 2, 6, rand_bytes(20))));
    check(!done && !discard, "IPv6 ignored");
    finish();
  end
endmodule
