// tb_ivffp: version flags for IPv4 and IPv6, every other version value
// (which must raise discard), a change of the low nibble (which must not
// matter), the flags' timing relative to byte 14, and clearing on start.
module tb_ivffp;
  `include "fp_tb_common.svh"
  logic v4, v6, done, discard;
  ivffp dut (.clk, .rst_n, .en, .start, .beat, .v4, .v6, .done, .discard);

  initial begin
    bytes_t p, fr;
    beats_t q;
    wait (rst_n);
    drive(eth_frame(48'h1, 48'h2, 16'h0800, ipv4_packet(1, 2, 6, 0, 0, 0, rand_bytes(20))));
    check(done && v4 && !v6 && !discard, "IPv4");
    drive(eth_frame(48'h1, 48'h2, 16'h86DD, ipv6_packet(1, 2, 6, rand_bytes(20))));
    check(done && !v4 && v6 && !discard, "IPv6");
    p = ipv4_packet(1, 2, 6, 0, 0, 0, rand_bytes(20));
    p[0] = 8'h75;
    drive(eth_frame(48'h1, 48'h2, 16'h0800, p));
    check(done && !v4 && !v6 && discard, "version 7");
    // Every version value, with a random low nibble.
    for (int v = 0; v < 16; v++) begin
      p = ipv4_packet(1, 2, 6, 0, 0, 0, rand_bytes(20));
      p[0] = 8'((v << 4) | $urandom_range(0, 15));
      drive(eth_frame(48'h1, 48'h2, 16'h0800, p));
      check(done && v4 == (v == 4) && v6 == (v == 6) && discard == (v != 4 && v != 6),
            $sformatf("version %0d: v4 %0b v6 %0b discard %0b", v, v4, v6, discard));
    end
    // Timing: nothing before the beat holding byte 14 (bytes 12..15) has
    // passed, the flags in the cycle after it.
    p = ipv4_packet(1, 2, 6, 0, 0, 0, rand_bytes(20));
    fr = eth_frame(48'h1, 48'h2, 16'h0800, p);
    q  = to_beats(fr);
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      beat = q[i]; start = q[i].sof;
      if (i == 1) check(!done && !v4, "flags cleared by start");
    end
    @(negedge clk);
    beat = '0; start = 1'b0;
    check(done && v4 && !discard, "flags in the cycle after byte 14");
    repeat (4) @(negedge clk);
    finish();
  end
endmodule
