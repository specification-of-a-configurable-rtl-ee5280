// tb_eccfp: CRC-32 check of frames of every length modulo 4, good and with
// one corrupted bit (in the data or in the FCS), with and without idle
// cycles between beats. The expected FCS comes from a bitwise reference.
module tb_eccfp;
  `include "fp_tb_common.svh"
  logic discard, done;
  eccfp dut (.clk, .rst_n, .en, .start, .beat, .discard, .done);

  initial begin
    bytes_t f;
    wait (rst_n);
    for (int n = 0; n < 24; n++) begin
      f = eth_frame(48'h1, 48'h2, 16'h0800, rand_bytes(46 + n));
      drive(f, n % 3);
      check(done && !discard, $sformatf("good frame len %0d", f.size()));
      f[$urandom_range(f.size() - 1)] ^= 8'(1 << $urandom_range(7));
      drive(f, n % 2);
      check(done && discard, $sformatf("corrupted frame len %0d", f.size()));
    end
    finish();
  end
endmodule
