// tb_idafp: IPv4 and IPv6 destination acceptance: own address, other
// unicast, multicast with and without accept_mcast, IPv4 broadcast.
module tb_idafp;
  `include "fp_tb_common.svh"
  localparam logic [31:0]  A4 = 32'h0A00_0007;
  localparam logic [127:0] A6 = 128'hFE80_0000_0000_0000_0211_22FF_FE33_4455;
  logic v4 = 0, v6 = 0, accept_mcast = 0, mcast, done, discard;
  idafp dut (.clk, .rst_n, .en, .start, .beat, .v4, .v6, .ipv4(A4), .ipv6(A6), .accept_mcast,
             .mcast, .done, .discard);

  task automatic t4(input logic [31:0] d, input bit am, input bit exp_disc, input string name);
    v4 = 1; v6 = 0; accept_mcast = am;
    drive(eth_frame(48'h1, 48'h2, 16'h0800, ipv4_packet(32'h0A00_0001, d, 17, 0, 0, 0, rand_bytes(20))));
    check(done && discard == exp_disc, name);
  endtask
  task automatic t6(input logic [127:0] d, input bit am, input bit exp_disc, input string name);
    v4 = 0; v6 = 1; accept_mcast = am;
    drive(eth_frame(48'h1, 48'h2, 16'h86DD, ipv6_packet(128'h1, d, 17, rand_bytes(20))));
    check(done && discard == exp_disc, name);
  endtask

  initial begin
    wait (rst_n);
    t4(A4, 0, 0, "v4 own");
    t4(A4 ^ 32'h100, 0, 1, "v4 other");
    t4(32'hE000_00FB, 0, 1, "v4 multicast refused");
    t4(32'hE000_00FB, 1, 0, "v4 multicast accepted");
    check(mcast, "v4 multicast flag");
    t4(32'hFFFF_FFFF, 0, 0, "v4 broadcast");
    t6(A6, 0, 0, "v6 own");
    t6(A6 ^ (128'h1 << 100), 0, 1, "v6 other (high bits)");
    t6(A6 ^ 128'h1, 0, 1, "v6 other (low bits)");
    t6(128'hFF02_0000_0000_0000_0000_0000_0000_0001, 0, 1, "v6 multicast refused");
    t6(128'hFF02_0000_0000_0000_0000_0000_0000_0001, 1, 0, "v6 multicast accepted");
    finish();
  end
endmodule
