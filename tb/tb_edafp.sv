// tb_edafp: destination address acceptance: own address, broadcast,
// multicast with and without accept_mcast, foreign unicast, promiscuous.
module tb_edafp;
  `include "fp_tb_common.svh"
  localparam logic [47:0] ME = 48'h02_11_22_33_44_55;
  logic promisc = 0, accept_mcast = 0, discard, mcast, done;
  edafp dut (.clk, .rst_n, .en, .start, .beat, .mac(ME), .promisc, .accept_mcast,
             .discard, .mcast, .done);

  task automatic t(input logic [47:0] da, input bit p, input bit am, input bit exp_disc,
                   input bit exp_mc, input string name);
    promisc = p; accept_mcast = am;
    drive(eth_frame(da, 48'h02_99_99_99_99_99, 16'h0800, rand_bytes(46)));
    check(done && discard == exp_disc && mcast == exp_mc, name);
  endtask

  initial begin
    wait (rst_n);
    t(ME, 0, 0, 0, 0, "own address");
    t(48'hFFFF_FFFF_FFFF, 0, 0, 0, 1, "broadcast");
    t(48'h0100_5E00_0001, 0, 0, 1, 1, "multicast refused");
    t(48'h0100_5E00_0001, 0, 1, 0, 1, "multicast accepted");
    t(48'h02_11_22_33_44_56, 0, 0, 1, 0, "foreign unicast");
    t(48'h02_11_22_33_44_56, 1, 0, 0, 0, "promiscuous");
    t(48'h82_11_22_33_44_55, 0, 1, 1, 0, "first byte differs");
    t(48'hFF_11_22_33_44_55, 0, 0, 1, 1, "group address, not broadcast");
    finish();
  end
endmodule
