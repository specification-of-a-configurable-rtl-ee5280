// tb_gppp_top: end-to-end test of the protocol processor with a short
// reassembly time-out (2000 cycles) so that the time-out path is exercised.
// See gppp_top_scen.svh for the frames sent and the checks made.
module tb_gppp_top;
  logic clk = 1'b0, rst_n = 1'b0;
  always #4 clk = ~clk;
  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
  end
  localparam bit DO_TIMEOUT = 1'b1;

  gppp_top #(.TIMEOUT(32'd2000)) dut (
    .clk, .rst_n, .mii_mode, .rx_dv, .rx_er, .rxd, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata,
    .mem_we, .mem_addr, .mem_be, .mem_wdata, .desc_valid, .desc, .ra_timeout, .ra_timeout_slot,
    .fp_discard, .fp_en
  );

  `include "gppp_top_scen.svh"
endmodule
