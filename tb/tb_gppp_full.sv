// tb_gppp_full: end-to-end test of the protocol processor with every
// parameter at its default. The reassembly time-out (30 s of a 125 MHz
// clock) is not reached; everything else in gppp_top_scen.svh is run.
module tb_gppp_full;
  logic clk = 1'b0, rst_n = 1'b0;
  always #4 clk = ~clk;
  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
  end
  localparam bit DO_TIMEOUT = 1'b0;

  gppp_top dut (
    .clk, .rst_n, .mii_mode, .rx_dv, .rx_er, .rxd, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata,
    .mem_we, .mem_addr, .mem_be, .mem_wdata, .desc_valid, .desc, .ra_timeout, .ra_timeout_slot,
    .fp_discard, .fp_en
  );

  `include "gppp_top_scen.svh"
endmodule
