// tb_gppp_linerate: Gigabit Ethernet line rate through the whole protocol
// processor, with every parameter at its default.
//
// Frames are sent over GMII at one byte per clock with the shortest legal
// spacing: 7 preamble bytes, the start delimiter, the frame, then 12 idle
// clocks before the next preamble. The stream mixes minimum-size and
// maximum-size frames, TCP and UDP, IPv4 and IPv6, and every fifth frame
// carries a corrupted FCS and must be dropped. Every other frame must give
// exactly one descriptor of the right kind and length, in order, with its
// payload in the data buffer model when the descriptor appears. The
// testbench also measures the time from the last byte on rxd to the
// descriptor and checks that it is shorter than the idle gap plus preamble
// (20 clocks), which is what lets one frame leave the register chain before
// the next one enters it.
module tb_gppp_linerate;
  import gppp_pkg::*;
  import gppp_tb_pkg::*;

  localparam int NFRAMES = 40;
  localparam logic [47:0]  MY_MAC = 48'h02_00_5E_10_20_30;
  localparam logic [47:0]  PEER   = 48'h02_AA_BB_CC_DD_EE;
  localparam int unsigned  MY_IP4 = 32'hC0A8_0105;
  localparam int unsigned  PEER4  = 32'hC0A8_0101;
  localparam logic [127:0] MY_IP6 = 128'h2001_0DB8_0000_0000_0000_0000_0000_0005;
  localparam logic [127:0] PEER6  = 128'h2001_0DB8_0000_0000_0000_0000_0000_0001;

  logic clk = 1'b0, rst_n = 1'b0;
  always #4 clk = ~clk;

  int checks = 0, failures = 0;
  logic        mii_mode = 1'b0, rx_dv = 1'b0, rx_er = 1'b0;
  logic [7:0]  rxd = '0;
  logic        cfg_we = 1'b0;
  logic [3:0]  cfg_addr = '0;
  logic [31:0] cfg_wdata = '0, cfg_rdata;
  logic        mem_we, desc_valid, ra_timeout;
  logic [31:0] mem_addr, mem_wdata;
  logic [3:0]  mem_be;
  desc_t       desc;
  logic [1:0]  ra_timeout_slot;
  logic [NFP-1:0] fp_discard, fp_en;

  gppp_top dut (
    .clk, .rst_n, .mii_mode, .rx_dv, .rx_er, .rxd, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata,
    .mem_we, .mem_addr, .mem_be, .mem_wdata, .desc_valid, .desc, .ra_timeout, .ra_timeout_slot,
    .fp_discard, .fp_en
  );

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  // Expected deliveries, in order.
  typedef struct {
    dkind_e kind;
    bytes_t pay;
  } exp_t;
  exp_t   expq[$];
  byte unsigned buf_m [int unsigned];
  longint cyc = 0, t_last = 0;
  int     n_desc = 0, max_lat = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && mem_we)
      for (int i = 0; i < 4; i++)
        if (mem_be[3-i]) buf_m[mem_addr + i] = mem_wdata[31-8*i -: 8];
    if (rst_n && desc_valid) begin
      exp_t e;
      bit   ok;
      n_desc++;
      if (int'(cyc - t_last) > max_lat) max_lat = int'(cyc - t_last);
      if (expq.size() == 0) begin
        check(0, "descriptor without an expected frame");
      end else begin
        e = expq.pop_front();
        check(desc.kind == e.kind && int'(desc.len) == e.pay.size(),
              $sformatf("descriptor %0d: kind %0d len %0d, expected kind %0d len %0d",
                        n_desc, desc.kind, desc.len, e.kind, e.pay.size()));
        ok = 1;
        foreach (e.pay[i])
          if (!buf_m.exists(desc.addr + i) || buf_m[desc.addr + i] != e.pay[i]) ok = 0;
        check(ok, $sformatf("descriptor %0d: payload in buffer", n_desc));
      end
    end
  end

  task automatic cfg_write(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk); cfg_we = 1'b1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 1'b0;
  endtask

  // One frame at line rate: preamble, SFD, frame, 12 idle clocks.
  task automatic send(input bytes_t f);
    bytes_t w;
    for (int i = 0; i < 7; i++) w.push_back(8'h55);
    w.push_back(8'hD5);
    w = cat(w, f);
    foreach (w[i]) begin
      @(negedge clk);
      rx_dv = 1'b1;
      rxd   = w[i];
    end
    t_last = cyc;
    @(negedge clk); rx_dv = 1'b0; rxd = '0;
    repeat (11) @(negedge clk);
  endtask

  initial begin
    bytes_t seg, fr;
    int     n, n_drop = 0, n_bytes = 0;
    longint t0, t1;
    exp_t   e;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    cfg_write(4'd0, 32'(MY_MAC[47:32]));
    cfg_write(4'd1, MY_MAC[31:0]);
    cfg_write(4'd2, MY_IP4);
    cfg_write(4'd3, MY_IP6[127:96]);
    cfg_write(4'd4, MY_IP6[95:64]);
    cfg_write(4'd5, MY_IP6[63:32]);
    cfg_write(4'd6, MY_IP6[31:0]);
    repeat (4) @(negedge clk);

    t0 = cyc;
    for (int k = 0; k < NFRAMES; k++) begin
      // Sizes: minimum frames, maximum frames (1500-byte IP packets) and
      // random ones in between.
      case (k % 3)
        0:       n = 1;
        1:       n = 1500 - 20 - ((k % 2) ? 8 : 20);
        default: n = $urandom_range(1, 1400);
      endcase
      if ((k / 3) % 2 == 0) begin
        seg = l4_segment((k % 2) ? 17 : 6, rand_bytes(n), psum4(PEER4, MY_IP4));
        fr  = eth_frame(MY_MAC, PEER, 16'h0800,
                        ipv4_packet(PEER4, MY_IP4, (k % 2) ? 17 : 6, k, 0, 0, seg));
      end else begin
        if (n > 1500 - 40 - 20) n = 1500 - 40 - 20;
        seg = l4_segment((k % 2) ? 17 : 6, rand_bytes(n), psum6(PEER6, MY_IP6));
        fr  = eth_frame(MY_MAC, PEER, 16'h86DD,
                        ipv6_packet(PEER6, MY_IP6, (k % 2) ? 17 : 6, seg));
      end
      if (k % 5 == 4) begin
        fr[fr.size() - 2] ^= 8'h40;
        n_drop++;
      end else begin
        e.kind = (k % 2) ? DK_UDP : DK_TCP;
        e.pay  = seg;
        expq.push_back(e);
      end
      n_bytes += fr.size() + 20;
      send(fr);
    end
    repeat (40) @(negedge clk);
    t1 = cyc;

    check(expq.size() == 0, $sformatf("%0d expected frames not delivered", expq.size()));
    check(n_desc == NFRAMES - n_drop,
          $sformatf("%0d descriptors, expected %0d", n_desc, NFRAMES - n_drop));
    check(max_lat < 20, $sformatf("last byte to descriptor %0d clocks, must be below 20", max_lat));
    // The whole stream took no longer than its bytes at one per clock.
    check(int'(t1 - t0) <= n_bytes + 40 + 4,
          $sformatf("%0d clocks for %0d byte times", t1 - t0, n_bytes));
    $display("line rate: %0d frames, %0d delivered, %0d dropped, %0d byte times, latency %0d clocks",
             NFRAMES, n_desc, n_drop, n_bytes, max_lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
