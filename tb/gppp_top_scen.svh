// Shared body of the end-to-end testbenches of gppp_top. The including
// module declares the DUT (instance dut) with its clock clk and reset rst_n,
// and sets DO_TIMEOUT to 1 when the DUT's reassembly time-out is short
// enough to be reached in simulation.
//
// Frames are sent over GMII (and once over MII) with preamble and SFD. The
// checks compare every descriptor with the expected kind and length, and
// every delivered payload byte in a model of the data buffer with the bytes
// the frame carried; a frame expected to be dropped must produce no
// descriptor and must raise the frames-dropped counter. Each mechanism of
// the design is counted and a mechanism that never happened is a failure.

  import gppp_pkg::*;
  import gppp_tb_pkg::*;

  int checks = 0, failures = 0;

  logic                     mii_mode = 1'b0, rx_dv = 1'b0, rx_er = 1'b0;
  logic [7:0]               rxd = '0;
  logic                     cfg_we = 1'b0;
  logic [3:0]               cfg_addr = '0;
  logic [31:0]              cfg_wdata = '0, cfg_rdata;
  logic                     mem_we;
  logic [31:0]              mem_addr, mem_wdata;
  logic [3:0]               mem_be;
  logic                     desc_valid;
  desc_t                    desc;
  logic                     ra_timeout;
  logic [1:0]               ra_timeout_slot;
  logic [NFP-1:0]           fp_discard, fp_en;

  localparam logic [47:0]  MY_MAC  = 48'h02_00_5E_10_20_30;
  localparam logic [47:0]  PEER    = 48'h02_AA_BB_CC_DD_EE;
  localparam int unsigned  MY_IP4  = 32'hC0A8_0105;
  localparam int unsigned  PEER4   = 32'hC0A8_0101;
  localparam logic [127:0] MY_IP6  = 128'h2001_0DB8_0000_0000_0000_0000_0000_0005;
  localparam logic [127:0] PEER6   = 128'h2001_0DB8_0000_0000_0000_0000_0000_0001;
  localparam int unsigned  RING    = 16384;
  localparam int unsigned  SLOTB   = 65536;

  // Data buffer model and descriptor log.
  byte unsigned buf_m [int unsigned];
  desc_t        dq[$];
  int           n_tmo = 0;
  always @(posedge clk) begin
    if (rst_n && mem_we)
      for (int i = 0; i < 4; i++)
        if (mem_be[3-i]) buf_m[mem_addr + i] = mem_wdata[31-8*i -: 8];
    if (rst_n && desc_valid) dq.push_back(desc);
    if (rst_n && ra_timeout) n_tmo++;
  end

  // Mechanism counters.
  int m_disc [NFP];
  int m_shutdown = 0, m_l4off = 0, m_l3off = 0;
  logic [NFP-1:0] disc_prev = '0;   // count each discard once, at its rise
  always @(posedge clk) begin
    for (int k = 0; k < NFP; k++)
      if (rst_n && fp_discard[k] && fp_en[k] && !disc_prev[k]) m_disc[k]++;
    disc_prev <= fp_discard & fp_en;
  end

  task automatic cfg_write(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk); cfg_we = 1'b1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 1'b0;
  endtask

  task automatic cfg_read(input logic [3:0] a, output logic [31:0] d);
    @(negedge clk); cfg_addr = a; #1 d = cfg_rdata;
  endtask

  task automatic send(input bytes_t f, input bit mii = 0, input int er_at = -1);
    bytes_t w;
    for (int i = 0; i < 7; i++) w.push_back(8'h55);
    w.push_back(8'hD5);
    w = cat(w, f);
    mii_mode = mii;
    foreach (w[i]) begin
      for (int n = 0; n < (mii ? 2 : 1); n++) begin
        @(negedge clk);
        rx_dv = 1'b1;
        rx_er = (er_at >= 0 && i - 8 == er_at);
        rxd   = mii ? {4'h0, (n == 0) ? w[i][3:0] : w[i][7:4]} : w[i];
      end
    end
    @(negedge clk); rx_dv = 1'b0; rx_er = 1'b0; rxd = '0;
    repeat (24) @(negedge clk);   // inter-frame gap and preamble time
  endtask

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  // Send a frame and expect one descriptor of the given kind whose payload
  // equals exp; or expect a drop (kind DK_NONE).
  task automatic expect_frame(input string name, input bytes_t f, input dkind_e kind,
                              input bytes_t exp, input bit mii = 0, input int er_at = -1);
    logic [31:0] nd0, nd1;
    desc_t d;
    bit ok;
    cfg_read(4'd9, nd0);
    dq.delete();
    send(f, mii, er_at);
    cfg_read(4'd9, nd1);
    if (kind == DK_NONE) begin
      check(dq.size() == 0 && nd1 == nd0 + 1, {name, ": expected drop"});
    end else begin
      check(dq.size() == 1 && nd1 == nd0, {name, ": expected one descriptor"});
      if (dq.size() == 1) begin
        d = dq[0];
        check(d.kind == kind, $sformatf("%s: kind %0d, expected %0d", name, d.kind, kind));
        check(int'(d.len) == exp.size(),
              $sformatf("%s: len %0d, expected %0d", name, d.len, exp.size()));
        ok = 1;
        foreach (exp[i]) if (!buf_m.exists(d.addr + i) || buf_m[d.addr + i] != exp[i]) ok = 0;
        check(ok, {name, ": payload in buffer"});
      end
    end
  endtask

  // Recompute the IPv4 header checksum after a header field was changed.
  function automatic bytes_t fix_ip4_ck(input bytes_t p);
    int unsigned ck;
    int unsigned hl = 4 * (p[0] & 8'h0F);
    bytes_t h;
    if (hl < 20) hl = 20;
    p[10] = 8'h00; p[11] = 8'h00;
    for (int i = 0; i < hl; i++) h.push_back(p[i]);
    ck = (~ocsum(h)) & 16'hFFFF;
    p[10] = 8'(ck >> 8); p[11] = 8'(ck);
    return p;
  endfunction

  // Recompute a UDP checksum after a header field was changed.
  function automatic bytes_t fix_udp_ck(input bytes_t u, input int unsigned psum);
    int unsigned ck;
    u[6] = 8'h00; u[7] = 8'h00;
    ck = (~ocsum(u, psum + 17 + u.size())) & 16'hFFFF;
    if (ck == 0) ck = 16'hFFFF;
    u[6] = 8'(ck >> 8); u[7] = 8'(ck);
    return u;
  endfunction

  initial begin
    bytes_t seg, ipp, fr, p1, p2, p3, ext;
    logic [31:0] r;
    int unsigned ps;
    int n_reasm = 0;
    foreach (m_disc[k]) m_disc[k] = 0;
    wait (rst_n);
    repeat (3) @(negedge clk);
    cfg_write(4'd0, 32'(MY_MAC[47:32]));
    cfg_write(4'd1, MY_MAC[31:0]);
    cfg_write(4'd2, MY_IP4);
    cfg_write(4'd3, MY_IP6[127:96]);
    cfg_write(4'd4, MY_IP6[95:64]);
    cfg_write(4'd5, MY_IP6[63:32]);
    cfg_write(4'd6, MY_IP6[31:0]);
    cfg_write(4'd7, {4'd0, 12'hFFF, 14'd0, 1'b1, 1'b0});
    cfg_read(4'd2, r);
    check(r == MY_IP4, "configuration read-back");

    // 1. IPv4 TCP.
    ps  = psum4(PEER4, MY_IP4);
    seg = l4_segment(6, rand_bytes(100), ps);
    expect_frame("v4 tcp", eth_frame(MY_MAC, PEER, 16'h0800, ipv4_packet(PEER4, MY_IP4, 6, 1, 0, 0, seg)),
                 DK_TCP, seg);
    // 2. IPv4 UDP, short (padded) frame.
    seg = l4_segment(17, rand_bytes(5), ps);
    expect_frame("v4 udp short", eth_frame(MY_MAC, PEER, 16'h0800, ipv4_packet(PEER4, MY_IP4, 17, 2, 0, 0, seg)),
                 DK_UDP, seg);
    // 3. IPv4 header with options, odd-length TCP.
    seg = l4_segment(6, rand_bytes(37), ps);
    expect_frame("v4 options", eth_frame(MY_MAC, PEER, 16'h0800, ipv4_packet(PEER4, MY_IP4, 6, 3, 0, 0, seg, 2)),
                 DK_TCP, seg);
    // 4. Bad TCP checksum.
    seg = l4_segment(6, rand_bytes(64), ps);
    seg[30] = seg[30] ^ 8'h10;
    expect_frame("bad l4 checksum", eth_frame(MY_MAC, PEER, 16'h0800, ipv4_packet(PEER4, MY_IP4, 6, 4, 0, 0, seg)),
                 DK_NONE, seg);
    // 5. Bad CRC.
    seg = l4_segment(17, rand_bytes(80), ps);
    fr  = eth_frame(MY_MAC, PEER, 16'h0800, ipv4_packet(PEER4, MY_IP4, 17, 5, 0, 0, seg));
    fr[fr.size()-1] ^= 8'h01;
    expect_frame("bad crc", fr, DK_NONE, seg);
    // 6. Not our MAC: early shutdown of every FP.
    fork
      expect_frame("other mac", eth_frame(PEER, MY_MAC, 16'h0800, ipv4_packet(PEER4, MY_IP4, 17, 6, 0, 0, seg)),
                   DK_NONE, seg);
      begin
        repeat (60) @(posedge clk);
        if (fp_en == '0) m_shutdown++;
      end
    join
    // 7. Bad IPv4 header checksum.
    ipp = ipv4_packet(PEER4, MY_IP4, 17, 7, 0, 0, seg);
    ipp[8] = 8'd63;
    expect_frame("bad ip checksum", eth_frame(MY_MAC, PEER, 16'h0800, ipp), DK_NONE, seg);
    // 8. Not our IP address.
    expect_frame("other ip", eth_frame(MY_MAC, PEER, 16'h0800, ipv4_packet(PEER4, PEER4, 17, 8, 0, 0, seg)),
                 DK_NONE, seg);
    // 9. ARP: whole Ethernet payload (padded to 46) to the host; IP FPs off.
    p1 = rand_bytes(28);
    fork
      expect_frame("arp", eth_frame(48'hFFFF_FFFF_FFFF, PEER, 16'h0806, p1), DK_ETH_PAYLOAD,
                   cat(p1, '{18{8'h00}}));
      begin
        repeat (70) @(posedge clk);
        if (fp_en[FP_IVF] == 1'b0 && fp_en[FP_ECC] == 1'b1) m_l3off++;
      end
    join
    // 10. ICMP: whole IP payload to the host; TCP/UDP FPs off.
    p1 = rand_bytes(40);
    fork
      expect_frame("icmp", eth_frame(MY_MAC, PEER, 16'h0800, ipv4_packet(PEER4, MY_IP4, 1, 10, 0, 0, p1)),
                   DK_IP_PAYLOAD, p1);
      begin
        repeat (80) @(posedge clk);
        if (fp_en[FP_TUC] == 1'b0 && fp_en[FP_IPN] == 1'b1) m_l4off++;
      end
    join
    // 11. Unknown IP protocol, unknown IP version, unknown ethertype.
    expect_frame("unknown proto", eth_frame(MY_MAC, PEER, 16'h0800, ipv4_packet(PEER4, MY_IP4, 99, 11, 0, 0, p1)),
                 DK_NONE, p1);
    ipp = ipv4_packet(PEER4, MY_IP4, 17, 12, 0, 0, seg);
    ipp[0] = 8'h55;
    expect_frame("ip version 5", eth_frame(MY_MAC, PEER, 16'h0800, ipp), DK_NONE, seg);
    expect_frame("unknown ethertype", eth_frame(MY_MAC, PEER, 16'h88B5, p1), DK_NONE, p1);
    // 11b. Malformed headers caught by the length FPs.
    ipp = ipv4_packet(PEER4, MY_IP4, 17, 15, 0, 0, seg);
    ipp[0] = 8'h44;
    expect_frame("ihl 4", eth_frame(MY_MAC, PEER, 16'h0800, fix_ip4_ck(ipp)), DK_NONE, seg);
    ipp = ipv4_packet(PEER4, MY_IP4, 17, 16, 0, 0, seg);
    ipp[2] = 8'h00; ipp[3] = 8'd16;
    expect_frame("total length 16", eth_frame(MY_MAC, PEER, 16'h0800, fix_ip4_ck(ipp)), DK_NONE, seg);
    // (TCP, so that no length check of a later FP fires first.)
    p3  = l4_segment(6, rand_bytes(40), ps);
    ipp = ipv4_packet(PEER4, MY_IP4, 6, 17, 0, 0, p3);
    {ipp[2], ipp[3]} = 16'({ipp[2], ipp[3]} + 16'd200);
    expect_frame("truncated frame", eth_frame(MY_MAC, PEER, 16'h0800, fix_ip4_ck(ipp)), DK_NONE, p3);
    p2 = seg;
    {p2[4], p2[5]} = 16'({p2[4], p2[5]} - 16'd2);
    p2 = fix_udp_ck(p2, ps);
    expect_frame("udp length", eth_frame(MY_MAC, PEER, 16'h0800, ipv4_packet(PEER4, MY_IP4, 17, 18, 0, 0, p2)),
                 DK_NONE, p2);
    // 12. Receive error.
    seg = l4_segment(17, rand_bytes(30), ps);
    expect_frame("rx_er", eth_frame(MY_MAC, PEER, 16'h0800, ipv4_packet(PEER4, MY_IP4, 17, 13, 0, 0, seg)),
                 DK_NONE, seg, 0, 40);
    // 13. MII mode.
    expect_frame("mii udp", eth_frame(MY_MAC, PEER, 16'h0800, ipv4_packet(PEER4, MY_IP4, 17, 14, 0, 0, seg)),
                 DK_UDP, seg, 1);
    // 14. IPv6 UDP behind a hop-by-hop and a destination options header.
    ps  = psum6(PEER6, MY_IP6);
    seg = l4_segment(17, rand_bytes(50), ps);
    ext = cat(v6_ext(60, 0), v6_ext(17, 1));
    expect_frame("v6 udp ext", eth_frame(MY_MAC, PEER, 16'h86DD, ipv6_packet(PEER6, MY_IP6, 0, cat(ext, seg))),
                 DK_UDP, seg);
    // 15. IPv6 TCP to a multicast address (accepted by configuration).
    seg = l4_segment(6, rand_bytes(21), psum6(PEER6, 128'hFF02_0000_0000_0000_0000_0000_0000_0001));
    expect_frame("v6 mcast tcp", eth_frame(48'h3333_0000_0001, PEER, 16'h86DD,
                 ipv6_packet(PEER6, 128'hFF02_0000_0000_0000_0000_0000_0000_0001, 6, seg)), DK_TCP, seg);

    // 16. IPv4 TCP in three fragments, out of order, one duplicated.
    ps  = psum4(PEER4, MY_IP4);
    seg = l4_segment(6, rand_bytes(180), ps);   // 200 bytes
    p1 = seg[0:79]; p2 = seg[80:159]; p3 = seg[160:199];
    // A stored fragment is not a drop: no descriptor, no drop count.
    cfg_read(4'd9, r);
    dq.delete();
    send(eth_frame(MY_MAC, PEER, 16'h0800, ipv4_packet(PEER4, MY_IP4, 6, 77, 1, 10, p2)));
    check(dq.size() == 0 && cfg_rdata == r, "v4 frag 2 stored");
    // The duplicate is discarded.
    expect_frame("v4 frag 2 dup", eth_frame(MY_MAC, PEER, 16'h0800, ipv4_packet(PEER4, MY_IP4, 6, 77, 1, 10, p2)),
                 DK_NONE, p2);
    dq.delete();
    send(eth_frame(MY_MAC, PEER, 16'h0800, ipv4_packet(PEER4, MY_IP4, 6, 77, 0, 20, p3)));
    check(dq.size() == 0, "v4 frag 3: no descriptor yet");
    send(eth_frame(MY_MAC, PEER, 16'h0800, ipv4_packet(PEER4, MY_IP4, 6, 77, 1, 0, p1)));
    check(dq.size() == 1 && dq[0].kind == DK_REASM && int'(dq[0].len) == seg.size(),
          "v4 reassembled descriptor");
    if (dq.size() == 1) begin
      bit ok = 1;
      n_reasm++;
      foreach (seg[i]) if (!buf_m.exists(dq[0].addr + i) || buf_m[dq[0].addr + i] != seg[i]) ok = 0;
      check(ok, "v4 reassembled payload");
      check(dq[0].addr >= RING && (dq[0].addr - RING) % SLOTB == 0, "v4 reassembly slot address");
    end

    // 17. IPv6 UDP in two fragments.
    ps  = psum6(PEER6, MY_IP6);
    seg = l4_segment(17, rand_bytes(100), ps);  // 108 bytes
    p1 = seg[0:55]; p2 = seg[56:107];
    dq.delete();
    send(eth_frame(MY_MAC, PEER, 16'h86DD, ipv6_packet(PEER6, MY_IP6, 44, cat(v6_frag(17, 0, 1, 32'hABCD), p1))));
    send(eth_frame(MY_MAC, PEER, 16'h86DD, ipv6_packet(PEER6, MY_IP6, 44, cat(v6_frag(17, 7, 0, 32'hABCD), p2))));
    check(dq.size() == 1 && dq[0].kind == DK_REASM && int'(dq[0].len) == seg.size(),
          "v6 reassembled descriptor");
    if (dq.size() == 1) begin
      bit ok = 1;
      n_reasm++;
      foreach (seg[i]) if (!buf_m.exists(dq[0].addr + i) || buf_m[dq[0].addr + i] != seg[i]) ok = 0;
      check(ok, "v6 reassembled payload");
    end

    // 18. Fragments whose reassembled checksum is wrong: no descriptor.
    seg = l4_segment(17, rand_bytes(40), psum4(PEER4, MY_IP4));
    seg[20] ^= 8'h04;
    dq.delete();
    send(eth_frame(MY_MAC, PEER, 16'h0800, ipv4_packet(PEER4, MY_IP4, 17, 90, 1, 0, seg[0:23])));
    send(eth_frame(MY_MAC, PEER, 16'h0800, ipv4_packet(PEER4, MY_IP4, 17, 90, 0, 3, seg[24:47])));
    check(dq.size() == 0, "bad reassembled checksum: no descriptor");

    // 19. A lone fragment times out.
    if (DO_TIMEOUT) begin
      send(eth_frame(MY_MAC, PEER, 16'h0800, ipv4_packet(PEER4, MY_IP4, 17, 91, 1, 0, seg[0:23])));
      repeat (3000) @(negedge clk);
      check(n_tmo >= 1, "reassembly time-out");
    end

    // Mechanism coverage.
    check(m_disc[FP_ECC] > 0, "ECCFP discard seen");
    check(m_disc[FP_EDA] > 0, "EDAFP discard seen");
    check(m_disc[FP_ELT] > 0, "ELTFP discard seen");
    check(m_disc[FP_IVF] > 0, "IVFFP discard seen");
    check(m_disc[FP_IHL] > 0, "IHLFP discard seen");
    check(m_disc[FP_ITL] > 0, "ITLFP discard seen");
    check(m_disc[FP_IHC] > 0, "IHCFP discard seen");
    check(m_disc[FP_IDA] > 0, "IDAFP discard seen");
    check(m_disc[FP_IPN] > 0, "IPNFP discard seen");
    check(m_disc[FP_IRA] > 0, "IRAFP duplicate discard seen");
    check(m_disc[FP_TUC] > 0, "TUCFP discard seen");
    check(m_disc[FP_TUL] > 0, "TULFP discard seen");
    check(m_shutdown > 0, "layer-transparent shutdown seen");
    check(m_l3off > 0, "IP set disabled for ARP");
    check(m_l4off > 0, "TCP/UDP set disabled for ICMP");
    check(n_reasm == 2, "two reassemblies");
    $display("mechanisms: ecc=%0d eda=%0d elt=%0d ihl=%0d itl=%0d tul=%0d ivf=%0d ihc=%0d ida=%0d ipn=%0d ira=%0d tuc=%0d shutdown=%0d l3off=%0d l4off=%0d reasm=%0d timeout=%0d",
             m_disc[FP_ECC], m_disc[FP_EDA], m_disc[FP_ELT], m_disc[FP_IHL], m_disc[FP_ITL], m_disc[FP_TUL], m_disc[FP_IVF], m_disc[FP_IHC], m_disc[FP_IDA],
             m_disc[FP_IPN], m_disc[FP_IRA], m_disc[FP_TUC], m_shutdown, m_l3off, m_l4off,
             n_reasm, n_tmo);
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
