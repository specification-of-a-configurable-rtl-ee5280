// tb_cc: the controller and counter on its own, with the FP flags driven by
// the testbench: byte positions stamped on the beats, start pulses delayed
// by each FP's stage, configuration write/read-back, layer-dependent
// enables (ARP, ICMP), shutdown and drop on a discard flag, a UDP delivery
// with its payload writes, and a fragment commit followed by a reassembled
// packet descriptor. The last chain stage is modelled by a 12-deep delay.
module tb_cc;
  import gppp_pkg::*;
  import gppp_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  beat_t beat_i = '0, beat_o, last_beat;
  beat_t dl [NFP];
  logic [NFP-1:0] fp_start, fp_en, fp_discard = '0;
  etype_e etype_cls = ET_NONE;
  logic ip_v4 = 0, ip_v6 = 0, ivf_done = 0, ihc_done = 0, ida_done = 0;
  l4_e l4_cls = L4_NONE;
  logic [7:0] l4_proto = '0;
  logic l4_valid = 0, ip_len_valid = 0, ra_done = 0, ra_frag = 0, ra_complete = 0;
  logic reasm_ok = 0, reasm_bad = 0, commit;
  logic [POS_W-1:0] l4_start = '0;
  logic [15:0] ip_len = '0, ra_off = '0, ra_complete_len = '0;
  logic [POS_W-1:0] pay_end;   // what the ELTFP derives from the IP length
  assign pay_end = POS_W'(16'd14 + ip_len);
  logic [1:0] ra_slot = '0, ra_complete_slot = '0;
  logic cfg_we = 0;
  logic [3:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0, cfg_rdata;
  cfg_t cfg;
  logic mem_we, desc_valid;
  logic [31:0] mem_addr, mem_wdata;
  logic [3:0] mem_be;
  desc_t desc;

  cc #(.SLOTS(4), .RING_BYTES(16384), .SLOT_BYTES(65536)) dut (
    .clk, .rst_n, .beat_i, .beat_o, .last_beat, .fp_start, .fp_en, .fp_discard,
    .etype_cls, .ip_v4, .ip_v6, .ivf_done, .ihc_done, .ida_done, .l4_cls, .l4_proto,
    .l4_valid, .l4_start, .pay_end, .ip_len_valid, .ra_done, .ra_frag, .ra_slot, .ra_off,
    .ra_complete, .ra_complete_slot, .ra_complete_len, .reasm_ok, .reasm_bad, .commit,
    .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata, .cfg, .mem_we, .mem_addr, .mem_be,
    .mem_wdata, .desc_valid, .desc
  );

  // Model of the register chain.
  always_ff @(posedge clk) begin
    dl[0] <= beat_o;
    for (int k = 1; k < NFP; k++) dl[k] <= dl[k-1];
  end
  assign last_beat = dl[NFP-1];

  // Observation.
  desc_t dq[$];
  byte unsigned bm [int unsigned];
  int n_commit = 0, start_ok = 0, start_bad = 0, pos_bad = 0;
  longint cyc = 0, t_sof = -1;
  int unsigned exp_pos = 0;
  always @(posedge clk) begin
    cyc++;
    if (desc_valid) dq.push_back(desc);
    if (commit) n_commit++;
    if (mem_we) for (int i = 0; i < 4; i++) if (mem_be[3-i]) bm[mem_addr + i] = mem_wdata[31-8*i -: 8];
    if (beat_i.valid) begin
      if (beat_i.sof) begin t_sof = cyc; exp_pos = 0; end
      if (beat_o.pos != POS_W'(exp_pos)) pos_bad++;
      exp_pos += 4;
    end
    for (int k = 0; k < NFP; k++)
      if (rst_n && fp_start[k]) begin
        if (cyc - t_sof == k + 1) start_ok++; else start_bad++;
      end
  end

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  task automatic cfgw(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask
  task automatic cfgr(input logic [3:0] a, output logic [31:0] d);
    @(negedge clk); cfg_addr = a; #1 d = cfg_rdata;
  endtask

  // Send the beats of f, one every 4 cycles as at GMII rate, then wait.
  task automatic send(input bytes_t f);
    beats_t q = to_beats(f);
    foreach (q[i]) begin
      @(negedge clk); beat_i = q[i]; beat_i.pos = '0;
      repeat (3) begin @(negedge clk); beat_i = '0; end
    end
    @(negedge clk); beat_i = '0;
    repeat (24) @(negedge clk);
  endtask

  task automatic flags_none();
    etype_cls = ET_NONE; ip_v4 = 0; ip_v6 = 0; ivf_done = 0; ihc_done = 0; ida_done = 0;
    l4_cls = L4_NONE; l4_valid = 0; ip_len_valid = 0; ra_done = 0; ra_frag = 0; fp_discard = '0;
  endtask

  task automatic flags_udp4(input int plen);
    etype_cls = ET_IPV4; ip_v4 = 1; ivf_done = 1; ihc_done = 1; ida_done = 1;
    l4_cls = L4_UDP; l4_proto = 8'd17; l4_valid = 1; l4_start = 14'd34;
    ip_len = 16'(20 + plen); ip_len_valid = 1; ra_done = 1;
  endtask

  initial begin
    bytes_t f, pay;
    logic [31:0] r, nd;
    repeat (3) @(negedge clk);
    rst_n = 1;
    cfgw(4'd1, 32'hCAFE_F00D);
    cfgw(4'd7, 32'h0FFF_0002);
    cfgr(4'd1, r);
    check(r == 32'hCAFE_F00D && cfg.mac[31:0] == 32'hCAFE_F00D, "MAC register");
    cfgr(4'd7, r);
    check(r[27:16] == 12'hFFF && r[1] && cfg.accept_mcast, "control register");

    // UDP delivery; the flags are those the FPs would give.
    pay = rand_bytes(30);
    f = cat(rand_bytes(34), pay);
    f = cat(f, rand_bytes(4));   // FCS position
    flags_udp4(30);
    fork
      send(f);
      begin
        // Flags appear only after the start has reached each FP; check the
        // counter and the start delays meanwhile.
        wait (fp_start[NFP-1]);
      end
    join
    check(pos_bad == 0, "byte positions stamped");
    check(start_ok == NFP && start_bad == 0, $sformatf("start pulses delayed by the stage number (%0d ok, %0d wrong)", start_ok, start_bad));
    check(dq.size() == 1 && dq[0].kind == DK_UDP && dq[0].len == 16'd30 && dq[0].proto == 8'd17,
          "UDP descriptor");
    if (dq.size() == 1) begin
      bit ok = 1;
      foreach (pay[i]) if (!bm.exists(dq[0].addr + i) || bm[dq[0].addr + i] != pay[i]) ok = 0;
      check(ok, "UDP payload written");
    end
    // Discard from the EDAFP: shutdown, drop count.
    dq.delete();
    cfgr(4'd9, nd);
    fork
      send(f);
      begin
        wait (fp_start[FP_EDA]); @(negedge clk);
        fp_discard[FP_EDA] = 1;
        repeat (3) @(negedge clk);
        check(fp_en == '0, "all FPs off after a discard");
        fp_discard[FP_EDA] = 0;
      end
    join
    cfgr(4'd9, r);
    check(dq.size() == 0 && r == nd + 1, "discarded frame dropped and counted");
    cfgr(4'd10, r);
    check(r[FP_EDA] == 1'b1, "drop reason recorded");
    // ARP: IP and TCP/UDP sets off, Ethernet payload delivered.
    flags_none();
    etype_cls = ET_ARP;
    dq.delete();
    fork
      send(rand_bytes(64));
      begin
        wait (fp_start[NFP-1]); @(negedge clk);
        check(fp_en[FP_ECC] && !fp_en[FP_IVF] && !fp_en[FP_TUC], "ARP: only Ethernet FPs on");
      end
    join
    check(dq.size() == 1 && dq[0].kind == DK_ETH_PAYLOAD && dq[0].len == 16'd46, "ARP descriptor");
    // ICMP: TCP/UDP set off, discard from the TCP/UDP checksum FP ignored.
    flags_udp4(40);
    l4_cls = L4_ICMP; l4_proto = 8'd1;
    dq.delete();
    fork
      send(rand_bytes(78));
      begin
        wait (fp_start[NFP-1]); @(negedge clk);
        check(fp_en[FP_IPN] && !fp_en[FP_TUC] && !fp_en[FP_TUL], "ICMP: TCP/UDP FPs off");
        fp_discard[FP_TUC] = 1;
      end
    join
    fp_discard = '0;
    check(dq.size() == 1 && dq[0].kind == DK_IP_PAYLOAD && dq[0].len == 16'd40, "ICMP descriptor");
    // Fragment: commit, then the reassembled descriptor.
    flags_udp4(40);
    ra_frag = 1; ra_slot = 2'd3; ra_off = 16'd80;
    dq.delete();
    n_commit = 0;
    fork
      send(rand_bytes(78));
      begin
        wait (commit);
        @(negedge clk); ra_complete = 1; ra_complete_slot = 2'd3; ra_complete_len = 16'd120;
        @(negedge clk); ra_complete = 0; reasm_ok = 1;
        @(negedge clk); reasm_ok = 0;
      end
    join
    check(n_commit == 1, "fragment committed once");
    check(dq.size() == 1 && dq[0].kind == DK_REASM && dq[0].len == 16'd120 &&
          dq[0].addr == 32'(16384 + 3*65536), "reassembled descriptor");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
