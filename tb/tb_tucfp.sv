// tb_tucfp: TCP/UDP checksum over IPv4 and IPv6 packets of random lengths
// (odd ones included), one-bit corruptions, the IPv4 UDP zero checksum, and
// a fragmented UDP packet whose partial sums are merged in a back-up
// accumulator and checked when the packet is reported complete; two
// packets' fragments are interleaved to use two accumulators.
module tb_tucfp;
  `include "fp_tb_common.svh"
  logic v4 = 0, v6 = 0, l4_valid = 0, ip_len_valid = 0, is_frag = 0, frag_first = 0;
  logic commit = 0, complete = 0;
  logic [POS_W-1:0] l4_start = '0;
  l4_e  l4_cls = L4_NONE;
  logic [7:0]  proto = '0;
  logic [15:0] ip_len = '0, complete_len = '0;
  logic [1:0]  frag_slot = '0, complete_slot = '0;
  logic done, discard, reasm_ok, reasm_bad;
  int n_ok = 0, n_bad = 0;

  tucfp #(.SLOTS(4)) dut (
    .clk, .rst_n, .en, .start, .beat, .v4, .v6, .l4_start, .l4_valid, .l4_cls, .proto,
    .ip_len, .ip_len_valid, .is_frag, .frag_first, .frag_slot, .commit, .complete,
    .complete_slot, .complete_len, .done, .discard, .reasm_ok, .reasm_bad
  );
  always @(posedge clk) begin
    if (rst_n && reasm_ok) n_ok++;
    if (rst_n && reasm_bad) n_bad++;
  end

  localparam int unsigned S4 = 32'h0A00_0001, D4 = 32'h0A00_0002;

  task automatic send4(input int unsigned p, input bytes_t seg, input bit frag,
                       input int unsigned off8 = 0, input bit mf = 0);
    v4 = 1; v6 = 0; l4_valid = 1; ip_len_valid = 1; is_frag = frag;
    l4_start = 14'd34; ip_len = 16'(20 + seg.size());
    proto = 8'(p); l4_cls = (p == 6) ? L4_TCP : L4_UDP;
    drive(eth_frame(48'h1, 48'h2, 16'h0800, ipv4_packet(S4, D4, p, 5, mf, off8, seg)));
  endtask

  task automatic do_commit(input logic [1:0] s, input bit first);
    @(negedge clk); commit = 1; frag_slot = s; frag_first = first;
    @(negedge clk); commit = 0;
  endtask

  task automatic do_complete(input logic [1:0] s, input int len);
    @(negedge clk); complete = 1; complete_slot = s; complete_len = 16'(len);
    @(negedge clk); complete = 0;
    @(negedge clk);
  endtask

  initial begin
    bytes_t seg, sa, sb;
    int n;
    wait (rst_n);
    for (int i = 0; i < 6; i++) begin
      n = $urandom_range(1, 120);
      seg = l4_segment((i % 2) ? 17 : 6, rand_bytes(n), psum4(S4, D4));
      send4((i % 2) ? 17 : 6, seg, 0);
      check(done && !discard, $sformatf("v4 good, %0d data bytes", n));
      seg[$urandom_range(seg.size() - 1)] ^= 8'h01;
      send4((i % 2) ? 17 : 6, seg, 0);
      check(done && discard, $sformatf("v4 corrupted, %0d data bytes", n));
    end
    // IPv6 UDP.
    seg = l4_segment(17, rand_bytes(33), psum6(128'h11, 128'h22));
    v4 = 0; v6 = 1; l4_start = 14'd54; ip_len = 16'(40 + seg.size()); proto = 8'd17; l4_cls = L4_UDP;
    is_frag = 0;
    drive(eth_frame(48'h1, 48'h2, 16'h86DD, ipv6_packet(128'h11, 128'h22, 17, seg)));
    check(done && !discard, "v6 UDP good");
    seg[9] ^= 8'h80;
    drive(eth_frame(48'h1, 48'h2, 16'h86DD, ipv6_packet(128'h11, 128'h22, 17, seg)));
    check(done && discard, "v6 UDP corrupted");
    // IPv4 UDP without checksum.
    seg = l4_segment(17, rand_bytes(20), psum4(S4, D4));
    seg[6] = 0; seg[7] = 0;
    send4(17, seg, 0);
    check(done && !discard, "v4 UDP zero checksum accepted");
    // Fragments of two packets, interleaved: A in slot 1, B in slot 2.
    sa = l4_segment(17, rand_bytes(72), psum4(S4, D4));   // 80 bytes
    sb = l4_segment(6, rand_bytes(100), psum4(S4, D4));   // 120 bytes
    send4(17, sa[40:79], 1, 5, 0);  check(done && !discard, "fragment not checked alone");
    do_commit(2'd1, 1);
    send4(6, sb[0:63], 1, 0, 1);    do_commit(2'd2, 1);
    send4(17, sa[0:39], 1, 0, 1);   do_commit(2'd1, 0);
    do_complete(2'd1, 80);
    check(n_ok == 1 && n_bad == 0, "packet A reassembled checksum ok");
    sb[70] ^= 8'h01;
    send4(6, sb[64:119], 1, 8, 0);  do_commit(2'd2, 0);
    do_complete(2'd2, 120);
    check(n_ok == 1 && n_bad == 1, "packet B corrupted: reassembled checksum bad");
    finish();
  end
endmodule
