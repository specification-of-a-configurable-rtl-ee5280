// tb_irafp: reassembly table behaviour: an unfragmented packet is not a
// fragment; three IPv4 fragments of one packet share a slot, the first
// committed one allocates it, a duplicate is discarded, and the packet
// completes with the right total length when the last byte count is in;
// two packets interleaved use two slots; an IPv6 fragment header is read;
// a lone fragment times out after TIMEOUT cycles; the table fills up and
// empties by time-outs; a packet runs out of offset records; fragments in a
// random order complete once.
module tb_irafp;
  `include "fp_tb_common.svh"
  localparam int unsigned TMO = 300;
  logic v4 = 0, v6 = 0, frag_seen = 0, l4_valid = 0, ip_len_valid = 0, commit = 0;
  logic [POS_W-1:0] frag_pos = '0, l4_start = '0;
  logic [7:0]  proto = 8'd17;
  logic [15:0] ip_len = '0;
  logic done, is_frag, first, last, discard, complete, timeout;
  logic [1:0]  slot, complete_slot, timeout_slot;
  logic [15:0] frag_off, complete_len;
  int n_cmp = 0, n_tmo = 0;
  logic [1:0] last_cmp_slot;
  logic [15:0] last_cmp_len;

  irafp #(.SLOTS(4), .FRAGS(8), .TMO_W(32), .TIMEOUT(32'(TMO))) dut (
    .clk, .rst_n, .en, .start, .beat, .v4, .v6, .frag_seen, .frag_pos, .proto, .l4_start,
    .l4_valid, .ip_len, .ip_len_valid, .commit, .done, .is_frag, .slot, .first, .frag_off,
    .last, .discard, .complete, .complete_slot, .complete_len, .timeout, .timeout_slot
  );
  always @(posedge clk) begin
    if (rst_n && complete) begin
      n_cmp++;
      last_cmp_slot = complete_slot;
      last_cmp_len  = complete_len;
    end
    if (rst_n && timeout) n_tmo++;
  end

  // Send an IPv4 fragment (payload n bytes at offset off8*8) and commit it
  // unless it was discarded.
  task automatic frag4(input int unsigned id, input bit mf, input int unsigned off8,
                       input int n, input bit do_commit = 1);
    v4 = 1; v6 = 0; frag_seen = 0; l4_valid = 1; ip_len_valid = 1;
    l4_start = 14'd34; ip_len = 16'(20 + n);
    drive(eth_frame(48'h1, 48'h2, 16'h0800, ipv4_packet(32'h0A000001, 2, 17, id, mf, off8, rand_bytes(n))));
    if (do_commit && !discard) begin
      @(negedge clk); commit = 1;
      @(negedge clk); commit = 0;
      repeat (3) @(negedge clk);
    end
  endtask

  initial begin
    logic [1:0] s0;
    wait (rst_n);
    frag4(1, 0, 0, 64);
    check(done && !is_frag && !discard, "unfragmented packet");
    n_cmp = 0;
    frag4(7, 1, 8, 64);
    check(done && is_frag && first && frag_off == 16'd64 && !last && !discard, "middle fragment first");
    s0 = slot;
    frag4(7, 1, 8, 64, 0);
    check(is_frag && discard && !first && slot == s0, "duplicate discarded");
    frag4(9, 1, 0, 32);
    check(is_frag && first && slot != s0, "second packet takes another slot");
    frag4(7, 0, 16, 20);
    check(is_frag && !first && last && slot == s0 && n_cmp == 0, "last fragment, not yet complete");
    frag4(7, 1, 0, 64);
    check(n_cmp == 1 && last_cmp_slot == s0 && last_cmp_len == 16'd148, "packet 7 complete, 148 bytes");
    // IPv6 fragment header at byte 54, payload starts at 62.
    v4 = 0; v6 = 1; frag_seen = 1; frag_pos = 14'd54; l4_valid = 1; ip_len_valid = 1;
    l4_start = 14'd62; ip_len = 16'(48 + 40);
    drive(eth_frame(48'h1, 48'h2, 16'h86DD, ipv6_packet(1, 2, 44, cat(v6_frag(17, 5, 1, 32'h12345678), rand_bytes(40)))));
    check(done && is_frag && frag_off == 16'd40 && !last && first, "IPv6 fragment header read");
    // Time-out of packet 9 (and nothing committed for the IPv6 one).
    n_tmo = 0;
    repeat (TMO + 20) @(negedge clk);
    check(n_tmo == 1, "lone fragment timed out once");
    // Fill the table: four packets, then a fifth finds no slot.
    for (int i = 0; i < 4; i++) frag4(100 + i, 1, 0, 16);
    frag4(200, 1, 0, 16, 0);
    check(is_frag && discard, "table full");
    // The four packets time out, each once, and free their slots.
    n_tmo = 0;
    repeat (TMO + 50) @(negedge clk);
    check(n_tmo == 4, $sformatf("four time-outs, got %0d", n_tmo));
    // A packet with more fragments than offset records.
    for (int i = 0; i < 8; i++) begin
      frag4(300, 1, 2 * i, 16);
      check(is_frag && !discard, $sformatf("fragment %0d of 8 recorded", i));
    end
    frag4(300, 1, 16, 16, 0);
    check(is_frag && discard, "ninth fragment: no free offset record");
    // Five fragments in a random order complete exactly once.
    begin
      int ord[5] = '{0, 1, 2, 3, 4};
      ord.shuffle();
      n_cmp = 0;
      foreach (ord[i]) frag4(400, ord[i] != 4, 3 * ord[i], 24);
      check(n_cmp == 1 && last_cmp_len == 16'd120,
            $sformatf("random order: %0d completions, length %0d", n_cmp, last_cmp_len));
    end
    finish();
  end
endmodule
