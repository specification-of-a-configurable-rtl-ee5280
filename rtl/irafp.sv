// irafp: IP reassembly FP.
//
// Extracts the fragment fields of the packet (IPv4: identification, MF and
// fragment offset from bytes 18..21; IPv6: the fragment extension header
// found by the next-header FP) and keeps the reassembly table: SLOTS entries,
// each with the packet key (identification, low 32 bits of the source
// address, protocol), the offsets of the fragments received so far, the
// received byte count, the total length once the last fragment has come,
// and a timer. For a fragment it looks the key up (or picks a free entry)
// as soon as the fields are in, so that the controller can place the
// fragment's payload at slot base + fragment offset. A fragment whose offset
// was already received (duplicate), or that finds no free entry or no free
// offset record, raises discard. When the controller accepts the frame it
// pulses commit; the entry is then updated, and when the received bytes
// equal the total length complete pulses for one cycle and the entry is
// freed. An entry older than TIMEOUT cycles is freed with a timeout pulse.
// The document gives the tasks (fragment extraction, payload placement,
// duplicate discarding, tables and timers); the table organisation, key and
// sizes are this design's.
//
// frag_off is a byte offset, a multiple of 8, so its three low bits are
// always zero; the byte count keeps address arithmetic in the C&C simple.
//
// Interface: general FP interface plus the version flags, the IPv6 fragment
// header position, the protocol and upper-layer start from the next-header
// FP and the IP length. Lookup results (is_frag, slot, first, frag_off, last,
// discard) are valid while done is high and are held from the cycle after
// the eof beat until the next start.
module irafp
  import gppp_pkg::*;
#(
  parameter int unsigned SLOTS   = 4,
  parameter int unsigned FRAGS   = 8,
  parameter int unsigned TMO_W   = 32,
  parameter logic [TMO_W-1:0] TIMEOUT = TMO_W'(64'd3_750_000_000)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic                     start,
  input  beat_t                    beat,
  input  logic                     v4,
  input  logic                     v6,
  input  logic                     frag_seen,
  input  logic [POS_W-1:0]         frag_pos,
  input  logic [7:0]               proto,
  input  logic [POS_W-1:0]         l4_start,
  input  logic                     l4_valid,
  input  logic [15:0]              ip_len,
  input  logic                     ip_len_valid,
  input  logic                     commit,
  output logic                     done,
  output logic                     is_frag,
  output logic [$clog2(SLOTS)-1:0] slot,
  output logic                     first,
  output logic [15:0]              frag_off,
  output logic                     last,
  output logic                     discard,
  output logic                     complete,
  output logic [$clog2(SLOTS)-1:0] complete_slot,
  output logic [15:0]              complete_len,
  output logic                     timeout,
  output logic [$clog2(SLOTS)-1:0] timeout_slot
);

  localparam int unsigned SW = $clog2(SLOTS);
  localparam int unsigned FW = $clog2(FRAGS + 1);

  typedef struct packed {
    logic [31:0] id;
    logic [31:0] src;
    logic [7:0]  proto;
  } key_t;

  typedef struct packed {
    logic             used;
    key_t             key;
    logic [FW-1:0]    nfrag;
    logic [15:0]      rx_bytes;
    logic             total_known;
    logic [15:0]      total;
    logic [TMO_W-1:0] age;
  } entry_t;

  entry_t            tab_q [SLOTS];
  logic [12:0]       offs_q [SLOTS][FRAGS];   // fragment offsets in 8-byte units

  // Field capture.
  logic [47:0] ff;
  logic        ff_got;
  logic [31:0] src;
  logic        src_got;
  logic [POS_W-1:0] ff_off;
  logic [4:0]       ff_len;

  always_comb begin
    ff_off = POS_W'(18);
    ff_len = 5'd4;
    if (v6) begin
      ff_len = 5'd6;
      ff_off = frag_seen ? frag_pos + POS_W'(2) : '1;
    end
  end

  field_grab #(.MAXLEN(6)) u_ff (
    .clk, .rst_n, .en, .start, .beat,
    .off(ff_off), .len(ff_len), .val(ff), .done(ff_got)
  );
  field_grab #(.MAXLEN(4)) u_src (
    .clk, .rst_n, .en, .start, .beat,
    .off(v6 ? POS_W'(34) : POS_W'(26)), .len(5'd4), .val(src), .done(src_got)
  );

  // Fragment fields of this packet.
  logic [12:0] off8;
  logic        mf;
  key_t        key;
  logic        info;
  always_comb begin
    off8 = '0;
    mf   = 1'b0;
    key  = '0;
    info = 1'b0;
    if (v4) begin
      off8 = ff[12:0];
      mf   = ff[13];
      key  = '{id: {16'd0, ff[31:16]}, src: src, proto: proto};
      info = ff_got && src_got && l4_valid && ip_len_valid;
    end else if (v6) begin
      off8 = ff[47:35];
      mf   = ff[32];
      key  = '{id: ff[31:0], src: src, proto: proto};
      info = src_got && l4_valid && ip_len_valid && (!frag_seen || ff_got);
    end
  end

  logic [15:0] flen;  // payload bytes of this fragment
  assign flen = ip_len + 16'd14 - 16'(l4_start);

  // Lookup.
  logic          frag_c, hit, freeok, dup, lfull;
  logic [SW-1:0] hslot, fslot, sel;
  always_comb begin
    frag_c = info && (mf || off8 != 0);
    hit    = 1'b0;
    hslot  = '0;
    freeok = 1'b0;
    fslot  = '0;
    for (int s = SLOTS - 1; s >= 0; s--) begin
      if (tab_q[s].used && tab_q[s].key == key) begin
        hit   = 1'b1;
        hslot = SW'(s);
      end
      if (!tab_q[s].used) begin
        freeok = 1'b1;
        fslot  = SW'(s);
      end
    end
    sel   = hit ? hslot : fslot;
    dup   = 1'b0;
    lfull = 1'b0;
    if (hit) begin
      for (int f = 0; f < FRAGS; f++)
        if (FW'(f) < tab_q[hslot].nfrag && offs_q[hslot][f] == off8) dup = 1'b1;
      lfull = tab_q[hslot].nfrag == FW'(FRAGS);
    end
  end

  logic frozen;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done     <= 1'b0;
      frozen   <= 1'b0;
      is_frag  <= 1'b0;
      slot     <= '0;
      first    <= 1'b0;
      frag_off <= '0;
      last     <= 1'b0;
      discard  <= 1'b0;
    end else if (en || start) begin
      if (start) begin
        done    <= 1'b0;
        is_frag <= 1'b0;
        discard <= 1'b0;
        frozen  <= 1'b0;
      end else if (info && !frozen) begin
        done     <= 1'b1;
        is_frag  <= frag_c;
        slot     <= sel;
        first    <= !hit;
        frag_off <= {off8, 3'b000};
        last     <= !mf;
        discard  <= frag_c && (dup || lfull || (!hit && !freeok));
      end
      // The result is frozen once the frame has passed, so that the commit
      // that follows does not change it.
      if (!start && beat.valid && beat.eof) frozen <= 1'b1;
    end
  end

  // Table update on commit, completion and time-out.
  logic              chk_q;
  logic [SW-1:0]     chk_slot_q;
  logic [15:0]       cnew_rx;
  logic [15:0]       cnew_total;
  always_comb begin
    cnew_rx    = (first ? 16'd0 : tab_q[slot].rx_bytes) + flen;
    cnew_total = last ? (frag_off + flen) : tab_q[slot].total;
  end

  logic          tmo_hit;
  logic [SW-1:0] tmo_s;
  always_comb begin
    tmo_hit = 1'b0;
    tmo_s   = '0;
    for (int s = SLOTS - 1; s >= 0; s--) begin
      if (tab_q[s].used && tab_q[s].age >= TIMEOUT && !(commit && slot == SW'(s))) begin
        tmo_hit = 1'b1;
        tmo_s   = SW'(s);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SLOTS; s++) begin
        tab_q[s] <= '0;
        for (int f = 0; f < FRAGS; f++) offs_q[s][f] <= '0;
      end
      chk_q         <= 1'b0;
      chk_slot_q    <= '0;
      complete      <= 1'b0;
      complete_slot <= '0;
      complete_len  <= '0;
      timeout       <= 1'b0;
      timeout_slot  <= '0;
    end else begin
      complete <= 1'b0;
      timeout  <= 1'b0;
      chk_q    <= 1'b0;
      // Ageing and time-out, one entry per cycle.
      for (int s = 0; s < SLOTS; s++)
        if (tab_q[s].used) tab_q[s].age <= tab_q[s].age + 1'b1;
      if (tmo_hit) begin
        timeout              <= 1'b1;
        timeout_slot         <= tmo_s;
        tab_q[tmo_s].used    <= 1'b0;
      end
      if (commit && done && is_frag && !discard) begin
        tab_q[slot].used        <= 1'b1;
        tab_q[slot].key         <= key;
        tab_q[slot].age         <= '0;
        tab_q[slot].rx_bytes    <= cnew_rx;
        tab_q[slot].total       <= cnew_total;
        tab_q[slot].total_known <= (first ? 1'b0 : tab_q[slot].total_known) | last;
        tab_q[slot].nfrag       <= (first ? FW'(0) : tab_q[slot].nfrag) + 1'b1;
        offs_q[slot][first ? 0 : tab_q[slot].nfrag[$clog2(FRAGS)-1:0]] <= frag_off[15:3];
        chk_q      <= 1'b1;
        chk_slot_q <= slot;
      end
      if (chk_q && tab_q[chk_slot_q].total_known &&
          tab_q[chk_slot_q].rx_bytes == tab_q[chk_slot_q].total) begin
        complete                 <= 1'b1;
        complete_slot            <= chk_slot_q;
        complete_len             <= tab_q[chk_slot_q].total;
        tab_q[chk_slot_q].used   <= 1'b0;
      end
    end
  end

endmodule
