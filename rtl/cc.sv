// cc: controller and counter unit (C&C).
//
// The C&C does the high-level, per-packet control of the deep pipeline;
// everything below that is done inside the FPs. It has four parts:
//  * counter: stamps every beat entering the register chain with its byte
//    position, and delays the start-of-frame mark along the chain so that
//    each FP gets its start signal in the cycle the first beat reaches it;
//  * configurable FSM: collects the FPs' flags, switches FP sets on and off
//    (all FPs off once any discard flag of an active set is seen; the IP
//    sets off for ARP/RARP; the TCP/UDP set off for ICMP/IGMP), and decides
//    at the end of each frame whether to drop or deliver it;
//  * payload placement: writes the payload bytes that pass the last chain
//    stage into the microcontroller's data buffer, in a ring for whole
//    packets and at slot base + fragment offset for IP fragments, and
//    reports each delivered packet with a descriptor;
//  * microcontroller interface: configuration registers (addresses, accept
//    rules, FP mask) and status counters.
// The document gives the structure (configurable FSM, counter, uC interface),
// the discard behaviour, the layer-transparent and layer-dependent enable
// control and the notification of the microcontroller; the register map,
// the FSM states, the buffer layout and the descriptor format are this
// design's.
//
// The end of an IP packet's payload is the ELTFP's pay_end (Ethernet
// header plus IP length), so the length count lives in one place.
//
// The data, byte count and frame marks of beat_o are beat_i unchanged;
// only the position field is the counter's.
//
// Timing: one frame is in the chain at a time (at GMII rate the inter-frame
// gap is far longer than the chain). The decision is taken two cycles after
// the eof beat leaves the last stage; a descriptor is a one-cycle pulse on
// desc_valid. A committed IP fragment may complete its packet; the
// reassembled-packet descriptor then follows within four cycles.
//
// Register map (cfg_addr, 32-bit words): 0 MAC[47:32], 1 MAC[31:0],
// 2 IPv4 address, 3..6 IPv6 address (3 = most significant word),
// 7 {FP mask[27:16], accept_mcast[1], promisc[0]}; read-only: 8 frames
// received, 9 frames dropped, 10 FP discard flags of the last dropped frame.
module cc
  import gppp_pkg::*;
#(
  parameter int unsigned SLOTS      = 4,
  parameter int unsigned RING_BYTES = 16384,
  parameter int unsigned SLOT_BYTES = 65536
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // counter
  input  beat_t                    beat_i,     // from the PSU
  output beat_t                    beat_o,     // stamped, into the chain
  input  beat_t                    last_beat,  // output of the last chain stage
  output logic [NFP-1:0]           fp_start,
  output logic [NFP-1:0]           fp_en,
  // flags from the FPs
  input  logic [NFP-1:0]           fp_discard,
  input  etype_e                   etype_cls,
  input  logic                     ip_v4,
  input  logic                     ip_v6,
  input  logic                     ivf_done,
  input  logic                     ihc_done,
  input  logic                     ida_done,
  input  l4_e                      l4_cls,
  input  logic [7:0]               l4_proto,
  input  logic                     l4_valid,
  input  logic [POS_W-1:0]         l4_start,
  input  logic [POS_W-1:0]         pay_end,    // IP end from the ELTFP
  input  logic                     ip_len_valid,
  input  logic                     ra_done,
  input  logic                     ra_frag,
  input  logic [$clog2(SLOTS)-1:0] ra_slot,
  input  logic [15:0]              ra_off,
  input  logic                     ra_complete,
  input  logic [$clog2(SLOTS)-1:0] ra_complete_slot,
  input  logic [15:0]              ra_complete_len,
  input  logic                     reasm_ok,
  input  logic                     reasm_bad,
  output logic                     commit,
  // microcontroller interface
  input  logic                     cfg_we,
  input  logic [3:0]               cfg_addr,
  input  logic [31:0]              cfg_wdata,
  output logic [31:0]              cfg_rdata,
  output cfg_t                     cfg,
  output logic                     mem_we,
  output logic [31:0]              mem_addr,   // byte address of lane 0
  output logic [3:0]               mem_be,     // bit 3 = lane 0 (bits 31:24)
  output logic [31:0]              mem_wdata,
  output logic                     desc_valid,
  output desc_t                    desc
);

  localparam int unsigned SW = $clog2(SLOTS);

  // FP sets for layer-dependent control.
  localparam logic [NFP-1:0] SET_L2 = NFP'((1 << FP_ECC) | (1 << FP_EDA) | (1 << FP_ELT));
  localparam logic [NFP-1:0] SET_L4 = NFP'((1 << FP_TUC) | (1 << FP_TUL));
  localparam logic [NFP-1:0] SET_L3 = ~(SET_L2 | SET_L4);

  // ---------------------------------------------------------------- counter
  logic [POS_W-1:0] pos_q;
  logic [NFP-1:0]   sofd_q;

  always_comb begin
    beat_o     = beat_i;
    beat_o.pos = beat_i.sof ? '0 : pos_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos_q  <= '0;
      sofd_q <= '0;
    end else begin
      if (beat_i.valid) pos_q <= beat_o.pos + POS_W'(NBYTE);
      sofd_q <= {sofd_q[NFP-2:0], beat_i.valid & beat_i.sof};
    end
  end
  assign fp_start = sofd_q;

  // ------------------------------------------------------- configuration
  logic [31:0] n_rx_q, n_drop_q;
  logic [NFP-1:0] last_drop_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg         <= '0;
      cfg.fp_mask <= '1;
    end else if (cfg_we) begin
      unique case (cfg_addr)
        4'd0: cfg.mac[47:32]    <= cfg_wdata[15:0];
        4'd1: cfg.mac[31:0]     <= cfg_wdata;
        4'd2: cfg.ipv4          <= cfg_wdata;
        4'd3: cfg.ipv6[127:96]  <= cfg_wdata;
        4'd4: cfg.ipv6[95:64]   <= cfg_wdata;
        4'd5: cfg.ipv6[63:32]   <= cfg_wdata;
        4'd6: cfg.ipv6[31:0]    <= cfg_wdata;
        4'd7: begin
          cfg.fp_mask      <= cfg_wdata[16 +: NFP];
          cfg.accept_mcast <= cfg_wdata[1];
          cfg.promisc      <= cfg_wdata[0];
        end
        default: ;
      endcase
    end
  end

  always_comb begin
    unique case (cfg_addr)
      4'd0:    cfg_rdata = {16'd0, cfg.mac[47:32]};
      4'd1:    cfg_rdata = cfg.mac[31:0];
      4'd2:    cfg_rdata = cfg.ipv4;
      4'd3:    cfg_rdata = cfg.ipv6[127:96];
      4'd4:    cfg_rdata = cfg.ipv6[95:64];
      4'd5:    cfg_rdata = cfg.ipv6[63:32];
      4'd6:    cfg_rdata = cfg.ipv6[31:0];
      4'd7:    cfg_rdata = {4'd0, cfg.fp_mask, 14'd0, cfg.accept_mcast, cfg.promisc};
      4'd8:    cfg_rdata = n_rx_q;
      4'd9:    cfg_rdata = n_drop_q;
      4'd10:   cfg_rdata = {20'd0, last_drop_q};
      default: cfg_rdata = '0;
    endcase
  end

  // Completion data is held for the descriptor one cycle later.
  logic [SW-1:0] ra_complete_slot_q;
  logic [15:0]   ra_complete_len_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ra_complete_slot_q <= '0;
      ra_complete_len_q  <= '0;
    end else if (ra_complete) begin
      ra_complete_slot_q <= ra_complete_slot;
      ra_complete_len_q  <= ra_complete_len;
    end
  end

  // ------------------------------------------------------------------- FSM
  typedef enum logic [2:0] {S_IDLE, S_RX, S_DROP, S_EVAL, S_DECIDE, S_WAIT} state_e;
  state_e state_q;

  logic           l3_on_q, l4_on_q;
  logic           err_q;
  logic [NFP-1:0] active;
  logic [NFP-1:0] bad;
  logic           is_ip, is_l2pay, l4_tu, l4_host;
  logic [31:0]    ring_q, base_q;
  logic [POS_W:0] fend_q;           // frame end position (bytes incl. FCS)
  logic [2:0]     wait_q;

  // An FP's outputs belong to the current frame only once the frame's start
  // has reached it; until then they still show the previous frame.
  logic [NFP-1:0] fresh_q;
  logic           et_fresh, l4_fresh;
  assign et_fresh = fresh_q[FP_ELT];
  assign l4_fresh = fresh_q[FP_IPN];

  assign is_ip    = et_fresh && (etype_cls == ET_IPV4 || etype_cls == ET_IPV6);
  assign is_l2pay = et_fresh && (etype_cls == ET_ARP || etype_cls == ET_RARP);
  assign l4_tu    = l4_fresh && (l4_cls == L4_TCP || l4_cls == L4_UDP);
  assign l4_host  = l4_fresh && (l4_cls == L4_ICMP || l4_cls == L4_IGMP || l4_cls == L4_ICMP6);

  always_comb begin
    // The registered set enables are combined with the current classes so
    // that a flag raised in the cycle a class becomes known is masked too.
    active = cfg.fp_mask & SET_L2;
    if (l3_on_q && !is_l2pay)            active |= cfg.fp_mask & SET_L3;
    if (l4_on_q && !is_l2pay && !l4_host) active |= cfg.fp_mask & SET_L4;
  end
  assign bad = fp_discard & active & fresh_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fresh_q <= '0;
    else if (state_q == S_IDLE && beat_i.valid && beat_i.sof) fresh_q <= '0;
    else fresh_q <= fresh_q | fp_start;
  end

  always_comb begin
    unique case (state_q)
      S_IDLE:  fp_en = cfg.fp_mask;
      S_RX, S_EVAL, S_DECIDE: fp_en = active;
      default: fp_en = '0;
    endcase
  end

  // Frame classification for the end-of-frame decision.
  logic ip_complete;
  assign ip_complete = ivf_done && (ip_v4 || ip_v6) && ida_done && l4_valid && ip_len_valid &&
                       (!ip_v4 || ihc_done) && (!l4_tu || ra_done);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      l3_on_q     <= 1'b1;
      l4_on_q     <= 1'b1;
      err_q       <= 1'b0;
      ring_q      <= '0;
      base_q      <= '0;
      fend_q      <= '0;
      wait_q      <= '0;
      n_rx_q      <= '0;
      n_drop_q    <= '0;
      last_drop_q <= '0;
      commit      <= 1'b0;
      desc_valid  <= 1'b0;
      desc        <= '0;
    end else begin
      commit     <= 1'b0;
      desc_valid <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          if (beat_i.valid && beat_i.sof) begin
            state_q <= S_RX;
            l3_on_q <= 1'b1;
            l4_on_q <= 1'b1;
            err_q   <= 1'b0;
            n_rx_q  <= n_rx_q + 1;
            // Ring allocation: restart at 0 when a maximum frame may not fit.
            base_q  <= (ring_q > 32'(RING_BYTES) - 32'd2048) ? 32'd0 : ring_q;
          end
        end
        S_RX: begin
          if (beat_i.valid && beat_i.err) err_q <= 1'b1;
          // Layer-dependent control.
          if (is_l2pay) begin
            l3_on_q <= 1'b0;
            l4_on_q <= 1'b0;
          end
          if (l4_host) l4_on_q <= 1'b0;
          // Layer-transparent control: shut everything down on a discard.
          if (last_beat.valid && last_beat.eof) begin
            state_q <= S_EVAL;
            fend_q  <= {1'b0, last_beat.pos} + (POS_W+1)'(last_beat.nbytes);
          end else if (bad != '0 || (et_fresh && (etype_cls == ET_OTHER || etype_cls == ET_LEN)) ||
                       (beat_i.valid && beat_i.err)) begin
            state_q     <= S_DROP;
            last_drop_q <= bad;
          end
        end
        S_DROP: begin
          if (last_beat.valid && last_beat.eof) begin
            state_q  <= S_IDLE;
            n_drop_q <= n_drop_q + 1;
          end
        end
        S_EVAL: begin
          // FPs at the end of the chain settle one cycle after the eof beat.
          state_q <= S_DECIDE;
        end
        S_DECIDE: begin
          state_q <= S_IDLE;
          if (bad != '0 || err_q || (et_fresh && (etype_cls == ET_OTHER || etype_cls == ET_LEN))) begin
            n_drop_q    <= n_drop_q + 1;
            last_drop_q <= bad;
          end else if (is_l2pay && fend_q >= (POS_W+1)'(18)) begin
            desc_valid <= 1'b1;
            desc       <= '{kind: DK_ETH_PAYLOAD, addr: base_q,
                            len: 16'(fend_q - (POS_W+1)'(18)), proto: 8'd0};
            ring_q     <= base_q + ((32'(fend_q) - 32'd15) & ~32'd3);
          end else if (is_ip && ip_complete && (l4_host || l4_tu)) begin
            if (l4_tu && ra_frag) begin
              commit  <= 1'b1;
              wait_q  <= '0;
              state_q <= S_WAIT;
            end else begin
              desc_valid <= 1'b1;
              desc       <= '{kind: l4_host ? DK_IP_PAYLOAD : (l4_cls == L4_TCP ? DK_TCP : DK_UDP),
                              addr: base_q,
                              len: 16'(pay_end) - 16'(l4_start), proto: l4_proto};
              ring_q     <= base_q + ((32'(pay_end) - 32'(l4_start) + 32'd3) & ~32'd3);
            end
          end else begin
            n_drop_q    <= n_drop_q + 1;
            last_drop_q <= bad;
          end
        end
        S_WAIT: begin
          // Wait for the reassembly FP and the checksum FP to report.
          wait_q <= wait_q + 1;
          if (reasm_ok) begin
            desc_valid <= 1'b1;
            desc       <= '{kind: DK_REASM,
                            addr: 32'(RING_BYTES) + 32'(ra_complete_slot_q) * 32'(SLOT_BYTES),
                            len: ra_complete_len_q, proto: l4_proto};
            state_q    <= S_IDLE;
          end else if (reasm_bad) begin
            n_drop_q <= n_drop_q + 1;
            state_q  <= S_IDLE;
          end else if (wait_q == 3'd4) begin
            state_q <= S_IDLE;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------ payload placement
  always_comb begin
    logic [POS_W:0] lo, hi, p;
    logic [31:0]    base;
    p         = '0;
    mem_we    = 1'b0;
    mem_be    = '0;
    mem_addr  = '0;
    mem_wdata = last_beat.data;
    lo        = '0;
    hi        = '0;
    base      = base_q;
    if (state_q == S_RX && last_beat.valid) begin
      if (is_l2pay) begin
        lo     = (POS_W+1)'(14);
        hi     = {1'b0, last_beat.pos} + (POS_W+1)'(last_beat.nbytes);
        mem_we = 1'b1;
      end else if (is_ip && l4_valid && ip_len_valid && (l4_tu || l4_host)) begin
        lo     = {1'b0, l4_start};
        hi     = {1'b0, pay_end};
        mem_we = !(l4_tu && !ra_done);
        if (l4_tu && ra_frag)
          base = 32'(RING_BYTES) + 32'(ra_slot) * 32'(SLOT_BYTES) + 32'(ra_off);
      end
      for (int unsigned i = 0; i < NBYTE; i++) begin
        p = {1'b0, last_beat.pos} + (POS_W+1)'(i);
        mem_be[NBYTE-1-i] = mem_we && i < last_beat.nbytes && p >= lo && p < hi;
      end
      mem_we   = mem_be != '0;
      mem_addr = base + 32'(last_beat.pos) - 32'(lo);
    end
  end

endmodule
