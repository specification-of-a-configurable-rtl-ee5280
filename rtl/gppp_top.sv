// gppp_top: the deep pipeline part of the general-purpose protocol
// processor, configured for Ethernet with IPv4/IPv6 and TCP/UDP on top.
//
// Frames enter from an MII/GMII receive interface, are synchronised and
// parallelised to 32-bit beats by the PSU, stamped with their byte position
// by the controller's counter and shifted down a register chain with one
// register per functional page (FP). Each FP watches its own chain stage,
// extracts or checks its part of the headers and reports flags to the
// controller and counter unit (C&C), which enables and disables the FPs,
// places the payload in the microcontroller's data buffer and reports every
// delivered packet with a descriptor. No program runs in this part: its
// behaviour is set by the configuration registers the microcontroller
// writes through the cfg_* port. The microcontroller itself, its data buffer
// and the host processor are outside this module; their connections are the
// cfg_*, mem_*, desc* and ra_timeout* ports.
//
// The structure (PSU, one register per FP, twelve FPs, C&C) and the order of
// the FPs follow the document; the beat format, the byte-position counter,
// the register map, buffer layout and descriptor are this design's.
//
// Timing: one clock per GMII byte (or MII nibble). A word leaves the PSU
// every fourth byte, reaches the last FP 12 cycles later, and the frame's
// descriptor comes out 3 cycles after the last beat has left the chain (for
// a reassembled packet up to 5 cycles later still).
module gppp_top
  import gppp_pkg::*;
#(
  parameter int unsigned SLOTS      = 4,
  parameter int unsigned FRAGS      = 8,
  parameter int unsigned RING_BYTES = 16384,
  parameter int unsigned SLOT_BYTES = 65536,
  parameter logic [31:0] TIMEOUT    = 32'd3_750_000_000
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // MII/GMII receive side
  input  logic                     mii_mode,
  input  logic                     rx_dv,
  input  logic                     rx_er,
  input  logic [7:0]               rxd,
  // microcontroller: configuration and status registers
  input  logic                     cfg_we,
  input  logic [3:0]               cfg_addr,
  input  logic [31:0]              cfg_wdata,
  output logic [31:0]              cfg_rdata,
  // microcontroller: data buffer write port
  output logic                     mem_we,
  output logic [31:0]              mem_addr,
  output logic [3:0]               mem_be,
  output logic [31:0]              mem_wdata,
  // microcontroller: packet notification
  output logic                     desc_valid,
  output desc_t                    desc,
  output logic                     ra_timeout,
  output logic [$clog2(SLOTS)-1:0] ra_timeout_slot,
  // observation of the FPs' discard flags and enables
  output logic [NFP-1:0]           fp_discard,
  output logic [NFP-1:0]           fp_en
);

  localparam int unsigned SW = $clog2(SLOTS);

  beat_t          psu_beat, chain_in;
  beat_t          tap [NFP];
  logic [NFP-1:0] fp_start;
  cfg_t           cfg;

  psu u_psu (
    .clk, .rst_n, .mii_mode, .rx_dv, .rx_er, .rxd, .beat_o(psu_beat)
  );

  reg_chain #(.DEPTH(NFP)) u_chain (
    .clk, .rst_n, .beat_i(chain_in), .taps_o(tap)
  );

  // Flags between FPs, passed through the C&C's wiring.
  etype_e           etype_cls;
  logic [15:0]      etype;
  logic             etype_valid, pay_end_valid, frame_end;
  logic [POS_W-1:0] pay_end;
  logic             v4, v6, ivf_done;
  logic [7:0]       hdr_len;
  logic             hl_valid, hdr_end;
  logic             ihc_done, ida_done, eda_mcast, ida_mcast, ecc_done;
  logic [15:0]      ip_len;
  logic             ip_len_valid;
  logic [7:0]       proto;
  l4_e              l4_cls;
  logic [POS_W-1:0] l4_start, frag_pos;
  logic             l4_valid, frag_seen;
  logic             ra_done, ra_frag, ra_first, ra_last;
  logic [SW-1:0]    ra_slot, ra_complete_slot;
  logic [15:0]      ra_off, ra_complete_len;
  logic             ra_complete, commit, reasm_ok, reasm_bad, tuc_done;
  logic [15:0]      l4_len, l4_count;
  logic             l4_len_valid, tul_done;

  eccfp u_ecc (
    .clk, .rst_n, .en(fp_en[FP_ECC]), .start(fp_start[FP_ECC]), .beat(tap[FP_ECC]),
    .discard(fp_discard[FP_ECC]), .done(ecc_done)
  );

  edafp u_eda (
    .clk, .rst_n, .en(fp_en[FP_EDA]), .start(fp_start[FP_EDA]), .beat(tap[FP_EDA]),
    .mac(cfg.mac), .promisc(cfg.promisc), .accept_mcast(cfg.accept_mcast),
    .discard(fp_discard[FP_EDA]), .mcast(eda_mcast), .done()
  );

  eltfp u_elt (
    .clk, .rst_n, .en(fp_en[FP_ELT]), .start(fp_start[FP_ELT]), .beat(tap[FP_ELT]),
    .ip_len, .ip_len_valid, .etype, .etype_cls, .etype_valid,
    .pay_end, .pay_end_valid, .frame_end, .discard(fp_discard[FP_ELT])
  );

  ivffp u_ivf (
    .clk, .rst_n, .en(fp_en[FP_IVF]), .start(fp_start[FP_IVF]), .beat(tap[FP_IVF]),
    .v4, .v6, .done(ivf_done), .discard(fp_discard[FP_IVF])
  );

  ihlfp u_ihl (
    .clk, .rst_n, .en(fp_en[FP_IHL]), .start(fp_start[FP_IHL]), .beat(tap[FP_IHL]),
    .v4, .v6, .hdr_len, .len_valid(hl_valid), .hdr_end, .discard(fp_discard[FP_IHL])
  );

  ihcfp u_ihc (
    .clk, .rst_n, .en(fp_en[FP_IHC]), .start(fp_start[FP_IHC]), .beat(tap[FP_IHC]),
    .v4, .hdr_len, .len_valid(hl_valid), .done(ihc_done), .discard(fp_discard[FP_IHC])
  );

  idafp u_ida (
    .clk, .rst_n, .en(fp_en[FP_IDA]), .start(fp_start[FP_IDA]), .beat(tap[FP_IDA]),
    .v4, .v6, .ipv4(cfg.ipv4), .ipv6(cfg.ipv6), .accept_mcast(cfg.accept_mcast),
    .mcast(ida_mcast), .done(ida_done), .discard(fp_discard[FP_IDA])
  );

  itlfp u_itl (
    .clk, .rst_n, .en(fp_en[FP_ITL]), .start(fp_start[FP_ITL]), .beat(tap[FP_ITL]),
    .v4, .v6, .ip_len, .len_valid(ip_len_valid), .discard(fp_discard[FP_ITL])
  );

  ipnfp u_ipn (
    .clk, .rst_n, .en(fp_en[FP_IPN]), .start(fp_start[FP_IPN]), .beat(tap[FP_IPN]),
    .v4, .v6, .hdr_len, .len_valid(hl_valid), .proto, .l4_cls, .l4_start,
    .done(l4_valid), .frag_seen, .frag_pos, .discard(fp_discard[FP_IPN])
  );

  irafp #(.SLOTS(SLOTS), .FRAGS(FRAGS), .TMO_W(32), .TIMEOUT(TIMEOUT)) u_ira (
    .clk, .rst_n, .en(fp_en[FP_IRA]), .start(fp_start[FP_IRA]), .beat(tap[FP_IRA]),
    .v4, .v6, .frag_seen, .frag_pos, .proto, .l4_start, .l4_valid,
    .ip_len, .ip_len_valid, .commit,
    .done(ra_done), .is_frag(ra_frag), .slot(ra_slot), .first(ra_first),
    .frag_off(ra_off), .last(ra_last), .discard(fp_discard[FP_IRA]),
    .complete(ra_complete), .complete_slot(ra_complete_slot),
    .complete_len(ra_complete_len), .timeout(ra_timeout), .timeout_slot(ra_timeout_slot)
  );

  tucfp #(.SLOTS(SLOTS)) u_tuc (
    .clk, .rst_n, .en(fp_en[FP_TUC]), .start(fp_start[FP_TUC]), .beat(tap[FP_TUC]),
    .v4, .v6, .l4_start, .l4_valid, .l4_cls, .proto, .ip_len, .ip_len_valid,
    .is_frag(ra_frag), .frag_first(ra_first), .frag_slot(ra_slot), .commit,
    .complete(ra_complete), .complete_slot(ra_complete_slot),
    .complete_len(ra_complete_len), .done(tuc_done), .discard(fp_discard[FP_TUC]),
    .reasm_ok, .reasm_bad
  );

  tulfp u_tul (
    .clk, .rst_n, .en(fp_en[FP_TUL]), .start(fp_start[FP_TUL]), .beat(tap[FP_TUL]),
    .l4_start, .l4_valid, .l4_cls, .ip_len, .ip_len_valid, .is_frag(ra_frag),
    .l4_len, .len_valid(l4_len_valid), .l4_count, .done(tul_done),
    .discard(fp_discard[FP_TUL])
  );

  cc #(.SLOTS(SLOTS), .RING_BYTES(RING_BYTES), .SLOT_BYTES(SLOT_BYTES)) u_cc (
    .clk, .rst_n,
    .beat_i(psu_beat), .beat_o(chain_in), .last_beat(tap[NFP-1]),
    .fp_start, .fp_en, .fp_discard,
    .etype_cls, .ip_v4(v4), .ip_v6(v6), .ivf_done, .ihc_done, .ida_done,
    .l4_cls, .l4_proto(proto), .l4_valid, .l4_start, .pay_end, .ip_len_valid,
    .ra_done, .ra_frag, .ra_slot, .ra_off, .ra_complete, .ra_complete_slot,
    .ra_complete_len, .reasm_ok, .reasm_bad, .commit,
    .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata, .cfg,
    .mem_we, .mem_addr, .mem_be, .mem_wdata, .desc_valid, .desc
  );

endmodule
