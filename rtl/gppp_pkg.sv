// gppp_pkg: types, constants and helper functions shared by the protocol
// processor's deep pipeline.
//
// Every unit sees the received frame as a stream of 32-bit beats. A beat
// carries up to four frame bytes in network order (the first received byte
// in bits 31:24), the number of valid bytes (1..4, fewer only in the last
// beat of a frame), start/end-of-frame marks and the byte position of its
// first byte counted from the first destination-address byte. The 32-bit
// width follows the document; the beat tagging with a byte position is this
// design's own way of letting each functional page (FP) find its fields.
package gppp_pkg;

  localparam int unsigned DW    = 32;   // data path width (document: 32)
  localparam int unsigned NBYTE = DW/8; // bytes per beat
  localparam int unsigned POS_W = 14;   // byte position width (frames < 16 KiB)

  // Number of FPs and their order along the register chain. The order
  // follows the scheduling example of the document (ECCFP first, TULFP last);
  // IHLFP is not drawn there and shares the IVFFP slot position-wise.
  localparam int unsigned NFP = 12;
  typedef enum logic [3:0] {
    FP_ECC = 4'd0, FP_EDA = 4'd1, FP_ELT = 4'd2,  FP_IVF = 4'd3,
    FP_IHL = 4'd4, FP_IHC = 4'd5, FP_IDA = 4'd6,  FP_ITL = 4'd7,
    FP_IPN = 4'd8, FP_IRA = 4'd9, FP_TUC = 4'd10, FP_TUL = 4'd11
  } fp_id_e;

  typedef struct packed {
    logic             valid;
    logic             sof;
    logic             eof;
    logic             err;     // receive error seen in this frame (rx_er)
    logic [2:0]       nbytes;  // valid bytes in this beat, 1..4
    logic [POS_W-1:0] pos;     // byte position of lane 0
    logic [DW-1:0]    data;
  } beat_t;

  // Ethernet layer-2 class found from the length/ethertype field.
  typedef enum logic [2:0] {
    ET_NONE = 3'd0, ET_IPV4 = 3'd1, ET_IPV6 = 3'd2, ET_ARP = 3'd3,
    ET_RARP = 3'd4, ET_LEN = 3'd5, ET_OTHER = 3'd6
  } etype_e;

  // Upper-layer class found from the IP protocol / next header chain.
  typedef enum logic [2:0] {
    L4_NONE = 3'd0, L4_TCP = 3'd1, L4_UDP = 3'd2, L4_ICMP = 3'd3,
    L4_IGMP = 3'd4, L4_ICMP6 = 3'd5, L4_UNKNOWN = 3'd6
  } l4_e;

  // What the controller reports to the microcontroller for one delivery.
  typedef enum logic [2:0] {
    DK_NONE = 3'd0, DK_TCP = 3'd1, DK_UDP = 3'd2, DK_IP_PAYLOAD = 3'd3,
    DK_ETH_PAYLOAD = 3'd4, DK_REASM = 3'd5
  } dkind_e;

  typedef struct packed {
    dkind_e      kind;
    logic [31:0] addr;  // byte address of the first delivered byte
    logic [15:0] len;   // delivered bytes
    logic [7:0]  proto; // IP protocol number (0 for layer-2 deliveries)
  } desc_t;

  // Configuration written by the microcontroller before traffic arrives.
  typedef struct packed {
    logic [47:0]  mac;          // own Ethernet address
    logic [31:0]  ipv4;         // own IPv4 address
    logic [127:0] ipv6;         // own IPv6 address
    logic         promisc;      // accept every Ethernet destination
    logic         accept_mcast; // accept multicast (Ethernet and IP)
    logic [NFP-1:0] fp_mask;    // FPs that exist/are used in this configuration
  } cfg_t;

  // Byte i (0 = first on the wire) of a beat.
  function automatic logic [7:0] lane_byte(input logic [DW-1:0] d, input int unsigned i);
    return d[DW-1-8*i -: 8];
  endfunction

  // 16-bit one's complement addition.
  function automatic logic [15:0] oc_add(input logic [15:0] a, input logic [15:0] b);
    logic [16:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[15:0] + {15'd0, s[16]};
  endfunction

  // Fold a 32-bit two's complement accumulation into a 16-bit one's complement sum.
  function automatic logic [15:0] oc_fold(input logic [31:0] s);
    logic [16:0] t;
    t = {1'b0, s[31:16]} + {1'b0, s[15:0]};
    return t[15:0] + {15'd0, t[16]};
  endfunction

  // One byte of the reflected Ethernet CRC-32 (polynomial 0x04C11DB7, LSB first).
  function automatic logic [31:0] crc32_byte(input logic [31:0] c, input logic [7:0] b);
    logic [31:0] r;
    r = c ^ {24'd0, b};
    for (int k = 0; k < 8; k++) r = r[0] ? ((r >> 1) ^ 32'hEDB88320) : (r >> 1);
    return r;
  endfunction

  // Register value left after a correct frame and its FCS went through the CRC.
  localparam logic [31:0] CRC_RESIDUE = 32'hDEBB20E3;

endpackage
