// gppp_tb_pkg: frame builders and reference computations for the protocol
// processor testbenches.
//
// Builds Ethernet II frames carrying ARP, IPv4 or IPv6 packets with TCP, UDP,
// ICMP or IGMP payloads, computes the Ethernet FCS, the IPv4 header checksum
// and the TCP/UDP checksum with plain integer arithmetic (independently of
// the RTL), and cuts a byte list into the 32-bit beats the FPs consume.
package gppp_tb_pkg;
  import gppp_pkg::*;

  typedef byte unsigned bytes_t[$];
  typedef beat_t        beats_t[$];

  function automatic int unsigned ref_crc32(input bytes_t d);
    int unsigned c = 32'hFFFF_FFFF;
    foreach (d[i]) begin
      c = c ^ 32'(d[i]);
      for (int k = 0; k < 8; k++) c = (c & 1) ? ((c >> 1) ^ 32'hEDB88320) : (c >> 1);
    end
    return ~c;
  endfunction

  // Sum of 16-bit big-endian words (odd tail padded), folded, not complemented.
  function automatic int unsigned ocsum(input bytes_t d, input int unsigned init = 0);
    int unsigned s = init;
    for (int i = 0; i < d.size(); i += 2) begin
      s += (int'(d[i]) << 8) + ((i + 1 < d.size()) ? int'(d[i+1]) : 0);
    end
    while (s >> 16) s = (s & 16'hFFFF) + (s >> 16);
    return s;
  endfunction

  function automatic bytes_t be16(input int unsigned v);
    bytes_t r;
    r.push_back(8'(v >> 8)); r.push_back(8'(v));
    return r;
  endfunction

  function automatic bytes_t be32(input int unsigned v);
    bytes_t r;
    for (int i = 3; i >= 0; i--) r.push_back(8'(v >> (8*i)));
    return r;
  endfunction

  function automatic bytes_t be128(input logic [127:0] v);
    bytes_t r;
    for (int i = 15; i >= 0; i--) r.push_back(v[8*i +: 8]);
    return r;
  endfunction

  function automatic bytes_t cat(input bytes_t a, input bytes_t b);
    bytes_t r = a;
    foreach (b[i]) r.push_back(b[i]);
    return r;
  endfunction

  function automatic bytes_t rand_bytes(input int n);
    bytes_t r;
    for (int i = 0; i < n; i++) r.push_back(8'($urandom));
    return r;
  endfunction

  // Ethernet frame with padding to 60 bytes and a correct FCS.
  function automatic bytes_t eth_frame(input logic [47:0] dst, input logic [47:0] src,
                                       input int unsigned etype, input bytes_t payload);
    bytes_t f;
    int unsigned c;
    for (int i = 5; i >= 0; i--) f.push_back(dst[8*i +: 8]);
    for (int i = 5; i >= 0; i--) f.push_back(src[8*i +: 8]);
    f = cat(f, be16(etype));
    f = cat(f, payload);
    while (f.size() < 60) f.push_back(8'h00);
    c = ref_crc32(f);
    for (int i = 0; i < 4; i++) f.push_back(8'(c >> (8*i)));
    return f;
  endfunction

  // Upper-layer segment (TCP or UDP header + data) with a correct checksum
  // over the pseudo header; psum is the folded sum of source and destination
  // addresses.
  function automatic bytes_t l4_segment(input int unsigned proto, input bytes_t data,
                                        input int unsigned psum);
    bytes_t h;
    int unsigned s, ck, ckpos;
    if (proto == 6) begin
      h = cat(be16(1234), be16(80));
      h = cat(h, be32($urandom)); h = cat(h, be32($urandom));
      h = cat(h, be16(16'h5018)); h = cat(h, be16(1024));
      h = cat(h, be16(0)); h = cat(h, be16(0));
      ckpos = 16;
    end else begin
      h = cat(be16(5353), be16(53));
      h = cat(h, be16(8 + data.size()));
      h = cat(h, be16(0));
      ckpos = 6;
    end
    h = cat(h, data);
    s  = ocsum(h, psum + proto + h.size());
    ck = (~s) & 16'hFFFF;
    if (proto == 17 && ck == 0) ck = 16'hFFFF;
    h[ckpos]   = 8'(ck >> 8);
    h[ckpos+1] = 8'(ck);
    return h;
  endfunction

  function automatic int unsigned psum4(input int unsigned src, input int unsigned dst);
    return ocsum(cat(be32(src), be32(dst)));
  endfunction

  function automatic int unsigned psum6(input logic [127:0] src, input logic [127:0] dst);
    return ocsum(cat(be128(src), be128(dst)));
  endfunction

  // IPv4 header (IHL 5 plus optional option words) and payload.
  function automatic bytes_t ipv4_packet(input int unsigned src, input int unsigned dst,
                                         input int unsigned proto, input int unsigned id,
                                         input bit mf, input int unsigned off8,
                                         input bytes_t payload, input int unsigned optw = 0);
    bytes_t h;
    int unsigned ihl = 5 + optw, ck;
    h.push_back(8'(8'h40 | ihl)); h.push_back(8'h00);
    h = cat(h, be16(4*ihl + payload.size()));
    h = cat(h, be16(id));
    h = cat(h, be16((int'(mf) << 13) | off8));
    h.push_back(8'd64); h.push_back(8'(proto));
    h = cat(h, be16(0));
    h = cat(h, be32(src)); h = cat(h, be32(dst));
    for (int i = 0; i < 4*optw; i++) h.push_back(8'h01);
    ck = (~ocsum(h)) & 16'hFFFF;
    h[10] = 8'(ck >> 8);
    h[11] = 8'(ck);
    return cat(h, payload);
  endfunction

  // IPv6 packet; exts holds complete extension headers, first_nh the type of
  // the first header after the base header.
  function automatic bytes_t ipv6_packet(input logic [127:0] src, input logic [127:0] dst,
                                         input int unsigned first_nh, input bytes_t rest);
    bytes_t h;
    h = cat(be32(32'h6000_0000), be16(rest.size()));
    h.push_back(8'(first_nh)); h.push_back(8'd64);
    h = cat(h, be128(src)); h = cat(h, be128(dst));
    return cat(h, rest);
  endfunction

  // Generic IPv6 options-style extension header of 8*(len+1) bytes.
  function automatic bytes_t v6_ext(input int unsigned nh, input int unsigned len8);
    bytes_t h;
    h.push_back(8'(nh)); h.push_back(8'(len8));
    for (int i = 2; i < 8*(len8+1); i++) h.push_back(8'h00);
    return h;
  endfunction

  function automatic bytes_t v6_frag(input int unsigned nh, input int unsigned off8,
                                     input bit m, input int unsigned id);
    bytes_t h;
    h.push_back(8'(nh)); h.push_back(8'h00);
    h = cat(h, be16((off8 << 3) | int'(m)));
    return cat(h, be32(id));
  endfunction

  // Cut a frame into beats, positions stamped as the controller does.
  function automatic beats_t to_beats(input bytes_t f);
    beats_t q;
    beat_t  b;
    for (int i = 0; i < f.size(); i += 4) begin
      b        = '0;
      b.valid  = 1'b1;
      b.sof    = (i == 0);
      b.eof    = (i + 4 >= f.size());
      b.pos    = POS_W'(i);
      b.nbytes = 3'((f.size() - i) >= 4 ? 4 : (f.size() - i));
      for (int k = 0; k < 4; k++)
        if (i + k < f.size()) b.data[31-8*k -: 8] = f[i+k];
      q.push_back(b);
    end
    return q;
  endfunction

endpackage
