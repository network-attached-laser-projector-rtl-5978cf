// tb_eth_pkg: frame-building helpers for the testbenches.
//
// Builds Ethernet II frames (ARP, IPv4/UDP, echo) as byte queues and computes the reference
// FCS and IPv4 header checksum with algorithms written independently of the RTL: the FCS uses
// the reflected CRC-32 (polynomial 0xEDB88320, LSB first), the header checksum a plain 32-bit
// accumulate and fold.
package tb_eth_pkg;
  typedef logic [7:0] byte_q_t[$];

  function automatic logic [31:0] ref_crc(input byte_q_t q);
    logic [31:0] c = 32'hFFFF_FFFF;
    foreach (q[i]) begin
      c ^= 32'(q[i]);
      repeat (8) c = c[0] ? ((c >> 1) ^ 32'hEDB8_8320) : (c >> 1);
    end
    return ~c;
  endfunction

  // frame with its FCS appended (least significant byte first, as on the wire)
  function automatic byte_q_t with_fcs(input byte_q_t q);
    logic [31:0] f = ref_crc(q);
    byte_q_t r = q;
    for (int i = 0; i < 4; i++) r.push_back(f[8*i +: 8]);
    return r;
  endfunction

  function automatic void put(ref byte_q_t q, input logic [63:0] v, input int nbytes);
    for (int i = nbytes - 1; i >= 0; i--) q.push_back(v[8*i +: 8]);
  endfunction

  function automatic logic [15:0] ref_ip_csum(input byte_q_t q, input int ofs, input int n);
    logic [31:0] s = 0;
    for (int i = 0; i < n; i += 2) s += {q[ofs + i], q[ofs + i + 1]};
    while (s[31:16] != 0) s = s[15:0] + s[31:16];
    return ~s[15:0];
  endfunction

  function automatic byte_q_t eth_hdr(input logic [47:0] dst, input logic [47:0] src,
                                      input logic [15:0] etype);
    byte_q_t q = {};
    put(q, 64'(dst), 6);
    put(q, 64'(src), 6);
    put(q, 64'(etype), 2);
    return q;
  endfunction

  // IPv4/UDP frame; flags_frag and ihl/proto let tests build packets the receiver must drop
  function automatic byte_q_t udp_frame(input logic [47:0] dst_mac, input logic [47:0] src_mac,
      input logic [31:0] src_ip, input logic [31:0] dst_ip, input logic [15:0] dst_port,
      input byte_q_t payload, input logic [15:0] flags_frag = 16'h4000,
      input logic [7:0] proto = 8'd17, input bit bad_csum = 0);
    byte_q_t q = eth_hdr(dst_mac, src_mac, 16'h0800);
    int tot = 20 + 8 + payload.size();
    logic [15:0] ck;
    put(q, 64'h45, 1); put(q, 64'h00, 1); put(q, 64'(tot), 2);
    put(q, 64'h1234, 2); put(q, 64'(flags_frag), 2);
    put(q, 64'd64, 1); put(q, 64'(proto), 1); put(q, 64'h0, 2);
    put(q, 64'(src_ip), 4); put(q, 64'(dst_ip), 4);
    ck = ref_ip_csum(q, 14, 20);
    if (bad_csum) ck ^= 16'h0100;
    q[24] = ck[15:8];
    q[25] = ck[7:0];
    put(q, 64'd40000, 2); put(q, 64'(dst_port), 2); put(q, 64'(8 + payload.size()), 2);
    put(q, 64'h0, 2);
    foreach (payload[i]) q.push_back(payload[i]);
    while (q.size() < 60) q.push_back(8'h00);
    return q;
  endfunction

  function automatic byte_q_t arp_frame(input logic [47:0] dst_mac, input logic [15:0] op,
      input logic [47:0] sha, input logic [31:0] spa, input logic [47:0] tha,
      input logic [31:0] tpa);
    byte_q_t q = eth_hdr(dst_mac, sha, 16'h0806);
    put(q, 64'h0001, 2); put(q, 64'h0800, 2); put(q, 64'h06, 1); put(q, 64'h04, 1);
    put(q, 64'(op), 2); put(q, 64'(sha), 6); put(q, 64'(spa), 4);
    put(q, 64'(tha), 6); put(q, 64'(tpa), 4);
    while (q.size() < 60) q.push_back(8'h00);
    return q;
  endfunction

  function automatic byte_q_t point_bytes(input logic [7:0] cmd, input logic [15:0] x,
      input logic [15:0] y, input logic [7:0] r, input logic [7:0] g, input logic [7:0] b);
    byte_q_t q = {};
    put(q, 64'(cmd), 1); put(q, 64'(x), 2); put(q, 64'(y), 2);
    put(q, 64'(r), 1); put(q, 64'(g), 1); put(q, 64'(b), 1);
    return q;
  endfunction
endpackage
