// ipv4_rx: validates the IPv4 header of a received frame (the subset of RFC 791 the projector
// understands).
//
// When start pulses, the frame is complete in the receive buffer and the 20 header bytes that
// follow the Ethernet header are presented in parallel on hdr (byte 0 in the top bits).  The
// header words go into an inet_checksum; in the same cycles the fixed fields are checked.  Two
// cycles after start, done pulses with accept = 1 when all of these hold:
//   EtherType 0x0800, version 4, header length 5 words (no options), not fragmented
//   (MF = 0 and fragment offset 0; DF may be set), protocol 17 (UDP), header checksum correct,
//   total length between 20 and the bytes actually received after the Ethernet header.
// Otherwise the packet is dropped (no ICMP).  src_ip and payload_len (total length - 20) are
// valid with done.  The list of checks is the document's; the length check against the frame
// and the absence of a destination-address check (the MAC layer already filters on the
// station address) are this design's choices.
module ipv4_rx
  import nalp_pkg::*;
(
  input  logic                           clk,
  input  logic                           rst,
  input  logic                           start,
  input  logic [15:0]                    ethertype,
  input  logic [IPV4_HDR_BYTES*8-1:0]    hdr,
  input  logic [LEN_W-1:0]               l3_len,     // frame bytes after the Ethernet header
  output logic                           done,
  output logic                           accept,
  output logic [31:0]                    src_ip,
  output logic [LEN_W-1:0]               payload_len
);
  logic [9:0][15:0] words;
  logic             ck_valid, ck_ok;
  logic [15:0]      ck_sum, ck_val;

  always_comb
    for (int i = 0; i < 10; i++) words[i] = hdr[IPV4_HDR_BYTES*8-1 - 16*i -: 16];

  inet_checksum #(.N_WORDS(10)) u_ck (
    .clk(clk), .rst(rst), .in_valid(start), .words(words),
    .out_valid(ck_valid), .sum(ck_sum), .checksum(ck_val), .ok(ck_ok)
  );

  // header fields
  logic [3:0]  version, ihl;
  logic [15:0] total_len;
  logic        flag_mf;
  logic [12:0] frag_ofs;
  logic [7:0]  protocol;
  logic        fields_ok;

  always_comb begin
    version   = hdr[159:156];
    ihl       = hdr[155:152];
    total_len = hdr[143:128];
    flag_mf   = hdr[109];
    frag_ofs  = hdr[108:96];
    protocol  = hdr[87:80];
    fields_ok = (ethertype == ETHERTYPE_IPV4) && (version == 4'd4) && (ihl == 4'd5)
                && !flag_mf && (frag_ofs == '0) && (protocol == IP_PROTO_UDP)
                && (total_len >= 16'(IPV4_HDR_BYTES)) && (total_len <= 16'(l3_len));
  end

  logic             ok1;
  logic [31:0]      src1;
  logic [LEN_W-1:0] plen1;

  always_ff @(posedge clk) begin
    if (rst) begin
      ok1   <= 1'b0;
      src1  <= '0;
      plen1 <= '0;
    end else if (start) begin
      ok1   <= fields_ok;
      src1  <= hdr[63:32];
      plen1 <= LEN_W'(total_len - 16'(IPV4_HDR_BYTES));
    end
  end

  // ck_valid arrives two cycles after start; the field checks were captured at start
  assign done        = ck_valid;
  assign accept      = ck_valid && ok1 && ck_ok;
  assign src_ip      = src1;
  assign payload_len = plen1;
endmodule
