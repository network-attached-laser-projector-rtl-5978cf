// nalp_pkg: types and constants shared by the network-attached laser projector.
//
// The projector receives UDP datagrams over 100 Mb/s Ethernet (RMII, one 50 MHz clock for the
// whole design) and stores the 64-bit point records they carry in a double-buffered frame
// store, from which the display controller drives two SPI DACs (galvo x/y) and three laser PWM
// channels.  This package holds the point record layout (cmd, x, y, r, g, b: 8+16+16+8+8+8 bits,
// as the document gives them), the command codes (0x01 data, 0x02 swap banks), Ethernet/IPv4/UDP
// constants and byte offsets, and the Ethernet CRC-32 step shared by the two MACs.
//
// Own choices: the field order inside the 64-bit word (cmd in the top byte, then x, y, r, g, b,
// each big-endian as it arrives on the wire), the default MAC/IP address and UDP port, and the
// frame-size limits (standard Ethernet II, no VLAN tag).
package nalp_pkg;

  // ---------------- point record -------------------------------------------------------------
  typedef struct packed {
    logic [7:0]  cmd;
    logic [15:0] x;
    logic [15:0] y;
    logic [7:0]  r;
    logic [7:0]  g;
    logic [7:0]  b;
  } point_t;

  localparam logic [7:0] CMD_DATA = 8'h01;
  localparam logic [7:0] CMD_SWAP = 8'h02;

  // ---------------- addresses (compile-time configuration) -----------------------------------
  localparam logic [47:0] DEFAULT_MAC      = 48'h02_4E_41_4C_50_01;  // locally administered
  localparam logic [31:0] DEFAULT_IP       = 32'hC0_A8_01_C8;        // 192.168.1.200
  localparam logic [15:0] DEFAULT_UDP_PORT = 16'd5005;

  // ---------------- Ethernet framing ---------------------------------------------------------
  localparam int ETH_MAX_BYTES  = 1514;  // destination MAC .. end of payload, no FCS
  localparam int ETH_MIN_BYTES  = 60;    // shorter frames are padded on transmit
  localparam int ETH_FCS_BYTES  = 4;
  localparam int RX_BUF_BYTES   = ETH_MAX_BYTES + ETH_FCS_BYTES;
  localparam int ETH_IFG_CYCLES = 48;    // 96 bit times at 2 bits per 50 MHz cycle
  localparam int LEN_W          = 11;    // byte counts up to 2047

  localparam logic [15:0] ETHERTYPE_IPV4 = 16'h0800;
  localparam logic [15:0] ETHERTYPE_ARP  = 16'h0806;
  localparam logic [15:0] ETHERTYPE_ECHO = 16'h1234;

  // byte offsets in a received frame (no IPv4 options, see ipv4_rx)
  localparam int OFS_ETH_DST  = 0;
  localparam int OFS_ETH_SRC  = 6;
  localparam int OFS_ETH_TYPE = 12;
  localparam int OFS_L3       = 14;
  localparam int IPV4_HDR_BYTES = 20;
  localparam int OFS_UDP      = OFS_L3 + IPV4_HDR_BYTES;  // 34
  localparam int UDP_HDR_BYTES = 8;
  localparam int OFS_PAYLOAD  = OFS_UDP + UDP_HDR_BYTES;  // 42
  localparam int ARP_BYTES    = 28;

  localparam logic [7:0] IP_PROTO_UDP = 8'd17;

  // ---------------- network event pulses (one cycle each, for status and counters) -----------
  typedef struct packed {
    logic frame_good;   // frame with correct FCS addressed to this station
    logic frame_bad;    // frame dropped by the MAC (FCS, size or address)
    logic ip_accept;    // IPv4 header accepted
    logic ip_drop;      // IPv4 frame dropped (checksum, options, fragment, protocol, length)
    logic udp_accept;   // datagram for the display port
    logic udp_drop;     // datagram for another port or with a bad length
    logic arp_reply;    // ARP reply built
    logic echo;         // echo frame built
    logic tx_drop;      // transmit request dropped because a frame was in flight
  } net_events_t;

  // ---------------- Ethernet CRC-32 ----------------------------------------------------------
  // Polynomial 0x04C11DB7 in its non-reflected (BZIP2) shift-register form, fed with the bits in
  // the order they cross the wire (least significant bit of each byte first).  That is exactly
  // the IEEE 802.3 FCS: the register starts at all ones, the FCS is its complement sent from
  // bit 31 down, and a frame with a correct FCS leaves CRC_RESIDUE behind.
  localparam logic [31:0] CRC_POLY    = 32'h04C1_1DB7;
  localparam logic [31:0] CRC_INIT    = 32'hFFFF_FFFF;
  localparam logic [31:0] CRC_RESIDUE = 32'hC704_DD7B;

  function automatic logic [31:0] crc32_byte(input logic [31:0] crc, input logic [7:0] data);
    logic [31:0] c;
    c = crc;
    for (int i = 0; i < 8; i++) begin
      if (c[31] ^ data[i]) c = {c[30:0], 1'b0} ^ CRC_POLY;
      else                 c = {c[30:0], 1'b0};
    end
    return c;
  endfunction

  // k-th FCS byte (k = 0 first on the wire) for a finished CRC register
  function automatic logic [7:0] fcs_byte(input logic [31:0] crc, input logic [1:0] k);
    logic [7:0] hi;
    logic [7:0] r;
    hi = ~crc[31 - 8*k -: 8];
    for (int i = 0; i < 8; i++) r[i] = hi[7 - i];
    return r;
  endfunction

endpackage
