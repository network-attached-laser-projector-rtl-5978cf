// net_stack: the UDP offload engine.  It receives Ethernet frames on RMII, answers ARP and echo
// frames, and delivers the data of UDP datagrams sent to the display port as a stream of 64-bit
// point records.
//
// Receive path ("parallel stack"): mac_rx writes each frame into a receive buffer of byte
// registers.  When the frame ends with a good FCS (cycle 0), every layer inspects the buffer at
// its fixed offsets at the same time instead of one after the other:
//   * arp_rx looks at bytes 14..41 when the EtherType is ARP (result in cycle 1);
//   * the echo check looks at the EtherType 0x1234 and asks tx_builder to send the frame back;
//   * ipv4_rx checks bytes 14..33 and their checksum (result in cycle 2);
//   * udp_rx checks bytes 34..41 (result in cycle 3).
// From cycle 4 on the payload (bytes 42..) leaves as one point_t per cycle on pt_valid/pt_data,
// floor(payload bytes / 8) records; leftover bytes are ignored.  The whole decision therefore
// takes a fixed 4 cycles after frame_done, far inside the 48-cycle interframe gap, and the
// payload is read out at 8 bytes per cycle while a following frame can refill the buffer at only
// one byte per 4 cycles, so the read-out always stays ahead of the writer.
// Transmit path: tx_builder and mac_tx (ARP replies and echo frames), independent of receive,
// so the link is used full duplex.
// What follows the document: MAC/ARP/IPv4/UDP split, shared byte buffer, checksum module,
// echo EtherType 0x1234, compile-time MAC/IP/port, UDP checksum not verified, fixed latency.
// This design's choices: the cycle-by-cycle schedule, the point stream interface (no
// back-pressure: the frame store always accepts), dropping a transmit request while busy.
module net_stack
  import nalp_pkg::*;
#(
  parameter logic [47:0] MY_MAC   = DEFAULT_MAC,
  parameter logic [31:0] MY_IP    = DEFAULT_IP,
  parameter logic [15:0] UDP_PORT = DEFAULT_UDP_PORT
) (
  input  logic        clk,
  input  logic        rst,
  // RMII
  input  logic        rmii_crs_dv,
  input  logic [1:0]  rmii_rxd,
  output logic        rmii_tx_en,
  output logic [1:0]  rmii_txd,
  // received point records
  output logic        pt_valid,
  output point_t      pt_data,
  // ARP table
  output logic        gw_valid,
  output logic [31:0] gw_ip,
  output logic [47:0] gw_mac,
  // status
  output net_events_t events
);
  // ---------------- receive MAC and buffer -----------------------------------------------------
  logic             wr_en;
  logic [LEN_W-1:0] wr_addr;
  logic [7:0]       wr_data;
  logic             frame_done, frame_good;
  logic [LEN_W-1:0] frame_len;
  logic [7:0]       rxb [RX_BUF_BYTES];

  mac_rx #(.MY_MAC(MY_MAC)) u_mac_rx (
    .clk(clk), .rst(rst), .crs_dv(rmii_crs_dv), .rxd(rmii_rxd),
    .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .frame_done(frame_done), .frame_good(frame_good), .frame_len(frame_len)
  );

  always_ff @(posedge clk)
    if (wr_en) rxb[wr_addr] <= wr_data;

  // ---------------- parallel header views ------------------------------------------------------
  logic [15:0]                   ethertype;
  logic [IPV4_HDR_BYTES*8-1:0]   ip_hdr;
  logic [UDP_HDR_BYTES*8-1:0]    udp_hdr;
  logic [ARP_BYTES*8-1:0]        arp_pkt;

  always_comb begin
    ethertype = {rxb[OFS_ETH_TYPE], rxb[OFS_ETH_TYPE + 1]};
    for (int i = 0; i < IPV4_HDR_BYTES; i++) ip_hdr[IPV4_HDR_BYTES*8-1 - 8*i -: 8] = rxb[OFS_L3 + i];
    for (int i = 0; i < UDP_HDR_BYTES; i++)  udp_hdr[UDP_HDR_BYTES*8-1 - 8*i -: 8] = rxb[OFS_UDP + i];
    for (int i = 0; i < ARP_BYTES; i++)      arp_pkt[ARP_BYTES*8-1 - 8*i -: 8]     = rxb[OFS_L3 + i];
  end

  logic frame_ok;
  assign frame_ok = frame_done && frame_good;

  // ---------------- IPv4 and UDP ---------------------------------------------------------------
  logic             ip_done, ip_accept;
  logic [31:0]      ip_src;
  logic [LEN_W-1:0] ip_plen;
  logic             udp_done, udp_accept;
  logic [15:0]      udp_src_port;
  logic [LEN_W-1:0] udp_plen;

  ipv4_rx u_ipv4 (
    .clk(clk), .rst(rst), .start(frame_ok), .ethertype(ethertype), .hdr(ip_hdr),
    .l3_len(frame_len - LEN_W'(OFS_L3)),
    .done(ip_done), .accept(ip_accept), .src_ip(ip_src), .payload_len(ip_plen)
  );

  udp_rx #(.PORT(UDP_PORT)) u_udp (
    .clk(clk), .rst(rst), .start(ip_accept), .hdr(udp_hdr), .ip_payload_len(ip_plen),
    .done(udp_done), .accept(udp_accept), .src_port(udp_src_port), .payload_len(udp_plen)
  );

  // ---------------- payload read-out -----------------------------------------------------------
  localparam int WORD_W = $clog2(ETH_MAX_BYTES / 8 + 1);
  logic [WORD_W-1:0] words_left, word_idx;
  point_t            word_now;

  always_comb begin
    logic [63:0] w;
    w = '0;
    for (int j = 0; j < 8; j++)
      w[63 - 8*j -: 8] = rxb[LEN_W'(OFS_PAYLOAD) + LEN_W'({word_idx, 3'b000}) + LEN_W'(j)];
    word_now = point_t'(w);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pt_valid   <= 1'b0;
      pt_data    <= '0;
      words_left <= '0;
      word_idx   <= '0;
    end else begin
      pt_valid <= 1'b0;
      if (udp_accept) begin
        words_left <= WORD_W'(udp_plen >> 3);
        word_idx   <= '0;
      end else if (words_left != '0) begin
        pt_valid   <= 1'b1;
        pt_data    <= word_now;
        words_left <= words_left - 1'b1;
        word_idx   <= word_idx + 1'b1;
      end
    end
  end

  // ---------------- ARP and echo ---------------------------------------------------------------
  logic        arp_reply_req;
  logic [47:0] arp_reply_mac;
  logic [31:0] arp_reply_ip;
  logic        echo_req;

  arp_rx #(.MY_IP(MY_IP)) u_arp (
    .clk(clk), .rst(rst), .start(frame_ok && ethertype == ETHERTYPE_ARP), .pkt(arp_pkt),
    .reply_req(arp_reply_req), .reply_mac(arp_reply_mac), .reply_ip(arp_reply_ip),
    .gw_valid(gw_valid), .gw_ip(gw_ip), .gw_mac(gw_mac)
  );

  assign echo_req = frame_ok && (ethertype == ETHERTYPE_ECHO);

  // ---------------- transmit -------------------------------------------------------------------
  logic [LEN_W-1:0] rx_rd_addr;
  logic             tx_start, tx_busy;
  logic [LEN_W-1:0] tx_len, tx_rd_addr;
  logic [7:0]       tx_rd_data;
  logic             sent_arp, sent_echo, tx_dropped;

  tx_builder #(.MY_MAC(MY_MAC), .MY_IP(MY_IP)) u_txb (
    .clk(clk), .rst(rst),
    .arp_req(arp_reply_req), .arp_mac(arp_reply_mac), .arp_ip(arp_reply_ip),
    .echo_req(echo_req), .echo_len(frame_len),
    .rx_addr(rx_rd_addr), .rx_data(rxb[rx_rd_addr]),
    .tx_start(tx_start), .tx_len(tx_len), .tx_busy(tx_busy),
    .tx_rd_addr(tx_rd_addr), .tx_rd_data(tx_rd_data),
    .sent_arp(sent_arp), .sent_echo(sent_echo), .dropped(tx_dropped)
  );

  mac_tx u_mac_tx (
    .clk(clk), .rst(rst), .start(tx_start), .len(tx_len), .busy(tx_busy),
    .rd_addr(tx_rd_addr), .rd_data(tx_rd_data), .tx_en(rmii_tx_en), .txd(rmii_txd)
  );

  // ---------------- events ---------------------------------------------------------------------
  always_comb begin
    events            = '0;
    events.frame_good = frame_ok;
    events.frame_bad  = frame_done && !frame_good;
    events.ip_accept  = ip_accept;
    events.ip_drop    = ip_done && !ip_accept && (ethertype == ETHERTYPE_IPV4);
    events.udp_accept = udp_accept;
    events.udp_drop   = udp_done && !udp_accept;
    events.arp_reply  = sent_arp;
    events.echo       = sent_echo;
    events.tx_drop    = tx_dropped;
  end

  // ip_src and udp_src_port are kept for status/debug only
  logic unused_ok;
  assign unused_ok = ^{ip_src, udp_src_port};
endmodule
