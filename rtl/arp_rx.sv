// arp_rx: Address Resolution Protocol (RFC 826) for a station with a one-entry table.
//
// When start pulses the 28-byte ARP body of a received frame is presented on pkt.  For an
// Ethernet/IPv4 ARP packet the RFC's reception algorithm runs in one cycle:
//   merge = the sender's protocol address is the one in the table -> refresh its MAC address;
//   if the target protocol address is ours: when not merged, the sender replaces the table
//   entry; when the opcode is a request, reply_req pulses with the requester's MAC and IP
//   (the answer itself is built by tx_builder).
// The table (gw_valid, gw_ip, gw_mac) holds the protocol and hardware addresses of the one
// peer, in practice the gateway, that last addressed this station.  The single-entry table and
// the RFC algorithm are the document's; that a new sender overwrites the entry is this design's
// reading of "single element table"; the table starts empty at reset.
module arp_rx
  import nalp_pkg::*;
#(
  parameter logic [31:0] MY_IP = DEFAULT_IP
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    start,
  input  logic [ARP_BYTES*8-1:0]  pkt,
  output logic                    reply_req,
  output logic [47:0]             reply_mac,
  output logic [31:0]             reply_ip,
  output logic                    gw_valid,
  output logic [31:0]             gw_ip,
  output logic [47:0]             gw_mac
);
  typedef struct packed {
    logic [15:0] htype;
    logic [15:0] ptype;
    logic [7:0]  hlen;
    logic [7:0]  plen;
    logic [15:0] oper;
    logic [47:0] sha;
    logic [31:0] spa;
    logic [47:0] tha;
    logic [31:0] tpa;
  } arp_t;

  arp_t a;
  logic well_formed, merge, for_me;

  assign a           = arp_t'(pkt);
  assign well_formed = (a.htype == 16'd1) && (a.ptype == ETHERTYPE_IPV4)
                       && (a.hlen == 8'd6) && (a.plen == 8'd4);
  assign merge       = gw_valid && (gw_ip == a.spa);
  assign for_me      = (a.tpa == MY_IP);

  always_ff @(posedge clk) begin
    if (rst) begin
      reply_req <= 1'b0;
      reply_mac <= '0;
      reply_ip  <= '0;
      gw_valid  <= 1'b0;
      gw_ip     <= '0;
      gw_mac    <= '0;
    end else begin
      reply_req <= 1'b0;
      if (start && well_formed) begin
        if (merge) gw_mac <= a.sha;
        if (for_me) begin
          if (!merge) begin
            gw_valid <= 1'b1;
            gw_ip    <= a.spa;
            gw_mac   <= a.sha;
          end
          if (a.oper == 16'd1) begin
            reply_req <= 1'b1;
            reply_mac <= a.sha;
            reply_ip  <= a.spa;
          end
        end
      end
    end
  end
endmodule
