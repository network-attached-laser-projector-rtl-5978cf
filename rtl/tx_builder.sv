// tx_builder: assembles the frames the station sends and hands them to mac_tx.
//
// Two kinds of frame leave the projector:
//   * ARP replies (arp_req from arp_rx): 42 bytes built from the requester's addresses and the
//     station's own, opcode 2; mac_tx pads them to the 60-byte minimum.
//   * Echo frames (echo_req, EtherType 0x1234): the received frame is copied back, byte for
//     byte, with the destination set to the original sender and the source set to the station.
// The builder writes the frame into its transmit store (one byte per cycle), then starts mac_tx,
// which reads the store back through its synchronous read port.  A request that arrives while a
// frame is still being built or sent is dropped and counted on dropped.  The echo copy reads the
// receive buffer through rx_addr/rx_data (combinational); it runs at one byte per cycle, four
// times the line rate, so it always stays ahead of the next frame overwriting that buffer.
// The echo and ARP behaviour is the document's; the store, the one-request-at-a-time policy and
// the copy mechanism are this design's choices.
module tx_builder
  import nalp_pkg::*;
#(
  parameter logic [47:0] MY_MAC = DEFAULT_MAC,
  parameter logic [31:0] MY_IP  = DEFAULT_IP
) (
  input  logic             clk,
  input  logic             rst,
  // requests
  input  logic             arp_req,
  input  logic [47:0]      arp_mac,
  input  logic [31:0]      arp_ip,
  input  logic             echo_req,
  input  logic [LEN_W-1:0] echo_len,
  // receive buffer read port
  output logic [LEN_W-1:0] rx_addr,
  input  logic [7:0]       rx_data,
  // transmit MAC
  output logic             tx_start,
  output logic [LEN_W-1:0] tx_len,
  input  logic             tx_busy,
  input  logic [LEN_W-1:0] tx_rd_addr,
  output logic [7:0]       tx_rd_data,
  // status
  output logic             sent_arp,
  output logic             sent_echo,
  output logic             dropped
);
  localparam int ARP_FRAME = OFS_L3 + ARP_BYTES;  // 42

  typedef enum logic [1:0] {S_IDLE, S_FILL_ARP, S_FILL_ECHO, S_SEND} state_t;
  state_t state;

  logic [7:0]             store [ETH_MAX_BYTES];
  logic [LEN_W-1:0]       idx, len_q;
  logic [47:0]            peer_mac;
  logic [31:0]            peer_ip;
  logic [ARP_FRAME*8-1:0] arp_frame;
  logic                   we;
  logic [7:0]             wbyte;

  assign arp_frame = {peer_mac, MY_MAC, ETHERTYPE_ARP,
                      16'd1, ETHERTYPE_IPV4, 8'd6, 8'd4, 16'd2,
                      MY_MAC, MY_IP, peer_mac, peer_ip};

  // byte to store at idx
  always_comb begin
    rx_addr = idx;
    we      = 1'b0;
    wbyte   = 8'h00;
    if (state == S_FILL_ARP) begin
      we    = 1'b1;
      wbyte = arp_frame[ARP_FRAME*8-1 - 8*idx -: 8];
    end else if (state == S_FILL_ECHO) begin
      we = 1'b1;
      if (idx < LEN_W'(6)) begin
        rx_addr = idx + LEN_W'(OFS_ETH_SRC);
        wbyte   = rx_data;
      end else if (idx < LEN_W'(12)) begin
        wbyte = MY_MAC[47 - 8*(idx - LEN_W'(6)) -: 8];
      end else begin
        wbyte = rx_data;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (we) store[idx] <= wbyte;
    tx_rd_data <= store[tx_rd_addr];
  end

  logic req_any;
  assign req_any = arp_req || echo_req;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      idx       <= '0;
      len_q     <= '0;
      peer_mac  <= '0;
      peer_ip   <= '0;
      tx_start  <= 1'b0;
      sent_arp  <= 1'b0;
      sent_echo <= 1'b0;
      dropped   <= 1'b0;
    end else begin
      tx_start  <= 1'b0;
      sent_arp  <= 1'b0;
      sent_echo <= 1'b0;
      dropped   <= 1'b0;
      case (state)
        S_IDLE: begin
          idx <= '0;
          if (arp_req && !tx_busy) begin
            state    <= S_FILL_ARP;
            peer_mac <= arp_mac;
            peer_ip  <= arp_ip;
            len_q    <= LEN_W'(ARP_FRAME);
          end else if (echo_req && !tx_busy) begin
            state <= S_FILL_ECHO;
            len_q <= echo_len;
          end
          if (req_any && tx_busy) dropped <= 1'b1;
          if (arp_req && echo_req) dropped <= 1'b1;  // cannot happen: one frame at a time
        end
        S_FILL_ARP, S_FILL_ECHO: begin
          if (req_any) dropped <= 1'b1;
          idx <= idx + 1'b1;
          if (idx == len_q - 1'b1) begin
            sent_arp  <= (state == S_FILL_ARP);
            sent_echo <= (state == S_FILL_ECHO);
            state     <= S_SEND;
            tx_start  <= 1'b1;
          end
        end
        S_SEND: begin
          if (req_any) dropped <= 1'b1;
          // tx_start was issued on entry; wait until the transmitter is done with the store
          if (!tx_start && !tx_busy) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign tx_len = len_q;
endmodule
