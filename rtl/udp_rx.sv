// udp_rx: UDP (RFC 768) receive check on top of ipv4_rx.
//
// When start pulses (the IPv4 layer accepted a datagram) the 8-byte UDP header is presented on
// hdr.  One cycle later done pulses; accept = 1 when the destination port is the compile-time
// port and the UDP length is at least 8 and fits inside the IPv4 payload.  payload_len is then
// the number of data bytes (UDP length - 8); the data itself starts right behind the header in
// the receive buffer.  As in the document, the UDP checksum is not verified, so the check takes
// a fixed number of cycles; the source port is reported but not used.
module udp_rx
  import nalp_pkg::*;
#(
  parameter logic [15:0] PORT = DEFAULT_UDP_PORT
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        start,
  input  logic [UDP_HDR_BYTES*8-1:0]  hdr,
  input  logic [LEN_W-1:0]            ip_payload_len,
  output logic                        done,
  output logic                        accept,
  output logic [15:0]                 src_port,
  output logic [LEN_W-1:0]            payload_len
);
  logic [15:0] dst_port, udp_len;
  assign dst_port = hdr[47:32];
  assign udp_len  = hdr[31:16];

  always_ff @(posedge clk) begin
    if (rst) begin
      done        <= 1'b0;
      accept      <= 1'b0;
      src_port    <= '0;
      payload_len <= '0;
    end else begin
      done   <= start;
      accept <= start && (dst_port == PORT) && (udp_len >= 16'(UDP_HDR_BYTES))
                && (udp_len <= 16'(ip_payload_len));
      if (start) begin
        src_port    <= hdr[63:48];
        payload_len <= LEN_W'(udp_len - 16'(UDP_HDR_BYTES));
      end
    end
  end
endmodule
