// mac_rx: Ethernet II receive MAC on the RMII interface (100 Mb/s, 2 bits per 50 MHz cycle).
//
// It waits for carrier (crs_dv) with the 01 01 ... preamble dibits, locks on the 11 dibit that
// ends the start-of-frame delimiter, then assembles bytes least significant dibit first.  Every
// byte is written into the receive buffer (wr_en/wr_addr/wr_data, one write per four cycles)
// and folded into a crc32_eth.  The destination address is compared on the fly with the
// station address and the broadcast address.  When carrier drops, frame_done pulses for one
// cycle together with frame_good and frame_len:
//   frame_good = FCS residue correct, whole number of bytes, 64..1518 bytes on the wire,
//                destination is this station or broadcast;
//   frame_len  = bytes without the FCS (the FCS is checked and then shed, like the preamble).
// The FCS bytes are still written into the buffer behind the frame; readers ignore them.
// Own choices: crs_dv is taken as a plain data-valid (the RMII carrier-sense toggling at the
// end of a frame is not modelled), frames longer than the buffer are discarded, and a frame that
// fails any check is dropped silently.
module mac_rx
  import nalp_pkg::*;
#(
  parameter logic [47:0] MY_MAC = DEFAULT_MAC
) (
  input  logic             clk,
  input  logic             rst,
  // RMII receive side
  input  logic             crs_dv,
  input  logic [1:0]       rxd,
  // receive buffer write port
  output logic             wr_en,
  output logic [LEN_W-1:0] wr_addr,
  output logic [7:0]       wr_data,
  // end of frame
  output logic             frame_done,
  output logic             frame_good,
  output logic [LEN_W-1:0] frame_len
);
  typedef enum logic [1:0] {S_IDLE, S_PREAMBLE, S_DATA, S_DROP} state_t;
  state_t state;

  logic [1:0]       dib;        // dibit position inside the current byte
  logic [7:0]       shreg;
  logic [LEN_W-1:0] count;      // bytes received so far
  logic             too_long;
  logic             dst_mine, dst_bcast;
  logic             crc_init, crc_en;
  logic [7:0]       byte_now;
  logic [31:0]      crc;
  logic             crc_good;

  assign byte_now = {rxd, shreg[7:2]};

  crc32_eth u_crc (
    .clk (clk), .init(crc_init), .en(crc_en), .data(byte_now), .crc(crc), .good(crc_good)
  );

  always_comb begin
    crc_init = (state != S_DATA);
    crc_en   = (state == S_DATA) && crs_dv && (dib == 2'd3);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      wr_en      <= 1'b0;
      frame_done <= 1'b0;
      frame_good <= 1'b0;
      frame_len  <= '0;
      dib        <= '0;
      count      <= '0;
      too_long   <= 1'b0;
      dst_mine   <= 1'b1;
      dst_bcast  <= 1'b1;
    end else begin
      wr_en      <= 1'b0;
      frame_done <= 1'b0;
      case (state)
        S_IDLE: begin
          if (crs_dv && rxd == 2'b01) state <= S_PREAMBLE;
        end
        S_PREAMBLE: begin
          dib       <= '0;
          count     <= '0;
          too_long  <= 1'b0;
          dst_mine  <= 1'b1;
          dst_bcast <= 1'b1;
          if (!crs_dv)            state <= S_IDLE;
          else if (rxd == 2'b11)  state <= S_DATA;
          else if (rxd != 2'b01)  state <= S_DROP;
        end
        S_DATA: begin
          if (crs_dv) begin
            shreg <= byte_now;
            dib   <= dib + 2'd1;
            if (dib == 2'd3) begin
              if (count < LEN_W'(RX_BUF_BYTES)) begin
                wr_en   <= 1'b1;
                wr_addr <= count;
                wr_data <= byte_now;
                count   <= count + 1'b1;
              end else begin
                too_long <= 1'b1;
              end
              if (count < 6) begin
                if (byte_now != MY_MAC[47 - 8*count[2:0] -: 8]) dst_mine  <= 1'b0;
                if (byte_now != 8'hFF)                          dst_bcast <= 1'b0;
              end
            end
          end else begin
            state      <= S_IDLE;
            frame_done <= 1'b1;
            frame_len  <= count - LEN_W'(ETH_FCS_BYTES);
            frame_good <= crc_good && (dib == 2'd0) && !too_long
                          && (count >= LEN_W'(ETH_MIN_BYTES + ETH_FCS_BYTES))
                          && (dst_mine || dst_bcast);
          end
        end
        S_DROP: begin
          if (!crs_dv) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
