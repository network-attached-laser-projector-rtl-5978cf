// mac_tx: Ethernet II transmit MAC on the RMII interface (100 Mb/s, 2 bits per 50 MHz cycle).
//
// start (while idle) sends a frame of len bytes (destination MAC .. end of payload) that it
// fetches from a frame store with a one-cycle read latency (rd_addr -> rd_data).  On the wire:
// seven 0x55 preamble bytes, the 0xD5 start-of-frame delimiter, the frame padded with zeros to
// 60 bytes, and the 4-byte FCS computed on the fly by a crc32_eth.  Each byte goes out least
// significant dibit first, one dibit per cycle with tx_en high.  After the frame the transmitter
// stays busy for the 96-bit-time interframe gap (48 cycles) before it accepts the next start.
// A byte is fetched four cycles before it is needed, so the store can be a synchronous RAM.
// The framing follows IEEE 802.3 as the document requires; the fetch interface is this
// design's own.
module mac_tx
  import nalp_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [LEN_W-1:0] len,
  output logic             busy,
  // frame store read port
  output logic [LEN_W-1:0] rd_addr,
  input  logic [7:0]       rd_data,
  // RMII transmit side
  output logic             tx_en,
  output logic [1:0]       txd
);
  typedef enum logic [2:0] {S_IDLE, S_PRE, S_DATA, S_FCS, S_IFG} state_t;
  state_t state;

  logic [1:0]       dib;
  logic [7:0]       shreg;
  logic [LEN_W-1:0] cnt;
  logic [LEN_W-1:0] len_q, pad_len;
  logic             crc_init, crc_en;
  logic [7:0]       crc_data;
  logic [31:0]      crc;
  logic             crc_good_unused;

  crc32_eth u_crc (
    .clk(clk), .init(crc_init), .en(crc_en), .data(crc_data), .crc(crc), .good(crc_good_unused)
  );

  // next data byte (zero padding past the end of the frame)
  logic [7:0] data_byte;
  logic       last_pre, more_data;
  always_comb begin
    last_pre  = (state == S_PRE) && (cnt == LEN_W'(7));
    more_data = (cnt + 1'b1) < pad_len;
    if (last_pre) data_byte = (len_q != 0) ? rd_data : 8'h00;
    else          data_byte = ((cnt + 1'b1) < len_q) ? rd_data : 8'h00;
    crc_init = (state == S_IDLE);
    crc_en   = (dib == 2'd3) && (last_pre || (state == S_DATA && more_data));
    crc_data = data_byte;
  end

  assign busy  = (state != S_IDLE);
  assign txd   = shreg[1:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      tx_en   <= 1'b0;
      shreg   <= '0;
      dib     <= '0;
      cnt     <= '0;
      rd_addr <= '0;
      len_q   <= '0;
      pad_len <= '0;
    end else begin
      case (state)
        S_IDLE: begin
          if (start) begin
            state   <= S_PRE;
            tx_en   <= 1'b1;
            shreg   <= 8'h55;
            dib     <= '0;
            cnt     <= '0;
            rd_addr <= '0;
            len_q   <= len;
            pad_len <= (len < LEN_W'(ETH_MIN_BYTES)) ? LEN_W'(ETH_MIN_BYTES) : len;
          end
        end
        S_PRE, S_DATA, S_FCS: begin
          dib   <= dib + 2'd1;
          shreg <= {2'b00, shreg[7:2]};
          if (dib == 2'd3) begin
            case (state)
              S_PRE: begin
                if (last_pre) begin
                  state   <= S_DATA;
                  cnt     <= '0;
                  shreg   <= data_byte;
                  rd_addr <= rd_addr + 1'b1;
                end else begin
                  cnt   <= cnt + 1'b1;
                  shreg <= (cnt == LEN_W'(6)) ? 8'hD5 : 8'h55;
                end
              end
              S_DATA: begin
                if (more_data) begin
                  cnt     <= cnt + 1'b1;
                  shreg   <= data_byte;
                  rd_addr <= rd_addr + 1'b1;
                end else begin
                  state <= S_FCS;
                  cnt   <= '0;
                  shreg <= fcs_byte(crc, 2'd0);
                end
              end
              default: begin  // S_FCS
                if (cnt == LEN_W'(3)) begin
                  state <= S_IFG;
                  tx_en <= 1'b0;
                  cnt   <= '0;
                end else begin
                  cnt   <= cnt + 1'b1;
                  shreg <= fcs_byte(crc, 2'(cnt + 1'b1));
                end
              end
            endcase
          end
        end
        S_IFG: begin
          cnt <= cnt + 1'b1;
          if (cnt == LEN_W'(ETH_IFG_CYCLES - 1)) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
