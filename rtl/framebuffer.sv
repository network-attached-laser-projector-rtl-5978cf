// framebuffer: double-buffered point store between the network and the display controller.
//
// Two banks of DEPTH x 64-bit block RAM (20,000 points each, as in the document).  bank_sel
// names the bank the display reads; the network writes the other one.  Each incoming record
// (in_valid/in_point) is interpreted by its cmd byte:
//   0x01  the record is written at the next address of the write bank;
//   0x02  end of frame: the number of records written becomes the frame length, bank_sel
//         toggles so the freshly filled bank is shown, and writing restarts at address 0 of the
//         bank just released (swap pulses for one cycle).
// Other cmd values are ignored.  The display side reads rd_addr of the shown bank with one
// cycle of latency (rd_point) and scans 0 .. frame_len-1.  A data record beyond DEPTH is
// dropped and flagged on overflow; the frame keeps its first DEPTH points.
// Document: two banks, swap command, saved end address, bram_select toggle, 20,000 x 64 bits.
// Own choices: the swap record itself is not stored, reset shows an empty frame (length 0),
// cmd values other than 1 and 2 are ignored, and the overflow policy.
module framebuffer
  import nalp_pkg::*;
#(
  parameter int DEPTH = 20000,
  parameter int AW    = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          in_valid,
  input  point_t        in_point,
  input  logic [AW-1:0] rd_addr,
  output point_t        rd_point,
  output logic [AW-1:0] frame_len,
  output logic          bank_sel,
  output logic          swap,
  output logic          overflow
);
  logic [AW-1:0] wr_addr;
  logic          wr_data_ok;
  logic [1:0]    we;
  logic [63:0]   rdata [2];

  assign wr_data_ok = in_valid && (in_point.cmd == CMD_DATA) && (wr_addr < AW'(DEPTH));
  // the write bank is the one not shown
  assign we[0] = wr_data_ok && (bank_sel == 1'b1);
  assign we[1] = wr_data_ok && (bank_sel == 1'b0);

  for (genvar b = 0; b < 2; b++) begin : g_bank
    bram_sdp #(.W(64), .DEPTH(DEPTH), .AW(AW)) u_bank (
      .clk(clk), .we(we[b]), .waddr(wr_addr), .wdata(in_point),
      .raddr(rd_addr), .rdata(rdata[b])
    );
  end

  // the read data belongs to the bank shown when the address was presented
  logic sel_q;
  always_ff @(posedge clk) sel_q <= bank_sel;
  assign rd_point = point_t'(rdata[sel_q]);

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_addr   <= '0;
      frame_len <= '0;
      bank_sel  <= 1'b0;
      swap      <= 1'b0;
      overflow  <= 1'b0;
    end else begin
      swap     <= 1'b0;
      overflow <= 1'b0;
      if (in_valid && in_point.cmd == CMD_SWAP) begin
        frame_len <= wr_addr;
        bank_sel  <= ~bank_sel;
        wr_addr   <= '0;
        swap      <= 1'b1;
      end else if (wr_data_ok) begin
        wr_addr <= wr_addr + 1'b1;
      end else if (in_valid && in_point.cmd == CMD_DATA) begin
        overflow <= 1'b1;
      end
    end
  end
endmodule
