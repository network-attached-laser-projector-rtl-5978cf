// nalp_top: network-attached laser projector.
//
// A host streams vector images as UDP datagrams over 100 Mb/s Ethernet.  Each 8-byte record in
// a datagram is a point (cmd, x, y, r, g, b).  The offload engine (net_stack) receives the
// frames on the RMII interface of the Ethernet PHY, answers ARP and echo frames on the transmit
// side, and passes the records of datagrams for its UDP port straight to the frame store
// (framebuffer).  Records with cmd 0x01 fill the hidden bank; a record with cmd 0x02 swaps the
// banks.  The display controller scans the shown bank forever, moving the galvo mirrors through
// two SPI DACs and setting the three laser intensities with PWM.
// Everything runs on the 50 MHz RMII reference clock; rst is synchronous and active high.
// Outside the FPGA (not part of this RTL): the Ethernet PHY, the two DACs with their buffer
// amplifiers and galvo drivers, and the constant-current laser drivers fed by the PWM outputs.
module nalp_top
  import nalp_pkg::*;
#(
  parameter logic [47:0] MY_MAC       = DEFAULT_MAC,
  parameter logic [31:0] MY_IP        = DEFAULT_IP,
  parameter logic [15:0] UDP_PORT     = DEFAULT_UDP_PORT,
  parameter int          FB_DEPTH     = 20000,
  parameter int          POINT_CYCLES = 2000,
  parameter int          SPI_HALF     = 2,
  parameter int          AW           = $clog2(FB_DEPTH + 1)
) (
  input  logic          clk,          // 50 MHz RMII reference clock
  input  logic          rst,
  // RMII to the Ethernet PHY
  input  logic          rmii_crs_dv,
  input  logic [1:0]    rmii_rxd,
  output logic          rmii_tx_en,
  output logic [1:0]    rmii_txd,
  // galvo DACs
  output logic          dac_x_sclk,
  output logic          dac_x_mosi,
  output logic          dac_x_cs_n,
  output logic          dac_y_sclk,
  output logic          dac_y_mosi,
  output logic          dac_y_cs_n,
  // laser PWM {red, green, blue}
  output logic [2:0]    laser_pwm,
  // status
  output logic          gw_valid,
  output logic [31:0]   gw_ip,
  output logic [47:0]   gw_mac,
  output logic          bank_sel,
  output logic [AW-1:0] frame_len,
  output net_events_t   net_events,
  output logic          fb_swap,
  output logic          fb_overflow,
  output logic          point_shown,
  output logic          frame_done
);
  logic          pt_valid;
  point_t        pt_data;
  logic [AW-1:0] rd_addr;
  point_t        rd_point;

  net_stack #(.MY_MAC(MY_MAC), .MY_IP(MY_IP), .UDP_PORT(UDP_PORT)) u_net (
    .clk(clk), .rst(rst),
    .rmii_crs_dv(rmii_crs_dv), .rmii_rxd(rmii_rxd), .rmii_tx_en(rmii_tx_en), .rmii_txd(rmii_txd),
    .pt_valid(pt_valid), .pt_data(pt_data),
    .gw_valid(gw_valid), .gw_ip(gw_ip), .gw_mac(gw_mac), .events(net_events)
  );

  framebuffer #(.DEPTH(FB_DEPTH), .AW(AW)) u_fb (
    .clk(clk), .rst(rst), .in_valid(pt_valid), .in_point(pt_data),
    .rd_addr(rd_addr), .rd_point(rd_point), .frame_len(frame_len), .bank_sel(bank_sel),
    .swap(fb_swap), .overflow(fb_overflow)
  );

  display_ctrl #(.FB_DEPTH(FB_DEPTH), .AW(AW), .POINT_CYCLES(POINT_CYCLES), .SPI_HALF(SPI_HALF))
  u_disp (
    .clk(clk), .rst(rst), .rd_addr(rd_addr), .rd_point(rd_point), .frame_len(frame_len),
    .swap(fb_swap),
    .dac_x_sclk(dac_x_sclk), .dac_x_mosi(dac_x_mosi), .dac_x_cs_n(dac_x_cs_n),
    .dac_y_sclk(dac_y_sclk), .dac_y_mosi(dac_y_mosi), .dac_y_cs_n(dac_y_cs_n),
    .laser_pwm(laser_pwm), .point_shown(point_shown), .frame_done(frame_done)
  );
endmodule
