// tb_nalp_top_full: one complete operation of the projector at its full configuration (default
// parameters: 20,000-point banks, 2,000 cycles per point, default addresses and port).
// The host fills a whole bank, 20,000 points in 112 datagrams, sends one point too many (which
// the store must drop), then the swap record.  Checks: frame_len = 20,000, the bank toggled,
// the first and last records in the shown bank are the ones sent, and the DACs then receive the
// first points of the frame in order, one every 2,000 cycles.
module tb_nalp_top_full;
  import nalp_pkg::*;
  import tb_eth_pkg::*;

  localparam int N = 20000;
  localparam logic [47:0] HOST   = 48'h0A_0B_0C_0D_0E_0F;
  localparam logic [31:0] HOSTIP = 32'hC0A8_0101;

  logic        clk = 0, rst = 1;
  logic        crs_dv, tx_en;
  logic [1:0]  rxd, txd;
  logic        xs, xm, xc, ys, ym, yc;
  logic [2:0]  laser;
  logic        gw_valid, bank_sel, fb_swap, fb_overflow, point_shown, frame_done;
  logic [31:0] gw_ip;
  logic [47:0] gw_mac;
  logic [14:0] frame_len;
  net_events_t ev;
  int          checks = 0, failures = 0, n_ovf = 0;

  rmii_src src (.clk(clk), .crs_dv(crs_dv), .rxd(rxd));
  spi_capture cap_x (.clk(clk), .sclk(xs), .mosi(xm), .cs_n(xc));
  spi_capture cap_y (.clk(clk), .sclk(ys), .mosi(ym), .cs_n(yc));

  nalp_top dut (
    .clk(clk), .rst(rst), .rmii_crs_dv(crs_dv), .rmii_rxd(rxd), .rmii_tx_en(tx_en),
    .rmii_txd(txd), .dac_x_sclk(xs), .dac_x_mosi(xm), .dac_x_cs_n(xc),
    .dac_y_sclk(ys), .dac_y_mosi(ym), .dac_y_cs_n(yc), .laser_pwm(laser),
    .gw_valid(gw_valid), .gw_ip(gw_ip), .gw_mac(gw_mac), .bank_sel(bank_sel),
    .frame_len(frame_len), .net_events(ev), .fb_swap(fb_swap), .fb_overflow(fb_overflow),
    .point_shown(point_shown), .frame_done(frame_done)
  );

  always #10 clk = ~clk;
  always @(posedge clk) if (!rst && fb_overflow) n_ovf++;

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic point_t mkp(input int i);
    return {CMD_DATA, 16'(i * 3), 16'(65535 - i), 8'(i), 8'(i >> 8), 8'(i ^ 8'h5A)};
  endfunction

  initial begin
    int sent = 0, sel0, guard;
    point_t last;
    repeat (5) @(negedge clk);
    rst = 0;
    repeat (5) @(negedge clk);
    sel0 = bank_sel;
    while (sent <= N) begin          // N + 1 data records, then the swap
      byte_q_t pl;
      pl = {};
      for (int k = 0; k < 180 && sent <= N + 1; k++) begin
        point_t p;
        p = (sent == N + 1) ? point_t'({CMD_SWAP, 56'h0}) : mkp(sent);
        for (int j = 7; j >= 0; j--) pl.push_back(p[8*j +: 8]);
        sent++;
      end
      src.send(with_fcs(udp_frame(DEFAULT_MAC, HOST, HOSTIP, DEFAULT_IP, DEFAULT_UDP_PORT, pl)));
    end
    repeat (300) @(negedge clk);
    check(frame_len == 15'(N), $sformatf("frame length %0d", frame_len));
    check(bank_sel != sel0, "bank toggled");
    check(n_ovf == 1, $sformatf("one record beyond the bank dropped (%0d)", n_ovf));
    if (sel0 == 0) last = dut.u_fb.g_bank[1].u_bank.mem[N - 1];
    else           last = dut.u_fb.g_bank[0].u_bank.mem[N - 1];
    check(last == mkp(N - 1), "last record of the bank");
    guard = 0;
    while (cap_x.words.size() < 6 && guard < 100000) begin @(negedge clk); guard++; end
    for (int k = 0; k < 6; k++)
      check(cap_x.words.size() > k && cap_x.words[k] == mkp(k).x && cap_y.words[k] == mkp(k).y,
            $sformatf("point %0d on the DACs", k));
    check(cap_x.starts.size() >= 6 && cap_x.starts[5] - cap_x.starts[4] == 2000,
          "one point every 2000 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
