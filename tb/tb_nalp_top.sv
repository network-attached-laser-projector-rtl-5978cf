// tb_nalp_top: the whole projector from the Ethernet pins to the DAC and laser pins, with a
// small frame store (64 points) and a short dwell (700 cycles per point) to keep it quick.
// A host model sends frames of points as UDP datagrams, ends each with a swap record, and the
// DAC models must then see exactly those x/y values in order, repeated, with the colours on the
// PWM pins.  Every mechanism of the design is made to happen and counted:
//   datagram accepted, bank swap (bank_sel toggles), frame repeat, scan restart after a swap,
//   frame-store overflow, ARP reply and table fill, echo, IPv4 drop, UDP-port drop, MAC (FCS)
//   drop, transmit request dropped while busy.  A mechanism that never happens is a failure.
module tb_nalp_top;
  import nalp_pkg::*;
  import tb_eth_pkg::*;

  localparam int DEPTH = 64;
  localparam int PC    = 700;
  localparam int AW    = $clog2(DEPTH + 1);
  localparam logic [47:0] HOST   = 48'h0A_0B_0C_0D_0E_0F;
  localparam logic [31:0] HOSTIP = 32'hC0A8_0101;

  logic          clk = 0, rst = 1;
  logic          crs_dv, tx_en;
  logic [1:0]    rxd, txd;
  logic          xs, xm, xc, ys, ym, yc;
  logic [2:0]    laser;
  logic          gw_valid, bank_sel, fb_swap, fb_overflow, point_shown, frame_done;
  logic [31:0]   gw_ip;
  logic [47:0]   gw_mac;
  logic [AW-1:0] frame_len;
  net_events_t   ev;
  int            checks = 0, failures = 0;

  typedef enum int {M_UDP, M_SWAP, M_REPEAT, M_RESTART, M_OVERFLOW, M_ARP, M_ECHO, M_IPDROP,
                    M_PORTDROP, M_FCSDROP, M_TXDROP, M_N} mech_t;
  int mech [M_N];
  string mech_name [M_N] = '{"datagram", "bank swap", "frame repeat", "restart after swap",
                             "overflow", "ARP reply", "echo", "IPv4 drop", "UDP port drop",
                             "FCS drop", "transmit drop"};

  rmii_src src (.clk(clk), .crs_dv(crs_dv), .rxd(rxd));
  rmii_sink sink (.clk(clk), .tx_en(tx_en), .txd(txd));
  spi_capture cap_x (.clk(clk), .sclk(xs), .mosi(xm), .cs_n(xc));
  spi_capture cap_y (.clk(clk), .sclk(ys), .mosi(ym), .cs_n(yc));

  nalp_top #(.FB_DEPTH(DEPTH), .POINT_CYCLES(PC)) dut (
    .clk(clk), .rst(rst), .rmii_crs_dv(crs_dv), .rmii_rxd(rxd), .rmii_tx_en(tx_en),
    .rmii_txd(txd), .dac_x_sclk(xs), .dac_x_mosi(xm), .dac_x_cs_n(xc),
    .dac_y_sclk(ys), .dac_y_mosi(ym), .dac_y_cs_n(yc), .laser_pwm(laser),
    .gw_valid(gw_valid), .gw_ip(gw_ip), .gw_mac(gw_mac), .bank_sel(bank_sel),
    .frame_len(frame_len), .net_events(ev), .fb_swap(fb_swap), .fb_overflow(fb_overflow),
    .point_shown(point_shown), .frame_done(frame_done)
  );

  always #10 clk = ~clk;

  // index of the first DAC transfer that can belong to the frame just swapped in
  int swap_base = 0;
  always @(posedge clk) if (!rst && fb_swap) swap_base = cap_x.starts.size();

  always @(posedge clk) if (!rst) begin
    if (ev.udp_accept) mech[M_UDP]++;
    if (fb_swap) mech[M_SWAP]++;
    if (frame_done) mech[M_REPEAT]++;
    if (fb_overflow) mech[M_OVERFLOW]++;
    if (ev.arp_reply) mech[M_ARP]++;
    if (ev.echo) mech[M_ECHO]++;
    if (ev.ip_drop) mech[M_IPDROP]++;
    if (ev.udp_drop) mech[M_PORTDROP]++;
    if (ev.frame_bad) mech[M_FCSDROP]++;
    if (ev.tx_drop) mech[M_TXDROP]++;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic point_t mkp(input int f, input int i);
    return {CMD_DATA, 16'(f * 4096 + i * 37), 16'(60000 - f * 100 - i), 8'(i * 9), 8'(f * 40),
            8'(255 - i)};
  endfunction

  // send records as datagrams of up to 180 records
  task automatic send_records(input point_t recs[$]);
    while (recs.size() > 0) begin
      byte_q_t pl = {};
      for (int k = 0; k < 180 && recs.size() > 0; k++) begin
        point_t p = recs.pop_front();
        for (int j = 7; j >= 0; j--) pl.push_back(p[8*j +: 8]);
      end
      src.send(with_fcs(udp_frame(DEFAULT_MAC, HOST, HOSTIP, DEFAULT_IP, DEFAULT_UDP_PORT, pl)));
    end
  endtask

  task automatic send_frame(input int f, input int n);
    point_t recs[$] = {};
    for (int i = 0; i < n; i++) recs.push_back(mkp(f, i));
    recs.push_back({CMD_SWAP, 56'h0});
    send_records(recs);
    repeat (300) @(negedge clk);   // read-out of the last datagram
  endtask

  // expect the DACs to show frame f (n points) starting at word index base, for m words
  task automatic expect_scan(input int f, input int n, input int base, input int m,
                             input string what);
    bit ok = 1;
    int guard = 0;
    // a point fetched just before the swap may still go out first
    while (cap_x.words.size() < base + 1 && guard < 400000) begin @(negedge clk); guard++; end
    if (cap_x.words[base] != mkp(f, 0).x) base++;
    while (cap_x.words.size() < base + m && guard < 400000) begin @(negedge clk); guard++; end
    for (int k = 0; k < m; k++) begin
      point_t p = mkp(f, k % n);
      if (cap_x.words.size() <= base + k || cap_x.words[base + k] != p.x
          || cap_y.words[base + k] != p.y) ok = 0;
    end
    check(ok, what);
  endtask

  function automatic bit same_q(input byte_q_t a, input byte_q_t b);
    if (a.size() != b.size()) return 0;
    foreach (a[i]) if (a[i] != b[i]) return 0;
    return 1;
  endfunction

  initial begin
    int sel0, base, hr, hg, hb, idx, guard;
    byte_q_t f, e, pl;
    repeat (5) @(negedge clk);
    rst = 0;
    repeat (5) @(negedge clk);
    sel0 = bank_sel;

    // ARP first, as a host would
    src.send(with_fcs(arp_frame(48'hFF_FF_FF_FF_FF_FF, 16'd1, HOST, HOSTIP, 48'h0, DEFAULT_IP)));
    repeat (400) @(negedge clk);
    check(gw_valid && gw_ip == HOSTIP && gw_mac == HOST, "ARP table holds the host");
    e = arp_frame(HOST, 16'd2, DEFAULT_MAC, DEFAULT_IP, HOST, HOSTIP);
    for (int i = 0; i < 6; i++) e[6 + i] = DEFAULT_MAC[47 - 8*i -: 8];
    check(sink.frames.size() == 1 && same_q(sink.frames[0], with_fcs(e)), "ARP reply on the wire");

    // frame 1: 7 points, shown twice
    send_frame(1, 7);
    check(bank_sel != sel0 && frame_len == 7, "frame 1 swapped in");
    base = swap_base;
    expect_scan(1, 7, base, 14, "frame 1 shown twice in order");
    // colour of a point: measure PWM inside the next point
    while (!point_shown) @(negedge clk);
    idx = -1;
    for (int k = 0; k < 7; k++) if (cap_x.words[$] == mkp(1, k).x) idx = k;
    hr = 0; hg = 0; hb = 0;
    repeat (300) @(negedge clk);
    repeat (256) begin
      @(negedge clk);
      hr += int'(laser[2]); hg += int'(laser[1]); hb += int'(laser[0]);
    end
    begin
      point_t p;
      p = mkp(1, idx < 0 ? 0 : idx);
      check(hr == p.r && hg == p.g && hb == p.b,
            $sformatf("laser colour %0d/%0d/%0d vs %0d/%0d/%0d", hr, hg, hb, p.r, p.g, p.b));
    end

    // frame 2 arrives while frame 1 is being shown: restart at point 0 of frame 2
    send_frame(2, 5);
    check(bank_sel == sel0 && frame_len == 5, "frame 2 swapped in");
    base = swap_base;
    expect_scan(2, 5, base, 6, "frame 2 shown from point 0");
    if (cap_x.words.size() > base + 1 && (cap_x.words[base] == mkp(2, 0).x
        || cap_x.words[base + 1] == mkp(2, 0).x)) mech[M_RESTART]++;

    // frame 3 longer than the store: overflow, store keeps DEPTH points
    send_frame(3, DEPTH + 3);
    check(frame_len == AW'(DEPTH), "overflowed frame keeps DEPTH points");
    base = swap_base;
    expect_scan(3, DEPTH, base, 3, "frame 3 shown");

    // frames that must be dropped
    pl = {};
    for (int j = 0; j < 8; j++) pl.push_back(8'h01);
    src.send(with_fcs(udp_frame(DEFAULT_MAC, HOST, HOSTIP, DEFAULT_IP, DEFAULT_UDP_PORT, pl,
                                16'h4000, 8'd17, 1)));
    src.send(with_fcs(udp_frame(DEFAULT_MAC, HOST, HOSTIP, DEFAULT_IP, DEFAULT_UDP_PORT + 1, pl)));
    f = with_fcs(udp_frame(DEFAULT_MAC, HOST, HOSTIP, DEFAULT_IP, DEFAULT_UDP_PORT, pl));
    f[30] ^= 8'h80;
    src.send(f);

    // echo, then an ARP request while the echo is still on the wire: the reply is dropped
    f = eth_hdr(DEFAULT_MAC, HOST, ETHERTYPE_ECHO);
    repeat (600) f.push_back(8'($urandom));
    src.send(with_fcs(f));
    src.send(with_fcs(arp_frame(48'hFF_FF_FF_FF_FF_FF, 16'd1, HOST, HOSTIP, 48'h0, DEFAULT_IP)));
    guard = 0;
    while (sink.frames.size() < 2 && guard < 20000) begin @(negedge clk); guard++; end
    repeat (100) @(negedge clk);
    e = f;
    for (int i = 0; i < 6; i++) begin
      e[i] = f[6 + i];
      e[6 + i] = DEFAULT_MAC[47 - 8*i -: 8];
    end
    check(sink.frames.size() == 2 && same_q(sink.frames[1], with_fcs(e)), "echo on the wire");
    check(frame_len == AW'(DEPTH), "dropped frames left the display alone");

    foreach (mech[m]) begin
      $display("mechanism %-20s %0d", mech_name[m], mech[m]);
      check(mech[m] > 0, {"mechanism happened: ", mech_name[m]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
