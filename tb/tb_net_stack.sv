// tb_net_stack: the offload engine end to end at the RMII pins.
//   * UDP datagrams to the display port: every 8-byte record comes out on pt_valid/pt_data in
//     order, the first one at most 6 cycles after the end of the frame on the wire;
//   * two maximum-size datagrams back to back with the minimum interframe gap: both intact
//     (the read-out stays ahead of the next frame filling the buffer);
//   * dropped: bad IPv4 checksum, IPv4 options, fragment, another UDP port, bad FCS;
//   * an ARP request gets a correct ARP reply and fills the table;
//   * an echo frame comes back with the addresses swapped, and a datagram received while the
//     echo is being transmitted is still delivered (full duplex).
module tb_net_stack;
  import nalp_pkg::*;
  import tb_eth_pkg::*;

  localparam logic [47:0] ME_MAC = 48'h02_11_22_33_44_55;
  localparam logic [31:0] ME_IP  = 32'hC0A8_0164;
  localparam logic [15:0] PORT   = 16'd6000;
  localparam logic [47:0] HOST   = 48'h0A_0B_0C_0D_0E_0F;
  localparam logic [31:0] HOSTIP = 32'hC0A8_0101;

  logic        clk = 0, rst = 1;
  logic        crs_dv, tx_en, pt_valid, gw_valid;
  logic [1:0]  rxd, txd;
  point_t      pt_data;
  logic [31:0] gw_ip;
  logic [47:0] gw_mac;
  net_events_t ev;
  point_t      got[$];
  int          checks = 0, failures = 0;
  int          n_ip_drop = 0, n_udp_drop = 0, n_bad = 0, n_udp = 0;
  longint      cyc = 0, last_eof = 0, first_pt = -1;
  logic        crs_q = 0;
  int          worst_lat = 0;

  rmii_src src (.clk(clk), .crs_dv(crs_dv), .rxd(rxd));
  rmii_sink sink (.clk(clk), .tx_en(tx_en), .txd(txd));

  net_stack #(.MY_MAC(ME_MAC), .MY_IP(ME_IP), .UDP_PORT(PORT)) dut (
    .clk(clk), .rst(rst), .rmii_crs_dv(crs_dv), .rmii_rxd(rxd), .rmii_tx_en(tx_en),
    .rmii_txd(txd), .pt_valid(pt_valid), .pt_data(pt_data),
    .gw_valid(gw_valid), .gw_ip(gw_ip), .gw_mac(gw_mac), .events(ev)
  );

  always #10 clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    crs_q <= crs_dv;
    if (crs_q && !crs_dv) begin
      last_eof = cyc;
      first_pt = -1;
    end
    if (pt_valid) begin
      got.push_back(pt_data);
      if (first_pt < 0) begin
        first_pt = cyc;
        if (int'(cyc - last_eof) > worst_lat) worst_lat = int'(cyc - last_eof);
      end
    end
    if (!rst && ev.ip_drop) n_ip_drop++;
    if (!rst && ev.udp_drop) n_udp_drop++;
    if (!rst && ev.frame_bad) n_bad++;
    if (ev.udp_accept) n_udp++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic byte_q_t points(input int n, input int seed, ref point_t exp[$]);
    byte_q_t q = {};
    for (int i = 0; i < n; i++) begin
      point_t p;
      p = {8'h01, 16'(seed * 7 + i), 16'(seed * 13 - i), 8'(i), 8'(seed), 8'(i * 3)};
      exp.push_back(p);
      for (int j = 7; j >= 0; j--) q.push_back(p[8*j +: 8]);
    end
    return q;
  endfunction

  function automatic bit same_q(input byte_q_t a, input byte_q_t b);
    if (a.size() != b.size()) return 0;
    foreach (a[i]) if (a[i] != b[i]) return 0;
    return 1;
  endfunction

  task automatic settle();
    repeat (300) @(negedge clk);
    while (tx_en) @(negedge clk);
    repeat (60) @(negedge clk);
  endtask

  initial begin
    point_t  exp[$];
    byte_q_t f, f2, pl, e;
    bit      ok;
    repeat (5) @(negedge clk);
    rst = 0;
    repeat (5) @(negedge clk);

    // 1. one datagram of 12 points
    pl = points(12, 1, exp);
    src.send(with_fcs(udp_frame(ME_MAC, HOST, HOSTIP, ME_IP, PORT, pl)));
    settle();
    ok = (got.size() == exp.size());
    if (ok) foreach (exp[i]) if (got[i] != exp[i]) ok = 0;
    check(ok, $sformatf("12 points delivered (%0d)", got.size()));
    $display("depacketisation latency %0d cycles after the end of the frame on the wire", worst_lat);
    check(worst_lat > 0 && worst_lat <= 6, $sformatf("depacketisation latency %0d cycles", worst_lat));

    // 2. back-to-back maximum datagrams (184 points each), minimum gap
    got = {}; exp = {};
    pl = points(184, 2, exp);
    f = with_fcs(udp_frame(ME_MAC, HOST, HOSTIP, ME_IP, PORT, pl));
    pl = points(184, 3, exp);
    f2 = with_fcs(udp_frame(ME_MAC, HOST, HOSTIP, ME_IP, PORT, pl));
    check(f.size() == ETH_MAX_BYTES + 4, "maximum-size frame built");
    src.send(f, 48);
    src.send(f2, 48);
    settle();
    ok = (got.size() == exp.size());
    if (ok) foreach (exp[i]) if (got[i] != exp[i]) ok = 0;
    check(ok, $sformatf("2 x 184 points back to back (%0d)", got.size()));

    // 3. frames that must be dropped
    got = {}; exp = {};
    pl = points(4, 4, exp);
    src.send(with_fcs(udp_frame(ME_MAC, HOST, HOSTIP, ME_IP, PORT, pl, 16'h4000, 8'd17, 1)));
    src.send(with_fcs(udp_frame(ME_MAC, HOST, HOSTIP, ME_IP, PORT, pl, 16'h2000)));
    src.send(with_fcs(udp_frame(ME_MAC, HOST, HOSTIP, ME_IP, PORT + 1, pl)));
    f = with_fcs(udp_frame(ME_MAC, HOST, HOSTIP, ME_IP, PORT, pl));
    f[f.size() - 1] ^= 8'h01;
    src.send(f);
    f = udp_frame(ME_MAC, HOST, HOSTIP, ME_IP, PORT, pl);
    f[14] = 8'h46;                                   // IHL 6: options present
    src.send(with_fcs(f));
    settle();
    check(got.size() == 0, "nothing delivered from bad frames");
    check(n_ip_drop == 3, $sformatf("IPv4 drops %0d", n_ip_drop));
    check(n_udp_drop == 1, $sformatf("UDP drops %0d", n_udp_drop));
    check(n_bad == 1, $sformatf("MAC drops %0d", n_bad));

    // 4. ARP request for our address
    src.send(with_fcs(arp_frame(48'hFF_FF_FF_FF_FF_FF, 16'd1, HOST, HOSTIP, 48'h0, ME_IP)));
    settle();
    e = arp_frame(HOST, 16'd2, ME_MAC, ME_IP, HOST, HOSTIP);
    for (int i = 0; i < 6; i++) e[6 + i] = ME_MAC[47 - 8*i -: 8];
    check(sink.frames.size() == 1, "one ARP reply");
    if (sink.frames.size() >= 1) check(same_q(sink.frames[0], with_fcs(e)), "ARP reply bytes");
    check(gw_valid && gw_ip == HOSTIP && gw_mac == HOST, "ARP table filled");

    // 5. echo, with a datagram arriving while the echo is on the wire
    f = eth_hdr(ME_MAC, HOST, ETHERTYPE_ECHO);
    repeat (400) f.push_back(8'($urandom));
    src.send(with_fcs(f));
    got = {}; exp = {};
    pl = points(6, 5, exp);
    src.send(with_fcs(udp_frame(ME_MAC, HOST, HOSTIP, ME_IP, PORT, pl)));
    check(tx_en, "echo still being transmitted while the datagram arrives");
    settle();
    e = f;
    for (int i = 0; i < 6; i++) begin
      e[i]     = f[6 + i];
      e[6 + i] = ME_MAC[47 - 8*i -: 8];
    end
    check(sink.frames.size() == 2, "echo sent");
    if (sink.frames.size() >= 2) check(same_q(sink.frames[1], with_fcs(e)), "echo bytes");
    check(got.size() == 6 && got[0] == exp[0] && got[5] == exp[5], "datagram during echo delivered");
    check(sink.bad_preamble == 0, "transmit framing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
