// tb_tx_builder: the builder together with a real mac_tx and an rmii_sink.  An ARP request for
// the station must produce a 60-byte ARP reply (addresses swapped, opcode 2, padded) with a
// correct FCS; an echo request must send the received frame back with the addresses swapped;
// a request that arrives while a frame is in flight must be dropped.
module tb_tx_builder;
  import nalp_pkg::*;
  import tb_eth_pkg::*;

  localparam logic [47:0] ME_MAC = 48'h02_11_22_33_44_55;
  localparam logic [31:0] ME_IP  = 32'hC0A8_0002;

  logic             clk = 0, rst = 1;
  logic             arp_req = 0, echo_req = 0;
  logic [47:0]      arp_mac;
  logic [31:0]      arp_ip;
  logic [LEN_W-1:0] echo_len, rx_addr;
  logic [7:0]       rx_data;
  logic             tx_start, tx_busy, tx_en;
  logic [LEN_W-1:0] tx_len, tx_rd_addr;
  logic [7:0]       tx_rd_data;
  logic [1:0]       txd;
  logic             sent_arp, sent_echo, dropped;
  logic [7:0]       rxbuf [RX_BUF_BYTES];
  int               checks = 0, failures = 0;
  int               n_drop = 0;

  tx_builder #(.MY_MAC(ME_MAC), .MY_IP(ME_IP)) dut (
    .clk(clk), .rst(rst), .arp_req(arp_req), .arp_mac(arp_mac), .arp_ip(arp_ip),
    .echo_req(echo_req), .echo_len(echo_len), .rx_addr(rx_addr), .rx_data(rx_data),
    .tx_start(tx_start), .tx_len(tx_len), .tx_busy(tx_busy),
    .tx_rd_addr(tx_rd_addr), .tx_rd_data(tx_rd_data),
    .sent_arp(sent_arp), .sent_echo(sent_echo), .dropped(dropped)
  );
  mac_tx u_tx (
    .clk(clk), .rst(rst), .start(tx_start), .len(tx_len), .busy(tx_busy),
    .rd_addr(tx_rd_addr), .rd_data(tx_rd_data), .tx_en(tx_en), .txd(txd)
  );
  rmii_sink sink (.clk(clk), .tx_en(tx_en), .txd(txd));

  assign rx_data = rxbuf[rx_addr];
  always #10 clk = ~clk;
  always @(posedge clk) if (!rst && dropped) n_drop++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit same_q(input byte_q_t a, input byte_q_t b);
    if (a.size() != b.size()) return 0;
    foreach (a[i]) if (a[i] != b[i]) return 0;
    return 1;
  endfunction

  task automatic wait_frames(input int n);
    int guard = 0;
    while (sink.nframes < n && guard < 20000) begin @(negedge clk); guard++; end
    while (tx_busy) @(negedge clk);
    repeat (4) @(negedge clk);
  endtask

  initial begin
    byte_q_t exp, rx;
    arp_mac = 0; arp_ip = 0; echo_len = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    // ARP reply
    @(negedge clk);
    arp_req = 1; arp_mac = 48'hAA_BB_CC_DD_EE_01; arp_ip = 32'hC0A8_0001;
    @(negedge clk);
    arp_req = 0;
    wait_frames(1);
    exp = arp_frame(48'hAA_BB_CC_DD_EE_01, 16'd2, ME_MAC, ME_IP, 48'hAA_BB_CC_DD_EE_01,
                    32'hC0A8_0001);
    exp[6:11] = {8'h02, 8'h11, 8'h22, 8'h33, 8'h44, 8'h55};
    check(sink.nframes == 1, "ARP reply sent");
    if (sink.frames.size() >= 1) check(same_q(sink.frames[0], with_fcs(exp)), "ARP reply bytes");
    // echo
    rx = eth_hdr(ME_MAC, 48'h0A_0B_0C_0D_0E_0F, 16'h1234);
    repeat (200) rx.push_back(8'($urandom));
    foreach (rx[i]) rxbuf[i] = rx[i];
    @(negedge clk);
    echo_req = 1; echo_len = LEN_W'(rx.size());
    @(negedge clk);
    echo_req = 0;
    // a second request while the echo is in flight is dropped
    repeat (300) @(negedge clk);
    arp_req = 1;
    @(negedge clk);
    arp_req = 0;
    wait_frames(2);
    exp = rx;
    for (int i = 0; i < 6; i++) begin
      exp[i]     = rx[6 + i];
      exp[6 + i] = ME_MAC[47 - 8*i -: 8];
    end
    check(sink.nframes == 2, "exactly one more frame (echo)");
    if (sink.frames.size() >= 2) check(same_q(sink.frames[1], with_fcs(exp)), "echo bytes");
    check(n_drop == 1, $sformatf("request during transmission dropped (%0d)", n_drop));
    check(sink.bad_preamble == 0, "framing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
