// tb_arp_rx: exercises the RFC 826 reception algorithm with a one-entry table.
//   1. a request for our IP from host A: table <- A, reply to A;
//   2. a request for another IP from host B: no reply, table unchanged (B is not in it);
//   3. a gratuitous update from A with a new MAC addressed elsewhere: merge refreshes A's MAC;
//   4. a reply (opcode 2) to us from host C: table <- C, no reply;
//   5. a malformed packet (hlen 5): ignored.
// The reply request must come one cycle after start.
module tb_arp_rx;
  import nalp_pkg::*;

  localparam logic [31:0] ME = 32'h0A00_0002;

  logic                   clk = 0, rst = 1;
  logic                   start = 0;
  logic [ARP_BYTES*8-1:0] pkt;
  logic                   reply_req, gw_valid;
  logic [47:0]            reply_mac, gw_mac;
  logic [31:0]            reply_ip, gw_ip;
  int                     checks = 0, failures = 0;

  arp_rx #(.MY_IP(ME)) dut (
    .clk(clk), .rst(rst), .start(start), .pkt(pkt),
    .reply_req(reply_req), .reply_mac(reply_mac), .reply_ip(reply_ip),
    .gw_valid(gw_valid), .gw_ip(gw_ip), .gw_mac(gw_mac)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic arp(input logic [7:0] hlen, input logic [15:0] op, input logic [47:0] sha,
                     input logic [31:0] spa, input logic [31:0] tpa, output bit replied);
    @(negedge clk);
    pkt = {16'd1, 16'h0800, hlen, 8'd4, op, sha, spa, 48'h0, tpa};
    start = 1;
    @(negedge clk);
    start = 0;
    replied = reply_req;
    @(negedge clk);
    check(!reply_req, "reply_req is a single pulse");
  endtask

  initial begin
    bit r;
    pkt = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    check(!gw_valid, "table empty after reset");
    arp(8'd6, 16'd1, 48'hAA_00_00_00_00_01, 32'h0A00_0001, ME, r);
    check(r && reply_mac == 48'hAA_00_00_00_00_01 && reply_ip == 32'h0A00_0001, "1: reply to A");
    check(gw_valid && gw_ip == 32'h0A00_0001 && gw_mac == 48'hAA_00_00_00_00_01, "1: table holds A");
    arp(8'd6, 16'd1, 48'hBB_00_00_00_00_02, 32'h0A00_0003, 32'h0A00_0009, r);
    check(!r, "2: no reply for another IP");
    check(gw_ip == 32'h0A00_0001 && gw_mac == 48'hAA_00_00_00_00_01, "2: table unchanged");
    arp(8'd6, 16'd1, 48'hAA_00_00_00_00_77, 32'h0A00_0001, 32'h0A00_0009, r);
    check(!r, "3: no reply");
    check(gw_ip == 32'h0A00_0001 && gw_mac == 48'hAA_00_00_00_00_77, "3: merge refreshed MAC");
    arp(8'd6, 16'd2, 48'hCC_00_00_00_00_03, 32'h0A00_0005, ME, r);
    check(!r, "4: no reply to a reply");
    check(gw_ip == 32'h0A00_0005 && gw_mac == 48'hCC_00_00_00_00_03, "4: table holds C");
    arp(8'd5, 16'd1, 48'hDD_00_00_00_00_04, 32'h0A00_0006, ME, r);
    check(!r, "5: malformed ignored");
    check(gw_ip == 32'h0A00_0005, "5: table unchanged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
