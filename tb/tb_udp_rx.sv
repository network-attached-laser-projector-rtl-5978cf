// tb_udp_rx: destination-port and length checks of the UDP layer, one cycle after start.
module tb_udp_rx;
  import nalp_pkg::*;

  logic             clk = 0, rst = 1;
  logic             start = 0;
  logic [63:0]      hdr;
  logic [LEN_W-1:0] ip_len;
  logic             done, accept;
  logic [15:0]      src_port;
  logic [LEN_W-1:0] payload_len;
  int               checks = 0, failures = 0;

  udp_rx #(.PORT(16'd7777)) dut (
    .clk(clk), .rst(rst), .start(start), .hdr(hdr), .ip_payload_len(ip_len),
    .done(done), .accept(accept), .src_port(src_port), .payload_len(payload_len)
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

  task automatic run(input string what, input logic [15:0] dport, input logic [15:0] ulen,
                     input int iplen, input bit exp);
    @(negedge clk);
    hdr = {16'd1234, dport, ulen, 16'hBEEF};
    ip_len = LEN_W'(iplen);
    start = 1;
    @(negedge clk);
    start = 0;
    check(done, {what, ": done after one cycle"});
    check(accept == exp, {what, ": accept"});
    if (exp) check(payload_len == LEN_W'(ulen - 8) && src_port == 16'd1234, {what, ": fields"});
    @(negedge clk);
    check(!done && !accept, {what, ": single pulse"});
  endtask

  initial begin
    hdr = 0; ip_len = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    run("match", 16'd7777, 16'd72, 72, 1);
    run("match, padded", 16'd7777, 16'd16, 40, 1);
    run("other port", 16'd7778, 16'd72, 72, 0);
    run("length too big", 16'd7777, 16'd80, 72, 0);
    run("length below header", 16'd7777, 16'd4, 72, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
