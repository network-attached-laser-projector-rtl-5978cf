// tb_ipv4_rx: IPv4 header validation.  Headers are built with tb_eth_pkg and presented as the
// receive buffer would present them.  A valid UDP header is accepted (done two cycles after
// start, with src_ip and payload_len); a bad checksum, options (IHL 6), the MF flag, a fragment
// offset, another protocol, another EtherType and a total length longer than the frame are
// each dropped.
module tb_ipv4_rx;
  import nalp_pkg::*;
  import tb_eth_pkg::*;

  logic                        clk = 0, rst = 1;
  logic                        start = 0;
  logic [15:0]                 ethertype;
  logic [IPV4_HDR_BYTES*8-1:0] hdr;
  logic [LEN_W-1:0]            l3_len;
  logic                        done, accept;
  logic [31:0]                 src_ip;
  logic [LEN_W-1:0]            payload_len;
  int                          checks = 0, failures = 0;

  ipv4_rx dut (
    .clk(clk), .rst(rst), .start(start), .ethertype(ethertype), .hdr(hdr), .l3_len(l3_len),
    .done(done), .accept(accept), .src_ip(src_ip), .payload_len(payload_len)
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

  // patch: byte index inside the header to overwrite after the checksum is computed (or -1)
  task automatic run(input string what, input bit exp, input logic [15:0] flags = 16'h4000,
                     input logic [7:0] proto = 8'd17, input bit bad_ck = 0,
                     input logic [15:0] et = 16'h0800, input int ihl_patch = 0,
                     input int short_by = 0);
    byte_q_t pl = {}, f;
    int lat = 0;
    repeat (40) pl.push_back(8'($urandom));
    f = udp_frame(48'h1, 48'h2, 32'hC0A8_0105, 32'hC0A8_01C8, 16'd5005, pl, flags, proto, bad_ck);
    if (ihl_patch != 0) begin
      logic [15:0] ck;
      f[14] = 8'h46;
      f[24] = 0; f[25] = 0;
      ck = ref_ip_csum(f, 14, 20);
      f[24] = ck[15:8]; f[25] = ck[7:0];
    end
    @(negedge clk);
    for (int i = 0; i < 20; i++) hdr[159 - 8*i -: 8] = f[14 + i];
    ethertype = et;
    l3_len = LEN_W'(f.size() - 14 - short_by);
    start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!done && lat < 10) begin @(negedge clk); lat++; end
    check(lat == 2, $sformatf("%s: done after %0d cycles", what, lat));
    check(accept == exp, $sformatf("%s: accept %0b", what, accept));
    if (exp) check(src_ip == 32'hC0A8_0105 && payload_len == LEN_W'(48), {what, ": fields"});
  endtask

  initial begin
    hdr = '0; ethertype = 0; l3_len = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    run("valid", 1);
    run("valid without DF", 1, 16'h0000);
    run("bad checksum", 0, 16'h4000, 8'd17, 1);
    run("options", 0, 16'h4000, 8'd17, 0, 16'h0800, 1);
    run("more fragments", 0, 16'h2000);
    run("fragment offset", 0, 16'h0010);
    run("TCP", 0, 16'h4000, 8'd6);
    run("not IPv4", 0, 16'h4000, 8'd17, 0, 16'h86DD);
    run("truncated", 0, 16'h4000, 8'd17, 0, 16'h0800, 0, 30);
    run("valid again", 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
