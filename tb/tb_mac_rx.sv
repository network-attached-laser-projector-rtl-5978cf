// tb_mac_rx: drives frames on RMII through rmii_src and compares what the MAC writes into its
// buffer and reports at the end of each frame with the frame that was sent.  Cases: frames to
// the station and to broadcast (good, FCS shed), to another station, with a corrupted FCS, and
// a runt frame (all dropped).  Also checks that the whole frame is written n_before frame_done.
module tb_mac_rx;
  import nalp_pkg::*;
  import tb_eth_pkg::*;

  localparam logic [47:0] ME = 48'h02_11_22_33_44_55;

  logic             clk = 0, rst = 1;
  logic             crs_dv;
  logic [1:0]       rxd;
  logic             wr_en, frame_done, frame_good;
  logic [LEN_W-1:0] wr_addr, frame_len;
  logic [7:0]       wr_data;
  logic [7:0]       buffer [RX_BUF_BYTES];
  int               checks = 0, failures = 0;
  int               n_done = 0;
  logic             last_good;
  logic [LEN_W-1:0] last_len;

  rmii_src src (.clk(clk), .crs_dv(crs_dv), .rxd(rxd));

  mac_rx #(.MY_MAC(ME)) dut (
    .clk(clk), .rst(rst), .crs_dv(crs_dv), .rxd(rxd),
    .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .frame_done(frame_done), .frame_good(frame_good), .frame_len(frame_len)
  );

  always #10 clk = ~clk;

  always @(posedge clk) begin
    if (wr_en) buffer[wr_addr] <= wr_data;
    if (frame_done) begin
      n_done++;
      last_good = frame_good;
      last_len  = frame_len;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic expect_frame(input byte_q_t q, input bit corrupt, input bit exp_good,
                              input string what);
    byte_q_t w = with_fcs(q);
    int n_before = n_done;
    if (corrupt) w[w.size() - 2] ^= 8'h10;
    src.send(w);
    check(n_done == n_before + 1, {what, ": one frame_done"});
    check(last_good == exp_good, {what, ": frame_good"});
    if (exp_good) begin
      bit same = 1;
      check(last_len == LEN_W'(q.size()), $sformatf("%s: length %0d vs %0d", what, last_len, q.size()));
      foreach (q[i]) if (buffer[i] != q[i]) same = 0;
      check(same, {what, ": bytes in buffer"});
    end
  endtask

  initial begin
    byte_q_t q;
    repeat (5) @(negedge clk);
    rst = 0;
    repeat (5) @(negedge clk);
    for (int t = 0; t < 6; t++) begin
      q = eth_hdr(ME, 48'h0A_0B_0C_0D_0E_0F, 16'h1234);
      repeat (46 + $urandom_range(0, 300)) q.push_back(8'($urandom));
      expect_frame(q, 0, 1, $sformatf("unicast %0d", t));
    end
    q = eth_hdr(48'hFF_FF_FF_FF_FF_FF, 48'h0A_0B_0C_0D_0E_0F, 16'h0806);
    repeat (46) q.push_back(8'($urandom));
    expect_frame(q, 0, 1, "broadcast");
    q = eth_hdr(48'h02_11_22_33_44_56, 48'h0A_0B_0C_0D_0E_0F, 16'h0800);
    repeat (46) q.push_back(8'($urandom));
    expect_frame(q, 0, 0, "other station");
    q = eth_hdr(ME, 48'h0A_0B_0C_0D_0E_0F, 16'h0800);
    repeat (100) q.push_back(8'($urandom));
    expect_frame(q, 1, 0, "bad FCS");
    q = eth_hdr(ME, 48'h0A_0B_0C_0D_0E_0F, 16'h0800);
    repeat (20) q.push_back(8'($urandom));
    expect_frame(q, 0, 0, "runt");
    q = eth_hdr(ME, 48'h0A_0B_0C_0D_0E_0F, 16'h0800);
    repeat (ETH_MAX_BYTES - 14) q.push_back(8'($urandom));
    expect_frame(q, 0, 1, "maximum size");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
