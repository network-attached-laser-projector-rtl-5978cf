// tb_mac_tx: the transmitter reads frames from a synchronous RAM model and sends them on RMII,
// where rmii_sink collects them.  Each frame must carry the preamble and delimiter, the bytes of
// the store padded with zeros to 60, and the reference FCS; tx_en must stay high for exactly
// (8 + max(len,60) + 4) * 4 cycles and busy must cover the 48-cycle interframe gap after it.
module tb_mac_tx;
  import nalp_pkg::*;
  import tb_eth_pkg::*;

  logic             clk = 0, rst = 1;
  logic             start = 0, busy, tx_en;
  logic [LEN_W-1:0] len, rd_addr;
  logic [7:0]       rd_data;
  logic [1:0]       txd;
  logic [7:0]       store [2048];
  int               checks = 0, failures = 0;

  mac_tx dut (
    .clk(clk), .rst(rst), .start(start), .len(len), .busy(busy),
    .rd_addr(rd_addr), .rd_data(rd_data), .tx_en(tx_en), .txd(txd)
  );
  rmii_sink sink (.clk(clk), .tx_en(tx_en), .txd(txd));

  always @(posedge clk) rd_data <= store[rd_addr];
  always #10 clk = ~clk;

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

  task automatic send(input int n);
    byte_q_t q = {}, exp;
    int en_cycles = 0, busy_cycles = 0, n_before = sink.nframes;
    int padded;
    for (int i = 0; i < n; i++) begin
      store[i] = 8'($urandom);
      q.push_back(store[i]);
    end
    while (q.size() < 60) q.push_back(8'h00);
    padded = q.size();
    exp = with_fcs(q);
    @(negedge clk);
    len = LEN_W'(n); start = 1;
    @(negedge clk);
    start = 0;
    while (busy) begin
      if (tx_en) en_cycles++;
      busy_cycles++;
      @(negedge clk);
    end
    repeat (3) @(negedge clk);
    check(sink.nframes == n_before + 1 && sink.bad_preamble == 0, $sformatf("len %0d: one well-framed frame", n));
    check(en_cycles == (8 + padded + 4) * 4, $sformatf("len %0d: tx_en cycles %0d", n, en_cycles));
    check(busy_cycles - en_cycles >= ETH_IFG_CYCLES - 1, $sformatf("len %0d: gap %0d", n, busy_cycles - en_cycles));
    if (sink.frames.size() > 0) begin
      byte_q_t got = sink.frames[$];
      bit same = (got.size() == exp.size());
      if (same) foreach (exp[i]) if (got[i] != exp[i]) same = 0;
      check(same, $sformatf("len %0d: bytes and FCS", n));
    end
  endtask

  initial begin
    len = 0;
    repeat (5) @(negedge clk);
    rst = 0;
    repeat (5) @(negedge clk);
    send(42);
    send(60);
    send(61);
    send(100);
    send(ETH_MAX_BYTES);
    send(14);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
