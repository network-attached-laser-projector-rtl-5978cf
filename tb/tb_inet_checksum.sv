// tb_inet_checksum: random IPv4-sized headers (10 words).  The computed checksum must match a
// reference one's-complement sum, arrive exactly two cycles after in_valid, and a header that
// carries its own checksum must read ok (and not ok after one bit is flipped).
module tb_inet_checksum;
  logic             clk = 0, rst = 1;
  logic             in_valid = 0;
  logic [9:0][15:0] words;
  logic             out_valid, ok;
  logic [15:0]      sum, checksum;
  int               checks = 0, failures = 0;

  inet_checksum #(.N_WORDS(10)) dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .words(words),
    .out_valid(out_valid), .sum(sum), .checksum(checksum), .ok(ok)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [15:0] ref_sum(input logic [9:0][15:0] w);
    logic [31:0] s = 0;
    for (int i = 0; i < 10; i++) s += 32'(w[i]);
    while (s[31:16] != 0) s = 32'(s[15:0]) + 32'(s[31:16]);
    return s[15:0];
  endfunction

  // apply words, return (latency, ok, checksum)
  task automatic apply(input logic [9:0][15:0] w, output int lat);
    @(negedge clk);
    words = w; in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    lat = 1;
    while (!out_valid && lat < 10) begin @(negedge clk); lat++; end
  endtask

  initial begin
    logic [9:0][15:0] w;
    int lat;
    words = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < 10; i++) w[i] = 16'($urandom);
      if (t == 0) w = '{default: 16'hFFFF};   // carries at every step
      if (t == 1) begin                        // the first fold itself carries out
        w = '0;
        w[0] = 16'hFFFF; w[1] = 16'hFFFF; w[2] = 16'h0001;
      end
      w[4] = 16'h0;                           // checksum field
      apply(w, lat);
      check(lat == 2, $sformatf("latency %0d", lat));
      check(checksum == ~ref_sum(w), $sformatf("checksum %h vs %h", checksum, ~ref_sum(w)));
      w[4] = ~ref_sum(w);
      apply(w, lat);
      check(ok, "header with its checksum reads ok");
      w[$urandom_range(0, 9)] ^= 16'(1 << $urandom_range(0, 15));
      apply(w, lat);
      check(!ok, "corrupted header rejected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
