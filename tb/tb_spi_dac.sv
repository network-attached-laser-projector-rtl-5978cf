// tb_spi_dac: two SPI masters (two clock rates) send random words at the same time; the DAC
// models must receive exactly those 16-bit words, MSB first, and each transfer must take
// (2*16 + 1) half-periods of sclk from start to done.
module tb_spi_dac;
  logic        clk = 0, rst = 1;
  logic        start = 0;
  logic [15:0] dx, dy;
  logic        bx, by, donex, doney;
  logic        sx, mx, cx, sy, my, cy;
  int          checks = 0, failures = 0;

  spi_dac #(.WIDTH(16), .HALF_CYCLES(2)) dut_x (
    .clk(clk), .rst(rst), .start(start), .data(dx), .busy(bx), .done(donex),
    .sclk(sx), .mosi(mx), .cs_n(cx)
  );
  spi_dac #(.WIDTH(16), .HALF_CYCLES(3)) dut_y (
    .clk(clk), .rst(rst), .start(start), .data(dy), .busy(by), .done(doney),
    .sclk(sy), .mosi(my), .cs_n(cy)
  );
  spi_capture cap_x (.clk(clk), .sclk(sx), .mosi(mx), .cs_n(cx));
  spi_capture cap_y (.clk(clk), .sclk(sy), .mosi(my), .cs_n(cy));

  always #5 clk = ~clk;

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

  initial begin
    int tx, ty, t;
    dx = 0; dy = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 30; n++) begin
      @(negedge clk);
      dx = 16'($urandom); dy = 16'($urandom);
      if (n == 0) begin dx = 16'h8001; dy = 16'hFFFF; end
      start = 1;
      @(negedge clk);
      start = 0;
      dx = ~dx; dy = ~dy;           // data must have been latched at start
      tx = 0; ty = 0; t = 1;
      while ((tx == 0 || ty == 0) && t < 500) begin
        if (donex && tx == 0) tx = t;
        if (doney && ty == 0) ty = t;
        @(negedge clk);
        t++;
      end
      check(tx == 33 * 2 + 1, $sformatf("x transfer took %0d cycles", tx));
      check(ty == 33 * 3 + 1, $sformatf("y transfer took %0d cycles", ty));
      @(negedge clk);
      check(cap_x.words.size() == n + 1 && cap_x.words[n] == ~dx, $sformatf("x word %0d", n));
      check(cap_y.words.size() == n + 1 && cap_y.words[n] == ~dy, $sformatf("y word %0d", n));
    end
    check(cap_x.bad_len == 0 && cap_y.bad_len == 0, "16 clocks per word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
