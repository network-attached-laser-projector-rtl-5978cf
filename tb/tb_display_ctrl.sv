// tb_display_ctrl: the controller reads a frame-store model (one-cycle read latency) and is
// observed only at its pins.  Checks: with no frame the lasers stay dark; the DACs receive the
// x and y of every point in order, repeated frame after frame; consecutive points start exactly
// POINT_CYCLES apart; each laser's PWM duty over a 256-cycle window inside a point equals the
// point's colour; after a swap the scan restarts at point 0 of the new frame.
module tb_display_ctrl;
  import nalp_pkg::*;

  localparam int DEPTH = 64;
  localparam int AW    = $clog2(DEPTH + 1);
  localparam int PC    = 600;

  logic          clk = 0, rst = 1;
  logic [AW-1:0] rd_addr, frame_len;
  point_t        rd_point;
  logic          swap = 0;
  logic          xs, xm, xc, ys, ym, yc;
  logic [2:0]    laser;
  logic          point_shown, frame_done;
  point_t        mem [DEPTH];
  int            checks = 0, failures = 0, n_frames = 0;

  display_ctrl #(.FB_DEPTH(DEPTH), .POINT_CYCLES(PC), .SPI_HALF(2)) dut (
    .clk(clk), .rst(rst), .rd_addr(rd_addr), .rd_point(rd_point), .frame_len(frame_len),
    .swap(swap), .dac_x_sclk(xs), .dac_x_mosi(xm), .dac_x_cs_n(xc),
    .dac_y_sclk(ys), .dac_y_mosi(ym), .dac_y_cs_n(yc), .laser_pwm(laser),
    .point_shown(point_shown), .frame_done(frame_done)
  );
  spi_capture cap_x (.clk(clk), .sclk(xs), .mosi(xm), .cs_n(xc));
  spi_capture cap_y (.clk(clk), .sclk(ys), .mosi(ym), .cs_n(yc));

  always @(posedge clk) rd_point <= mem[rd_addr];
  always @(posedge clk) if (!rst && frame_done) n_frames++;
  always #10 clk = ~clk;

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

  // measure the three duty values during the point that starts now
  task automatic measure(output int hr, output int hg, output int hb);
    hr = 0; hg = 0; hb = 0;
    repeat (330) @(negedge clk);
    repeat (256) begin
      @(negedge clk);
      hr += int'(laser[2]); hg += int'(laser[1]); hb += int'(laser[0]);
    end
  endtask

  initial begin
    int hr, hg, hb, base, n;
    bit ok;
    frame_len = 0;
    for (int i = 0; i < DEPTH; i++) begin
      mem[i].cmd = CMD_DATA;
      mem[i].x = 16'($urandom); mem[i].y = 16'($urandom);
      mem[i].r = 8'($urandom); mem[i].g = 8'($urandom); mem[i].b = 8'($urandom);
    end
    repeat (3) @(negedge clk);
    rst = 0;
    hr = 0;
    repeat (2000) begin @(negedge clk); hr += int'(laser != 0); end
    check(hr == 0 && cap_x.words.size() == 0, "dark and idle without a frame");
    // frame A: 5 points, shown twice
    frame_len = 5;
    for (int k = 0; k < 10; k++) begin
      while (cap_x.starts.size() <= k) @(negedge clk);
      measure(hr, hg, hb);
      check(hr == mem[k % 5].r && hg == mem[k % 5].g && hb == mem[k % 5].b,
            $sformatf("colour of point %0d: %0d %0d %0d", k, hr, hg, hb));
    end
    while (cap_x.words.size() < 10) @(negedge clk);
    ok = 1;
    for (int k = 0; k < 10; k++)
      if (cap_x.words[k] != mem[k % 5].x || cap_y.words[k] != mem[k % 5].y) ok = 0;
    check(ok, "x/y sequence of two passes over frame A");
    ok = 1;
    for (int k = 1; k < 10; k++)
      if (cap_x.starts[k] - cap_x.starts[k - 1] != PC) ok = 0;
    check(ok, $sformatf("point period %0d cycles", cap_x.starts[1] - cap_x.starts[0]));
    check(n_frames >= 1, "frame_done seen");
    // swap to frame B (3 points) in the middle of a pass
    while (cap_x.starts.size() < 12) @(negedge clk);
    for (int i = 0; i < 3; i++) mem[i].x = 16'h1000 + 16'(i);
    @(negedge clk);
    frame_len = 3; swap = 1;
    @(negedge clk);
    swap = 0;
    base = cap_x.starts.size();
    while (cap_x.words.size() < base + 4) @(negedge clk);
    check(cap_x.words[base] == 16'h1000 && cap_x.words[base + 1] == 16'h1001
          && cap_x.words[base + 2] == 16'h1002 && cap_x.words[base + 3] == 16'h1000,
          "after swap the scan restarts at point 0 of the new frame");
    // frame removed: lasers go dark
    frame_len = 0;
    n = cap_x.words.size();
    repeat (2 * PC) @(negedge clk);
    hr = 0;
    repeat (600) begin @(negedge clk); hr += int'(laser != 0); end
    check(hr == 0, "dark again with an empty frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
