// tb_framebuffer: double buffering.  Writes a frame of data records into the hidden bank,
// checks nothing changes on the shown side until the swap record, then that the swap toggles
// bank_sel, sets frame_len and shows the records (one-cycle read latency).  A second frame is
// written while the first is read back unchanged; an over-long frame raises overflow and keeps
// DEPTH points; records with unknown cmd are ignored.
module tb_framebuffer;
  import nalp_pkg::*;

  localparam int DEPTH = 64;
  localparam int AW    = $clog2(DEPTH + 1);

  logic          clk = 0, rst = 1;
  logic          in_valid = 0;
  point_t        in_point;
  logic [AW-1:0] rd_addr, frame_len;
  point_t        rd_point;
  logic          bank_sel, swap, overflow;
  int            checks = 0, failures = 0, n_ovf = 0, n_swap = 0;

  framebuffer #(.DEPTH(DEPTH)) dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_point(in_point), .rd_addr(rd_addr),
    .rd_point(rd_point), .frame_len(frame_len), .bank_sel(bank_sel), .swap(swap),
    .overflow(overflow)
  );

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (!rst && overflow) n_ovf++;
    if (!rst && swap) n_swap++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic point_t mk(input int f, input int i, input logic [7:0] cmd = CMD_DATA);
    point_t p;
    p.cmd = cmd; p.x = 16'(f * 1000 + i); p.y = 16'(~(f * 1000 + i));
    p.r = 8'(i); p.g = 8'(f); p.b = 8'(i ^ f);
    return p;
  endfunction

  task automatic put(input point_t p);
    @(negedge clk);
    in_valid = 1; in_point = p;
    @(negedge clk);
    in_valid = 0;
    @(negedge clk);   // let the one-cycle status pulses be counted
  endtask

  task automatic read_frame(input int f, input int n, input string what);
    bit ok = 1;
    for (int i = 0; i < n; i++) begin
      point_t e = mk(f, i);
      @(negedge clk);
      rd_addr = AW'(i);
      @(negedge clk);
      if (rd_point.x != e.x || rd_point.y != e.y || rd_point.r != e.r || rd_point.g != e.g
          || rd_point.b != e.b) ok = 0;
    end
    check(ok, what);
  endtask

  initial begin
    int sel0;
    in_point = '0; rd_addr = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    check(frame_len == 0, "empty frame after reset");
    sel0 = bank_sel;
    for (int i = 0; i < 10; i++) put(mk(1, i));
    put(mk(1, 99, 8'h07));                        // unknown command: ignored
    check(frame_len == 0 && bank_sel == sel0, "no change before swap");
    put(mk(1, 0, CMD_SWAP));
    check(frame_len == 10 && bank_sel != sel0 && n_swap == 1, "swap: length 10, bank toggled");
    read_frame(1, 10, "frame 1 read back");
    for (int i = 0; i < 20; i++) put(mk(2, i));
    read_frame(1, 10, "frame 1 intact while frame 2 is written");
    put(mk(2, 0, CMD_SWAP));
    check(frame_len == 20 && bank_sel == sel0 && n_swap == 2, "second swap");
    read_frame(2, 20, "frame 2 read back");
    for (int i = 0; i < DEPTH + 5; i++) put(mk(3, i));
    check(n_ovf == 5, $sformatf("overflow flagged %0d times", n_ovf));
    put(mk(3, 0, CMD_SWAP));
    check(frame_len == AW'(DEPTH), "overflowed frame keeps DEPTH points");
    read_frame(3, DEPTH, "frame 3 read back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
