// tb_crc32_eth: checks the Ethernet CRC block against the reflected reference CRC-32.
// The reference itself is checked on the standard "123456789" vector (0xCBF43926).  For random
// frames the transmit-side FCS bytes must equal the reference FCS, and running the register over
// frame + FCS must leave the residue (good = 1); a frame with one bit flipped must not.
module tb_crc32_eth;
  import nalp_pkg::*;
  import tb_eth_pkg::*;

  logic        clk = 0;
  logic        init, en;
  logic [7:0]  data;
  logic [31:0] crc;
  logic        good;
  int          checks = 0, failures = 0;

  crc32_eth dut (.clk(clk), .init(init), .en(en), .data(data), .crc(crc), .good(good));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run(input byte_q_t q);
    @(negedge clk); init = 1; en = 0;
    @(negedge clk); init = 0;
    foreach (q[i]) begin
      en = 1; data = q[i];
      @(negedge clk);
    end
    en = 0;
  endtask

  initial begin
    byte_q_t q, qf;
    logic [31:0] f;
    init = 1; en = 0; data = 0;
    q = {"1", "2", "3", "4", "5", "6", "7", "8", "9"};
    check(ref_crc(q) == 32'hCBF4_3926, "reference CRC-32 of 123456789");
    for (int t = 0; t < 40; t++) begin
      q = {};
      repeat (60 + $urandom_range(0, 100)) q.push_back(8'($urandom));
      f = ref_crc(q);
      run(q);
      for (int k = 0; k < 4; k++)
        check(fcs_byte(crc, 2'(k)) == f[8*k +: 8], $sformatf("fcs byte %0d of frame %0d", k, t));
      qf = with_fcs(q);
      run(qf);
      check(good, $sformatf("residue of frame %0d", t));
      qf[$urandom_range(0, qf.size() - 1)] ^= 8'(1 << $urandom_range(0, 7));
      run(qf);
      check(!good, $sformatf("corrupted frame %0d rejected", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
