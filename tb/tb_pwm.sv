// tb_pwm: for a set of duty values the output must be high for exactly duty of every 256
// consecutive cycles once the new value has taken effect (at most one period later).
module tb_pwm;
  logic       clk = 0, rst = 1;
  logic [7:0] duty;
  logic       out;
  int         checks = 0, failures = 0;

  pwm #(.W(8)) dut (.clk(clk), .rst(rst), .duty(duty), .out(out));

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
    int hi;
    int vals[$] = '{0, 1, 128, 254, 255, 37, 200};
    duty = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    foreach (vals[k]) begin
      @(negedge clk);
      duty = 8'(vals[k]);
      repeat (260 + $urandom_range(0, 100)) @(negedge clk);   // new value in effect
      for (int w = 0; w < 3; w++) begin
        hi = 0;
        repeat (256) begin
          @(negedge clk);
          if (out) hi++;
        end
        check(hi == vals[k], $sformatf("duty %0d: high %0d of 256", vals[k], hi));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
