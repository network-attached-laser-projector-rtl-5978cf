// pwm: one laser intensity channel.
//
// A free-running W-bit counter compares against the duty value: out is high for duty counts of
// every 2^W-cycle period (duty 0 = off, 255 = 255/256 on for W = 8).  A new duty value is taken
// over only when the counter wraps, so a period is never cut short.  At 50 MHz and W = 8 the
// period is 5.12 us, much shorter than the time a point is shown, which is why PWM is enough to
// set the colour of each point.  PWM control of the three lasers and 8-bit colour are the
// document's; the counter width, carrier frequency and update-at-wrap are this design's choices.
module pwm #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] duty,
  output logic         out
);
  logic [W-1:0] cnt, duty_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt    <= '0;
      duty_q <= '0;
      out    <= 1'b0;
    end else begin
      cnt <= cnt + 1'b1;
      if (cnt == '1) duty_q <= duty;
      out <= ((cnt == '1) ? duty : duty_q) > (cnt + 1'b1);
    end
  end
endmodule
