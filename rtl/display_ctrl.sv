// display_ctrl: scans the shown frame-store bank and drives the galvo DACs and laser PWMs.
//
// Points 0 .. frame_len-1 of the shown bank are read in turn and the frame repeats until the
// next bank swap, after which the scan restarts at point 0 of the new bank.  For each point:
//   1. the address is presented to the frame store (one cycle of read latency);
//   2. x and y start on two SPI buses at the same time (two spi_dac instances, in parallel);
//   3. when both transfers have ended, i.e. both DACs have moved to the new position, the
//      point's r, g, b become the duty values of the three pwm channels;
//   4. the point is held so that consecutive points start exactly POINT_CYCLES apart (the dwell),
//      then the next point is fetched.
// With no frame (frame_len = 0) the lasers are off.  point_shown pulses when a point's colour
// is applied, frame_done when the last point of the frame has been shown.
// Document: concurrent SPI DACs for x and y with no address byte, PWM for the laser power,
// the scan of the filled bank.  Own choices: the dwell time per point (POINT_CYCLES, the
// document gives no point rate), the SPI clock, switching the colour only once the beam is in
// place, and restarting at point 0 on a swap.
module display_ctrl
  import nalp_pkg::*;
#(
  parameter int FB_DEPTH     = 20000,
  parameter int AW           = $clog2(FB_DEPTH + 1),
  parameter int POINT_CYCLES = 2000,
  parameter int SPI_HALF     = 2
) (
  input  logic          clk,
  input  logic          rst,
  // frame store read side
  output logic [AW-1:0] rd_addr,
  input  point_t        rd_point,
  input  logic [AW-1:0] frame_len,
  input  logic          swap,
  // galvo DACs
  output logic          dac_x_sclk,
  output logic          dac_x_mosi,
  output logic          dac_x_cs_n,
  output logic          dac_y_sclk,
  output logic          dac_y_mosi,
  output logic          dac_y_cs_n,
  // lasers
  output logic [2:0]    laser_pwm,     // {red, green, blue}
  // status
  output logic          point_shown,
  output logic          frame_done
);
  localparam int TW = $clog2(POINT_CYCLES + 1);

  typedef enum logic [1:0] {S_IDLE, S_READ, S_LOAD, S_SHOW} state_t;
  state_t state;

  logic [TW-1:0] timer;
  logic          restart;
  logic          x_start, y_start, x_busy, y_busy, x_done, y_done;
  logic          x_fin, y_fin;
  logic [7:0]    pend_r, pend_g, pend_b;
  logic [7:0]    duty_r, duty_g, duty_b;
  logic          last_point;

  assign x_start    = (state == S_LOAD);
  assign y_start    = (state == S_LOAD);
  assign last_point = (rd_addr + 1'b1 >= frame_len);

  spi_dac #(.WIDTH(16), .HALF_CYCLES(SPI_HALF)) u_dac_x (
    .clk(clk), .rst(rst), .start(x_start), .data(rd_point.x), .busy(x_busy), .done(x_done),
    .sclk(dac_x_sclk), .mosi(dac_x_mosi), .cs_n(dac_x_cs_n)
  );
  spi_dac #(.WIDTH(16), .HALF_CYCLES(SPI_HALF)) u_dac_y (
    .clk(clk), .rst(rst), .start(y_start), .data(rd_point.y), .busy(y_busy), .done(y_done),
    .sclk(dac_y_sclk), .mosi(dac_y_mosi), .cs_n(dac_y_cs_n)
  );

  pwm #(.W(8)) u_pwm_r (.clk(clk), .rst(rst), .duty(duty_r), .out(laser_pwm[2]));
  pwm #(.W(8)) u_pwm_g (.clk(clk), .rst(rst), .duty(duty_g), .out(laser_pwm[1]));
  pwm #(.W(8)) u_pwm_b (.clk(clk), .rst(rst), .duty(duty_b), .out(laser_pwm[0]));

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      rd_addr     <= '0;
      timer       <= '0;
      restart     <= 1'b0;
      x_fin       <= 1'b0;
      y_fin       <= 1'b0;
      pend_r      <= '0;
      pend_g      <= '0;
      pend_b      <= '0;
      duty_r      <= '0;
      duty_g      <= '0;
      duty_b      <= '0;
      point_shown <= 1'b0;
      frame_done  <= 1'b0;
    end else begin
      point_shown <= 1'b0;
      frame_done  <= 1'b0;
      if (swap) restart <= 1'b1;
      case (state)
        S_IDLE: begin
          duty_r <= '0;
          duty_g <= '0;
          duty_b <= '0;
          if (frame_len != '0) begin
            rd_addr <= '0;
            restart <= 1'b0;
            state   <= S_READ;
          end
        end
        S_READ: state <= S_LOAD;          // rd_point valid next cycle
        S_LOAD: begin
          pend_r <= rd_point.r;
          pend_g <= rd_point.g;
          pend_b <= rd_point.b;
          x_fin  <= 1'b0;
          y_fin  <= 1'b0;
          timer  <= TW'(POINT_CYCLES - 3);   // + READ and LOAD = POINT_CYCLES per point
          state  <= S_SHOW;
        end
        S_SHOW: begin
          if (timer != '0) timer <= timer - 1'b1;
          if (x_done) x_fin <= 1'b1;
          if (y_done) y_fin <= 1'b1;
          if ((x_fin || x_done) && (y_fin || y_done) && !(x_fin && y_fin)) begin
            duty_r      <= pend_r;           // beam in place: light it
            duty_g      <= pend_g;
            duty_b      <= pend_b;
            point_shown <= 1'b1;
          end
          if (timer == '0 && x_fin && y_fin) begin
            frame_done <= last_point && !restart && !swap;
            if (frame_len == '0) begin
              state <= S_IDLE;
            end else begin
              rd_addr <= (restart || swap || last_point) ? '0 : rd_addr + 1'b1;
              restart <= 1'b0;
              state   <= S_READ;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // busy flags are implied by the done pulses; kept for clarity of the DAC interface
  logic unused_busy;
  assign unused_busy = x_busy ^ y_busy;
endmodule
