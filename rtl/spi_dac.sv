// spi_dac: SPI master that loads one 16-bit word into a galvo DAC.
//
// start (while idle) latches data and shifts it out MSB first on mosi with cs_n low, in SPI
// mode 0: mosi changes while sclk is low and the DAC samples it on the rising edge.  sclk runs
// at clk / (2*HALF_CYCLES).  After the last bit cs_n rises, which makes the DAC update its
// output, and done pulses for one cycle.  No address or command byte is sent, as the document
// describes.  The word width follows the document's 16-bit DACs; the SPI mode, the clock rate
// and the bare 16-bit frame are this design's assumptions (the DAC part is not named).
module spi_dac #(
  parameter int WIDTH       = 16,
  parameter int HALF_CYCLES = 2
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [WIDTH-1:0] data,
  output logic             busy,
  output logic             done,
  output logic             sclk,
  output logic             mosi,
  output logic             cs_n
);
  localparam int DIV_W = $clog2(HALF_CYCLES + 1);
  localparam int BIT_W = $clog2(WIDTH + 1);

  logic [WIDTH-1:0] shreg;
  logic [DIV_W-1:0] div;
  logic [BIT_W-1:0] bits_left;

  assign busy = !cs_n;
  assign mosi = shreg[WIDTH-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      cs_n      <= 1'b1;
      sclk      <= 1'b0;
      done      <= 1'b0;
      shreg     <= '0;
      div       <= '0;
      bits_left <= '0;
    end else begin
      done <= 1'b0;
      if (cs_n) begin
        if (start) begin
          cs_n      <= 1'b0;
          shreg     <= data;
          div       <= '0;
          bits_left <= BIT_W'(WIDTH);
        end
      end else if (div != DIV_W'(HALF_CYCLES - 1)) begin
        div <= div + 1'b1;
      end else begin
        div <= '0;
        if (bits_left == '0) begin
          cs_n <= 1'b1;            // end of word: DAC latches
          done <= 1'b1;
        end else if (!sclk) begin
          sclk <= 1'b1;            // rising edge: DAC samples mosi
        end else begin
          sclk      <= 1'b0;       // falling edge: next bit
          shreg     <= {shreg[WIDTH-2:0], 1'b0};
          bits_left <= bits_left - 1'b1;
        end
      end
    end
  end
endmodule
