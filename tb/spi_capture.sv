// spi_capture: testbench SPI slave model of a 16-bit DAC.  It samples mosi on each rising sclk
// edge while cs_n is low and, when cs_n rises, stores the word in words[] (the DAC update).
// It also records the clock cycle at which each transfer began (cs_n falling) in starts[].
module spi_capture (
  input logic clk,
  input logic sclk,
  input logic mosi,
  input logic cs_n
);
  logic [15:0] words[$];
  longint      starts[$];
  int          bad_len = 0;
  longint      cyc = 0;
  logic [15:0] sh;
  int          nbits;
  logic        sclk_q = 0, cs_q = 0;
  bit          active = 0;   // a falling cs_n has been seen (ignores power-up state)

  always @(posedge clk) begin
    cyc++;
    if (cs_q && !cs_n) begin
      starts.push_back(cyc);
      nbits  = 0;
      active = 1;
    end
    if (!cs_n && sclk && !sclk_q) begin
      sh = {sh[14:0], mosi};
      nbits++;
    end
    if (active && !cs_q && cs_n) begin
      active = 0;
      if (nbits != 16) bad_len++;
      words.push_back(sh);
    end
    sclk_q <= sclk;
    cs_q   <= cs_n;
  end
endmodule
