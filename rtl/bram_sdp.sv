// bram_sdp: simple dual-port block RAM, one write port and one registered read port on the
// same clock.  Written as an array so that synthesis maps it onto block RAM; a read of an
// address being written in the same cycle returns the old contents.  Used for the two banks of
// the frame store.
module bram_sdp #(
  parameter int W     = 64,
  parameter int DEPTH = 20000,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
