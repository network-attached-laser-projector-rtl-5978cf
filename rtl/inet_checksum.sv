// inet_checksum: RFC 1071 Internet checksum over a fixed number of 16-bit words.
//
// The IPv4 receiver feeds it the ten header words in one go; the design is pipelined in two
// stages so that the whole header check completes two cycles after in_valid:
//   stage 1: all words are added into a wide sum (an adder tree);
//   stage 2: the carries are folded back in (end-around carry) twice.
// Outputs: sum is the folded one's-complement sum, checksum its complement (the value to put
// into a header whose checksum field was zero) and ok = (sum == 0xFFFF), which is how a header
// that carries a correct checksum reads.  The document gives the RFC; the two-stage split is
// this design's choice so that the receive path meets its cycle budget.
module inet_checksum #(
  parameter int N_WORDS = 10
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic [N_WORDS-1:0][15:0] words,
  output logic                     out_valid,
  output logic [15:0]              sum,
  output logic [15:0]              checksum,
  output logic                     ok
);
  localparam int SUM_W = 16 + $clog2(N_WORDS + 1);

  logic [SUM_W-1:0] wide_d, wide_q;
  logic             v1;
  logic [16:0]      fold1;
  logic [15:0]      fold2;

  always_comb begin
    wide_d = '0;
    for (int i = 0; i < N_WORDS; i++) wide_d += SUM_W'(words[i]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
      sum       <= '0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
      if (in_valid) wide_q <= wide_d;
      if (v1)       sum    <= fold2;
    end
  end

  always_comb begin
    fold1 = 17'(wide_q[15:0]) + 17'(wide_q[SUM_W-1:16]);
    fold2 = fold1[15:0] + 16'(fold1[16]);
  end

  assign checksum = ~sum;
  assign ok       = (sum == 16'hFFFF);
endmodule
