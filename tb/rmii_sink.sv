// rmii_sink: testbench RMII receiver model (the PHY's transmit side).  It collects every frame
// sent on tx_en/txd, checks the preamble and delimiter, and keeps the bytes after the
// delimiter (FCS included) in frames[]; nframes counts them, bad_preamble counts framing errors.
module rmii_sink (
  input logic       clk,
  input logic       tx_en,
  input logic [1:0] txd
);
  logic [7:0] frames[$][$];
  int         nframes      = 0;
  int         bad_preamble = 0;

  initial begin
    logic [7:0] cur[$];
    logic [7:0] b;
    int         d;
    forever begin
      @(posedge clk);
      if (tx_en) begin
        cur = {};
        d   = 0;
        b   = 0;
        while (tx_en) begin
          b = {txd, b[7:2]};
          d++;
          if (d == 4) begin
            cur.push_back(b);
            d = 0;
          end
          @(posedge clk);
        end
        if (cur.size() < 8 || cur[7] != 8'hD5 || cur[0] != 8'h55) bad_preamble++;
        else begin
          cur = cur[8:$];
          frames.push_back(cur);
        end
        nframes++;
      end
    end
  end
endmodule
