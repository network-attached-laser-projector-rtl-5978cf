// rmii_src: testbench RMII transmitter model (the PHY's receive side as seen by the FPGA).
// send(q) puts preamble, start-of-frame delimiter and the bytes of q (FCS included by the
// caller) on rxd, least significant dibit first, one dibit per clock, then holds the line idle
// for the 48-cycle interframe gap.
module rmii_src (
  input  logic       clk,
  output logic       crs_dv,
  output logic [1:0] rxd
);
  initial begin
    crs_dv = 1'b0;
    rxd    = 2'b00;
  end

  task automatic send(input logic [7:0] q[$], input int gap = 48);
    logic [7:0] all[$];
    all = {8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'hD5};
    foreach (q[i]) all.push_back(q[i]);
    foreach (all[i])
      for (int d = 0; d < 4; d++) begin
        @(negedge clk);
        crs_dv = 1'b1;
        rxd    = all[i][2*d +: 2];
      end
    @(negedge clk);
    crs_dv = 1'b0;
    rxd    = 2'b00;
    repeat (gap) @(negedge clk);
  endtask
endmodule
