// crc32_eth: running Ethernet frame check sequence, one byte per enabled cycle.
//
// Both MACs use it: the receiver runs it over the whole frame including the received FCS and
// checks the residue (good = 1 when the register holds 0xC704DD7B), the transmitter runs it
// over the outgoing bytes and sends the complement of the register (nalp_pkg::fcs_byte).  The
// arithmetic is the CRC-32 "BZIP2" shift register fed in wire bit order, which is the IEEE 802.3
// FCS (see nalp_pkg::crc32_byte).
//
// Interface: init (synchronous, wins over en) loads all ones; en folds data into the register.
// Timing: crc and good reflect every byte enabled up to the previous clock edge.
module crc32_eth
  import nalp_pkg::*;
(
  input  logic        clk,
  input  logic        init,
  input  logic        en,
  input  logic [7:0]  data,
  output logic [31:0] crc,
  output logic        good
);
  always_ff @(posedge clk) begin
    if (init)    crc <= CRC_INIT;
    else if (en) crc <= crc32_byte(crc, data);
  end

  assign good = (crc == CRC_RESIDUE);
endmodule
