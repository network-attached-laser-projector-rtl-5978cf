# Network-attached laser projector

An RGB laser projector that is a network device: a host on the LAN vectorises an image into a
path of coloured points and streams those points as UDP datagrams. The FPGA receives them
directly from the Ethernet PHY with a network stack built entirely in logic (no processor),
stores each frame in one half of a double-buffered point memory, and scans the finished frame
over and over. For each point it moves two galvanometer mirrors through two SPI DACs and sets the
power of the red, green and blue lasers with PWM.

The RTL follows the architecture of the original "Network-Attached Laser Projector" project
report. That report describes the blocks, the point format, the frame-store sizes
and the network behaviour. It does not give cycle-level detail. Where it is silent, the choices
made here are listed in [Design choices](#design-choices-not-taken-from-the-original).

```
 RMII (50 MHz) ──► mac_rx ──► receive buffer (1518 byte registers)
                                   │  inspected in parallel at fixed offsets
              ┌────────────┬───────┴──────┬──────────────┐
            arp_rx     echo check     ipv4_rx ──► udp_rx
              │            │       (inet_checksum)     │
              └─► tx_builder ◄─┘                       ▼
                     │                      payload read-out, 8 bytes/cycle
 RMII ◄── mac_tx ◄───┘                                 │ point_t stream
                                                       ▼
                                  framebuffer: 2 banks × 20,000 × 64 bit
                                                       │
                                                 display_ctrl
                                  ┌───────────┬────────┴───────┐
                              spi_dac x    spi_dac y      3 × pwm (r, g, b)
```

## The point record

Every datagram payload is a sequence of 8-byte records. A record is exactly one word of the
frame store, so it is stored unchanged:

| byte | 0   | 1–2 | 3–4 | 5 | 6 | 7 |
|------|-----|-----|-----|---|---|---|
| field| cmd | x   | y   | r | g | b |

Multi-byte fields are big-endian. In SystemVerilog this is `nalp_pkg::point_t`, with `cmd` in
bits 63:56.

* `cmd = 0x01`: a point. It is appended to the frame being assembled.
* `cmd = 0x02`: end of frame. The banks swap and the new frame is shown.
* Other values are ignored. `cmd` means nothing once the record is in memory.

`x` and `y` are 16-bit DAC codes. `r`, `g` and `b` are 8-bit PWM duty values (0 = off,
255 = 255/256 on).

A host sends a frame as a series of datagrams of data records followed by one record with
`cmd = 0x02`. The swap record can share a datagram with the last points. If a datagram's payload
is not a multiple of 8 bytes, the trailing bytes are ignored.

## The offload engine (`net_stack`)

The harder part of the design is the receive path. It is built so that a decision on a frame
takes a fixed, small number of cycles, far below the Ethernet interframe gap.

**Receive MAC.** `mac_rx` runs at the RMII rate of 2 bits per 50 MHz cycle. It drops the
preamble and start-of-frame delimiter and assembles bytes least-significant dibit first. It
writes every byte into the receive buffer, one byte every 4 cycles, and checks the FCS on the
fly. When carrier drops, it reports the frame as good or bad in one cycle. A frame is good when:

* the FCS residue is correct;
* the frame holds a whole number of bytes;
* it is 64–1518 bytes long;
* it is addressed to the station or to broadcast.

The FCS is then discarded: the reported length excludes it.

**CRC.** `crc32_eth` is the CRC-32 in its non-reflected ("BZIP2") shift-register form, fed in
wire bit order. That is bit-for-bit the IEEE 802.3 FCS. A good frame leaves `0xC704DD7B` in the
register. The transmit side sends the complemented register, bit 31 first.

**Parallel inspection.** The receive buffer is an array of byte registers, not a RAM. Each layer
therefore reads its own header bytes at fixed offsets, and all layers work at the same time.
Call the cycle in which `frame_done` is high with a good frame cycle 0:

| cycle | what happens |
|-------|--------------|
| 0 | `arp_rx` gets bytes 14–41. The echo check looks at the EtherType (0x1234). `ipv4_rx` starts on bytes 14–33. |
| 1 | ARP table updated, reply requested. Echo copy starts. |
| 2 | `inet_checksum` (two-stage adder tree and carry fold) finishes. IPv4 accept/drop. |
| 3 | `udp_rx`: port and length check on bytes 34–41. |
| 4 … | one `point_t` per cycle from bytes 42, 50, 58, … on `pt_valid/pt_data` |

The first point leaves 5 cycles after the last dibit on the wire. The stack can only be this
simple because it accepts just one shape of packet:

* IPv4 with a 20-byte header (IHL = 5, no options);
* not fragmented (MF = 0 and fragment offset 0; DF may be set);
* protocol UDP;
* header checksum correct;
* total length no longer than the frame.

Anything else is dropped silently. There is no ICMP. The UDP checksum is not checked, which keeps
the latency constant.

**Why one buffer is enough.** The next frame starts overwriting the buffer from byte 0 at one
byte per 4 cycles. Its first byte arrives at least 80 cycles after the previous frame ended
(48-cycle gap plus 32-cycle preamble). The payload read-out reads 8 bytes per cycle, starting 4
cycles after the end. The echo copy reads 1 byte per cycle, starting 1 cycle after. Both
therefore stay ahead of the writer for the whole frame. `tb_net_stack` checks this with two
maximum-size datagrams sent back to back at the minimum gap.

**ARP.** `arp_rx` applies the RFC 826 reception algorithm to a one-entry table:

1. If the sender is already in the table, its MAC address is refreshed.
2. If the packet targets this station's IP and the sender was not in the table, the sender
   replaces the entry.
3. If that packet is a request, a reply is sent.

The entry (`gw_valid/gw_ip/gw_mac`) therefore holds the last peer that addressed the projector,
in practice the gateway. It is an output only: nothing in the design transmits IP traffic.

**Transmit.** `tx_builder` builds frames in its own 1514-byte store:

* ARP replies: 42 bytes, padded on the wire to 60;
* echo frames: the received frame copied back with the source and destination addresses swapped.

`mac_tx` then sends the store's contents with preamble, padding, FCS and the 48-cycle
interframe gap. Transmit runs alongside receive (full duplex). Only one frame can be in flight:
a reply or echo requested while the builder or MAC is busy is dropped and flagged
(`net_events.tx_drop`).

## The frame store (`framebuffer`)

The frame store has two banks (`bram_sdp`), each 20,000 × 64 bits. `bank_sel` names the bank
being shown; the network writes the other one.

* A data record goes to the next address of the hidden bank.
* A swap record does three things at once: the number of records written becomes `frame_len`,
  `bank_sel` toggles, and writing restarts at address 0 of the bank that was just released.

This way the display never reads a half-written frame, however unevenly the datagrams arrive.
Records beyond 20,000 are dropped (`fb_overflow`), so the frame keeps its first 20,000 points.
The read port has one cycle of latency. Its data is selected with the bank number from the cycle
in which the address was presented.

## The display controller (`display_ctrl`)

The controller scans points `0 … frame_len-1` of the shown bank, then starts over. For each point:

1. It fetches the point from the frame store.
2. It starts `x` and `y` on two separate SPI buses at the same time. Each bus carries a bare
   16-bit word: no command or address byte, MSB first, SPI mode 0, `sclk` = clk/4. Raising
   `cs_n` makes the DAC update its output.
3. When both transfers have finished, the point's colour becomes the duty of the three `pwm`
   channels. The beam is therefore lit only once the mirrors have been sent to the new position.
4. It holds the point until `POINT_CYCLES` cycles have passed since the previous point started.

By default `POINT_CYCLES` is 2000 cycles, which is 25,000 points/s at 50 MHz. The 8-bit PWM
period is 256 cycles (5.12 µs), several periods per point. A new duty value takes effect at the
next PWM period boundary.

A bank swap makes the scan restart at point 0 of the new frame once the current point is done.
With an empty frame (`frame_len = 0`, the state after reset) the lasers are off.

## Interfaces, clock and reset

`nalp_top` has one clock, the 50 MHz RMII reference clock, for the whole design. Reset `rst`
is synchronous and active high.

| port group | meaning |
|------------|---------|
| `rmii_crs_dv`, `rmii_rxd[1:0]`, `rmii_tx_en`, `rmii_txd[1:0]` | RMII to the Ethernet PHY |
| `dac_x_*`, `dac_y_*` (`sclk`, `mosi`, `cs_n`) | the two galvo DACs |
| `laser_pwm[2:0]` | {red, green, blue} PWM to the laser current sources |
| `gw_valid`, `gw_ip`, `gw_mac` | ARP table entry |
| `bank_sel`, `frame_len`, `fb_swap`, `fb_overflow` | frame-store status |
| `net_events` | one-cycle pulses: frame good/bad, IPv4 accept/drop, UDP accept/drop, ARP reply, echo, transmit drop |
| `point_shown`, `frame_done` | display progress |

Outside the FPGA, and not modelled here: the Ethernet PHY, the two DACs with their buffer
amplifiers, the closed-loop galvo drivers, and the constant-current laser drivers (an opamp and
NPN transistor per colour, with a potentiometer to set the maximum power). The `rmii_crs_dv`
input is treated as a plain data-valid. The end-of-frame carrier toggling that some PHYs
produce is not decoded.

## Parameters

| parameter (`nalp_top`) | default | meaning |
|------------------------|---------|---------|
| `MY_MAC` | `02:4E:41:4C:50:01` | station MAC address (locally administered) |
| `MY_IP` | `192.168.1.200` | station IPv4 address, outside the LAN's DHCP range |
| `UDP_PORT` | 5005 | port whose datagrams carry points |
| `FB_DEPTH` | 20000 | points per bank (from the original design) |
| `POINT_CYCLES` | 2000 | clock cycles per point |
| `SPI_HALF` | 2 | clock cycles per half period of `sclk` |

Frame-size limits, EtherTypes and offsets are in `rtl/nalp_pkg.sv`.

## Design choices not taken from the original

The original gives the block structure, the record format and field widths, the two
20,000 × 64 banks with the swap command, echo on EtherType 0x1234, the list of IPv4 checks,
the one-entry ARP table, and concurrent SPI DACs with PWM lasers. The following are this
implementation's own:

* **Frame store.**
  * The order of the fields inside the 64-bit record.
  * The swap record is not stored.
  * Overflow drops the extra points.
* **Addresses and port.** The default MAC, IP and port values.
* **ARP.** A new peer replaces the single ARP entry. No gateway address is configured.
* **IPv4.** The destination IP address is not checked; the MAC address filter selects frames.
  IPv4 headers with options are rejected, which is why the latency never varies.
* **Transmit.** The transmit store, and dropping a request while a frame is in flight.
* **Display.**
  * The point rate, the SPI mode and clock, and the PWM frequency. The DAC part and the galvo
    speed are not known.
  * The colour switches only once the DACs are updated.
  * The scan restarts on a swap.

Not implemented: the UDP checksum (deliberately omitted, as in the original), ICMP, sending UDP
data, and any configuration of the PHY through its management registers.

## Files

* `rtl/`: one module or package per file. `nalp_top.sv` is the top. Shared types and constants
  are in `nalp_pkg.sv`.
* `tb/`: one self-checking testbench per block (`tb_<block>.sv`). Each prints
  `TB_RESULT checks=N failures=M`. There are also reusable models:
  * `rmii_src`: a PHY sending frames;
  * `rmii_sink`: a PHY receiving frames;
  * `spi_capture`: a DAC;
  * `tb_eth_pkg`: frame building, with a reference CRC and checksum written independently of
    the RTL.

Testbench coverage:

* `tb_nalp_top` runs the whole projector with a 64-point store. It counts every mechanism at
  least once: datagram, swap, frame repeat, restart after swap, overflow, ARP reply, echo, IPv4
  drop, UDP-port drop, FCS drop and transmit drop.
* `tb_nalp_top_full` uses the default parameters. It fills a whole 20,000-point bank through
  112 datagrams, checks the overflow, the swap and the stored records, and then the first points
  on the DACs at one point per 2000 cycles.

## Simulating

The testbenches need Verilator 5 with timing support. From the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal --top-module tb_nalp_top \
    -y rtl -y tb rtl/nalp_pkg.sv tb/tb_eth_pkg.sv tb/tb_nalp_top.sv
./obj_dir/Vtb_nalp_top
```

Replace `tb_nalp_top` with any other testbench name. Testbenches that do not use the Ethernet
helpers do not need `tb/tb_eth_pkg.sv`, but listing it does no harm. The full-size run
(`tb_nalp_top_full`, about 700,000 cycles) takes a few seconds. Lint a module with
`verilator --lint-only -Wall -y rtl rtl/nalp_pkg.sv rtl/<module>.sv`.

The RTL is plain synthesizable SystemVerilog. The frame-store banks and the transmit store are
written as arrays so that they map onto block RAM (2 × 1.28 Mbit for the banks). The receive
buffer is 1518 byte registers, because all protocol layers read it at once.
