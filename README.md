# TrbNet in SystemVerilog

TrbNet is a network for detector read-out systems. It carries three kinds of traffic on the same links:

- triggers, which must arrive within a few hundred nanoseconds;
- detector data, which needs bandwidth;
- slow control, which reads and writes registers on every board.

The network keeps all three apart by using four logical **channels** on every link. Each channel is a request/answer protocol. An *active* endpoint sends a request on the **init path**. Every addressed *passive* endpoint answers on the **reply path**. A **hub** in between copies requests to all its ports and merges all answers into one stream with one termination.

This repository holds synthesizable RTL for the building blocks: links, buffers, multiplexer, hub, application interface, slow control and address assignment. A small example system connects them.

## Packets

Everything on a link is a 64-bit packet sent as four 16-bit words. A 2-bit `packet_num` comes with each word (0..3). Word 0 carries the channel, the path bit and the packet type (`trbnet_pkg`):

| type | code | meaning |
|------|------|---------|
| DAT | 0 | 48 bits of payload |
| HDR | 1 | start of a transfer: source, target, data type, sequence number |
| EOB | 2 | end of buffer: packet count and CRC of the buffer just sent |
| TRM | 3 | end of transfer: 32-bit error pattern, sequence number |
| EXT | 4 | reserved |
| ACK | 5 | the receiver has freed a buffer |

Every interface in the design uses the same handshake. A word moves on a clock edge where `dataready` and `read` are both high. The secure buffer (`trbnet_sbuf`) is a two-stage register that makes `read` depend only on flip-flops, so long combinational paths never cross a block boundary.

## Flow control: EOB and ACK

This mechanism matters most for correctness.

The output buffer (`trbnet_obuf`) knows the size of the receiving input buffer (`trbnet_ibuf`). The 3-bit size code 1..6 gives 2^(code+1)-1 packets, so code 6 is 127 packets.

1. The output buffer counts the packets it sends.
2. It inserts an EOB when the next packets would no longer fit, or right after a TRM. The EOB carries the packet count and the CRC-16 of the buffer.
3. The input buffer recomputes both.
   - A mismatch sets error bit 2 (word missing) or bit 3 (checksum) in the next termination.
   - The termination of a transfer is held back until its EOB has been checked.
4. When the application has read a buffer's packets, the input buffer asks its own output buffer to send an ACK.
5. The sender allows at most two buffers to wait for an ACK. After that it stalls.

The CRC is the IBM CRC-16 (x^16+x^15+x^2+1), fed MSB first from 0000. It matches the common CRC-16/BUYPASS (`"123456789"` gives FEE8).

Channel 0 (trigger) runs without EOB/ACK (`USE_ACK = 4'b1110`). This keeps latency down, and a trigger transfer is short enough to always fit.

## Multiplexer and priorities

`trbnet_io_multiplexer` puts the eight sources (4 channels x 2 paths) onto one media interface, one whole packet at a time. Channel 0 wins over channel 1, and so on. Every fourth decision is made by `trbnet_priority_arbiter` in round-robin order instead, so a busy high-priority channel cannot starve the others. On receive, packets are sorted by channel and path bits. The receive side never stalls the link; backpressure comes only from EOB/ACK.

## Application interface

`trbnet_api` turns an application's word stream into a transfer.

- **Active** (`API_TYPE=1`): the application writes data and raises `send`. The API sends HDR, the data and TRM, then delivers the merged answer and drops `run` after the reply's TRM.
- **Passive** (`API_TYPE=0`): the API delivers an incoming request, then sends the application's answer when `send` is raised.
  - `send` may be raised before all data is written. The answer then streams, and can be longer than the FIFO (4 x 2^(code+2) words).

`trbnet_endpoint` combines a multiplexer, four `trbnet_iobuf` (IBuf and OBuf for both paths) and an API per channel. Channels the board does not use get a `trbnet_term_buf` instead. It answers every request with an empty termination, so the network never waits.

## Hub

`trbnet_hub` has one multiplexer and one set of IOBufs per port, and one `trbnet_hub_logic` per channel.

For a request arriving on any port, the hub logic:

- copies the request to all other ports that are up;
- collects each port's answer: it sends the first header, then each port's data in turn, re-sending the header when it switches to another port's data;
- keeps each port's TRM, ORs the error patterns, and sends one TRM once all ports have finished.

Stall, header resend, port switch and merge events are counted on status outputs.

## Media interfaces

- **`trbnet_med_lvds`**: 8 data lines, carrier, parity, first-byte flag and a forwarded clock (system clock / `CLK_DIV`).
  - The receiver oversamples that clock through a two-flip-flop synchroniser (the "slow" mode).
  - A word with bad parity is dropped and counted.
  - Four 007F words force both sides to resynchronise.
- **`trbnet_med_tlk`**: logic for an external TLK2501 serializer.
  - Dual-clock FIFOs (`trbnet_async_fifo`, Gray-coded pointers) cross to the transceiver clocks.
  - Counters delay start-up: 2^27 cycles on receive, 2^16 on transmit.
  - A loss of signal or a 007F resync flushes the FIFOs.

## Slow control

`trbnet_regio` sits on channel 3 behind a passive API.

| data type | operation |
|-----------|-----------|
| 8 | read one register |
| 9 | write one register |
| A | read consecutive registers |
| B | write consecutive registers |
| F | address management |

Register map (16-bit address):

| address | contents |
|---------|----------|
| 0x00.. | common status |
| 0x20.. | common control |
| 0x40..0x42 | compile time, version and hardware ID |
| 0x80.. | user status |
| 0xC0.. | user control |
| >= 0x100 | an external data port, with a timeout |

Each answer packet is {address, 32-bit data}. An unknown address or data type sets error bit 4 ("don't understand").

Address management is done by `trbnet_addresses`:

- READUID returns the board's 64-bit unique ID.
- SETADDRESS carries an ID and an address. Only the board with that ID takes the new address.

The ID comes from a DS18S20 sensor through `trbnet_onewire`. That block also reads the temperature every `PERIOD_US` and checks the ROM CRC-8.

## The example system (`trbnet_system`)

```
 CTS endpoint (active, 4 channels) --LVDS-- hub port 0
                                            hub ports 1..N_FEE --LVDS-- front-end endpoints
                                            hub port N_FEE+1  -- TLK2501 pins (brought out)
```

Each front-end board has the following:

- passive APIs on channels 0 and 1;
- a terminating buffer on channel 2;
- slow control on channel 3;
- a 1-wire master.

Its common status registers hold the link state and the temperature. Common control bit 0 resynchronises its LVDS link.

## Simulation

Each testbench in `tb/` checks itself and ends with a `TB_RESULT checks=N failures=M` line. Example:

```
verilator --binary --timing -Irtl -Itb rtl/trbnet_pkg.sv tb/tb_trbnet_system.sv --top-module tb_trbnet_system
./obj_dir/Vtb_trbnet_system
```

| testbench | covers |
|-----------|--------|
| `tb_trbnet_sbuf`, `tb_trbnet_fifo`, `tb_trbnet_crc16`, `tb_trbnet_priority_arbiter`, `tb_trbnet_async_fifo` | single blocks against models |
| `tb_trbnet_hub` | hub with multiplexers, IOBufs and hub logic, driven from four emulated endpoints |
| `tb_trbnet_system` | reduced sizes: triggers, a readout that stalls on EOB/ACK, terminating buffers, unique-ID read, address assignment, register access; fails if any counted event never happened |
| `tb_trbnet_system_full` | default parameters, a 600-packet-per-board readout |

`tb_trbnet_system` also runs the endpoint, API, slow-control, address, LVDS, 1-wire and terminating-buffer blocks. `tb/tb_ds18s20_model.sv` is a behavioural sensor model.

## Known limitations and departures

- **Resync words.** A data word may legally be 007F, so the LVDS link sends resync words with FIRST set and counts only those. The optical link counts a 007F only at a packet boundary. As a packet's first word, 007F would be the unused type 7.
- **Optical link.** The TLK2501 interface is only simulated with its link down. Its data path is the tested async FIFO.
- **Transmit wait.** The 650 us transmit start-up wait uses a 16-bit counter (655 us at 100 MHz).
- **Own choices.** The following are this design's own choices, not taken from a specification:
  - bit positions inside header and termination words;
  - the round-robin ratio of 1 in 4;
  - the register map boundaries;
  - the format of the address-management packets;
  - copying the sequence number into terminating-buffer answers.
- **Not built.**
  - The streaming API: only its purpose is known.
  - The hub's own slow-control endpoint.
  - The fast (clock-forwarded) LVDS mode.
