# Time-triggered Ethernet end node on a 4-bit RGMII-side data path

This design is the frame-handling logic of an end node in a time-triggered
(TT) network. It sits between a gigabit Ethernet PHY and the node's
application. Time-triggered traffic travels as ordinary-looking Ethernet frames
with their own EtherType, 0x88D7, so the node has to do three things:

- take TT frames apart as they arrive, 4 bits per clock;
- keep the data of one good frame;
- build complete TT frames of its own, 4 bits per clock, with IPv4 and UDP
  headers, padding and the CRC.

Both directions move one nibble per clock. At 250 MHz that is 1000 Mbit/s. On
a real board the same 4-bit stream would run at 125 MHz through
double-data-rate RGMII pad cells, which are not part of this RTL.

The top level joins the two directions into a loop. A frame that is addressed
to the board and passes every check has its data cached. The data is then sent
back to the PC in a new TT frame. This is how the node is exercised end to end:
whatever the PC sends comes back with the same data.

```
 tte_rx_data[3:0] ─► tt_pack_frame ──rec_data[31:0]──► pkt_fifo ──send_data──► tt_unpack_frame ─► tte_tx_data[3:0]
 tte_rxdv                 │  (CRC check)        commit/rollback  ▲ read_data_req     (CRC append)    tte_tx_en
                          └──────────────── tte_rgmii_top control ┘
                               tt_config: board/PC MAC, IP, UDP port ─► both paths
```

## The TT frame

| bytes | field | notes |
|------:|-------|-------|
| 7 | preamble `0x55` | |
| 1 | start delimiter `0xD5` | |
| 6 | destination MAC | its low 16 bits are the virtual-link number |
| 6 | source MAC | |
| 2 | type `0x88D7` | marks a time-triggered frame |
| 20 | IPv4 header | version 4, IHL 5, protocol UDP, header checksum |
| 8 | UDP header | ports, length = 8 + data bytes, checksum 0 |
| ≥18 | data | zero-padded to 18 bytes so the payload reaches Ethernet's 46 |
| 4 | FCS | IEEE 802.3 CRC-32 over destination MAC … last data/pad byte |

On the wire each byte goes low nibble first. Data bytes are exchanged inside
the node as 32-bit words, with the first byte in bits [31:24]. A last partial
word is filled with zeros. The IP total length and the UDP length give the
real data length. The receiver therefore ignores padding, and a sender that
pads never changes what the PC sees.

## Receive path: `tt_pack_frame`

The PHY inputs are registered once. After that, two nibbles make one byte. A
six-state machine then walks the frame:

| state | what it does | leaves on |
|-------|--------------|-----------|
| `IDLE` | waits for `tte_rxdv` to rise on a `0x5` nibble | → `FRAME_HEAD` |
| `FRAME_HEAD` | skips preamble nibbles | the `0xD` nibble of the delimiter, which also fixes the byte boundary |
| `ETH_HEAD` | destination MAC must equal the board MAC (`mac_flag`); source MAC captured; type must be `0x88D7` | 14 bytes |
| `UDP_HEAD` | IPv4/UDP: version/IHL `0x45`, protocol 17, destination IP and port must be the board's, header checksum must sum to `0xFFFF`; source IP, port and UDP length captured | 28 bytes |
| `REC_DATA` | packs data bytes into words (`rec_en` pulses); padding and FCS only go into the CRC | `tte_rxdv` low |
| `REC_END` | `rec_end` for one clock with `rec_ok` | → `IDLE` |

A header field that does not match raises `false_en` for one clock and sends
the machine back to `IDLE`. `IDLE` then waits for a new rising `tte_rxdv`, so
the rest of the bad frame is ignored. `rec_ok` needs three things:

- the CRC residue `0xDEBB20E3` after the FCS;
- every data byte the UDP length promised;
- a whole number of bytes.

Only frames that reached `REC_DATA` produce `rec_end`, because only they can
have written data words. A frame that is refused earlier has written nothing.

Timing, with one nibble per clock: the first data word appears 110 clocks
after the first preamble nibble is presented, and after that one word every
8 clocks. `rec_end` follows 3 clocks after `tte_rxdv` is last sampled high.

## Send path: `tt_unpack_frame`

A one-clock `send_en` with `tx_byte_num` (0 to 1472) starts a frame. Seven
states produce it:

`IDLE` → `CHECK_SUM` (2 clocks: IPv4 header checksum) → `PACKET_HEAD` (8
bytes) → `ETH_HEAD` (PC MAC, board MAC, 0x88D7) → `IP_UDP_HEAD` (28 bytes,
board IP/port to PC IP/port) → `SEND_DATA` (data, then zeros up to 18 bytes)
→ `CRC` (the four inverted CRC bytes) → `IDLE`.

`tte_tx_en` is high in every state except `IDLE` and `CHECK_SUM`, so a frame
is one unbroken burst of `2·(54 + max(N,18))` clocks. `send_end` is high on the
clock where the `CRC` state's nibble counter `cnt_send_bit` is 7. The last
nibble leaves one clock later. The IPv4 identification field counts the frames
sent.

The data handshake is the part of this block that is easiest to get wrong:

- `read_data_req` pulses once for each word that is started, so
  `ceil(N/4)` times per frame.
- It comes two clocks before that word's first nibble is due.
- The word must be on `send_data` from the next clock until the following
  request. A FIFO with a registered read port (`pkt_fifo`) does exactly this.

## Packet cache and control: `pkt_fifo`, `tte_rgmii_top`

`pkt_fifo` is a 512 × 32 FIFO with two write pointers:

- a tentative pointer that each write advances;
- a committed pointer, which is the only one the reader sees.

The receive path writes words as they arrive. At `rec_end` the top decides:

- commit if `rec_ok` is high and the FIFO did not overflow;
- otherwise roll back, which discards the frame's words.

The cache holds one packet. While a committed packet waits or is being sent, a
new frame that reaches its data is dropped whole. Whether a frame is taken is
decided at its first data word and kept to its end. This means a packet that
finishes sending halfway through a later frame can never leave half a frame in
the cache.

After a commit the top pulses `send_en` with the received length. The
transmit frame begins 7 clocks after the edge that first samples `tte_rxdv`
low.

Six 16-bit counters report what happened to each frame:

| counter | counts |
|---------|--------|
| `cnt_rx_ok` | frames accepted |
| `cnt_rx_false` | frames refused on a header field |
| `cnt_rx_crc_err` | frames with a CRC error |
| `cnt_rx_busy_drop` | frames dropped while the cache was busy |
| `cnt_rx_ovf_drop` | frames dropped on overflow |
| `cnt_tx_sent` | frames sent |

The received words and the captured source fields are also brought out.

## CRC: `crc32_d4`

This is the Ethernet CRC-32 in its reflected form (polynomial `0xEDB88320`,
start value `0xFFFFFFFF`). One nibble is folded in per clock, least
significant bit first. The FCS to send is the inverted register, taken out
4 bits at a time from bit 0. On receive, a frame is good when the register
equals `0xDEBB20E3` after its FCS.

## Configuration: `tt_config`

These registers hold both sets of addresses. Reset loads the module
parameters; writes go through `cfg_we/cfg_addr/cfg_wdata`, and
`cfg_rdata` is a combinational read.

| addr | content |
|-----:|---------|
| 0 | board MAC [47:16] |
| 1 | board MAC [15:0] |
| 2 | PC MAC [47:16] |
| 3 | PC MAC [15:0] |
| 4 | board IP |
| 5 | PC IP |
| 6 | {board port, PC port} |

The defaults are MAC `00:0A:35:01:FE:C0`, IP 192.168.0.234 and port 1234 for
the board, and MAC `E8:6A:64:C3:54:10`, IP 192.168.0.102 and port 1234 for the
PC. They are placeholders.

## Where this RTL makes its own choices

The frame layout, the state machines and their state names, the 0x88D7 check,
the 18-byte minimum, the read-request handshake and the rule for `send_end`
follow the design as published. The following are this implementation's own
choices:

- **Loopback.** The echo in the top level, the one-packet drop policy and the
  commit/rollback cache are choices made here. The original design only says
  that one packet is cached and that wrong data is discarded.
- **Extra receive checks.** On receive, the frame is also checked for IPv4
  version, UDP protocol, destination IP, destination port and header checksum.
  The original explicitly checks only the MAC and the type.
- **CRC on receive.** Frames without a valid FCS are rejected, so a test
  stream that omits the FCS produces its data words but `rec_ok` low.
- **Padding.** Pad bytes are zero. The original only says that missing bytes
  are filled.
- **Redundancy byte.** The published frame description also lists a 1-byte
  multi-channel redundancy identifier. Neither state machine has a place for
  it, so it is not in this frame format.
- **Header values.** IPv4 TOS 0, flags `0x4000`, TTL 64, identification =
  frame count, UDP checksum 0.
- **Cache depth.** 512 words covers the largest frame, 1472 data bytes, which
  is 368 words.
- **Not included:**
  - RGMII double-data-rate pad cells and the PHY chip;
  - the inter-frame gap on transmit;
  - AS6802 clock synchronisation;
  - any time-triggered schedule (when frames may be sent). Frames are sent as
    soon as they are ready.

## Simulating

Every testbench checks its own results and prints
`TB_RESULT checks=N failures=M`. Each one builds its reference frames with
`tb/tt_tb_pkg.sv`. That package computes the CRC in the MSB-first,
non-reflected form, independently of the RTL. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_tte_rgmii_top \
    rtl/tt_pkg.sv tb/tt_tb_pkg.sv rtl/*.sv tb/tb_tte_rgmii_top.sv -o sim
./obj_dir/sim
```

| testbench | covers |
|-----------|--------|
| `tb_crc32_d4` | check value of "123456789", random strings against the reference, residue, clear priority |
| `tb_tt_config` | reset values, random writes and read-back of every register |
| `tb_pkt_fifo` | 4000 random clocks of write/commit/rollback/read against a queue model, overflow |
| `tb_tt_pack_frame` | frame lengths 0–1472, word contents, captured fields, latencies and word rate; wrong MAC, type, IP, port, protocol or checksum; bad FCS; corrupted data; truncated frames |
| `tb_tt_unpack_frame` | frame lengths 0–1472, byte-exact frames including checksum, padding and FCS; burst length, request count, `send_end` position, start latency |
| `tb_tte_rgmii_top` | end to end with an 8-word cache: echo, padding, overflow, CRC discard, header refusal, busy drop, board-MAC change through the configuration port |
| `tb_tt_workloads` | default parameters: a 62-byte stream (12 data bytes, no padding, no FCS) yields 3 words but is discarded; the same 3 words in a full frame come back in a 72-byte padded frame |
| `tb_tte_rgmii_top_full` | end to end at default parameters: 0, 5, 18, 1000, 1471 and 1472-byte frames echoed byte for byte, with fixed echo latency |

Nothing here has been synthesised for a particular FPGA. No timing closure at
250 MHz is claimed.
