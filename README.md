# Four-channel voltage recorder: FPGA datapath

Mitigating radio frequency interference (RFI) in radio astronomy is easier
to study when the raw voltages are available: the telescope's signal on one
channel and reference antennas, which see mainly the interference, on the
others. This recorder captures such time-domain voltages from four channels
at the same time and streams them to a server that writes them to disk.
The offline cross-correlation between channels then shows what the
interference has in common with the telescope signal.

The analog front end (amplifiers, bias-Ts for the reference antennas' LNAs,
a 30-40 MHz band-pass filter) feeds four 14-bit RF ADCs on an RFSoC. A
converter core samples them at 1966.08 Msps, decimates by two and hands
the fabric four successive samples per ADC on every 245.76 MHz clock. The
RTL here is what sits between that converter core and a 100 GbE core:

```
 converter core        vrec_top
 (4 ADCs, AXI-stream)  +---------------------------------------------------------------+
  4 x 4 x 14 bit  ---> | adc_lane_select -> rate_selector -> packetizer                |
                       |  1 of 4 lanes,     keep 1 of N      pack 8 steps/word,         | ---> 100 GbE core
                       |  14 -> 16 bit      steps            packet_buffer (2 packets), |      (UDP/IP, MAC,
                       |                                     header + 128 words         |       QSFP) -> server
                       +---------------------------------------------------------------+
```

Everything runs in one clock domain, the 245.76 MHz fabric clock, with a
synchronous active-high reset.

## Sample path: from converter beats to four-channel steps

**Lane selection and widening (`adc_lane_select`).** Each ADC's stream
carries four samples per clock (983.04 Msps after the converter's own
decimation). Keeping one of them, lane 0, per clock gives 245.76 Msps per
channel without any arithmetic. The four kept samples form a *step*: one
time instant on all four channels. Each 14-bit sample is widened to 16 bits
by appending two zero bits at the bottom, so a sample in the payload is the
ADC code times four, as a signed 16-bit number. A step is formed only in a
clock where all four ADC streams are valid.

**Sampling frequency selector (`rate_selector`).** A modulo-N counter keeps
one of every N valid steps. There is no anti-alias filter in the fabric:
the analog band-pass filter sets the band. The three operating modes are
the three values of N:

| `decim` | sample rate per channel | usable bandwidth | payload rate (with headers) |
|---|---|---|---|
| 5 | 49.152 Msps | about 25 MHz | 3.17 Gbps |
| 4 | 61.44 Msps | about 30 MHz | 3.96 Gbps |
| 1 | 245.76 Msps | about 122 MHz | 15.85 Gbps |

The two slower modes are the ones meant for continuous recording. At 3.2
to 4 Gbps, 4 TB of disk holds roughly 2.2 to 2.8 hours. `decim` is a
run-time input here. Change it under reset: a change in mid-stream takes
effect at once, and the packet being filled then holds samples at two
rates.

## Packet format

Each packet is one UDP payload of **8256 bytes**: a 64-byte header and
8192 bytes of samples. That is 1024 steps, so 1024 samples from each ADC.
On the 512-bit transmit stream this is 129 words. Byte *k* of a word is
`tx_data[8k+7:8k]`, and the 100 GbE core is assumed to put it on the wire
before byte *k+1*.

| word | contents |
|---|---|
| 0 (header) | bytes 0-7: 64-bit packet counter, least significant byte first; bytes 8-63: zero |
| 1 ... 128 (data) | eight steps each: step *k* of the word in `[64k+63:64k]` |

Within a step, ADC_A is in the lowest 16 bits, then ADC_B, ADC_C and
ADC_D. Each sample is little-endian. So payload byte offset
`64 + 8*s + 2*a` holds the low byte of channel `a` at step `s` (s = 0..1023),
and a receiver can read the payload after the header as an
interleaved `int16[1024][4]` array.

The packet counter starts at 0 after reset and goes up by one for every
packet sent. The receiving software finds lost packets from gaps in it.

## Buffering, back-pressure and overflow

This is the part of the design with the most subtle rules.

`packetizer` fills a 448-bit register with the first seven steps of a word
and writes the completed 512-bit word into `packet_buffer`. That buffer is
a first-word-fall-through FIFO of 256 words, two whole packets. The framer
waits until the buffer holds at least 128 words. It then sends the header
and the 128 data words, raising `tx_eof` on the last.

The 100 GbE side may stall the stream with `tx_ready`. A word moves in a
clock where `tx_valid && tx_ready`. While `tx_ready` is low, `tx_data` and
`tx_eof` are held, which an assertion checks. Stalls are allowed anywhere,
header included.

If the stalls last long enough to fill the buffer, samples must be lost.
They are lost a whole packet at a time. At the first step of every packet
the packer checks whether the buffer has room for all 128 of its words,
counting a word that is still on its way into the buffer. If not, the
packer discards all 1024 steps of that packet, `overflow` pulses for one
clock and `drop_count` goes up by one. So the buffer only ever holds whole
packets, in order, and a packet on the link never mixes samples from both
sides of a gap. The packet counter counts only packets actually sent. A
packet dropped here therefore leaves no gap in the counter: watch
`drop_count`.

The framer's count test is exact because of this rule. Words are only ever
written as parts of packets that have room. So once 128 words are present,
the oldest packet is complete.

## Timing

- Sample path latency: one clock in `adc_lane_select`, one in
  `rate_selector`, one in the packer's write register and one to write the
  buffer. A step that completes a packet is stored four clocks after its
  converter beat.
- The header goes out in the clock after the framer sees a whole packet
  stored.
- Sending takes 129 clocks with `tx_ready` held high, plus one idle clock
  between packets.
- New packets arrive every 1024·N clocks: 5120 in mode 1, 4096 in mode 2,
  1024 in mode 3. So the link side is busy at most 13 % of the time, and
  the buffer's second packet only matters under back-pressure.

## Top-level ports (`vrec_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | 245.76 MHz fabric clock, synchronous active-high reset |
| `adc_tdata` | in | [4][4][14] | `adc_tdata[a][l]`: lane *l* (oldest = 0) of ADC *a* (A = 0 ... D = 3) |
| `adc_tvalid` | in | 4 | per-ADC stream valid |
| `decim` | in | 8 | sampling frequency selector factor N (0 acts as 1) |
| `tx_ready` | in | 1 | 100 GbE core accepts a word |
| `tx_data` | out | 512 | header or data word |
| `tx_valid`, `tx_eof` | out | 1 | word valid; last word of a packet |
| `pkt_count` | out | 64 | packets sent since reset |
| `drop_count` | out | 32 | packets discarded for lack of buffer room |
| `overflow` | out | 1 | one-clock pulse per discarded packet |

The shared sizes and types (`step_t`, `adc_beat_t`, `word_t`, the packet
constants) are in `rtl/vrec_pkg.sv`.

## What is outside this RTL

- **Converter core and ADCs.** They are vendor IP: the four ADCs sit in two
  tiles (ADC_A and ADC_B in one, ADC_C and ADC_D in the other) and are
  configured for 1966.08 Msps with decimation by two. Only their AXI-stream
  outputs appear here.
- **100 GbE core.** UDP/IP/Ethernet framing, destination address and
  port, the MAC and the QSFP link. `tx_*` is the interface to it. A core
  that signals "almost full" rather than "ready" can be driven with
  `tx_ready = !almost_full`: the framer holds its word in any clock where
  `tx_ready` is low.
- **Analog front end and the server.** This covers the amplifiers, bias-Ts,
  band-pass filter, power supply, disks, capture software and the offline
  correlator.

## Where this RTL makes its own choices

The following are given by the system's description: the rates, lane
selection, the zero-padding to 16 bits, the decimation factors, the packet
sizes and the hardware packet counter. The following are this design's
own choices:

- Lane 0 is the lane kept (parameter `LANE`).
- `decim` is a run-time input. The original system built a separate
  firmware image for each mode.
- The 512-bit stream width and the sample order within the payload.
- Where the counter sits in the header, and zeros in the other 56 header
  bytes. The original header may carry more fields.
- The ready handshake, the 256-word buffer and dropping whole packets when
  it is full.
- A step is formed only when all four ADC streams are valid.
- The third mode is taken as 245.76 Msps (N = 1), the fabric clock rate.
  The description also quotes it once as 246.75 MHz.
- For modes 1 and 2 the description quotes a link rate of "about 3.7 Gbps".
  The arithmetic above gives 3.17 and 3.96 Gbps.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and ends with a watchdog.

| testbench | what it checks |
|---|---|
| `tb_adc_lane_select` | lane 0 kept, two zero LSBs, valid only when all four ADCs are valid, random data and gaps |
| `tb_rate_selector` | N = 5, 4, 1, 3 with and without input gaps: exactly steps 0, N, 2N ... pass, at one per N clocks |
| `tb_packet_buffer` | 8-word FIFO against a queue model: head word, count, full, empty |
| `tb_packetizer` | full-size packets with numbered steps: buffer filled while blocked, three packets dropped, then packets 0 1 5 6 7 8 received whole under random back-pressure; header counters; `tx_eof`; 129 clocks plus stalls per packet |
| `tb_vrec_top` | whole datapath at default sizes, converter model in the testbench. Runs all three modes after resets: mode 1 header spacing 5120 clocks; mode 2 with ADC valid gaps and back-pressure; mode 3 with overflow (blocks 0 1 5 6 received, 3 dropped) and header spacing 1024 clocks. It also counts mode switches, stalls, overflows and counter steps, and fails if any is zero. |
| `tb_vrec_sustained` | each mode as a continuous recording of 12 packets while the link side accepts only half the clocks at random: no drops, every sample right, packet rate 1 per 1024·N clocks (3.17, 3.96 and 15.86 Gbps of payload measured) |

To run one with Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/vrec_pkg.sv tb/tb_vrec_top.sv --top-module tb_vrec_top -o sim
./obj_dir/sim
```

Each testbench finishes in well under a second. Verilator warns about a
few package constants that some modules leave unused; nothing else is
reported.

## Changing it

- **Other packet sizes:** `DATA_BYTES` in `vrec_pkg` sets the packet length.
  The buffer depth (`BUF_DEPTH`, a power of two of at least two packets) is
  a parameter of `packetizer`.
- **Another lane:** `LANE` on `adc_lane_select`.
- **A fixed mode:** tie `decim` to a constant at the top.
- **A richer header:** it is formed in one line, in `packetizer`
  (`tx_data` in state `S_HDR`). A change there also needs the header check
  in the testbenches.
