# FPGA wrapper and test waveform for an STRS software-defined radio

A software-defined radio built on an FPGA board and an RF front end has to run
waveforms that come and go, while the board's plumbing stays the same:
Ethernet to the host processor, the DAC and ADC sample ports, clocks, resets,
LEDs and switches. This RTL splits the FPGA into two parts:

* a **wrapper** (`STRS_SDR_Wrapper`) that owns that plumbing; and
* a **test waveform** (`STRS_Waveform`) that uses every wrapper interface once,
  so that the wrapper can be shown to work and then serve as a template.

The host processor controls the radio with small UDP command packets. It
streams data both ways in larger UDP packets, over the same Ethernet link. The
wrapper turns those packets into byte and word streams for the waveform, and
turns the waveform's responses and receive samples back into packets.

```
               RxLL (LocalLink from the Ethernet MAC)
                 |
            EthernetRx --- sorts frames by UDP source port
             |        |
   RxPackets(26)   RxPackets(29)      strip the remaining header bytes
        |               |
  command bytes   Tx stream bytes
        v               v
  +----------------- STRS_Waveform -------------------------------+
  | CommandParse -> CommandDecoder -> 120-bit response            |
  | TxStreamData (262K FIFO) -> TransmitSignal -> DAC I/Q         |
  |   SineWaveGen, PrbsTx23, ErrorInsert, Parallel2Serial,        |
  |   NrzL2M, BpskMod, PulseShapeFilter                           |
  | loopback words --FIFO--> ReceiveSignal (BERT, DataMux) <- ADC |
  +---------------------------------------------------------------+
        | response                  | Rx samples (16-bit words)
        v                           v
  OutputDataMux: TxResponsePackets + RxStreamData  ->  TxLL
```

`ResetGen` makes the system reset. Two `ClockEnables` instances make the
waveform's clock enables. The `StatusBits` register gathers the wrapper's
sticky error flags for the waveform to report.

## Clock domains

| Domain | Clock | What runs there |
|---|---|---|
| Ethernet | `GtxClk`, 125 MHz | frame parsing, commands, packet building, the output multiplexer |
| Transmit | `TxWFClock`, the DAC clock (196.608 MHz on the board) | tone generator, Tx stream FIFO read side, PRBS, modulator |
| Receive | `RxWFClock`, the ADC clock (196.608 MHz) | ADC registers, BERT, receive source select, Rx sample FIFO write side |

The DAC and ADC clocks are nominally equal, but they come from different
converters, so the RTL treats them as unrelated clocks.

The crossings work as follows:

* **Streaming data** crosses through Gray-pointer dual-clock FIFOs
  (`AsyncFifo`):
  * transmit stream: 125 MHz to the DAC clock;
  * receive samples: ADC clock to 125 MHz;
  * loopback words: DAC clock to ADC clock, through a 16-word FIFO.
* **The command register and the BERT counters** cross with a toggle
  request/acknowledge handshake (`ClockDomainCrossing`).
* **Level flags** cross through two flip-flops.
* **One-clock pulses** cross as a toggle. These are the flag-clear pulse and
  the commanded reset, which is also stretched to 16 clocks. A pulse is
  therefore never lost, whatever the clock ratio.

Clock enables pace the transmit and receive chains instead of derived clocks.

| Enable | Period, in converter clocks | Use |
|---|---|---|
| 1 | 64 | byte rate; generated but unused, because the FIFOs are read a word at a time |
| 2 | 128 | word rate (one 16-bit word) |
| 3 | 8 | symbol rate: 16 symbols per word, 8 samples per symbol |

All resets are synchronous.

## Packets

Every frame starts with a 42-byte header: Ethernet MAC (14 bytes), IPv4 (20)
and UDP (8). Frame bytes move on the Xilinx LocalLink convention: 8 data bits
plus active-low `sof_n`, `eof_n` and `src_rdy_n`. In the RTL this is the
11-bit packed struct `ll_t`.

**Receive sorting.** `EthernetRx` reads the UDP source port at bytes 34–35
and classifies the frame:

* 0x8C35: a command;
* 0x8CA0: a transmit stream packet;
* anything else: ignored.

The bytes pass through a 20-byte delay line. The matching enable therefore
rises with byte 16, and `RxPackets` drops the remaining 26 header bytes. The
streaming instance drops 29, which also removes the 3-byte payload header. A
frame that stays open for more than 1536 bytes sets the "stuck" status bit.

**Formats.**

| Packet | Payload after the 42-byte header | Frame |
|---|---|---|
| Command | `AA`, command ID, 5 data bytes | padded by the host |
| Response | header `AA`, command ID, `01` accepted / `00` rejected, 12 data bytes (120 bits) | 60 bytes, zero padded |
| Stream (both directions) | `55`, stream ID `0A`, `00`, 512 data bytes (256 words, high byte first) | 557 bytes |

**Transmit headers.** The headers of frames sent to the host are computed
at elaboration time by `PacketHeaderRom`:

* the IPv4 header checksum is the ones'-complement sum with end-around carry;
* the UDP checksum is zero.

For a response frame, the header is the classic example
`4500 002E 0000 4000 4011 B96B C0A8 0002 C0A8 0001`. The FPGA is 192.168.0.2
and the host is 192.168.0.1. The MAC addresses are placeholders in
`strs_radio_pkg`.

## Command set

The command IDs and field positions are this design's own. They are all in
`strs_radio_pkg`. "data[i]" is the i-th data byte after the ID.

| ID | Command | Effect / response data |
|---|---|---|
| 01 | write command register | `CmdReg = {data[0], data[1]}` |
| 02 | stream enable | data[0] bit 0 starts or stops receive-side streaming |
| 03 | set LEDs | LEDs = data[0] |
| 04 | read dip switches | response data[0] = switches |
| 05 | status | response data[0..4] = the 36 `StatusBits`, right-aligned |
| 06 | BERT | response data[0..7] = bits compared, data[8..11] = bit errors |
| 07 | soft reset | resets the wrapper and waveform; no response |
| 08 | clear flags | clears the sticky flags and the BERT counters |
| other | — | response with "rejected" |

`CmdReg` fields:

| Bits | Field | Values |
|---|---|---|
| [1:0] | transmit source | 0 tone, 1 raw stream words, 2 PRBS BPSK, 3 stream BPSK |
| [2] | error insertion | one bit error every 64 words |
| [3] | NRZ-M encoding | applied before BPSK |
| [5:4] | receive source | 0 ADC, 1 loopback, 2 PRBS |
| [6] | pulse shaping | root-raised-cosine filtering of the BPSK samples |
| [15:8] | tone frequency word | phase step of the sine generator |

Only one response is ever in flight. A command that arrives while a response
is pending is ignored. `TxSendReady` pulses only once `RespSending_n` shows
that the previous response has left.

## Transmit chain

The DAC I/Q source is one of:

* **Tone.** A sine/cosine table (1024 entries, computed at elaboration)
  indexed by a phase accumulator.
* **Raw stream words.** Words from the 262K-byte stream FIFO, on the I
  channel.
* **PRBS BPSK.** PRBS-23 (x^23 + x^18 + 1), 16 bits per word, then:
  1. optional error insertion;
  2. serialisation, MSB first, one bit per symbol enable;
  3. optional NRZ-M (the level toggles on a 1);
  4. BPSK: +16000 for 0, −16000 for 1, with Q = 0;
  5. Optional pulse shaping (`CmdReg[6]`): instead of holding each symbol for
     8 samples, a root-raised-cosine filter interpolates it. The filter has
     roll-off 0.35, 8 samples per symbol and a 6-symbol span (49 taps), with
     the centre tap at 12000.
* **Stream BPSK.** The same bit chain as PRBS BPSK, fed from the stream
  FIFO instead of the PRBS generator.

The stream FIFO raises a sticky underflow flag if it runs dry once streaming
has started. Each transmitted word is also sent, as a loopback word, to the
receive side.

## Receive chain and bit error rate tester

* **ADC samples.** The 14-bit ADC I sample passes two registers. Its top 11
  bits, sign-extended to 16, form the "ADC" receive source.
* **Bit error rate tester (`PrbsRx23`).** It compares the loopback words
  with a local PRBS-23. It locks on two consecutive words that fit the
  recurrence, and seeds itself from them.
* **Counting.** After lock it counts bits compared (64-bit counter) and bit
  errors (32-bit counter).
* **Loss of lock.** A word with more than 6 errors drops lock and is not
  counted. The hunt then starts afresh, and the number of sync losses is
  kept.
* **Receive source select (`DataMux`).** It picks ADC, loopback or a second
  PRBS once per word enable. That word goes to the receive-side streaming
  packets.

## Output multiplexer and streaming flow control

`OutputDataMux` owns the LocalLink transmit port and never splits a frame.

* **Responses.** `TxResponsePackets` holds one 120-bit response and builds
  the 60-byte frame when granted.
* **Receive streaming (`RxStreamData`).** While streaming is enabled, words
  are written into a 1024-word dual-clock FIFO. Once 256 words wait, the
  block asks for the port and sends 557-byte frames. They go out in groups
  of up to 4, with 500 idle clocks after each frame. It then releases the
  port, so that a pending response can go out between groups.
* **Priority.** When both ask at once, the response wins.

The 125 MHz port can carry about 111 MB/s. Even the full 557-byte frames every
(557 + 500) clocks carry 512 × 125e6 / 1057 ≈ 60 MB/s. That is far more than
one 16-bit word per 128 ADC clocks (about 3 MB/s), so the FIFO only fills if
streaming is held off.

## Status bits

The 36-bit `StatusBits` word, which command 05 reads back:

| Bit | Meaning |
|---|---|
| 0 | Tx stream FIFO overflow (waveform) |
| 1 | Tx stream FIFO underflow (waveform) |
| 2 | BERT locked (waveform) |
| 3 | command with a bad header byte seen (waveform) |
| 11 | Ethernet receive parser stuck in a frame |
| 12 | response offered while one was pending |
| 13 | Rx sample FIFO overflow |
| 14 | Rx sample FIFO underflow |
| 19–23, 25, 27, 28, 35 | a state machine found in an undefined state: ResetGen, EthernetRx, the two RxPackets, response builder, stream builder, output mux |

Bits 15–18, 24 and 26 belong to FIFOs and state machines that this design
merges away; they read zero. The remaining bits are free for a waveform. All
flags are sticky until "clear flags".

## Where this design departs from the original

The original FPGA design was written in VHDL around vendor cores. This RTL
follows its block structure, signal names, constants and packet formats. The
following are its own choices or omissions:

* **Not built.** These are taken as given at the top-level ports: the clock
  wizard, the Ethernet MAC and its LocalLink FIFOs, the DAC/ADC pin
  interfaces, the RF-board configuration processor, and the LED pattern and
  pulse-generator helpers, which are only named.
* **Pulse-shaping filter.** The original uses a vendor interpolation core.
  Only its name is known, and it suggests ×8 interpolation with roll-off
  0.35. The root-raised-cosine shape, span and scaling here are this
  design's own. Shaping is switched by a command register bit, and the
  rectangular pulses remain the default.
* **Clock-enable periods, command IDs, command register fields and
  response header.** The original does not give them; the values above are
  this design's own.
* **Merged FIFOs.** The response FIFO and its two state machines are replaced
  by a single held response. The streaming FIFO and the packet FIFO on the
  receive side are merged into one sample FIFO.
* **Streaming packet length.** It is 557 bytes (42 + 3 + 512). One constant
  of the original gives 570 for the same packet; 557 is the value used by the
  packet builder and consistent with the packet layout.
* **LEDs.** They show only what command 03 wrote, not waveform status.
* **BERT error count.** It is an adder tree over each 16-bit word, not a
  per-byte table.
* **ADC channels.** Only the ADC I channel is used.
* **Waveform ports.** The port list of `STRS_Waveform` follows the original
  interface, with three exceptions:
  * the byte-rate enables are not taken;
  * neither are the MAC receive-error input and the ADC Q channel, because
    nothing in the test waveform uses them;
  * `RxResetOut` and `RxDataValid` are added to carry the receive-side reset
    and the sample strobe to the wrapper.

## Simulating

Every block has a self-checking testbench in `tb/<module>_tb.sv`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb --top-module STRS_SDR_Wrapper_tb \
    rtl/strs_radio_pkg.sv $(ls rtl/*.sv | grep -v strs_radio_pkg) tb/STRS_SDR_Wrapper_tb.sv
./obj_dir/VSTRS_SDR_Wrapper_tb
```

`STRS_SDR_Wrapper_tb` runs the whole design at its default sizes, with a
125 MHz Ethernet clock and slightly different DAC and ADC clocks. It builds
real Ethernet frames with valid IP checksums and checks the frames that come
back. It covers:

* no response before the clock wizard locks;
* the dip switch read and the LED write;
* a foreign port being ignored;
* the stuck-frame flag and flag clear;
* a tone on the DAC;
* PRBS BPSK on the DAC, with and without pulse shaping;
* stream frames reaching the DAC in order;
* ADC samples and PRBS in receive stream frames, with responses interleaved;
* a clean BERT run and a run with error insertion (8–11 errors expected);
* soft reset and push-button reset.

It takes a few seconds. The block testbenches use smaller FIFOs and packet
gaps where that keeps them short. `tb/frame_check.svh` holds the shared
header checker.
