# MP3 decoder communication platform: 3x3 NoC and shared bus

This is the RTL for the communication and I/O platform of an MP3 decoder.
The decoder is split into nine processing elements (PEs) that share no memory
and exchange 16-bit messages:

| PE | Role |
|---|---|
| Manager | Controls the bitstream and the order of the PEs |
| Sync | Finds frames and reads side information |
| Get Scale | Extracts scale factors |
| Huffman | Huffman decoding |
| Dequantization | Scales the decoded values |
| Stereo | Stereo processing |
| Antialias | Reordering and alias cancellation |
| Hybrid | IMDCT and frequency inversion |
| Synthesis | Polyphase sub-band synthesis |

The original design connects the PEs in two ways and compares the two decoders that result:

- a 3x3 mesh network-on-chip (NoC) at 87.5 MHz;
- a 26-bit shared system bus at 80 MHz.

Both interconnects are built here. They sit side by side in the top module `mp3_soc_top`, and each brings out its nine PE attachment points as ports. The parts both decoders share are also built:

- the serial host link;
- the on-chip bitstream RAM;
- frame sync/header extraction;
- the global-gain-to-float converter;
- the frequency-inversion step that follows the IMDCT;
- the two-bank PCM buffer;
- the AC'97 audio link driver.

The signal-processing insides of the nine PEs are **not** built (see "Not built").

All logic uses one clock and an active-low asynchronous reset. Every module is in `rtl/`, one per file. Shared types and constants are in `rtl/mp3soc_pkg.sv`.

## Block overview

```
 host --serial--> uart_rx --> comm_wrapper --> mp3_stream_buffer --> (Manager)
      <--serial-- uart_tx <--/  (free-slot reply, start)

 noc_mesh   : 3x3 x [noc_router + noc_ni]      <-> PE ports noc_*[x][y]
 shared_bus : rr_arbiter + AND-OR bus mux      <-> 9 x bus_port <-> PE ports bus_*[i]

 sync_header (for Sync)  gain_lut (for Dequantization)  freq_inversion (for Hybrid)

 (Synthesis) --> pcm_bank_buffer --> ac97_link --> AC'97 codec (AD1981B)
```

| Module | What it does |
|---|---|
| `mp3_soc_top` | Instantiates everything below and brings out the PE attachment points of both interconnects. |
| `noc_mesh` | 3x3 mesh, with one router and one network interface (NI) per tile. |
| `noc_router` | 5-port router with input buffers, a round-robin arbiter, a switch box with one holding register per input, and XY routing. |
| `noc_input_buffer` | 8-entry circular FIFO. `avail` is high while population < 8; `has_data` is high while population ≥ 1. |
| `rr_arbiter` | Round-robin arbiter: the last winner gets the lowest priority. |
| `noc_ni` | Network interface ("wrapper"). It wraps PE data into flits and unwraps received flits, with an 8-entry buffer each way. |
| `shared_bus` | Bus arbitration, bus ownership and the bus word multiplexer. |
| `bus_port` | Bus master/slave logic of one PE: request and grant, 4-phase handshake, time-out release, and a one-word receive register. |
| `uart_rx`, `uart_tx` | 8N1 serial receiver and transmitter. |
| `comm_wrapper` | Host message framing (length + type header), with the free-slot reply and the start command. |
| `mp3_stream_buffer` | 70,000-byte circular byte FIFO that holds the MP3 file. |
| `sync_header` | Finds the 12-bit sync word and splits out the 32-bit frame header. |
| `gain_lut` | Computes 2^((gg−210)/4) as an IEEE-754 single from an 8-entry table and one subtraction. |
| `freq_inversion` | Flips the sign of odd samples in odd sub-bands of the IMDCT output (single-precision stream). |
| `pcm_bank_buffer` | Two banks, each holding one granule (576 samples × 2 channels × 20 bits). |
| `ac97_link` | AC-link frame generator (SYNC, SDATA_OUT) clocked by the codec's BIT_CLK. |

## Network-on-chip

### Topology

- Tile (x, y) sits in column x (left to right) and row y (top to bottom).
- A router's E port links to the W port of (x+1, y).
- A router's N port links to the S port of (x, y+1). So "north" means toward larger y.
- Border ports are tied off:
  - their inputs never strobe;
  - their outputs report "not available".

PE placement used by the decoder:

|       | x=0 | x=1 | x=2 |
|---|---|---|---|
| y=0 | Get Scale | Manager | Synthesis |
| y=1 | Huffman | Sync | Hybrid |
| y=2 | Dequantization | Stereo | Antialias |

### Flit

The flit is 26 bits, shown here LSB first:

| Bits | Field |
|---|---|
| [1:0] | Type (always body = 01) |
| [5:2] | Destination {x, y} |
| [9:6] | Origin {x, y} |
| [25:10] | 16-bit data |

- Each coordinate is 2 bits. For example, (1,0) is `0100` and (1,1) is `0101`.
- Only body flits are used, because every flit carries its own destination.

### Link protocol (router↔router and NI↔router)

- The receiver shows a registered availability flag. It is high while its input buffer holds fewer than 8 elements.
- The sender may put a flit on the link and pulse `tell` for one cycle only while that flag is high.
- There is no combinational path from `tell` back to `avail`, so chained routers form no combinational loop.

### Router

- Each input port has an 8-deep circular buffer.
- Each cycle, one round-robin arbiter picks one input that has data and a free holding register, and moves that input's buffer head into the holding register.
- The held flit's output port is decoded with XY routing: first along x, then along y, and to the PE port when both match.
- The flit leaves as soon as the neighbour on that port is available.
- While one holding register waits on a busy output, the other inputs keep moving.
- If two holding registers want the same output in the same cycle, a small round-robin arbiter per output decides.

### Latency

Unloaded latency is 2 cycles per router. Measured from the PE's `pe_talks` to `alert_pe` at the destination, it is 2 × hops + 4 cycles. For example, (1,0)→(1,1) takes 6 cycles.

### PE side of the NI

Sending:
1. The PE checks `pe_avail`.
2. It puts `pe_output` (data) and `pe_dest` on the ports.
3. It pulses `pe_talks`.

Receiving:
- `alert_pe` stays high while a received element is waiting, with the element on `input_to_pe` and `origin_to_pe`.
- The PE pulses `pe_read` to take it.

## Shared bus

### Bus word

| Bits | Field |
|---|---|
| 16 | Data |
| 8 | Address: {source port [7:4], destination port [3:0]} |
| 1 | `BUS_Control[0]`: request from the master |
| 1 | `BUS_Control[1]`: acknowledge from the slave |

For example, address `0x10` means port index 1 sending to port index 0.

### Arbitration

- A PE raises its request flag (`port_req`).
- While the bus is idle (`job_req` low), a round-robin arbiter grants one requester (`grant[i]`, `grant_access = i`).
- The owner keeps the bus for as long as its request flag stays high, so it can send a burst of words.
- When the flag drops, the bus is free again one cycle later.
- The tri-state drivers of an FPGA bus are modelled as an AND-OR multiplexer enabled by the grants. It is logically the same, and the idle bus reads 0.

### Transfer (`bus_port`)

1. The master drives data and address.
2. It runs a 4-phase handshake:
   1. the master raises request;
   2. the addressed slave stores the word and raises acknowledge;
   3. the master drops request;
   4. the slave drops acknowledge.
3. `tx_done` pulses at step 2.

If no acknowledge arrives within `TIMEOUT` = 64 cycles (the slave is busy), the master does three things:
- drops the bus;
- waits another 64 cycles;
- asks again.

So a slow receiver cannot lock the bus. The slave has a one-word receive register (`rx_valid`/`rx_data`/`rx_src`), which the PE empties with `rx_read`.

## Host link

- **Serial format:** 8N1, with 760 clocks per bit (115200 baud at 87.5 MHz).
- **Messages:** every message in either direction is 3 length bytes (payload length, most significant byte first), one type byte, then the payload.

| Type | Direction | Meaning |
|---|---|---|
| 55 | host → FPGA | MP3 bytes. They are written into the 70,000-byte RAM. |
| 56 | host → FPGA | Asks how many RAM bytes are free. |
| 57 | FPGA → host | Reply `0,0,3,57` followed by the free count in 3 bytes, MSB first. |
| 58 | host → FPGA | Start decoding. `start_decode` pulses for one cycle. |

Other types are skipped according to their length.

- **Bitstream RAM:** a circular FIFO.
  - The Manager reads it with `sb_rd_en`; the data appears one cycle later with `sb_rd_valid`.
  - `sb_count` gives the bytes held.

## Sync/header unit

- **Sync word:** the unit finds it on byte boundaries, as `0xFF` followed by a byte whose upper nibble is `0xF`.
- **Header:** the 32-bit header is that byte pair and the next two bytes.
- **Fields:** sync 31:20, version 19, layer 18:17, protection 16, bit-rate 15:12, sampling rate 11:10, padding 9, private 8, channel mode 7:6, mode extension 5:4, copyright 3, original 2, emphasis 1:0.
- **Stereo:** `stereo` is low only for channel mode 11.
- **Not included:** parsing of the side information after the header.

## Global gain converter

The dequantiser needs 2^((gg − 210)/4) for the 8-bit global gain gg. With n = 210 − gg:

| Bits | Value |
|---|---|
| 31 | 0 |
| 30:24 | 63 − floor((n + 3)/8) |
| 23:0 | One of 8 patterns chosen by n mod 8: `800000 D744FD B504F3 9837F0 000000 5744FD 3504F3 1837F0` (hex, for n mod 8 = 0..7) |

So a 184-bit table and a subtractor replace a 256 × 32 table. Examples:
- gg = 210 gives `0x3F800000` (1.0);
- gg = 212 gives `0x3FB504F3` (√2).

## Frequency inversion

The synthesis filter bank expects the spectrum of each odd sub-band mirrored back. After the IMDCT, sample ss of sub-band sb (both counted from 0) is therefore negated when sb and ss are both odd.

- The values are IEEE-754 singles, so negating one is a flip of bit 31.
- The unit takes one granule of one channel as a stream of 32 × 18 values, sub-band by sub-band.
- Two counters track (sb, ss). `hy_in_first` marks the first value of a granule and restarts them; after 576 values they wrap on their own.
- The output appears one clock after the input. The unit accepts one value per clock and cannot stall.

## PCM buffer and AC'97 link

**PCM buffer**
- Synthesis writes 20-bit samples with `pcm_wr_en`: 576 left samples, then 576 right samples, per granule.
- Each granule fills one bank, and the writer moves to the other bank.
- A bank can be written again only after the driver has played all of it. Until then `pcm_wr_ready` is low and synthesis stalls.
- When the driver finishes a bank and the other bank is not yet full, `pcm_underrun` pulses. This means decoding fell behind real time.

**AC-link**
- The codec supplies BIT_CLK (12.288 MHz).
- The controller synchronises BIT_CLK into the system clock. On each rising edge it shifts out the next bit of a 256-bit frame, so the output is stable at the codec's falling-edge sample point. This needs a system clock above about 61 MHz.
- SYNC is high for the 16 bits of slot 0 (the tag) and gives a 48 kHz frame rate.
- Tag bits:

| Bit(s) | Meaning |
|---|---|
| 15 | Frame valid |
| 14..3 | Slot 1..12 valid |
| 1:0 | Codec ID 0 |

- Slot contents:

| Slot(s) | Contents |
|---|---|
| 1 | Codec register command: {read, address[6:0], 12 zeros} |
| 2 | Codec register data: {data[15:0], 4 zeros} |
| 3, 4 | Left and right 20-bit PCM |

- Register commands enter through `codec_cmd_*` and are sent in the next frame.
- SDATA_IN (codec → controller) is not used.

## Parameters (defaults)

| Parameter | Default | Where |
|---|---|---|
| `MESH_X`, `MESH_Y` | 3, 3 | top, `noc_mesh` |
| `BUF_DEPTH` | 8 | router and NI buffers |
| `N_BUS_PORTS` | 9 | top, `shared_bus` |
| `BUS_TIMEOUT` | 64 cycles | `bus_port` |
| `CLKS_PER_BIT` | 760 | UART |
| `RAM_BYTES` | 70,000 | bitstream RAM |
| `SAMPLES_PER_GRANULE` | 576 | PCM buffer |

The top synthesises to about 7,700 cells and 3,200 flip-flop bits. It also has about 616,000 memory bits, mostly the bitstream RAM and the PCM banks.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by printing `TB_RESULT checks=N failures=M`. Most compare against a reference model under random traffic; a few highlights:

| Testbench | Coverage |
|---|---|
| Router and mesh | Checks delivery, order per source, and the measured latencies. |
| Bus | Checks bursts, arbitration and time-outs. |
| Bitstream RAM | Fills all 70,000 bytes once. |
| PCM buffer | Plays one full-size 576-sample granule. |

`tb_mp3_soc_top` runs the whole top with default parameters. Small models stand in for the PEs, the host and the codec. In one run:

- a 40-byte MP3 block arrives over the serial link;
- the free count is queried;
- decoding is started;
- the Manager forwards bytes over both interconnects to the Sync model, which finds two frame headers;
- Hybrid streams three granules over the NoC to Synthesis, which fills the PCM banks;
- the codec model rebuilds AC-link frames and checks every PCM pair;
- a Hybrid model streams one granule through the frequency-inversion unit.

The testbench also counts each of these mechanisms and fails if any never happened:
- NoC back-pressure
- bus time-out, bus burst, and bus arbitration between two masters
- PCM writer stall, bank switch and underrun
- header detection
- free-slot reply, start command, and codec command
- frequency-inversion sign flips

The run covers 35 ms of simulated time and takes about 15 s.

### Simulating

Build and run any testbench with Verilator 5. The package goes first and the other files are found through `-y`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -y rtl -y tb --top-module tb_mp3_soc_top rtl/mp3soc_pkg.sv tb/tb_mp3_soc_top.sv
./obj_dir/Vtb_mp3_soc_top
```

Replace `tb_mp3_soc_top` with any other file in `tb/`. The serial link and AC-link tests are `tb_uart` and `tb_ac97_link`.

When a concurrent assertion in the RTL fails, the run stops. These assertions cover:
- buffer overflow and underflow;
- more than one bus owner;
- a flit turned back the way it came.

All other errors are counted and printed as `FAIL ...` lines. A run is good when it ends with `failures=0`.

The RTL elaborates with no vendor primitives. Memories are plain arrays written to map onto block RAM:
- the 70,000-byte bitstream RAM;
- the PCM banks;
- the 8-entry FIFOs.

## Not built

| Part | Why it is not built |
|---|---|
| The nine PE datapaths (Manager, Sync side-info parsing, Get Scale, Huffman, Dequantization apart from the global-gain converter, Stereo, Antialias, Hybrid apart from frequency inversion, Synthesis) | Their algorithms, tables and state machines are not specified in enough detail. |
| Floating-point multiplier, adder and float-to-fixed converter | Vendor IP cores. |
| The 100 MHz → 87.5 MHz PLL | Vendor primitive. |
| The AD1981B codec | External chip. |

The real-time figures of the original decoders (4.85 ms per channel and granule for the NoC version, 5.342 ms for the bus version, against a 6 ms budget) depend on the PEs. They are therefore not reproduced.

## Design choices and known differences from the original

- **North direction.** The original describes the move from (1,0) to (1,1) as "north", arriving at the south input of (1,1). That makes north point toward larger y, which is followed here, even though (1,1) is drawn below (1,0).
- **Flit width.** Some example waveforms in the original show 24-bit flit values. The 26-bit layout of the flit description is used.
- **NoC handshake.** The original states that a 4-phase handshake is used for every transfer. Its step-by-step NoC example, however, shows a strobe checked against an availability flag. The NoC links here use that strobe/availability scheme, and the 4-phase handshake is used on the bus.
- **Bus grant polarity.** The original's bus walk-through says the bus "lowers" the grant of the winning port. The grant here is active high.
- **Gain table.** One entry of the original's 8-entry pattern table has two digits swapped (`9873F0`). The correct pattern `9837F0`, which matches the full 256-entry table, is used. The original also defines n as gg − 210, but its numbers match n = 210 − gg, which is used here.
- **Length byte order.** The original labels the first length byte "low", but its example (0, 0, 25 for 25 bytes) is most significant first, which is used here.
- **My own choices.** The message type codes other than 55 and the bus time-out length were chosen for this design. So were the UART format and baud rate, the AC'97 tag and command slot layout (standard AC'97), and all FIFO depths other than the router's 8.
