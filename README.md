# Low latency serial link for a distributed LLRF controller

An LLRF (low level RF) controller keeps the field in the accelerating cavities
of a linear accelerator stable. In a distributed controller the measured field
vector crosses up to three serial links before it becomes a drive signal:

1. from each data acquisition (DAQ) board to a data concentrator,
2. from the concentrator to the main processing unit,
3. from the processing unit to the vector modulator.

The whole loop has to close within about 1 µs. If each link is allowed 200 ns,
the three links take 600 ns and leave 400 ns for the computation. At these
times, how fixed and short the latency is matters more than throughput. Switched
protocols (Ethernet, PCI Express, serial RapidIO) take microseconds and vary
from frame to frame. Even the vendor's light point-to-point protocol adds tens
of nanoseconds.

This RTL is a point-to-point link that carries one I/Q sample per frame over
a bare 8B/10B multi-gigabit transceiver. It has no link layer, no
retransmission and no flow control: a sample goes out the moment it is
offered, and a 16-bit CRC lets the receiver drop a damaged one. The transceiver
has two clock-crossing buffers. Whether they are used sets most of the
latency, so both can be bypassed by parameter. At 3.125 Gb/s the default
configuration delivers a sample about 95 ns after it is offered, ignoring the
analog front ends and the fibre.

Around the link, `lll_llrf_system` builds the controller's link network:
eight DAQ links, a data concentrator that adds up the samples of four DAQ
boards, and the two further hops to the processing unit and the vector
modulator.

## The frame on the line

The link moves 16-bit words. Each word is two 8B/10B symbols, and symbol 0
(bits 7:0) goes on the line first. Every symbol has a control flag (the
8B/10B "K" flag).

| word  | bits 15:8            | bits 7:0             | control flags |
|-------|----------------------|----------------------|---------------|
| idle  | K28.0 (idle)         | K28.5 (comma)        | 11            |
| idle  | K28.0                | K28.5                | 11            |
| I     | in-phase sample      |                      | 00            |
| Q     | quadrature sample    |                      | 00            |
| CRC   | CRC-16 of I and Q    |                      | 00            |
| idle  | K28.0                | K28.5                | 11            |

- **Idle words fill the line between frames.** The comma K28.5 lets the
  receiver find the symbol boundaries. The idle word as a whole is the unit
  that the receive elastic buffer may repeat or drop when it corrects for
  clock drift.
- **A frame is exactly three data words: I, Q and the CRC.** There is no
  start-of-frame character. A frame starts at the first all-data word that
  follows a word holding a control character. The transmitter therefore sends
  at least one idle word after every frame, so a new sample can start
  immediately after that.
- **The CRC** is CRC-16-CCITT: polynomial x^16+x^12+x^5+1, initial value
  0xFFFF, no final inversion. It is computed over I and then Q, most
  significant bit first. That equals the usual byte-wise CRC-16/CCITT over the
  bytes I[15:8], I[7:0], Q[15:8], Q[7:0].
- **Bit order on the line.** A 10-bit symbol is stored with bit `a` in bit 0,
  and bit 0 is sent first. In this notation the comma at negative running
  disparity is `10'b0101111100`.

## The data path

```
 transmit (tx_clk_out)                                           bit clock
 samples -> lll_frame_tx -> lll_enc8b10b -> [lll_tx_phase_fifo] -> lll_piso -> ser_tx
            I,Q,CRC/idle    16b+2K -> 20b    only if TX_BUF_EN      20:1, makes the
                                                                    TX word clock
 receive                                                      recovered bit clock
 ser_rx -> lll_sipo -> lll_comma_align -> lll_dec8b10b -> [lll_rx_elastic_buffer] -> lll_frame_rx -> samples
           1:20, makes   finds K28.5,     20b -> 16b+2K   only if RX_BUF_EN          CRC check   (rx_clk_out)
           RX word clock  aligns words
```

Each stage is one register, except for the serializer and the deserializer,
which take a whole word time, and the two buffers. Going through the default
configuration:

| stage | what adds latency |
|---|---|
| frame transmitter | 1 word clock (registered output) |
| encoder | 1 word clock |
| serializer | waits for the next word boundary, then 20 bit times (6.4 ns) |
| line | whatever the fibre adds (the testbenches use 16 bits, about 5 ns) |
| deserializer | completes the word, 20 bit times |
| comma aligner | 1 word clock, plus up to one word while the boundary falls mid-word |
| decoder | 1 word clock |
| elastic buffer | about CLK_COR_MIN_LAT symbols of stored data, plus a 2-flop pointer synchronizer and the output register |
| frame receiver | 1 word clock after the CRC word |

## Where the latency goes: the two buffers

**Transmit phase adjust FIFO (`lll_tx_phase_fifo`, `TX_BUF_EN`).** The FPGA's
transmit clock and the serializer's word clock have the same frequency but an
unknown phase. The FIFO sits between them. Both pointers advance on every
cycle of their own clock. At start-up the read side puts its pointer one word
ahead of the synchronized write pointer. That pointer lags the true one by at
least two cycles, so the first word read is already written. The FIFO then
adds about two word clocks.

With `TX_BUF_EN = 0` the FIFO is left out. The transmit user logic must then
run on `tx_clk_out`, which is the serializer's own word clock. In the
transceiver this is done with a phase alignment circuit, which is not modelled
here.

**Receive elastic buffer (`lll_rx_elastic_buffer`, `RX_BUF_EN`).** The
recovered clock follows the far end's oscillator, and the local receive clock
follows the local one. Their frequencies differ by a few ppm, so the buffer
slowly fills or drains. It corrects on idle words:

- **Insertion:** an idle word is at the head and the read side sees fewer than
  `CLK_COR_MIN_LAT` symbols stored. The word is sent twice.
- **Removal:** an idle word is at the head and more than `CLK_COR_MAX_LAT`
  symbols are stored. The word is dropped.

Reading starts only once `CLK_COR_MIN_LAT` symbols are stored. The data
therefore waits about that many symbol times in the buffer. Lowering
`CLK_COR_MIN_LAT` from 16 to 4 symbols saves 12 × 3.2 ns = 38.4 ns at
3.125 Gb/s. Levels are counted in 8-bit symbols, and a word holds two.

With `RX_BUF_EN = 0` the buffer is left out. The receive user logic must then
run on `rx_clk_out`, the clock recovered from the line. This is the fastest
configuration, but it ties the user logic to the far end's clock.

**Simulated latency**, from the clock edge that accepts a sample to its
`rx_iq_valid` pulse, at 3.125 Gb/s with a 5 ns line (`tb_lll_link_latency`).
The last column is the latency measured on real hardware for the same
configurations. That measurement includes the analog transceiver stages, the
optical module and the fibre, which this model leaves out.

| configuration | TX_BUF_EN | RX_BUF_EN | CLK_COR_MIN_LAT | simulated | hardware |
|---|---|---|---|---|---|
| both buffers | 1 | 1 | 16 | 148.8 ns | 147 ns |
| RX buffer only | 0 | 1 | 16 | 133.3 ns | 141 ns |
| both buffers | 1 | 1 | 4 | 110.4 ns | 109 ns |
| **RX buffer only (default)** | 0 | 1 | 4 | 94.9 ns | 103 ns |
| no buffers | 0 | 0 | – | 57.6 ns | 92 ns |

The step from `CLK_COR_MIN_LAT` 16 to 4 is 38.4 ns in the model and 38 ns in
the measurements. The model's TX FIFO costs more than the hardware one did
(15 ns against 6 ns), and the fully bypassed case is faster in the model. Take
absolute numbers from this model only as the digital part of the budget.

The default is the RX-buffer-only configuration with `CLK_COR_MIN_LAT = 4`.
Bypassing the receive buffer as well needs a phase alignment procedure after
every clock change, and it puts the recovered clock into the user logic. It is
a reference point rather than a practical setting.

## Clocks and reset

| clock | source | used by |
|---|---|---|
| `tx_ser_clk` | transceiver PLL (not in this RTL), 3.125 GHz | serializer |
| TX word clock | `lll_piso`, `tx_ser_clk` / 20 | TX FIFO read side; with `TX_BUF_EN = 0`, also frame transmitter and encoder |
| `tx_user_clk` | FPGA, same frequency as the TX word clock | frame transmitter and encoder when `TX_BUF_EN = 1` |
| `rx_ser_clk` | clock and data recovery (not in this RTL) | deserializer |
| RX word clock | `lll_sipo`, `rx_ser_clk` / 20 | comma aligner, decoder, buffer write side; with `RX_BUF_EN = 0`, also the frame receiver |
| `rx_user_clk` | FPGA, nominally the same frequency | buffer read side and frame receiver when `RX_BUF_EN = 1` |

`tx_clk_out` and `rx_clk_out` are the clocks the user logic must use for the
sample interfaces in the chosen configuration.

`rst_n` is an active-low, asynchronous reset for every register. The word
clocks come from the divider flops and stop while reset is held. Reset must
therefore be entered with a falling edge of `rst_n`. Holding it low from time
zero is not enough.

## The link network and the data concentrator

`lll_llrf_system` wires link instances into the three hops listed at the top:

```
DAQ 0..3 --link #1--> concentrator --link #2--+
                                              +--> processing unit --link #3--> vector modulator
DAQ 4..7 --link #1----------------------------+
```

Each `lll_link_top` instance holds both ends of one hop. Its transmitter
belongs to the sending module and its receiver to the receiving one. The
serial lines and the recovered bit clocks are ports, so fibres and clock
recovery stay outside. The DAQ signal processing, the controller algorithm
and the vector modulator are outside too: their sample interfaces are ports.

**Clocks.** Every module has its own bit clock. Every link uses the default
configuration (TX FIFO bypassed, RX elastic buffer on). So each module's logic
runs on the word clock of its own transmitter, and its incoming links' elastic
buffers are read with that clock:

- DAQ boards: `daq_clk_out`;
- concentrator: the transmit word clock of link #2;
- processing unit: `pu_clk_out`, the transmit word clock of link #3;
- vector modulator: `vm_clk_out`. It has no outgoing link, so a serializer
  divider on its own bit clock makes this clock.

Crossing a clock domain therefore always happens in an elastic buffer. Nothing
else needs a synchronizer.

**Concentrator (`lll_concentrator`).** It adds the partial vector sums of its
DAQ boards, I and Q separately, and sends the sum over link #2.

- Each input's sample is held until every input has delivered one. The sum
  is registered on the next clock edge.
- Sums saturate to 16-bit two's complement.
- A frame dropped for a CRC error would otherwise stall the concentrator. So
  if some input is still silent at the `WINDOW`-th clock (16) after the first
  arrival, the sum of the inputs that did arrive goes out. `missing` marks the
  absent inputs until the next sum.
- The sum waits in a one-deep register until link #2 takes it. If a newer sum
  overwrites it, `overrun` pulses. This cannot happen when all boards send at
  the rate one link can carry.

**Latency of the chain.** Simulated at 3.125 Gb/s with ±0.2 % offsets between
all module clocks and 10–30 bits of line delay, a sample takes 283–333 ns from
the DAQ board to the vector modulator output. This includes:

- three links;
- the concentrator (one word clock);
- a one-clock processing-unit model in the testbench.

That is about half of the 600 ns that three hops of 200 ns would allow.

## Interfaces

- **Transmit.** A sample is taken at a `tx_clk_out` edge where both
  `tx_iq_valid` and `tx_iq_ready` are high. `tx_iq_ready` stays low for four
  word clocks after that: three frame words and one idle word. At most one
  sample can go out every 4 × 6.4 ns = 25.6 ns.
- **Receive.** A good frame gives a one-cycle `rx_iq_valid` pulse on
  `rx_clk_out`, with the sample on `rx_i` and `rx_q`. Failed frames are
  dropped and flagged:
  - `rx_crc_err`: the checksum did not match;
  - `rx_frame_err`: a control word or an undecodable word arrived inside the
    frame.
- **Status.**
  - `rx_aligned`, `rx_comma_det`, `rx_realign`: comma alignment.
  - `rx_code_err`, `rx_disp_err`: 8B/10B code errors, per symbol.
  - `rx_cc_insert`, `rx_cc_remove`: clock correction.
  - `rx_buf_level`, `rx_buf_underflow`, `rx_buf_overflow`: elastic buffer
    state.
  - `tx_fifo_error`: the TX FIFO pointers left the range that locked clocks
    allow.

## Files

| file | content |
|---|---|
| `rtl/lll_pkg.sv` | word type `pcs_word_t`, the comma, idle character and idle word, CRC function |
| `rtl/lll_8b10b_pkg.sv` | 8B/10B tables, encode and decode functions |
| `rtl/lll_crc16.sv` | CRC-16 over I and Q |
| `rtl/lll_frame_tx.sv`, `rtl/lll_frame_rx.sv` | frame transmitter and receiver |
| `rtl/lll_enc8b10b.sv`, `rtl/lll_dec8b10b.sv` | two-symbol encoder and decoder |
| `rtl/lll_piso.sv`, `rtl/lll_sipo.sv` | serializer and deserializer, with the divide-by-20 word clocks |
| `rtl/lll_comma_align.sv` | comma search over 20 bit offsets |
| `rtl/lll_tx_phase_fifo.sv`, `rtl/lll_rx_elastic_buffer.sv`, `rtl/lll_gray_sync.sv` | the two buffers and their pointer synchronizer |
| `rtl/lll_link_top.sv` | the whole link, both ends |
| `rtl/lll_concentrator.sv` | data concentrator: sum of the DAQ boards' partial vector sums |
| `rtl/lll_llrf_system.sv` | the link network: DAQ links, concentrator, links #2 and #3 |
| `tb/tb_*.sv` | one self-checking testbench per module, the end-to-end tests `tb_lll_link_top` (one link) and `tb_lll_llrf_system` (whole network), and the latency comparison `tb_lll_link_latency` (with its helper `tb/lll_lat_probe.sv`) |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Timing is in ns, so give Verilator a time scale. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb \
  rtl/lll_pkg.sv rtl/lll_8b10b_pkg.sv tb/tb_lll_link_top.sv \
  --top-module tb_lll_link_top -Mdir obj_top
obj_top/Vtb_lll_link_top
```

The handshake rules of the frame transmitter, the elastic buffer and the
concentrator are also written as concurrent assertions, which `--assert`
turns on.

Replace `tb_lll_link_top` with any other testbench name. Each one takes a
few seconds at most.

- **`tb_lll_link_top`** runs the link at its default parameters through a
  looped-back line:
  - it sends 400 samples;
  - it flips a bit inside every 25th frame; those frames must never be
    delivered;
  - it slips the line by one bit, which forces a new comma alignment;
  - it runs the receive clock first 0.3 % slow and then 0.3 % fast, so the
    elastic buffer both removes and inserts idle words.

  Every good sample must arrive unchanged, in order and within 200 ns. The
  test fails if any of these mechanisms never happened.
- **`tb_lll_llrf_system`** runs the whole network at its default
  parameters (8 DAQ boards) for 150 control cycles:
  - every module has its own bit clock, with an offset of up to ±0.2 %;
  - every tenth cycle uses near full-scale samples, so the sums saturate;
  - some cycles corrupt one frame to the concentrator, so the concentrator
    times out and sends a three-input sum;
  - one line to the processing unit slips by one bit.

  A processing-unit model checks every partial sum and DAQ sample, adds them
  up and sends the total over link #3. The vector modulator output is then
  checked too. The test also checks the 600 ns budget of three hops. It fails
  if saturation, a CRC error, a timeout, an idle insertion, an idle removal or
  the realignment never happened.
- **`tb_lll_concentrator`** checks the concentrator cycle by cycle against a
  reference model, including timeouts and overruns.
- **`tb_lll_link_latency`** produces the latency table above and checks the
  differences between configurations.

## Design choices not fixed by the link definition

These are this design's own choices. Change them together with both ends of a
link.

- **Idle character:** K28.0. The comma is K28.5.
- **Byte order:** the comma goes in symbol 0 (bits 7:0, sent first). The
  comma aligner puts it there on the receive side.
- **CRC:** polynomial, initial value and bit order as above.
- **Gap between frames:** at least one idle word after every frame
  (`MIN_IDLE`).
- **Clock correction window:** `CLK_COR_MAX_LAT = CLK_COR_MIN_LAT + 4`
  symbols. The unit of correction is the whole idle word.
- **Buffer sizes and rules:** the elastic buffer holds 32 words and the TX
  FIFO 8 words. The start-up rules and error flags are also this design's.
- **Decoder:** all twelve 8B/10B control characters are decoded.
- **Code errors:** a word with an 8B/10B code error is passed on as a
  non-idle control word. It ends any frame in progress, and the elastic buffer
  never takes it for clock correction.
- **Not modelled:**
  - the analog parts of the transceiver: receiver, equalizer, clock and data
    recovery, PLL, output driver and pre-emphasis;
  - the phase alignment circuits that replace the buffers when they are
    bypassed.

  Their clocks are ports of `lll_link_top`.
- **Concentrator:** 4 inputs per concentrator and 4 DAQ boards at the
  processing unit. Saturating 16-bit sums, the timeout `WINDOW` and the
  overrun flag are also this design's choices.
- **The rest of the controller** uses the links but is not part of this RTL.
  Its interfaces are ports of `lll_llrf_system`:
  - the DAQ boards' signal processing;
  - the controller algorithm in the processing unit;
  - the vector modulator's DACs and RF part.

  A concentrator would instantiate one link receiver per DAQ board and one
  transmitter towards the main unit.
