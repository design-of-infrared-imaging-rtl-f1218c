# Uncooled LWIR imager: FPGA image path to the DSP

This RTL is the FPGA part of an uncooled long-wave infrared camera built for a
small UAV. The camera is a stack of four boards:

- a detector board with a 640×480 microbolometer, its ADCs and an LVDS serialiser;
- an FPGA preprocessing board;
- a DSP board that runs tracking and matching;
- a power and interface board.

The FPGA drives the detector's read-out timing and receives the digitised
pixels over four LVDS pairs. It puts a two-word header in front of each frame
and sends the rows to the DSP over two 16-bit UPP ports. UPP is the "universal
parallel port" of TI C66x DSPs. The pixels come in at a slow 10 MHz pixel clock
and leave at a fast 75 MHz UPP clock. The core idea is a cache FIFO on each
UPP channel: a row is buffered until it is complete, then sent to the DSP as
one UPP line.

The command links next to the image path are also here: two UARTs and an SPI
port. They are transceivers only, because no command set is defined for them.

## Data flow

```
 detector board                      FPGA (lwir_top)                                   DSP
 ───────────────                     ───────────────────────────────────────────────   ───
 4 LVDS pairs + clock ──> lvds_deser ──28 bit──> ad_receiver ─A─> async_fifo ─> upp_tx ──> UPP A
                         (bit clock)            (pixel clock) ─B─> async_fifo ─> upp_tx ──> UPP B
 row/frame timing  <──── det_timing ──────────────┘              10 MHz │ 75 MHz
```

| module | clock | role |
|---|---|---|
| `lwir_pkg` | – | shared constants (640×480, 14-bit samples, 16-bit UPP, header words) and types |
| `lvds_deser` | `clk_ser` (7× pixel) | 7:1 receiver; 4 pairs × 7 bits = two 14-bit samples per pixel clock |
| `det_timing` | `clk_pix` 10 MHz | row/frame counters for the two read-out modes |
| `ad_receiver` | `clk_pix` | aligns samples with the timing, inserts the header, splits into channels A/B |
| `async_fifo` | `clk_pix` → `clk_upp` | row cache with a fill level visible to the reader |
| `upp_tx` | `clk_upp` 75 MHz | UPP START/ENABLE/WAIT/DATA sender |
| `uart_link` | `clk_pix` | 8N1 UART, two instances (DSP link, external link) |
| `spi_slave` | `clk_upp` | mode-0 SPI slave for the DSP |
| `lwir_top` | all | wiring, reset release per clock domain |

## Read-out modes

The detector has one or two analog outputs:

| `mode_i` | outputs used | samples per row per output | clocks per row | rows per frame | frame rate at 10 MHz |
|---|---|---|---|---|---|
| `MODE_SINGLE_25HZ` (0) | output 1 | 640 | 800 | 500 | 25 Hz |
| `MODE_DUAL_50HZ` (1) | outputs 1 and 2 | 320 | 400 | 500 | 50 Hz |

In dual mode each output carries half of every row. Output 1 goes to UPP
channel A and output 2 to channel B. In single mode only channel A carries
data and channel B stays idle. Putting the two halves of a row back together
is left to the DSP.

`det_timing` samples `mode_i` and `en_i` only between frames. A frame is
therefore never cut short or mixed between modes. After `en_i` falls, the
frame in progress runs to its end.

The 640×480 size, the two modes, their rates and the 10 MHz clock are the
design's specification. The blanking that produces exactly 25 Hz and 50 Hz
is a choice of this RTL:

- `H_BLANK` = 160 clocks per row in single mode, halved in dual mode;
- `V_BLANK` = 20 rows.

`det_timing` produces only the active-row window that frames the returned
data. It does not generate the detector's own analog control waveforms.

## What the DSP receives

Each channel sends each frame as one word stream:

```
3AAA  3AAB  p(0,0) p(0,1) ... p(0,N-1) | p(1,0) ... p(1,N-1) | ... | p(479,N-1)
└──────────── UPP line 0 ──────────────┘└──── UPP line 1 ─────┘
```

- N is 320 in dual mode and 640 in single mode.
- Each 14-bit sample is zero-extended to 16 bits.
- There is one UPP line per detector row. START marks the first word of each
  line.
- Line 0 carries the two header words, so it is two words longer than the
  other lines.
- A DSP-side DMA that is set up for a whole frame finds `3AAA 3AAB` at the
  start of its buffer, followed by the pixels.

Inside the FPGA each word carries three flags (`lwir_pkg::pix_word_t`):

- `sof`: header word 0;
- `eol`: last word of a row;
- `eof`: last word of a frame.

The transmitter uses `eol` to end UPP lines.

## Caching a row, then sending it

This is the part that needs the most care.

`ad_receiver` writes one word per 10 MHz clock while a row is active. The
reader runs at 75 MHz. If it began a line as soon as the first word arrived,
it would stall after every word. So `upp_tx` waits until the FIFO level seen
on the read side (`rd_count_o`) reaches `start_level_i`. It then pops words
at one per clock until it has sent the word flagged `eol`.

`lwir_top` sets the start level to one row of the current mode: 640 or 320.
The whole row is therefore in the FIFO before its line starts, and the line
leaves as a single burst.

Line 0 is the one exception. It starts when the header and the first 318
pixels are cached. The last two pixels arrive long before the burst reaches
them: the burst lasts about 4.3 µs, and about 40 more words arrive in that
time.

If the FIFO ever runs dry in the middle of a line, ENABLE drops until the
next word arrives. This can only happen with a lower start level. No START is
repeated, and `underrun_cnt_o` counts the lost clocks.

`async_fifo` has these properties:

- It uses the usual Gray-code pointer exchange with two-flop synchronisers.
- The read side is first-word-fall-through.
- The memory is read synchronously at the next read address, so it maps onto
  block RAM.
- A written word reaches the reader 2–3 read clocks later. By then the
  registered head word already holds it.
- With the default `DEPTH` of 1024 there is room for the longest line (642
  words) plus more than half a row.
- A write into a full FIFO drops the word and sets the sticky `overflow_o`
  flag. This happens only if the DSP holds WAIT for several rows. The words
  that were dropped may include a row's `eol`. In that case two rows leave as
  one UPP line until the next intact row. Treat `overflow_o` as a reason to
  discard the frame.

## The UPP send handshake

All UPP pins are in the `clk_upp` domain. `upp_clk_o` is `clk_upp` forwarded
to the DSP.

| pin | direction | meaning |
|---|---|---|
| `upp_start_o` | out | high for one clock with the first word of a line |
| `upp_enable_o` | out | the DSP takes `upp_data_o` at every rising edge where this is high |
| `upp_wait_i` | in | DSP asks the sender to pause |
| `upp_data_o[15:0]` | out | data |

WAIT is acted on in the clock after it is sampled high. ENABLE goes low and
the data holds. Sending resumes in the clock after WAIT is sampled low. A
word that is on the bus with ENABLE high in the clock where WAIT rises still
counts as transferred.

This design follows the stricter rule that ENABLE is withdrawn while
waiting. A receiver that samples data only when ENABLE is high accepts that,
as well as a sender that keeps ENABLE high during WAIT.

At 75 MHz × 16 bits a channel can move 150 MB/s. A 50 Hz frame needs about
15 MB/s per channel, so WAIT can be held for most of the time without loss.

## Detector link

The detector board serialises the two 14-bit ADC samples onto four LVDS data
pairs and one LVDS clock pair, 7 bits per pair per pixel clock.

`lvds_deser` samples the pairs with `clk_ser`, which is 7× the pixel clock
with the sampling phase already centred. A PLL outside this RTL provides that
clock. The receiver works as follows:

- The 0→1 edge of the sampled clock lane marks bit slot 0 of a word.
- Bit slot k of lane L is word bit 7L+k.
- Word bits 13:0 are output 1 and bits 27:14 are output 2.
- `locked_o` goes high once two clock-lane edges arrive exactly 7 slots apart.
  It drops when an edge is missing or early.

`clk_pix` is frequency-locked to `clk_ser`. `lwir_top` takes the word over
with a plain register, because the word is held stable for a whole pixel
clock.

The ADCs, the serialiser and the receiver delay the samples against the
timing that `det_timing` sends out. `ad_receiver` delays the timing by
`SAMPLE_LAT` pixel clocks (default 6) to line the two up. Measure the real
latency of the board and set this parameter to match it.

## Command links

`uart_link` is an 8N1 UART:

- 87 clocks per bit, which gives 115200 bit/s from 10 MHz;
- a byte handshake (`tx_valid_i`/`tx_ready_o`, `rx_valid_o`);
- receiver with a synchroniser, a start-bit re-check at half a bit, and
  sampling in the middle of each bit;
- a frame-error flag for a low stop bit.

`spi_slave` is a mode-0 SPI slave:

- 8-bit words, MSB first;
- pins oversampled at 75 MHz, so SCLK must be at most 18.75 MHz;
- a reply byte is loaded when CS_N falls and after each word.

The top brings out both links at byte level: `uart_*[0]` is the DSP link,
`uart_*[1]` the external link, and `spi_*` is the SPI port. Whatever decodes
the commands connects to these ports.

## What is not in the RTL

- The board-level parts. These are the detector, its bias supply, the ADCs
  and voltage reference, the TEC controller, the serialiser, the two external
  SRAMs, the LVDS line drivers, the DSP with its DDR3, NAND and EEPROM, the
  Ethernet PHY, the isolator, the RS-422 transceivers and the power supply.
- The detector's own control waveforms.
- The FPGA's "simple preprocessing" of the image. No algorithm is defined for
  it, so pixels pass to the DSP unchanged apart from formatting.
- The direct LVDS video output to the interface board. Its format is not
  defined.
- The SRIO link, which would be a vendor core.
- The command protocol on the UART and SPI links.

## Departures and choices to review

These are this design's own choices:

- the channel assignment of the two detector outputs;
- the blanking;
- `SAMPLE_LAT`;
- the LVDS bit order and clock-lane framing;
- the FIFO depth;
- the row-sized start level;
- the per-frame placement of the header, in UPP line 0;
- ENABLE being withdrawn during WAIT;
- the UART/SPI formats and rates;
- the status counters.

Each module's opening comment lists its own choices.

## Simulation

Every testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. Build and run one with
Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/lwir_pkg.sv \
          tb/tb_lwir_top.sv --top-module tb_lwir_top -o sim
./obj_dir/sim
```

`-y rtl` lets Verilator find each module in `rtl/<name>.sv`. The package is
named explicitly so that it is read first.

`tb_lwir_top` runs the top at its default, full size and takes about 20 s of
wall time. Its models are:

- a detector board that follows the FPGA's timing and returns coded samples
  through a serialiser model;
- a UPP receive model per channel, which raises WAIT at random.

The test sequence is:

1. two dual-mode frames;
2. three single-mode frames;
3. dual-mode frames again;
4. a stretch where channel B's WAIT is held until its FIFO overflows;
5. a stop.

Every received word, and the position of every START, is compared with an
independently built expected stream. The test also checks the frame periods
(200000 and 400000 pixel clocks) and the frame count. It counts the header,
both modes, the switches between them, the WAIT stalls and the overflow.
During the first frame the UARTs, cross-connected, and an SPI master model
exchange bytes.

The unit testbenches are `tb_lvds_deser`, `tb_det_timing`, `tb_ad_receiver`,
`tb_async_fifo`, `tb_upp_tx`, `tb_uart_link` and `tb_spi_slave`. Each
header comment says what that testbench checks.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `lwir_top`, `det_timing` | `COLS`, `ROWS` | 640, 480 | detector matrix |
| | `H_BLANK`, `V_BLANK` | 160, 20 | blanking (sets 25/50 Hz at 10 MHz) |
| `lwir_top`, `ad_receiver` | `SAMPLE_LAT` | 6 | sample return latency in pixel clocks |
| `lwir_top`, `async_fifo` | `FIFO_DEPTH` / `DEPTH` | 1024 | cache words per channel (power of two) |
| `lvds_deser` | `LANES`, `SLOTS` | 4, 7 | LVDS pairs, bits per pair per pixel |
| `uart_link` | `CLKS_PER_BIT` | 87 | bit time in clocks |

If `COLS` changes, the start level follows it automatically (`COLS` or
`COLS/2`). `FIFO_DEPTH` must stay above the longest line, `COLS + 2` words.
