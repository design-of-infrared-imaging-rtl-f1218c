// lwir_top: image path of the FPGA preprocessing board of an uncooled LWIR
// imager, from the detector board's LVDS link to the two UPP ports of the DSP.
//
//   detector board --4 LVDS pairs + clock--> lvds_deser (bit clock, 7:1)
//        --28-bit word, sampled in the pixel clock--> ad_receiver
//   det_timing (pixel clock) --row/frame timing--> ad_receiver, and out to
//        the detector board
//   ad_receiver --channel A words--> async_fifo A --> upp_tx A --> UPP port A
//               --channel B words--> async_fifo B --> upp_tx B --> UPP port B
//
// The 640x480 format, the 25 Hz single-output and 50 Hz dual-output modes,
// the 14-bit samples on four LVDS pairs, the 3AAA/3AAB frame header, the
// 10 MHz write / 75 MHz read FIFO cache, and the two 16-bit UPP send ports
// (START, ENABLE, WAIT, DATA) follow the source design, as do the command
// links next to the image path: two UARTs (DSP, external devices) and an SPI
// port for the DSP, brought out here at byte level. Which detector output
// goes to which UPP port, the blanking, the sample latency, the FIFO depth
// and the bit order on the LVDS pairs are this design's choices (see the
// individual modules).
//
// Clocks: clk_ser is the LVDS bit clock (7 x clk_pix, phase-aligned by a PLL
// outside this block); clk_pix is the 10 MHz pixel / FIFO write clock;
// clk_upp is the 75 MHz UPP clock, forwarded to the DSP on upp_clk_o.
// rst_n is asynchronous; each domain gets its own synchronised release
// (a two-flop synchroniser whose output drives the asynchronous resets of
// that domain, so those flops are both clocked and used as a reset).
// upp_clk_o is clk_upp itself; on the FPGA it would leave through a
// dedicated clock output.
// mode_i and en_i are taken by the timing generator only between frames. The start
// level of each UPP line is one detector row of the current mode (640 words
// single, 320 words dual), so a whole row is cached before it is sent.
module lwir_top
  import lwir_pkg::*;
#(
  parameter int unsigned COLS       = DET_COLS,
  parameter int unsigned ROWS       = DET_ROWS,
  parameter int unsigned H_BLANK    = 160,
  parameter int unsigned V_BLANK    = 20,
  parameter int unsigned SAMPLE_LAT = 6,
  parameter int unsigned FIFO_DEPTH = 1024
) (
  input  logic              clk_ser,
  input  logic              clk_pix,
  input  logic              clk_upp,
  input  logic              rst_n,
  // control
  input  logic              en_i,
  input  det_mode_e         mode_i,
  // detector board link
  input  logic [3:0]        lvds_lane_i,
  input  logic              lvds_clk_i,
  output logic              det_line_valid_o,
  output logic              det_frame_start_o,
  output det_mode_e         det_mode_o,
  // UPP ports to the DSP, index 0 = channel A, 1 = channel B
  output logic              upp_clk_o,
  output logic [1:0]        upp_start_o,
  output logic [1:0]        upp_enable_o,
  input  logic [1:0]        upp_wait_i,
  output logic [1:0][UPP_W-1:0] upp_data_o,
  // status
  output logic              link_locked_o,
  output logic [1:0]        fifo_overflow_o,
  output logic [31:0]       frame_cnt_o,
  output logic [1:0][31:0]  line_cnt_o,
  output logic [1:0][31:0]  wait_cnt_o,
  output logic [1:0][31:0]  underrun_cnt_o,
  // command UARTs, index 0 = DSP link, 1 = external link (clk_pix domain)
  output logic [1:0]        uart_txd_o,
  input  logic [1:0]        uart_rxd_i,
  input  logic [1:0][7:0]   uart_tx_data_i,
  input  logic [1:0]        uart_tx_valid_i,
  output logic [1:0]        uart_tx_ready_o,
  output logic [1:0][7:0]   uart_rx_data_o,
  output logic [1:0]        uart_rx_valid_o,
  output logic [1:0]        uart_rx_err_o,
  // command SPI from the DSP (clk_upp domain)
  input  logic              spi_sclk_i,
  input  logic              spi_cs_n_i,
  input  logic              spi_mosi_i,
  output logic              spi_miso_o,
  output logic              spi_miso_oe_o,
  output logic [7:0]        spi_rx_data_o,
  output logic              spi_rx_valid_o,
  input  logic [7:0]        spi_tx_data_i,
  output logic              spi_tx_load_o
);

  localparam int unsigned CW = $clog2(FIFO_DEPTH) + 1;
  localparam int unsigned HW = $clog2(COLS + H_BLANK);
  localparam int unsigned VW = $clog2(ROWS + V_BLANK);

  // ---------------- reset release per clock domain ----------------
  logic [1:0] rs_ser, rs_pix, rs_upp;
  logic       rst_ser_n, rst_pix_n, rst_upp_n;

  always_ff @(posedge clk_ser or negedge rst_n)
    if (!rst_n) rs_ser <= '0; else rs_ser <= {rs_ser[0], 1'b1};
  always_ff @(posedge clk_pix or negedge rst_n)
    if (!rst_n) rs_pix <= '0; else rs_pix <= {rs_pix[0], 1'b1};
  always_ff @(posedge clk_upp or negedge rst_n)
    if (!rst_n) rs_upp <= '0; else rs_upp <= {rs_upp[0], 1'b1};

  assign rst_ser_n = rs_ser[1];
  assign rst_pix_n = rs_pix[1];
  assign rst_upp_n = rs_upp[1];

  // ---------------- LVDS receive ----------------
  logic [27:0] ser_word;
  logic        ser_stb;
  logic [27:0] pix_sample;

  lvds_deser #(.LANES(4), .SLOTS(7)) u_deser (
    .clk_ser    (clk_ser),
    .rst_n      (rst_ser_n),
    .lane_i     (lvds_lane_i),
    .lclk_i     (lvds_clk_i),
    .word_o     (ser_word),
    .word_stb_o (ser_stb),
    .locked_o   (link_locked_o)
  );

  // The deserialiser holds each word for a whole pixel clock; the pixel
  // clock is frequency-locked to it, so a plain register takes it over.
  always_ff @(posedge clk_pix or negedge rst_pix_n)
    if (!rst_pix_n) pix_sample <= '0; else pix_sample <= ser_word;

  // ---------------- detector timing ----------------
  det_mode_e     frame_mode;
  logic          line_valid, frame_start, line_end, frame_end;
  logic [HW-1:0] col;
  logic [VW-1:0] row;

  det_timing #(.COLS(COLS), .ROWS(ROWS), .H_BLANK(H_BLANK), .V_BLANK(V_BLANK)) u_timing (
    .clk_pix       (clk_pix),
    .rst_n         (rst_pix_n),
    .en_i          (en_i),
    .mode_i        (mode_i),
    .mode_o        (frame_mode),
    .line_valid_o  (line_valid),
    .frame_start_o (frame_start),
    .line_end_o    (line_end),
    .frame_end_o   (frame_end),
    .col_o         (col),
    .row_o         (row)
  );

  assign det_line_valid_o  = line_valid;
  assign det_frame_start_o = frame_start;
  assign det_mode_o        = frame_mode;

  // ---------------- frame formatting ----------------
  logic      [1:0] ch_valid;
  pix_word_t [1:0] ch_word;

  ad_receiver #(.SAMPLE_LAT(SAMPLE_LAT)) u_rx (
    .clk_pix       (clk_pix),
    .rst_n         (rst_pix_n),
    .mode_i        (frame_mode),
    .line_valid_i  (line_valid),
    .frame_start_i (frame_start),
    .line_end_i    (line_end),
    .frame_end_i   (frame_end),
    .sample_i      (pix_sample),
    .a_valid_o     (ch_valid[0]),
    .a_word_o      (ch_word[0]),
    .b_valid_o     (ch_valid[1]),
    .b_word_o      (ch_word[1]),
    .frame_cnt_o   (frame_cnt_o)
  );

  // ---------------- start level in the UPP clock domain ----------------
  logic [1:0]    mode_s;
  logic [CW-1:0] start_level;

  always_ff @(posedge clk_upp or negedge rst_upp_n)
    if (!rst_upp_n) mode_s <= '0; else mode_s <= {mode_s[0], frame_mode};

  assign start_level = mode_s[1] ? CW'(COLS / 2) : CW'(COLS);

  assign upp_clk_o = clk_upp;

  // ---------------- two cached UPP channels ----------------
  for (genvar c = 0; c < 2; c++) begin : g_ch
    logic          empty, rd;
    pix_word_t     head;
    logic [CW-1:0] count;

    async_fifo #(.WIDTH($bits(pix_word_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
      .wclk       (clk_pix),
      .wrst_n     (rst_pix_n),
      .wr_en_i    (ch_valid[c]),
      .wr_data_i  (ch_word[c]),
      .full_o     (),
      .overflow_o (fifo_overflow_o[c]),
      .rclk       (clk_upp),
      .rrst_n     (rst_upp_n),
      .rd_en_i    (rd),
      .rd_data_o  (head),
      .empty_o    (empty),
      .rd_count_o (count)
    );

    upp_tx #(.CNT_W(CW)) u_upp (
      .clk            (clk_upp),
      .rst_n          (rst_upp_n),
      .start_level_i  (start_level),
      .fifo_empty_i   (empty),
      .fifo_data_i    (head),
      .fifo_count_i   (count),
      .fifo_rd_o      (rd),
      .upp_start_o    (upp_start_o[c]),
      .upp_enable_o   (upp_enable_o[c]),
      .upp_wait_i     (upp_wait_i[c]),
      .upp_data_o     (upp_data_o[c]),
      .busy_o         (),
      .line_cnt_o     (line_cnt_o[c]),
      .wait_cnt_o     (wait_cnt_o[c]),
      .underrun_cnt_o (underrun_cnt_o[c])
    );
  end

  // ---------------- command links ----------------
  // The command protocol is not part of this block: bytes are exchanged
  // with the surrounding logic (or a soft processor) through these ports.
  for (genvar u = 0; u < 2; u++) begin : g_uart
    uart_link #(.CLKS_PER_BIT(87)) u_uart (
      .clk            (clk_pix),
      .rst_n          (rst_pix_n),
      .tx_data_i      (uart_tx_data_i[u]),
      .tx_valid_i     (uart_tx_valid_i[u]),
      .tx_ready_o     (uart_tx_ready_o[u]),
      .txd_o          (uart_txd_o[u]),
      .rxd_i          (uart_rxd_i[u]),
      .rx_data_o      (uart_rx_data_o[u]),
      .rx_valid_o     (uart_rx_valid_o[u]),
      .rx_frame_err_o (uart_rx_err_o[u])
    );
  end

  spi_slave u_spi (
    .clk        (clk_upp),
    .rst_n      (rst_upp_n),
    .sclk_i     (spi_sclk_i),
    .cs_n_i     (spi_cs_n_i),
    .mosi_i     (spi_mosi_i),
    .miso_o     (spi_miso_o),
    .miso_oe_o  (spi_miso_oe_o),
    .rx_data_o  (spi_rx_data_o),
    .rx_valid_o (spi_rx_valid_o),
    .tx_data_i  (spi_tx_data_i),
    .tx_load_o  (spi_tx_load_o)
  );

endmodule
