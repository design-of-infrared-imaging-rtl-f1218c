// tb_lwir_top: end-to-end test of the FPGA image path at its default size
// (640x480 detector, 10 MHz pixel clock, 75 MHz UPP clock).
//
// Models around the design:
//   detector board: follows the row/frame timing the FPGA sends, produces a
//     14-bit sample per output and pixel (a value that encodes output, frame,
//     row and column), and serialises each pair of samples onto the four LVDS
//     lanes plus clock lane, DET_DLY pixel clocks after the timing asked for
//     it (ADC pipeline);
//   DSP: one UPP receive model per channel, which takes a word at every UPP
//     clock edge with ENABLE high and raises WAIT at random.
// The testbench builds the expected word stream of each channel on its own
// (header 3AAA 3AAB, then the samples, a new UPP line at each row) and
// compares every received word and START position with it.
//
// Sequence: two dual-output (50 Hz) frames, a switch to single output
// (25 Hz) for two frames, back to dual for one frame, and a last dual frame
// during which the DSP holds channel B's WAIT long enough to overflow its
// FIFO. Mechanisms counted, each must occur: frame header, row caching
// before a line starts, WAIT stall, both modes and the switch between
// them, FIFO overflow, and a stop that lets the frame in progress finish.
// Meanwhile the two command UARTs, cross-connected, exchange bytes, and an
// SPI master model exchanges bytes with the SPI port. Frame periods are checked against
// 50 Hz / 25 Hz at the pixel clock used.
`timescale 1ns/1ps
module tb_lwir_top;
  import lwir_pkg::*;

  localparam int COLS = DET_COLS, ROWS = DET_ROWS;
  localparam int DET_DLY = 3;

  logic clk_ser = 0, clk_pix = 0, clk_upp = 0, rst_n = 0;
  logic en = 0;
  det_mode_e mode = MODE_DUAL_50HZ;
  logic [3:0] lane = '0;
  logic lclk = 0;
  logic lv, fs;
  det_mode_e dmode;
  logic upp_clk;
  logic [1:0] ustart, uen, uwait = '0;
  logic [1:0][15:0] udata;
  logic locked;
  logic [1:0] ovf;
  logic [31:0] frames;
  logic [1:0][31:0] lines, waits, underruns;

  lwir_top dut (
    .clk_ser(clk_ser), .clk_pix(clk_pix), .clk_upp(clk_upp), .rst_n(rst_n),
    .en_i(en), .mode_i(mode), .lvds_lane_i(lane), .lvds_clk_i(lclk),
    .det_line_valid_o(lv), .det_frame_start_o(fs), .det_mode_o(dmode),
    .upp_clk_o(upp_clk), .upp_start_o(ustart), .upp_enable_o(uen),
    .upp_wait_i(uwait), .upp_data_o(udata), .link_locked_o(locked),
    .fifo_overflow_o(ovf), .frame_cnt_o(frames), .line_cnt_o(lines),
    .wait_cnt_o(waits), .underrun_cnt_o(underruns),
    .uart_txd_o(utxd), .uart_rxd_i({utxd[0], utxd[1]}), .uart_tx_data_i(utx_data),
    .uart_tx_valid_i(utx_valid), .uart_tx_ready_o(utx_ready), .uart_rx_data_o(urx_data),
    .uart_rx_valid_o(urx_valid), .uart_rx_err_o(urx_err),
    .spi_sclk_i(sclk), .spi_cs_n_i(cs_n), .spi_mosi_i(mosi), .spi_miso_o(miso),
    .spi_miso_oe_o(miso_oe), .spi_rx_data_o(spi_rx), .spi_rx_valid_o(spi_rx_valid),
    .spi_tx_data_i(spi_tx), .spi_tx_load_o(spi_load));

  // Command links: the two UARTs are cross-connected, the SPI port is driven
  // by a mode-0 master model
  logic [1:0] utxd, utx_ready, urx_valid, urx_err, utx_valid = '0;
  logic [1:0][7:0] utx_data = '0, urx_data;
  logic sclk = 0, cs_n = 1, mosi = 0, miso, miso_oe, spi_rx_valid, spi_load;
  logic [7:0] spi_rx, spi_tx = 8'hC3;
  logic [7:0] uart_exp [2][$];
  int uart_rx_ok = 0, spi_rx_ok = 0, spi_tx_ok = 0;
  logic [7:0] spi_exp [$];

  always @(posedge clk_pix) begin
    for (int u = 0; u < 2; u++) begin
      if (rst_n && urx_valid[u]) begin
        checks++;
        if (uart_exp[u].size() && urx_data[u] === uart_exp[u][0]) uart_rx_ok++;
        else fail($sformatf("UART %0d received %h", u, urx_data[u]));
        if (uart_exp[u].size()) void'(uart_exp[u].pop_front());
      end
      if (rst_n && urx_err[u]) fail("UART framing error");
    end
  end

  always @(posedge clk_upp) begin
    if (rst_n && spi_rx_valid) begin
      checks++;
      if (spi_exp.size() && spi_rx === spi_exp[0]) spi_rx_ok++;
      else fail($sformatf("SPI received %h", spi_rx));
      if (spi_exp.size()) void'(spi_exp.pop_front());
    end
  end

  // UART u sends byte b; it arrives at the other UART
  task automatic uart_send(input int u, input logic [7:0] b);
    @(negedge clk_pix);
    while (!utx_ready[u]) @(negedge clk_pix);
    utx_data[u] = b; utx_valid[u] = 1;
    uart_exp[1 - u].push_back(b);
    @(negedge clk_pix);
    utx_valid[u] = 0;
  endtask

  // SPI master: one byte out, the port answers with spi_tx (fixed C3)
  task automatic spi_byte(input logic [7:0] b);
    logic [7:0] in;
    spi_exp.push_back(b);
    cs_n = 0;
    repeat (4) @(posedge clk_upp);
    for (int i = 7; i >= 0; i--) begin
      mosi = b[i];
      repeat (4) @(posedge clk_upp);
      sclk = 1; in[i] = miso;
      repeat (4) @(posedge clk_upp);
      sclk = 0;
    end
    repeat (4) @(posedge clk_upp);
    cs_n = 1;
    repeat (8) @(posedge clk_upp);
    checks++;
    if (in === 8'hC3) spi_tx_ok++; else fail($sformatf("SPI master read %h", in));
  endtask

  // Clocks: bit clock 7x the pixel clock, edges aligned; UPP clock 75 MHz
  always #7     clk_ser = ~clk_ser;   // 71.4 MHz
  always #49    clk_pix = ~clk_pix;   // 10.2 MHz
  always #6.667 clk_upp = ~clk_upp;   // 75 MHz

  int checks = 0, failures = 0;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL %s at %0t", msg, $time);
  endtask

  function automatic logic [13:0] sample(input int out, input int f, input int r, input int c);
    return 14'((out * 8191) ^ (f * 977) ^ (r * 37) ^ (c * 11) ^ ((r * c) & 15));
  endfunction

  // ---------------- detector board model ----------------
  typedef struct { logic [15:0] data; bit start; } exp_t;
  exp_t exp_q [2][$];
  logic [27:0] adc_pipe [$];
  logic [27:0] tx_word = '0;
  int   det_row = 0, det_col = 0, det_frame = -1;
  bit   b_check = 1;       // channel B compared (cleared when it overflows)
  bit   next_start [2] = '{1, 1};

  task automatic expect_word(input int ch, input logic [15:0] d, input bit eol);
    exp_t e;
    e.data = d; e.start = next_start[ch];
    exp_q[ch].push_back(e);
    next_start[ch] = eol;
  endtask

  always @(posedge clk_pix) begin
    logic [13:0] s1, s2;
    int act;
    act = (dmode == MODE_DUAL_50HZ) ? COLS / 2 : COLS;
    s1 = '0; s2 = 14'($urandom);
    if (rst_n && fs) begin
      det_frame++; det_row = 0; det_col = 0;
      expect_word(0, HDR_WORD0, 0); expect_word(0, HDR_WORD1, 0);
      if (dmode == MODE_DUAL_50HZ) begin
        expect_word(1, HDR_WORD0, 0); expect_word(1, HDR_WORD1, 0);
      end
    end
    if (rst_n && lv) begin
      s1 = sample(0, det_frame, det_row, det_col);
      s2 = sample(1, det_frame, det_row, det_col);
      expect_word(0, 16'(s1), det_col == act - 1);
      if (dmode == MODE_DUAL_50HZ) expect_word(1, 16'(s2), det_col == act - 1);
      if (det_col == act - 1) begin det_col = 0; det_row++; end
      else det_col++;
    end
    adc_pipe.push_back({s2, s1});
    if (adc_pipe.size() > DET_DLY) tx_word <= adc_pipe.pop_front();
  end

  // Serialiser: a new word starts mid pixel clock, slot k on lane L = bit 7L+k
  int ser_ph = 0;
  logic [27:0] cur_word = '0;
  always @(posedge clk_ser) ser_ph <= (ser_ph + 1) % 7;
  always @(negedge clk_ser) begin
    int slot;
    slot = (ser_ph + 3) % 7;
    if (slot == 0) cur_word = tx_word;
    for (int l = 0; l < 4; l++) lane[l] <= cur_word[7*l+slot];
    lclk <= (slot < 4);
  end

  // ---------------- DSP UPP receive models ----------------
  int words_rx [2] = '{0, 0};
  int hdr_rx = 0;
  always @(posedge upp_clk) begin
    for (int ch = 0; ch < 2; ch++) begin
      if (rst_n && uen[ch] && (ch == 0 || b_check)) begin
        checks++;
        words_rx[ch]++;
        if (udata[ch] == HDR_WORD0 && ustart[ch]) hdr_rx++;
        if (exp_q[ch].size() == 0) fail($sformatf("ch%0d unexpected word %h", ch, udata[ch]));
        else begin
          if (udata[ch] !== exp_q[ch][0].data)
            fail($sformatf("ch%0d data %h expected %h", ch, udata[ch], exp_q[ch][0].data));
          if (ustart[ch] !== exp_q[ch][0].start)
            fail($sformatf("ch%0d START %b expected %b", ch, ustart[ch], exp_q[ch][0].start));
          void'(exp_q[ch].pop_front());
        end
      end
    end
  end

  bit wait_random = 1;
  always @(negedge upp_clk) begin
    if (wait_random) uwait <= {($urandom_range(99) < 10), ($urandom_range(99) < 10)};
  end

  // ---------------- frame period measurement ----------------
  longint pix_cyc = 0, last_fs = -1;
  int dual_frames = 0, single_frames = 0, mode_switches = 0;
  det_mode_e last_mode = MODE_DUAL_50HZ;
  always @(posedge clk_pix) begin
    pix_cyc++;
    if (rst_n && fs) begin
      if (last_fs >= 0) begin
        checks++;
        if (pix_cyc - last_fs != ((last_mode == MODE_DUAL_50HZ) ? 200000 : 400000))
          fail($sformatf("frame period %0d clocks in mode %0d", pix_cyc - last_fs, last_mode));
      end
      if (last_fs >= 0 && dmode != last_mode) mode_switches++;
      if (dmode == MODE_DUAL_50HZ) dual_frames++; else single_frames++;
      last_fs = pix_cyc;
      last_mode = dmode;
    end
  end

  initial begin
    #400ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_frames(input int n);
    repeat (n) @(posedge clk_pix iff fs);
  endtask

  initial begin
    repeat (5) @(posedge clk_pix);
    rst_n = 1;
    repeat (5) @(posedge clk_pix);
    en = 1;
    mode = MODE_DUAL_50HZ;
    // command traffic while the first frame streams
    fork
      for (int i = 0; i < 4; i++) begin uart_send(0, 8'(8'h10 + i)); uart_send(1, 8'(8'hE0 + i)); end
      for (int i = 0; i < 4; i++) spi_byte(8'(8'h5A ^ i));
    join_none
    wait_frames(2);
    mode = MODE_SINGLE_25HZ;           // taken at the next frame boundary
    wait_frames(3);
    mode = MODE_DUAL_50HZ;
    wait_frames(2);
    // Overflow: channel B's DSP stops taking data for several rows
    b_check = 0;
    wait_random = 0;
    uwait = 2'b10;
    repeat (3000) @(posedge clk_pix);
    uwait = 2'b00;
    checks++;
    if (!ovf[1]) fail("channel B FIFO did not overflow");
    checks++;
    if (ovf[0]) fail("channel A FIFO overflowed");
    wait_frames(1);
    en = 0;                            // stops after the frame in progress
    repeat (410000) @(posedge clk_pix);
    // Channel A must have delivered everything
    checks++;
    if (exp_q[0].size() != 0) fail($sformatf("channel A %0d words missing", exp_q[0].size()));
    checks++;
    if (!locked) fail("LVDS link not locked");
    checks++;
    if (frames != 8) fail($sformatf("%0d frames, expected 8", frames));
    // Mechanism counts
    $display("frames %0d (dual %0d, single %0d, switches %0d), headers %0d",
             frames, dual_frames, single_frames, mode_switches, hdr_rx);
    $display("lines A %0d B %0d, wait stalls A %0d B %0d, underruns A %0d B %0d",
             lines[0], lines[1], waits[0], waits[1], underruns[0], underruns[1]);
    $display("UART bytes received %0d, SPI bytes received %0d, SPI replies %0d",
             uart_rx_ok, spi_rx_ok, spi_tx_ok);
    checks++; if (uart_rx_ok != 8)      fail("UART bytes missing");
    checks++; if (spi_rx_ok != 4 || spi_tx_ok != 4) fail("SPI bytes missing");
    checks++; if (hdr_rx == 0)          fail("no frame header");
    checks++; if (dual_frames == 0)     fail("no dual-output frame");
    checks++; if (single_frames == 0)   fail("no single-output frame");
    checks++; if (mode_switches < 2)    fail("mode switch missing");
    checks++; if (waits[0] == 0 || waits[1] == 0) fail("WAIT never stalled");
    checks++; if (lines[0] < 480 * 6)   fail($sformatf("too few lines on A: %0d", lines[0]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
