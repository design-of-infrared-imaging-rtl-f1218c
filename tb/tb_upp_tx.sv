// tb_upp_tx: self-checking test of the UPP send channel.
//
// A first-word-fall-through FIFO model feeds the transmitter; a model of the
// DSP's UPP receive port takes a word at every clock edge with ENABLE high
// and splits lines at START. Checks:
//   - every word arrives once, in order; START marks exactly the first word
//     of each row (rows end at the eol flag);
//   - no line starts before the FIFO holds start_level words;
//   - a cached row with WAIT low goes out at one word per clock;
//   - ENABLE is low in every clock after one where WAIT was sampled high,
//     and transfer resumes after WAIT falls (stall count > 0);
//   - a FIFO that runs dry in mid-row pauses the line without a new START
//     (underrun count > 0).
`timescale 1ns/1ps
module tb_upp_tx;
  import lwir_pkg::*;

  localparam int ROW = 20;

  logic        clk = 0, rst_n = 0;
  logic [10:0] start_level = 11'(ROW);
  logic        empty, rd;
  pix_word_t   head;
  logic [10:0] count;
  logic        start, enable, wt = 0, busy;
  logic [15:0] data;
  logic [31:0] lines, waits, underruns;

  int checks = 0, failures = 0;
  pix_word_t fifo [$];
  pix_word_t expq [$];
  bit        expect_start = 1;
  bit        wait_q = 0;
  int        run = 0, max_run = 0;
  int        rx_lines = 0;

  assign empty = (fifo.size() == 0);
  assign head  = empty ? '0 : fifo[0];
  assign count = 11'(fifo.size());

  upp_tx dut (.clk(clk), .rst_n(rst_n), .start_level_i(start_level),
              .fifo_empty_i(empty), .fifo_data_i(head), .fifo_count_i(count),
              .fifo_rd_o(rd), .upp_start_o(start), .upp_enable_o(enable),
              .upp_wait_i(wt), .upp_data_o(data), .busy_o(busy),
              .line_cnt_o(lines), .wait_cnt_o(waits), .underrun_cnt_o(underruns));

  always #6.667 clk = ~clk;  // 75 MHz

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s at %0t", msg, $time);
  endtask

  // FIFO model pop and DSP receive model
  always @(posedge clk) begin
    if (rst_n && rd) begin
      if (empty) fail("read of empty FIFO");
      else void'(fifo.pop_front());
    end
    if (rst_n) begin
      if (wait_q && enable) fail("ENABLE high after WAIT");
      if (start && !enable) fail("START without ENABLE");
      if (enable) begin
        checks++;
        if (expq.size() == 0) fail("unexpected word");
        else begin
          if (data !== expq[0].data) fail($sformatf("data %h expected %h", data, expq[0].data));
          if (start !== expect_start) fail("START misplaced");
          expect_start = expq[0].eol;
          if (expq[0].eol) rx_lines++;
          void'(expq.pop_front());
        end
        run++;
        if (run > max_run) max_run = run;
      end else run = 0;
    end
    wait_q = wt;
  end

  task automatic push_row(input int n, input int base);
    for (int i = 0; i < n; i++) begin
      pix_word_t w;
      w.sof = (i == 0); w.eol = (i == n - 1); w.eof = 1'b0; w.data = 16'(base + i);
      fifo.push_back(w);
      expq.push_back(w);
    end
  endtask

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 1. Threshold: ROW-1 words must not start a line
    @(negedge clk);
    for (int i = 0; i < ROW - 1; i++) begin
      pix_word_t w;
      w.sof = (i == 0); w.eol = 1'b0; w.eof = 1'b0; w.data = 16'(16'h3AAA + i);
      fifo.push_back(w); expq.push_back(w);
    end
    repeat (20) @(negedge clk);
    checks++;
    if (enable || busy || fifo.size() != ROW - 1) fail("line started below start level");
    // last word of the row arrives: the whole row goes out back to back
    begin
      pix_word_t w;
      w.sof = 0; w.eol = 1; w.eof = 0; w.data = 16'h0873;
      fifo.push_back(w); expq.push_back(w);
    end
    repeat (ROW + 5) @(negedge clk);
    checks++;
    if (max_run != ROW) fail($sformatf("row sent in runs of %0d, not %0d", max_run, ROW));
    // 2. Random WAIT over many rows
    for (int r = 0; r < 30; r++) push_row(ROW, 1000 * (r + 1));
    while (expq.size() != 0) begin
      @(negedge clk);
      wt = ($urandom_range(9) < 3);
    end
    wt = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (waits == 0) fail("WAIT never stalled a line");
    // 3. Underrun: start level lowered, row trickles in slowly
    start_level = 11'd4;
    for (int i = 0; i < ROW; i++) begin
      pix_word_t w;
      w.sof = 0; w.eol = (i == ROW - 1); w.eof = 0; w.data = 16'(16'h5000 + i);
      fifo.push_back(w); expq.push_back(w);
      repeat (i < 4 ? 1 : 7) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (underruns == 0) fail("no underrun");
    checks++;
    if (expq.size() != 0) fail("words not delivered");
    checks++;
    if (lines != 32 || rx_lines != 32) fail($sformatf("lines %0d/%0d", lines, rx_lines));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
