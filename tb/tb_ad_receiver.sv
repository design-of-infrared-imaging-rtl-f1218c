// tb_ad_receiver: self-checking test of the frame formatter.
//
// The testbench plays the detector timing for small frames (6 rows of 10
// active clocks, gaps between rows) and returns the matching ADC samples
// SAMPLE_LAT clocks later, as the detector board would. Sample values encode
// the channel, row and column. For each channel it builds the expected word
// stream independently (3AAA with sof, 3AAB, then the samples zero-extended,
// eol on each row's last sample, eof on the frame's last) and compares it
// with the outputs. It checks that channel B stays silent in single mode,
// that a mode change takes effect from the next frame, and that the header
// appears SAMPLE_LAT+2 clocks after the frame start.
`timescale 1ns/1ps
module tb_ad_receiver;
  import lwir_pkg::*;

  localparam int LAT = 6;   // the block's default SAMPLE_LAT
  localparam int ACT = 10, ROWS = 6, GAP = 5;

  logic        clk = 1'b0, rst_n = 1'b0;
  det_mode_e   mode = MODE_DUAL_50HZ;
  logic        lv = 0, fs = 0, le = 0, fe = 0;
  logic [27:0] sample = '0;
  logic        av, bv;
  pix_word_t   aw, bw;
  logic [31:0] fcnt;

  int checks = 0, failures = 0;
  pix_word_t exp_a [$], exp_b [$];
  logic [27:0] spipe [$];
  longint cyc = 0, fs_cyc = 0, hdr_lat = -1;

  ad_receiver dut (
    .clk_pix(clk), .rst_n(rst_n), .mode_i(mode), .line_valid_i(lv),
    .frame_start_i(fs), .line_end_i(le), .frame_end_i(fe), .sample_i(sample),
    .a_valid_o(av), .a_word_o(aw), .b_valid_o(bv), .b_word_o(bw),
    .frame_cnt_o(fcnt));

  always #50 clk = ~clk;

  function automatic pix_word_t mk(input logic [15:0] d, input bit sof, eol, eof);
    pix_word_t w;
    w.sof = sof; w.eol = eol; w.eof = eof; w.data = d;
    return w;
  endfunction

  function automatic logic [13:0] pix(input int ch, input int f, input int r, input int c);
    return 14'((ch << 13) | (f << 10) | (r << 5) | c);
  endfunction

  // Output checker
  always @(posedge clk) begin
    cyc++;
    if (rst_n && av) begin
      checks++;
      if (av && aw.sof && hdr_lat < 0) hdr_lat = cyc - fs_cyc;
      if (exp_a.size() == 0 || aw !== exp_a[0]) begin
        failures++;
        $display("FAIL A got %h exp %h", aw, exp_a.size() ? exp_a[0] : '0);
      end
      if (exp_a.size()) void'(exp_a.pop_front());
    end
    if (rst_n && bv) begin
      checks++;
      if (exp_b.size() == 0 || bw !== exp_b[0]) begin
        failures++;
        $display("FAIL B got %h exp %h", bw, exp_b.size() ? exp_b[0] : '0);
      end
      if (exp_b.size()) void'(exp_b.pop_front());
    end
  end

  // One clock of timing, with the sample for the position LAT clocks ago
  task automatic tick(input bit v, s, l, e, input logic [27:0] smp);
    @(negedge clk);
    lv = v; fs = s; le = l; fe = e;
    spipe.push_back(smp);
    sample = (spipe.size() > LAT) ? spipe.pop_front() : 28'h0;
  endtask

  task automatic frame(input int f, input det_mode_e m);
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < ACT; c++) begin
        logic [13:0] s1, s2;
        s1 = pix(0, f, r, c);
        s2 = pix(1, f, r, c);
        if (r == 0 && c == 0) begin
          exp_a.push_back(mk(HDR_WORD0, 1, 0, 0));
          exp_a.push_back(mk(HDR_WORD1, 0, 0, 0));
          if (m == MODE_DUAL_50HZ) begin
            exp_b.push_back(mk(HDR_WORD0, 1, 0, 0));
            exp_b.push_back(mk(HDR_WORD1, 0, 0, 0));
          end
        end
        exp_a.push_back(mk(16'(s1), 0, c == ACT-1, c == ACT-1 && r == ROWS-1));
        if (m == MODE_DUAL_50HZ)
          exp_b.push_back(mk(16'(s2), 0, c == ACT-1, c == ACT-1 && r == ROWS-1));
        tick(1, r == 0 && c == 0, c == ACT-1, c == ACT-1 && r == ROWS-1, {s2, s1});
        if (r == 0 && c == 0) fs_cyc = cyc;
      end
      for (int g = 0; g < GAP; g++) tick(0, 0, 0, 0, 28'h0);
    end
    for (int g = 0; g < 3 * GAP; g++) tick(0, 0, 0, 0, 28'h0);
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (LAT + 2) tick(0, 0, 0, 0, 28'h0);
    mode = MODE_DUAL_50HZ;
    frame(0, MODE_DUAL_50HZ);
    // header latency of the first frame: on the outputs LAT+2 clocks after
    // the clock holding frame_start; the checker samples it one edge later
    checks++;
    if (hdr_lat != LAT + 3) begin failures++; $display("FAIL header latency %0d", hdr_lat); end
    frame(1, MODE_DUAL_50HZ);
    mode = MODE_SINGLE_25HZ;
    frame(2, MODE_SINGLE_25HZ);
    frame(3, MODE_SINGLE_25HZ);
    mode = MODE_DUAL_50HZ;
    frame(4, MODE_DUAL_50HZ);
    repeat (20) tick(0, 0, 0, 0, 28'h0);
    checks++;
    if (exp_a.size() || exp_b.size()) begin
      failures++;
      $display("FAIL words missing: A %0d B %0d", exp_a.size(), exp_b.size());
    end
    checks++;
    if (fcnt != 5) begin failures++; $display("FAIL frame count %0d", fcnt); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
