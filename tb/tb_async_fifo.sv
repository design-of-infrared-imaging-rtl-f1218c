// tb_async_fifo: self-checking test of the cache FIFO at its default size,
// with a 10 MHz write clock and a 75 MHz read clock.
//
// Phase 1 streams 3000 random words with random gaps on both sides and
// checks order and content, and that the read-side level never exceeds the
// depth. Phase 2 stops the reader, writes DEPTH+5 words and checks full,
// the sticky overflow flag, the level seen by the reader (DEPTH) and that
// exactly the first DEPTH words come out. Phase 3 checks that a word written
// into an empty FIFO is visible to the reader within 3 read clocks.
`timescale 1ns/1ps
module tb_async_fifo;

  localparam int W = 19, DEPTH = 1024;

  logic          wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic          wr_en = 0, rd_en = 0;
  logic [W-1:0]  wdata = '0, rdata;
  logic          full, ovf, empty;
  logic [10:0]   count;

  int checks = 0, failures = 0;
  logic [W-1:0] model [$];
  bit reader_on = 0;
  int rd_prob = 50;

  async_fifo dut (.wclk(wclk), .wrst_n(wrst_n), .wr_en_i(wr_en), .wr_data_i(wdata),
                  .full_o(full), .overflow_o(ovf), .rclk(rclk), .rrst_n(rrst_n),
                  .rd_en_i(rd_en), .rd_data_o(rdata), .empty_o(empty), .rd_count_o(count));

  always #50     wclk = ~wclk;    // 10 MHz
  always #6.667  rclk = ~rclk;    // 75 MHz

  // Reader: pops at random when allowed, checks each word against the model
  always @(posedge rclk) begin
    if (rd_en) begin
      checks++;
      if (model.size() == 0 || rdata !== model[0]) begin
        failures++;
        $display("FAIL read %h expected %h", rdata, model.size() ? model[0] : '0);
      end
      if (model.size()) void'(model.pop_front());
    end
    if (rrst_n && count > DEPTH) begin
      failures++;
      $display("FAIL level %0d above depth", count);
    end
  end
  always @(negedge rclk) rd_en = reader_on && !empty && ($urandom_range(99) < rd_prob);

  task automatic write_word(input logic [W-1:0] d);
    @(negedge wclk);
    wr_en = 1; wdata = d;
    if (!full) model.push_back(d);
    @(negedge wclk);
    wr_en = 0;
  endtask

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    repeat (3) @(negedge wclk);
    wrst_n = 1; rrst_n = 1;
    // Phase 1: streaming
    reader_on = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge wclk);
      wr_en = ($urandom_range(3) != 0);
      wdata = W'($urandom);
      if (wr_en) model.push_back(wdata);
    end
    @(negedge wclk) wr_en = 0;
    wait (model.size() == 0);
    repeat (10) @(posedge rclk);
    checks++;
    if (!empty || ovf) begin failures++; $display("FAIL phase 1 end state"); end
    // Phase 2: fill past full with the reader stopped
    reader_on = 0;
    repeat (5) @(posedge rclk);
    for (int i = 0; i < DEPTH + 5; i++) begin
      @(negedge wclk);
      wdata = W'(i);
      if (!full) model.push_back(wdata);
      wr_en = 1;
    end
    @(negedge wclk) wr_en = 0;
    checks++;
    if (!full || !ovf) begin failures++; $display("FAIL full=%b overflow=%b", full, ovf); end
    repeat (5) @(posedge rclk);
    checks++;
    if (count != DEPTH) begin failures++; $display("FAIL level %0d", count); end
    checks++;
    if (model.size() != DEPTH) begin failures++; $display("FAIL model %0d", model.size()); end
    reader_on = 1; rd_prob = 100;
    wait (model.size() == 0);
    reader_on = 0;
    repeat (5) @(posedge rclk);
    checks++;
    if (!empty || full) begin failures++; $display("FAIL drain state"); end
    // Phase 3: visibility latency
    @(negedge wclk);
    wr_en = 1; wdata = 19'h3AAA; model.push_back(wdata);
    @(posedge wclk);
    #1 wr_en = 0;
    t = 0;
    while (empty && t < 10) begin @(posedge rclk); #0.1; t++; end
    checks++;
    if (t > 3) begin failures++; $display("FAIL visible after %0d read clocks", t); end
    checks++;
    if (rdata !== 19'h3AAA) begin failures++; $display("FAIL head %h", rdata); end
    reader_on = 1;
    wait (model.size() == 0);
    repeat (3) @(posedge rclk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
