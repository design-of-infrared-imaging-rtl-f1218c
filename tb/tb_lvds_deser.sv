// tb_lvds_deser: self-checking test of the 7:1 LVDS receiver.
//
// A serialiser model sends random 28-bit words on four lanes, 7 slots per
// word, lane L slot k = word bit 7*L+k, with the clock lane high in slots
// 0-3 and low in slots 4-6. Every word must come out intact, one strobe per
// 7 bit clocks, with locked_o high. A framing slip (one extra slot) must drop
// locked_o, and the receiver must lock again on the following words.
`timescale 1ns/1ps
module tb_lvds_deser;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [3:0]  lane = '0;
  logic        lclk = 1'b0;
  logic [27:0] word;
  logic        stb, locked;

  int checks = 0, failures = 0;
  logic [27:0] sent [$];
  int          strobes = 0;
  bit          compare_on = 1'b1;

  lvds_deser dut (.clk_ser(clk), .rst_n(rst_n), .lane_i(lane), .lclk_i(lclk),
                  .word_o(word), .word_stb_o(stb), .locked_o(locked));

  always #7 clk = ~clk;

  task automatic send_word(input logic [27:0] w);
    for (int k = 0; k < 7; k++) begin
      @(negedge clk);
      for (int l = 0; l < 4; l++) lane[l] = w[7*l+k];
      lclk = (k < 4);
    end
  endtask

  // Check each strobed word against the words sent, in order
  realtime last_stb = 0;
  always @(posedge clk) begin
    if (rst_n && stb) begin
      strobes++;
      // 7 bit clocks between strobes while words stream back to back
      if (compare_on && strobes > 1) begin
        checks++;
        if ($realtime - last_stb != 98.0) begin
          failures++;
          $display("FAIL strobe spacing %0t", $realtime - last_stb);
        end
      end
      last_stb = $realtime;
      if (compare_on) begin
        checks++;
        if (sent.size() == 0 || word !== sent[0]) begin
          failures++;
          $display("FAIL word %h expected %h", word, sent.size() ? sent[0] : 28'h0);
        end
        if (sent.size()) void'(sent.pop_front());
      end
    end
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [27:0] w;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // 200 random words
    for (int i = 0; i < 200; i++) begin
      w = 28'($urandom);
      sent.push_back(w);
      send_word(w);
      if (i == 10) begin
        checks++;
        if (!locked) begin failures++; $display("FAIL not locked"); end
      end
    end
    compare_on = 1'b0;
    send_word(28'h0);
    // framing slip: one extra slot with the clock lane low
    @(negedge clk); lane = '0; lclk = 1'b0;
    send_word(28'h5A5A5A5);
    repeat (2) @(posedge clk);
    checks++;
    if (locked) begin failures++; $display("FAIL lock not lost after slip"); end
    repeat (3) send_word(28'h1234567);
    checks++;
    if (!locked) begin failures++; $display("FAIL no relock"); end
    checks++;
    if (word !== 28'h1234567) begin failures++; $display("FAIL after relock %h", word); end
    repeat (4) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
