// tb_uart_link: self-checking test of the UART command port.
//
// The transmitter output is looped back to the receiver. 40 random bytes
// are sent; each must be received intact, and the serial waveform is
// decoded independently by the testbench (start bit low, 8 data bits LSB
// first, stop bit high, each bit CLKS_PER_BIT clocks long, sampled in the
// middle of the bit). Then the testbench drives a frame with a low stop bit
// itself and expects the frame-error flag, and a short low glitch that must
// not be taken for a start bit.
`timescale 1ns/1ps
module tb_uart_link;

  localparam int CPB = 87;

  logic clk = 0, rst_n = 0;
  logic [7:0] txd_byte = '0, rx_byte;
  logic tx_valid = 0, tx_ready, txd, rx_valid, ferr;
  logic drive_own = 0, own_rxd = 1;
  logic rxd;

  int checks = 0, failures = 0;
  logic [7:0] sent [$], decoded [$];
  int rx_count = 0, ferr_count = 0;

  assign rxd = drive_own ? own_rxd : txd;

  uart_link dut (.clk(clk), .rst_n(rst_n), .tx_data_i(txd_byte), .tx_valid_i(tx_valid),
                 .tx_ready_o(tx_ready), .txd_o(txd), .rxd_i(rxd), .rx_data_o(rx_byte),
                 .rx_valid_o(rx_valid), .rx_frame_err_o(ferr));

  always #50 clk = ~clk;   // 10 MHz

  always @(posedge clk) begin
    if (rst_n && rx_valid) begin
      rx_count++;
      checks++;
      if (sent.size() == 0 || rx_byte !== sent[0]) begin
        failures++;
        $display("FAIL received %h expected %h", rx_byte, sent.size() ? sent[0] : 8'h0);
      end
      if (sent.size()) void'(sent.pop_front());
    end
    if (rst_n && ferr && $past(!ferr)) ferr_count++;
  end

  // Independent decoder of the transmit line
  initial begin
    wait (rst_n);
    forever begin
      logic [7:0] b;
      @(negedge txd);
      repeat (CPB / 2) @(posedge clk);
      checks++;
      if (txd !== 1'b0) begin failures++; $display("FAIL start bit"); end
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = txd;
      end
      repeat (CPB) @(posedge clk);
      checks++;
      if (txd !== 1'b1) begin failures++; $display("FAIL stop bit"); end
      decoded.push_back(b);
    end
  end

  task automatic own_frame(input logic [7:0] b, input logic stop);
    logic [9:0] f;
    f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      own_rxd = f[i];
      repeat (CPB) @(posedge clk);
    end
    own_rxd = 1;
    repeat (2 * CPB) @(posedge clk);
  endtask

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] all_sent [$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      while (!tx_ready) @(negedge clk);
      txd_byte = 8'($urandom);
      tx_valid = 1;
      sent.push_back(txd_byte);
      all_sent.push_back(txd_byte);
      @(negedge clk);
      tx_valid = 0;
    end
    while (!tx_ready) @(negedge clk);
    repeat (3 * CPB) @(posedge clk);
    checks++;
    if (rx_count != 40) begin failures++; $display("FAIL %0d bytes received", rx_count); end
    checks++;
    if (decoded.size() != 40) begin failures++; $display("FAIL %0d frames decoded", decoded.size()); end
    else for (int i = 0; i < 40; i++) begin
      checks++;
      if (decoded[i] !== all_sent[i]) begin failures++; $display("FAIL line byte %0d", i); end
    end
    // Framing error and glitch rejection
    drive_own = 1;
    own_frame(8'hA5, 1'b0);
    checks++;
    if (ferr_count != 1) begin failures++; $display("FAIL frame error not flagged"); end
    own_rxd = 0;
    repeat (CPB / 4) @(posedge clk);
    own_rxd = 1;
    repeat (12 * CPB) @(posedge clk);
    checks++;
    if (rx_count != 40) begin failures++; $display("FAIL glitch taken as a byte"); end
    sent.push_back(8'h3C);
    own_frame(8'h3C, 1'b1);
    checks++;
    if (rx_count != 41) begin failures++; $display("FAIL good frame after error"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
