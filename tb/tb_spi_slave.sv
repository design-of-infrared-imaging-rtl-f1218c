// tb_spi_slave: self-checking test of the SPI command port.
//
// A mode-0 SPI master model (SCLK = clk/8) exchanges transfers of 1 to 4
// bytes with the port. Each byte the master sends must appear on rx_data_o
// with one rx_valid_o pulse; each byte the port returns is the value the
// testbench offered on tx_data_i at the preceding tx_load_o pulse, and the
// master must read exactly those bytes on MISO. MISO is only enabled while
// CS_N is low.
`timescale 1ns/1ps
module tb_spi_slave;

  logic clk = 0, rst_n = 0;
  logic sclk = 0, cs_n = 1, mosi = 0, miso, miso_oe;
  logic [7:0] rx_data, tx_data = 8'h00;
  logic rx_valid, tx_load;

  int checks = 0, failures = 0;
  logic [7:0] mosi_q [$], miso_q [$];

  spi_slave dut (.clk(clk), .rst_n(rst_n), .sclk_i(sclk), .cs_n_i(cs_n), .mosi_i(mosi),
                 .miso_o(miso), .miso_oe_o(miso_oe), .rx_data_o(rx_data),
                 .rx_valid_o(rx_valid), .tx_data_i(tx_data), .tx_load_o(tx_load));

  always #6.667 clk = ~clk;   // 75 MHz

  // Port side: check received bytes, offer a fresh reply byte at each load
  always @(posedge clk) begin
    if (rst_n && rx_valid) begin
      checks++;
      if (mosi_q.size() == 0 || rx_data !== mosi_q[0]) begin
        failures++;
        $display("FAIL rx %h expected %h", rx_data, mosi_q.size() ? mosi_q[0] : 8'h0);
      end
      if (mosi_q.size()) void'(mosi_q.pop_front());
    end
    if (rst_n && tx_load) begin
      miso_q.push_back(tx_data);
      tx_data <= 8'($urandom);
    end
  end

  task automatic half_bit();
    repeat (4) @(posedge clk);
  endtask

  task automatic transfer(input int n);
    logic [7:0] out, in;
    cs_n = 0;
    half_bit();
    for (int b = 0; b < n; b++) begin
      out = 8'($urandom);
      mosi_q.push_back(out);
      for (int i = 7; i >= 0; i--) begin
        mosi = out[i];
        half_bit();
        sclk = 1;
        in[i] = miso;
        checks++;
        if (!miso_oe) begin failures++; $display("FAIL MISO not enabled"); end
        half_bit();
        sclk = 0;
      end
      checks++;
      // tx_load for the next word happens after this word's last falling edge;
      // the reply for this word is the oldest queued one
      if (miso_q.size() == 0 || in !== miso_q[0]) begin
        failures++;
        $display("FAIL master read %h expected %h", in, miso_q.size() ? miso_q[0] : 8'h0);
      end
      if (miso_q.size()) void'(miso_q.pop_front());
    end
    half_bit();
    cs_n = 1;
    half_bit(); half_bit();
    // a reply byte loaded after the last word is discarded at the next CS_N
    miso_q.delete();
    checks++;
    if (miso_oe) begin failures++; $display("FAIL MISO enabled while deselected"); end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    for (int t = 0; t < 20; t++) transfer(1 + (t % 4));
    repeat (10) @(posedge clk);
    checks++;
    if (mosi_q.size() != 0) begin failures++; $display("FAIL bytes not received"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
