// spi_slave: SPI command port towards the DSP, which is the bus master.
//
// The source design names an SPI link (four wires) between DSP and FPGA for
// commands; the word length, the SPI mode and the byte handshake below are
// this design's choices. Mode 0 is used: SCLK idles low, both sides sample
// on the rising edge and change data on the falling edge, MSB first, 8-bit
// words, CS_N low for the whole transfer (several words may follow back to
// back).
//
// The SPI pins are oversampled in the local clock domain through two-flop
// synchronisers, so SCLK must be at most clk/4 (with clk = 75 MHz: up to
// 18.75 MHz). Interface:
//   rx_data_o / rx_valid_o  word received from the DSP; rx_valid_o pulses
//                           one clock after the 8th rising SCLK edge is seen
//   tx_data_i               word sent back in the next word slot; it is
//                           loaded when CS_N falls and after each word, and
//                           tx_load_o pulses at that moment
//   miso_o / miso_oe_o      MISO and its output enable (high while selected)
module spi_slave (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sclk_i,
  input  logic       cs_n_i,
  input  logic       mosi_i,
  output logic       miso_o,
  output logic       miso_oe_o,
  output logic [7:0] rx_data_o,
  output logic       rx_valid_o,
  input  logic [7:0] tx_data_i,
  output logic       tx_load_o
);

  logic [2:0] sclk_s, cs_s;
  logic [1:0] mosi_s;
  logic       sclk_rise, sclk_fall, cs_fall, selected;
  logic [2:0] bit_cnt;
  logic [6:0] rx_shift;     // first 7 bits of the word in progress
  logic [7:0] tx_shift;

  assign sclk_rise = sclk_s[1] && !sclk_s[2];
  assign sclk_fall = !sclk_s[1] && sclk_s[2];
  assign cs_fall   = !cs_s[1] && cs_s[2];
  assign selected  = !cs_s[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s     <= '0;
      cs_s       <= '1;
      mosi_s     <= '0;
      bit_cnt    <= '0;
      rx_shift   <= '0;
      tx_shift   <= '0;
      rx_data_o  <= '0;
      rx_valid_o <= 1'b0;
      tx_load_o  <= 1'b0;
    end else begin
      sclk_s     <= {sclk_s[1:0], sclk_i};
      cs_s       <= {cs_s[1:0], cs_n_i};
      mosi_s     <= {mosi_s[0], mosi_i};
      rx_valid_o <= 1'b0;
      tx_load_o  <= 1'b0;
      if (cs_fall) begin
        bit_cnt   <= '0;
        tx_shift  <= tx_data_i;
        tx_load_o <= 1'b1;
      end else if (selected) begin
        if (sclk_rise) begin
          rx_shift <= {rx_shift[5:0], mosi_s[1]};
          bit_cnt  <= bit_cnt + 1'b1;
          if (bit_cnt == 3'd7) begin
            rx_data_o  <= {rx_shift[6:0], mosi_s[1]};
            rx_valid_o <= 1'b1;
          end
        end else if (sclk_fall) begin
          if (bit_cnt == 3'd0) begin
            // a word just ended: the next one starts with a fresh byte
            tx_shift  <= tx_data_i;
            tx_load_o <= 1'b1;
          end else begin
            tx_shift <= {tx_shift[6:0], 1'b0};
          end
        end
      end
    end
  end

  assign miso_o    = tx_shift[7];
  assign miso_oe_o = selected;

endmodule
