// uart_link: asynchronous serial command port (transmitter and receiver).
//
// The FPGA carries one UART link to the DSP for commands and one towards
// the power/interface board for devices outside the imager; this module is
// one such link. Only the existence and purpose of the links come from the
// source design; the frame format (8 data bits, LSB first, no parity, one
// stop bit), the bit rate and the byte-level handshake are this design's
// choices. The command bytes themselves are handed to and taken from the
// surrounding logic unchanged.
//
// Timing: CLKS_PER_BIT clocks per bit (default 87: 115200 bit/s from the
// 10 MHz pixel clock, 0.2 % fast).
//   transmit: when tx_valid_i and tx_ready_o are both high at a clock edge
//             the byte is taken; txd_o sends start bit, 8 bits, stop bit;
//             tx_ready_o is low while a frame is being sent.
//   receive:  rxd_i passes a two-flop synchroniser; a start bit is checked
//             again half a bit later, each data bit is sampled in the middle
//             of its bit time; rx_valid_o pulses for one clock with the byte
//             in rx_data_o at the middle of the stop bit. A low stop bit
//             sets rx_frame_err_o for that byte instead.
module uart_link #(
  parameter int unsigned CLKS_PER_BIT = 87
) (
  input  logic       clk,
  input  logic       rst_n,
  // transmit
  input  logic [7:0] tx_data_i,
  input  logic       tx_valid_i,
  output logic       tx_ready_o,
  output logic       txd_o,
  // receive
  input  logic       rxd_i,
  output logic [7:0] rx_data_o,
  output logic       rx_valid_o,
  output logic       rx_frame_err_o
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT);

  // ---------------- transmitter ----------------
  logic [9:0]    tx_shift;     // {stop, data, start}, LSB out first
  logic [3:0]    tx_bits;      // bits left to send
  logic [CW-1:0] tx_cnt;

  assign tx_ready_o = (tx_bits == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_shift <= '1;
      tx_bits  <= '0;
      tx_cnt   <= '0;
      txd_o    <= 1'b1;
    end else if (tx_bits == '0) begin
      txd_o <= 1'b1;
      if (tx_valid_i) begin
        tx_shift <= {1'b1, tx_data_i, 1'b0};
        tx_bits  <= 4'd10;
        tx_cnt   <= '0;
        txd_o    <= 1'b0;           // start bit goes out at once
      end
    end else if (tx_cnt == CW'(CLKS_PER_BIT - 1)) begin
      tx_cnt   <= '0;
      tx_bits  <= tx_bits - 1'b1;
      tx_shift <= {1'b1, tx_shift[9:1]};
      txd_o    <= (tx_bits == 4'd1) ? 1'b1 : tx_shift[1];
    end else begin
      tx_cnt <= tx_cnt + 1'b1;
    end
  end

  // ---------------- receiver ----------------
  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP} rx_state_e;

  rx_state_e     rx_state;
  logic [1:0]    rx_sync;
  logic [CW-1:0] rx_cnt;
  logic [2:0]    rx_idx;
  logic [7:0]    rx_shift;
  logic          rxd;

  assign rxd = rx_sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_sync        <= 2'b11;
      rx_state       <= RX_IDLE;
      rx_cnt         <= '0;
      rx_idx         <= '0;
      rx_shift       <= '0;
      rx_data_o      <= '0;
      rx_valid_o     <= 1'b0;
      rx_frame_err_o <= 1'b0;
    end else begin
      rx_sync    <= {rx_sync[0], rxd_i};
      rx_valid_o <= 1'b0;
      unique case (rx_state)
        RX_IDLE: begin
          rx_cnt <= '0;
          if (!rxd) rx_state <= RX_START;
        end
        RX_START: begin
          if (rx_cnt == CW'(CLKS_PER_BIT / 2 - 1)) begin
            rx_cnt   <= '0;
            rx_idx   <= '0;
            rx_state <= rxd ? RX_IDLE : RX_DATA;   // glitch: not a start bit
          end else rx_cnt <= rx_cnt + 1'b1;
        end
        RX_DATA: begin
          if (rx_cnt == CW'(CLKS_PER_BIT - 1)) begin
            rx_cnt   <= '0;
            rx_shift <= {rxd, rx_shift[7:1]};
            rx_idx   <= rx_idx + 1'b1;
            if (rx_idx == 3'd7) rx_state <= RX_STOP;
          end else rx_cnt <= rx_cnt + 1'b1;
        end
        RX_STOP: begin
          if (rx_cnt == CW'(CLKS_PER_BIT - 1)) begin
            rx_cnt         <= '0;
            rx_state       <= RX_IDLE;
            rx_data_o      <= rx_shift;
            rx_valid_o     <= rxd;
            rx_frame_err_o <= !rxd;
          end else rx_cnt <= rx_cnt + 1'b1;
        end
        default: rx_state <= RX_IDLE;
      endcase
    end
  end

endmodule
