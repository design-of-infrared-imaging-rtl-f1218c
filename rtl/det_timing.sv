// det_timing: frame and line timing of the detector read-out.
//
// The FPGA drives the read-out timing of the 640x480 microbolometer and so
// knows when the digitised samples of a row are valid. This block counts
// pixel clocks (10 MHz, the FIFO write clock) and produces the active-row
// window for the two read-out modes of the detector board:
//   MODE_SINGLE_25HZ: one analog output, a row is 640 clocks long;
//   MODE_DUAL_50HZ:   two analog outputs, each carrying half of a row, so a
//                     row takes 320 clocks and the frame rate doubles.
// Modes, matrix size and the 10 MHz clock come from the source design. The
// blanking (H_BLANK clocks after each row, V_BLANK rows after each frame)
// is this design's choice: with the defaults a frame is 400 x 500 clocks
// in dual mode (50 Hz) and 800 x 500 clocks in single mode (25 Hz). The
// detector's own control waveforms are not generated here.
//
// Outputs, registered, in clk_pix:
//   line_valid_o  high for the active clocks of an active row
//   frame_start_o one-clock pulse on the first active clock of a frame
//   line_end_o    one-clock pulse on the last active clock of each row
//   frame_end_o   one-clock pulse on the last active clock of a frame
//   col_o/row_o   position of the current active clock
// The mode and the enable are sampled only at a frame boundary, so neither
// a mode change nor a stop ever produces a partial frame: after en_i falls
// the frame in progress (including its blanking) completes.
module det_timing
  import lwir_pkg::*;
#(
  parameter int unsigned COLS    = DET_COLS,
  parameter int unsigned ROWS    = DET_ROWS,
  parameter int unsigned H_BLANK = 160,   // clocks per row in single mode = COLS + H_BLANK
  parameter int unsigned V_BLANK = 20
) (
  input  logic                        clk_pix,
  input  logic                        rst_n,
  input  logic                        en_i,
  input  det_mode_e                   mode_i,
  output det_mode_e                   mode_o,        // mode of the current frame
  output logic                        line_valid_o,
  output logic                        frame_start_o,
  output logic                        line_end_o,
  output logic                        frame_end_o,
  output logic [$clog2(COLS+H_BLANK)-1:0] col_o,
  output logic [$clog2(ROWS+V_BLANK)-1:0] row_o
);

  localparam int unsigned HW = $clog2(COLS + H_BLANK);
  localparam int unsigned VW = $clog2(ROWS + V_BLANK);

  det_mode_e     mode_q;
  logic          running;
  logic [HW-1:0] hcnt;
  logic [VW-1:0] vcnt;
  logic [HW-1:0] h_active, h_total;
  logic          act;

  // In dual mode each output carries half of a row: half the clocks per row
  always_comb begin
    if (mode_q == MODE_DUAL_50HZ) begin
      h_active = HW'(COLS / 2);
      h_total  = HW'((COLS + H_BLANK) / 2);
    end else begin
      h_active = HW'(COLS);
      h_total  = HW'(COLS + H_BLANK);
    end
  end

  assign act = running && (hcnt < h_active) && (vcnt < VW'(ROWS));

  always_ff @(posedge clk_pix or negedge rst_n) begin
    if (!rst_n) begin
      mode_q        <= MODE_SINGLE_25HZ;
      running       <= 1'b0;
      hcnt          <= '0;
      vcnt          <= '0;
      line_valid_o  <= 1'b0;
      frame_start_o <= 1'b0;
      line_end_o    <= 1'b0;
      frame_end_o   <= 1'b0;
      col_o         <= '0;
      row_o         <= '0;
    end else begin
      line_valid_o  <= act;
      frame_start_o <= act && hcnt == '0 && vcnt == '0;
      line_end_o    <= act && hcnt == h_active - 1'b1;
      frame_end_o   <= act && hcnt == h_active - 1'b1 && vcnt == VW'(ROWS - 1);
      col_o         <= hcnt;
      row_o         <= vcnt;
      if (!running) begin
        hcnt    <= '0;
        vcnt    <= '0;
        mode_q  <= mode_i;
        running <= en_i;
      end else if (hcnt == h_total - 1'b1) begin
        hcnt <= '0;
        if (vcnt == VW'(ROWS + V_BLANK - 1)) begin
          vcnt    <= '0;
          mode_q  <= mode_i;         // mode and enable change only between frames
          running <= en_i;
        end else begin
          vcnt <= vcnt + 1'b1;
        end
      end else begin
        hcnt <= hcnt + 1'b1;
      end
    end
  end

  assign mode_o = mode_q;

endmodule
