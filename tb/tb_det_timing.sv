// tb_det_timing: self-checking test of the detector timing generator.
//
// Runs the generator at its default size (640x480 with the default
// blanking) with a 10 MHz clock. In each mode it measures, over a whole
// frame, the clocks between frame starts (frame rate), the active clocks,
// the rows ended and the column sequence, and compares them with the values
// expected: 400000 clocks = 25 Hz single mode with 640 active clocks per
// row, 200000 clocks = 50 Hz dual mode with 320. A mode request made in the
// middle of a frame must not change that frame.
`timescale 1ns/1ps
module tb_det_timing;
  import lwir_pkg::*;

  localparam int COLS = 640, ROWS = 480;

  logic      clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  det_mode_e mode_req = MODE_SINGLE_25HZ, mode_cur;
  logic      lv, fs, le, fe;
  logic [9:0] col;
  logic [8:0] row;

  int checks = 0, failures = 0;

  det_timing dut (.clk_pix(clk), .rst_n(rst_n), .en_i(en), .mode_i(mode_req),
                  .mode_o(mode_cur), .line_valid_o(lv), .frame_start_o(fs),
                  .line_end_o(le), .frame_end_o(fe), .col_o(col), .row_o(row));

  always #50 clk = ~clk;   // 10 MHz

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Measure one frame from a frame_start to the next one
  task automatic measure(input det_mode_e exp_mode, input bit flip_mid);
    longint clocks = 0, active = 0, lines = 0, fends = 0, col_err = 0;
    int     exp_col = 0, act_cols;
    act_cols = (exp_mode == MODE_DUAL_50HZ) ? COLS / 2 : COLS;
    @(posedge clk iff fs);
    check("mode of frame", mode_cur, exp_mode);
    do begin
      clocks++;
      if (lv) begin
        active++;
        if (col != 10'(exp_col)) col_err++;
        exp_col = (exp_col + 1 == act_cols) ? 0 : exp_col + 1;
      end
      if (le) lines++;
      if (fe) fends++;
      if (flip_mid && clocks == 1000)
        mode_req = (exp_mode == MODE_DUAL_50HZ) ? MODE_SINGLE_25HZ : MODE_DUAL_50HZ;
      @(posedge clk);
    end while (!fs);
    check("clocks per frame", clocks, (exp_mode == MODE_DUAL_50HZ) ? 200000 : 400000);
    check("active clocks", active, act_cols * ROWS);
    check("rows ended", lines, ROWS);
    check("frame ends", fends, 1);
    check("column order errors", col_err, 0);
  endtask

  initial begin
    #400ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    en = 1'b1;
    measure(MODE_SINGLE_25HZ, 1'b0);
    // request dual mode during a single-mode frame: that frame stays single
    measure(MODE_SINGLE_25HZ, 1'b1);
    // measure() starts at the next frame_start, so one frame lies between two
    // measurements; the frames after the request are dual
    measure(MODE_DUAL_50HZ, 1'b0);
    measure(MODE_DUAL_50HZ, 1'b1);
    measure(MODE_SINGLE_25HZ, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
