// ad_receiver: turns the deserialised ADC samples into the word streams of
// the two UPP channels, each frame preceded by the header 3AAA, 3AAB.
//
// Each pixel clock the 28-bit word from the LVDS receiver holds one 14-bit
// sample of detector output 1 (bits 13:0) and one of output 2 (27:14).
// While det_timing marks a row active:
//   MODE_DUAL_50HZ:   output 1 goes to channel A, output 2 to channel B;
//   MODE_SINGLE_25HZ: only output 1 is read out and goes to channel A,
//                     channel B stays idle.
// Samples are zero-extended to the 16-bit UPP word. The header words and the
// 16-bit word come from the source design; the channel assignment above is
// this design's reading of "two UPP interfaces" fed by a detector with two
// outputs.
//
// To make room for the two header words, samples pass through a two-stage
// delay line; in the two clocks that start a frame the header words are
// emitted ahead of the delayed first sample. So a frame of N samples leaves
// as N+2 words, the first flagged sof, the last flagged eof, and the last
// word of every row flagged eol. The UPP transmitter sends one UPP line per
// row, so the first line of a frame is two words longer than the others.
//
// Timing: the samples come back from the detector board SAMPLE_LAT pixel
// clocks after det_timing marked their position (ADC pipeline, serialiser
// and LVDS receiver; the value is this design's assumption). The timing
// inputs are delayed by SAMPLE_LAT clocks to line up with the samples. A
// sample presented at clock t appears on the outputs at clock t+4; the
// header word 3AAA of a frame appears SAMPLE_LAT+2 clocks after its
// frame_start_i. The mode is taken at the (delayed) frame start and held
// for the whole frame.
module ad_receiver
  import lwir_pkg::*;
#(
  parameter int unsigned SAMPLE_LAT = 6
) (
  input  logic                  clk_pix,
  input  logic                  rst_n,
  input  det_mode_e             mode_i,         // mode of the frame (det_timing.mode_o)
  input  logic                  line_valid_i,
  input  logic                  frame_start_i,
  input  logic                  line_end_i,
  input  logic                  frame_end_i,
  input  logic [2*PIX_W-1:0]    sample_i,       // {output 2, output 1}
  output logic                  a_valid_o,
  output pix_word_t             a_word_o,
  output logic                  b_valid_o,
  output pix_word_t             b_word_o,
  output logic [31:0]           frame_cnt_o      // frames started
);

  typedef struct packed {
    logic             valid;
    logic             eol;
    logic             eof;
    logic [PIX_W-1:0] s1;
    logic [PIX_W-1:0] s2;
  } slot_t;

  // Timing inputs delayed by SAMPLE_LAT clocks
  typedef struct packed {
    det_mode_e mode;
    logic      line_valid;
    logic      frame_start;
    logic      line_end;
    logic      frame_end;
  } tim_t;

  tim_t tim_pipe [SAMPLE_LAT+1];
  tim_t tim;

  assign tim_pipe[0] = '{mode: mode_i, line_valid: line_valid_i,
                         frame_start: frame_start_i, line_end: line_end_i,
                         frame_end: frame_end_i};
  assign tim = tim_pipe[SAMPLE_LAT];

  always_ff @(posedge clk_pix or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i <= SAMPLE_LAT; i++) tim_pipe[i] <= '0;
    end else begin
      for (int i = 1; i <= SAMPLE_LAT; i++) tim_pipe[i] <= tim_pipe[i-1];
    end
  end

  slot_t     dly [3];      // dly[0] registered input, dly[2] oldest
  logic [1:0] hdr_cnt;      // header words still to emit
  det_mode_e frame_mode;
  logic      out_valid;
  pix_word_t out_a, out_b;

  always_ff @(posedge clk_pix or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) dly[i] <= '0;
      hdr_cnt     <= '0;
      frame_mode  <= MODE_SINGLE_25HZ;
      frame_cnt_o <= '0;
    end else begin
      dly[0] <= '{valid: tim.line_valid, eol: tim.line_end, eof: tim.frame_end,
                  s1: sample_i[PIX_W-1:0], s2: sample_i[2*PIX_W-1:PIX_W]};
      dly[1] <= dly[0];
      dly[2] <= dly[1];
      if (tim.frame_start) begin
        frame_mode  <= tim.mode;
        frame_cnt_o <= frame_cnt_o + 1'b1;
      end
      // dly[0] holds the first sample one clock after the frame start:
      // header words go out in that clock and the next one
      if (tim.frame_start)     hdr_cnt <= 2'd2;
      else if (hdr_cnt != '0)  hdr_cnt <= hdr_cnt - 1'b1;
    end
  end

  always_comb begin
    out_a = '0;
    out_b = '0;
    if (hdr_cnt == 2'd2) begin
      out_valid  = 1'b1;
      out_a.sof  = 1'b1;
      out_a.data = HDR_WORD0;
    end else if (hdr_cnt == 2'd1) begin
      out_valid  = 1'b1;
      out_a.data = HDR_WORD1;
    end else begin
      out_valid  = dly[2].valid;
      out_a.eol  = dly[2].eol;
      out_a.eof  = dly[2].eof;
      out_a.data = UPP_W'(dly[2].s1);
    end
    out_b = out_a;
    if (hdr_cnt == '0) out_b.data = UPP_W'(dly[2].s2);
  end

  // Registered outputs
  always_ff @(posedge clk_pix or negedge rst_n) begin
    if (!rst_n) begin
      a_valid_o <= 1'b0;
      b_valid_o <= 1'b0;
      a_word_o  <= '0;
      b_word_o  <= '0;
    end else begin
      a_valid_o <= out_valid;
      b_valid_o <= out_valid && frame_mode == MODE_DUAL_50HZ;
      a_word_o  <= out_a;
      b_word_o  <= out_b;
    end
  end

endmodule
