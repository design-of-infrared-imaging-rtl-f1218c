// upp_tx: transmit side of one UPP (universal parallel port) channel,
// sending cached image rows from the FIFO to the DSP.
//
// Interface to the DSP, all in the UPP clock domain (75 MHz, the FIFO read
// clock, forwarded to the DSP as CHx_CLK by the top level):
//   upp_start_o   high with the first word of a line
//   upp_enable_o  high in every clock whose upp_data_o the DSP must take
//   upp_wait_i    from the DSP; while high no new word is sent
//   upp_data_o    16-bit data
// A word is transferred at each rising edge where upp_enable_o is high. The
// signal set, their directions, START marking the first word, ENABLE being
// withdrawn while WAIT is high, and the rule "wait until the cache holds the
// set amount, then read a row and send it" come from the source design.
//
// Operation: idle until the FIFO holds at least start_level_i words, then
// send one line: pop words one per clock until the word flagged eol (last
// word of a detector row) has gone out. WAIT is acted on in the clock after
// it is sampled high: ENABLE drops, the data holds, and sending resumes in
// the clock after WAIT is sampled low again, with START not repeated. If the
// FIFO runs dry inside a line, ENABLE drops in the same way until a word
// arrives (underrun). All outputs are registered. With start_level_i equal
// to the row length a whole row is cached before the line starts; at 10 MHz
// in and 75 MHz out the row then leaves at one word per clock.
//
// The status counters (lines sent, clocks stalled by WAIT, clocks lost to
// underrun) are this design's addition for observation.
module upp_tx
  import lwir_pkg::*;
#(
  parameter int unsigned CNT_W = 11       // width of the FIFO level
) (
  input  logic              clk,          // UPP clock
  input  logic              rst_n,
  // configuration
  input  logic [CNT_W-1:0]  start_level_i,
  // FIFO read port (first-word-fall-through)
  input  logic              fifo_empty_i,
  input  pix_word_t         fifo_data_i,
  input  logic [CNT_W-1:0]  fifo_count_i,
  output logic              fifo_rd_o,
  // UPP pins
  output logic              upp_start_o,
  output logic              upp_enable_o,
  input  logic              upp_wait_i,
  output logic [UPP_W-1:0]  upp_data_o,
  // status
  output logic              busy_o,        // inside a line
  output logic [31:0]       line_cnt_o,
  output logic [31:0]       wait_cnt_o,
  output logic [31:0]       underrun_cnt_o
);

  logic in_line;      // a line has started and its eol word is not yet sent
  logic first;        // next word sent is the first of its line
  logic begin_line;
  logic send;

  assign begin_line = !in_line && !upp_wait_i && !fifo_empty_i &&
                      fifo_count_i >= start_level_i;
  assign send       = (in_line || begin_line) && !upp_wait_i && !fifo_empty_i;
  assign fifo_rd_o  = send;
  assign busy_o     = in_line;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_line        <= 1'b0;
      first          <= 1'b1;
      upp_start_o    <= 1'b0;
      upp_enable_o   <= 1'b0;
      upp_data_o     <= '0;
      line_cnt_o     <= '0;
      wait_cnt_o     <= '0;
      underrun_cnt_o <= '0;
    end else begin
      upp_start_o  <= send && (begin_line || first);
      upp_enable_o <= send;
      if (send) begin
        upp_data_o <= fifo_data_i.data;
        if (fifo_data_i.eol) begin
          in_line    <= 1'b0;
          first      <= 1'b1;
          line_cnt_o <= line_cnt_o + 1'b1;
        end else begin
          in_line <= 1'b1;
          first   <= 1'b0;
        end
      end
      if (in_line && upp_wait_i)                    wait_cnt_o     <= wait_cnt_o + 1'b1;
      if (in_line && !upp_wait_i && fifo_empty_i)   underrun_cnt_o <= underrun_cnt_o + 1'b1;
    end
  end

  // START only ever accompanies a transferred word
  a_start_with_enable : assert property (@(posedge clk) disable iff (!rst_n)
                                         upp_start_o |-> upp_enable_o)
    else $error("upp_tx: START without ENABLE");

endmodule
