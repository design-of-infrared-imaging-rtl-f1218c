// lvds_deser: 7:1 receiver for the four LVDS data pairs from the detector board.
//
// On the detector board two 14-bit ADC samples (outputs 1 and 2 of the
// detector, one AD9240 each) are serialised onto four LVDS data pairs plus
// an LVDS clock pair, 7 bits per pair per pixel clock. 4 x 7 = 28 bits carry
// exactly the two 14-bit samples. The four pairs and the serial framing come
// from the source design; the bit order is this design's own choice:
//   lane L, bit slot k (k = 0 first on the wire) carries word bit 7*L + k,
//   word[13:0] = sample of output 1, word[27:14] = sample of output 2.
//
// The receiver runs on clk_ser, a bit clock at 7x the pixel clock with its
// sampling point already centred (the PLL phase set-up is outside this
// block). The LVDS clock pair is sampled like a data lane; its 0->1
// transition marks the first bit slot of a word, which keeps the receiver
// word-aligned. A word is complete after 7 slots and is then held stable in
// word_o for the next 7 bit clocks; word_stb_o pulses for one bit clock
// when it changes. The pixel-clock domain, frequency-locked at 1/7 of
// clk_ser, samples word_o once per pixel clock. locked_o is high once two
// consecutive clock-lane edges arrived exactly 7 slots apart, and falls when
// a clock-lane edge is missing or early.
module lvds_deser #(
  parameter int unsigned LANES = 4,   // LVDS data pairs
  parameter int unsigned SLOTS = 7    // bits per pair per pixel clock
) (
  input  logic                   clk_ser,
  input  logic                   rst_n,
  input  logic [LANES-1:0]       lane_i,     // sampled data pairs
  input  logic                   lclk_i,     // sampled LVDS clock pair
  output logic [LANES*SLOTS-1:0] word_o,
  output logic                   word_stb_o,
  output logic                   locked_o
);

  logic [LANES-1:0][SLOTS-1:0] shreg;
  logic [$clog2(SLOTS+2)-1:0]   slot;       // SLOTS+1: framing lost
  logic                          lclk_q;
  logic                          frame_start;

  assign frame_start = lclk_i && !lclk_q;

  always_ff @(posedge clk_ser or negedge rst_n) begin
    if (!rst_n) begin
      shreg      <= '0;
      slot       <= '0;
      lclk_q     <= 1'b0;
      word_o     <= '0;
      word_stb_o <= 1'b0;
      locked_o   <= 1'b0;
    end else begin
      lclk_q     <= lclk_i;
      word_stb_o <= 1'b0;
      // The bit arriving in slot k goes to position k of its lane
      for (int l = 0; l < LANES; l++) begin
        for (int k = 0; k < SLOTS; k++) begin
          if ((frame_start ? '0 : slot) == k[$bits(slot)-1:0]) shreg[l][k] <= lane_i[l];
        end
      end
      if (frame_start) begin
        locked_o <= (slot == $bits(slot)'(SLOTS));
        slot     <= $bits(slot)'(1);
      end else if (slot >= $bits(slot)'(SLOTS)) begin
        // More than SLOTS bits without a clock edge: framing lost
        locked_o <= 1'b0;
        slot     <= $bits(slot)'(SLOTS + 1);
      end else begin
        slot <= slot + 1'b1;
      end
      // Last slot received: publish the word (this slot's bits bypass shreg)
      if (!frame_start && slot == $bits(slot)'(SLOTS-1)) begin
        for (int l = 0; l < LANES; l++) begin
          for (int k = 0; k < SLOTS; k++) begin
            word_o[l*SLOTS+k] <= (k == SLOTS-1) ? lane_i[l] : shreg[l][k];
          end
        end
        word_stb_o <= 1'b1;
      end
    end
  end

endmodule
