// async_fifo: the cache FIFO between the pixel clock (write, 10 MHz) and the
// UPP clock (read, 75 MHz).
//
// Because words are written slowly and read quickly, the reader does not
// start on a row until enough words are cached; for that the FIFO reports
// its fill level in the read domain (rd_count_o), which the UPP transmitter
// compares with its start threshold. The two clock domains and the caching
// idea come from the source design; the structure is the usual one and this
// design's own: a dual-port memory of DEPTH words, binary pointers with
// Gray-coded copies passed through two-flop synchronisers, one extra pointer
// bit to tell full from empty.
//
// Read side is first-word-fall-through: while empty_o is low, rd_data_o
// shows the oldest word, and rd_en_i high at a clock edge removes it. The
// memory is read synchronously at the next read address, so it maps onto
// block RAM. A word becomes visible to the reader 2-3 read clocks after it
// was written. Writing while full drops the word and sets the sticky
// overflow_o flag (cleared by write-side reset only). Reading while empty
// is not allowed (an assertion checks it) and has no effect.
module async_fifo #(
  parameter int unsigned WIDTH = 19,     // lwir_pkg::pix_word_t
  parameter int unsigned DEPTH = 1024     // must be a power of two
) (
  // write side
  input  logic                     wclk,
  input  logic                     wrst_n,
  input  logic                     wr_en_i,
  input  logic [WIDTH-1:0]         wr_data_i,
  output logic                     full_o,
  output logic                     overflow_o,
  // read side
  input  logic                     rclk,
  input  logic                     rrst_n,
  input  logic                     rd_en_i,
  output logic [WIDTH-1:0]         rd_data_o,
  output logic                     empty_o,
  output logic [$clog2(DEPTH):0]   rd_count_o
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wptr, wptr_gray, rptr, rptr_gray;
  logic [AW:0] wgray_s1, wgray_s2, rgray_s1, rgray_s2;
  logic [AW:0] wptr_sync, rptr_sync;
  logic [AW:0] rptr_next;
  logic        do_write, do_read;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write domain ----------------
  assign full_o   = (wptr[AW] != rptr_sync[AW]) && (wptr[AW-1:0] == rptr_sync[AW-1:0]);
  assign do_write = wr_en_i && !full_o;

  always_ff @(posedge wclk) begin
    if (do_write) mem[wptr[AW-1:0]] <= wr_data_i;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wptr       <= '0;
      wptr_gray  <= '0;
      rgray_s1   <= '0;
      rgray_s2   <= '0;
      overflow_o <= 1'b0;
    end else begin
      rgray_s1 <= rptr_gray;
      rgray_s2 <= rgray_s1;
      if (do_write) begin
        wptr      <= wptr + 1'b1;
        wptr_gray <= bin2gray(wptr + 1'b1);
      end
      if (wr_en_i && full_o) overflow_o <= 1'b1;
    end
  end

  assign rptr_sync = gray2bin(rgray_s2);

  // ---------------- read domain ----------------
  assign wptr_sync  = gray2bin(wgray_s2);
  assign empty_o    = (rptr == wptr_sync);
  assign rd_count_o = wptr_sync - rptr;
  assign do_read    = rd_en_i && !empty_o;
  assign rptr_next  = do_read ? rptr + 1'b1 : rptr;

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rptr      <= '0;
      rptr_gray <= '0;
      wgray_s1  <= '0;
      wgray_s2  <= '0;
    end else begin
      wgray_s1  <= wptr_gray;
      wgray_s2  <= wgray_s1;
      rptr      <= rptr_next;
      rptr_gray <= bin2gray(rptr_next);
    end
  end

  // Synchronous read of the next head word; a word is only announced by
  // wptr_sync two read clocks after it was written, so this register has
  // already picked it up when empty_o falls.
  always_ff @(posedge rclk) begin
    rd_data_o <= mem[rptr_next[AW-1:0]];
  end

  // Port rule: the reader never pops an empty FIFO
  a_no_read_empty : assert property (@(posedge rclk) disable iff (!rrst_n)
                                     rd_en_i |-> !empty_o)
    else $error("async_fifo: read while empty");

endmodule
