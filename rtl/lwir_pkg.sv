// lwir_pkg: constants and types shared by the uncooled LWIR FPGA image path.
//
// The frame-header words (3AAA, 3AAB), the 14-bit sample width, the 16-bit
// UPP word and the 640x480 detector format are taken from the source design.
// The blanking intervals that set the 25 Hz / 50 Hz frame rates at a 10 MHz
// pixel clock are this design's own choice.
package lwir_pkg;

  // Detector and ADC
  localparam int unsigned PIX_W      = 14;       // AD9240 sample width
  localparam int unsigned UPP_W      = 16;       // UPP data bus width
  localparam int unsigned DET_COLS   = 640;      // physical matrix columns
  localparam int unsigned DET_ROWS   = 480;      // physical matrix rows

  // Frame header sent ahead of each frame's pixels
  localparam logic [UPP_W-1:0] HDR_WORD0 = 16'h3AAA;
  localparam logic [UPP_W-1:0] HDR_WORD1 = 16'h3AAB;

  // Detector read-out mode
  typedef enum logic {
    MODE_SINGLE_25HZ = 1'b0,   // one analog output, 25 Hz
    MODE_DUAL_50HZ   = 1'b1    // two analog outputs, 50 Hz
  } det_mode_e;

  // One word of the pixel stream as it is cached in the FIFO
  typedef struct packed {
    logic             sof;     // first word of a frame (header word 0)
    logic             eol;     // last word of a detector row
    logic             eof;     // last word of a frame
    logic [UPP_W-1:0] data;
  } pix_word_t;

endpackage
