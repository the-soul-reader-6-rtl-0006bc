// card_pkg: constants and types shared by the playing-card reader.
//
// The reader works on a 240x320 portrait frame (the 320x240 camera image
// turned on its side), scanned out on a 1024x768 display raster at 65 MHz.
// The card corner that is compared against the stored kernels is 28 pixels
// wide: the rank occupies its top 40 rows and the suit the 29 rows below,
// 28x69 in all. There are 13 rank kernels and 4 suit kernels.
// Frame size, corner and kernel sizes follow the design description; the
// display timing is the standard 1024x768 at 60 Hz timing that goes with a
// 65 MHz pixel clock, and the score width is chosen to hold the largest
// possible score (28*40 = 1120).
package card_pkg;

  // Portrait frame held in the frame buffers
  localparam int FRAME_W      = 240;
  localparam int FRAME_H      = 320;
  localparam int FRAME_PIXELS = FRAME_W * FRAME_H;   // 76800
  localparam int FRAME_AW     = $clog2(FRAME_PIXELS);

  // Camera image as delivered (landscape)
  localparam int CAM_W = 320;
  localparam int CAM_H = 240;

  // 1024x768 @ 60 Hz raster (65 MHz pixel clock)
  localparam int H_ACTIVE = 1024;
  localparam int H_FP     = 24;
  localparam int H_SYNC   = 136;
  localparam int H_TOTAL  = 1344;
  localparam int V_ACTIVE = 768;
  localparam int V_FP     = 3;
  localparam int V_SYNC   = 6;
  localparam int V_TOTAL  = 806;

  // Card corner and kernels
  localparam int CORNER_W  = 28;
  localparam int RANK_H    = 40;
  localparam int SUIT_H    = 29;
  localparam int NUM_RANKS = 13;
  localparam int NUM_SUITS = 4;
  localparam int NUM_KERNELS = NUM_RANKS + NUM_SUITS;
  localparam int KERNEL_AW = $clog2(CORNER_W * RANK_H);  // 11 bits
  localparam int SCORE_W   = $clog2(CORNER_W * RANK_H + 1);

  // Latency from vga_gen's counters to a pixel at the threshold output:
  // mirror (2 cycles) + frame buffer read (2 cycles).
  localparam int PIX_PIPE = 4;

  typedef logic [10:0] hcount_t;
  typedef logic [9:0]  vcount_t;
  typedef logic [SCORE_W-1:0] score_t;
  typedef logic [6:0]  seg7_t;      // {g,f,e,d,c,b,a}, 1 = segment lit

  typedef struct packed {
    logic [4:0] r;
    logic [5:0] g;
    logic [4:0] b;
  } rgb565_t;

  typedef struct packed {
    logic [3:0] r;
    logic [3:0] g;
    logic [3:0] b;
  } rgb444_t;

  // Card edges in frame coordinates
  typedef struct packed {
    hcount_t left;
    hcount_t right;
    vcount_t top;
    vcount_t bottom;
  } edges_t;

endpackage
