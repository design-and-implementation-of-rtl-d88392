// sobel_pkg: types and constants shared by the Sobel edge-detection pipeline.
//
// Every stage of the pipeline moves one 8-bit pixel per clock together with a
// "done" strobe that marks the pixel as valid (the strobe is named after the
// block diagram of the design). The package defines the 8-bit grayscale pixel,
// the 24-bit RGB pixel, the states of the line-buffer controller and the
// default image geometry.
//
// The 640 x 427 frame is the test image of the reference simulation (width
// 0x280, height 0x1ab). The line FIFO depth of 699 words is the size of the
// two 8-bit line RAMs the reference implementation synthesised to; any image
// up to 699 pixels wide fits.
package sobel_pkg;

  typedef logic [7:0] pixel_t;

  typedef struct packed {
    pixel_t r;
    pixel_t g;
    pixel_t b;
  } rgb_t;

  // Controller states (see sobel_ctrl).
  typedef enum logic [1:0] {
    ST_IDLE     = 2'd0,  // first row of a frame is being loaded into FIFO 1
    ST_ROW_FILL = 2'd1,  // second row is being loaded, FIFO 2 fills
    ST_PROCESS  = 2'd2,  // both FIFOs hold a row: full-speed processing
    ST_EOF      = 2'd3   // end of frame: zero rows flushed to finish the last row
  } ctrl_state_t;

  // Where the window centre lies, travelling alongside the pixel columns:
  // valid marks a window whose centre is an image pixel, the other flags mark
  // the border sides whose neighbours are replaced by zero padding.
  typedef struct packed {
    logic valid;
    logic top;
    logic bottom;
    logic left;
    logic right;
  } win_pos_t;

  localparam int unsigned IMG_WIDTH  = 640;
  localparam int unsigned IMG_HEIGHT = 427;
  localparam int unsigned FIFO_DEPTH = 699;

  // Grayscale weights: 0.3, 0.59 and 0.11 scaled by 1024.
  localparam int unsigned GRAY_WR = 307;
  localparam int unsigned GRAY_WG = 604;
  localparam int unsigned GRAY_WB = 113;

endpackage
