// sobel_top: complete Sobel edge detector, RGB pixel stream in and out.
//
// Pipeline: rgb2gray (Y = (307R + 604G + 113B) >> 10) -> sobel_kernel (line
// buffers, 3x3 window, |Gx| + |Gy|) -> edge_threshold (edge = 255, else 0, or
// the gray-level magnitude when thresholding is off) -> gray2rgb (value copied
// to R, G and B). The chain of blocks and the port names follow the design's
// block diagram and reference simulation.
//
// Interface: red_i/green_i/blue_i with done_i (pixel valid), one pixel per
// clock in raster order, WIDTH x HEIGHT pixels per frame; ready_o is low for
// WIDTH+1 clocks after the last pixel of each frame while the kernel finishes
// the last row, and no pixel may be presented then (this handshake is this
// design's addition). thresh_en_i/threshold_i configure the threshold.
// red_o/green_o/blue_o with done_o carry the edge image, same size and order.
// Timing: output for pixel (x, y) appears 8 clocks after input pixel
// (x+1, y+1); one pixel per clock. sys_rst_i is synchronous, active high.
module sobel_top
  import sobel_pkg::*;
#(
  parameter int unsigned WIDTH  = IMG_WIDTH,
  parameter int unsigned HEIGHT = IMG_HEIGHT,
  parameter int unsigned DEPTH  = FIFO_DEPTH
) (
  input  logic   sys_clk_i,
  input  logic   sys_rst_i,
  input  pixel_t red_i,
  input  pixel_t green_i,
  input  pixel_t blue_i,
  input  logic   done_i,
  output logic   ready_o,
  input  logic   thresh_en_i,
  input  pixel_t threshold_i,
  output pixel_t red_o,
  output pixel_t green_o,
  output pixel_t blue_o,
  output logic   done_o
);

  pixel_t gray, mag, edge_px;
  logic   gray_done, mag_done, edge_done;
  rgb_t   rgb_out;

  rgb2gray gray_inst (
    .clk    (sys_clk_i),
    .rst    (sys_rst_i),
    .rgb_i  ('{r: red_i, g: green_i, b: blue_i}),
    .done_i (done_i),
    .gray_o (gray),
    .done_o (gray_done)
  );

  sobel_kernel #(.WIDTH(WIDTH), .HEIGHT(HEIGHT), .DEPTH(DEPTH)) kernel_inst (
    .clk     (sys_clk_i),
    .rst     (sys_rst_i),
    .gray_i  (gray),
    .done_i  (gray_done),
    .ready_o      (),
    .ready_next_o (ready_o),
    .gray_o  (mag),
    .done_o  (mag_done)
  );

  edge_threshold thresh_inst (
    .clk         (sys_clk_i),
    .rst         (sys_rst_i),
    .thresh_en_i (thresh_en_i),
    .threshold_i (threshold_i),
    .mag_i       (mag),
    .done_i      (mag_done),
    .edge_o      (edge_px),
    .done_o      (edge_done)
  );

  gray2rgb rgb_inst (
    .clk    (sys_clk_i),
    .rst    (sys_rst_i),
    .gray_i (edge_px),
    .done_i (edge_done),
    .rgb_o  (rgb_out),
    .done_o (done_o)
  );

  // The grayscale stage is one register ahead of the kernel, so the top is
  // ready when the kernel will be ready in the next clock.
  assert property (@(posedge sys_clk_i) disable iff (sys_rst_i) done_i |-> ready_o)
    else $error("sobel_top: pixel presented while ready_o is low");

  assign red_o   = rgb_out.r;
  assign green_o = rgb_out.g;
  assign blue_o  = rgb_out.b;

endmodule
