// sobel_kernel: streaming Sobel edge kernel (grayscale in, gradient out).
//
// Joins the controller (sobel_ctrl), the double line buffer (sobel_fifo) and
// the window/gradient pipeline (sobel_calc). Grayscale pixels arrive in
// raster order, one per clock when done_i is high; the kernel emits one
// gradient magnitude |Gx| + |Gy| (saturated to 8 bits) per input pixel, in the
// same raster order, with zero padding around the image. The line buffer is
// split into FIFO part and calculator part as in the design's kernel diagram;
// the controller is a separate module here.
//
// Interface: gray_i/done_i in, ready_o low while the end-of-frame flush runs
// (WIDTH+1 clocks after the last pixel of a frame), ready_next_o the same one
// clock ahead, gray_o/done_o out.
// Timing: the output for pixel (x, y) leaves 5 clocks after the pixel
// (x+1, y+1) entered (or after the corresponding flush slot); throughput one
// pixel per clock.
module sobel_kernel
  import sobel_pkg::*;
#(
  parameter int unsigned WIDTH  = IMG_WIDTH,
  parameter int unsigned HEIGHT = IMG_HEIGHT,
  parameter int unsigned DEPTH  = FIFO_DEPTH
) (
  input  logic   clk,
  input  logic   rst,
  input  pixel_t gray_i,
  input  logic   done_i,
  output logic   ready_o,
  output logic   ready_next_o,
  output pixel_t gray_o,
  output logic   done_o
);

  logic        we;
  pixel_t      pix;
  win_pos_t    pos;
  pixel_t      d0, d1, d2;
  logic        buf_done;

  sobel_ctrl #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) ctrl_inst (
    .clk          (clk),
    .rst          (rst),
    .pixel_i      (gray_i),
    .done_i       (done_i),
    .ready_o      (ready_o),
    .ready_next_o (ready_next_o),
    .we_o         (we),
    .pix_o        (pix),
    .pos_o        (pos)
  );

  sobel_fifo #(.DEPTH(DEPTH), .ROW_LEN(WIDTH)) buff_inst (
    .clk    (clk),
    .rst    (rst),
    .we_i   (we),
    .d_i    (pix),
    .d0_o   (d0),
    .d1_o   (d1),
    .d2_o   (d2),
    .done_o (buf_done)
  );

  sobel_calc calc_inst (
    .clk    (clk),
    .rst    (rst),
    .d0_i   (d0),
    .d1_i   (d1),
    .d2_i   (d2),
    .done_i (buf_done),
    .pos_i  (pos),
    .mag_o  (gray_o),
    .done_o (done_o)
  );

endmodule
