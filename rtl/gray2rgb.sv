// gray2rgb: output formatter, grayscale to RGB.
//
// Replicates the 8-bit grayscale (edge) value into the red, green and blue
// channels so that a display expecting RGB shows the same gray level; with
// the threshold enabled upstream the values are 255 (edge, white) or 0 (black).
//
// Interface: gray_i/done_i in, rgb_o/done_o out.
// Timing: one register stage, one pixel per clock. Synchronous active-high
// reset clears the outputs (this design's choice).
module gray2rgb
  import sobel_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  pixel_t gray_i,
  input  logic   done_i,
  output rgb_t   rgb_o,
  output logic   done_o
);

  always_ff @(posedge clk) begin
    if (rst) begin
      rgb_o  <= '0;
      done_o <= 1'b0;
    end else begin
      done_o <= done_i;
      if (done_i) rgb_o <= '{r: gray_i, g: gray_i, b: gray_i};
    end
  end

endmodule
