// edge_threshold: thresholding unit.
//
// Compares each gradient magnitude with threshold_i. A pixel whose magnitude
// exceeds the threshold is an edge and is output as 255 (white); any other
// pixel is output as 0 (black). With thresh_en_i low the unit passes the
// (already saturated) magnitude through unchanged, giving a gray-level edge
// map; this is the form shown by the reference simulation, whose outputs are
// gray levels. The strict "greater than" comparison follows the design's
// description; the threshold value, the enable input and the bypass are this
// design's choices, since no threshold value is specified.
//
// Interface: mag_i/done_i in, edge_o/done_o out, threshold_i and thresh_en_i
// are static configuration inputs.
// Timing: one register stage, one pixel per clock. Synchronous active-high reset.
module edge_threshold
  import sobel_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   thresh_en_i,
  input  pixel_t threshold_i,
  input  pixel_t mag_i,
  input  logic   done_i,
  output pixel_t edge_o,
  output logic   done_o
);

  always_ff @(posedge clk) begin
    if (rst) begin
      edge_o <= '0;
      done_o <= 1'b0;
    end else begin
      done_o <= done_i;
      if (done_i) begin
        if (!thresh_en_i)             edge_o <= mag_i;
        else if (mag_i > threshold_i) edge_o <= 8'd255;
        else                          edge_o <= 8'd0;
      end
    end
  end

endmodule
