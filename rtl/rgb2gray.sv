// rgb2gray: RGB to grayscale conversion, first stage of the pipeline.
//
// Y = (307*R + 604*G + 113*B) >> 10, i.e. the luminance weights 0.3, 0.59 and
// 0.11 scaled by 1024 so that the division becomes a 10-bit right shift. The
// weights and the shift are those of the design; the weights sum to 1024, so
// the result never exceeds 255 and needs no clamping.
//
// Interface: rgb_i with its valid strobe done_i in; gray_o and done_o out.
// Timing: one register stage, so gray_o/done_o follow rgb_i/done_i by one
// clock; one pixel per clock. Reset (synchronous, active high) clears done_o;
// the reset style is this design's choice.
module rgb2gray
  import sobel_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  rgb_t   rgb_i,
  input  logic   done_i,
  output pixel_t gray_o,
  output logic   done_o
);

  logic [17:0] weighted;   // max 1024 * 255 < 2^18

  always_comb begin
    weighted = 18'(GRAY_WR * rgb_i.r) + 18'(GRAY_WG * rgb_i.g) + 18'(GRAY_WB * rgb_i.b);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      gray_o <= '0;
      done_o <= 1'b0;
    end else begin
      done_o <= done_i;
      if (done_i) gray_o <= weighted[17:10];
    end
  end

endmodule
