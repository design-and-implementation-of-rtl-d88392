// sobel_calc: 3x3 window and pipelined gradient computation.
//
// Window: three 3-pixel shift registers, one per image row, shifted on each
// valid column from the double line buffer:
//   incoming row  d0_i -> P9 -> P8 -> P7
//   FIFO 1 row    d1_i -> P6 -> P5 -> P4
//   FIFO 2 row    d2_i -> P3 -> P2 -> P1
// so that P1..P9 are the window pixels d0..d8 read row by row, P5 the centre.
// Border pixels use zero padding: the window side that lies outside the image
// (flags in pos_i, registered with the shift) is replaced by zeros.
//
// Pipeline (one pixel per clock, result 4 clocks after the column enters):
//   S0  window shift and border flags
//   S1  gx_p = d0 + 2*d3 + d6   gx_n = d2 + 2*d5 + d8     (10-bit sums)
//       gy_p = d0 + 2*d1 + d2   gy_n = d6 + 2*d7 + d8
//   S2  |gx_d| = |gx_p - gx_n|, |gy_d| = |gy_p - gy_n|   (compare, then
//       subtract the smaller from the larger)
//   S3  |G| = |gx_d| + |gy_d|, saturated to 255
// These are the Sobel kernels [-1 0 1; -2 0 2; -1 0 1] and its transpose;
// the sign of each kernel is lost in the absolute value. The shift-register
// window, the partial sums and the |Gx| + |Gy| magnitude follow the design.
// The magnitude is written once as |gx_d| - |gy_d| in the design's pipeline
// diagram and everywhere else as |Gx| + |Gy|; the sum is used here. Saturating
// the 11-bit magnitude to 8 bits is this design's choice.
//
// Interface: d0_i..d2_i/done_i from sobel_fifo, pos_i from sobel_ctrl (same
// clock), mag_o/done_o out; done_o is high only for windows centred on an
// image pixel.
// Timing: latency 4 clocks, throughput one pixel per clock. Synchronous
// active-high reset clears the valid pipeline.
module sobel_calc
  import sobel_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  pixel_t   d0_i,
  input  pixel_t   d1_i,
  input  pixel_t   d2_i,
  input  logic     done_i,
  input  win_pos_t pos_i,
  output pixel_t   mag_o,
  output logic     done_o
);

  // window P1..P9 (index 1..9)
  pixel_t   p [1:9];
  win_pos_t pos_q;
  logic     v0, v1, v2;

  // S0: window shift
  always_ff @(posedge clk) begin
    if (done_i) begin
      p[9] <= d0_i;  p[8] <= p[9];  p[7] <= p[8];
      p[6] <= d1_i;  p[5] <= p[6];  p[4] <= p[5];
      p[3] <= d2_i;  p[2] <= p[3];  p[1] <= p[2];
      pos_q <= pos_i;
    end
  end

  // zero padding: d[k] = P(k+1) unless it lies outside the image
  pixel_t d [0:8];
  always_comb begin
    for (int k = 0; k < 9; k++) begin
      automatic int r = k / 3;  // 0 top (FIFO 2 row), 2 bottom (incoming row)
      automatic int c = k % 3;  // 0 left (oldest column), 2 right (newest)
      d[k] = p[k+1];
      if ((r == 0 && pos_q.top) || (r == 2 && pos_q.bottom) ||
          (c == 0 && pos_q.left) || (c == 2 && pos_q.right))
        d[k] = '0;
    end
  end

  // S1: partial sums
  logic [9:0] gx_p, gx_n, gy_p, gy_n;
  always_ff @(posedge clk) begin
    gx_p <= 10'(d[0]) + {1'b0, d[3], 1'b0} + 10'(d[6]);
    gx_n <= 10'(d[2]) + {1'b0, d[5], 1'b0} + 10'(d[8]);
    gy_p <= 10'(d[0]) + {1'b0, d[1], 1'b0} + 10'(d[2]);
    gy_n <= 10'(d[6]) + {1'b0, d[7], 1'b0} + 10'(d[8]);
  end

  // S2: absolute differences
  logic [9:0] gx_abs, gy_abs;
  always_ff @(posedge clk) begin
    gx_abs <= (gx_p > gx_n) ? gx_p - gx_n : gx_n - gx_p;
    gy_abs <= (gy_p > gy_n) ? gy_p - gy_n : gy_n - gy_p;
  end

  // S3: magnitude and saturation
  logic [10:0] g_sum;
  assign g_sum = 11'(gx_abs) + 11'(gy_abs);
  always_ff @(posedge clk) begin
    mag_o <= (g_sum > 11'd255) ? 8'd255 : g_sum[7:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v0     <= 1'b0;
      v1     <= 1'b0;
      v2     <= 1'b0;
      done_o <= 1'b0;
    end else begin
      v0     <= done_i && pos_i.valid;
      v1     <= v0;
      v2     <= v1;
      done_o <= v2;
    end
  end

endmodule
