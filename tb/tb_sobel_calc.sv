// tb_sobel_calc: checks the window and gradient pipeline on its own. The
// testbench plays the part of the line buffer and the controller: for a
// random 9 x 6 image it presents, for write n, the column (img[n], img[n-W],
// img[n-2W]) (zero outside the image) with the border flags of centre
// n-W-1, with random gaps. Every output must equal the reference |Gx|+|Gy|
// of the zero-padded image, in raster order, exactly 4 clocks after the
// column that completes its window. Two images are run: random noise and a
// structured scene that saturates.
module tb_sobel_calc;
  import sobel_pkg::*;
  import sobel_ref_pkg::*;

  localparam int W = 9;
  localparam int H = 6;
  localparam int LAT = 4;

  logic     clk = 0, rst = 1;
  pixel_t   d0 = '0, d1 = '0, d2 = '0;
  logic     done_i = 0;
  win_pos_t pos = '0;
  pixel_t   mag;
  logic     done_o;
  int       checks = 0, failures = 0;
  int       cyc = 0;
  int       n_sat = 0, n_border = 0;

  sobel_calc dut (.clk, .rst, .d0_i(d0), .d1_i(d1), .d2_i(d2), .done_i, .pos_i(pos),
                  .mag_o(mag), .done_o);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int value; int cyc; int idx; } exp_t;
  exp_t exp_q[$];

  always @(posedge clk) begin
    #2;
    if (!rst && done_o) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected output %0d", mag);
      end else begin
        automatic exp_t e = exp_q.pop_front();
        if (int'(mag) != e.value || cyc - e.cyc != LAT) begin
          failures++;
          $display("window %0d: got %0d after %0d clocks, expected %0d after %0d",
                   e.idx, mag, cyc - e.cyc, e.value, LAT);
        end
        if (e.value == 255) n_sat++;
      end
    end
  end

  task automatic run_image(sobel_image img);
    for (int n = 0; n <= W * H + W; n++) begin
      automatic int m = n - W - 1;
      automatic int xm = (m >= 0) ? m % W : 0;
      automatic int ym = (m >= 0) ? m / W : 0;
      while ($urandom_range(3) == 0) begin
        done_i <= 0;
        pos    <= '{default: 1'b1};   // must be ignored without done_i
        @(posedge clk);
      end
      d0     <= 8'(img.get(n % W, n / W));
      d1     <= 8'(img.get((n - W + W * H) % W, (n - W) >= 0 ? (n - W) / W : -1));
      d2     <= 8'(img.get((n - 2 * W + 2 * W * H) % W, (n - 2 * W) >= 0 ? (n - 2 * W) / W : -1));
      done_i <= 1;
      pos    <= '{valid: (m >= 0), top: (ym == 0), bottom: (ym == H - 1),
                  left: (xm == 0), right: (xm == W - 1)};
      #1;
      if (m >= 0) begin
        exp_q.push_back('{value: img.mag(xm, ym), cyc: cyc, idx: m});
        if (xm == 0 || ym == 0 || xm == W - 1 || ym == H - 1) n_border++;
      end
      @(posedge clk);
    end
    done_i <= 0;
    repeat (LAT + 2) @(posedge clk);
  endtask

  initial begin
    sobel_image img = new(W, H);
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    img.fill(0);
    run_image(img);
    img.fill(1);
    run_image(img);
    checks++;
    if (exp_q.size() != 0 || n_sat == 0 || n_border == 0) begin
      failures++;
      $display("left over %0d, saturated %0d, border %0d", exp_q.size(), n_sat, n_border);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
