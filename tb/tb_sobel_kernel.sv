// tb_sobel_kernel: checks the streaming kernel (controller, double line
// buffer, calculator) over four back-to-back 12 x 7 frames of different
// content, with random gaps in the input strobe and the source waiting on
// ready_o. Every output must equal the reference |Gx|+|Gy| of the
// zero-padded frame, in raster order, W*H outputs per frame; outputs whose
// window is completed by an input pixel must appear exactly 5 clocks after
// that pixel.
module tb_sobel_kernel;
  import sobel_pkg::*;
  import sobel_ref_pkg::*;

  localparam int W = 12;
  localparam int H = 7;
  localparam int DEPTH = 15;
  localparam int LAT = 5;
  localparam int FRAMES = 4;

  logic   clk = 0, rst = 1;
  pixel_t gray = '0;
  logic   done_i = 0;
  logic   ready, ready_next;
  pixel_t mag;
  logic   done_o;
  int     checks = 0, failures = 0;
  int     cyc = 0;
  int     n_stall = 0, n_timed = 0;

  sobel_kernel #(.WIDTH(W), .HEIGHT(H), .DEPTH(DEPTH)) dut (
    .clk, .rst, .gray_i(gray), .done_i, .ready_o(ready), .ready_next_o(ready_next),
    .gray_o(mag), .done_o);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int value; int cyc; int idx; } exp_t;
  exp_t exp_q[$];
  int   n_out = 0;

  always @(posedge clk) begin
    #2;
    if (!rst && done_o) begin
      checks++;
      n_out++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected output %0d", mag);
      end else begin
        automatic exp_t e = exp_q.pop_front();
        if (int'(mag) != e.value || (e.cyc >= 0 && cyc - e.cyc != LAT)) begin
          failures++;
          $display("pixel %0d: got %0d after %0d clocks, expected %0d after %0d",
                   e.idx, mag, cyc - e.cyc, e.value, LAT);
        end
        if (e.cyc >= 0) n_timed++;
      end
    end
  end

  initial begin
    sobel_image img = new(W, H);
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int f = 0; f < FRAMES; f++) begin
      img.fill(f % 3, 77);
      for (int n = 0; n < W * H; n++) begin
        while ($urandom_range(4) == 0 || !ready) begin
          if (!ready) n_stall++;
          done_i <= 0;
          @(posedge clk);
          #1;
        end
        gray   <= img.px[n];
        done_i <= 1;
        #1;
        // the pixel n completes the window centred on n-W-1
        if (n >= W + 1) exp_q.push_back('{value: img.mag((n - W - 1) % W, (n - W - 1) / W), cyc: cyc, idx: n - W - 1});
        @(posedge clk);
        #1;
      end
      done_i <= 0;
      // the last W+1 windows are completed by the controller's flush
      for (int m = W * H - W - 1; m < W * H; m++)
        exp_q.push_back('{value: img.mag(m % W, m / W), cyc: -1, idx: m});
    end
    repeat (W + 20) @(posedge clk);
    checks++;
    if (n_out != FRAMES * W * H || exp_q.size() != 0 || n_stall == 0) begin
      failures++;
      $display("outputs %0d of %0d, %0d left, %0d stalls", n_out, FRAMES * W * H, exp_q.size(), n_stall);
    end
    $display("outputs %0d (timed %0d), ready stalls %0d", n_out, n_timed, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
