// tb_sobel_top_full: runs the edge detector at its default size, a 640 x 427
// frame through 699-word line FIFOs, with no parameter overridden. Two full
// frames are streamed back to back, the first with thresholding off and the
// second with threshold 100, and every output pixel is compared with the
// reference (see tb_sobel_top, which uses the same checks on small frames).
module tb_sobel_top_full;
  import sobel_pkg::*;
  import sobel_ref_pkg::*;

  localparam int W = 640;
  localparam int H = 427;
  localparam int LAT = 8;
  localparam int FRAMES = 2;

  logic   clk = 0, rst = 1;
  pixel_t r_i = '0, g_i = '0, b_i = '0;
  logic   done_i = 0;
  logic   ready;
  logic   ten = 0;
  pixel_t thr = '0;
  pixel_t r_o, g_o, b_o;
  logic   done_o;
  int     checks = 0, failures = 0;
  int     cyc = 0;

  sobel_top dut (
    .sys_clk_i(clk), .sys_rst_i(rst), .red_i(r_i), .green_i(g_i), .blue_i(b_i), .done_i,
    .ready_o(ready), .thresh_en_i(ten), .threshold_i(thr),
    .red_o(r_o), .green_o(g_o), .blue_o(b_o), .done_o);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_gap = 0, n_stall = 0, n_border = 0, n_sat = 0, n_edge = 0, n_non_edge = 0, n_bypass = 0;
  int n_state[4];
  always @(posedge clk) if (!rst) n_state[dut.kernel_inst.ctrl_inst.state_q]++;

  typedef struct { int value; int cyc; int idx; } exp_t;
  exp_t exp_q[$];
  int   n_out = 0, n_timed = 0;

  always @(posedge clk) begin
    #2;
    if (!rst && done_o) begin
      checks++;
      n_out++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected output %0d", r_o);
      end else begin
        automatic exp_t e = exp_q.pop_front();
        if (int'(r_o) != e.value || int'(g_o) != e.value || int'(b_o) != e.value ||
            (e.cyc >= 0 && cyc - e.cyc != LAT)) begin
          failures++;
          if (failures < 20)
            $display("pixel %0d: got %0d %0d %0d after %0d clocks, expected %0d after %0d",
                     e.idx, r_o, g_o, b_o, cyc - e.cyc, e.value, LAT);
        end
        if (e.cyc >= 0) n_timed++;
      end
    end
  end

  function automatic int expect_px(sobel_image gimg, int m, bit en, int t);
    int x = m % W;
    int y = m / W;
    int mg = gimg.mag(x, y);
    if (x == 0 || y == 0 || x == W - 1 || y == H - 1) n_border++;
    if (mg == 255 && !en) n_sat++;
    if (!en) begin n_bypass++; return mg; end
    if (mg > t) begin n_edge++; return 255; end
    n_non_edge++;
    return 0;
  endfunction

  initial begin
    sobel_image gimg = new(W, H);
    byte unsigned rr[], gg[], bb[];
    rr = new[W * H];
    gg = new[W * H];
    bb = new[W * H];
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    #1;
    for (int f = 0; f < FRAMES; f++) begin
      automatic int  kind = 1;
      automatic bit  en   = (f == 1);
      automatic int  t    = 100;
      // RGB frame and its gray image
      for (int n = 0; n < W * H; n++) begin
        automatic int x = n % W, y = n / W;
        if (kind == 0) begin
          rr[n] = 8'($urandom_range(255)); gg[n] = 8'($urandom_range(255)); bb[n] = 8'($urandom_range(255));
        end else if (kind == 1) begin
          rr[n] = 8'((x * 37 + y * 11) % 256);
          gg[n] = (x > W / 2) ? 8'd220 : 8'd15;
          bb[n] = 8'(((x / 3 + y / 2) % 2) * 200);
        end else begin
          rr[n] = 8'd90; gg[n] = 8'd150; bb[n] = 8'd30;
        end
        gimg.px[n] = byte'(gray_ref(rr[n], gg[n], bb[n]));
      end
      // the threshold setting is static while pixels are in flight: change
      // it only once the previous frame has fully left the pipeline
      if (f > 0 && (en != ten || 8'(t) != thr)) begin
        while (exp_q.size() != 0) begin
          @(posedge clk);
          #1;
        end
      end
      ten <= en;
      thr <= 8'(t);
      for (int n = 0; n < W * H; n++) begin
        while ($urandom_range(50) == 0 || !ready) begin
          if (!ready) n_stall++;
          else        n_gap++;
          done_i <= 0;
          @(posedge clk);
          #1;
        end
        r_i    <= rr[n];
        g_i    <= gg[n];
        b_i    <= bb[n];
        done_i <= 1;
        #1;
        if (n >= W + 1) exp_q.push_back('{value: expect_px(gimg, n - W - 1, en, t), cyc: cyc, idx: n - W - 1});
        @(posedge clk);
        #1;
      end
      done_i <= 0;
      for (int m = W * H - W - 1; m < W * H; m++)
        exp_q.push_back('{value: expect_px(gimg, m, en, t), cyc: -1, idx: m});
    end
    repeat (W + 30) @(posedge clk);
    checks++;
    if (n_out != FRAMES * W * H || exp_q.size() != 0) begin
      failures++;
      $display("outputs %0d of %0d, %0d left", n_out, FRAMES * W * H, exp_q.size());
    end
    checks++;
    if (n_state[3] == 0 || n_edge == 0 || n_non_edge == 0 || n_bypass == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("outputs %0d (timed %0d); gaps %0d, ready stalls %0d, border %0d, saturated %0d, edge %0d, non-edge %0d, bypass %0d",
             n_out, n_timed, n_gap, n_stall, n_border, n_sat, n_edge, n_non_edge, n_bypass);
    $display("clocks in idle %0d, row fill %0d, process %0d, end of frame %0d",
             n_state[0], n_state[1], n_state[2], n_state[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
