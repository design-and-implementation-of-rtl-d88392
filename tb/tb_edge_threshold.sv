// tb_edge_threshold: checks the thresholding unit in both modes: with the
// threshold enabled a magnitude above the threshold gives 255 and any other
// gives 0 (including a magnitude equal to the threshold); with it disabled
// the magnitude passes unchanged. Latency one clock.
module tb_edge_threshold;
  import sobel_pkg::*;

  logic   clk = 0, rst = 1;
  logic   en = 0;
  pixel_t thr = '0, mag = '0;
  logic   done_i = 0;
  pixel_t edge_px;
  logic   done_o;
  int     checks = 0, failures = 0;
  int     n_edge = 0, n_non_edge = 0, n_equal = 0, n_bypass = 0;

  edge_threshold dut (.clk, .rst, .thresh_en_i(en), .threshold_i(thr), .mag_i(mag),
                      .done_i, .edge_o(edge_px), .done_o);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int i = 0; i < 4000; i++) begin
      automatic bit e = $urandom_range(1);
      automatic int t = $urandom_range(255);
      automatic int m = ($urandom_range(7) == 0) ? t : $urandom_range(255);
      automatic int exp_v;
      en     <= e;
      thr    <= 8'(t);
      mag    <= 8'(m);
      done_i <= 1'b1;
      @(posedge clk);
      #1;
      if (!e)         begin exp_v = m; n_bypass++; end
      else if (m > t) begin exp_v = 255; n_edge++; end
      else            begin exp_v = 0; n_non_edge++; if (m == t) n_equal++; end
      checks++;
      if (!done_o || int'(edge_px) != exp_v) begin
        failures++;
        $display("en %0b thr %0d mag %0d: out %0d expected %0d", e, t, m, edge_px, exp_v);
      end
    end
    checks++;
    if (n_edge == 0 || n_non_edge == 0 || n_equal == 0 || n_bypass == 0) failures++;
    $display("edge %0d non-edge %0d equal %0d bypass %0d", n_edge, n_non_edge, n_equal, n_bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
