// tb_sobel_fifo: checks the double line buffer. For a random pixel stream
// with gaps, each output column must hold the written pixel (d0), the pixel
// ROW_LEN writes earlier (d1) and the pixel 2*ROW_LEN writes earlier (d2),
// with zero in place of pixels that were never written, one clock after the
// write.
module tb_sobel_fifo;
  import sobel_pkg::*;

  localparam int DEPTH = 12;
  localparam int ROW   = 7;

  logic   clk = 0, rst = 1;
  logic   we = 0;
  pixel_t din = '0;
  pixel_t d0, d1, d2;
  logic   done;
  int     checks = 0, failures = 0;
  pixel_t hist[$];

  sobel_fifo #(.DEPTH(DEPTH), .ROW_LEN(ROW)) dut (.clk, .rst, .we_i(we), .d_i(din),
                                                 .d0_o(d0), .d1_o(d1), .d2_o(d2), .done_o(done));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int i = 0; i < 600; i++) begin
      automatic bit w = ($urandom_range(3) != 0);
      automatic pixel_t v = 8'($urandom_range(1, 255));
      we  <= w;
      din <= v;
      @(posedge clk);
      #1;
      checks++;
      if (done !== w) begin
        failures++;
        $display("done %0b expected %0b", done, w);
      end
      if (w) begin
        automatic int n = hist.size();
        automatic pixel_t e1 = (n >= ROW) ? hist[n - ROW] : 8'd0;
        automatic pixel_t e2 = (n >= 2 * ROW) ? hist[n - 2 * ROW] : 8'd0;
        hist.push_back(v);
        checks++;
        if (d0 !== v || d1 !== e1 || d2 !== e2) begin
          failures++;
          $display("write %0d: got %0d %0d %0d expected %0d %0d %0d", n, d0, d1, d2, v, e1, e2);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
