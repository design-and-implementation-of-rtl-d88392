// tb_gray2rgb: checks that every valid gray value is copied to R, G and B one
// clock later and that done_o follows done_i.
module tb_gray2rgb;
  import sobel_pkg::*;

  logic   clk = 0, rst = 1;
  pixel_t gray = '0;
  logic   done_i = 0;
  rgb_t   rgb;
  logic   done_o;
  int     checks = 0, failures = 0;

  gray2rgb dut (.clk, .rst, .gray_i(gray), .done_i, .rgb_o(rgb), .done_o);

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
    for (int i = 0; i < 2000; i++) begin
      automatic int  v = (i < 256) ? i : $urandom_range(255);
      automatic bit  d = (i < 256) || ($urandom_range(3) != 0);
      gray   <= 8'(v);
      done_i <= d;
      @(posedge clk);
      #1;
      checks++;
      if (done_o !== d) begin
        failures++;
        $display("done_o %0b expected %0b", done_o, d);
      end
      if (d) begin
        checks++;
        if (rgb.r != 8'(v) || rgb.g != 8'(v) || rgb.b != 8'(v)) begin
          failures++;
          $display("gray %0d gave rgb %0d %0d %0d", v, rgb.r, rgb.g, rgb.b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
