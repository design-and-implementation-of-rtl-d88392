// tb_rgb2gray: checks the RGB-to-gray stage against floor((307R+604G+113B)/1024)
// for the extreme colours and random pixels, with gaps in the valid strobe,
// and checks the one-clock latency of done_o.
module tb_rgb2gray;
  import sobel_pkg::*;
  import sobel_ref_pkg::*;

  logic   clk = 0, rst = 1;
  rgb_t   rgb;
  logic   done_i = 0;
  pixel_t gray;
  logic   done_o;
  int     checks = 0, failures = 0;

  rgb2gray dut (.clk, .rst, .rgb_i(rgb), .done_i, .gray_o(gray), .done_o);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive(int r, int g, int b, bit v);
    rgb    <= '{r: 8'(r), g: 8'(g), b: 8'(b)};
    done_i <= v;
    @(posedge clk);
    #1;
    checks++;
    if (done_o !== v) begin
      failures++;
      $display("done_o %0b expected %0b", done_o, v);
    end
    if (v) begin
      checks++;
      if (int'(gray) != gray_ref(r, g, b)) begin
        failures++;
        $display("rgb %0d %0d %0d: gray %0d expected %0d", r, g, b, gray, gray_ref(r, g, b));
      end
    end
  endtask

  initial begin
    rgb = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    drive(0, 0, 0, 1);
    drive(255, 255, 255, 1);
    drive(255, 0, 0, 1);
    drive(0, 255, 0, 1);
    drive(0, 0, 255, 1);
    drive(100, 100, 100, 1);
    for (int i = 0; i < 3000; i++)
      drive($urandom_range(255), $urandom_range(255), $urandom_range(255), ($urandom_range(3) != 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
