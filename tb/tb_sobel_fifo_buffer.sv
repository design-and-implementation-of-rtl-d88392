// tb_sobel_fifo_buffer: checks one line FIFO against a queue model. Random
// writes with gaps; done_o must rise exactly when ROW_LEN pixels are held and
// d_o must then be the pixel written ROW_LEN writes earlier. A second
// instance with ROW_LEN = DEPTH checks that the pointers wrap correctly when
// the buffer is used to its full depth, and a reset in mid-stream must empty
// both.
module tb_sobel_fifo_buffer;
  import sobel_pkg::*;

  localparam int DEPTH = 13;
  localparam int ROWA  = 9;

  logic   clk = 0, rst = 1;
  logic   we = 0;
  pixel_t din = '0;
  pixel_t qa, qb;
  logic   da, db;
  int     checks = 0, failures = 0;
  pixel_t hist[$];

  sobel_fifo_buffer #(.DEPTH(DEPTH), .ROW_LEN(ROWA))  dut_a (.clk, .rst, .we_i(we), .d_i(din), .d_o(qa), .done_o(da));
  sobel_fifo_buffer #(.DEPTH(DEPTH), .ROW_LEN(DEPTH)) dut_b (.clk, .rst, .we_i(we), .d_i(din), .d_o(qb), .done_o(db));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_out();
    int n = hist.size();
    checks++;
    if (da !== (n >= ROWA) || (n >= ROWA && qa !== hist[n - ROWA])) begin
      failures++;
      $display("A: held %0d done %0b q %0d", n, da, qa);
    end
    checks++;
    if (db !== (n >= DEPTH) || (n >= DEPTH && qb !== hist[n - DEPTH])) begin
      failures++;
      $display("B: held %0d done %0b q %0d", n, db, qb);
    end
  endtask

  task automatic run(int cycles);
    for (int i = 0; i < cycles; i++) begin
      automatic bit w = ($urandom_range(4) != 0);
      automatic pixel_t v = 8'($urandom_range(255));
      we  <= w;
      din <= v;
      @(posedge clk);
      if (w) hist.push_back(v);
      #1;
      check_out();
    end
    we <= 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    #1;
    check_out();
    run(400);
    // reset in the middle of the stream empties the buffers
    rst <= 1;
    @(posedge clk);
    rst <= 0;
    hist.delete();
    #1;
    check_out();
    run(300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
