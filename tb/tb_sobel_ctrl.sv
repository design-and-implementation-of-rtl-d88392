// tb_sobel_ctrl: checks the line-buffer controller over three small frames,
// with random gaps in the pixel strobe. For every frame it checks that
//  - all W*H pixels are written unchanged and W+1 zero pixels follow,
//  - ready_o is low exactly during those W+1 flush clocks, and ready_next_o
//    predicts it one clock ahead,
//  - W*H windows are marked valid, in raster order, each with the border
//    flags of its centre (flags arrive one clock after the write),
//  - the machine passes IDLE -> ROW_FILL -> PROCESS -> EOF -> IDLE.
module tb_sobel_ctrl;
  import sobel_pkg::*;

  localparam int W = 5;
  localparam int H = 4;

  logic     clk = 0, rst = 1;
  pixel_t   pix_in = '0;
  logic     done_i = 0;
  logic     ready, ready_next, we;
  pixel_t   pix_out;
  win_pos_t pos;
  int       checks = 0, failures = 0;

  sobel_ctrl #(.WIDTH(W), .HEIGHT(H)) dut (.clk, .rst, .pixel_i(pix_in), .done_i,
    .ready_o(ready), .ready_next_o(ready_next), .we_o(we), .pix_o(pix_out), .pos_o(pos));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // state trace
  int seen_state[4];
  ctrl_state_t prev_state = ST_IDLE;
  int bad_transitions = 0;
  always @(posedge clk) if (!rst) begin
    automatic ctrl_state_t s = dut.state_q;
    seen_state[s]++;
    if (s != prev_state) begin
      if (!((prev_state == ST_IDLE && s == ST_ROW_FILL) || (prev_state == ST_ROW_FILL && s == ST_PROCESS) ||
            (prev_state == ST_PROCESS && s == ST_EOF) || (prev_state == ST_EOF && s == ST_IDLE)))
        bad_transitions++;
    end
    prev_state = s;
  end

  // window positions: pos_o is registered, so check it against the write of
  // the previous clock
  int  win_idx = 0;
  bit  prev_we_valid = 0;
  always @(posedge clk) if (!rst) begin
    #1;
    if (pos.valid) begin
      automatic int x = win_idx % W;
      automatic int y = (win_idx / W) % H;
      checks++;
      if (pos.top != (y == 0) || pos.bottom != (y == H - 1) ||
          pos.left != (x == 0) || pos.right != (x == W - 1)) begin
        failures++;
        $display("window %0d flags %b", win_idx, pos);
      end
      win_idx++;
    end
  end

  int ready_prev = 1;
  initial begin
    int writes, zero_writes, low_ready;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int f = 0; f < 3; f++) begin
      writes = 0;
      zero_writes = 0;
      low_ready = 0;
      for (int n = 0; n < W * H; n++) begin
        automatic pixel_t v = 8'($urandom_range(1, 255));
        while ($urandom_range(2) == 0) begin
          done_i <= 0;
          @(posedge clk);
          #1;
        end
        #1;
        checks++;
        if (!ready) begin failures++; $display("not ready inside frame"); end
        pix_in <= v;
        done_i <= 1;
        #1;
        checks++;
        if (!we || pix_out !== v) begin failures++; $display("pixel %0d not written", n); end
        checks++;
        if (ready_next != (n != W * H - 1)) begin failures++; $display("ready_next wrong at pixel %0d", n); end
        writes++;
        @(posedge clk);
      end
      done_i <= 0;
      // flush: the clock after the last pixel is the first flush clock
      #1;
      while (!ready) begin
        low_ready++;
        checks++;
        if (!we || pix_out !== 0) begin failures++; $display("flush write missing"); end
        zero_writes++;
        checks++;
        if (ready_next != (low_ready == W + 1)) begin failures++; $display("ready_next wrong at flush %0d", low_ready); end
        @(posedge clk);
        #1;
      end
      checks++;
      if (low_ready != W + 1 || zero_writes != W + 1) begin
        failures++;
        $display("frame %0d: ready low %0d clocks, %0d zero writes", f, low_ready, zero_writes);
      end
      repeat ($urandom_range(3)) @(posedge clk);
    end
    repeat (3) @(posedge clk);
    checks++;
    if (win_idx != 3 * W * H) begin failures++; $display("%0d windows, expected %0d", win_idx, 3 * W * H); end
    checks++;
    if (bad_transitions != 0 || seen_state[ST_IDLE] == 0 || seen_state[ST_ROW_FILL] == 0 ||
        seen_state[ST_PROCESS] == 0 || seen_state[ST_EOF] == 0) begin
      failures++;
      $display("state trace: bad %0d idle %0d fill %0d proc %0d eof %0d", bad_transitions,
               seen_state[0], seen_state[1], seen_state[2], seen_state[3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
