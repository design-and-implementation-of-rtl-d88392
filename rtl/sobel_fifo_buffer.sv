// sobel_fifo_buffer: one line FIFO of the double line buffer.
//
// A circular buffer of DEPTH 8-bit words with a write pointer, a read pointer
// and a fill count. While it holds fewer than ROW_LEN pixels a write only
// fills it. Once it holds exactly ROW_LEN pixels (one image row) it is
// "done": d_o shows the oldest pixel, and each further write pushes the new
// pixel and pops that oldest one in the same clock. Its output is therefore
// the input stream delayed by exactly one image row.
//
// DEPTH = 699 is the size of the line RAMs of the reference implementation;
// ROW_LEN is the image width and may be anything up to DEPTH. The
// first-in-first-out row buffer follows the design; the show-ahead read
// (d_o is the combinational read of the oldest word, as a distributed RAM
// gives it) is this design's choice, made so that both cascaded FIFOs and the
// live pixel stay column-aligned without extra delay registers.
//
// Interface: we_i/d_i write port; d_o oldest pixel, valid while done_o = 1.
// Timing: one write per clock; d_o changes the clock after a popping write.
// Synchronous active-high reset empties the buffer (the data words are not
// cleared).
module sobel_fifo_buffer
  import sobel_pkg::*;
#(
  parameter int unsigned DEPTH   = FIFO_DEPTH,
  parameter int unsigned ROW_LEN = IMG_WIDTH
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   we_i,
  input  pixel_t d_i,
  output pixel_t d_o,
  output logic   done_o
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CNT_WD = $clog2(DEPTH + 1);

  pixel_t             buff_mem [DEPTH];
  logic [PTR_W-1:0]   wr_ptr, rd_ptr;
  logic [CNT_WD-1:0]  count;

  function automatic logic [PTR_W-1:0] ptr_inc(input logic [PTR_W-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  assign done_o = (32'(count) == ROW_LEN);
  assign d_o    = buff_mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (we_i) buff_mem[wr_ptr] <= d_i;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else if (we_i) begin
      wr_ptr <= ptr_inc(wr_ptr);
      if (done_o) rd_ptr <= ptr_inc(rd_ptr);
      else        count  <= count + 1'b1;
    end
  end

  initial begin
    assert (ROW_LEN >= 1 && ROW_LEN <= DEPTH)
      else $error("sobel_fifo_buffer: ROW_LEN %0d must be 1..DEPTH %0d", ROW_LEN, DEPTH);
  end

endmodule
