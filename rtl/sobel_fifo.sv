// sobel_fifo: double line buffer feeding the 3x3 window.
//
// Two line FIFOs (sobel_fifo_buffer) in cascade. The incoming pixel goes to
// FIFO 1; the pixel FIFO 1 pops (one row old) goes to FIFO 2, which pops the
// pixel two rows old. The three outputs are the same image column of three
// consecutive rows:
//   d0_o  the incoming pixel            (row y+1 of the window)
//   d1_o  the pixel one row earlier     (row y,   from FIFO 1)
//   d2_o  the pixel two rows earlier    (row y-1, from FIFO 2)
// While a FIFO has not yet filled a whole row its output reads as 0, which
// is the zero padding above the first image row.
//
// The structure (two FIFOs, incoming pixel forwarded as d0) follows the
// design's FIFO buffer diagram. Registering the three outputs together with
// done_o is this design's choice.
//
// Interface: we_i/d_i one pixel per clock; d0_o..d2_o with done_o.
// Timing: outputs one clock after the write; done_o is we_i delayed by one.
module sobel_fifo
  import sobel_pkg::*;
#(
  parameter int unsigned DEPTH   = FIFO_DEPTH,
  parameter int unsigned ROW_LEN = IMG_WIDTH
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   we_i,
  input  pixel_t d_i,
  output pixel_t d0_o,
  output pixel_t d1_o,
  output pixel_t d2_o,
  output logic   done_o
);

  pixel_t f1_q, f2_q;
  logic   f1_done, f2_done;

  sobel_fifo_buffer #(.DEPTH(DEPTH), .ROW_LEN(ROW_LEN)) buffer_inst_1 (
    .clk    (clk),
    .rst    (rst),
    .we_i   (we_i),
    .d_i    (d_i),
    .d_o    (f1_q),
    .done_o (f1_done)
  );

  sobel_fifo_buffer #(.DEPTH(DEPTH), .ROW_LEN(ROW_LEN)) buffer_inst_2 (
    .clk    (clk),
    .rst    (rst),
    .we_i   (we_i && f1_done),
    .d_i    (f1_q),
    .d_o    (f2_q),
    .done_o (f2_done)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      d0_o   <= '0;
      d1_o   <= '0;
      d2_o   <= '0;
      done_o <= 1'b0;
    end else begin
      done_o <= we_i;
      if (we_i) begin
        d0_o <= d_i;
        d1_o <= f1_done ? f1_q : '0;
        d2_o <= f2_done ? f2_q : '0;
      end
    end
  end

endmodule
