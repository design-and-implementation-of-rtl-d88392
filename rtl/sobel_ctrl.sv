// sobel_ctrl: line-buffer controller of the Sobel kernel.
//
// A four-state machine with row and column counters that follows the frame:
//   ST_IDLE      the first row of a frame is loaded into FIFO 1
//   ST_ROW_FILL  the second row is loaded (FIFO 1 passes row 0 to FIFO 2);
//                the windows centred on row 0, whose upper row is zero
//                padding, are computed here
//   ST_PROCESS   rows 2..HEIGHT-1 arrive, one window per pixel
//   ST_EOF       end of frame: WIDTH+1 zero pixels are written into the line
//                buffer by the controller itself, so that the windows of the
//                last row (lower row = zero padding) are completed; then the
//                machine returns to ST_IDLE for the next frame
// The window completed by input pixel number n (counting from the frame
// start) is centred on pixel n-WIDTH-1, so every input pixel from the second
// pixel of row 1 on, and every flushed zero, yields one output, WIDTH*HEIGHT
// in all: the output frame has the size of the input frame.
//
// The four states, the row/column counters and zero padding follow the
// design. Producing the top row during row fill and the flush of WIDTH+1
// zeros at the end of frame are this design's choices, as is ready_o: it is
// low during ST_EOF, and the source must not present pixels then.
// ready_next_o looks one clock ahead, for a source that is one register
// stage upstream.
//
// Interface: pixel_i/done_i from the grayscale stage; we_o/pix_o write the
// line buffer (combinational); pos_o describes the window that this write
// completes and is registered, so it arrives together with the line buffer's
// registered outputs.
// Timing: one pixel per clock; a frame of W x H pixels occupies W*H input
// cycles plus W+1 flush cycles. Synchronous active-high reset.
module sobel_ctrl
  import sobel_pkg::*;
#(
  parameter int unsigned WIDTH  = IMG_WIDTH,
  parameter int unsigned HEIGHT = IMG_HEIGHT
) (
  input  logic        clk,
  input  logic        rst,
  input  pixel_t      pixel_i,
  input  logic        done_i,
  output logic        ready_o,       // a pixel may be presented in this clock
  output logic        ready_next_o,  // a pixel may be presented in the next clock
  output logic        we_o,
  output pixel_t      pix_o,
  output win_pos_t    pos_o
);

  localparam int unsigned CW = $clog2(WIDTH + 1);
  localparam int unsigned RW = $clog2(HEIGHT + 1);

  ctrl_state_t     state_q, state_d;
  logic [CW-1:0]   in_col_q, in_col_d;     // column of the pixel being written
  logic [RW-1:0]   in_row_q, in_row_d;     // row of the pixel being written
  logic [CW-1:0]   c_col_q, c_col_d;       // centre of the window completed next
  logic [RW-1:0]   c_row_q, c_row_d;
  logic            win_valid;
  logic            row_end;

  assign ready_o = (state_q != ST_EOF);
  assign ready_next_o = (state_d != ST_EOF);
  assign we_o    = (state_q == ST_EOF) || done_i;
  assign pix_o   = (state_q == ST_EOF) ? '0 : pixel_i;
  assign row_end = (32'(in_col_q) == WIDTH - 1);

  // A write completes a window unless the line buffer does not yet hold
  // row 0 and the first pixel of row 1.
  always_comb begin
    unique case (state_q)
      ST_IDLE:     win_valid = 1'b0;
      ST_ROW_FILL: win_valid = done_i && (in_col_q != '0);
      ST_PROCESS:  win_valid = done_i;
      default:     win_valid = 1'b1;
    endcase
  end

  always_comb begin
    state_d  = state_q;
    in_col_d = in_col_q;
    in_row_d = in_row_q;
    c_col_d  = c_col_q;
    c_row_d  = c_row_q;

    if (we_o) begin
      if (state_q == ST_EOF) begin
        // flush: WIDTH+1 zero pixels, counted by in_col
        if (32'(in_col_q) == WIDTH) begin
          state_d  = ST_IDLE;
          in_col_d = '0;
          in_row_d = '0;
        end else begin
          in_col_d = in_col_q + 1'b1;
        end
      end else if (row_end) begin
        in_col_d = '0;
        if (32'(in_row_q) == HEIGHT - 1) begin
          state_d = ST_EOF;
        end else begin
          in_row_d = in_row_q + 1'b1;
          if (state_q == ST_IDLE)          state_d = ST_ROW_FILL;
          else if (state_q == ST_ROW_FILL) state_d = ST_PROCESS;
        end
      end else begin
        in_col_d = in_col_q + 1'b1;
      end
    end

    if (win_valid) begin
      if (32'(c_col_q) == WIDTH - 1) begin
        c_col_d = '0;
        c_row_d = (32'(c_row_q) == HEIGHT - 1) ? '0 : c_row_q + 1'b1;
      end else begin
        c_col_d = c_col_q + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q  <= ST_IDLE;
      in_col_q <= '0;
      in_row_q <= '0;
      c_col_q  <= '0;
      c_row_q  <= '0;
      pos_o    <= '0;
    end else begin
      state_q  <= state_d;
      in_col_q <= in_col_d;
      in_row_q <= in_row_d;
      c_col_q  <= c_col_d;
      c_row_q  <= c_row_d;
      pos_o    <= '{valid:  win_valid,
                    top:    (c_row_q == '0),
                    bottom: (32'(c_row_q) == HEIGHT - 1),
                    left:   (c_col_q == '0),
                    right:  (32'(c_col_q) == WIDTH - 1)};
    end
  end

  initial begin
    assert (WIDTH >= 2 && HEIGHT >= 2)
      else $error("sobel_ctrl: the frame must be at least 2 x 2 pixels");
  end

  // The source must hold its pixels while the controller flushes.
  assert property (@(posedge clk) disable iff (rst) done_i |-> ready_o)
    else $error("sobel_ctrl: pixel presented during end-of-frame flush");

endmodule
