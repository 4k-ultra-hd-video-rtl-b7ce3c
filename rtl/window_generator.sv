// window_generator: raster RGB pixel stream in, 3x3 neighbourhood windows out.
//
// For every pixel (x, y) of the frame the block emits the window of the nine
// pixels around it, in raster order of the centre pixel, so the filter behind
// it can compute one output pixel per input pixel. Two line buffers of
// MAX_W pixels hold the two rows above the incoming one; a column of three
// pixels (row y-2, y-1, y) is read from them as pixel x arrives and shifted
// into a window of three columns. Window centre (x-1, y-1) is therefore
// complete when pixel (x, y) arrives. Neighbours outside the frame are zero
// (constant zero padding, as in the usual image filtering routines), so the
// output frame has the size of the input frame.
//
// Frame structure comes from the sync flags on the input, not from
// parameters: in_hsync marks the last pixel of a row and in_vsync the last
// pixel of the frame (both are set on that pixel). Rows may have any length
// from 2 to MAX_W and frames any height from 2 rows up. The right-hand
// window of a row (its right column is padding) is emitted in an extra cycle
// after the row end, and after the frame end the last row is emitted by
// sweeping the line buffers once more with a zero row below (flush). While
// doing either, in_ready is low: this is the BUSY of the system's component
// symbols. The out_tag marks the last window of a row (eol) and of the frame
// (eof).
//
// Handshake: input accepted when in_valid & in_ready; output register held
// until out_valid & out_ready. One window leaves per accepted pixel except
// at row and frame ends. The buffer organisation and the flush are this
// design's; the system only names the block and its signals.
module window_generator
  import nr_pkg::*;
#(
  parameter int unsigned MAX_W = 1920  // longest row, in pixels
) (
  input  logic    clk,
  input  logic    rst_n,
  // pixel stream
  input  logic    in_valid,
  output logic    in_ready,
  input  rgb_t    in_pix,
  input  logic    in_hsync,
  input  logic    in_vsync,
  // window stream
  output logic    out_valid,
  input  logic    out_ready,
  output window_t out_win,
  output tag_t    out_tag
);

  localparam int unsigned XW = (MAX_W > 1) ? $clog2(MAX_W + 1) : 1;  // 0..MAX_W
  localparam int unsigned AW = (MAX_W > 1) ? $clog2(MAX_W) : 1;      // 0..MAX_W-1
  typedef logic [XW-1:0] col_idx_t;

  // One column of the window: [0] upper row, [2] lower row.
  typedef rgb_t [2:0] column_t;

  typedef enum logic [1:0] {
    S_RUN,         // taking pixels
    S_ROW_END,     // emitting the right-hand window of the row above
    S_FLUSH,       // sweeping the last row out of the line buffers
    S_FLUSH_END    // right-hand window of the last row
  } state_e;

  state_e   state;
  col_idx_t x;            // column of the next pixel (or flush column)
  col_idx_t row_len;      // length of the last completed row
  logic [1:0] rows;       // rows started in this frame, saturating at 2
  logic     frame_end;    // the row that just ended was the last one
  column_t  col_l, col_c; // columns x-2 and x-1

  rgb_t line0 [MAX_W];    // row y-1
  rgb_t line1 [MAX_W];    // row y-2

  logic [AW-1:0] addr;   // line buffer address, the column x
  logic    out_free;
  logic    step;          // state machine advances this cycle
  column_t new_col;
  logic    emit;
  window_t emit_win;
  tag_t    emit_tag;

  assign addr     = AW'(x);
  assign out_free = !out_valid || out_ready;
  assign in_ready = (state == S_RUN) && out_free;

  always_comb begin
    step = 1'b0;
    unique case (state)
      S_RUN:   step = in_valid && out_free;
      default: step = out_free;
    endcase
  end

  // Column entering the window in this cycle; rows above the frame are zero,
  // and during the flush the row below the frame is zero.
  always_comb begin
    new_col = '0;
    if (rows >= 2) new_col[0] = line1[addr];
    if (rows >= 1) new_col[1] = line0[addr];
    if (state == S_RUN) new_col[2] = in_pix;
  end

  // Window emitted in this cycle, if any.
  always_comb begin
    emit     = 1'b0;
    emit_win = '0;
    emit_tag = '0;
    unique case (state)
      S_RUN, S_FLUSH: begin
        emit = (rows >= 1 || state == S_FLUSH) && (x != '0);
        for (int r = 0; r < 3; r++) begin
          emit_win[r][0] = (x >= col_idx_t'(2)) ? col_l[r] : '0;
          emit_win[r][1] = col_c[r];
          emit_win[r][2] = new_col[r];
        end
      end
      S_ROW_END, S_FLUSH_END: begin
        emit = 1'b1;
        for (int r = 0; r < 3; r++) begin
          emit_win[r][0] = col_l[r];
          emit_win[r][1] = col_c[r];
          emit_win[r][2] = '0;
        end
        emit_tag.eol = 1'b1;
        emit_tag.eof = (state == S_FLUSH_END);
      end
      default: ;
    endcase
  end

  // Line buffers: the incoming pixel replaces row y-1, which moves to y-2.
  always_ff @(posedge clk) begin
    if (state == S_RUN && step) begin
      line0[addr] <= in_pix;
      line1[addr] <= line0[addr];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_RUN;
      x         <= '0;
      row_len   <= '0;
      rows      <= '0;
      frame_end <= 1'b0;
      col_l     <= '0;
      col_c     <= '0;
    end else if (step) begin
      unique case (state)
        S_RUN: begin
          col_l <= col_c;
          col_c <= new_col;
          if (in_hsync || in_vsync) begin
            x         <= '0;
            row_len   <= x + col_idx_t'(1);
            frame_end <= in_vsync;
            if (rows != 2'd2) rows <= rows + 2'd1;
            // The first row has no row above to finish.
            if (rows >= 1)     state <= S_ROW_END;
          end else begin
            x <= x + col_idx_t'(1);
          end
        end
        S_ROW_END: begin
          state <= frame_end ? S_FLUSH : S_RUN;
        end
        S_FLUSH: begin
          col_l <= col_c;
          col_c <= new_col;
          if (x == row_len - col_idx_t'(1)) begin
            x     <= '0;
            state <= S_FLUSH_END;
          end else begin
            x <= x + col_idx_t'(1);
          end
        end
        S_FLUSH_END: begin
          rows      <= '0;
          frame_end <= 1'b0;
          state     <= S_RUN;
        end
        default: state <= S_RUN;
      endcase
    end
  end

  // Output register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_win   <= '0;
      out_tag   <= '0;
    end else if (out_free) begin
      out_valid <= step && emit;
      if (step && emit) begin
        out_win <= emit_win;
        out_tag <= emit_tag;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   out_valid && !out_ready |=> out_valid && $stable(out_win) && $stable(out_tag))
    else $error("window_generator: output changed while stalled");

endmodule
