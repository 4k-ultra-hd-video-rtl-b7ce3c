// nr_region_unit: the video processing component for one region of the frame.
//
// It has the two application modes of the system, one active at a time:
//   noise reduction: pixels -> window_generator -> fir_filter -> RGB output
//   gray-scale:      pixels -> gray_converter   -> gray value on R, G and B
// Both datapaths are present; the mode register selects which one takes the
// input stream and drives the output. This stands for the reconfiguration
// of a dynamically configured device between the two modes.
//
// Mode changes take effect only between frames: when mode_i differs from the
// active mode, the unit stops taking pixels at the next frame boundary,
// waits until every result of the frames already taken in has left, and
// then switches (one cycle). Pixels of a frame are never split between modes.
//
// Interface: pixel stream with valid/ready and the sync flags of
// window_generator (hsync on the last pixel of a row, vsync on the last pixel
// of the frame). Results leave as one-cycle strobes, in raster order, with
// eol/eof tags; there is no back-pressure on the output. Noise reduction:
// a result leaves 7 cycles after the pixel below and to the right of it was
// taken in (one row and one pixel later in the stream), one pixel every 2
// cycles. Gray-scale: latency 4 cycles, one pixel every 2 cycles.
module nr_region_unit
  import nr_pkg::*;
#(
  parameter int unsigned MAX_W = 1920,
  parameter coef_t [TAPS-1:0] FIR_COEF = {TAPS{FIR_TAP_MEAN}}
) (
  input  logic  clk,
  input  logic  rst_n,
  input  mode_e mode_i,
  output mode_e mode,
  input  logic  in_valid,
  output logic  in_ready,
  input  rgb_t  in_pix,
  input  logic  in_hsync,
  input  logic  in_vsync,
  output logic  out_valid,
  output rgb_t  out_pix,
  output tag_t  out_tag
);

  logic       in_frame;       // a frame has started at the input and not ended
  logic [1:0] frames_out;     // frames taken in whose last result is pending
  logic       hold;           // mode change requested: take no new frame
  logic       accept;

  // window generator -> FIR
  logic    wg_in_ready, wg_out_valid, fir_busy;
  window_t wg_win;
  tag_t    wg_tag;
  logic    fir_out_valid;
  rgb_t    fir_pix;
  tag_t    fir_tag;
  // gray converter
  logic    gc_busy, gc_out_valid;
  chan_t   gc_gray;
  tag_t    gc_tag;

  assign hold     = (mode_i != mode) && !in_frame;
  assign in_ready = !hold && ((mode == MODE_NOISE_REDUCTION) ? wg_in_ready : !gc_busy);
  assign accept   = in_valid && in_ready;

  window_generator #(.MAX_W(MAX_W)) u_window (
    .clk, .rst_n,
    .in_valid (in_valid && !hold && mode == MODE_NOISE_REDUCTION),
    .in_ready (wg_in_ready),
    .in_pix, .in_hsync, .in_vsync,
    .out_valid(wg_out_valid),
    .out_ready(!fir_busy),
    .out_win  (wg_win),
    .out_tag  (wg_tag)
  );

  fir_filter u_fir (
    .clk, .rst_n,
    .in_valid (wg_out_valid),
    .in_win   (wg_win),
    .in_tag   (wg_tag),
    .coef     (FIR_COEF),
    .busy     (fir_busy),
    .out_valid(fir_out_valid),
    .out_pix  (fir_pix),
    .out_tag  (fir_tag)
  );

  gray_converter u_gray (
    .clk, .rst_n,
    .in_valid (in_valid && !hold && mode == MODE_GRAYSCALE),
    .in_pix,
    .in_tag   ('{eol: in_hsync || in_vsync, eof: in_vsync}),
    .busy     (gc_busy),
    .out_valid(gc_out_valid),
    .out_gray (gc_gray),
    .out_tag  (gc_tag)
  );

  // Merge the two result streams; only one mode is active at a time.
  always_comb begin
    out_valid = fir_out_valid || gc_out_valid;
    if (fir_out_valid) begin
      out_pix = fir_pix;
      out_tag = fir_tag;
    end else begin
      out_pix = '{r: gc_gray, g: gc_gray, b: gc_gray};
      out_tag = gc_tag;
    end
  end

  // Frame bookkeeping and the mode register.
  logic frame_in_done, frame_out_done;
  assign frame_in_done  = accept && in_vsync;
  assign frame_out_done = out_valid && out_tag.eof;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode       <= MODE_NOISE_REDUCTION;
      in_frame   <= 1'b0;
      frames_out <= '0;
    end else begin
      if (frame_in_done)    in_frame <= 1'b0;
      else if (accept)      in_frame <= 1'b1;
      frames_out <= frames_out + 2'(frame_in_done) - 2'(frame_out_done);
      if (hold && frames_out == '0 && !frame_out_done) mode <= mode_i;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(fir_out_valid && gc_out_valid))
    else $error("nr_region_unit: both modes produced a result");

endmodule
