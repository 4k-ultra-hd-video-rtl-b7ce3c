// fir_filter: 3x3 FIR noise reduction filter for an RGB pixel.
//
// The incoming 3x3 window is split into its R, G and B planes and each plane
// goes through its own fir_channel; the three channels run in parallel and
// in lock step, and their results are merged again into one RGB pixel. With
// the mean filter taps (all 1/9) each output channel is the average of the
// nine neighbourhood values, Y(x,y) = sum P(i,j) / 9.
//
// Handshake: a window is accepted when in_valid is high and busy is low.
// busy is high in the cycle after an accept, because the multipliers and
// adders are occupied for two cycles, so at most one window is accepted
// every second cycle (cycle time 2). The filtered pixel appears with
// out_valid six cycles after its window was accepted (latency 6), together
// with the tag that came with the window. Results are one-cycle strobes with
// no back-pressure. The taps come in on the coef port; C1..C9 are applied to
// the window in raster order (upper-left first).
module fir_filter
  import nr_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  window_t               in_win,
  input  tag_t                  in_tag,
  input  coef_t   [TAPS-1:0]    coef,
  output logic                  busy,
  output logic                  out_valid,
  output rgb_t                  out_pix,
  output tag_t                  out_tag
);

  localparam int unsigned LATENCY = 6;

  logic                accept;
  chan_t [TAPS-1:0]    plane_r, plane_g, plane_b;
  logic  [2:0]         ch_valid;
  tag_t  [LATENCY-1:0] tag_pipe;
  logic  [LATENCY-1:0] v_pipe;

  assign accept = in_valid && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) busy <= 1'b0;
    else        busy <= accept;
  end

  // Decompose the window into its colour planes, P1..P9 in raster order.
  always_comb begin
    for (int row = 0; row < 3; row++) begin
      for (int col = 0; col < 3; col++) begin
        plane_r[3*row+col] = in_win[row][col].r;
        plane_g[3*row+col] = in_win[row][col].g;
        plane_b[3*row+col] = in_win[row][col].b;
      end
    end
  end

  fir_channel u_red (
    .clk, .rst_n, .start(accept), .p(plane_r), .c(coef),
    .y(out_pix.r), .y_valid(ch_valid[0])
  );
  fir_channel u_green (
    .clk, .rst_n, .start(accept), .p(plane_g), .c(coef),
    .y(out_pix.g), .y_valid(ch_valid[1])
  );
  fir_channel u_blue (
    .clk, .rst_n, .start(accept), .p(plane_b), .c(coef),
    .y(out_pix.b), .y_valid(ch_valid[2])
  );

  // The tag follows the window through the six pipeline cycles.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag_pipe <= '0;
      v_pipe   <= '0;
    end else begin
      tag_pipe <= {tag_pipe[LATENCY-2:0], in_tag};
      v_pipe   <= {v_pipe[LATENCY-2:0], accept};
    end
  end

  assign out_valid = ch_valid[0];
  assign out_tag   = tag_pipe[LATENCY-1];

  // The three channel datapaths share one schedule.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (ch_valid == 3'b000 || ch_valid == 3'b111) && (ch_valid[0] == v_pipe[LATENCY-1]))
    else $error("fir_filter: channel pipelines out of step");

endmodule
