// tb_noise_reduction: does the noise-reduction mode reduce noise?
//
// A clean 64x48 test image (smooth colour gradients) gets zero-mean
// approximately Gaussian noise added (sum of four uniform values, standard
// deviation about 29 levels, clipped to 0..255) and is sent through one
// region unit in noise-reduction mode. Over the interior pixels (the border
// is excluded because of the zero padding) the mean squared error against the
// clean image is measured before and after filtering. The 3x3 mean should
// cut the noise power by close to a factor of 9; the test requires at least
// a factor of 4 on every channel, and checks that every pixel of the frame
// came out, in order, with its tags.
module tb_noise_reduction;
  import nr_pkg::*;

  localparam int W = 64;
  localparam int H = 48;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  mode_e mode;
  logic  in_valid = 1'b0, in_ready, in_hsync = 1'b0, in_vsync = 1'b0, out_valid;
  rgb_t  in_pix = '0, out_pix;
  tag_t  out_tag;

  int checks = 0;
  int failures = 0;
  int ox = 0, oy = 0;
  bit done = 1'b0;

  rgb_t clean [H][W];
  rgb_t noisy [H][W];
  real  err_in [3], err_out [3];
  int   n_interior = 0;

  always #5 clk = ~clk;

  nr_region_unit #(.MAX_W(W)) dut (
    .clk, .rst_n, .mode_i(MODE_NOISE_REDUCTION), .mode, .in_valid, .in_ready, .in_pix,
    .in_hsync, .in_vsync, .out_valid, .out_pix, .out_tag
  );

  function automatic int clip(int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  function automatic int noise();
    // four uniforms on -25..25: variance 4 * (51^2 - 1) / 12, about 29^2
    int s = 0;
    for (int i = 0; i < 4; i++) s += $urandom_range(0, 50) - 25;
    return s;
  endfunction

  function automatic int chan(rgb_t p, int c);
    return (c == 0) ? int'(p.r) : (c == 1) ? int'(p.g) : int'(p.b);
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      automatic tag_t t = '{eol: ox == W - 1, eof: (ox == W - 1) && (oy == H - 1)};
      checks++;
      if (out_tag != t || done) begin
        failures++;
        $display("FAIL at (%0d,%0d): tag %b expected %b", ox, oy, out_tag, t);
      end
      if (ox > 0 && ox < W - 1 && oy > 0 && oy < H - 1) begin
        n_interior++;
        for (int c = 0; c < 3; c++) begin
          automatic real d_in  = real'(chan(noisy[oy][ox], c) - chan(clean[oy][ox], c));
          automatic real d_out = real'(chan(out_pix, c) - chan(clean[oy][ox], c));
          err_in[c]  += d_in * d_in;
          err_out[c] += d_out * d_out;
        end
      end
      if (ox == W - 1) begin
        ox = 0;
        if (oy == H - 1) done = 1'b1;
        else oy++;
      end else ox++;
    end
  end

  initial begin
    for (int c = 0; c < 3; c++) begin err_in[c] = 0.0; err_out[c] = 0.0; end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        clean[y][x] = '{r: chan_t'(40 + 2 * x), g: chan_t'(60 + 3 * y), b: chan_t'(100 + x + y)};
        noisy[y][x] = '{r: chan_t'(clip(int'(clean[y][x].r) + noise())),
                        g: chan_t'(clip(int'(clean[y][x].g) + noise())),
                        b: chan_t'(clip(int'(clean[y][x].b) + noise()))};
      end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        in_valid = 1'b1;
        in_pix   = noisy[y][x];
        in_hsync = (x == W - 1) && (y != H - 1);
        in_vsync = (x == W - 1) && (y == H - 1);
        do @(posedge clk); while (!in_ready);
        #1;
      end
    in_valid = 1'b0; in_hsync = 1'b0; in_vsync = 1'b0;
    while (!done) @(posedge clk);
    repeat (10) @(posedge clk);
    for (int c = 0; c < 3; c++) begin
      automatic real mse_in = err_in[c] / n_interior;
      automatic real mse_out = err_out[c] / n_interior;
      $display("channel %0d: noise power %0.1f before, %0.1f after filtering (ratio %0.2f)",
               c, mse_in, mse_out, mse_in / mse_out);
      checks++;
      if (mse_out * 4.0 > mse_in) begin
        failures++;
        $display("FAIL: channel %0d noise not reduced enough", c);
      end
    end
    checks++;
    if (n_interior != (W - 2) * (H - 2)) begin
      failures++;
      $display("FAIL: %0d interior pixels seen", n_interior);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
