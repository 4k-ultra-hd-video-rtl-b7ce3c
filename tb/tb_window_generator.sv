// tb_window_generator: self-checking test of the 3x3 window generator.
//
// Sends frames of random sizes (2..MAX_W columns, 2..7 rows) back to back,
// with random gaps on the input and random back-pressure on the output.
// The frame is kept here, and for every centre pixel in raster order the
// expected window is built from it with zero outside the frame. Every window
// the block emits must match, with eol on the last window of a row and eof on
// the last window of a frame, and each frame must yield exactly W*H windows.
// A final frame with out_ready always high checks the steady rate: one window
// per accepted pixel. Row-end and flush windows and stalls are counted and
// must each have happened.
module tb_window_generator;
  import nr_pkg::*;

  localparam int unsigned MAX_W = 12;
  localparam int MAX_H = 7;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  logic    in_valid = 1'b0;
  logic    in_ready;
  rgb_t    in_pix;
  logic    in_hsync = 1'b0, in_vsync = 1'b0;
  logic    out_valid;
  logic    out_ready = 1'b1;
  window_t out_win;
  tag_t    out_tag;

  int checks = 0;
  int failures = 0;
  int n_stall = 0, n_row_end = 0, n_flush = 0;

  window_generator #(.MAX_W(MAX_W)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_pix, .in_hsync, .in_vsync,
    .out_valid, .out_ready, .out_win, .out_tag
  );

  always #5 clk = ~clk;

  // Frames in flight: the checker reads the frame the driver wrote.
  rgb_t frame [2][MAX_H][MAX_W];
  int   fw [2], fh [2];
  int   chk_frame = 0;   // frame slot being checked
  int   cx = 0, cy = 0;  // next expected centre
  int   frames_done = 0;
  int   bp_percent = 30; // output back-pressure

  function automatic rgb_t px(int slot, int x, int y);
    if (x < 0 || y < 0 || x >= fw[slot] || y >= fh[slot]) return '0;
    return frame[slot][y][x];
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && !in_ready) n_stall++;
      if (out_valid && out_ready) begin
        automatic int s = chk_frame % 2;
        automatic bit ok = 1'b1;
        automatic tag_t t;
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++)
            if (out_win[r][c] != px(s, cx + c - 1, cy + r - 1)) ok = 1'b0;
        t.eol = (cx == fw[s] - 1);
        t.eof = t.eol && (cy == fh[s] - 1);
        checks++;
        if (!ok || out_tag != t) begin
          failures++;
          $display("FAIL frame %0d centre (%0d,%0d): window or tag %b wrong (expected tag %b)",
                   chk_frame, cx, cy, out_tag, t);
        end
        if (cx == fw[s] - 1) n_row_end++;
        if (cy == fh[s] - 1) n_flush++;
        if (cx == fw[s] - 1) begin
          cx = 0;
          if (cy == fh[s] - 1) begin
            cy = 0;
            chk_frame++;
            frames_done++;
          end else cy++;
        end else cx++;
      end
    end
  end

  always @(posedge clk) begin
    #1 out_ready = ($urandom_range(0, 99) >= bp_percent);
  end

  task automatic send_frame(int slot, int w, int h, int gap_percent);
    fw[slot] = w;
    fh[slot] = h;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) frame[slot][y][x] = rgb_t'($urandom);
    for (int y = 0; y < h; y++) begin
      for (int x = 0; x < w; x++) begin
        while ($urandom_range(0, 99) < gap_percent) begin
          in_valid = 1'b0;
          @(posedge clk); #1;
        end
        in_valid = 1'b1;
        in_pix   = frame[slot][y][x];
        in_hsync = (x == w - 1) && (y != h - 1);
        in_vsync = (x == w - 1) && (y == h - 1);
        do @(posedge clk); while (!in_ready);
        #1;
      end
    end
    in_valid = 1'b0;
    in_hsync = 1'b0;
    in_vsync = 1'b0;
  endtask

  initial begin
    int sent = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // fixed corner cases, then random sizes
    send_frame(sent % 2, 2, 2, 0);          sent++;
    send_frame(sent % 2, MAX_W, MAX_H, 20); sent++;
    for (int n = 0; n < 40; n++) begin
      wait (frames_done >= sent - 1);       // keep one frame slot free
      send_frame(sent % 2, $urandom_range(2, MAX_W), $urandom_range(2, MAX_H), 25);
      sent++;
    end
    wait (frames_done == sent);
    // Steady rate: no back-pressure, no gaps: a window per accepted pixel.
    bp_percent = 0;
    begin
      longint t0, t1;
      @(posedge clk); #1;
      t0 = $time;
      send_frame(sent % 2, MAX_W, MAX_H, 0);
      sent++;
      t1 = $time;
      checks++;
      // extra cycles: one per row end of rows 1..H-2 (the last row's
      // right-hand window comes after its final pixel was taken)
      if ((t1 - t0) / 10 != MAX_W * MAX_H + (MAX_H - 2)) begin
        failures++;
        $display("FAIL: frame took %0d cycles, expected %0d", (t1 - t0) / 10, MAX_W * MAX_H + MAX_H - 2);
      end
    end
    wait (frames_done == sent);
    repeat (5) @(posedge clk);
    checks++;
    if (n_stall == 0 || n_row_end == 0 || n_flush == 0) begin
      failures++;
      $display("FAIL: a mechanism never happened: stall %0d row end %0d flush %0d", n_stall, n_row_end, n_flush);
    end
    $display("stalls %0d, row-end windows %0d, last-row windows %0d, frames %0d",
             n_stall, n_row_end, n_flush, frames_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
