// tb_stream_agent: drives one region's pixel stream and checks its results.
//
// Used by the region-unit and system testbenches, one agent per region.
// Pixel values come from a hash of (region, frame, x, y), so no frame has to
// be stored and the expected output of any pixel can be recomputed here:
//   noise reduction: per channel round(sum of the 3x3 neighbours * 7282 / 2^16),
//                    neighbours outside the W x H region being zero;
//   gray-scale:      round((19661 R + 38666 G + 7209 B) / 2^16) on R, G and B.
// The mode of frame f is bit f of MODE_PLAN; the agent sends frame f once
// frames_allowed > f. Results must arrive in raster order with eol/eof tags;
// a gray result must arrive exactly 4 cycles after its pixel was taken, and a
// noise-reduction frame sent without gaps must be taken in at most
// 2*W*H + 2*H cycles (one pixel every 2 cycles). Frames 0 and 1 are sent
// without gaps, later ones with GAP_PERCENT random idle cycles.
// Counters report how often stalls, row ends, frame ends and mode changes
// were seen.
module tb_stream_agent
  import nr_pkg::*;
#(
  parameter int W = 8,
  parameter int H = 6,
  parameter int LANE = 0,
  parameter int NFRAMES = 1,
  parameter logic [31:0] MODE_PLAN = '0,
  parameter int GAP_PERCENT = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  mode_e mode,
  output logic  in_valid,
  input  logic  in_ready,
  output rgb_t  in_pix,
  output logic  in_hsync,
  output logic  in_vsync,
  input  logic  out_valid,
  input  rgb_t  out_pix,
  input  tag_t  out_tag,
  input  int    frames_allowed,
  output int    frames_checked,
  output int    checks,
  output int    failures,
  output int    n_stall,
  output int    n_eol,
  output int    n_mode_change,
  output int    n_nr_frames,
  output int    n_gray_frames
);

  longint cycle = 0;
  int     send_f = 0;
  int     cx = 0, cy = 0;
  longint first_acc, last_acc;
  longint gray_acc[$];
  mode_e  last_mode;
  bit     mode_seen = 1'b0;

  initial begin
    in_valid = 1'b0; in_hsync = 1'b0; in_vsync = 1'b0; in_pix = '0;
    frames_checked = 0; checks = 0; failures = 0; n_stall = 0; n_eol = 0;
    n_mode_change = 0; n_nr_frames = 0; n_gray_frames = 0;
  end

  function automatic rgb_t px(int f, int x, int y);
    logic [31:0] h;
    if (x < 0 || y < 0 || x >= W || y >= H) return '0;
    h = 32'(x) * 32'h9E3779B1 ^ 32'(y) * 32'h85EBCA77 ^ 32'(f) * 32'hC2B2AE3D ^ 32'(LANE) * 32'h27D4EB2F;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B3C6D;
    h = h ^ (h >> 12);
    return rgb_t'(h[23:0]);
  endfunction

  function automatic rgb_t expected(int f, int x, int y);
    rgb_t e;
    if (MODE_PLAN[f]) begin
      rgb_t p = px(f, x, y);
      longint s = 19661 * longint'(p.r) + 38666 * longint'(p.g) + 7209 * longint'(p.b);
      s = (s + 32768) / 65536;
      if (s > 255) s = 255;
      e = '{r: chan_t'(s), g: chan_t'(s), b: chan_t'(s)};
    end else begin
      longint sr = 0, sg = 0, sb = 0;
      for (int dy = -1; dy <= 1; dy++)
        for (int dx = -1; dx <= 1; dx++) begin
          rgb_t p = px(f, x + dx, y + dy);
          sr += p.r; sg += p.g; sb += p.b;
        end
      e.r = chan_t'((sr * 7282 + 32768) / 65536);
      e.g = chan_t'((sg * 7282 + 32768) / 65536);
      e.b = chan_t'((sb * 7282 + 32768) / 65536);
    end
    return e;
  endfunction

  // Driver.
  initial begin
    @(posedge rst_n);
    for (int f = 0; f < NFRAMES; f++) begin
      while (frames_allowed <= f) @(posedge clk);
      #1;
      send_f = f;
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin
          while (f >= 2 && $urandom_range(0, 99) < GAP_PERCENT) begin
            in_valid = 1'b0;
            @(posedge clk); #1;
          end
          in_valid = 1'b1;
          in_pix   = px(f, x, y);
          in_hsync = (x == W - 1) && (y != H - 1);
          in_vsync = (x == W - 1) && (y == H - 1);
          do @(posedge clk); while (!in_ready);
          #1;
        end
      end
      in_valid = 1'b0; in_hsync = 1'b0; in_vsync = 1'b0;
    end
  end

  // Monitor and checker.
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (mode_seen && mode != last_mode) n_mode_change++;
      last_mode = mode;
      mode_seen = 1'b1;

      if (in_valid && !in_ready) n_stall++;
      if (in_valid && in_ready) begin
        if (first_acc == -1) first_acc = cycle;
        if (MODE_PLAN[send_f]) gray_acc.push_back(cycle);
        if (in_vsync && !MODE_PLAN[send_f] && send_f < 2) begin
          checks++;
          if (cycle - first_acc > 2 * W * H + 2 * H) begin
            failures++;
            $display("FAIL lane %0d frame %0d: taken in %0d cycles, limit %0d",
                     LANE, send_f, cycle - first_acc, 2 * W * H + 2 * H);
          end
        end
        if (in_vsync) first_acc = -1;
      end

      if (out_valid) begin
        automatic rgb_t e = expected(frames_checked, cx, cy);
        automatic tag_t t = '{eol: cx == W - 1, eof: (cx == W - 1) && (cy == H - 1)};
        checks++;
        if (frames_checked >= NFRAMES || out_pix != e || out_tag != t) begin
          failures++;
          $display("FAIL lane %0d frame %0d (%0d,%0d): got %h tag %b, expected %h tag %b",
                   LANE, frames_checked, cx, cy, out_pix, out_tag, e, t);
        end
        if (MODE_PLAN[frames_checked]) begin
          automatic longint a = gray_acc.pop_front();
          checks++;
          if (cycle != a + 4) begin
            failures++;
            $display("FAIL lane %0d: gray result %0d cycles after its pixel", LANE, cycle - a);
          end
        end
        if (mode != (MODE_PLAN[frames_checked] ? MODE_GRAYSCALE : MODE_NOISE_REDUCTION)) begin
          failures++;
          $display("FAIL lane %0d frame %0d: result in the wrong mode", LANE, frames_checked);
        end
        if (t.eol && !MODE_PLAN[frames_checked]) n_eol++;
        if (cx == W - 1) begin
          cx = 0;
          if (cy == H - 1) begin
            cy = 0;
            if (MODE_PLAN[frames_checked]) n_gray_frames++;
            else n_nr_frames++;
            frames_checked++;
          end else cy++;
        end else cx++;
      end
    end
  end

  initial first_acc = -1;

endmodule
