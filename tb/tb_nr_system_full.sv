// tb_nr_system_full: one full-size run of the system at its default parameters.
//
// The system is instantiated without any parameter override: four regions of
// 1920x1080 pixels. Each of the four stream agents sends one noise-reduction
// frame and then one gray-scale frame, both without input gaps, so together
// they cover a complete 3840x2160 frame in each mode, and the shared mode
// input switches once between them. Every output pixel is checked against
// the model in the agent (3x3 mean with zero padding, gray weighting), with
// its tags; the noise-reduction frame must be taken in at the rate of one
// pixel every 2 cycles and every gray result must come 4 cycles after its
// pixel. About 8.4 million clock cycles.
module tb_nr_system_full;
  import nr_pkg::*;

  localparam int R = 4;
  localparam int W = 1920;
  localparam int H = 1080;
  localparam int NFRAMES = 2;
  localparam logic [31:0] PLAN = 32'b10;  // bit f: 1 = gray-scale
  localparam int GAPS = 0;
  localparam int EXPECT_CHANGES = 1;
  localparam longint WATCHDOG = 12_000_000;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  mode_e mode_i = MODE_NOISE_REDUCTION;
  mode_e [R-1:0] mode;
  logic  [R-1:0] in_valid, in_ready, in_hsync, in_vsync, out_valid;
  rgb_t  [R-1:0] in_pix, out_pix;
  tag_t  [R-1:0] out_tag;
  int    frames_allowed = 0;
  int    frames_checked [R], a_checks [R], a_failures [R], n_stall [R], n_eol [R];
  int    n_mode_change [R], n_nr [R], n_gray [R];
  int    n_parallel = 0;
  int    extra_failures = 0;

  always #5 clk = ~clk;

  nr_system dut (
    .clk, .rst_n, .mode_i, .mode, .in_valid, .in_ready, .in_pix, .in_hsync, .in_vsync,
    .out_valid, .out_pix, .out_tag
  );

  for (genvar g = 0; g < R; g++) begin : g_agent
    tb_stream_agent #(.W(W), .H(H), .LANE(g), .NFRAMES(NFRAMES), .MODE_PLAN(PLAN),
                      .GAP_PERCENT(GAPS)) agent (
      .clk, .rst_n, .mode(mode[g]), .in_valid(in_valid[g]), .in_ready(in_ready[g]),
      .in_pix(in_pix[g]), .in_hsync(in_hsync[g]), .in_vsync(in_vsync[g]),
      .out_valid(out_valid[g]), .out_pix(out_pix[g]), .out_tag(out_tag[g]),
      .frames_allowed, .frames_checked(frames_checked[g]),
      .checks(a_checks[g]), .failures(a_failures[g]), .n_stall(n_stall[g]), .n_eol(n_eol[g]),
      .n_mode_change(n_mode_change[g]), .n_nr_frames(n_nr[g]), .n_gray_frames(n_gray[g])
    );
  end

  always @(posedge clk) if (&out_valid) n_parallel++;

  function automatic int min_checked();
    int m = frames_checked[0];
    for (int g = 1; g < R; g++) if (frames_checked[g] < m) m = frames_checked[g];
    return m;
  endfunction

  task automatic finish();
    int checks = 1, failures = extra_failures;
    int nr_frames = 0, gray_frames = 0;
    for (int g = 0; g < R; g++) begin
      checks += a_checks[g];
      failures += a_failures[g];
      nr_frames += n_nr[g];
      gray_frames += n_gray[g];
      $display("region %0d: stalls %0d, row ends %0d, mode changes %0d, frames nr %0d gray %0d",
               g, n_stall[g], n_eol[g], n_mode_change[g], n_nr[g], n_gray[g]);
      if (n_stall[g] == 0 || n_mode_change[g] != EXPECT_CHANGES || (n_eol[g] == 0 && n_nr[g] != 0)) begin
        failures++;
        $display("FAIL region %0d: a mechanism did not happen as planned", g);
      end
    end
    $display("cycles with all regions producing: %0d", n_parallel);
    if ((R > 1 && n_parallel == 0) || gray_frames != R * $countones(PLAN[NFRAMES-1:0])
        || nr_frames + gray_frames != R * NFRAMES) begin
      failures++;
      $display("FAIL: parallel %0d, frames nr %0d gray %0d", n_parallel, nr_frames, gray_frames);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int f = 0; f < NFRAMES; f++) begin
      if (f > 0 && PLAN[f] != PLAN[f-1]) while (min_checked() < f) @(posedge clk);
      #1 mode_i = PLAN[f] ? MODE_GRAYSCALE : MODE_NOISE_REDUCTION;
      frames_allowed = f + 1;
      @(posedge clk);
    end
    while (min_checked() < NFRAMES) @(posedge clk);
    repeat (20) @(posedge clk);
    finish();
  end

  initial begin
    for (longint i = 0; i < WATCHDOG; i++) @(posedge clk);
    $display("FAIL: watchdog");
    extra_failures++;
    finish();
  end

endmodule
