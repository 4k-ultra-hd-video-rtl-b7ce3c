// tb_nr_region_unit: self-checking test of one region unit and its modes.
//
// One stream agent sends seven 9x5 frames with the mode plan
// noise reduction, noise reduction, gray, gray, noise reduction, gray,
// noise reduction. The testbench sets mode_i for a frame only once all
// results of the frames before it have been checked, so every mode change
// happens at a frame boundary; frames of the same mode follow each other
// without waiting. The agent checks every output pixel, its tags and the
// timing; here it is also required that the unit changed mode four times and
// stalled its input at least once.
module tb_nr_region_unit;
  import nr_pkg::*;

  localparam int W = 9;
  localparam int H = 5;
  localparam int NFRAMES = 7;
  localparam logic [31:0] PLAN = 32'b0101100;  // bit f: 1 = gray-scale

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  mode_e mode_i = MODE_NOISE_REDUCTION;
  mode_e mode;
  logic  in_valid, in_ready, in_hsync, in_vsync, out_valid;
  rgb_t  in_pix, out_pix;
  tag_t  out_tag;
  int    frames_allowed = 0;
  int    frames_checked, a_checks, a_failures, n_stall, n_eol, n_mode_change, n_nr, n_gray;
  int    checks, failures;

  always #5 clk = ~clk;

  nr_region_unit #(.MAX_W(16)) dut (
    .clk, .rst_n, .mode_i, .mode, .in_valid, .in_ready, .in_pix, .in_hsync, .in_vsync,
    .out_valid, .out_pix, .out_tag
  );

  tb_stream_agent #(.W(W), .H(H), .LANE(0), .NFRAMES(NFRAMES), .MODE_PLAN(PLAN), .GAP_PERCENT(30)) agent (
    .clk, .rst_n, .mode, .in_valid, .in_ready, .in_pix, .in_hsync, .in_vsync,
    .out_valid, .out_pix, .out_tag, .frames_allowed, .frames_checked,
    .checks(a_checks), .failures(a_failures), .n_stall, .n_eol, .n_mode_change,
    .n_nr_frames(n_nr), .n_gray_frames(n_gray)
  );

  task automatic finish();
    checks = a_checks + 1;
    failures = a_failures;
    if (n_mode_change != 4 || n_stall == 0 || n_eol == 0 || n_nr != 4 || n_gray != 3) begin
      failures++;
      $display("FAIL: mode changes %0d stalls %0d row ends %0d nr frames %0d gray frames %0d",
               n_mode_change, n_stall, n_eol, n_nr, n_gray);
    end
    $display("mode changes %0d, stalls %0d, row ends %0d, frames nr %0d gray %0d",
             n_mode_change, n_stall, n_eol, n_nr, n_gray);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int f = 0; f < NFRAMES; f++) begin
      if (f > 0 && PLAN[f] != PLAN[f-1]) wait (frames_checked == f);
      #1 mode_i = PLAN[f] ? MODE_GRAYSCALE : MODE_NOISE_REDUCTION;
      frames_allowed = f + 1;
      @(posedge clk);
    end
    wait (frames_checked == NFRAMES);
    repeat (20) @(posedge clk);
    finish();
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog");
    a_failures++;
    finish();
  end

endmodule
