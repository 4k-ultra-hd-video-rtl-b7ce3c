// nr_system: 4K video noise reduction / gray-scale system with data division.
//
// A 3840x2160 frame is divided into NUM_REGIONS equal regions (default four
// quadrants of 1920x1080) and each region is processed by its own
// nr_region_unit, all in parallel. Each unit takes one pixel every second
// clock cycle, so at 60 frames/s a 1920x1080 region needs about
// 2 * 1920 * 1080 * 60 = 249 MHz, a quarter of what a single unit for the
// whole frame would need. With three colour channels per unit, four units give
// twelve FIR channel datapaths working at once.
//
// One mode input selects noise reduction (3x3 mean filter per colour) or
// gray-scale conversion for all regions; each unit switches at its own next
// frame boundary (see nr_region_unit). Every region has its own pixel input
// stream (valid/ready, hsync on the last pixel of a row, vsync on the last
// pixel of the region's frame) and its own result stream (one-cycle strobes,
// eol/eof tags). Filtering treats each region as an image of its own:
// neighbours outside the region are zero. How the full frame is cut into the
// region streams and how the results are put back together is left to the
// surrounding system. The quadrant split and the zero padding are this
// design's choices; four parallel regions are the system's.
module nr_system
  import nr_pkg::*;
#(
  parameter int unsigned NUM_REGIONS = 4,
  parameter int unsigned REGION_W    = 1920,
  parameter coef_t [TAPS-1:0] FIR_COEF = {TAPS{FIR_TAP_MEAN}}
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  mode_e                   mode_i,
  output mode_e [NUM_REGIONS-1:0] mode,
  input  logic  [NUM_REGIONS-1:0] in_valid,
  output logic  [NUM_REGIONS-1:0] in_ready,
  input  rgb_t  [NUM_REGIONS-1:0] in_pix,
  input  logic  [NUM_REGIONS-1:0] in_hsync,
  input  logic  [NUM_REGIONS-1:0] in_vsync,
  output logic  [NUM_REGIONS-1:0] out_valid,
  output rgb_t  [NUM_REGIONS-1:0] out_pix,
  output tag_t  [NUM_REGIONS-1:0] out_tag
);

  for (genvar g = 0; g < NUM_REGIONS; g++) begin : g_region
    nr_region_unit #(
      .MAX_W   (REGION_W),
      .FIR_COEF(FIR_COEF)
    ) u_unit (
      .clk, .rst_n,
      .mode_i,
      .mode     (mode[g]),
      .in_valid (in_valid[g]),
      .in_ready (in_ready[g]),
      .in_pix   (in_pix[g]),
      .in_hsync (in_hsync[g]),
      .in_vsync (in_vsync[g]),
      .out_valid(out_valid[g]),
      .out_pix  (out_pix[g]),
      .out_tag  (out_tag[g])
    );
  end

endmodule
