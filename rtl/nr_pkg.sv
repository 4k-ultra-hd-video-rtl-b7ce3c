// nr_pkg: types and constants shared by the 4K video noise reduction system.
//
// Pixels are 8-bit per colour channel (R, G, B). A 3x3 neighbourhood window is
// an array of nine RGB pixels indexed [row][column], row 0 being the upper row
// and column 0 the left column. Every pixel and window travels with a small
// tag that marks the last item of a row (eol) and of a frame (eof), so that a
// result stream keeps the raster structure of the input stream.
//
// Coefficients are unsigned fixed-point fractions with COEF_FRAC fractional
// bits. The noise reduction filter is the 3x3 mean filter, every tap 1/9
// (7282/65536). The gray-scale weights 0.3, 0.59 and 0.11 become
// 19661, 38666 and 7209 (their sum is exactly 65536, so white stays white).
// The word lengths are this design's choice; the weights are the system's.
package nr_pkg;

  localparam int unsigned PIX_W     = 8;   // bits per colour channel
  localparam int unsigned COEF_W    = 16;  // coefficient width
  localparam int unsigned COEF_FRAC = 16;  // fractional bits of a coefficient
  localparam int unsigned TAPS      = 9;   // 3x3 window

  typedef logic [PIX_W-1:0]  chan_t;
  typedef logic [COEF_W-1:0] coef_t;

  typedef struct packed {
    chan_t r;
    chan_t g;
    chan_t b;
  } rgb_t;

  // [row][column]
  typedef rgb_t [2:0][2:0] window_t;

  typedef struct packed {
    logic eol;  // last item of a row
    logic eof;  // last item of a frame
  } tag_t;

  typedef enum logic {
    MODE_NOISE_REDUCTION = 1'b0,
    MODE_GRAYSCALE       = 1'b1
  } mode_e;

  // Mean filter taps: round(2^16 / 9) = 7282.
  localparam coef_t FIR_TAP_MEAN = coef_t'(7282);

  // Gray-scale weights: round(0.30 * 2^16), round(0.59 * 2^16), and the rest
  // of 2^16 for blue (0.11 * 2^16 = 7208.96).
  localparam coef_t GRAY_COEF_R = coef_t'(19661);
  localparam coef_t GRAY_COEF_G = coef_t'(38666);
  localparam coef_t GRAY_COEF_B = coef_t'(7209);

endpackage
