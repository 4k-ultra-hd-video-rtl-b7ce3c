// fir_channel: pipelined 3x3 FIR datapath for one colour channel.
//
// Y = sum(P_i * C_i), i = 1..9, rounded back to an 8-bit pixel. The structure
// is the pipelined one of the system: nine multipliers that each take two
// cycles (operand register, then product register A..I), a first addition
// stage of three adders that is used twice with feedback (J = A+B, K = D+E,
// L = G+H, then J += C, K += F, L += I), and a second stage of one adder that
// is also used twice (M = J+K, then Y = M+L). Each of the three steps holds
// its hardware for two cycles, so a new pixel may start every second cycle
// and the result appears six cycles after the start:
//
//   cycle 0  start, p and c presented
//   cycle 1  operand registers hold p, c           (multiply, 1st cycle)
//   cycle 2  A..I hold the nine products            (multiply, 2nd cycle)
//   cycle 3  J,K,L = A+B, D+E, G+H                  (adders, 1st pass)
//   cycle 4  J,K,L += C, F, I                       (adders, 2nd pass)
//   cycle 5  M = J+K                                (adder,  1st pass)
//   cycle 6  Y = round(M+L), y_valid = 1            (adder,  2nd pass)
//
// The next pixel overwrites J,K,L in cycle 5, while the second-stage adder
// still needs L in cycle 6; register LH keeps L for that second pass. LH is
// this design's addition, as are the fixed-point widths, round-to-nearest
// and the saturation to 255 (only reachable with coefficients summing above
// one). Coefficients are unsigned with COEF_FRAC fractional bits.
//
// Interface: start must not be raised in two consecutive cycles (checked by
// an assertion). There is no back-pressure on the result: y/y_valid is a
// one-cycle strobe, y holds its value until the next result.
module fir_channel
  import nr_pkg::*;
#(
  parameter int unsigned CW    = COEF_W,     // coefficient width
  parameter int unsigned FRAC  = COEF_FRAC   // fractional bits of a coefficient
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  chan_t   [TAPS-1:0]  p,        // P1..P9, raster order in the window
  input  logic    [TAPS-1:0][CW-1:0] c, // C1..C9
  output chan_t               y,
  output logic                y_valid
);

  localparam int unsigned PW = PIX_W + CW;  // product width
  localparam int unsigned SW = PW + 4;      // sum of up to 9 products

  typedef logic [PW-1:0] prod_t;
  typedef logic [SW-1:0] sum_t;

  chan_t [TAPS-1:0]         op_p;
  logic  [TAPS-1:0][CW-1:0] op_c;
  prod_t [TAPS-1:0]         prod;         // registers A..I
  sum_t                     reg_j, reg_k, reg_l, reg_m, reg_lh;
  logic  [5:1]              stage_v;      // stage_v[k]: pixel in cycle k

  // Operand registers: first cycle of the two-cycle multipliers.
  always_ff @(posedge clk) begin
    if (start) begin
      op_p <= p;
      op_c <= c;
    end
  end

  // Product registers A..I: second cycle of the multipliers.
  always_ff @(posedge clk) begin
    if (stage_v[1]) begin
      for (int i = 0; i < TAPS; i++) prod[i] <= op_p[i] * op_c[i];
    end
  end

  // First addition stage: three adders, the multiplexers pick the products
  // on the first pass and the fed-back J,K,L with C,F,I on the second.
  sum_t add1_a [3];
  sum_t add1_b [3];
  always_comb begin
    for (int k = 0; k < 3; k++) begin
      if (stage_v[3]) begin
        add1_a[k] = (k == 0) ? reg_j : (k == 1) ? reg_k : reg_l;
        add1_b[k] = sum_t'(prod[3*k+2]);
      end else begin
        add1_a[k] = sum_t'(prod[3*k]);
        add1_b[k] = sum_t'(prod[3*k+1]);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (stage_v[2] || stage_v[3]) begin
      reg_j <= add1_a[0] + add1_b[0];
      reg_k <= add1_a[1] + add1_b[1];
      reg_l <= add1_a[2] + add1_b[2];
    end
  end

  // Second addition stage: one adder, J+K on the first pass, M+LH on the
  // second, whose result the demultiplexer sends to Y.
  sum_t add2_a, add2_b, add2_s;
  assign add2_a = stage_v[5] ? reg_m  : reg_j;
  assign add2_b = stage_v[5] ? reg_lh : reg_k;
  assign add2_s = add2_a + add2_b;

  always_ff @(posedge clk) begin
    if (stage_v[4]) begin
      reg_m  <= add2_s;
      reg_lh <= reg_l;
    end
  end

  // Round to nearest and saturate to the pixel range.
  localparam sum_t HALF = sum_t'(1) << (FRAC - 1);
  sum_t rounded;
  assign rounded = (add2_s + HALF) >> FRAC;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y <= '0;
    end else if (stage_v[5]) begin
      y <= (rounded > sum_t'({PIX_W{1'b1}})) ? {PIX_W{1'b1}} : chan_t'(rounded);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage_v <= '0;
      y_valid <= 1'b0;
    end else begin
      stage_v <= {stage_v[4:1], start};
      y_valid <= stage_v[5];
    end
  end

  // The multipliers and adders are each busy for two cycles per pixel.
  assert property (@(posedge clk) disable iff (!rst_n) start |=> !start)
    else $error("fir_channel: start in two consecutive cycles");

endmodule
