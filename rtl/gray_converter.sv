// gray_converter: pipelined RGB to gray-scale converter.
//
// Y = 0.3*R + 0.59*G + 0.11*B, rounded to an 8-bit gray value. Three
// multipliers that take two cycles each (operand register, then product
// registers A, B, C) feed one adder that is used twice through a multiplexer:
// S = A+B on the first pass, Y = S+C on the second, the demultiplexer sending
// the second result to the output register. Latency is 4 cycles and a pixel
// may enter every second cycle, the schedule of the system's optimal gray
// timing:
//
//   cycle 0  in_valid & !busy: pixel accepted
//   cycle 1  operand registers              (multiply, 1st cycle)
//   cycle 2  A, B, C hold the products      (multiply, 2nd cycle)
//   cycle 3  S = A+B
//   cycle 4  out_gray = round(S+C), out_valid = 1
//
// Handshake: busy is high in the cycle after a pixel was accepted, when the
// multipliers are still occupied; a pixel is accepted when in_valid is high
// and busy is low. The tag (end of row, end of frame) travels with the pixel.
// The result is a one-cycle strobe with no back-pressure. Weights are
// unsigned fractions with FRAC fractional bits; widths, rounding and
// saturation are this design's choice.
module gray_converter
  import nr_pkg::*;
#(
  parameter int unsigned CW   = COEF_W,
  parameter int unsigned FRAC = COEF_FRAC,
  parameter logic [CW-1:0] COEF_R = CW'(GRAY_COEF_R),
  parameter logic [CW-1:0] COEF_G = CW'(GRAY_COEF_G),
  parameter logic [CW-1:0] COEF_B = CW'(GRAY_COEF_B)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  rgb_t  in_pix,
  input  tag_t  in_tag,
  output logic  busy,
  output logic  out_valid,
  output chan_t out_gray,
  output tag_t  out_tag
);

  localparam int unsigned PW = PIX_W + CW;
  localparam int unsigned SW = PW + 2;
  typedef logic [SW-1:0] sum_t;

  logic            accept;
  rgb_t            op_pix;
  logic [PW-1:0]   prod_a, prod_b, prod_c;
  sum_t            reg_s;
  logic [3:1]      stage_v;
  tag_t [3:1]      stage_tag;

  assign accept = in_valid && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) busy <= 1'b0;
    else        busy <= accept;
  end

  always_ff @(posedge clk) begin
    if (accept) op_pix <= in_pix;
    if (stage_v[1]) begin
      prod_a <= op_pix.r * COEF_R;
      prod_b <= op_pix.g * COEF_G;
      prod_c <= op_pix.b * COEF_B;
    end
  end

  // Shared adder: first pass A+B into S, second pass S+C to the output.
  sum_t add_a, add_b, add_s, rounded;
  assign add_a   = stage_v[3] ? reg_s       : sum_t'(prod_a);
  assign add_b   = stage_v[3] ? sum_t'(prod_c) : sum_t'(prod_b);
  assign add_s   = add_a + add_b;
  assign rounded = (add_s + (sum_t'(1) << (FRAC - 1))) >> FRAC;

  always_ff @(posedge clk) begin
    if (stage_v[2]) reg_s <= add_s;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage_v   <= '0;
      stage_tag <= '0;
      out_valid <= 1'b0;
      out_gray  <= '0;
      out_tag   <= '0;
    end else begin
      stage_v   <= {stage_v[2:1], accept};
      stage_tag <= {stage_tag[2:1], in_tag};
      out_valid <= stage_v[3];
      if (stage_v[3]) begin
        out_gray <= (rounded > sum_t'({PIX_W{1'b1}})) ? {PIX_W{1'b1}} : chan_t'(rounded);
        out_tag  <= stage_tag[3];
      end
    end
  end

endmodule
