// Output normalization multiplier of the 2-D ICT.
//
// The 2-D J transform leaves each coefficient Y(u,v) to be scaled by
// k_u * k_v, where k_u is the inverse norm of kernel row u.  This unit
// multiplies the 23-bit coefficient by that product, held as a 22-bit
// constant with 24 fraction bits (table in ict_pkg), rounds to nearest (ties away from
// zero) and saturates to 12 bits.  With norm_en = 0 the coefficient passes through
// unscaled, so the output carries either the 23-bit unnormalized or the
// 12-bit normalized coefficient (sign-extended to 23 bits).  The output
// width choice follows the chip; the constant precision, the rounding and
// the three-stage pipeline are this design's own.
//
// Timing: inputs are taken every Clk1 cycle; the result appears LATENCY = 3
// cycles later (stage 1: operand and constant registers, stage 2: product
// register, stage 3: rounding and saturation).
module norm_mult
  import ict_pkg::*;
#(
  parameter int W_IN  = ict_pkg::W_2D,
  parameter int W_OUT = ict_pkg::W_NORM
) (
  input  logic            clk,
  input  logic            norm_en,
  input  logic [2:0]      u,          // vertical frequency of y_in
  input  logic [2:0]      v,          // horizontal frequency of y_in
  input  logic [W_IN-1:0] y_in,
  output logic [W_IN-1:0] y_out
);

  localparam int WP = W_IN + W_SCALE + 1;
  localparam logic signed [WP-1:0] MAXV = WP'((1 << (W_OUT - 1)) - 1);
  localparam logic signed [WP-1:0] MINV = -WP'(1 << (W_OUT - 1));

  // Stage 1
  logic signed [W_IN-1:0]  y_s1;
  logic [W_SCALE-1:0]      k_s1;
  logic                    en_s1;
  always_ff @(posedge clk) begin
    y_s1  <= y_in;
    k_s1  <= NORM_SCALE[coef_class(u[1:0])][coef_class(v[1:0])];
    en_s1 <= norm_en;
  end

  // Stage 2
  logic signed [WP-1:0]    p_s2;
  logic signed [W_IN-1:0]  y_s2;
  logic                    en_s2;
  always_ff @(posedge clk) begin
    p_s2  <= WP'(y_s1) * signed'({1'b0, k_s1});
    y_s2  <= y_s1;
    en_s2 <= en_s1;
  end

  // Stage 3
  // Round to nearest, ties away from zero: round the magnitude.
  localparam logic signed [WP-1:0] HALF = WP'(1 << (NORM_FRAC - 1));
  logic signed [WP-1:0] r;
  always_comb begin
    if (p_s2 < 0) r = -((HALF - p_s2) >>> NORM_FRAC);
    else          r =  (p_s2 + HALF) >>> NORM_FRAC;
  end

  always_ff @(posedge clk) begin
    if (!en_s2)        y_out <= y_s2;
    else if (r > MAXV) y_out <= W_IN'(MAXV);
    else if (r < MINV) y_out <= W_IN'(MINV);
    else               y_out <= W_IN'(r);
  end

endmodule
