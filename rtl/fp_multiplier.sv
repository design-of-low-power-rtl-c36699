// fp_multiplier: IEEE 754 single-precision multiplier whose mantissa product
// is computed by the combined Booth-Vedic multiplier.
//
// Datapath (signal names follow the source's simulation trace):
//   sign     = X.sign ^ Y.sign
//   m_X, m_Y = 24-bit significands with the hidden 1 restored
//   m_XY     = m_X * m_Y, 48 bits, from combined_mult_32x32 (zero-extended
//              operands; the upper 16 product bits are always 0)
//   normalise: m_XY lies in [2^46, 2^48). If bit 47 is set the fraction is
//              m_XY[46:24] and the exponent is raised by one, otherwise the
//              fraction is m_XY[45:23].
//   exponent = e_X + e_Y - BIAS (+1 when normalising), BIAS = 127
// The fraction is truncated (rounding toward zero); the source's examples are
// exact and show no rounding stage, so truncation is this design's choice.
// Special values, also this design's choice in the absence of detail:
//   - a zero exponent (zero or subnormal) is read as zero (flush to zero);
//   - a NaN operand, or infinity times zero, gives the quiet NaN 7fc00000;
//   - an infinite operand otherwise gives a signed infinity;
//   - exponent overflow (result exponent >= E_max = 255) gives a signed
//     infinity, underflow (result exponent <= 0) a signed zero.
// Purely combinational.
module fp_multiplier
  import mult_pkg::*;
(
  input  logic [31:0] X,
  input  logic [31:0] Y,
  output logic [31:0] MULT
);

  float32_t fx, fy, fr;
  assign fx = float32_t'(X);
  assign fy = float32_t'(Y);

  logic        sign;
  logic [23:0] m_X, m_Y;
  logic [7:0]  e_X, e_Y;
  logic [63:0] prod64;
  logic [47:0] m_XY;
  logic [22:0] mantissa;
  logic        norm;
  logic [9:0]  exp_sum;       // e_X + e_Y + norm, at most 511
  logic [7:0]  exponent;
  logic        x_zero, y_zero, x_inf, y_inf, x_nan, y_nan;
  logic        overflow, underflow;

  assign sign = fx.sign ^ fy.sign;
  assign e_X  = fx.exponent;
  assign e_Y  = fy.exponent;
  assign m_X  = {1'b1, fx.fraction};
  assign m_Y  = {1'b1, fy.fraction};

  assign x_zero = (e_X == '0);
  assign y_zero = (e_Y == '0);
  assign x_inf  = (e_X == 8'(FP_E_MAX)) && (fx.fraction == '0);
  assign y_inf  = (e_Y == 8'(FP_E_MAX)) && (fy.fraction == '0);
  assign x_nan  = (e_X == 8'(FP_E_MAX)) && (fx.fraction != '0);
  assign y_nan  = (e_Y == 8'(FP_E_MAX)) && (fy.fraction != '0);

  combined_mult_32x32 u_mult (
    .a ({8'b0, m_X}),
    .b ({8'b0, m_Y}),
    .c (prod64)
  );
  assign m_XY = prod64[47:0];

  assign norm     = m_XY[47];
  assign mantissa = norm ? m_XY[46:24] : m_XY[45:23];
  assign exp_sum  = 10'(e_X) + 10'(e_Y) + 10'(norm);

  assign underflow = (exp_sum <= 10'(FP_BIAS));
  assign overflow  = (exp_sum >= 10'(FP_BIAS + FP_E_MAX));
  assign exponent  = 8'(exp_sum - 10'(FP_BIAS));

  always_comb begin
    if (x_nan || y_nan || (x_inf && y_zero) || (y_inf && x_zero)) begin
      fr = FP_QNAN;
    end else if (x_inf || y_inf || (!x_zero && !y_zero && overflow)) begin
      fr = '{sign: sign, exponent: 8'(FP_E_MAX), fraction: '0};
    end else if (x_zero || y_zero || underflow) begin
      fr = '{sign: sign, exponent: '0, fraction: '0};
    end else begin
      fr = '{sign: sign, exponent: exponent, fraction: mantissa};
    end
  end

  assign MULT = fr;

endmodule
