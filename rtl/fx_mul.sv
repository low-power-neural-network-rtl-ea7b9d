// fx_mul: fixed-point multiply of two two's complement numbers through the
// sign-magnitude multiplier.
//
// Each operand is split into sign and magnitude, the magnitudes are
// multiplied by sm_multiplier, the product is shifted right by FRAC bits
// (truncation of the magnitude, so the result is rounded toward zero) and
// returned to two's complement, keeping the low W bits (wraps on overflow).
// result = trunc_toward_zero(a * b / 2^FRAC) mod 2^W.
// The rounding and the wrap are this design's choices. Combinational.
module fx_mul #(
  parameter int unsigned W    = 16,
  parameter int unsigned FRAC = 8
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] y
);
  logic [W-1:0]   mag_a, mag_b;
  logic           sgn_p;
  logic [2*W-1:0] mag_p;
  logic [W-1:0]   mag_y;

  always_comb begin
    mag_a = a[W-1] ? W'(-a) : W'(a);
    mag_b = b[W-1] ? W'(-b) : W'(b);
  end

  sm_multiplier #(.W(W)) u_mul (
    .sign_x(a[W-1]),
    .mag_x (mag_a),
    .sign_y(b[W-1]),
    .mag_y (mag_b),
    .sign_p(sgn_p),
    .mag_p (mag_p)
  );

  always_comb begin
    mag_y = mag_p[FRAC +: W];
    y     = sgn_p ? -$signed(mag_y) : $signed(mag_y);
  end
endmodule
