// gmdh_neuron: the quadratic two-input neuron of a GMDH network,
//   Y = b0 + b1*in1 + b2*in2 + b3*in1^2 + b4*in2^2 + b5*in1*in2.
//
// The three non-linear terms are formed by fx_mul units, each coefficient
// term b_k*t_k by five more, and the six values are summed by a chain of
// rca_adder rows, so the whole neuron is built from the sign-magnitude
// multiplier and the ripple adder, the two arithmetic circuits the hardware
// is made of. All values are DATA_W-bit two's complement with FRAC fractional
// bits (gmdh_pkg); every product is truncated toward zero to that format and
// sums wrap on overflow (format and rounding are this design's choices).
// A removed term is a zero coefficient. Combinational: no clock, the caller
// registers the result.
module gmdh_neuron
  import gmdh_pkg::*;
(
  input  data_t                           in1,
  input  data_t                           in2,
  input  logic [N_TERMS-1:0][DATA_W-1:0]  coef,  // b0..b5
  output data_t                           y
);
  data_t t   [N_TERMS];   // term values
  data_t bt  [N_TERMS];   // b_k * t_k
  data_t acc [N_TERMS];   // running sums
  logic  unused_c [N_TERMS];

  assign t[0] = data_t'(1 << FRAC);
  assign t[1] = in1;
  assign t[2] = in2;

  fx_mul #(.W(DATA_W), .FRAC(FRAC)) u_sq1 (.a(in1), .b(in1), .y(t[3]));
  fx_mul #(.W(DATA_W), .FRAC(FRAC)) u_sq2 (.a(in2), .b(in2), .y(t[4]));
  fx_mul #(.W(DATA_W), .FRAC(FRAC)) u_x12 (.a(in1), .b(in2), .y(t[5]));

  assign bt[0] = data_t'(coef[0]);  // b0 * 1
  for (genvar k = 1; k < N_TERMS; k++) begin : g_term
    fx_mul #(.W(DATA_W), .FRAC(FRAC)) u_bt (.a(data_t'(coef[k])), .b(t[k]), .y(bt[k]));
  end

  assign acc[0]      = bt[0];
  assign unused_c[0] = 1'b0;
  for (genvar k = 1; k < N_TERMS; k++) begin : g_sum
    rca_adder #(.W(DATA_W)) u_add (
      .a   (acc[k-1]),
      .b   (bt[k]),
      .cin (1'b0),
      .sum (acc[k]),
      .cout(unused_c[k])
    );
  end

  assign y = acc[N_TERMS-1];
endmodule
