// normal_eq_accum: builds the normal equations of the least-squares fit of
// one neuron, equation (3): G[a][b] = sum_j t_a(j)*t_b(j) and
// r[a] = sum_j t_a(j)*y(j) over the training samples j.
//
// For each sample the term vector t = (1, in1, in2, in1^2, in2^2, in1*in2) is
// formed exactly as the neuron forms it (fx_mul, DATA_W bits, FRAC fractional
// bits), so the fit is made for the values the neuron will really compute.
// The 36 matrix products and 6 right-hand products are full precision
// (2*FRAC fractional bits) and are accumulated in ACC_W-bit registers.
// Interface: clear zeroes the sums; each cycle with sample_valid adds one
// sample (one sample per clock). The sums are visible one clock after the
// last sample. Widths and the one-sample-per-clock rate are this design's
// choices; the products here use the plain * operator.
module normal_eq_accum
  import gmdh_pkg::*;
#(
  parameter int unsigned ACC_W = 64
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   sample_valid,
  input  data_t                  in1,
  input  data_t                  in2,
  input  data_t                  y,
  output logic signed [ACC_W-1:0] g [N_TERMS][N_TERMS],
  output logic signed [ACC_W-1:0] r [N_TERMS]
);
  data_t t [N_TERMS];

  assign t[0] = data_t'(1 << FRAC);
  assign t[1] = in1;
  assign t[2] = in2;
  fx_mul #(.W(DATA_W), .FRAC(FRAC)) u_sq1 (.a(in1), .b(in1), .y(t[3]));
  fx_mul #(.W(DATA_W), .FRAC(FRAC)) u_sq2 (.a(in2), .b(in2), .y(t[4]));
  fx_mul #(.W(DATA_W), .FRAC(FRAC)) u_x12 (.a(in1), .b(in2), .y(t[5]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int a = 0; a < N_TERMS; a++) begin
        r[a] <= '0;
        for (int b = 0; b < N_TERMS; b++) g[a][b] <= '0;
      end
    end else if (clear) begin
      for (int a = 0; a < N_TERMS; a++) begin
        r[a] <= '0;
        for (int b = 0; b < N_TERMS; b++) g[a][b] <= '0;
      end
    end else if (sample_valid) begin
      for (int a = 0; a < N_TERMS; a++) begin
        r[a] <= r[a] + ACC_W'(t[a]) * ACC_W'(y);
        for (int b = 0; b < N_TERMS; b++) g[a][b] <= g[a][b] + ACC_W'(t[a]) * ACC_W'(t[b]);
      end
    end
  end
endmodule
