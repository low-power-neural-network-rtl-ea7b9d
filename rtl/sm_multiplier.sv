// sm_multiplier: sign-magnitude array multiplier.
//
// The W x W grid of partial-product bits is formed by signed_mult_cell
// instances, one per pair of magnitude bits; each also gives the sign of its
// one-bit product, and the product's sign is the OR of those, which equals
// (sign_x XOR sign_y) when both magnitudes are non-zero and 0 otherwise (no
// negative zero). The rows are summed by a carry-ripple array of W-1
// rca_adder rows: row i adds partial-product row i to the upper W bits of the
// running sum, the lowest bit of each row's result being product bit i.
//
// The one-bit cell and the full adder follow the published low-power design; the array arrangement
// is the plain textbook one and is this design's choice. Combinational; the
// longest path crosses W-1 ripple adders.
module sm_multiplier #(
  parameter int unsigned W = 16
) (
  input  logic           sign_x,
  input  logic [W-1:0]   mag_x,
  input  logic           sign_y,
  input  logic [W-1:0]   mag_y,
  output logic           sign_p,
  output logic [2*W-1:0] mag_p
);
  logic [W-1:0] pp   [W];   // pp[i][j] = mag_y[i] & mag_x[j]
  logic [W-1:0] sp   [W];   // per-cell product sign
  logic [W-1:0] hi   [W];   // upper W bits of the running sum after row i
  logic [W-1:0] rsum [W];
  logic [W-1:0] rcar;
  logic [W-1:0] row_sign;

  for (genvar i = 0; i < W; i++) begin : g_row
    for (genvar j = 0; j < W; j++) begin : g_col
      signed_mult_cell u_cell (
        .px    (mag_x[j]),
        .py    (mag_y[i]),
        .sign_x(sign_x),
        .sign_y(sign_y),
        .p     (pp[i][j]),
        .sign_p(sp[i][j])
      );
    end
    assign row_sign[i] = |sp[i];
  end

  // row 0 needs no adder
  assign mag_p[0] = pp[0][0];
  assign hi[0]    = {1'b0, pp[0][W-1:1]};
  assign rsum[0]  = '0;
  assign rcar[0]  = 1'b0;

  for (genvar i = 1; i < W; i++) begin : g_add
    rca_adder #(.W(W)) u_add (
      .a   (hi[i-1]),
      .b   (pp[i]),
      .cin (1'b0),
      .sum (rsum[i]),
      .cout(rcar[i])
    );
    assign mag_p[i] = rsum[i][0];
    assign hi[i]    = {rcar[i], rsum[i][W-1:1]};
  end

  assign mag_p[2*W-1:W] = hi[W-1];
  assign sign_p         = |row_sign;
endmodule
