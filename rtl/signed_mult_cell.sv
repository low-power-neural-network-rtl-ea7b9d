// signed_mult_cell: one-bit signed multiplication cell.
//
// Operands are in sign-magnitude form. The cell multiplies one magnitude bit
// of each operand (Px, Py) and forms the sign of that one-bit product:
//   p    = Px AND Py
//   sign = p AND (SIGN(X) XOR SIGN(Y))
// so a zero product is never given a negative sign. This is the gate-level
// function of the standard cell (two AND gates and one XOR gate); the
// low-power version realises the same function with complementary pass
// transistors, which is a transistor-level matter with no effect on the logic.
// Purely combinational.
module signed_mult_cell (
  input  logic px,      // magnitude bit of X
  input  logic py,      // magnitude bit of Y
  input  logic sign_x,  // SIGN(X)
  input  logic sign_y,  // SIGN(Y)
  output logic p,       // Px . Py
  output logic sign_p   // SIGN(X*Y)
);
  always_comb begin
    p      = px & py;
    sign_p = p & (sign_x ^ sign_y);
  end
endmodule
