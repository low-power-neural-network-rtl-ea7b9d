// rca_adder: W-bit ripple-carry adder made of full_adder cells.
//
// The carry of bit i feeds bit i+1; sum = a + b + cin, with the carry out of
// the top bit on cout. With b inverted and cin = 1 it subtracts. The published
// hardware builds its summations from the low-power full adder; chaining the
// cells into a ripple adder is the simplest arrangement and this design's
// choice. Purely combinational, delay grows linearly with W.
module rca_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end
  assign cout = c[W];
endmodule
