// full_adder: one-bit full adder in the multiplexer form of a pass-gate
// (transmission-gate) adder.
//
// The low-power adder this design uses is built from transmission gates with
// no explicit supply: a first pair of gates forms the half-sum h = A xor B
// (and its complement), and h then steers two multiplexers. SUM passes Cin or
// its complement, Cout passes Cin (when A and B differ) or A (when they are
// equal, A = B is then the carry). At the logic level that is:
//   h    = A ^ B
//   SUM  = h ? ~Cin : Cin
//   Cout = h ?  Cin : A
// The port names A, B, Cin, SUM, Cout are those of the adder's schematic; the
// mux decomposition is how a transmission-gate adder of that shape computes,
// written here as logic. Purely combinational, no timing of its own.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic h;

  always_comb begin
    h    = a ^ b;
    sum  = h ? ~cin : cin;
    cout = h ? cin : a;
  end
endmodule
