// normal_eq_accum_tb: feeds random samples to the normal-equation accumulator
// and compares every sum of G and r with sums computed here from an
// independent model of the term vector (Q7.8 products truncated toward zero).
// Also checks that clear empties the sums and that one sample is taken per
// clock (the sums are final one clock after the last sample).
module normal_eq_accum_tb;
  import gmdh_pkg::*;
  localparam int ACC_W = 64;
  localparam int NS = 40;

  logic clk = 0, rst_n = 0, clear = 0, sv = 0;
  data_t in1, in2, y;
  logic signed [ACC_W-1:0] g [N_TERMS][N_TERMS];
  logic signed [ACC_W-1:0] r [N_TERMS];
  int checks = 0, failures = 0;

  normal_eq_accum #(.ACC_W(ACC_W)) dut (.clk(clk), .rst_n(rst_n), .clear(clear),
    .sample_valid(sv), .in1(in1), .in2(in2), .y(y), .g(g), .r(r));

  always #5 clk = ~clk;

  function automatic longint q(input longint x, input longint z);
    return longint'($signed(16'((x * z) / 256)));
  endfunction

  longint eg [6][6];
  longint er [6];

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t [6];
    int a_, b_, y_;
    foreach (eg[a, b]) eg[a][b] = 0;
    foreach (er[a]) er[a] = 0;
    in1 = '0; in2 = '0; y = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill with garbage first, then clear
    @(negedge clk); sv = 1; in1 = 16'sd1000; in2 = -16'sd77; y = 16'sd5;
    @(negedge clk); sv = 0; clear = 1;
    @(negedge clk); clear = 0;
    checks++;
    if (g[1][1] != 0 || r[0] != 0) begin failures++; $display("FAIL clear"); end
    for (int s = 0; s < NS; s++) begin
      a_ = $signed(16'($urandom)) / 16;
      b_ = $signed(16'($urandom)) / 16;
      y_ = $signed(16'($urandom)) / 4;
      t[0] = 256; t[1] = a_; t[2] = b_;
      t[3] = q(a_, a_); t[4] = q(b_, b_); t[5] = q(a_, b_);
      for (int a = 0; a < 6; a++) begin
        er[a] += t[a] * y_;
        for (int b = 0; b < 6; b++) eg[a][b] += t[a] * t[b];
      end
      in1 = data_t'(a_); in2 = data_t'(b_); y = data_t'(y_); sv = 1;
      @(negedge clk);
    end
    sv = 0;
    // sums complete one clock after the last sample: already true at this edge
    for (int a = 0; a < 6; a++) begin
      checks++;
      if (r[a] != er[a]) begin failures++; $display("FAIL r[%0d] %0d exp %0d", a, r[a], er[a]); end
      for (int b = 0; b < 6; b++) begin
        checks++;
        if (g[a][b] != eg[a][b]) begin failures++; $display("FAIL g[%0d][%0d] %0d exp %0d", a, b, g[a][b], eg[a][b]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
