// gauss_solver_tb: builds systems G*b = r with a known solution and checks the
// solver's coefficients, for the full term set and for random term subsets
// (removed terms must come out as exactly 0), and checks that a matrix with
// two equal rows and columns is reported singular.
//
// G is a random symmetric, diagonally dominant matrix with 16 fractional bits
// whose entries are multiples of 2^8, b has 8 fractional bits, so r = G*b is
// exact. The solver is accepted within 2 LSB of b.
module gauss_solver_tb;
  import gmdh_pkg::*;
  localparam int W = 64;

  logic clk = 0, rst_n = 0, start = 0;
  logic signed [W-1:0] g [N_TERMS][N_TERMS];
  logic signed [W-1:0] r [N_TERMS];
  logic [N_TERMS-1:0] mask;
  logic done, singular;
  logic [N_TERMS-1:0][DATA_W-1:0] coef;
  int checks = 0, failures = 0;

  gauss_solver #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .start(start), .g(g), .r(r),
    .term_mask(mask), .done(done), .singular(singular), .coef(coef));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_solver();
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
  endtask

  initial begin
    longint A [6][6];
    longint bt [6];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 40; trial++) begin
      mask = (trial < 4) ? 6'h3f : 6'($urandom_range(1, 63));
      for (int a = 0; a < 6; a++) begin
        for (int b = a; b < 6; b++) begin
          A[a][b] = longint'($signed(12'($urandom))) * 256;
          A[b][a] = A[a][b];
        end
        A[a][a] = 64'd20 * 65536 + longint'($urandom_range(0, 4095)) * 256;
      end
      for (int a = 0; a < 6; a++) bt[a] = mask[a] ? longint'($signed(14'($urandom))) : 0;
      for (int a = 0; a < 6; a++) begin
        r[a] = 0;
        for (int b = 0; b < 6; b++) begin
          g[a][b] = A[a][b];
          r[a] += (A[a][b] * bt[b]) / 256;
        end
      end
      run_solver();
      checks++;
      if (singular) begin failures++; $display("FAIL trial %0d reported singular", trial); end
      for (int a = 0; a < 6; a++) begin
        longint d;
        d = longint'($signed(coef[a])) - bt[a];
        checks++;
        if ((mask[a] && (d > 2 || d < -2)) || (!mask[a] && coef[a] != 0)) begin
          failures++;
          $display("FAIL trial %0d mask %b b%0d = %0d exp %0d", trial, mask, a, $signed(coef[a]), bt[a]);
        end
      end
    end
    // singular: terms 1 and 3 identical
    mask = 6'h3f;
    for (int a = 0; a < 6; a++)
      for (int b = 0; b < 6; b++) g[a][b] = (a == b) ? 64'd65536 : 0;
    g[1][3] = 65536; g[3][1] = 65536;
    for (int a = 0; a < 6; a++) r[a] = 65536;
    run_solver();
    checks++;
    if (!singular) begin failures++; $display("FAIL singular matrix not detected"); end
    // same matrix with term 3 removed is solvable
    mask = 6'h37;
    run_solver();
    checks++;
    if (singular || coef[1] != 16'd256 || coef[3] != 0) begin
      failures++; $display("FAIL reduced system: sing=%0d b1=%0d b3=%0d", singular, coef[1], coef[3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
