// neuron_trainer_tb: trains single neurons on small data sets whose best
// equation is known.
//  1. XOR on 0/1 inputs: several term subsets are singular (in^2 = in on 0/1
//     data) and must be skipped; the equation found must reproduce XOR with
//     zero error, y = in1^2 + in2^2 - 2*in1*in2 (b0 = b1 = b2 = 0).
//  2. Samples of a random full quadratic with integer-valued coefficients
//     on small inputs: the full six-term equation is tried first and fits
//     exactly, so the coefficients must come back within 1 LSB and the
//     error must be 0.
//  3. A case where the target is a pure constant plus noise-free linear term
//     in in2: the winner must have zero error.
// The cycle count of case 1 is checked against the latency bound given in
// the module description.
module neuron_trainer_tb;
  import gmdh_pkg::*;
  localparam int MS = 16;
  localparam int SW = $clog2(MS + 1);

  logic clk = 0, rst_n = 0, start = 0;
  logic [SW-1:0] ns, idx;
  data_t m1 [MS], m2 [MS], my [MS];
  logic done, found;
  logic [N_TERMS-1:0][DATA_W-1:0] coef;
  logic [N_TERMS-1:0] mask;
  logic [63:0] sse;
  int checks = 0, failures = 0;

  neuron_trainer #(.MAX_SAMPLES(MS)) dut (.clk(clk), .rst_n(rst_n), .start(start),
    .num_samples(ns), .samp_idx(idx), .samp_in1(m1[idx]), .samp_in2(m2[idx]),
    .samp_y(my[idx]), .done(done), .found(found), .best_coef(coef),
    .best_mask(mask), .best_sse(sse));

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cycles;
  task automatic run();
    cycles = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  function automatic int q(input int x, input int z);
    return int'($signed(16'((longint'(x) * longint'(z)) / 256)));
  endfunction

  initial begin
    int bt [6];
    foreach (m1[k]) begin m1[k] = '0; m2[k] = '0; my[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 1. XOR
    ns = 4;
    for (int k = 0; k < 4; k++) begin
      m1[k] = data_t'((k & 1) * 256);
      m2[k] = data_t'((k >> 1) * 256);
      my[k] = data_t'(((k & 1) ^ (k >> 1)) * 256);
    end
    run();
    checks++;
    if (!found || sse != 0) begin failures++; $display("FAIL xor found=%0d sse=%0d", found, sse); end
    checks++;
    if (coef[0] != 0 || coef[1] != 0 || coef[2] != 0 || coef[3] != 16'd256 ||
        coef[4] != 16'd256 || coef[5] != 16'hfe00) begin
      failures++;
      $display("FAIL xor coef %0d %0d %0d %0d %0d %0d mask %b", $signed(coef[0]), $signed(coef[1]),
               $signed(coef[2]), $signed(coef[3]), $signed(coef[4]), $signed(coef[5]), mask);
    end
    // latency: 4 + 2 + 63 solver runs of at most 6*(7*(64+16+2)+7) + 4 samples
    checks++;
    if (cycles > 6 + 63 * (6 * (7 * 82 + 7) + 8)) begin
      failures++; $display("FAIL xor took %0d cycles", cycles);
    end
    $display("xor: mask %b, %0d cycles", mask, cycles);
    // 2. full quadratic
    for (int trial = 0; trial < 3; trial++) begin
      ns = MS;
      for (int k = 0; k < 6; k++) bt[k] = $urandom_range(0, 6) * 256 - 3 * 256;
      for (int k = 0; k < MS; k++) begin
        int a, b;
        a = $urandom_range(0, 8) * 64 - 256;   // -1.0 .. 1.0 step 0.25
        b = $urandom_range(0, 8) * 64 - 256;
        m1[k] = data_t'(a); m2[k] = data_t'(b);
        my[k] = data_t'(bt[0] + q(bt[1], a) + q(bt[2], b) + q(bt[3], q(a, a)) +
                        q(bt[4], q(b, b)) + q(bt[5], q(a, b)));
      end
      run();
      checks++;
      if (!found || sse != 0) begin failures++; $display("FAIL quad %0d found=%0d sse=%0d", trial, found, sse); end
      for (int k = 0; k < 6; k++) begin
        int d;
        d = int'($signed(coef[k])) - bt[k];
        checks++;
        if (d > 1 || d < -1) begin
          failures++; $display("FAIL quad %0d b%0d=%0d exp %0d", trial, k, $signed(coef[k]), bt[k]);
        end
      end
    end
    // 3. linear in in2 only
    ns = 8;
    for (int k = 0; k < 8; k++) begin
      m1[k] = data_t'($urandom_range(0, 512) - 256);
      m2[k] = data_t'(k * 32);
      my[k] = data_t'(128 + q(384, k * 32));
    end
    run();
    checks++;
    if (!found || sse != 0) begin failures++; $display("FAIL lin found=%0d sse=%0d", found, sse); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
