// gmdh_workloads_tb: the three kinds of experiment a GMDH trainer of this
// kind is typically judged on, run on gmdh_top at its default size.
//
//  xor      2 inputs, 4 samples: one neuron must reproduce XOR exactly.
//  product  3 inputs, 24 samples, up to 4 layers: a multi-layer regression
//           (synthetic data, y = 0.4*x0 + 0.3*x1*x2 - 0.2*x2^2 + 0.1*x0*x1).
//  spr      4 inputs, 56 samples, a single stage (layer limit 1) and
//           leave-one-out testing: train on 55 samples, predict the one left
//           out. Synthetic data; only the first LOO_FOLDS folds are run to
//           keep the simulation short.
// Every network output is compared with a model computed here from the
// configuration the trainer wrote (equation (1) in Q7.8, averaged output).
// The regressions must beat predicting the mean of the training outputs;
// the leave-one-out errors are reported.
module gmdh_workloads_tb;
  import gmdh_pkg::*;
  localparam int N_IN = 4, MS = 56, MAX_LAYERS = 4, MAX_N = N_IN + 2 * MAX_LAYERS;
  localparam int SW = $clog2(MS + 1), LW = $clog2(MAX_LAYERS + 1), NW = $clog2(MAX_N + 1);
  localparam int LOO_FOLDS = 3;

  logic clk = 0, rst_n = 0, ld_we = 0, ld_is_y = 0, train_start = 0, eval_start = 0;
  logic train_busy, train_done, eval_done;
  logic [SW-1:0] ld_sample, num_samples;
  logic [SEL_W-1:0] ld_col;
  data_t ld_data, y;
  logic [NW-1:0] num_inputs;
  logic [LW-1:0] max_layers, n_layers;
  stop_t stop_reason;
  data_t x [N_IN];
  int checks = 0, failures = 0;

  gmdh_top dut (
    .clk(clk), .rst_n(rst_n), .ld_we(ld_we), .ld_sample(ld_sample), .ld_col(ld_col),
    .ld_is_y(ld_is_y), .ld_data(ld_data), .num_inputs(num_inputs), .num_samples(num_samples),
    .max_layers(max_layers), .train_start(train_start), .train_busy(train_busy),
    .train_done(train_done), .n_layers(n_layers), .stop_reason(stop_reason),
    .eval_start(eval_start), .x(x), .eval_done(eval_done), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (30000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  neuron_cfg_t seen [MAX_LAYERS][MAX_N];
  always @(posedge clk)
    if (dut.u_trainer.cfg_we) seen[dut.u_trainer.cfg_layer][dut.u_trainer.cfg_idx] <= dut.u_trainer.cfg_data;

  function automatic int q(input int a, input int b);
    return int'($signed(16'((longint'(a) * longint'(b)) / 256)));
  endfunction

  function automatic int model_net(input int xin [N_IN], input int nl);
    int vals [MAX_N], nv [MAX_N], sum, cnt;
    for (int k = 0; k < MAX_N; k++) vals[k] = (k < N_IN) ? xin[k] : 0;
    for (int l = 0; l < nl; l++) begin
      for (int n = 0; n < MAX_N; n++) begin
        neuron_cfg_t c;
        int a, b, co [6];
        c = seen[l][n];
        a = vals[c.sel1]; b = vals[c.sel2];
        for (int k = 0; k < 6; k++) co[k] = int'($signed(c.coef[k]));
        nv[n] = c.valid ? int'($signed(16'(co[0] + q(co[1], a) + q(co[2], b) + q(co[3], q(a, a)) +
                                            q(co[4], q(b, b)) + q(co[5], q(a, b))))) : 0;
      end
      vals = nv;
    end
    sum = 0; cnt = 0;
    for (int n = 0; n < MAX_N; n++)
      if ((nl == 0 && n < N_IN) || (nl > 0 && seen[nl-1][n].valid)) begin sum += vals[n]; cnt++; end
    return int'($signed(16'(sum / cnt)));
  endfunction

  int xs [MS][N_IN];
  int ys [MS];

  // load samples 0..ns-1, leaving out sample `skip` (-1: none)
  task automatic load_all(input int ns, input int skip);
    int d;
    d = 0;
    for (int s = 0; s < ns; s++) begin
      if (s == skip) continue;
      for (int k = 0; k <= N_IN; k++) begin
        @(negedge clk);
        ld_we = 1; ld_sample = SW'(d);
        ld_is_y = (k == N_IN); ld_col = SEL_W'(k);
        ld_data = data_t'((k == N_IN) ? ys[s] : xs[s][k]);
      end
      d++;
    end
    @(negedge clk); ld_we = 0;
  endtask

  task automatic train(input int ni, input int ns, input int ml);
    int cyc;
    for (int l = 0; l < MAX_LAYERS; l++) for (int n = 0; n < MAX_N; n++) seen[l][n] = '0;
    num_inputs = NW'(ni); num_samples = SW'(ns); max_layers = LW'(ml);
    @(negedge clk); train_start = 1;
    @(negedge clk); train_start = 0;
    cyc = 0;
    while (!train_done) begin @(negedge clk); cyc++; end
    $display("  trained in %0d cycles: %0d layers, stop reason %s", cyc, n_layers, stop_reason.name());
  endtask

  task automatic eval_one(input int s, output int yo);
    int e;
    for (int k = 0; k < N_IN; k++) x[k] = data_t'(xs[s][k]);
    @(negedge clk); eval_start = 1;
    @(negedge clk); eval_start = 0;
    while (!eval_done) @(negedge clk);
    e = model_net(xs[s], int'(n_layers));
    checks++;
    if (y !== data_t'(e)) begin failures++; $display("FAIL sample %0d: y=%0d model %0d", s, y, e); end
    yo = int'(y);
  endtask

  task automatic expect_(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // evaluate on the training samples; returns network and mean-predictor MSE
  task automatic fit_quality(input int ns, output longint mse_net, output longint mse_mean);
    longint ym;
    int yo, nneur;
    ym = 0;
    for (int s = 0; s < ns; s++) ym += ys[s];
    ym = ym / ns;
    mse_net = 0; mse_mean = 0;
    for (int s = 0; s < ns; s++) begin
      eval_one(s, yo);
      mse_net  += (longint'(yo) - ys[s]) ** 2;
      mse_mean += (ym - ys[s]) ** 2;
    end
    mse_net /= ns; mse_mean /= ns;
    nneur = 0;
    for (int l = 0; l < int'(n_layers); l++) for (int n = 0; n < MAX_N; n++) nneur += int'(seen[l][n].valid);
    $display("  %0d hidden neurons; MSE (Q16 units): network %0d, mean predictor %0d", nneur, mse_net, mse_mean);
  endtask

  initial begin
    longint mn, mm;
    int yo;
    foreach (xs[s, k]) xs[s][k] = 0;
    foreach (ys[s]) ys[s] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    $display("xor");
    for (int s = 0; s < 4; s++) begin
      xs[s][0] = (s & 1) * 256; xs[s][1] = (s >> 1) * 256; ys[s] = ((s & 1) ^ (s >> 1)) * 256;
    end
    load_all(4, -1);
    train(2, 4, MAX_LAYERS);
    expect_(n_layers == 1 && stop_reason == STOP_SINGLE, "xor: one neuron");
    for (int s = 0; s < 4; s++) begin
      eval_one(s, yo);
      expect_(yo == ys[s], "xor: exact output");
    end

    $display("product (3 inputs, 24 samples)");
    for (int s = 0; s < 24; s++) begin
      for (int k = 0; k < 3; k++) xs[s][k] = int'($urandom_range(0, 511)) - 256;
      xs[s][3] = 0;
      ys[s] = q(102, xs[s][0]) + q(77, q(xs[s][1], xs[s][2])) - q(51, q(xs[s][2], xs[s][2])) +
              q(26, q(xs[s][0], xs[s][1]));
    end
    load_all(24, -1);
    train(3, 24, MAX_LAYERS);
    fit_quality(24, mn, mm);
    expect_(n_layers >= 1 && mn < mm, "product: better than the mean");

    $display("spr (4 inputs, 56 samples, single stage, leave-one-out)");
    for (int s = 0; s < MS; s++) begin
      for (int k = 0; k < N_IN; k++) xs[s][k] = int'($urandom_range(0, 511)) - 256;
      ys[s] = 128 + q(64, xs[s][0]) - q(96, q(xs[s][1], xs[s][1])) + q(48, q(xs[s][2], xs[s][3])) +
              int'($urandom_range(0, 8)) - 4;
    end
    for (int f = 0; f < LOO_FOLDS; f++) begin
      load_all(MS, f);
      train(4, MS - 1, 1);
      expect_(n_layers == 1, "spr: single stage");
      eval_one(f, yo);
      $display("  fold %0d: predicted %0d, desired %0d", f, yo, ys[f]);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
