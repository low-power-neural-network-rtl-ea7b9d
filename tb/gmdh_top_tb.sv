// gmdh_top_tb: end-to-end test of training followed by evaluation.
//
// Each scenario loads a training set, trains, then evaluates the trained
// network on every training sample. The configuration the trainer writes is
// captured here, and the network output is compared with a model computed
// here from that configuration (equation (1) in Q7.8, truncated average of
// the last layer), so trainer and evaluator are checked together. Where the
// data has an exact answer, the output is compared with the desired output.
//
// Scenarios (5 inputs available, up to 12 samples):
//   xor      2 inputs, exact XOR; single neuron
//   late     5 inputs, y = x3*x4 + x4: the only exact pair is the last one
//            tried, so it must replace a kept neuron
//   square   3 inputs, y = x0^2 + 0.5: second layer gives no gain
//   limit    the same with a limit of one layer
//   random   5 inputs, random y, limit of 3 layers: several layers
// Mechanisms counted (each must occur): singular subset skipped, worst
// neuron replaced, neuron dropped by the average rule, layer added, layer
// discarded for no gain, stop on a single neuron, stop on the layer limit,
// a network of two or more layers evaluated.
module gmdh_top_tb;
  import gmdh_pkg::*;
  localparam int N_IN = 5, MS = 12, MAX_LAYERS = 4, MAX_N = N_IN + 2 * MAX_LAYERS;
  localparam int SW = $clog2(MS + 1), LW = $clog2(MAX_LAYERS + 1), NW = $clog2(MAX_N + 1);

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

  gmdh_top #(.N_IN(N_IN), .MAX_SAMPLES(MS), .MAX_LAYERS(MAX_LAYERS)) dut (
    .clk(clk), .rst_n(rst_n), .ld_we(ld_we), .ld_sample(ld_sample), .ld_col(ld_col),
    .ld_is_y(ld_is_y), .ld_data(ld_data), .num_inputs(num_inputs), .num_samples(num_samples),
    .max_layers(max_layers), .train_start(train_start), .train_busy(train_busy),
    .train_done(train_done), .n_layers(n_layers), .stop_reason(stop_reason),
    .eval_start(eval_start), .x(x), .eval_done(eval_done), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters (probes into the design) ----
  int n_singular = 0, n_replace = 0, n_pruned = 0, n_added = 0, n_nogain = 0;
  int n_single = 0, n_limit = 0, n_deep = 0;
  always @(posedge clk) begin
    if (dut.u_trainer.u_nt.solv_done && dut.u_trainer.u_nt.solv_sing) n_singular++;
    if (dut.u_trainer.u_sel.cand_valid && dut.u_trainer.u_sel.cnt >= dut.u_trainer.u_sel.limit &&
        dut.u_trainer.u_sel.cand_err < dut.u_trainer.u_sel.err[dut.u_trainer.u_sel.worst]) n_replace++;
    if (dut.u_trainer.u_sel.done && dut.u_trainer.u_sel.n_kept < dut.u_trainer.u_sel.cnt) n_pruned++;
    if (dut.u_trainer.cfg_we && dut.u_trainer.cfg_idx == 0) n_added++;  // first write of a layer
  end

  // ---- configuration written by the trainer ----
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

  task automatic load_all(input int ns);
    for (int s = 0; s < ns; s++) begin
      for (int k = 0; k <= N_IN; k++) begin
        @(negedge clk);
        ld_we = 1; ld_sample = SW'(s);
        ld_is_y = (k == N_IN); ld_col = SEL_W'(k);
        ld_data = data_t'((k == N_IN) ? ys[s] : xs[s][k]);
      end
    end
    @(negedge clk); ld_we = 0;
  endtask

  task automatic train(input int ni, input int ns, input int ml);
    for (int l = 0; l < MAX_LAYERS; l++) for (int n = 0; n < MAX_N; n++) seen[l][n] = '0;
    num_inputs = NW'(ni); num_samples = SW'(ns); max_layers = LW'(ml);
    @(negedge clk); train_start = 1;
    @(negedge clk); train_start = 0;
    while (!train_done) @(negedge clk);
    if (stop_reason == STOP_SINGLE) n_single++;
    if (stop_reason == STOP_LIMIT) n_limit++;
    if (stop_reason == STOP_NO_GAIN) n_nogain++;
    if (n_layers >= 2) n_deep++;
    $display("trained: %0d layers, stop reason %s", n_layers, stop_reason.name());
  endtask

  // evaluate on every training sample; exact = compare with desired output
  task automatic eval_all(input int ns, input bit exact, input string name);
    for (int s = 0; s < ns; s++) begin
      int e;
      for (int k = 0; k < N_IN; k++) x[k] = data_t'(xs[s][k]);
      @(negedge clk); eval_start = 1;
      @(negedge clk); eval_start = 0;
      while (!eval_done) @(negedge clk);
      e = model_net(xs[s], int'(n_layers));
      checks++;
      if (y !== data_t'(e)) begin failures++; $display("FAIL %s sample %0d: y=%0d model %0d", name, s, y, e); end
      if (exact) begin
        checks++;
        if (y !== data_t'(ys[s])) begin failures++; $display("FAIL %s sample %0d: y=%0d desired %0d", name, s, y, ys[s]); end
      end
    end
  endtask

  task automatic expect_(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    foreach (xs[s, k]) xs[s][k] = 0;
    foreach (ys[s]) ys[s] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // xor
    for (int s = 0; s < 4; s++) begin
      xs[s][0] = (s & 1) * 256; xs[s][1] = (s >> 1) * 256; ys[s] = ((s & 1) ^ (s >> 1)) * 256;
    end
    load_all(4);
    train(2, 4, MAX_LAYERS);
    expect_(stop_reason == STOP_SINGLE && n_layers == 1, "xor: single neuron");
    eval_all(4, 1, "xor");
    // late: y = x3*x4 + x4
    for (int s = 0; s < MS; s++) begin
      for (int k = 0; k < N_IN; k++) xs[s][k] = int'($urandom_range(0, 16)) * 32 - 256;
      ys[s] = q(xs[s][3], xs[s][4]) + xs[s][4];
    end
    load_all(MS);
    train(5, MS, MAX_LAYERS);
    expect_(seen[0][0].valid && seen[0][0].sel1 == 3 && seen[0][0].sel2 == 4 || 
            seen[0][1].valid && seen[0][1].sel1 == 3 && seen[0][1].sel2 == 4 ||
            seen[0][2].valid && seen[0][2].sel1 == 3 && seen[0][2].sel2 == 4, "late: pair (3,4) kept");
    eval_all(MS, 0, "late");
    // square: y = x0^2 + 0.5
    for (int s = 0; s < 8; s++) begin
      xs[s][0] = s * 32 - 128; xs[s][1] = (s * 5 % 8) * 48 - 160; xs[s][2] = (s * 3 % 8) * 40 - 100;
      ys[s] = q(xs[s][0], xs[s][0]) + 128;
    end
    load_all(8);
    train(3, 8, MAX_LAYERS);
    expect_(stop_reason == STOP_NO_GAIN && n_layers == 1, "square: no gain");
    eval_all(8, 1, "square");
    train(3, 8, 1);
    expect_(stop_reason == STOP_LIMIT, "square: limit");
    eval_all(8, 1, "limit");
    // random, up to 3 layers
    for (int trial = 0; trial < 1; trial++) begin
      for (int s = 0; s < MS; s++) begin
        for (int k = 0; k < N_IN; k++) xs[s][k] = int'($urandom_range(0, 512)) - 256;
        ys[s] = int'($urandom_range(0, 512)) - 256;
      end
      load_all(MS);
      train(5, MS, 3);
      eval_all(MS, 0, "random");
    end
    $display("mechanisms: singular %0d, replaced %0d, pruned %0d, layers added %0d, no-gain %0d, single %0d, limit %0d, deep networks %0d",
             n_singular, n_replace, n_pruned, n_added, n_nogain, n_single, n_limit, n_deep);
    expect_(n_singular > 0, "singular subset skipped");
    expect_(n_replace > 0, "worst neuron replaced");
    expect_(n_pruned > 0, "neuron dropped by the average rule");
    expect_(n_added > 0, "layer added");
    expect_(n_nogain > 0, "layer discarded for no gain");
    expect_(n_single > 0, "stop on single neuron");
    expect_(n_limit > 0, "stop on layer limit");
    expect_(n_deep > 0, "network of two or more layers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
