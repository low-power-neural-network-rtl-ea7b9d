// gmdh_top_full_tb: one complete training and evaluation run of gmdh_top at
// its default size: 4 inputs, 56 training samples, up to 4 hidden layers.
//
// The training set is synthetic (inputs in [-1, 1), desired output
// 0.5*x0*x1 + x2^2 - 0.25*x3 plus a small pseudo-random disturbance), with
// the shape of a four-factor, 56-sample regression problem. After training
// the network is evaluated on every sample; each output is compared with a
// model computed here from the configuration the trainer wrote, and the
// network's mean squared error must be below that of predicting the mean of
// the desired outputs (the network must have learned something).
module gmdh_top_full_tb;
  import gmdh_pkg::*;
  localparam int N_IN = 4, MS = 56, MAX_LAYERS = 4, MAX_N = N_IN + 2 * MAX_LAYERS;
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

  gmdh_top dut (
    .clk(clk), .rst_n(rst_n), .ld_we(ld_we), .ld_sample(ld_sample), .ld_col(ld_col),
    .ld_is_y(ld_is_y), .ld_data(ld_data), .num_inputs(num_inputs), .num_samples(num_samples),
    .max_layers(max_layers), .train_start(train_start), .train_busy(train_busy),
    .train_done(train_done), .n_layers(n_layers), .stop_reason(stop_reason),
    .eval_start(eval_start), .x(x), .eval_done(eval_done), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (40000000) @(posedge clk);
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

  initial begin
    longint se_net, se_mean, ymean;
    int cyc;
    for (int l = 0; l < MAX_LAYERS; l++) for (int n = 0; n < MAX_N; n++) seen[l][n] = '0;
    ymean = 0;
    for (int s = 0; s < MS; s++) begin
      for (int k = 0; k < N_IN; k++) xs[s][k] = int'($urandom_range(0, 511)) - 256;
      ys[s] = q(128, q(xs[s][0], xs[s][1])) + q(xs[s][2], xs[s][2]) - q(64, xs[s][3]) +
              int'($urandom_range(0, 16)) - 8;
      ymean += ys[s];
    end
    ymean = ymean / MS;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < MS; s++)
      for (int k = 0; k <= N_IN; k++) begin
        @(negedge clk);
        ld_we = 1; ld_sample = SW'(s); ld_is_y = (k == N_IN); ld_col = SEL_W'(k);
        ld_data = data_t'((k == N_IN) ? ys[s] : xs[s][k]);
      end
    @(negedge clk); ld_we = 0;
    num_inputs = NW'(N_IN); num_samples = SW'(MS); max_layers = LW'(MAX_LAYERS);
    @(negedge clk); train_start = 1;
    @(negedge clk); train_start = 0;
    cyc = 0;
    while (!train_done) begin @(negedge clk); cyc++; end
    $display("trained in %0d cycles: %0d layers, stop reason %s", cyc, n_layers, stop_reason.name());
    checks++;
    if (n_layers == 0) begin failures++; $display("FAIL no layer trained"); end
    se_net = 0; se_mean = 0;
    for (int s = 0; s < MS; s++) begin
      int e;
      for (int k = 0; k < N_IN; k++) x[k] = data_t'(xs[s][k]);
      @(negedge clk); eval_start = 1;
      @(negedge clk); eval_start = 0;
      while (!eval_done) @(negedge clk);
      e = model_net(xs[s], int'(n_layers));
      checks++;
      if (y !== data_t'(e)) begin failures++; $display("FAIL sample %0d: y=%0d model %0d", s, y, e); end
      se_net  += (longint'(y) - ys[s]) ** 2;
      se_mean += (ymean - ys[s]) ** 2;
    end
    $display("MSE (Q16 units): network %0d, mean predictor %0d", se_net / MS, se_mean / MS);
    checks++;
    if (se_net >= se_mean) begin failures++; $display("FAIL network no better than the mean"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
