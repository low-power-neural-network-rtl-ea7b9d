// gmdh_trainer_tb: runs the layer-growing trainer on data sets whose outcome
// is known and checks the network configuration it writes and why it stops.
//  1. XOR of two inputs (4 samples): one neuron, the equation
//     in1^2 + in2^2 - 2*in1*in2, training stops because the layer has a
//     single neuron.
//  2. Three inputs, y = x0^2 + 0.5 (8 samples): pairs (0,1) and (0,2) fit
//     exactly, (1,2) does not and is dropped by the average rule. The second
//     layer cannot beat an average error of 0, so it is discarded: one layer,
//     stop reason "no gain".
//  3. The same with a limit of one layer: stop reason "limit".
//  4. One input only: no pair exists, stop reason "no neuron".
module gmdh_trainer_tb;
  import gmdh_pkg::*;
  localparam int N_IN = 4, MS = 8, MAX_LAYERS = 4, MAX_N = N_IN + 2 * MAX_LAYERS;
  localparam int SW = $clog2(MS + 1), LW = $clog2(MAX_LAYERS + 1), NW = $clog2(MAX_N + 1);

  logic clk = 0, rst_n = 0, ld_we = 0, ld_is_y = 0, start = 0, busy, done, cfg_we;
  logic [SW-1:0] ld_sample, num_samples;
  logic [SEL_W-1:0] ld_col;
  data_t ld_data;
  logic [NW-1:0] num_inputs, cfg_idx;
  logic [LW-1:0] max_layers, n_layers, cfg_layer;
  stop_t stop_reason;
  neuron_cfg_t cfg_data;
  int checks = 0, failures = 0;

  gmdh_trainer #(.N_IN(N_IN), .MAX_SAMPLES(MS), .MAX_LAYERS(MAX_LAYERS)) dut (
    .clk(clk), .rst_n(rst_n), .ld_we(ld_we), .ld_sample(ld_sample), .ld_col(ld_col),
    .ld_is_y(ld_is_y), .ld_data(ld_data), .num_inputs(num_inputs), .num_samples(num_samples),
    .max_layers(max_layers), .start(start), .busy(busy), .done(done), .n_layers(n_layers),
    .stop_reason(stop_reason), .cfg_we(cfg_we), .cfg_layer(cfg_layer), .cfg_idx(cfg_idx),
    .cfg_data(cfg_data));

  always #5 clk = ~clk;

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // configuration writes seen
  neuron_cfg_t seen [MAX_LAYERS][MAX_N];
  int nwrites;
  always @(posedge clk) if (cfg_we) begin
    seen[cfg_layer][cfg_idx] <= cfg_data;
    nwrites <= nwrites + 1;
  end

  task automatic load(input int s, input int col, input int v, input bit is_y);
    @(negedge clk);
    ld_we = 1; ld_sample = SW'(s); ld_col = SEL_W'(col); ld_is_y = is_y; ld_data = data_t'(v);
    @(negedge clk); ld_we = 0;
  endtask

  task automatic train(input int ni, input int ns, input int ml);
    num_inputs = NW'(ni); num_samples = SW'(ns); max_layers = LW'(ml);
    for (int l = 0; l < MAX_LAYERS; l++) for (int n = 0; n < MAX_N; n++) seen[l][n] = '0;
    nwrites = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
  endtask

  function automatic int nvalid(input int l);
    int c = 0;
    for (int n = 0; n < MAX_N; n++) c += int'(seen[l][n].valid);
    return c;
  endfunction

  task automatic expect_(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 1. XOR
    for (int k = 0; k < 4; k++) begin
      load(k, 0, (k & 1) * 256, 0);
      load(k, 1, (k >> 1) * 256, 0);
      load(k, 0, ((k & 1) ^ (k >> 1)) * 256, 1);
    end
    train(2, 4, 4);
    expect_(stop_reason == STOP_SINGLE && n_layers == 1, "xor stop/layers");
    expect_(nvalid(0) == 1 && seen[0][0].sel1 == 0 && seen[0][0].sel2 == 1, "xor neuron inputs");
    expect_(seen[0][0].coef == {16'hfe00, 16'd256, 16'd256, 16'd0, 16'd0, 16'd0}, "xor coefficients");
    expect_(nwrites == MAX_N, "xor writes every slot of the layer");
    // 2. y = x0^2 + 0.5
    for (int k = 0; k < 8; k++) begin
      int a, b, c;
      a = k * 32 - 128; b = (k * 5 % 8) * 48 - 160; c = (k * 3 % 8) * 40 - 100;
      load(k, 0, a, 0); load(k, 1, b, 0); load(k, 2, c, 0);
      load(k, 0, ((a * a) / 256) + 128, 1);
    end
    train(3, 8, 4);
    expect_(stop_reason == STOP_NO_GAIN && n_layers == 1, "x0^2: no-gain stop after one layer");
    expect_(nvalid(0) == 2 && seen[0][0].sel1 == 0 && seen[0][1].sel1 == 0, "x0^2: two neurons on x0");
    expect_(nvalid(1) == 0, "x0^2: second layer not written");
    // 3. layer limit
    train(3, 8, 1);
    expect_(stop_reason == STOP_LIMIT && n_layers == 1, "limit stop");
    // 4. one input
    train(1, 8, 4);
    expect_(stop_reason == STOP_NO_NEURON && n_layers == 0, "no-neuron stop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
