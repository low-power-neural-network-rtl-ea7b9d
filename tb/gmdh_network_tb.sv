// gmdh_network_tb: loads random networks (1 to 3 layers of up to 5 neurons,
// random input selections and coefficients, some slots left invalid) into
// the evaluator and compares its output for random input vectors with a
// model computed here: each neuron by equation (1) in Q7.8 with products
// truncated toward zero, the output as the truncated average of the last
// layer. Also checks the zero-layer case (average of the inputs) and the
// evaluation latency num_layers * MAX_N + DATA_W + clog2(MAX_N+1) + 5 clocks.
module gmdh_network_tb;
  import gmdh_pkg::*;
  localparam int N_IN = 4, MAX_LAYERS = 4, MAX_N = N_IN + 2 * MAX_LAYERS;
  localparam int LW = $clog2(MAX_LAYERS + 1), NW = $clog2(MAX_N + 1);

  logic clk = 0, rst_n = 0, cfg_we = 0, start = 0, busy, done;
  logic [LW-1:0] cfg_layer, num_layers;
  logic [NW-1:0] cfg_idx;
  neuron_cfg_t cfg_data;
  data_t x [N_IN];
  data_t y;
  int checks = 0, failures = 0;

  gmdh_network #(.N_IN(N_IN), .MAX_LAYERS(MAX_LAYERS)) dut (.clk(clk), .rst_n(rst_n),
    .cfg_we(cfg_we), .cfg_layer(cfg_layer), .cfg_idx(cfg_idx), .cfg_data(cfg_data),
    .num_layers(num_layers), .start(start), .x(x), .busy(busy), .done(done), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int q(input int a, input int b);
    return int'($signed(16'((longint'(a) * longint'(b)) / 256)));
  endfunction

  function automatic int neuron(input int a, input int b, input int c[6]);
    return int'($signed(16'(c[0] + q(c[1], a) + q(c[2], b) + q(c[3], q(a, a)) +
                            q(c[4], q(b, b)) + q(c[5], q(a, b)))));
  endfunction

  int cv [MAX_LAYERS][MAX_N];      // valid
  int cs1 [MAX_LAYERS][MAX_N], cs2 [MAX_LAYERS][MAX_N];
  int cc [MAX_LAYERS][MAX_N][6];

  task automatic write_cfg(input int l, input int n);
    @(negedge clk);
    cfg_we = 1; cfg_layer = LW'(l); cfg_idx = NW'(n);
    cfg_data = '0;
    cfg_data.valid = cv[l][n][0];
    cfg_data.sel1 = 8'(cs1[l][n]);
    cfg_data.sel2 = 8'(cs2[l][n]);
    for (int k = 0; k < 6; k++) cfg_data.coef[k] = 16'(cc[l][n][k]);
    @(negedge clk); cfg_we = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 40; trial++) begin
      int nl, width, vals [MAX_N], nv [MAX_N], sum, cnt, cyc, e;
      nl = (trial < 2) ? 0 : $urandom_range(1, 3);
      width = N_IN;
      for (int l = 0; l < MAX_LAYERS; l++) begin
        int nn;
        nn = $urandom_range(1, 5);
        for (int n = 0; n < MAX_N; n++) begin
          cv[l][n] = (n < nn) && ($urandom_range(0, 5) != 0 || n == 0);
          cs1[l][n] = $urandom_range(0, width - 1);
          cs2[l][n] = $urandom_range(0, width - 1);
          for (int k = 0; k < 6; k++) cc[l][n][k] = int'($urandom_range(0, 1024)) - 512;
          write_cfg(l, n);
        end
        width = nn;
      end
      num_layers = LW'(nl);
      for (int k = 0; k < N_IN; k++) x[k] = data_t'(int'($urandom_range(0, 1024)) - 512);
      // model
      for (int k = 0; k < MAX_N; k++) begin vals[k] = (k < N_IN) ? int'(x[k]) : 0; end
      cnt = N_IN;
      for (int l = 0; l < nl; l++) begin
        for (int n = 0; n < MAX_N; n++) nv[n] = cv[l][n] ? neuron(vals[cs1[l][n]], vals[cs2[l][n]], cc[l][n]) : 0;
        vals = nv;
      end
      sum = 0; cnt = 0;
      for (int n = 0; n < MAX_N; n++)
        if ((nl == 0 && n < N_IN) || (nl > 0 && cv[nl-1][n] != 0)) begin sum += vals[n]; cnt++; end
      e = int'($signed(16'(sum / cnt)));
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (y !== data_t'(e)) begin failures++; $display("FAIL trial %0d layers %0d: y=%0d exp %0d", trial, nl, y, e); end
      checks++;
      if (cyc != nl * MAX_N + DATA_W + NW + 5) begin failures++; $display("FAIL latency %0d", cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
