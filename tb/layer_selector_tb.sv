// layer_selector_tb: offers random candidate errors to the layer selector and
// checks its survivors against a reference computed here: the `limit`
// smallest errors (first-come order on ties is avoided by using distinct
// errors), then only those not above the average of the kept ones.
// Covers fewer candidates than the limit, more candidates (replacement of the
// worst), and a softened average rule in a second instance (SOFT_PCT = 10).
module layer_selector_tb;
  import gmdh_pkg::*;
  localparam int MAX_N = 12;
  localparam int NW = $clog2(MAX_N + 1);

  logic clk = 0, rst_n = 0, clear = 0, cv = 0, fin = 0;
  logic [NW-1:0] limit;
  logic [63:0] cerr;
  neuron_cfg_t ccfg;
  logic done [2];
  logic [MAX_N-1:0] kept [2];
  neuron_cfg_t cfg0 [MAX_N], cfg1 [MAX_N];
  logic [63:0] err0 [MAX_N], err1 [MAX_N];
  logic [NW-1:0] nk [2];
  logic [71:0] sk [2];
  int checks = 0, failures = 0;

  layer_selector #(.MAX_N(MAX_N), .SOFT_PCT(0)) dut0 (.clk(clk), .rst_n(rst_n), .clear(clear),
    .limit(limit), .cand_valid(cv), .cand_err(cerr), .cand_cfg(ccfg), .finalize(fin),
    .done(done[0]), .kept(kept[0]), .cfg(cfg0), .err(err0), .n_kept(nk[0]), .sum_kept(sk[0]));
  layer_selector #(.MAX_N(MAX_N), .SOFT_PCT(10)) dut1 (.clk(clk), .rst_n(rst_n), .clear(clear),
    .limit(limit), .cand_valid(cv), .cand_err(cerr), .cand_cfg(ccfg), .finalize(fin),
    .done(done[1]), .kept(kept[1]), .cfg(cfg1), .err(err1), .n_kept(nk[1]), .sum_kept(sk[1]));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e [64];
    int ncand, lim, nkeep;
    longint best [$];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 30; trial++) begin
      ncand = $urandom_range(1, 30);
      lim   = $urandom_range(2, MAX_N);
      limit = NW'(lim);
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      for (int k = 0; k < ncand; k++) begin
        e[k] = longint'(k) + 64 * longint'($urandom_range(1, 1000));  // distinct
        cv = 1; cerr = e[k];
        ccfg = '0; ccfg.valid = 1; ccfg.sel1 = 8'(k); ccfg.sel2 = 8'(k + 1);
        @(negedge clk);
      end
      cv = 0;
      fin = 1;
      @(negedge clk); fin = 0;
      while (!done[0]) @(negedge clk);
      // reference: sort, take lim best, then prune by average
      best.delete();
      for (int k = 0; k < ncand; k++) best.push_back(e[k]);
      best.sort();
      while (best.size() > lim) void'(best.pop_back());
      for (int sf = 0; sf < 2; sf++) begin
        longint sum, ksum;
        int cnt;
        sum = 0;
        foreach (best[k]) sum += best[k];
        nkeep = 0; ksum = 0;
        foreach (best[k])
          if (best[k] * best.size() * 100 <= sum * (sf ? 110 : 100)) begin
            nkeep++; ksum += best[k];
          end
        cnt = 0;
        for (int n = 0; n < MAX_N; n++)
          if (kept[sf][n]) begin
            logic [63:0] ev;
            logic [7:0] s1;
            cnt++;
            ev = sf ? err1[n] : err0[n];
            s1 = sf ? cfg1[n].sel1 : cfg0[n].sel1;
            checks++;
            // the stored configuration must belong to the stored error
            if (ev % 64 != 64'(s1)) begin failures++; $display("FAIL cfg/err mismatch"); end
          end
        checks++;
        if (cnt != nkeep || int'(nk[sf]) != nkeep || sk[sf] != 72'(ksum)) begin
          failures++;
          $display("FAIL trial %0d sf %0d: kept %0d/%0d exp %0d, sum %0d exp %0d", trial, sf,
                   cnt, nk[sf], nkeep, sk[sf], ksum);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
