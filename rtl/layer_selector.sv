// layer_selector: chooses the neurons that survive in a new layer.
//
// Candidates arrive one at a time (cand_valid) with their error and their
// configuration. The first `limit` candidates are kept; after that a new
// candidate replaces the kept one with the largest error if its own error is
// smaller, so the `limit` best are held at the end (limit = number of layer
// inputs + 2, set by the caller). On finalize the survivors are thinned: a
// kept neuron stays only if its error is not above the average error of the
// kept neurons, softened by SOFT_PCT percent (0: strictly the average; 10: up
// to 10 % above it). The comparison is done as err * n * 100 <=
// sum * (100 + SOFT_PCT), without a division.
// Interface: clear empties the store; one candidate per clock may be offered;
// finalize takes two clocks, after which done pulses and kept, cfg, err,
// n_kept and sum_kept (the survivors' count and error sum) are valid.
// The limit of inputs + 2, replacement of the worst and the average rule
// follow the algorithm; the streaming store and the arithmetic form of the
// test are this design's.
module layer_selector
  import gmdh_pkg::*;
#(
  parameter int unsigned MAX_N    = 12,
  parameter int unsigned SSE_W    = 64,
  parameter int unsigned SOFT_PCT = 0,
  localparam int unsigned NW      = $clog2(MAX_N + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic [NW-1:0]     limit,
  input  logic              cand_valid,
  input  logic [SSE_W-1:0]  cand_err,
  input  neuron_cfg_t       cand_cfg,
  input  logic              finalize,
  output logic              done,
  output logic [MAX_N-1:0]  kept,
  output neuron_cfg_t       cfg [MAX_N],
  output logic [SSE_W-1:0]  err [MAX_N],
  output logic [NW-1:0]     n_kept,
  output logic [SSE_W+7:0]  sum_kept
);
  localparam int unsigned PW = SSE_W + 8 + NW + 8;

  logic [NW-1:0]      cnt;
  logic               fin2;

  // slot with the largest error
  logic [NW-1:0]      worst;
  always_comb begin
    worst = '0;
    for (int n = 1; n < MAX_N; n++)
      if (kept[n] && err[n] > err[worst]) worst = NW'(n);
  end

  // sum and count over the kept slots
  logic [SSE_W+7:0] sum_now;
  logic [NW-1:0]    cnt_now;
  always_comb begin
    sum_now = '0;
    cnt_now = '0;
    for (int n = 0; n < MAX_N; n++)
      if (kept[n]) begin
        sum_now = sum_now + (SSE_W+8)'(err[n]);
        cnt_now = cnt_now + 1'b1;
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      kept     <= '0;
      done     <= 1'b0;
      fin2     <= 1'b0;
      n_kept   <= '0;
      sum_kept <= '0;
      for (int n = 0; n < MAX_N; n++) begin
        cfg[n] <= '0;
        err[n] <= '0;
      end
    end else begin
      done <= 1'b0;
      fin2 <= 1'b0;
      if (clear) begin
        cnt  <= '0;
        kept <= '0;
      end else if (cand_valid) begin
        if (cnt < limit) begin
          kept[cnt] <= 1'b1;
          cfg[cnt]  <= cand_cfg;
          err[cnt]  <= cand_err;
          cnt       <= cnt + 1'b1;
        end else if (cnt != '0 && cand_err < err[worst]) begin
          cfg[worst] <= cand_cfg;
          err[worst] <= cand_err;
        end
      end else if (finalize) begin
        // drop every neuron whose error is above the (softened) average
        for (int n = 0; n < MAX_N; n++)
          if (kept[n] && (PW'(err[n]) * PW'(cnt_now) * PW'(100) >
                          PW'(sum_now) * PW'(100 + SOFT_PCT)))
            kept[n] <= 1'b0;
        fin2 <= 1'b1;
      end else if (fin2) begin
        n_kept   <= cnt_now;
        sum_kept <= sum_now;
        done     <= 1'b1;
      end
    end
  end
endmodule
