// gmdh_trainer: grows a GMDH network layer by layer from a training set.
//
// The training set (up to MAX_SAMPLES samples of num_inputs inputs and one
// desired output) is loaded into the sample memory through the ld_* port.
// For each new layer every pair (p, q), p < q, of the layer's inputs is given
// to neuron_trainer, which returns the pair's best equation and its error;
// layer_selector keeps the best (inputs + 2) of them and then drops those
// above the average error. The layer is then judged:
//   - no neuron survived, or the survivors' average error is not lower than
//     that of the previous layer: the layer is discarded and training ends;
//   - otherwise the layer is added: its neurons are written to the network
//     configuration (cfg_* port, compacted to slots 0..n-1, the rest marked
//     invalid) and their outputs for every training sample are computed
//     (gmdh_neuron, one value per clock) into the other half of the sample
//     memory, where they become the next layer's inputs;
//   - training also ends when the added layer has a single neuron or when
//     max_layers layers exist.
// The first hidden layer has no previous error to beat and is kept if any
// neuron survives. stop_reason tells why training ended.
// Interface: load, set num_inputs / num_samples / max_layers, pulse start;
// done pulses at the end with n_layers (layers written to the network) and
// stop_reason valid. Time is dominated by the neuron searches: pairs x
// (63 solver runs + samples per solvable subset).
// The layer-growing and stopping rules are the algorithm's; the memory
// organisation, the one-neuron-at-a-time schedule and the error measure
// (sum of squared errors, equivalent to MSE for a fixed sample count) are
// this design's choices.
module gmdh_trainer
  import gmdh_pkg::*;
#(
  parameter int unsigned N_IN        = 4,
  parameter int unsigned MAX_SAMPLES = 56,
  parameter int unsigned MAX_LAYERS  = 4,
  parameter int unsigned MAX_N       = N_IN + 2 * MAX_LAYERS,
  parameter int unsigned SOFT_PCT    = 0,
  parameter int unsigned SSE_W       = 64,
  localparam int unsigned SIDX_W     = $clog2(MAX_SAMPLES + 1),
  localparam int unsigned LW         = $clog2(MAX_LAYERS + 1),
  localparam int unsigned NW         = $clog2(MAX_N + 1),
  localparam int unsigned MAX_W      = (MAX_N > N_IN) ? MAX_N : N_IN
) (
  input  logic              clk,
  input  logic              rst_n,
  // training-set load port
  input  logic              ld_we,
  input  logic [SIDX_W-1:0] ld_sample,
  input  logic [SEL_W-1:0]  ld_col,      // input number, ignored when ld_is_y
  input  logic              ld_is_y,
  input  data_t             ld_data,
  // run control
  input  logic [NW-1:0]     num_inputs,
  input  logic [SIDX_W-1:0] num_samples,
  input  logic [LW-1:0]     max_layers,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic [LW-1:0]     n_layers,
  output stop_t             stop_reason,
  // network configuration write port
  output logic              cfg_we,
  output logic [LW-1:0]     cfg_layer,
  output logic [NW-1:0]     cfg_idx,
  output neuron_cfg_t       cfg_data
);
  typedef enum logic [3:0] {
    T_IDLE, T_LSTART, T_PSTART, T_PWAIT, T_FIN, T_FWAIT, T_DECIDE,
    T_COMMIT, T_CLEAR, T_EVAL, T_NEXT
  } tstate_t;
  tstate_t state;

  data_t xm [2][MAX_SAMPLES][MAX_W];
  data_t ym [MAX_SAMPLES];
  logic  bank;

  logic [NW-1:0]     width;     // inputs of the layer being built
  logic [SEL_W-1:0]  p, q;
  logic [LW-1:0]     layer;
  logic              have_prev;
  logic [NW-1:0]     prev_n;
  logic [SSE_W+7:0]  prev_sum;
  logic [NW-1:0]     j, c;
  logic [SIDX_W-1:0] s;
  neuron_cfg_t       clist [MAX_N];

  // neuron trainer
  logic                          nt_start, nt_done, nt_found;
  logic [SIDX_W-1:0]             nt_idx;
  logic [N_TERMS-1:0][DATA_W-1:0] nt_coef;
  logic [N_TERMS-1:0]            nt_mask;
  logic [SSE_W-1:0]              nt_sse;

  neuron_trainer #(.MAX_SAMPLES(MAX_SAMPLES), .SSE_W(SSE_W)) u_nt (
    .clk(clk), .rst_n(rst_n), .start(nt_start), .num_samples(num_samples),
    .samp_idx(nt_idx),
    .samp_in1(xm[bank][nt_idx][p[NW-1:0]]),
    .samp_in2(xm[bank][nt_idx][q[NW-1:0]]),
    .samp_y  (ym[nt_idx]),
    .done(nt_done), .found(nt_found), .best_coef(nt_coef), .best_mask(nt_mask),
    .best_sse(nt_sse)
  );

  // layer selector
  logic             ls_clear, ls_valid, ls_fin, ls_done;
  logic [NW-1:0]    ls_limit;
  neuron_cfg_t      ls_cand;
  logic [SSE_W-1:0] ls_cand_err;
  logic [MAX_N-1:0] ls_kept;
  neuron_cfg_t      ls_cfg [MAX_N];
  logic [SSE_W-1:0] ls_err [MAX_N];
  logic [NW-1:0]    ls_n;
  logic [SSE_W+7:0] ls_sum;

  layer_selector #(.MAX_N(MAX_N), .SSE_W(SSE_W), .SOFT_PCT(SOFT_PCT)) u_sel (
    .clk(clk), .rst_n(rst_n), .clear(ls_clear), .limit(ls_limit),
    .cand_valid(ls_valid), .cand_err(ls_cand_err), .cand_cfg(ls_cand),
    .finalize(ls_fin), .done(ls_done), .kept(ls_kept), .cfg(ls_cfg),
    .err(ls_err), .n_kept(ls_n), .sum_kept(ls_sum)
  );

  // neuron used to compute the added layer's outputs for every sample
  data_t ev_in1, ev_in2, ev_out;
  always_comb begin
    ev_in1 = xm[bank][s][clist[j].sel1[NW-1:0]];
    ev_in2 = xm[bank][s][clist[j].sel2[NW-1:0]];
  end
  gmdh_neuron u_eval (.in1(ev_in1), .in2(ev_in2), .coef(clist[j].coef), .y(ev_out));

  // the added layer is better when sum/n < prev_sum/prev_n
  logic better;
  always_comb
    better = ((SSE_W+8+NW)'(ls_sum) * (SSE_W+8+NW)'(prev_n)) <
             ((SSE_W+8+NW)'(prev_sum) * (SSE_W+8+NW)'(ls_n));

  assign busy = (state != T_IDLE);

  always_ff @(posedge clk) begin
    if (state == T_IDLE && ld_we && int'(ld_sample) < MAX_SAMPLES) begin
      if (ld_is_y) ym[ld_sample] <= ld_data;
      else if (int'(ld_col) < MAX_W) xm[0][ld_sample][ld_col[NW-1:0]] <= ld_data;
    end else if (state == T_EVAL) begin
      xm[~bank][s][j] <= ev_out;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= T_IDLE;
      bank        <= 1'b0;
      width       <= '0;
      p           <= '0;
      q           <= '0;
      layer       <= '0;
      have_prev   <= 1'b0;
      prev_n      <= '0;
      prev_sum    <= '0;
      j           <= '0;
      c           <= '0;
      s           <= '0;
      nt_start    <= 1'b0;
      ls_clear    <= 1'b0;
      ls_valid    <= 1'b0;
      ls_fin      <= 1'b0;
      ls_limit    <= '0;
      ls_cand     <= '0;
      ls_cand_err <= '0;
      done        <= 1'b0;
      n_layers    <= '0;
      stop_reason <= STOP_NONE;
      cfg_we      <= 1'b0;
      cfg_layer   <= '0;
      cfg_idx     <= '0;
      cfg_data    <= '0;
      for (int k = 0; k < MAX_N; k++) clist[k] <= '0;
    end else begin
      nt_start <= 1'b0;
      ls_clear <= 1'b0;
      ls_valid <= 1'b0;
      ls_fin   <= 1'b0;
      done     <= 1'b0;
      cfg_we   <= 1'b0;
      case (state)
        T_IDLE: if (start) begin
          bank      <= 1'b0;
          width     <= num_inputs;
          layer     <= '0;
          have_prev <= 1'b0;
          n_layers  <= '0;
          state     <= T_LSTART;
        end
        T_LSTART: begin
          if (width < NW'(2)) begin
            stop_reason <= STOP_NO_NEURON;
            done        <= 1'b1;
            state       <= T_IDLE;
          end else begin
            ls_clear <= 1'b1;
            ls_limit <= (width + NW'(2) > NW'(MAX_N)) ? NW'(MAX_N) : width + NW'(2);
            p        <= '0;
            q        <= SEL_W'(1);
            state    <= T_PSTART;
          end
        end
        T_PSTART: begin
          nt_start <= 1'b1;
          state    <= T_PWAIT;
        end
        T_PWAIT: if (nt_done) begin
          ls_valid      <= nt_found;
          ls_cand.valid <= 1'b1;
          ls_cand.sel1  <= p;
          ls_cand.sel2  <= q;
          ls_cand.coef  <= nt_coef;
          ls_cand_err   <= nt_sse;
          if (q == SEL_W'(width) - 1'b1) begin
            if (p == SEL_W'(width) - SEL_W'(2)) state <= T_FIN;
            else begin
              p     <= p + 1'b1;
              q     <= p + SEL_W'(2);
              state <= T_PSTART;
            end
          end else begin
            q     <= q + 1'b1;
            state <= T_PSTART;
          end
        end
        T_FIN: begin
          // the last candidate was offered in the previous clock
          ls_fin <= 1'b1;
          state  <= T_FWAIT;
        end
        T_FWAIT: if (ls_done) state <= T_DECIDE;
        T_DECIDE: begin
          if (ls_n == '0) begin
            stop_reason <= STOP_NO_NEURON;
            done        <= 1'b1;
            state       <= T_IDLE;
          end else if (have_prev && !better) begin
            stop_reason <= STOP_NO_GAIN;
            done        <= 1'b1;
            state       <= T_IDLE;
          end else begin
            j     <= '0;
            c     <= '0;
            state <= T_COMMIT;
          end
        end
        T_COMMIT: begin
          if (ls_kept[j]) begin
            clist[c]  <= ls_cfg[j];
            cfg_we    <= 1'b1;
            cfg_layer <= layer;
            cfg_idx   <= c;
            cfg_data  <= ls_cfg[j];
            c         <= c + 1'b1;
          end
          if (j == NW'(MAX_N - 1)) state <= T_CLEAR;
          else j <= j + 1'b1;
        end
        T_CLEAR: begin
          if (c == NW'(MAX_N)) begin
            j     <= '0;
            s     <= '0;
            state <= T_EVAL;
          end else begin
            cfg_we    <= 1'b1;
            cfg_layer <= layer;
            cfg_idx   <= c;
            cfg_data  <= '0;
            c         <= c + 1'b1;
          end
        end
        T_EVAL: begin
          // xm[~bank][s][j] is written by the memory process above
          if (j == ls_n - 1'b1) begin
            j <= '0;
            if (s == num_samples - 1'b1) state <= T_NEXT;
            else s <= s + 1'b1;
          end else j <= j + 1'b1;
        end
        T_NEXT: begin
          bank      <= ~bank;
          width     <= ls_n;
          layer     <= layer + 1'b1;
          n_layers  <= layer + 1'b1;
          have_prev <= 1'b1;
          prev_n    <= ls_n;
          prev_sum  <= ls_sum;
          if (ls_n == NW'(1)) begin
            stop_reason <= STOP_SINGLE;
            done        <= 1'b1;
            state       <= T_IDLE;
          end else if (layer + 1'b1 >= max_layers) begin
            stop_reason <= STOP_LIMIT;
            done        <= 1'b1;
            state       <= T_IDLE;
          end else state <= T_LSTART;
        end
        default: state <= T_IDLE;
      endcase
    end
  end
endmodule
