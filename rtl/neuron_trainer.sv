// neuron_trainer: finds the best equation for one neuron, given which two
// layer inputs feed it.
//
// First the normal equations (normal_eq_accum) are accumulated over all
// training samples, one sample per clock. Then every non-empty subset of the
// six terms is tried: gauss_solver solves the reduced system, and if it has a
// solution the candidate neuron (gmdh_neuron, the same datapath the trained
// network uses) is run over the samples, one per clock, summing the squared
// prediction error. The candidate with the smallest error is kept as it goes,
// so no candidate list is stored. Subsets are tried as term masks from
// 6'b111111 down to 6'b000001; on equal error the first one tried is kept.
//
// The error kept is the sum of squared errors SSE = s * MSE (16 fractional
// bits); with the same s for every candidate it orders candidates exactly as
// the MSE does and needs no division.
// Interface: the samples are read through samp_idx / samp_in1 / samp_in2 /
// samp_y, a combinational read port of the caller's sample memory. Pulse
// start; done pulses when the search ends, with found = 0 if every subset was
// singular. Time: num_samples + 2 + sum over the 63 subsets of (solver
// latency + num_samples for the solvable ones) clocks.
// Trying all term subsets, solving the reduced normal equations and choosing
// by MSE follow the algorithm; the search order, the tie rule and the use of
// SSE are this design's choices.
module neuron_trainer
  import gmdh_pkg::*;
#(
  parameter int unsigned MAX_SAMPLES = 56,
  parameter int unsigned ACC_W       = 64,
  parameter int unsigned SSE_W       = 64,
  localparam int unsigned SIDX_W     = $clog2(MAX_SAMPLES + 1)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [SIDX_W-1:0]             num_samples,
  output logic [SIDX_W-1:0]             samp_idx,
  input  data_t                         samp_in1,
  input  data_t                         samp_in2,
  input  data_t                         samp_y,
  output logic                          done,
  output logic                          found,
  output logic [N_TERMS-1:0][DATA_W-1:0] best_coef,
  output logic [N_TERMS-1:0]            best_mask,
  output logic [SSE_W-1:0]              best_sse
);
  typedef enum logic [2:0] {S_IDLE, S_ACC, S_ACC_END, S_SOLVE, S_SWAIT, S_MSE, S_CMP} state_t;
  state_t state;

  logic [SIDX_W-1:0]  s;
  logic [N_TERMS-1:0] mask;
  logic               acc_clear, acc_valid;
  logic [SSE_W-1:0]   sse;

  logic signed [ACC_W-1:0] g [N_TERMS][N_TERMS];
  logic signed [ACC_W-1:0] r [N_TERMS];

  logic solv_start, solv_done, solv_sing;
  logic [N_TERMS-1:0][DATA_W-1:0] solv_coef;

  data_t y_c;
  logic signed [DATA_W:0] err;

  assign samp_idx  = s;
  assign acc_valid = (state == S_ACC);

  normal_eq_accum #(.ACC_W(ACC_W)) u_acc (
    .clk(clk), .rst_n(rst_n), .clear(acc_clear), .sample_valid(acc_valid),
    .in1(samp_in1), .in2(samp_in2), .y(samp_y), .g(g), .r(r)
  );

  gauss_solver #(.W(ACC_W)) u_solve (
    .clk(clk), .rst_n(rst_n), .start(solv_start), .g(g), .r(r), .term_mask(mask),
    .done(solv_done), .singular(solv_sing), .coef(solv_coef)
  );

  gmdh_neuron u_neuron (.in1(samp_in1), .in2(samp_in2), .coef(solv_coef), .y(y_c));

  always_comb err = (DATA_W+1)'(samp_y) - (DATA_W+1)'(y_c);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      s          <= '0;
      mask       <= '0;
      sse        <= '0;
      acc_clear  <= 1'b0;
      solv_start <= 1'b0;
      done       <= 1'b0;
      found      <= 1'b0;
      best_coef  <= '0;
      best_mask  <= '0;
      best_sse   <= '0;
    end else begin
      acc_clear  <= 1'b0;
      solv_start <= 1'b0;
      done       <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          acc_clear <= 1'b1;
          found     <= 1'b0;
          s         <= '0;
          state     <= S_ACC_END;   // one clock for the clear, then accumulate
          mask      <= '0;
        end
        S_ACC_END: begin
          if (mask == '0) begin
            state <= S_ACC;         // clear done: start accumulating
            mask  <= '1;
          end else begin
            state      <= S_SOLVE;  // last sample summed
          end
        end
        S_ACC: begin
          if (s == num_samples - 1'b1) begin
            s     <= '0;
            state <= S_ACC_END;
          end else s <= s + 1'b1;
        end
        S_SOLVE: begin
          solv_start <= 1'b1;
          state      <= S_SWAIT;
        end
        S_SWAIT: if (solv_done) begin
          if (solv_sing) state <= S_CMP;
          else begin
            s     <= '0;
            sse   <= '0;
            state <= S_MSE;
          end
        end
        S_MSE: begin
          sse <= sse + SSE_W'(SSE_W'(err) * SSE_W'(err));
          if (s == num_samples - 1'b1) begin
            s     <= '0;
            state <= S_CMP;
          end else s <= s + 1'b1;
        end
        S_CMP: begin
          if (!solv_sing && (!found || sse < best_sse)) begin
            found     <= 1'b1;
            best_sse  <= sse;
            best_coef <= solv_coef;
            best_mask <= mask;
          end
          if (mask == N_TERMS'(1)) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            mask  <= mask - 1'b1;
            state <= S_SOLVE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
