// gmdh_top: GMDH network trainer and evaluator.
//
// gmdh_trainer builds the network from a training set loaded through the
// ld_* port and writes each accepted layer into the configuration memory of
// gmdh_network, which then evaluates the trained network for any input
// vector. The number of layers the trainer accepted is passed to the
// evaluator directly. Both use the same gmdh_neuron datapath (sign-magnitude
// multipliers and ripple adders), so the outputs seen during training are
// exactly those of the evaluator.
// Interface: load samples, then pulse train_start with num_inputs,
// num_samples and max_layers set; train_done pulses with n_layers and
// stop_reason. Then pulse eval_start with x; eval_done pulses with y.
// eval_start while training runs is ignored.
module gmdh_top
  import gmdh_pkg::*;
#(
  parameter int unsigned N_IN        = 4,
  parameter int unsigned MAX_SAMPLES = 56,
  parameter int unsigned MAX_LAYERS  = 4,
  parameter int unsigned MAX_N       = N_IN + 2 * MAX_LAYERS,
  parameter int unsigned SOFT_PCT    = 0,
  localparam int unsigned SIDX_W     = $clog2(MAX_SAMPLES + 1),
  localparam int unsigned LW         = $clog2(MAX_LAYERS + 1),
  localparam int unsigned NW         = $clog2(MAX_N + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // training set
  input  logic              ld_we,
  input  logic [SIDX_W-1:0] ld_sample,
  input  logic [SEL_W-1:0]  ld_col,
  input  logic              ld_is_y,
  input  data_t             ld_data,
  // training
  input  logic [NW-1:0]     num_inputs,
  input  logic [SIDX_W-1:0] num_samples,
  input  logic [LW-1:0]     max_layers,
  input  logic              train_start,
  output logic              train_busy,
  output logic              train_done,
  output logic [LW-1:0]     n_layers,
  output stop_t             stop_reason,
  // evaluation
  input  logic              eval_start,
  input  data_t             x [N_IN],
  output logic              eval_done,
  output data_t             y
);
  logic          cfg_we;
  logic [LW-1:0] cfg_layer;
  logic [NW-1:0] cfg_idx;
  neuron_cfg_t   cfg_data;
  logic          eval_busy;

  gmdh_trainer #(
    .N_IN(N_IN), .MAX_SAMPLES(MAX_SAMPLES), .MAX_LAYERS(MAX_LAYERS),
    .MAX_N(MAX_N), .SOFT_PCT(SOFT_PCT)
  ) u_trainer (
    .clk(clk), .rst_n(rst_n),
    .ld_we(ld_we), .ld_sample(ld_sample), .ld_col(ld_col), .ld_is_y(ld_is_y),
    .ld_data(ld_data),
    .num_inputs(num_inputs), .num_samples(num_samples), .max_layers(max_layers),
    .start(train_start), .busy(train_busy), .done(train_done),
    .n_layers(n_layers), .stop_reason(stop_reason),
    .cfg_we(cfg_we), .cfg_layer(cfg_layer), .cfg_idx(cfg_idx), .cfg_data(cfg_data)
  );

  gmdh_network #(.N_IN(N_IN), .MAX_LAYERS(MAX_LAYERS), .MAX_N(MAX_N)) u_net (
    .clk(clk), .rst_n(rst_n),
    .cfg_we(cfg_we), .cfg_layer(cfg_layer), .cfg_idx(cfg_idx), .cfg_data(cfg_data),
    .num_layers(n_layers),
    .start(eval_start && !train_busy), .x(x),
    .busy(eval_busy), .done(eval_done), .y(y)
  );

  // the evaluator is only configured while it is idle
  a_cfg_idle: assert property (@(posedge clk) disable iff (!rst_n) cfg_we |-> !eval_busy);
endmodule
