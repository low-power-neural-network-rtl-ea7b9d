// gmdh_network: evaluates a trained GMDH network for one input vector.
//
// The network is held in a configuration memory of MAX_LAYERS x MAX_N neuron
// entries (neuron_cfg_t: valid, the two inputs it takes from the previous
// layer, six coefficients). Layer 0 reads the system inputs x; layer l reads
// the outputs of layer l-1, the outputs of a layer being numbered by their
// slot. Evaluation is serial: one gmdh_neuron datapath computes one neuron
// per clock, slot by slot and layer by layer, into a pair of output buffers
// used alternately. The output neuron then averages the outputs of the valid
// neurons of the last layer (output_averager). With num_layers = 0 the inputs
// are averaged.
// Interface: write entries with cfg_we / cfg_layer / cfg_idx / cfg_data while
// idle; set num_layers; pulse start with x stable for that clock. done pulses
// num_layers * MAX_N + SUM_W + 5 clocks later, SUM_W = DATA_W +
// clog2(MAX_N + 1) (the sum and the serial division take SUM_W + 5), with y
// valid until the next start.
// The layer structure, two-input quadratic neurons and averaging output
// follow the algorithm's network; serial evaluation on one neuron datapath is
// this design's choice (the datapath can be replicated for parallelism).
module gmdh_network
  import gmdh_pkg::*;
#(
  parameter int unsigned N_IN       = 4,
  parameter int unsigned MAX_LAYERS = 4,
  parameter int unsigned MAX_N      = N_IN + 2 * MAX_LAYERS,
  localparam int unsigned LW        = $clog2(MAX_LAYERS + 1),
  localparam int unsigned NW        = $clog2(MAX_N + 1),
  localparam int unsigned MAX_W     = (MAX_N > N_IN) ? MAX_N : N_IN
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_we,
  input  logic [LW-1:0] cfg_layer,
  input  logic [NW-1:0] cfg_idx,
  input  neuron_cfg_t   cfg_data,
  input  logic [LW-1:0] num_layers,
  input  logic          start,
  input  data_t         x [N_IN],
  output logic          busy,
  output logic          done,
  output data_t         y
);
  localparam int unsigned SUM_W = DATA_W + NW;

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_SUM, S_WAIT} state_t;
  state_t state;

  neuron_cfg_t cfg_mem [MAX_LAYERS][MAX_N];
  data_t       vbuf    [2][MAX_W];
  logic [MAX_W-1:0] vvalid [2];
  logic        b;
  logic [LW-1:0] l;
  logic [NW-1:0] n;

  // current neuron
  neuron_cfg_t cur;
  data_t       nin1, nin2, nout;
  always_comb begin
    cur  = cfg_mem[l][n];
    nin1 = (int'(cur.sel1) < MAX_W) ? vbuf[b][cur.sel1] : '0;
    nin2 = (int'(cur.sel2) < MAX_W) ? vbuf[b][cur.sel2] : '0;
  end

  gmdh_neuron u_neuron (.in1(nin1), .in2(nin2), .coef(cur.coef), .y(nout));

  // sum and count of the last layer's outputs
  logic signed [SUM_W-1:0] osum;
  logic [NW-1:0]           ocnt;
  always_comb begin
    osum = '0;
    ocnt = '0;
    for (int k = 0; k < MAX_W; k++)
      if (vvalid[b][k]) begin
        osum = osum + SUM_W'(vbuf[b][k]);
        ocnt = ocnt + 1'b1;
      end
  end

  logic avg_start, avg_done;
  output_averager #(.SUM_W(SUM_W), .CNT_W(NW)) u_avg (
    .clk(clk), .rst_n(rst_n), .start(avg_start), .sum(osum), .count(ocnt),
    .done(avg_done), .avg(y)
  );

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      b         <= 1'b0;
      l         <= '0;
      n         <= '0;
      avg_start <= 1'b0;
      done      <= 1'b0;
      vvalid[0] <= '0;
      vvalid[1] <= '0;
      for (int k = 0; k < MAX_W; k++) begin
        vbuf[0][k] <= '0;
        vbuf[1][k] <= '0;
      end
      for (int a = 0; a < MAX_LAYERS; a++)
        for (int k = 0; k < MAX_N; k++) cfg_mem[a][k] <= '0;
    end else begin
      avg_start <= 1'b0;
      done      <= 1'b0;
      case (state)
        S_IDLE: begin
          if (cfg_we && int'(cfg_layer) < MAX_LAYERS && int'(cfg_idx) < MAX_N)
            cfg_mem[cfg_layer][cfg_idx] <= cfg_data;
          if (start) begin
            for (int k = 0; k < MAX_W; k++) begin
              vbuf[0][k]   <= (k < N_IN) ? x[k] : '0;
              vvalid[0][k] <= (k < N_IN);
            end
            b     <= 1'b0;
            l     <= '0;
            n     <= '0;
            state <= (num_layers == '0) ? S_SUM : S_RUN;
          end
        end
        S_RUN: begin
          vbuf[~b][n]   <= cur.valid ? nout : '0;
          vvalid[~b][n] <= cur.valid;
          if (n == NW'(MAX_N - 1)) begin
            n <= '0;
            b <= ~b;
            if (l == num_layers - 1'b1) state <= S_SUM;
            else l <= l + 1'b1;
          end else n <= n + 1'b1;
        end
        S_SUM: begin
          avg_start <= 1'b1;
          state     <= S_WAIT;
        end
        S_WAIT: if (avg_done) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
