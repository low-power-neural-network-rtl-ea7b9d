// output_averager: the output neuron of the network, which outputs the
// average of the outputs of the last hidden layer.
//
// The caller presents the sum of those outputs (sum, SUM_W bits, two's
// complement in the data format) and their number (count) and pulses start.
// The magnitude of the sum is divided by count on a seq_divider and the sign
// restored, so the average is truncated toward zero; done pulses SUM_W + 2
// clocks after start with avg valid until the next start. A count of 0 gives
// 0. Averaging is the algorithm's output layer; the serial division and the
// rounding are this design's choices.
module output_averager
  import gmdh_pkg::*;
#(
  parameter int unsigned SUM_W = DATA_W + 4,
  parameter int unsigned CNT_W = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [SUM_W-1:0] sum,
  input  logic [CNT_W-1:0]        count,
  output logic                    done,
  output data_t                   avg
);
  logic             neg, zero_cnt, busy, div_done, div_busy;
  logic [SUM_W-1:0] q;
  logic [CNT_W-1:0] rem;
  logic [SUM_W-1:0] mag;

  always_comb mag = sum[SUM_W-1] ? SUM_W'(-sum) : SUM_W'(sum);

  seq_divider #(.DW(SUM_W), .VW(CNT_W)) u_div (
    .clk(clk), .rst_n(rst_n), .start(start && !busy && count != '0),
    .dividend(mag), .divisor(count), .busy(div_busy), .done(div_done),
    .quotient(q), .remainder(rem)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      neg      <= 1'b0;
      zero_cnt <= 1'b0;
      busy     <= 1'b0;
      done     <= 1'b0;
      avg      <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        neg      <= sum[SUM_W-1];
        zero_cnt <= (count == '0);
        busy     <= 1'b1;
      end else if (busy && zero_cnt) begin
        avg  <= '0;
        busy <= 1'b0;
        done <= 1'b1;
      end else if (busy && div_done) begin
        avg  <= neg ? -data_t'(q) : data_t'(q);
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end
endmodule
