// output_averager_tb: checks the output neuron's average (sum / count,
// truncated toward zero) for random sums and counts, including negative sums
// and a zero count, and checks its latency of SUM_W + 2 clocks.
module output_averager_tb;
  import gmdh_pkg::*;
  localparam int SUM_W = 20, CNT_W = 4;

  logic clk = 0, rst_n = 0, start = 0, done;
  logic signed [SUM_W-1:0] sum;
  logic [CNT_W-1:0] count;
  data_t avg;
  int checks = 0, failures = 0;

  output_averager #(.SUM_W(SUM_W), .CNT_W(CNT_W)) dut (.clk(clk), .rst_n(rst_n), .start(start),
    .sum(sum), .count(count), .done(done), .avg(avg));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int s, input int c);
    int cyc, e;
    @(negedge clk); sum = SUM_W'(s); count = CNT_W'(c); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    e = (c == 0) ? 0 : s / c;
    checks++;
    if (avg !== data_t'(e)) begin failures++; $display("FAIL %0d/%0d = %0d exp %0d", s, c, avg, e); end
    if (c != 0) begin
      checks++;
      if (cyc != SUM_W + 2) begin failures++; $display("FAIL latency %0d", cyc); end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    one(768, 3);
    one(-767, 3);
    one(100, 0);
    for (int k = 0; k < 200; k++) begin
      int c;
      c = $urandom_range(1, 15);
      one((int'($urandom_range(0, 60000)) - 30000) * c / 8, c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
