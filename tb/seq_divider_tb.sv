// seq_divider_tb: random unsigned divisions on a 24/12-bit restoring divider,
// checked against the / and % operators, with the latency of DW + 1 clocks from
// start to done and busy high in between.
module seq_divider_tb;
  localparam int DW = 24, VW = 12;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [DW-1:0] dividend, quotient;
  logic [VW-1:0] divisor, remainder;
  int checks = 0, failures = 0;

  seq_divider #(.DW(DW), .VW(VW)) dut (.clk(clk), .rst_n(rst_n), .start(start),
    .dividend(dividend), .divisor(divisor), .busy(busy), .done(done),
    .quotient(quotient), .remainder(remainder));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input logic [DW-1:0] a, input logic [VW-1:0] b);
    int cyc;
    @(negedge clk); dividend = a; divisor = b; start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin
      if (!busy) begin failures++; $display("FAIL busy low while dividing"); end
      @(negedge clk); cyc++;
    end
    checks++;
    if (quotient != a / DW'(b) || remainder != VW'(a % DW'(b))) begin
      failures++; $display("FAIL %0d / %0d = %0d r %0d", a, b, quotient, remainder);
    end
    checks++;
    if (cyc != DW + 1) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    one('1, 12'd1);
    one('1, '1);
    one(24'd5, 12'd7);
    for (int k = 0; k < 300; k++) one(DW'($urandom), VW'($urandom_range(1, 4095)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
