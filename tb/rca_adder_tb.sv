// rca_adder_tb: random and corner-case check of the 16-bit ripple-carry adder
// against a + b + cin computed with integer arithmetic.
module rca_adder_tb;
  localparam int W = 16;
  logic [W-1:0] a, b, sum;
  logic cin, cout;
  int checks = 0, failures = 0;

  rca_adder #(.W(W)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic check_one(input logic [W-1:0] x, input logic [W-1:0] y, input logic c);
    longint unsigned e;
    a = x; b = y; cin = c;
    #1;
    e = longint'(x) + longint'(y) + longint'(c);
    checks++;
    if ({cout, sum} != (W+1)'(e)) begin
      failures++;
      $display("FAIL %h + %h + %0d = %h,%0d", x, y, c, sum, cout);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one('1, '0, 1'b1);
    check_one('1, '1, 1'b1);
    check_one('0, '0, 1'b0);
    check_one(16'h7fff, 16'h0001, 1'b0);
    for (int i = 0; i < 2000; i++) check_one(W'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
