// sm_multiplier_tb: check of the 16x16 sign-magnitude multiplier against
// integer multiplication of the magnitudes, and of the product sign rule
// (sign_x xor sign_y, forced positive for a zero product).
module sm_multiplier_tb;
  localparam int W = 16;
  logic sx, sy, sp;
  logic [W-1:0] mx, my;
  logic [2*W-1:0] mp;
  int checks = 0, failures = 0;

  sm_multiplier #(.W(W)) dut (.sign_x(sx), .mag_x(mx), .sign_y(sy), .mag_y(my),
                              .sign_p(sp), .mag_p(mp));

  task automatic check_one(input logic s1, input logic [W-1:0] m1,
                           input logic s2, input logic [W-1:0] m2);
    longint unsigned e;
    logic es;
    sx = s1; mx = m1; sy = s2; my = m2;
    #1;
    e  = longint'(m1) * longint'(m2);
    es = (e != 0) && (s1 != s2);
    checks++;
    if (mp != (2*W)'(e) || sp != es) begin
      failures++;
      $display("FAIL %0d*%0d (s %0d,%0d) -> %0d s=%0d", m1, m2, s1, s2, mp, sp);
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
    check_one(1'b0, '1, 1'b0, '1);
    check_one(1'b1, '0, 1'b0, 16'd5);
    check_one(1'b1, 16'd3, 1'b0, 16'd5);
    check_one(1'b1, 16'd3, 1'b1, 16'd5);
    for (int i = 0; i < 2000; i++)
      check_one(1'($urandom), W'($urandom), 1'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
