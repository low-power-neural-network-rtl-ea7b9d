// fx_mul_tb: check of the Q7.8 fixed-point multiply against a reference that
// multiplies as integers and divides by 256 with truncation toward zero.
module fx_mul_tb;
  localparam int W = 16, FRAC = 8;
  logic signed [W-1:0] a, b, y;
  int checks = 0, failures = 0;

  fx_mul #(.W(W), .FRAC(FRAC)) dut (.a(a), .b(b), .y(y));

  function automatic logic signed [W-1:0] ref_mul(input int x, input int z);
    longint p;
    p = longint'(x) * longint'(z);
    // SystemVerilog integer division truncates toward zero
    return W'(p / (longint'(1) << FRAC));
  endfunction

  task automatic check_one(input int x, input int z);
    a = W'(x); b = W'(z);
    #1;
    checks++;
    if (y !== ref_mul(int'(a), int'(b))) begin
      failures++;
      $display("FAIL %0d*%0d -> %0d exp %0d", a, b, y, ref_mul(int'(a), int'(b)));
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
    check_one(256, 256);       // 1.0 * 1.0
    check_one(-384, 512);      // -1.5 * 2.0
    check_one(-1, 1);          // tiny negative rounds to 0
    check_one(-32768, 256);
    for (int i = 0; i < 2000; i++) check_one(int'($signed(16'($urandom))), int'($signed(16'($urandom))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
