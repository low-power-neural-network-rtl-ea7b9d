// signed_mult_cell_tb: exhaustive check of the one-bit signed multiplication
// cell: p = px & py, and sign_p set only for a non-zero product of operands
// whose signs differ.
module signed_mult_cell_tb;
  logic px, py, sx, sy, p, sp;
  int checks = 0, failures = 0;

  signed_mult_cell dut (.px(px), .py(py), .sign_x(sx), .sign_y(sy), .p(p), .sign_p(sp));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic exp_p, exp_s;
      {px, py, sx, sy} = 4'(v);
      #1;
      // product of the signed one-bit values (+-px)*(+-py)
      exp_p = (px == 1'b1) && (py == 1'b1);
      exp_s = exp_p && (sx != sy);
      checks++;
      if (p !== exp_p || sp !== exp_s) begin
        failures++;
        $display("FAIL px=%0d py=%0d sx=%0d sy=%0d -> p=%0d s=%0d", px, py, sx, sy, p, sp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
