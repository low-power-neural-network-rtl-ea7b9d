// gmdh_neuron_tb: check of the quadratic neuron against an integer model of
// equation (1) in Q7.8 (each product truncated toward zero, sums modulo
// 2^16), including the XOR neuron y = in1^2 + in2^2 - 2*in1*in2 on 0/1 inputs.
module gmdh_neuron_tb;
  import gmdh_pkg::*;
  data_t in1, in2, y;
  logic [N_TERMS-1:0][DATA_W-1:0] coef;
  int checks = 0, failures = 0;

  gmdh_neuron dut (.in1(in1), .in2(in2), .coef(coef), .y(y));

  function automatic int q(input int x, input int z);
    longint p;
    p = longint'(x) * longint'(z);
    return int'($signed(DATA_W'(p / (longint'(1) << FRAC))));
  endfunction

  function automatic data_t model(input int a, input int b, input int c[6]);
    int s;
    s = c[0] + q(c[1], a) + q(c[2], b) + q(c[3], q(a, a)) + q(c[4], q(b, b)) + q(c[5], q(a, b));
    return data_t'(s);
  endfunction

  task automatic check_one(input int a, input int b, input int c[6]);
    in1 = data_t'(a); in2 = data_t'(b);
    for (int k = 0; k < 6; k++) coef[k] = DATA_W'(c[k]);
    #1;
    checks++;
    if (y !== model(a, b, c)) begin
      failures++;
      $display("FAIL in=%0d,%0d -> %0d exp %0d", a, b, y, model(a, b, c));
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
    int c[6];
    // XOR neuron: b = (0, 0, 0, 1, 1, -2)
    c = '{0, 0, 0, 256, 256, -512};
    for (int v = 0; v < 4; v++) begin
      check_one((v & 1) * 256, (v >> 1) * 256, c);
      checks++;
      if (y !== data_t'((((v & 1) ^ (v >> 1)) * 256))) begin
        failures++;
        $display("FAIL xor %0d -> %0d", v, y);
      end
    end
    for (int i = 0; i < 3000; i++) begin
      for (int k = 0; k < 6; k++) c[k] = int'($signed(16'($urandom))) / 16;
      check_one(int'($signed(16'($urandom))) / 32, int'($signed(16'($urandom))) / 32, c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
