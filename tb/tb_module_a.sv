// tb_module_a: every combination of the three counts and full_ok at W=32,
// against the decision written from the power inequalities: full inversion
// when allowed, P_full < P and P_full < P_odd; otherwise odd inversion when
// P_odd < P; otherwise none.
module tb_module_a;
  int checks = 0, failures = 0, n_half = 0, n_full = 0;
  logic [4:0] nty, nt2, nt4;
  logic fok, half, full;

  module_a dut (.n_ty(nty), .n_t2(nt2), .n_t4ss(nt4), .full_ok(fok), .half_inv(half), .full_inv(full));

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p_odd_gain, p_full_gain;
    logic eh, ef;
    for (int a = 0; a < 32; a++)
      for (int b = 0; b < 32; b++)
        for (int c = 0; c < 32; c++)
          for (int f = 0; f < 2; f++) begin
            nty = 5'(a); nt2 = 5'(b); nt4 = 5'(c); fok = f[0]; #1;
            p_odd_gain  = a - (31 - a);        // Tb - Ta
            p_full_gain = 2 * b - 2 * c;
            ef = fok && (b > c) && (p_full_gain > p_odd_gain);
            eh = !ef && (2 * a > 31);
            checks++;
            if (half !== eh || full !== ef) begin
              failures++;
              if (failures < 10) $display("FAIL ty=%0d t2=%0d t4=%0d ok=%0d", a, b, c, f);
            end
            if (half) n_half++;
            if (full) n_full++;
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
