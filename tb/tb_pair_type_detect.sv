// tb_pair_type_detect: all 16 input combinations, for both orders of the
// odd/even line, against flags derived from the pair's coupling cost:
// ty (te) is 1 exactly when inverting the odd (even) line of the current
// bits lowers the cost, t2 when the cost is 2, t4ss when nothing switches
// and a full inversion would cost 2.
module tb_pair_type_detect;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;

  logic xl, xh, yl, yh;
  logic ty0, te0, t20, t40, ty1, te1, t21, t41;

  pair_type_detect #(.LO_IS_ODD(1'b0)) dut0 (.x_lo(xl), .x_hi(xh), .y_lo(yl), .y_hi(yh),
    .ty(ty0), .te(te0), .t2(t20), .t4ss(t40));
  pair_type_detect #(.LO_IS_ODD(1'b1)) dut1 (.x_lo(xl), .x_hi(xh), .y_lo(yl), .y_hi(yh),
    .ty(ty1), .te(te1), .t2(t21), .t4ss(t41));

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s x=%b%b y=%b%b got=%b exp=%b", what, xh, xl, yh, yl, got, exp);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t x, y, lo_m, hi_m;
    int c;
    lo_m = word_t'(1); hi_m = word_t'(2);
    for (int v = 0; v < 16; v++) begin
      {xh, xl, yh, yl} = 4'(v); #1;
      x = word_t'({xh, xl}); y = word_t'({yh, yl});
      c = cost(y, x, 2);
      // lo line is even in dut0, odd in dut1
      check("ty0", ty0, cost(y, x ^ hi_m, 2) < c);
      check("te0", te0, cost(y, x ^ lo_m, 2) < c);
      check("ty1", ty1, cost(y, x ^ lo_m, 2) < c);
      check("te1", te1, cost(y, x ^ hi_m, 2) < c);
      check("t2_0", t20, c == 2);
      check("t2_1", t21, c == 2);
      check("t4_0", t40, x == y && cost(y, x ^ 3, 2) == 2);
      check("t4_1", t41, x == y && cost(y, x ^ 3, 2) == 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
