// tb_module_c: random and corner combinations of the four counts at W=32,
// against the action that minimises the coupling cost, ties kept in the
// order none, odd, even, full.
module tb_module_c;
  import noc_codec_pkg::*;
  int checks = 0, failures = 0;
  logic [4:0] nty, nte, nt2, nt4;
  inv_code_e code;

  module_c dut (.n_ty(nty), .n_te(nte), .n_t2(nt2), .n_t4ss(nt4), .code(code));

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s[4], best;
    inv_code_e exp;
    for (int n = 0; n < 100000; n++) begin
      nty = 5'($urandom); nte = 5'($urandom); nt2 = 5'($urandom); nt4 = 5'($urandom);
      if (n % 4 == 0) begin nte = nty; end                 // odd/even tie
      if (n % 5 == 0) begin nt2 = 5'(int'(nt4) + int'(nty) - 15); end
      #1;
      s[0] = 0;
      s[1] = 2 * int'(nty) - 31;
      s[2] = 2 * int'(nte) - 31;
      s[3] = 2 * (int'(nt2) - int'(nt4));
      exp = INV_NONE; best = 0;
      if (s[1] > best) begin exp = INV_ODD;  best = s[1]; end
      if (s[2] > best) begin exp = INV_EVEN; best = s[2]; end
      if (s[3] > best) begin exp = INV_FULL; best = s[3]; end
      checks++;
      if (code !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL %0d %0d %0d %0d got %0d exp %0d", nty, nte, nt2, nt4, code, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
