// tb_scheme2_encoder: checks the scheme II encoder against a reference that
// tries odd and full inversion, keeps the larger strictly positive saving
// (odd on a tie), and allows full inversion only where the reference decoder
// recovers the word.
// W=6 is checked exhaustively (all x with x[5]=0, all previous words y),
// the default W=32 with random words. Also checks that the inv line is set by either inversion
// and that all three outcomes occur.
module tb_scheme2_encoder;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0, n_odd = 0, n_none = 0, n_full = 0;

  logic [5:0]  xs, ys, zs;  logic os;
  logic [31:0] xb, yb, zb;  logic ob;

  logic fs, fb;
  scheme2_encoder #(.W(6)) dut_s (.x(xs), .y(ys), .z(zs), .half_inv(os), .full_inv(fs));
  scheme2_encoder          dut_b (.x(xb), .y(yb), .z(zb), .half_inv(ob), .full_inv(fb));

  task automatic check(string what, word_t got, word_t exp, word_t x, word_t y);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s x=%h y=%h got=%h exp=%h", what, x, y, got, exp);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t e;
    for (int x = 0; x < 32; x++)
      for (int y = 0; y < 64; y++) begin
        xs = 6'(x); ys = 6'(y); #1;
        e = enc2(word_t'(xs), word_t'(ys), 6);
        check("w6 z", word_t'(zs), e, word_t'(xs), word_t'(ys));
        check("w6 inv", word_t'(os | fs), word_t'(zs[5]), word_t'(xs), word_t'(ys));
        if (fs) n_full++; else if (os) n_odd++; else n_none++;
      end
    yb = '0;
    for (int n = 0; n < 20000; n++) begin
      xb = $urandom & 32'h7fff_ffff;
      if (n % 3 == 0) yb = $urandom;
      #1;
      e = enc2(word_t'(xb), word_t'(yb), 32);
      check("w32 z", word_t'(zb), e, word_t'(xb), word_t'(yb));
      check("w32 inv", word_t'(ob | fb), word_t'(zb[31]), word_t'(xb), word_t'(yb));
      if (fb) n_full++; else if (ob) n_odd++; else n_none++;
      yb = zb;
    end
    checks++;
    if (n_odd == 0 || n_none == 0 || n_full == 0) failures++;
    $display("odd=%0d full=%0d none=%0d", n_odd, n_full, n_none);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
