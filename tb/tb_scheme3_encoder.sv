// tb_scheme3_encoder: checks the scheme III encoder against a reference that
// tries none, odd, even and full inversion and keeps the cheapest in
// coupling cost (earlier on ties). W=6 exhaustively (x[5:4]=0), the default
// W=32 with random words. Checks that the code output matches the code lines
// and that all four actions occur.
module tb_scheme3_encoder;
  import tb_ref_pkg::*;
  import noc_codec_pkg::*;
  int checks = 0, failures = 0;
  int n_act[4] = '{0, 0, 0, 0};

  logic [5:0]  xs, ys, zs;  inv_code_e cs;
  logic [31:0] xb, yb, zb;  inv_code_e cb;

  scheme3_encoder #(.W(6)) dut_s (.x(xs), .y(ys), .z(zs), .code(cs));
  scheme3_encoder          dut_b (.x(xb), .y(yb), .z(zb), .code(cb));

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
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 64; y++) begin
        xs = 6'(x); ys = 6'(y); #1;
        e = enc3(word_t'(xs), word_t'(ys), 6);
        check("w6 z", word_t'(zs), e, word_t'(xs), word_t'(ys));
        check("w6 code", word_t'(cs), word_t'(zs[5:4]), word_t'(xs), word_t'(ys));
        n_act[cs]++;
      end
    yb = '0;
    for (int n = 0; n < 20000; n++) begin
      xb = $urandom & 32'h3fff_ffff;
      if (n % 3 == 0) yb = $urandom;
      #1;
      e = enc3(word_t'(xb), word_t'(yb), 32);
      check("w32 z", word_t'(zb), e, word_t'(xb), word_t'(yb));
      check("w32 code", word_t'(cb), word_t'(zb[31:30]), word_t'(xb), word_t'(yb));
      n_act[cb]++;
      yb = zb;
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (n_act[k] == 0) failures++;
    end
    $display("none=%0d even=%0d odd=%0d full=%0d", n_act[0], n_act[1], n_act[2], n_act[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
