// tb_scheme2_decoder: exhaustive at W=6 against the reference decoder (all
// received words z and previous words r), and a W=32 round trip through the
// reference scheme II encoder, which must return the original word. Counts
// that odd and full inversions were both undone.
module tb_scheme2_decoder;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0, n_half = 0, n_full = 0;

  logic [5:0]  zs, rs, xs;  logic hs, fs;
  logic [31:0] zb, rb, xb;  logic hb, fb;

  scheme2_decoder #(.W(6)) dut_s (.z(zs), .r(rs), .x(xs), .half_inv(hs), .full_inv(fs));
  scheme2_decoder          dut_b (.z(zb), .r(rb), .x(xb), .half_inv(hb), .full_inv(fb));

  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t x, y;
    for (int z = 0; z < 64; z++)
      for (int r = 0; r < 64; r++) begin
        zs = 6'(z); rs = 6'(r); #1;
        check("w6 any", word_t'(xs), dec2(word_t'(zs), word_t'(rs), 6));
      end
    y = '0;
    for (int n = 0; n < 20000; n++) begin
      x = rand_word(31);
      rb = 32'(y);
      zb = 32'(enc2(x, y, 32)); #1;
      if (hb) n_half++;
      if (fb) n_full++;
      check("w32 round trip", word_t'(xb), x);
      y = word_t'(zb);
    end
    checks += 2;
    if (n_half == 0) failures++;
    if (n_full == 0) failures++;
    $display("half=%0d full=%0d", n_half, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
