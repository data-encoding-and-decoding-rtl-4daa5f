// tb_scheme1_decoder: round trip through the reference scheme I encoder
// (random words, W=32 and W=6) must return the original word, and any
// received word must decode as the reference decoder does.
module tb_scheme1_decoder;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0, n_inv = 0;

  logic [5:0]  zs, xs;
  logic [31:0] zb, xb;

  scheme1_decoder #(.W(6)) dut_s (.z(zs), .x(xs));
  scheme1_decoder          dut_b (.z(zb), .x(xb));

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
    for (int z = 0; z < 64; z++) begin
      zs = 6'(z); #1;
      check("w6 any", word_t'(xs), dec1(word_t'(zs), 6));
    end
    y = '0;
    for (int n = 0; n < 20000; n++) begin
      x = rand_word(31);
      zb = 32'(enc1(x, y, 32)); #1;
      if (zb[31]) n_inv++;
      check("w32 round trip", word_t'(xb), x);
      y = word_t'(zb);
    end
    checks++;
    if (n_inv == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
