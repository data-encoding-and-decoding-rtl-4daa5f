// tb_scheme3_decoder: every W=6 word against the reference decoder, and a
// W=32 round trip through the reference scheme III encoder, which must
// return the original word. Counts that each of the four codes occurred.
module tb_scheme3_decoder;
  import tb_ref_pkg::*;
  import noc_codec_pkg::*;
  int checks = 0, failures = 0;
  int n_act[4] = '{0, 0, 0, 0};

  logic [5:0]  zs, xs;  inv_code_e cs;
  logic [31:0] zb, xb;  inv_code_e cb;

  scheme3_decoder #(.W(6)) dut_s (.z(zs), .x(xs), .code(cs));
  scheme3_decoder          dut_b (.z(zb), .x(xb), .code(cb));

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
      check("w6 any", word_t'(xs), dec3(word_t'(zs), 6));
      check("w6 code", word_t'(cs), word_t'(zs[5:4]));
    end
    y = '0;
    for (int n = 0; n < 20000; n++) begin
      x = rand_word(30);
      zb = 32'(enc3(x, y, 32)); #1;
      n_act[cb]++;
      check("w32 round trip", word_t'(xb), x);
      y = word_t'(zb);
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (n_act[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
