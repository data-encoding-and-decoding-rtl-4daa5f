// tb_ones_count: N=5 exhaustively and the default N=31 with random inputs,
// against $countones.
module tb_ones_count;
  int checks = 0, failures = 0;
  logic [4:0]  a;  logic [2:0] ca;
  logic [30:0] b;  logic [4:0] cb;

  ones_count #(.N(5)) dut_a (.in(a), .count(ca));
  ones_count          dut_b (.in(b), .count(cb));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      a = 5'(v); #1;
      checks++;
      if (int'(ca) != $countones(a)) begin failures++; $display("FAIL %b -> %0d", a, ca); end
    end
    for (int n = 0; n < 5000; n++) begin
      b = 31'($urandom);
      if (n == 0) b = '1;
      if (n == 1) b = '0;
      #1;
      checks++;
      if (int'(cb) != $countones(b)) begin failures++; $display("FAIL %b -> %0d", b, cb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
