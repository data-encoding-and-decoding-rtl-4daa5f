// tb_majority_voter: N=5 and N=4 exhaustively, default N=31 randomly, against
// "more than half the inputs are 1".
module tb_majority_voter;
  int checks = 0, failures = 0;
  logic [4:0]  a;  logic ma;
  logic [3:0]  e;  logic me;
  logic [30:0] b;  logic mb;

  majority_voter #(.N(5)) dut_a (.in(a), .maj(ma));
  majority_voter #(.N(4)) dut_e (.in(e), .maj(me));
  majority_voter          dut_b (.in(b), .maj(mb));

  task automatic check(logic got, logic exp);
    checks++;
    if (got !== exp) failures++;
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      a = 5'(v); e = 4'(v); #1;
      check(ma, 2 * $countones(a) > 5);
      check(me, 2 * $countones(e) > 4);
    end
    for (int n = 0; n < 5000; n++) begin
      b = 31'($urandom);
      if (n % 7 == 0) b = (31'(1) << ($urandom % 31)) - 1;   // sweeps the count
      #1;
      check(mb, 2 * $countones(b) > 31);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
