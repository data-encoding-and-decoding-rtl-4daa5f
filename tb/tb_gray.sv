// tb_gray: bin2gray and gray2bin. At N=4 exhaustively: consecutive numbers
// give Gray codes one bit apart, all codes distinct, gray2bin inverts. At
// the default N=31 with random values: g = b ^ (b >> 1) and the round trip.
module tb_gray;
  int checks = 0, failures = 0;
  logic [3:0]  bs, gs, rs, gprev;
  logic [30:0] bb, gb, rb;
  bit seen[16];

  bin2gray #(.N(4)) u_g4 (.b(bs), .g(gs));
  gray2bin #(.N(4)) u_b4 (.g(gs), .b(rs));
  bin2gray          u_g  (.b(bb), .g(gb));
  gray2bin          u_b  (.g(gb), .b(rb));

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      bs = 4'(v); #1;
      if (v > 0) check("one bit apart", $countones(gs ^ gprev) == 1);
      check("distinct", !seen[gs]);
      seen[gs] = 1'b1;
      check("inverse n4", rs == bs);
      gprev = gs;
    end
    check("known code 4", gs == 4'b1000);
    for (int n = 0; n < 5000; n++) begin
      bb = 31'($urandom); #1;
      check("g31", gb == (bb ^ (bb >> 1)));
      check("inverse n31", rb == bb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
