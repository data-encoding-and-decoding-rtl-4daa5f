// tb_link_monitor: drives random words (and runs of equal words) onto the
// monitored lines, one per clock, and compares the accumulated counters with
// counts computed in the testbench from the same words. Also checks clear.
module tb_link_monitor;
  import tb_ref_pkg::*;
  import noc_codec_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [31:0] link = '0;
  link_stats_t st;
  longint e01, e1, e2, e3, e4, ecp;

  link_monitor dut (.clk, .rst_n, .clear, .link, .stats(st));

  always #5 clk = ~clk;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0d exp %0d", what, got, exp); end
  endtask

  task automatic account(logic [31:0] p, logic [31:0] c);
    e01 += rises(word_t'(p), word_t'(c), 32);
    ecp += cost(word_t'(p), word_t'(c), 32);
    for (int i = 0; i < 31; i++) begin
      bit a = p[i] != c[i], b = p[i+1] != c[i+1];
      if (a != b) e1++;
      else if (!a) e4++;
      else if (c[i] != c[i+1]) e2++;
      else e3++;
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] prev;
    e01 = 0; e1 = 0; e2 = 0; e3 = 0; e4 = 0; ecp = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);             // first counted clock: 0 -> 0
    account('0, '0);
    prev = '0;
    for (int n = 0; n < 2000; n++) begin
      link <= (n % 5 == 0) ? prev : $urandom;
      @(posedge clk);
      account(prev, link);
      prev = link;
    end
    #1;
    check("t01", longint'(st.t01), e01);
    check("t1", longint'(st.t1), e1);
    check("t2", longint'(st.t2), e2);
    check("t3", longint'(st.t3), e3);
    check("t4", longint'(st.t4), e4);
    check("coupling", longint'(st.coupling), ecp);
    check("coupling = t1 + 2 t2", longint'(st.coupling), e1 + 2 * e2);
    clear <= 1;
    @(posedge clk);
    clear <= 0;
    #1;
    check("clear", longint'(st.coupling) + longint'(st.t1), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
