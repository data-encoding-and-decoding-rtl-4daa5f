// tb_workload_w4: the three schemes on the narrowest link, W=4 lines, the
// bus width of the encoder simulations the schemes were first shown with:
// 3 payload lines plus the inv line for schemes I and II, 2 payload lines
// plus two code lines for scheme III. Same stimulus and checks as
// tb_noc_codec_top (link words, delivered flits, latency, monitor counts,
// saving against the binary stream); on so narrow a link scheme II may
// never find a decodable full inversion, so that is reported, not required.
module tb_workload_w4;
  import noc_codec_pkg::*;
  localparam int unsigned W = 4;
  logic clk = 0, rst_n = 0, stats_clear = 0;
  always #5 clk = ~clk;

  logic iv[3], ir[3], ih[3], ov[3], orr[3], oh[3];
  logic [W-2:0] id1, id2, od1, od2;
  logic [W-3:0] id3, od3;
  logic [W-1:0] lk[3];
  link_stats_t st[3];

  noc_codec_top #(.W(W)) dut (
    .clk, .rst_n, .stats_clear,
    .s1_in_valid(iv[0]), .s1_in_ready(ir[0]), .s1_in_hdr(ih[0]), .s1_in_data(id1),
    .s1_out_valid(ov[0]), .s1_out_ready(orr[0]), .s1_out_hdr(oh[0]), .s1_out_data(od1),
    .s1_link(lk[0]), .s1_stats(st[0]),
    .s2_in_valid(iv[1]), .s2_in_ready(ir[1]), .s2_in_hdr(ih[1]), .s2_in_data(id2),
    .s2_out_valid(ov[1]), .s2_out_ready(orr[1]), .s2_out_hdr(oh[1]), .s2_out_data(od2),
    .s2_link(lk[1]), .s2_stats(st[1]),
    .s3_in_valid(iv[2]), .s3_in_ready(ir[2]), .s3_in_hdr(ih[2]), .s3_in_data(id3),
    .s3_out_valid(ov[2]), .s3_out_ready(orr[2]), .s3_out_hdr(oh[2]), .s3_out_data(od3),
    .s3_link(lk[2]), .s3_stats(st[2]));

  int checks[3], failures[3], n_hdr[3], n_stall[3];
  int n_act[3][4];
  bit done[3];
  longint lc[3], gc[3], bc[3];

  tb_ni_lane #(.W(W), .SCHEME(1), .NFLITS(3000), .PHASE1(300)) u_l1 (.clk, .rst_n,
    .in_valid(iv[0]), .in_ready(ir[0]), .in_hdr(ih[0]), .in_data(id1), .link_data(lk[0]),
    .out_valid(ov[0]), .out_ready(orr[0]), .out_hdr(oh[0]), .out_data(od1),
    .checks(checks[0]), .failures(failures[0]), .done(done[0]), .n_act(n_act[0]),
    .n_hdr(n_hdr[0]), .n_stall(n_stall[0]), .link_cost(lc[0]), .gray_cost(gc[0]), .bin_cost(bc[0]));
  tb_ni_lane #(.W(W), .SCHEME(2), .NFLITS(3000), .PHASE1(300)) u_l2 (.clk, .rst_n,
    .in_valid(iv[1]), .in_ready(ir[1]), .in_hdr(ih[1]), .in_data(id2), .link_data(lk[1]),
    .out_valid(ov[1]), .out_ready(orr[1]), .out_hdr(oh[1]), .out_data(od2),
    .checks(checks[1]), .failures(failures[1]), .done(done[1]), .n_act(n_act[1]),
    .n_hdr(n_hdr[1]), .n_stall(n_stall[1]), .link_cost(lc[1]), .gray_cost(gc[1]), .bin_cost(bc[1]));
  tb_ni_lane #(.W(W), .SCHEME(3), .NFLITS(3000), .PHASE1(300)) u_l3 (.clk, .rst_n,
    .in_valid(iv[2]), .in_ready(ir[2]), .in_hdr(ih[2]), .in_data(id3), .link_data(lk[2]),
    .out_valid(ov[2]), .out_ready(orr[2]), .out_hdr(oh[2]), .out_data(od3),
    .checks(checks[2]), .failures(failures[2]), .done(done[2]), .n_act(n_act[2]),
    .n_hdr(n_hdr[2]), .n_stall(n_stall[2]), .link_cost(lc[2]), .gray_cost(gc[2]), .bin_cost(bc[2]));

  int total_checks = 0, total_fail = 0;

  task automatic need(string what, bit ok);
    total_checks++;
    if (!ok) begin total_fail++; $display("FAIL %s", what); end
  endtask

  task automatic finish();
    for (int s = 0; s < 3; s++) begin
      total_checks += checks[s];
      total_fail += failures[s];
      need($sformatf("scheme %0d headers", s + 1), n_hdr[s] > 0);
      need($sformatf("scheme %0d stalls", s + 1), n_stall[s] > 0);
      need($sformatf("scheme %0d no inversion", s + 1), n_act[s][0] > 0);
      need($sformatf("scheme %0d odd inversion", s + 1), n_act[s][2] > 0);
      if (s == 2) need("scheme 3 full inversion", n_act[s][3] > 0);
      if (s == 2) need("scheme 3 even inversion", n_act[s][1] > 0);
      need($sformatf("scheme %0d monitor coupling", s + 1), longint'(st[s].coupling) == lc[s]);
      need($sformatf("scheme %0d monitor t1+2t2", s + 1),
           longint'(st[s].coupling) == longint'(st[s].t1) + 2 * longint'(st[s].t2));
      need($sformatf("scheme %0d saves against binary", s + 1), lc[s] < bc[s]);
      $display("scheme %0d: none=%0d even=%0d odd=%0d full=%0d hdr=%0d stalls=%0d",
               s + 1, n_act[s][0], n_act[s][1], n_act[s][2], n_act[s][3], n_hdr[s], n_stall[s]);
      $display("  coupling T1+2T2: coded %0d, uncoded Gray %0d, uncoded binary %0d; self 0->1: %0d",
               lc[s], gc[s], bc[s], st[s].t01);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    total_fail++;
    finish();
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_fail);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (done[0] && done[1] && done[2]);
    repeat (3) @(posedge clk);
    finish();
    stats_clear <= 1;
    @(posedge clk);
    stats_clear <= 0;
    @(negedge clk);
    for (int s = 0; s < 3; s++) need("monitor clear", st[s].coupling == 0 && st[s].t4 == 0);
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_fail);
    $finish;
  end
endmodule
