// tb_ni_codec: one ni_encoder feeding one ni_decoder for each scheme at the
// default width W=32, driven and checked by tb_ni_lane: link words against
// the reference encoders, delivered flits against the sent ones, 2-cycle
// latency, back-pressure. Fails if any scheme never used one of its
// inversions, never sent a header or never stalled.
module tb_ni_codec;
  localparam int unsigned W = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks[3], failures[3], n_hdr[3], n_stall[3];
  int n_act[3][4];
  bit done[3];
  longint lc[3], gc[3], bc[3];
  int total_checks, total_fail;

  for (genvar s = 1; s <= 3; s++) begin : g_lane
    localparam int unsigned PW = (s == 3) ? W - 2 : W - 1;
    logic iv, ir, ih, lv, lr, lh, ov, orr, oh;
    logic [PW-1:0] id, od;
    logic [W-1:0] ld;

    ni_encoder #(.W(W), .SCHEME(s)) u_enc (.clk, .rst_n, .in_valid(iv), .in_ready(ir),
      .in_hdr(ih), .in_data(id), .link_valid(lv), .link_ready(lr), .link_hdr(lh), .link_data(ld));
    ni_decoder #(.W(W), .SCHEME(s)) u_dec (.clk, .rst_n, .link_valid(lv), .link_ready(lr),
      .link_hdr(lh), .link_data(ld), .out_valid(ov), .out_ready(orr), .out_hdr(oh), .out_data(od));
    tb_ni_lane #(.W(W), .SCHEME(s), .NFLITS(3000), .PHASE1(300)) u_lane (.clk, .rst_n,
      .in_valid(iv), .in_ready(ir), .in_hdr(ih), .in_data(id), .link_data(ld),
      .out_valid(ov), .out_ready(orr), .out_hdr(oh), .out_data(od),
      .checks(checks[s-1]), .failures(failures[s-1]), .done(done[s-1]), .n_act(n_act[s-1]),
      .n_hdr(n_hdr[s-1]), .n_stall(n_stall[s-1]), .link_cost(lc[s-1]), .gray_cost(gc[s-1]),
      .bin_cost(bc[s-1]));
  end

  task automatic finish();
    total_checks = 0; total_fail = 0;
    for (int s = 0; s < 3; s++) begin
      total_checks += checks[s]; total_fail += failures[s];
      total_checks += 3;
      if (n_hdr[s] == 0) total_fail++;
      if (n_stall[s] == 0) total_fail++;
      if (n_act[s][0] == 0 || n_act[s][2] == 0) total_fail++;
      if (s == 1) begin total_checks++; if (n_act[s][3] == 0) total_fail++; end
      if (s == 2) begin total_checks += 2; if (n_act[s][1] == 0) total_fail++; if (n_act[s][3] == 0) total_fail++; end
      $display("scheme %0d: none=%0d even=%0d odd=%0d full=%0d hdr=%0d stalls=%0d coupling coded=%0d gray=%0d binary=%0d",
               s + 1, n_act[s][0], n_act[s][1], n_act[s][2], n_act[s][3], n_hdr[s], n_stall[s], lc[s], gc[s], bc[s]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_fail);
    $finish;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    for (int s = 0; s < 3; s++) failures[s]++;
    finish();
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (done[0] && done[1] && done[2]);
    repeat (2) @(posedge clk);
    finish();
  end
endmodule
