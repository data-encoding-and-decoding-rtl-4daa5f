// noc_codec_top: end-to-end low-power link coding for a network on chip.
//
// Three variants of the network-interface coding stand side by side, each
// with its own flit ports: scheme I (odd inversion), scheme II (odd or full
// inversion on one inv line) and scheme III (odd, even or full inversion on
// two code lines). In each, a source NI encoder drives a W-line link and a
// destination NI decoder receives it; the routers between them are left out
// because the coding is end to end and does not change them, and every link
// on the route would see the same words. A link_monitor on each link counts
// self and coupling transitions for the power model.
//
// Ports per scheme N: sN_in_* (valid/ready/hdr/data, source side),
// sN_out_* (destination side), sN_link (the coded link lines, for
// observation) and sN_stats (transition counts). stats_clear zeroes all
// monitors. Latency from sN_in to sN_out is 2 cycles, one flit per cycle.
module noc_codec_top
  import noc_codec_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          stats_clear,

  input  logic          s1_in_valid,
  output logic          s1_in_ready,
  input  logic          s1_in_hdr,
  input  logic [W-2:0]  s1_in_data,
  output logic          s1_out_valid,
  input  logic          s1_out_ready,
  output logic          s1_out_hdr,
  output logic [W-2:0]  s1_out_data,
  output logic [W-1:0]  s1_link,
  output link_stats_t   s1_stats,

  input  logic          s2_in_valid,
  output logic          s2_in_ready,
  input  logic          s2_in_hdr,
  input  logic [W-2:0]  s2_in_data,
  output logic          s2_out_valid,
  input  logic          s2_out_ready,
  output logic          s2_out_hdr,
  output logic [W-2:0]  s2_out_data,
  output logic [W-1:0]  s2_link,
  output link_stats_t   s2_stats,

  input  logic          s3_in_valid,
  output logic          s3_in_ready,
  input  logic          s3_in_hdr,
  input  logic [W-3:0]  s3_in_data,
  output logic          s3_out_valid,
  input  logic          s3_out_ready,
  output logic          s3_out_hdr,
  output logic [W-3:0]  s3_out_data,
  output logic [W-1:0]  s3_link,
  output link_stats_t   s3_stats
);
  logic s1_lv, s1_lr, s1_lh;
  logic s2_lv, s2_lr, s2_lh;
  logic s3_lv, s3_lr, s3_lh;

  // Scheme I
  ni_encoder #(.W(W), .SCHEME(1)) u_enc1 (
    .clk, .rst_n, .in_valid(s1_in_valid), .in_ready(s1_in_ready), .in_hdr(s1_in_hdr),
    .in_data(s1_in_data), .link_valid(s1_lv), .link_ready(s1_lr), .link_hdr(s1_lh),
    .link_data(s1_link));
  ni_decoder #(.W(W), .SCHEME(1)) u_dec1 (
    .clk, .rst_n, .link_valid(s1_lv), .link_ready(s1_lr), .link_hdr(s1_lh),
    .link_data(s1_link), .out_valid(s1_out_valid), .out_ready(s1_out_ready),
    .out_hdr(s1_out_hdr), .out_data(s1_out_data));
  link_monitor #(.W(W)) u_mon1 (.clk, .rst_n, .clear(stats_clear), .link(s1_link), .stats(s1_stats));

  // Scheme II
  ni_encoder #(.W(W), .SCHEME(2)) u_enc2 (
    .clk, .rst_n, .in_valid(s2_in_valid), .in_ready(s2_in_ready), .in_hdr(s2_in_hdr),
    .in_data(s2_in_data), .link_valid(s2_lv), .link_ready(s2_lr), .link_hdr(s2_lh),
    .link_data(s2_link));
  ni_decoder #(.W(W), .SCHEME(2)) u_dec2 (
    .clk, .rst_n, .link_valid(s2_lv), .link_ready(s2_lr), .link_hdr(s2_lh),
    .link_data(s2_link), .out_valid(s2_out_valid), .out_ready(s2_out_ready),
    .out_hdr(s2_out_hdr), .out_data(s2_out_data));
  link_monitor #(.W(W)) u_mon2 (.clk, .rst_n, .clear(stats_clear), .link(s2_link), .stats(s2_stats));

  // Scheme III
  ni_encoder #(.W(W), .SCHEME(3)) u_enc3 (
    .clk, .rst_n, .in_valid(s3_in_valid), .in_ready(s3_in_ready), .in_hdr(s3_in_hdr),
    .in_data(s3_in_data), .link_valid(s3_lv), .link_ready(s3_lr), .link_hdr(s3_lh),
    .link_data(s3_link));
  ni_decoder #(.W(W), .SCHEME(3)) u_dec3 (
    .clk, .rst_n, .link_valid(s3_lv), .link_ready(s3_lr), .link_hdr(s3_lh),
    .link_data(s3_link), .out_valid(s3_out_valid), .out_ready(s3_out_ready),
    .out_hdr(s3_out_hdr), .out_data(s3_out_data));
  link_monitor #(.W(W)) u_mon3 (.clk, .rst_n, .clear(stats_clear), .link(s3_link), .stats(s3_stats));
endmodule
