// scheme2_encoder: the scheme II encoder (odd "half" inversion, full
// inversion or none, signalled by one inv line).
//
// TY, T2 and T4** flags of every line pair between the current word x and
// the previous link word y are counted (coupling_counts) and Module A picks
// the action that saves most coupling cost. Both inversions flip the inv
// line W-1 (it is odd and enters as 0), so the decoder separates them by a
// majority vote of TY between the received and previous words: an odd-
// inverted word always votes 0. A fully inverted word must vote 1 to be
// decodable; a second TY array and majority voter check that on x ^ full
// mask (full_ok), and Module A does not pick full inversion otherwise. That
// check is this design's own addition. It equals the condition that even
// inversion would save more than full inversion; scheme II has no even
// inversion, so it is evaluated with TY logic. The shared counting block
// also produces a Te count, which is unused here and removed in synthesis.
// Interface: x (x[W-1] = 0), y in; z, half_inv, full_inv out. Combinational.
module scheme2_encoder
  import noc_codec_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] z,
  output logic         half_inv,
  output logic         full_inv
);
  localparam logic [W-1:0] ODD_M = ODD_MASK[W-1:0];
  localparam int unsigned  CW    = $clog2(W);

  logic [CW-1:0] n_ty, n_te, n_t2, n_t4ss;
  logic [W-1:0]  x_full;
  logic [W-2:0]  ty_full;
  logic          full_ok;

  coupling_counts #(.W(W)) u_counts (
    .x(x), .y(y), .n_ty(n_ty), .n_te(n_te), .n_t2(n_t2), .n_t4ss(n_t4ss)
  );

  // Decodability check of the full inversion: the decoder's own vote.
  assign x_full = ~x;
  for (genvar i = 0; i < W-1; i++) begin : g_chk
    pair_type_detect #(.LO_IS_ODD(i % 2 == 1)) u_ty (
      .x_lo(x_full[i]), .x_hi(x_full[i+1]), .y_lo(y[i]), .y_hi(y[i+1]),
      .ty(ty_full[i]), .te(), .t2(), .t4ss()
    );
  end
  majority_voter #(.N(W-1)) u_chk (.in(ty_full), .maj(full_ok));

  module_a #(.W(W)) u_mod_a (
    .n_ty(n_ty), .n_t2(n_t2), .n_t4ss(n_t4ss), .full_ok(full_ok),
    .half_inv(half_inv), .full_inv(full_inv)
  );

  assign z = full_inv ? x_full : (x ^ (ODD_M & {W{half_inv}}));

  initial assert (W % 2 == 0 && W >= 4 && W <= MAX_W)
    else $error("scheme2_encoder: W must be even, 4..%0d", MAX_W);
endmodule
