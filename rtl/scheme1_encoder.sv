// scheme1_encoder: the scheme I encoder E (odd inversion or none).
//
// One TY block per adjacent line pair compares the current word x with the
// previous word on the link y. A majority voter checks Tb > (w-1)/2, the
// condition under which odd-inverting x lowers the coupling cost
// T1 + 2*T2 of the transition. The XOR stage then inverts every odd
// position. x[W-1] must be 0: line W-1 is odd (W even) and becomes the inv
// line, 1 exactly when the word was odd-inverted.
// Interface: x, y in; z (the word to put on the link) and odd_inv out.
// Combinational; the caller registers z, which becomes the next y.
module scheme1_encoder
  import noc_codec_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] z,
  output logic         odd_inv
);
  localparam logic [W-1:0] ODD_M = ODD_MASK[W-1:0];

  logic [W-2:0] ty;

  for (genvar i = 0; i < W-1; i++) begin : g_ty
    pair_type_detect #(.LO_IS_ODD(i % 2 == 1)) u_ty (
      .x_lo(x[i]), .x_hi(x[i+1]), .y_lo(y[i]), .y_hi(y[i+1]),
      .ty(ty[i]), .te(), .t2(), .t4ss()
    );
  end

  majority_voter #(.N(W-1)) u_maj (.in(ty), .maj(odd_inv));

  assign z = x ^ (ODD_M & {W{odd_inv}});

  initial assert (W % 2 == 0 && W >= 4 && W <= MAX_W)
    else $error("scheme1_encoder: W must be even, 4..%0d", MAX_W);
endmodule
