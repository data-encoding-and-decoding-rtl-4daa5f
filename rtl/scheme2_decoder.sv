// scheme2_decoder: the scheme II decoder.
//
// TY blocks compare the received word z with the previous received word r,
// and a majority voter counts them. With the inv line z[W-1] high the word
// was inverted: majority 0 means odd (half) inversion, majority 1 full
// inversion (see scheme2_encoder for why this holds). The XOR stage undoes
// the inversion.
// Interface: z, r in; x (x[W-1] = 0), half_inv, full_inv out. Combinational;
// the caller keeps r, the last word received on the link.
module scheme2_decoder
  import noc_codec_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] z,
  input  logic [W-1:0] r,
  output logic [W-1:0] x,
  output logic         half_inv,
  output logic         full_inv
);
  localparam logic [W-1:0] ODD_M = ODD_MASK[W-1:0];

  logic [W-2:0] ty;
  logic         maj;

  for (genvar i = 0; i < W-1; i++) begin : g_ty
    pair_type_detect #(.LO_IS_ODD(i % 2 == 1)) u_ty (
      .x_lo(z[i]), .x_hi(z[i+1]), .y_lo(r[i]), .y_hi(r[i+1]),
      .ty(ty[i]), .te(), .t2(), .t4ss()
    );
  end
  majority_voter #(.N(W-1)) u_maj (.in(ty), .maj(maj));

  assign half_inv = z[W-1] & ~maj;
  assign full_inv = z[W-1] &  maj;
  assign x = full_inv ? ~z : (z ^ (ODD_M & {W{half_inv}}));
endmodule
