// scheme3_encoder: the scheme III encoder (odd, even, full or no inversion).
//
// TY, Te, T2 and T4** flags of every line pair between the current word x
// and the previous link word y are counted, and Module C picks the action
// with the largest coupling saving. The two top lines of x must be 0: line
// W-1 is odd and line W-2 even, so the inversion itself writes the action
// code {z[W-1], z[W-2]} = 10 odd, 01 even, 11 full, 00 none onto the link.
// The payload is therefore W-2 bits.
// Interface: x, y in; z and the action code out. Combinational.
module scheme3_encoder
  import noc_codec_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] z,
  output inv_code_e    code
);
  localparam logic [W-1:0] ODD_M  = ODD_MASK[W-1:0];
  localparam logic [W-1:0] EVEN_M = EVEN_MASK[W-1:0];
  localparam int unsigned  CW     = $clog2(W);

  logic [CW-1:0] n_ty, n_te, n_t2, n_t4ss;

  coupling_counts #(.W(W)) u_counts (
    .x(x), .y(y), .n_ty(n_ty), .n_te(n_te), .n_t2(n_t2), .n_t4ss(n_t4ss)
  );

  module_c #(.W(W)) u_mod_c (
    .n_ty(n_ty), .n_te(n_te), .n_t2(n_t2), .n_t4ss(n_t4ss), .code(code)
  );

  assign z = x ^ (ODD_M & {W{code[1]}}) ^ (EVEN_M & {W{code[0]}});

  initial assert (W % 2 == 0 && W >= 4 && W <= MAX_W)
    else $error("scheme3_encoder: W must be even, 4..%0d", MAX_W);
endmodule
