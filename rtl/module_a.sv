// module_a: decision unit of the scheme II encoder.
//
// From the pair counts it forms the coupling savings of the two inversions
// (coupling cost = T1 + 2*T2 summed over the w-1 line pairs):
//   odd (half) inversion : S_odd  = 2*Tb - (w-1)
//   full inversion       : S_full = 2*(T2 - T4**)
// and picks the larger positive saving; on equal savings the odd inversion
// is kept, and with no positive saving nothing is inverted. These are the
// conditions P_odd < P, P_full < P and P_odd vs. P_full of the scheme.
// full_ok (this design's addition) vetoes a full inversion that the
// single-inv-bit decoder could not tell apart from an odd one; the
// encoder then takes the odd inversion if that saves anything.
// half_inv and full_inv are never both 1. Combinational.
module module_a #(
  parameter int unsigned W = 32
) (
  input  logic [$clog2(W)-1:0] n_ty,
  input  logic [$clog2(W)-1:0] n_t2,
  input  logic [$clog2(W)-1:0] n_t4ss,
  input  logic                 full_ok,
  output logic                 half_inv,
  output logic                 full_inv
);
  int s_odd, s_full;

  always_comb begin
    s_odd  = 2 * int'(n_ty) - int'(W - 1);
    s_full = 2 * (int'(n_t2) - int'(n_t4ss));
    half_inv = 1'b0;
    full_inv = 1'b0;
    if (full_ok && s_full > 0 && s_full > s_odd) full_inv = 1'b1;
    else if (s_odd > 0)                          half_inv = 1'b1;
  end
endmodule
