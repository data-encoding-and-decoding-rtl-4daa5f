// module_c: decision unit of the scheme III encoder.
//
// Savings of each action in coupling cost (T1 + 2*T2 over the w-1 pairs):
//   odd  : 2*Tb - (w-1)     even : 2*Tv - (w-1)     full : 2*(T2 - T4**)
// The action with the largest positive saving is chosen; equal savings keep
// the earlier of none, odd, even, full. The output is the two-bit action
// code 10 odd, 01 even, 11 full, 00 none. Combinational.
module module_c
  import noc_codec_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic [$clog2(W)-1:0] n_ty,
  input  logic [$clog2(W)-1:0] n_te,
  input  logic [$clog2(W)-1:0] n_t2,
  input  logic [$clog2(W)-1:0] n_t4ss,
  output inv_code_e            code
);
  int s_odd, s_even, s_full, best;

  always_comb begin
    s_odd  = 2 * int'(n_ty) - int'(W - 1);
    s_even = 2 * int'(n_te) - int'(W - 1);
    s_full = 2 * (int'(n_t2) - int'(n_t4ss));
    code = INV_NONE;
    best = 0;
    if (s_odd > best)  begin code = INV_ODD;  best = s_odd;  end
    if (s_even > best) begin code = INV_EVEN; best = s_even; end
    if (s_full > best) begin code = INV_FULL; best = s_full; end
  end
endmodule
