// coupling_counts: one pair_type_detect per adjacent line pair (w-1 pairs for
// a w-line word) and one ones_count per flag type. Gives the counts Tb (TY),
// Tv (Te), T2 and T4** between the current word x and the previous link word
// y. These counts feed Module A (scheme II) and Module C (scheme III).
// Combinational.
module coupling_counts #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0]          x,
  input  logic [W-1:0]          y,
  output logic [$clog2(W)-1:0]  n_ty,
  output logic [$clog2(W)-1:0]  n_te,
  output logic [$clog2(W)-1:0]  n_t2,
  output logic [$clog2(W)-1:0]  n_t4ss
);
  logic [W-2:0] ty, te, t2, t4ss;

  for (genvar i = 0; i < W-1; i++) begin : g_pair
    pair_type_detect #(.LO_IS_ODD(i % 2 == 1)) u_pair (
      .x_lo(x[i]), .x_hi(x[i+1]), .y_lo(y[i]), .y_hi(y[i+1]),
      .ty(ty[i]), .te(te[i]), .t2(t2[i]), .t4ss(t4ss[i])
    );
  end

  ones_count #(.N(W-1)) u_ty (.in(ty),   .count(n_ty));
  ones_count #(.N(W-1)) u_te (.in(te),   .count(n_te));
  ones_count #(.N(W-1)) u_t2 (.in(t2),   .count(n_t2));
  ones_count #(.N(W-1)) u_t4 (.in(t4ss), .count(n_t4ss));
endmodule
