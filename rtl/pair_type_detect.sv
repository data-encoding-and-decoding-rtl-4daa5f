// pair_type_detect: classifies the transition of one pair of adjacent link
// lines between the previous word (y) and the current word (x).
//
// Transition types of a pair: Type I one line switches, Type II both switch
// in opposite directions, Type III both switch in the same direction,
// Type IV neither switches. Coupling cost is 1 for Type I, 2 for Type II.
// Of the pair, one line has an odd position and one an even position
// (LO_IS_ODD says which). The flags tell how an inversion of the current word
// would change the pair:
//   ty   : odd inversion lowers the pair's cost class, i.e. the pair is
//          Type II, or Type I other than T1* (a Type I where only the even
//          line switches and the two previous bits differ; odd inversion
//          would turn it into Type II). Sum over pairs = Tb.
//   te   : the same for even inversion: Type II, or Type I other than T1**
//          (only the odd line switches, previous bits differ). Sum = Tv.
//   t2   : Type II.
//   t4ss : T4**, a Type IV whose previous bits differ (full inversion would
//          turn it into Type II).
// The flag definitions follow the transition types of the schemes; the
// Boolean form is this design's own. Purely combinational.
module pair_type_detect #(
  parameter bit LO_IS_ODD = 1'b0
) (
  input  logic x_lo,
  input  logic x_hi,
  input  logic y_lo,
  input  logic y_hi,
  output logic ty,
  output logic te,
  output logic t2,
  output logic t4ss
);
  logic xo, xe, yo, ye;
  logic so, se, t1, t1_odd_bad, t1_even_bad;

  always_comb begin
    xo = LO_IS_ODD ? x_lo : x_hi;
    xe = LO_IS_ODD ? x_hi : x_lo;
    yo = LO_IS_ODD ? y_lo : y_hi;
    ye = LO_IS_ODD ? y_hi : y_lo;
    so = xo ^ yo;
    se = xe ^ ye;
    t1 = so ^ se;
    t2 = so & se & (xo ^ xe);
    t1_odd_bad  = se & ~so & (yo ^ ye);  // T1*
    t1_even_bad = so & ~se & (yo ^ ye);  // T1**
    ty   = t2 | (t1 & ~t1_odd_bad);
    te   = t2 | (t1 & ~t1_even_bad);
    t4ss = ~so & ~se & (yo ^ ye);
  end
endmodule
