// majority_voter: outputs 1 when strictly more than half of its N inputs are
// 1 (count > N/2). Used by the scheme I encoder on the TY flags, where it
// evaluates condition Tb > (w-1)/2, and by the scheme II decoder. N = w-1 is
// odd for an even link width, so there are no ties. Combinational.
module majority_voter #(
  parameter int unsigned N = 31
) (
  input  logic [N-1:0] in,
  output logic         maj
);
  localparam int unsigned CW = $clog2(N+1);
  logic [CW-1:0] count;

  ones_count #(.N(N)) u_count (.in(in), .count(count));

  assign maj = ({1'b0, count} << 1) > (CW+1)'(N);
endmodule
