// ones_count: the "Ones" block of the encoders. Counts how many of its N
// inputs are 1. The output has $clog2(N+1) bits, i.e. log2(w) bits for the
// N = w-1 pair flags of a w-line link. Written as an adder loop; the tool
// builds the adder tree. Purely combinational.
module ones_count #(
  parameter int unsigned N = 31
) (
  input  logic [N-1:0]             in,
  output logic [$clog2(N+1)-1:0]   count
);
  always_comb begin
    count = '0;
    for (int i = 0; i < N; i++) count = count + ($clog2(N+1))'(in[i]);
  end
endmodule
