// gray2bin: reflected Gray code back to binary. Bit i of the result is the
// XOR of Gray bits i..N-1, formed from the top bit down. Combinational.
module gray2bin #(
  parameter int unsigned N = 31
) (
  input  logic [N-1:0] g,
  output logic [N-1:0] b
);
  always_comb begin
    b[N-1] = g[N-1];
    for (int i = int'(N) - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
  end
endmodule
