// bin2gray: binary to reflected Gray code, g = b ^ (b >> 1). Applied to the
// flit payload before the scheme encoder so that counting-like payloads
// change few lines from flit to flit. Combinational.
module bin2gray #(
  parameter int unsigned N = 31
) (
  input  logic [N-1:0] b,
  output logic [N-1:0] g
);
  assign g = b ^ (b >> 1);
endmodule
