// scheme1_decoder: the scheme I decoder. When the inv line z[W-1] is 1 the
// odd positions are inverted back; that also returns the inv line to 0.
// Interface: z (received word) in, x (decoded word, x[W-1] = 0) out.
// Combinational.
module scheme1_decoder
  import noc_codec_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] z,
  output logic [W-1:0] x
);
  localparam logic [W-1:0] ODD_M = ODD_MASK[W-1:0];

  assign x = z ^ (ODD_M & {W{z[W-1]}});
endmodule
