// scheme3_decoder: the scheme III decoder. The two top lines carry the
// action code {z[W-1], z[W-2]} (10 odd, 01 even, 11 full, 00 none); the
// decoder inverts the same positions back, which also clears the code lines.
// Interface: z in; x (x[W-1:W-2] = 0) and the decoded code out.
// Combinational.
module scheme3_decoder
  import noc_codec_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] z,
  output logic [W-1:0] x,
  output inv_code_e    code
);
  localparam logic [W-1:0] ODD_M  = ODD_MASK[W-1:0];
  localparam logic [W-1:0] EVEN_M = EVEN_MASK[W-1:0];

  assign code = inv_code_e'(z[W-1:W-2]);
  assign x = z ^ (ODD_M & {W{z[W-1]}}) ^ (EVEN_M & {W{z[W-2]}});
endmodule
