// ni_encoder: the encoding path of a source network interface.
//
// A body flit's payload is converted to Gray code, padded with zero code
// line(s) to the W-line link word, and passed through the scheme encoder E
// together with the word now on the link (the previous encoded flit). The
// result is registered; that register drives the link and is E's "previous"
// input for the next flit. Header flits are not encoded: their payload is
// put on the link as is, with zero code lines, and in_hdr travels on
// link_hdr. The register also updates on header flits, since the link
// carries them too.
//
// SCHEME 1: odd inversion, inv line W-1, payload W-1 bits.
// SCHEME 2: odd or full inversion, inv line W-1, payload W-1 bits.
// SCHEME 3: odd, even or full inversion, code lines W-1:W-2, payload W-2.
//
// Interface: valid/ready in and out, one register stage (1 cycle latency,
// one flit per cycle). The link lines keep their value while no flit is
// sent, so idle cycles add no transitions. Synchronous active-low reset
// clears the link to 0. The Gray stage, the zero code lines and the
// previous-word register follow the scheme's block diagram; the handshake,
// header handling and reset are this design's choices.
module ni_encoder
  import noc_codec_pkg::*;
#(
  parameter int unsigned W      = 32,
  parameter int unsigned SCHEME = 1,
  localparam int unsigned PW    = (SCHEME == 3) ? W - 2 : W - 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic          in_hdr,
  input  logic [PW-1:0] in_data,
  output logic          link_valid,
  input  logic          link_ready,
  output logic          link_hdr,
  output logic [W-1:0]  link_data
);
  logic [PW-1:0] gray;
  logic [W-1:0]  x, z_enc, z_next;

  bin2gray #(.N(PW)) u_gray (.b(in_data), .g(gray));

  assign x = W'(gray);

  if (SCHEME == 1) begin : g_s1
    scheme1_encoder #(.W(W)) u_enc (.x(x), .y(link_data), .z(z_enc), .odd_inv());
  end else if (SCHEME == 2) begin : g_s2
    scheme2_encoder #(.W(W)) u_enc (.x(x), .y(link_data), .z(z_enc), .half_inv(), .full_inv());
  end else begin : g_s3
    scheme3_encoder #(.W(W)) u_enc (.x(x), .y(link_data), .z(z_enc), .code());
  end

  assign z_next   = in_hdr ? W'(in_data) : z_enc;
  assign in_ready = ~link_valid | link_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      link_valid <= 1'b0;
      link_hdr   <= 1'b0;
      link_data  <= '0;
    end else begin
      if (in_ready) link_valid <= in_valid;
      if (in_valid && in_ready) begin
        link_hdr  <= in_hdr;
        link_data <= z_next;
      end
    end
  end

  initial assert (SCHEME >= 1 && SCHEME <= 3)
    else $error("ni_encoder: SCHEME must be 1, 2 or 3");

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    link_valid && !link_ready |=> link_valid && $stable(link_data) && $stable(link_hdr));
endmodule
