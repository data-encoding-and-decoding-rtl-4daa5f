// ni_decoder: the decoding path of a destination network interface.
//
// Each flit word received from the link goes through the scheme decoder D
// together with the previous received word (scheme II needs it to tell odd
// from full inversion), the code line(s) are dropped and the payload is
// converted from Gray code back to binary. Header flits (link_hdr) are
// passed through unchanged. The previous-word register updates on every
// received flit, header or body, so it always equals the word the encoder
// compared against.
//
// SCHEME 1/2: payload W-1 bits; SCHEME 3: payload W-2 bits.
// Interface: valid/ready in and out, one register stage (1 cycle latency,
// one flit per cycle). Synchronous active-low reset clears the previous
// word to 0, matching the encoder's reset link value. Handshake, header
// handling and reset are this design's choices.
module ni_decoder
  import noc_codec_pkg::*;
#(
  parameter int unsigned W      = 32,
  parameter int unsigned SCHEME = 1,
  localparam int unsigned PW    = (SCHEME == 3) ? W - 2 : W - 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          link_valid,
  output logic          link_ready,
  input  logic          link_hdr,
  input  logic [W-1:0]  link_data,
  output logic          out_valid,
  input  logic          out_ready,
  output logic          out_hdr,
  output logic [PW-1:0] out_data
);
  logic [W-1:0]  prev_rx, x_dec;
  logic [PW-1:0] bin, data_next;

  if (SCHEME == 1) begin : g_s1
    scheme1_decoder #(.W(W)) u_dec (.z(link_data), .x(x_dec));
  end else if (SCHEME == 2) begin : g_s2
    scheme2_decoder #(.W(W)) u_dec (.z(link_data), .r(prev_rx), .x(x_dec), .half_inv(), .full_inv());
  end else begin : g_s3
    scheme3_decoder #(.W(W)) u_dec (.z(link_data), .x(x_dec), .code());
  end

  gray2bin #(.N(PW)) u_bin (.g(x_dec[PW-1:0]), .b(bin));

  assign data_next  = link_hdr ? link_data[PW-1:0] : bin;
  assign link_ready = ~out_valid | out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_hdr   <= 1'b0;
      out_data  <= '0;
      prev_rx   <= '0;
    end else begin
      if (link_ready) out_valid <= link_valid;
      if (link_valid && link_ready) begin
        out_hdr  <= link_hdr;
        out_data <= data_next;
        prev_rx  <= link_data;
      end
    end
  end

  initial assert (SCHEME >= 1 && SCHEME <= 3)
    else $error("ni_decoder: SCHEME must be 1, 2 or 3");

  // Body words must arrive with the code line(s) undoing to 0.
  a_code: assert property (@(posedge clk) disable iff (!rst_n)
    link_valid && !link_hdr |-> x_dec[W-1:PW] == '0);
endmodule
