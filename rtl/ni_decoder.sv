// Receiving network interface with the link decoder.
//
// Undoes the inversion the sending interface applied, as the control lines
// of the link say (decoder_s1 for Scheme I, decoder_s23 for Schemes II and
// III), and registers the payload. A header or tail flit arrives with its
// control lines at zero and passes unchanged.
//
// Interface: link and link_valid are sampled on a rising clock edge;
// out_payload and out_valid follow one cycle later, out_valid as a one-cycle
// pulse per flit. rst is synchronous and active high. The decoding rule
// follows the schemes; the output register is this design's choice.
module ni_decoder
  import noc_enc_pkg::*;
#(
  parameter int unsigned W      = 8,
  parameter int unsigned SCHEME = 3,
  localparam int unsigned LW    = link_width(SCHEME, W)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [LW-1:0] link,
  input  logic          link_valid,
  output logic [W-2:0]  out_payload,
  output logic          out_valid
);
  logic [W-2:0] payload;

  if (SCHEME == 1) begin : g_s1
    decoder_s1 #(.W(W)) u_d (.z(link), .payload(payload));
  end else begin : g_s23
    decoder_s23 #(.W(W)) u_d (.z(link), .payload(payload));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_payload <= '0;
      out_valid   <= 1'b0;
    end else begin
      out_valid <= link_valid;
      if (link_valid) out_payload <= payload;
    end
  end
endmodule
