// Sending network interface with the link encoder.
//
// The payload of a flit (W-1 bits) is packed with zero control lines into
// the current flit x and compared by the scheme's encoder E with the
// previously encoded flit, which is the value held on the link. The encoded
// flit is registered onto the link, so the register is at once the link
// driver and the "previous encoded" store. Only body flits are encoded; a
// header or tail flit (in_body = 0) goes out as it is with its control lines
// at zero so the routers can read it, and the decoder then leaves it alone.
// When no flit is offered the link holds its value and does not switch.
//
// Interface: in_valid/in_body/in_payload are sampled on a rising clock edge;
// link, link_valid and link_body change one cycle later. link_valid pulses
// for one cycle per flit; link_body is a sideband of the flit kind. rst is
// synchronous and active high and clears the link to all zeros (no
// inversion). SCHEME selects encoder_s1 (W lines), encoder_s2 or encoder_s3
// (W+1 lines). The encoder placement in the NI follows the block diagram
// common to the three schemes; the body-only rule, the reset value and the
// one-cycle register timing are this design's choices.
module ni_encoder
  import noc_enc_pkg::*;
#(
  parameter int unsigned W      = 8,
  parameter int unsigned SCHEME = 3,
  localparam int unsigned LW    = link_width(SCHEME, W)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          in_valid,
  input  logic          in_body,
  input  logic [W-2:0]  in_payload,
  output logic [LW-1:0] link,
  output logic          link_valid,
  output logic          link_body
);
  logic [LW-1:0] x, z;

  if (SCHEME < 1 || SCHEME > 3) begin : g_bad_scheme
    $error("ni_encoder: SCHEME must be 1, 2 or 3");
  end

  always_comb x = LW'(in_payload);

  if (SCHEME == 1) begin : g_s1
    encoder_s1 #(.W(W)) u_e (.x(x), .y(link), .z(z));
  end else if (SCHEME == 2) begin : g_s2
    encoder_s2 #(.W(W)) u_e (.x(x), .y(link), .z(z));
  end else begin : g_s3
    encoder_s3 #(.W(W)) u_e (.x(x), .y(link), .z(z));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      link       <= '0;
      link_valid <= 1'b0;
      link_body  <= 1'b0;
    end else begin
      link_valid <= in_valid;
      if (in_valid) begin
        link      <= in_body ? z : x;
        link_body <= in_body;
      end
    end
  end

  // An encoded flit never sets a control line on its own: without inversion
  // the control lines stay at the zeros the payload was packed with.
  a_header_plain: assert property (@(posedge clk) disable iff (rst)
    (in_valid && !in_body) |=> (link[LW-1:W-1] == '0));
endmodule
