// Three end-to-end encoded NoC links side by side, one per scheme.
//
// Each channel is a sending network interface (ni_encoder) driving the lines
// of a link and a receiving network interface (ni_decoder) at its far end.
// The routers between the two interfaces forward flits unchanged and are not
// part of this design, so the link lines are brought out as ports and wired
// straight to the decoders. All three channels take the same flit stream,
// which makes the link activity of the schemes directly comparable.
//
// Interface: clk, rst (synchronous, active high) and enb (a flit is offered)
// as on the encoder's top level, plus flit_body and the W-1 bit payload.
// The links change one cycle after a flit is offered, the decoded payloads
// two cycles after. Scheme I uses W link lines, Schemes II and III W+1.
module noc_encoding_top #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         enb,
  input  logic         flit_body,
  input  logic [W-2:0] payload,
  output logic [W-1:0] link_s1,
  output logic [W:0]   link_s2,
  output logic [W:0]   link_s3,
  output logic         link_valid,
  output logic [W-2:0] out_s1,
  output logic [W-2:0] out_s2,
  output logic [W-2:0] out_s3,
  output logic         out_valid,
  output logic         out_body
);
  logic [2:0] lv, lb, ov;

  ni_encoder #(.W(W), .SCHEME(1)) u_tx1 (
    .clk(clk), .rst(rst), .in_valid(enb), .in_body(flit_body), .in_payload(payload),
    .link(link_s1), .link_valid(lv[0]), .link_body(lb[0]));
  ni_encoder #(.W(W), .SCHEME(2)) u_tx2 (
    .clk(clk), .rst(rst), .in_valid(enb), .in_body(flit_body), .in_payload(payload),
    .link(link_s2), .link_valid(lv[1]), .link_body(lb[1]));
  ni_encoder #(.W(W), .SCHEME(3)) u_tx3 (
    .clk(clk), .rst(rst), .in_valid(enb), .in_body(flit_body), .in_payload(payload),
    .link(link_s3), .link_valid(lv[2]), .link_body(lb[2]));

  ni_decoder #(.W(W), .SCHEME(1)) u_rx1 (
    .clk(clk), .rst(rst), .link(link_s1), .link_valid(lv[0]), .out_payload(out_s1), .out_valid(ov[0]));
  ni_decoder #(.W(W), .SCHEME(2)) u_rx2 (
    .clk(clk), .rst(rst), .link(link_s2), .link_valid(lv[1]), .out_payload(out_s2), .out_valid(ov[1]));
  ni_decoder #(.W(W), .SCHEME(3)) u_rx3 (
    .clk(clk), .rst(rst), .link(link_s3), .link_valid(lv[2]), .out_payload(out_s3), .out_valid(ov[2]));

  always_ff @(posedge clk) begin
    if (rst) out_body <= 1'b0;
    else if (lv[0]) out_body <= lb[0];
  end

  always_comb begin
    link_valid = lv[0];
    out_valid  = ov[0];
  end

  // The three channels see the same flit stream and must stay in step.
  a_same_valid: assert property (@(posedge clk) disable iff (rst)
    (lv == '0 || lv == '1) && (ov == '0 || ov == '1));
  a_same_kind: assert property (@(posedge clk) disable iff (rst)
    lv[0] |-> (lb == '0 || lb == '1));
endmodule
