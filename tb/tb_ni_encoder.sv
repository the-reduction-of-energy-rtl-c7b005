// ni_encoder for all three schemes at W = 8 (Scheme III is the default).
// A stream of body flits, header flits and idle cycles is driven; each cycle
// the link is compared with a model that keeps the previous link value:
// one cycle after a flit the link carries the reference encoding of a body
// flit or the plain header, link_valid pulses once per flit, and an idle
// cycle leaves the link unchanged. Reset must clear the link.
module tb_ni_encoder;
  import link_ref_pkg::*;
  localparam int W = 8;
  logic clk = 1'b0, rst = 1'b1, vld = 1'b0, body = 1'b0;
  logic [W-2:0] pay = '0;
  logic [W-1:0] l1;
  logic [W:0]   l2, l3;
  logic [2:0]   lv, lb;
  int checks = 0, failures = 0, n_hdr = 0, n_idle = 0;
  lines_t m[3];
  logic   mv;

  always #5 clk = ~clk;

  ni_encoder #(.W(W), .SCHEME(1)) u1 (.clk(clk), .rst(rst), .in_valid(vld), .in_body(body),
    .in_payload(pay), .link(l1), .link_valid(lv[0]), .link_body(lb[0]));
  ni_encoder #(.W(W), .SCHEME(2)) u2 (.clk(clk), .rst(rst), .in_valid(vld), .in_body(body),
    .in_payload(pay), .link(l2), .link_valid(lv[1]), .link_body(lb[1]));
  ni_encoder                      u3 (.clk(clk), .rst(rst), .in_valid(vld), .in_body(body),
    .in_payload(pay), .link(l3), .link_valid(lv[2]), .link_body(lb[2]));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic lines_t got(int s);
    return (s == 0) ? lines_t'(l1) : (s == 1) ? lines_t'(l2) : lines_t'(l3);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    #1;
    for (int s = 0; s < 3; s++) begin
      checks++;
      if (got(s) != 0 || lv[s]) begin failures++; $display("FAIL reset s%0d", s + 1); end
      m[s] = 0;
    end
    rst = 1'b0;
    for (int k = 0; k < 4000; k++) begin
      vld  = ($urandom % 8) != 0;
      body = ($urandom % 6) != 0;
      pay  = (W-1)'($urandom);
      if (vld && !body) n_hdr++;
      if (!vld) n_idle++;
      mv = vld;
      for (int s = 0; s < 3; s++)
        if (vld) m[s] = body ? ref_encode(s + 1, lines_t'(pay), m[s], link_lines(s + 1, W))
                             : lines_t'(pay);
      @(posedge clk);
      #1;
      for (int s = 0; s < 3; s++) begin
        checks += 3;
        if (got(s) != m[s]) begin
          failures++;
          $display("FAIL s%0d cycle %0d link=%b exp=%b", s + 1, k, got(s), m[s]);
        end
        if (lv[s] != mv) begin failures++; $display("FAIL s%0d valid", s + 1); end
        if (mv && lb[s] != body) begin failures++; $display("FAIL s%0d body", s + 1); end
      end
    end
    checks++;
    if (n_hdr == 0 || n_idle == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
