// ni_decoder for all three schemes at W = 8 (Scheme III is the default).
// The link lines are driven with payloads under every inversion a scheme
// allows; one cycle after link_valid the payload must come out unchanged
// with out_valid set, and the output must hold while link_valid is low.
module tb_ni_decoder;
  import link_ref_pkg::*;
  localparam int W = 8;
  logic clk = 1'b0, rst = 1'b1, lv = 1'b0;
  logic [W-1:0] l1 = '0;
  logic [W:0]   l2 = '0, l3 = '0;
  logic [W-2:0] o1, o2, o3;
  logic [2:0]   ov;
  logic [W-2:0] last;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ni_decoder #(.W(W), .SCHEME(1)) u1 (.clk(clk), .rst(rst), .link(l1), .link_valid(lv), .out_payload(o1), .out_valid(ov[0]));
  ni_decoder #(.W(W), .SCHEME(2)) u2 (.clk(clk), .rst(rst), .link(l2), .link_valid(lv), .out_payload(o2), .out_valid(ov[1]));
  ni_decoder                      u3 (.clk(clk), .rst(rst), .link(l3), .link_valid(lv), .out_payload(o3), .out_valid(ov[2]));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    rst = 1'b0;
    last = '0;
    for (int k = 0; k < 3000; k++) begin
      logic [W-2:0] p;
      int a;
      p  = (W-1)'($urandom);
      a  = $urandom % 4;
      lv = ($urandom % 5) != 0;
      l1 = W'(apply(lines_t'(p), a % 2, W));
      l2 = (W+1)'(apply(lines_t'(p), (a == 2) ? 3 : a, W + 1));
      l3 = (W+1)'(apply(lines_t'(p), a, W + 1));
      @(posedge clk);
      #1;
      if (lv) last = p;
      checks += 4;
      if (ov != {3{lv}}) begin failures++; $display("FAIL valid"); end
      if (o1 != last) begin failures++; $display("FAIL s1 a=%0d p=%b o=%b", a, p, o1); end
      if (o2 != last) begin failures++; $display("FAIL s2 a=%0d p=%b o=%b", a, p, o2); end
      if (o3 != last) begin failures++; $display("FAIL s3 a=%0d p=%b o=%b", a, p, o3); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
