// encoder_s1 at W = 8 (default) and W = 32 against the reference model:
// random current flits (control lines zero) are encoded against random and
// against chained previous values; the encoded flit must be the inversion
// of lowest coupling cost that Scheme 1 allows, must decode back to the
// payload, and each allowed action must occur.
module tb_encoder_s1;
  import link_ref_pkg::*;
  localparam int W0 = 8;
  localparam int W1 = 32;
  localparam int L0 = link_lines(1, W0);
  localparam int L1 = link_lines(1, W1);
  logic [L0-1:0] x0, y0, z0;
  logic [L1-1:0] x1, y1, z1;
  int checks = 0, failures = 0;
  int seen[4];

  encoder_s1           u0 (.x(x0), .y(y0), .z(z0));
  encoder_s1 #(.W(W1)) u1 (.x(x1), .y(y1), .z(z1));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run0(bit chain);
    lines_t p, exp;
    p = lines_t'($urandom) & ((64'd1 << (W0 - 1)) - 1);
    x0 = L0'(p);
    if (!chain) y0 = L0'($urandom);
    #1;
    exp = ref_encode(1, lines_t'(x0), lines_t'(y0), L0);
    seen[ref_action(1, lines_t'(x0), lines_t'(y0), L0)]++;
    checks += 2;
    if (lines_t'(z0) != exp) begin
      failures++;
      $display("FAIL W=8 x=%b y=%b z=%b exp=%b", x0, y0, z0, exp[L0-1:0]);
    end
    if (ref_decode(1, lines_t'(z0), W0) != p) begin
      failures++;
      $display("FAIL W=8 decode z=%b", z0);
    end
    y0 = z0;
  endtask

  task automatic run1(bit chain);
    lines_t p, exp;
    p = {$urandom, $urandom} & ((64'd1 << (W1 - 1)) - 1);
    x1 = L1'(p);
    if (!chain) y1 = L1'({$urandom, $urandom});
    #1;
    exp = ref_encode(1, lines_t'(x1), lines_t'(y1), L1);
    checks += 2;
    if (lines_t'(z1) != exp) begin
      failures++;
      $display("FAIL W=32 x=%h y=%h z=%h", x1, y1, z1);
    end
    if (ref_decode(1, lines_t'(z1), W1) != p) begin
      failures++;
      $display("FAIL W=32 decode");
    end
    y1 = z1;
  endtask

  initial begin
    seen = '{default: 0};
    y0 = '0;
    y1 = '0;
    for (int k = 0; k < 3000; k++) run0(k % 2 == 0);
    for (int k = 0; k < 3000; k++) run1(k % 2 == 0);
    for (int a = 0; a < 4; a++) if (allowed(1, a)) begin
      checks++;
      if (seen[a] == 0) begin failures++; $display("FAIL action %0d never chosen", a); end
    end
    $display("actions none=%0d odd=%0d even=%0d full=%0d", seen[0], seen[1], seen[2], seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
