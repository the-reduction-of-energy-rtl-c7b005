// module_c over every combination of the four counts for 8 pairs. The
// expected action is the one among none, odd, even and full with the lowest
// coupling activity change, equal changes resolved in that order; the
// outputs are checked against the codes 00, 10, 01, 11.
module tb_module_c;
  logic [3:0] ty, te, t2, t4;
  logic odd_inv, even_inv;
  int checks = 0, failures = 0;
  int seen[4];

  module_c dut (.ty_cnt(ty), .te_cnt(te), .t2_cnt(t2), .t4_cnt(t4),
                .odd_inv(odd_inv), .even_inv(even_inv));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] code[4];
    code[0] = 2'b00; code[1] = 2'b10; code[2] = 2'b01; code[3] = 2'b11;
    seen = '{default: 0};
    for (int a = 0; a <= 8; a++)
      for (int e = 0; e <= 8; e++)
        for (int b = 0; b <= 8; b++)
          for (int c = 0; c <= 8; c++) begin
            int d[4];
            int best;
            ty = 4'(a); te = 4'(e); t2 = 4'(b); t4 = 4'(c);
            d[0] = 0; d[1] = 8 - 2 * a; d[2] = 8 - 2 * e; d[3] = 2 * (c - b);
            best = 0;
            for (int k = 1; k < 4; k++) if (d[k] < d[best]) best = k;
            #1;
            checks++;
            if ({odd_inv, even_inv} != code[best]) begin
              failures++;
              $display("FAIL ty=%0d te=%0d t2=%0d t4=%0d got %b%b", a, e, b, c, odd_inv, even_inv);
            end
            seen[best]++;
          end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (seen[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
