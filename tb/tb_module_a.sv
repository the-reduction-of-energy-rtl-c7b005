// module_a over every combination of the three counts for 8 pairs. The
// expected action is the one among none, odd and full with the lowest
// coupling activity change (none: 0, odd: 8 - 2*Ty, full: 2*(T4** - T2)),
// with equal changes resolved in the order none, odd, full.
module tb_module_a;
  logic [3:0] ty, t2, t4;
  logic half_inv, full_inv;
  int checks = 0, failures = 0, n_odd = 0, n_full = 0;

  module_a dut (.ty_cnt(ty), .t2_cnt(t2), .t4_cnt(t4), .half_inv(half_inv), .full_inv(full_inv));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a <= 8; a++)
      for (int b = 0; b <= 8; b++)
        for (int c = 0; c <= 8; c++) begin
          int d[3];
          int best;
          ty = 4'(a); t2 = 4'(b); t4 = 4'(c);
          d[0] = 0; d[1] = 8 - 2 * a; d[2] = 2 * (c - b);
          best = 0;
          for (int k = 1; k < 3; k++) if (d[k] < d[best]) best = k;
          #1;
          checks++;
          if (half_inv != (best == 1) || full_inv != (best == 2)) begin
            failures++;
            $display("FAIL ty=%0d t2=%0d t4=%0d got %b%b", a, b, c, half_inv, full_inv);
          end
          n_odd  += (best == 1);
          n_full += (best == 2);
        end
    checks++;
    if (n_odd == 0 || n_full == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
