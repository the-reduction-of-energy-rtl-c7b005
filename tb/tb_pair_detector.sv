// Exhaustive test of pair_detector over all 16 transitions of a line pair.
// ty/te are checked against the coupling cost of the pair before and after
// inverting its odd/even line, t2 against a cost of 2, and t4dd against "no
// line switches while the lines differ". Also checks that every inversion of
// one line changes the pair's cost by exactly one unit.
module tb_pair_detector;
  import link_ref_pkg::*;
  logic xe, xo, ye, yo, ty, te, t2, t4dd;
  int checks = 0, failures = 0;

  pair_detector dut (.x_even(xe), .x_odd(xo), .y_even(ye), .y_odd(yo),
                     .ty(ty), .te(te), .t2(t2), .t4dd(t4dd));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: x=%b%b y=%b%b", what, xe, xo, ye, yo);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int c0, codd, ceven;
      {xe, xo, ye, yo} = 4'(v);
      #1;
      c0    = pair_cost(ye, yo, xe, xo);
      codd  = pair_cost(ye, yo, xe, ~xo);
      ceven = pair_cost(ye, yo, ~xe, xo);
      check(ty == (codd < c0), "ty");
      check(te == (ceven < c0), "te");
      check(t2 == (c0 == 2), "t2");
      check(t4dd == ({xe, xo} == {ye, yo} && ye != yo), "t4dd");
      check((codd - c0 == 1) || (c0 - codd == 1), "odd step");
      check((ceven - c0 == 1) || (c0 - ceven == 1), "even step");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
