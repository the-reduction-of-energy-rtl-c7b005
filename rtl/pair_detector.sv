// Transition classifier for one pair of adjacent link lines.
//
// Of any two adjacent lines one has an even and one an odd index. The block
// compares the current (x) and previously sent (y) values of the pair and
// flags the transition classes the encoders count:
//   ty   - inverting the odd line of the current value lowers the pair's
//          coupling activity: types T1* and T1** and type II of the odd
//          inversion table (T1** = only the line to be inverted switches,
//          T1* = only the other line switches while the pair held equal
//          values, type II = both lines switch in opposite directions);
//   te   - the same with the even line inverted (Te of Scheme III);
//   t2   - a type II transition, removed by a full inversion;
//   t4dd - a type IV transition (no line switches) while the two lines hold
//          different values; a full inversion turns it into type II (T4**).
// With the coupling weights type I = 1, type II = 2, types III and IV = 0, a
// pair flagged ty (te) loses exactly one unit under odd (even) inversion and
// any other pair gains one; that is what makes the majority rule exact.
// The class definitions follow the inversion tables; reading T4** as "type IV
// with unequal lines" is this design's reading. Purely combinational.
module pair_detector (
  input  logic x_even,
  input  logic x_odd,
  input  logic y_even,
  input  logic y_odd,
  output logic ty,
  output logic te,
  output logic t2,
  output logic t4dd
);
  logic sw_even, sw_odd, prev_eq;

  always_comb begin
    sw_even = x_even ^ y_even;
    sw_odd  = x_odd ^ y_odd;
    prev_eq = ~(y_even ^ y_odd);
    t2   = sw_even & sw_odd & ~prev_eq;
    t4dd = ~sw_even & ~sw_odd & ~prev_eq;
    ty   = (sw_odd & ~sw_even) | (sw_even & ~sw_odd & prev_eq) | t2;
    te   = (sw_even & ~sw_odd) | (sw_odd & ~sw_even & prev_eq) | t2;
  end
endmodule
