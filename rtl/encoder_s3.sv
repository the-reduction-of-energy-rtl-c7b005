// Encoder E of Scheme III: odd, even, full or no inversion.
//
// The link has W+1 lines: W-1 payload lines (0..W-2) and two control lines,
// W-1 (odd index) and W (even index), both zero in the current flit x. For
// each of the W adjacent line pairs a pair_detector reports Ty, Te, T2 and
// T4**; four ones_counter blocks count them and module_c picks the action
// {odd, even} = 10, 01, 11 or 00. Odd lines are inverted when the odd flag
// is set and even lines when the even flag is set, so the two control lines
// carry the flags themselves. The detector, counter and Module C structure
// and the two control lines follow the Scheme III encoder diagram. W must be
// even. Purely combinational.
module encoder_s3 #(
  parameter int unsigned W = 8
) (
  input  logic [W:0] x,
  input  logic [W:0] y,
  output logic [W:0] z
);
  localparam int unsigned NP = W;
  localparam int unsigned CW = $clog2(NP + 1);

  if (W % 2 != 0 || W < 4) begin : g_bad_width
    $error("encoder_s3: W must be even and at least 4");
  end

  logic [NP-1:0] ty, te, t2, t4;
  logic [CW-1:0] ty_cnt, te_cnt, t2_cnt, t4_cnt;
  logic          odd_inv, even_inv;

  for (genvar i = 0; i < NP; i++) begin : g_pair
    localparam int unsigned EV = (i % 2 == 0) ? i : i + 1;
    localparam int unsigned OD = (i % 2 == 0) ? i + 1 : i;
    pair_detector u_det (
      .x_even(x[EV]), .x_odd(x[OD]), .y_even(y[EV]), .y_odd(y[OD]),
      .ty(ty[i]), .te(te[i]), .t2(t2[i]), .t4dd(t4[i])
    );
  end

  ones_counter #(.N(NP)) u_cnt_ty (.bits(ty), .count(ty_cnt));
  ones_counter #(.N(NP)) u_cnt_te (.bits(te), .count(te_cnt));
  ones_counter #(.N(NP)) u_cnt_t2 (.bits(t2), .count(t2_cnt));
  ones_counter #(.N(NP)) u_cnt_t4 (.bits(t4), .count(t4_cnt));

  module_c #(.NPAIRS(NP)) u_decide (
    .ty_cnt(ty_cnt), .te_cnt(te_cnt), .t2_cnt(t2_cnt), .t4_cnt(t4_cnt),
    .odd_inv(odd_inv), .even_inv(even_inv)
  );

  always_comb begin
    for (int i = 0; i <= W; i++) z[i] = x[i] ^ ((i % 2 == 1) ? odd_inv : even_inv);
  end
endmodule
