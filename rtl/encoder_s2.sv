// Encoder E of Scheme II: odd, full or no inversion.
//
// The link has W+1 lines: W-1 payload lines (0..W-2) and two control lines,
// W-1 (odd index) and W (even index), both zero in the current flit x. In the
// previously encoded flit y they tell how it was inverted. For each of the W
// adjacent line pairs a pair_detector reports Ty, T2 and T4**; three
// ones_counter blocks count them and module_a picks the action. Odd lines are
// inverted on a half or a full inversion, even lines on a full inversion, so
// the control lines end up as {even, odd} = 01 for odd and 11 for full.
// The counter and Module A structure follows the Scheme II encoder diagram.
// The diagram prints a single control line; one line cannot tell a full from
// an odd inversion at the decoder, so this design adds the even control line
// of Scheme III. W must be even. Purely combinational.
module encoder_s2 #(
  parameter int unsigned W = 8
) (
  input  logic [W:0] x,
  input  logic [W:0] y,
  output logic [W:0] z
);
  localparam int unsigned NP = W;
  localparam int unsigned CW = $clog2(NP + 1);

  if (W % 2 != 0 || W < 4) begin : g_bad_width
    $error("encoder_s2: W must be even and at least 4");
  end

  logic [NP-1:0] ty, t2, t4;
  logic [CW-1:0] ty_cnt, t2_cnt, t4_cnt;
  logic          half_inv, full_inv, inv_odd, inv_even;

  for (genvar i = 0; i < NP; i++) begin : g_pair
    localparam int unsigned EV = (i % 2 == 0) ? i : i + 1;
    localparam int unsigned OD = (i % 2 == 0) ? i + 1 : i;
    logic unused_te;
    pair_detector u_det (
      .x_even(x[EV]), .x_odd(x[OD]), .y_even(y[EV]), .y_odd(y[OD]),
      .ty(ty[i]), .te(unused_te), .t2(t2[i]), .t4dd(t4[i])
    );
  end

  ones_counter #(.N(NP)) u_cnt_ty (.bits(ty), .count(ty_cnt));
  ones_counter #(.N(NP)) u_cnt_t2 (.bits(t2), .count(t2_cnt));
  ones_counter #(.N(NP)) u_cnt_t4 (.bits(t4), .count(t4_cnt));

  module_a #(.NPAIRS(NP)) u_decide (
    .ty_cnt(ty_cnt), .t2_cnt(t2_cnt), .t4_cnt(t4_cnt),
    .half_inv(half_inv), .full_inv(full_inv)
  );

  always_comb begin
    inv_odd  = half_inv | full_inv;
    inv_even = full_inv;
    for (int i = 0; i <= W; i++) z[i] = x[i] ^ ((i % 2 == 1) ? inv_odd : inv_even);
  end
endmodule
