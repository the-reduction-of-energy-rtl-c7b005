// Encoder E of Scheme I: odd inversion only.
//
// Inputs are the current flit x (W-1 payload bits on lines 0..W-2 and a zero
// on line W-1) and the previously encoded flit y, whose line W-1 is its
// inversion bit. One pair_detector per adjacent pair of lines (W-1 pairs,
// the control line included) raises Ty when odd-inverting that pair lowers
// its coupling activity; a majority voter asserts half-invert when
// Ty > (W-1)/2, and the odd lines of x are then inverted. Line W-1 is odd,
// so its zero becomes the inversion bit; even lines pass straight through
// from x to z. The structure follows the encoder
// diagram of Scheme I. W must be even. Purely combinational: the caller
// registers z as the next previously encoded flit.
module encoder_s1 #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] z
);
  localparam int unsigned NP = W - 1;

  if (W % 2 != 0 || W < 4) begin : g_bad_width
    $error("encoder_s1: W must be even and at least 4");
  end

  logic [NP-1:0] ty;
  logic          half_inv;

  for (genvar i = 0; i < NP; i++) begin : g_pair
    localparam int unsigned EV = (i % 2 == 0) ? i : i + 1;
    localparam int unsigned OD = (i % 2 == 0) ? i + 1 : i;
    logic unused_te, unused_t2, unused_t4;
    pair_detector u_det (
      .x_even(x[EV]), .x_odd(x[OD]), .y_even(y[EV]), .y_odd(y[OD]),
      .ty(ty[i]), .te(unused_te), .t2(unused_t2), .t4dd(unused_t4)
    );
  end

  majority_voter #(.N(NP)) u_vote (.votes(ty), .major(half_inv));

  always_comb begin
    for (int i = 0; i < W; i++) z[i] = x[i] ^ (half_inv & (i % 2 == 1));
  end
endmodule
