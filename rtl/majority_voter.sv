// Majority voter of the Scheme I encoder.
//
// Asserts major when more of its N inputs are 1 than 0, i.e. when
// 2 * ones > N. Fed with the N = w-1 Ty flags of a w-line link this is the
// odd-invert condition Ty > (w-1)/2. Ones are counted with a ones_counter.
// Purely combinational.
module majority_voter #(
  parameter int unsigned N = 7
) (
  input  logic [N-1:0] votes,
  output logic         major
);
  localparam int unsigned CW = $clog2(N + 1);
  logic [CW-1:0] ones;

  ones_counter #(.N(N)) u_count (.bits(votes), .count(ones));

  always_comb major = ({1'b0, ones, 1'b0} > (CW + 2)'(N));
endmodule
