// "Ones" block: population count of N input bits.
//
// Counts how many of the pair detectors of one class fired. Built as a plain
// sum of the input bits; the width of the result is just wide enough for N.
// Purely combinational.
module ones_counter #(
  parameter int unsigned N  = 7,
  localparam int unsigned CW = $clog2(N + 1)
) (
  input  logic [N-1:0]  bits,
  output logic [CW-1:0] count
);
  always_comb begin
    count = '0;
    for (int i = 0; i < N; i++) count = count + CW'(bits[i]);
  end
endmodule
