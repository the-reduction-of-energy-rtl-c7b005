// Decoder of Scheme I.
//
// The receiving side of a W-line link: when the inversion line W-1 is high,
// the odd payload lines are inverted back; the payload is lines 0..W-2.
// The even lines were never inverted and pass straight through.
// Purely combinational.
module decoder_s1 #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] z,
  output logic [W-2:0] payload
);
  always_comb begin
    for (int i = 0; i < W - 1; i++) payload[i] = z[i] ^ (z[W-1] & (i % 2 == 1));
  end
endmodule
