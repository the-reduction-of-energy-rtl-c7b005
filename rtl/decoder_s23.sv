// Decoder of Schemes II and III.
//
// The receiving side of a (W+1)-line link: line W-1 says the odd lines were
// inverted and line W says the even lines were (both: full inversion). Each
// payload line 0..W-2 is inverted back accordingly. Purely combinational.
module decoder_s23 #(
  parameter int unsigned W = 8
) (
  input  logic [W:0]   z,
  output logic [W-2:0] payload
);
  always_comb begin
    for (int i = 0; i < W - 1; i++) payload[i] = z[i] ^ ((i % 2 == 1) ? z[W-1] : z[W]);
  end
endmodule
