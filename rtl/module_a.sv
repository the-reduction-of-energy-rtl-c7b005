// Module A: inversion decision of the Scheme II encoder.
//
// Takes the Ty, T2 and T4** counts over the NPAIRS adjacent line pairs and
// picks odd, full or no inversion, whichever gives the lowest coupling
// activity (type I weighted 1, type II weighted 2). Relative to sending the
// flit as it is, odd inversion changes the activity by NPAIRS - 2*Ty and full
// inversion by 2*(T4** - T2). An action is taken only if it lowers the
// activity; on equal gains odd inversion wins over full inversion. The
// self-switching terms are left out, as in the odd-invert rule of Scheme I.
// These rules are this design's derivation from the coupling model.
// Purely combinational.
module module_a #(
  parameter int unsigned NPAIRS = 8,
  localparam int unsigned CW = $clog2(NPAIRS + 1)
) (
  input  logic [CW-1:0] ty_cnt,
  input  logic [CW-1:0] t2_cnt,
  input  logic [CW-1:0] t4_cnt,
  output logic          half_inv,
  output logic          full_inv
);
  localparam int unsigned DW = CW + 3;
  logic signed [DW-1:0] d_odd, d_full, best;

  always_comb begin
    d_odd  = DW'(NPAIRS) - (DW'(ty_cnt) <<< 1);
    d_full = (DW'(t4_cnt) - DW'(t2_cnt)) <<< 1;
    best     = '0;
    half_inv = 1'b0;
    full_inv = 1'b0;
    if (d_odd < best) begin
      best     = d_odd;
      half_inv = 1'b1;
    end
    if (d_full < best) begin
      best     = d_full;
      half_inv = 1'b0;
      full_inv = 1'b1;
    end
  end
endmodule
