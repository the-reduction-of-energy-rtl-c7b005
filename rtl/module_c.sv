// Module C: inversion decision of the Scheme III encoder.
//
// Takes the Ty, Te, T2 and T4** counts over the NPAIRS adjacent line pairs
// and picks odd, even, full or no inversion, coded {odd_inv, even_inv} as
// 10, 01, 11 and 00. Relative to sending the flit as it is the coupling
// activity changes by NPAIRS - 2*Ty (odd), NPAIRS - 2*Te (even) and
// 2*(T4** - T2) (full). The action with the largest reduction is chosen; an
// action that does not reduce the activity is never taken, and equal gains
// are resolved in the order odd, even, full. Self-switching is left out.
// These rules are this design's derivation from the coupling model.
// Purely combinational.
module module_c
  import noc_enc_pkg::*;
#(
  parameter int unsigned NPAIRS = 8,
  localparam int unsigned CW = $clog2(NPAIRS + 1)
) (
  input  logic [CW-1:0] ty_cnt,
  input  logic [CW-1:0] te_cnt,
  input  logic [CW-1:0] t2_cnt,
  input  logic [CW-1:0] t4_cnt,
  output logic          odd_inv,
  output logic          even_inv
);
  localparam int unsigned DW = CW + 3;
  logic signed [DW-1:0] d_odd, d_even, d_full, best;
  inv_action_e action;

  always_comb begin
    d_odd  = DW'(NPAIRS) - (DW'(ty_cnt) <<< 1);
    d_even = DW'(NPAIRS) - (DW'(te_cnt) <<< 1);
    d_full = (DW'(t4_cnt) - DW'(t2_cnt)) <<< 1;
    best   = '0;
    action = INV_NONE;
    if (d_odd < best) begin
      best   = d_odd;
      action = INV_ODD;
    end
    if (d_even < best) begin
      best   = d_even;
      action = INV_EVEN;
    end
    if (d_full < best) begin
      best   = d_full;
      action = INV_FULL;
    end
    {odd_inv, even_inv} = action;
  end
endmodule
