// 32-bit radix-4 Brent-Kung carry tree: seven LEV1 modules and two LEV3 modules.
//
// LEV1 number k (k = 0..6) groups operand bits 4k+3..4k into (GP_k, GG_k); c4 = GG_0.
// The low LEV3 takes (GP_3..0, GG_3..0) and gives c8, c12, c16 and PP15, the propagate of
// bits 15..0. The high LEV3 takes (GP_6..4, PP15) and (GG_6..4, c16) and gives c20, c24, c28
// and PP27. Operand bits 28..31 do not enter the tree: the top 4-bit sum module handles them
// with c28. This is the published Brent-Kung arrangement, with the New_CD LEV1 and the
// Conv_CD LEV3 that the published tree uses.
//
// Because the Conv_CD LEV3 forms its middle carry one domino stage after its first one, c12
// and c24 are that circuit's slow outputs; c16 is formed earlier than c12 and c28 earlier
// than c24. In this logic model that shows only as structure, not as delay.
//
// Timing: every module precharges while phi = 0 (all carries 0) and evaluates while phi = 1.
// a and b must be stable before phi rises. The tree computes carries as if c0 = 0; a
// carry-in must be folded into bit 0 by the user (the adder top does this).
module bk_tree32
  import pp_tree_pkg::*;
(
  input  logic                 phi,
  input  logic [TREE_BITS-1:0] a,      // operand bits 27..0
  input  logic [TREE_BITS-1:0] b,
  output logic [NUM_LEV1:1]    carry,  // carry[k] = c_{4k}, k = 1..7
  output logic                 pp15,   // bits 15..0 all propagate
  output logic                 pp27    // bits 27..0 all propagate
);

  logic [NUM_LEV1-1:0] gp, gg;

  for (genvar k = 0; k < NUM_LEV1; k++) begin : g_lev1
    lev1_newcd u_lev1 (
      .phi (phi),
      .a   (a[RADIX*k +: RADIX]),
      .b   (b[RADIX*k +: RADIX]),
      .gp  (gp[k]),
      .gg  (gg[k])
    );
  end

  assign carry[1] = gg[0];

  // c8, c12, c16, PP15
  lev3_convcd u_lev3_lo (
    .phi (phi),
    .gp  (gp[3:0]),
    .gg  (gg[3:0]),
    .pp  (pp15),
    .c   (carry[4:2])
  );

  // c20, c24, c28, PP27
  lev3_convcd u_lev3_hi (
    .phi (phi),
    .gp  ({gp[6:4], pp15}),
    .gg  ({gg[6:4], carry[4]}),
    .pp  (pp27),
    .c   (carry[7:5])
  );

endmodule
