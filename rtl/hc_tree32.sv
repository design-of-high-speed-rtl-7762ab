// 32-bit radix-4 Han-Carlson carry tree: seven LEV1, one LEV3, three LEV2 and three carry
// cells.
//
// LEV1 number k (k = 0..6) groups operand bits 4k+3..4k into (GP_k, GG_k); c4 = GG_0.
// One LEV3 takes (GP_3..0, GG_3..0) and gives c8, c12, c16 and PP15. Three LEV2 modules form
// the 16-bit groups GGP_j/GGG_j over (GP, GG)_{j+3..j} for j = 1, 2, 3 (bits 4..19, 8..23,
// 12..27). A last row of carry cells combines each with the carry entering its group:
//   c20 = GGG_1 | GGP_1 & c4,  c24 = GGG_2 | GGP_2 & c8,  c28 = GGG_3 | GGP_3 & c12.
// Module placement and wiring follow the published Han-Carlson drawing. That drawing does not
// give the last-row cells' circuit; here they are static AND-OR gates, which stay at 0 during
// precharge because all their inputs do.
//
// Timing: precharge while phi = 0 (all carries 0), evaluate while phi = 1. a and b must be
// stable before phi rises. Carries are computed as if c0 = 0.
module hc_tree32
  import pp_tree_pkg::*;
(
  input  logic                 phi,
  input  logic [TREE_BITS-1:0] a,      // operand bits 27..0
  input  logic [TREE_BITS-1:0] b,
  output logic [NUM_LEV1:1]    carry,  // carry[k] = c_{4k}, k = 1..7
  output logic                 pp15    // bits 15..0 all propagate
);

  logic [NUM_LEV1-1:0] gp, gg;
  logic [3:1]          ggp, ggg;

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
  lev3_convcd u_lev3 (
    .phi (phi),
    .gp  (gp[3:0]),
    .gg  (gg[3:0]),
    .pp  (pp15),
    .c   (carry[4:2])
  );

  for (genvar j = 1; j <= 3; j++) begin : g_lev2
    lev2_convdom u_lev2 (
      .phi (phi),
      .gp  (gp[j+3:j]),
      .gg  (gg[j+3:j]),
      .ggp (ggp[j]),
      .ggg (ggg[j])
    );
    // last-row carry cell: carry into bit 4(j+4) from the carry into bit 4j
    assign carry[j+4] = ggg[j] | (ggp[j] & carry[j]);
  end

endmodule
