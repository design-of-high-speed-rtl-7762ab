// LEV2, Conv_Dom style: groups four consecutive (GP, GG) pairs into (GGP, GGG).
//
//   ggp = GP3 & GP2 & GP1 & GP0
//   ggg = GG3 | GP3&GG2 | GP3&GP2&GG1 | GP3&GP2&GP1&GG0
// Each output is one domino gate: a dynamic node discharged by the pull-down network (a
// four-transistor AND stack for ggp, a seven-input OR-AND stack for ggg) followed by a static
// inverter, as in the published conventional domino gates. Domino is the style published as
// the lower-energy choice for this module. LEV2 appears in the Han-Carlson tree only; the
// Brent-Kung tree has none.
//
// Timing: precharge while phi = 0 (outputs 0), evaluate while phi = 1.
module lev2_convdom (
  input  logic       phi,
  input  logic [3:0] gp,
  input  logic [3:0] gg,
  output logic       ggp,
  output logic       ggg
);

  logic ggp_n, ggg_n;  // dynamic nodes

  always_comb begin
    ggp_n = ~(phi & gp[3] & gp[2] & gp[1] & gp[0]);
    ggg_n = ~(phi & (gg[3]
                   | (gp[3] & gg[2])
                   | (gp[3] & gp[2] & gg[1])
                   | (gp[3] & gp[2] & gp[1] & gg[0])));
  end

  assign ggp = ~ggp_n;
  assign ggg = ~ggg_n;

endmodule
