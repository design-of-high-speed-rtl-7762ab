// LEV3, Conv_CD style: 16-bit group propagate and three carries from four (GP, GG) pairs.
//
// Inputs are four consecutive group signals, position 0 lowest. For the low LEV3 of a 32-bit
// tree they are (GP0..3, GG0..3); for the high one position 0 receives (PP15, c16). Outputs:
//   pp   = GP3 & GP2 & GP1 & GP0
//   c[1] = GG1 | GP1&GG0                           (c8  in the low LEV3, c20 in the high one)
//   c[2] = GG2 | GP2&c[1]                          (c12 / c24)
//   c[3] = GG3 | GP3&GG2 | GP3&GP2&GG1 | ... &GG0  (c16 / c28)
// Structure, as in the published domino-compound circuit: four dynamic nodes pair the inputs
// (gp10_n, gg10_n, gp32_n, gg32_n); static compound gates merge the pairs into pp and c[3]; an
// inverter on gg10_n gives c[1]; a separate domino gate (dynamic node plus inverter) forms
// c[2] from GG2, GP2 and c[1]. Hence c[2] sits one domino stage behind c[1], and is the
// slowest output, while c[3] comes straight from the compound gate.
//
// Timing: precharge while phi = 0 (all outputs 0), evaluate while phi = 1. Inputs must be
// stable or rising only while phi = 1. The ~(phi & f) node model is this model's choice.
module lev3_convcd (
  input  logic       phi,
  input  logic [3:0] gp,    // group propagate, position 0 lowest
  input  logic [3:0] gg,    // group generate
  output logic       pp,    // propagate over all four positions
  output logic [3:1] c      // carry out of positions 1..0, 2..0, 3..0
);

  logic gp10_n, gg10_n, gp32_n, gg32_n, c2_n;

  // first-level dynamic nodes
  always_comb begin
    gp10_n = ~(phi & gp[1] & gp[0]);
    gg10_n = ~(phi & (gg[1] | (gp[1] & gg[0])));
    gp32_n = ~(phi & gp[3] & gp[2]);
    gg32_n = ~(phi & (gg[3] | (gp[3] & gg[2])));
  end

  // static compound gates and the output inverter of gg10_n
  assign pp   = ~(gp32_n | gp10_n);
  assign c[3] = ~(gg32_n & (gp32_n | gg10_n));
  assign c[1] = ~gg10_n;

  // separate domino gate for the middle carry
  assign c2_n = ~(phi & (gg[2] | (gp[2] & c[1])));
  assign c[2] = ~c2_n;

endmodule
