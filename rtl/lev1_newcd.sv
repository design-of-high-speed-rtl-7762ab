// LEV1, New_CD style: group propagate and group generate of four consecutive bit positions.
//
// This is the most frequent module of a radix-4 sparse prefix tree. Instead of forming the
// eight single-bit signals p_i = a_i | b_i and g_i = a_i & b_i and grouping them four by four,
// it forms one propagate and one generate per pair of bits directly from the operands, in four
// dynamic (precharged) nodes, all active low:
//   p10_n = ~((a1|b1) & (a0|b0))           p32_n = ~((a3|b3) & (a2|b2))
//   g10_n = ~(a1&b1 | (a1|b1)&a0&b0)       g32_n = ~(a3&b3 | (a3|b3)&a2&b2)
// Two static compound gates then merge the pairs:
//   gp = NOR(p32_n, p10_n)                 = P32 & P10
//   gg = NOT(g32_n & (p32_n | g10_n))      = G32 | P32 & G10
// This node structure and these equations are those of the published New_CD circuit.
//
// Timing: phi is the module's evaluate clock (the published clock buffer is a non-inverting
// pair of inverters, so phi follows CLK). While phi = 0 the dynamic nodes are precharged high
// and both outputs are 0; while phi = 1 the nodes evaluate and gp/gg carry the function. The
// operands must be stable before phi rises (domino rule). Modelling a dynamic node as
// ~(phi & pull-down function) is this model's choice; keepers and sizing are electrical only.
module lev1_newcd (
  input  logic       phi,  // precharge (0) / evaluate (1)
  input  logic [3:0] a,    // operand bits i+3..i
  input  logic [3:0] b,
  output logic       gp,   // GP: all four positions propagate
  output logic       gg    // GG: the group generates a carry
);

  // dynamic nodes (active low, high during precharge)
  logic p10_n, p32_n, g10_n, g32_n;

  always_comb begin
    p10_n = ~(phi & (a[1] | b[1]) & (a[0] | b[0]));
    p32_n = ~(phi & (a[3] | b[3]) & (a[2] | b[2]));
    g10_n = ~(phi & ((a[1] & b[1]) | ((a[1] | b[1]) & a[0] & b[0])));
    g32_n = ~(phi & ((a[3] & b[3]) | ((a[3] | b[3]) & a[2] & b[2])));
  end

  // static compound gates
  assign gp = ~(p32_n | p10_n);
  assign gg = ~(g32_n & (p32_n | g10_n));

endmodule
