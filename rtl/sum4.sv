// 4-bit sum module of the final addition stage.
//
// Each radix-4 group of the adder has one such module. It receives the group's operand bits
// and the carry c_x into the group from the prefix tree (or the adder's carry-in for the
// lowest group) and produces the four sum bits. Only the module's role is published; its
// insides here are this design's choice, the simplest static circuit that does the job: local
// p_i = a_i ^ b_i and g_i = a_i & b_i, a 4-bit ripple of the incoming carry, and
// s_i = p_i ^ c_i. cout is the carry out of the group; the adder uses it only in the top group,
// where it is c32.
//
// Timing: purely combinational. In the adder its result is valid during the evaluate phase,
// once the tree's carry has settled.
module sum4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,   // c_x from the tree
  output logic [3:0] s,
  output logic       cout
);

  logic [3:0] p, g;
  logic       cy;  // ripple carry

  always_comb begin
    p  = a ^ b;
    g  = a & b;
    cy = cin;
    for (int i = 0; i < 4; i++) begin
      s[i] = p[i] ^ cy;
      cy   = g[i] | (p[i] & cy);
    end
    cout = cy;
  end

endmodule
