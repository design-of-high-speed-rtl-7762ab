// 32-bit radix-4 sparse parallel-prefix adder built around a domino / domino-compound
// carry tree.
//
// The addition runs in three steps. (1) Seven LEV1 modules (New_CD circuit) turn operand bits
// 27..0 into one group propagate and one group generate per 4-bit group. (2) A sparse carry
// tree computes only the carries at group boundaries, c4, c8, ..., c28. (3) Eight 4-bit sum
// modules each take one of those carries (the lowest takes cin) and produce their sum bits;
// the top one also produces c32 = cout.
//
// TREE selects the carry tree. The default, TREE_BRENT_KUNG, is the published main design:
// LEV1 in New_CD, two LEV3 in Conv_CD, no LEV2. TREE_HAN_CARLSON builds the other sparse tree
// drawn with the same modules (adds three Conv_Dom LEV2 and a final row of carry cells).
//
// Carry-in: the published tree has no carry-in of its own (c4 = GG_0). So that cin reaches
// every group carry, this design folds it into bit 0 before the tree: the LEV1 of group 0
// sees a0' = a0&b0 | (a0|b0)&cin and b0' = a0|b0, whose generate is a0'&b0' = g0 | p0&cin
// and whose propagate a0'|b0' is p0. This fold and the sum modules' insides are this design's
// choices; the tree follows the published circuits.
//
// Timing: clk is the domino clock (the clock buffers that derive each level's phi are
// non-inverting, so phi = clk here). While clk = 0 every dynamic node precharges and carry[]
// reads 0; a, b and cin must be set then. While clk = 1 the tree evaluates and sum, cout and
// carry are valid within the same phase: one addition per clock cycle, no pipeline registers.
// There is no reset: the circuit holds no state.
module pp_adder32
  import pp_tree_pkg::*;
#(
  parameter tree_e TREE = TREE_BRENT_KUNG
) (
  input  logic             clk,    // precharge (0) / evaluate (1)
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout,   // c32
  output logic [NUM_LEV1:1] carry  // tree carries, carry[k] = c_{4k}
);

  // carry-in folded into bit 0 of the tree operands
  logic [TREE_BITS-1:0] tree_a, tree_b;

  always_comb begin
    tree_a    = a[TREE_BITS-1:0];
    tree_b    = b[TREE_BITS-1:0];
    tree_a[0] = (a[0] & b[0]) | ((a[0] | b[0]) & cin);
    tree_b[0] = a[0] | b[0];
  end

  logic pp15;  // propagate of bits 15..0, produced by both trees

  if (TREE == TREE_BRENT_KUNG) begin : g_bk
    logic pp27;
    bk_tree32 u_tree (
      .phi   (clk),
      .a     (tree_a),
      .b     (tree_b),
      .carry (carry),
      .pp15  (pp15),
      .pp27  (pp27)
    );
  end else begin : g_hc
    hc_tree32 u_tree (
      .phi   (clk),
      .a     (tree_a),
      .b     (tree_b),
      .carry (carry),
      .pp15  (pp15)
    );
  end

  // final addition stage
  logic [NUM_GROUPS-1:0] grp_cin, grp_cout;

  assign grp_cin = {carry, cin};

  for (genvar k = 0; k < NUM_GROUPS; k++) begin : g_sum
    sum4 u_sum (
      .a    (a[RADIX*k +: RADIX]),
      .b    (b[RADIX*k +: RADIX]),
      .cin  (grp_cin[k]),
      .s    (sum[RADIX*k +: RADIX]),
      .cout (grp_cout[k])
    );
  end

  assign cout = grp_cout[NUM_GROUPS-1];

endmodule
