// Shared constants and types of the 32-bit radix-4 sparse parallel-prefix adder.
//
// The adder splits a WIDTH-bit addition into WIDTH/RADIX groups of RADIX bits. A carry tree
// built from LEV1/LEV2/LEV3 modules delivers one carry per group boundary (c4, c8, ... c28),
// and one RADIX-bit sum module per group turns its carry into sum bits. WIDTH = 32 and
// RADIX = 4 are the published configuration; the tree modules are written for exactly these
// values, so the constants are localparams rather than free parameters.
//
// tree_e selects the carry-tree topology of the top level. Brent-Kung is the published main
// configuration; Han-Carlson is the second sparse tree drawn with the same module set.
package pp_tree_pkg;

  localparam int unsigned WIDTH      = 32;
  localparam int unsigned RADIX      = 4;
  localparam int unsigned NUM_GROUPS = WIDTH / RADIX;   // 8 sum modules
  localparam int unsigned NUM_LEV1   = NUM_GROUPS - 1;  // 7 LEV1 modules, bits 0..27
  localparam int unsigned TREE_BITS  = NUM_LEV1 * RADIX; // 28 operand bits enter the tree

  typedef enum logic [0:0] {
    TREE_BRENT_KUNG  = 1'b0,
    TREE_HAN_CARLSON = 1'b1
  } tree_e;

endpackage
