// bk_pkg: types and constants shared by the Brent-Kung adder.
//
// The adder works on (generate, propagate) pairs. A pair describes either a
// single bit (g = a&b, p = a^b) or a group of adjacent bits (G = the group
// creates a carry on its own, P = the group passes an incoming carry through).
// gp_t bundles one such pair so that the prefix cells can take and return it
// as one value. ADDER_WIDTH is the operand width of the adder (8 bits).
package bk_pkg;

  localparam int unsigned ADDER_WIDTH = 8;

  typedef struct packed {
    logic g;  // generate
    logic p;  // propagate
  } gp_t;

endpackage
