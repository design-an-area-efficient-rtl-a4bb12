// bk_gray_cell: generate-only prefix operator.
//
// Merges the (G,P) pair of a group "hi" with the generate (carry) "g_lo"
// coming from below it and returns only the combined generate:
//   g_out = Gh | (Ph & g_lo)   (AND + OR, two gates)
// No group propagate is formed, which saves the third gate of a black cell.
// In this adder the gray cells form the last row of the carry stage, where
// g_lo is the adder's carry input. Purely combinational, no clock.
module bk_gray_cell
  import bk_pkg::*;
(
  input  gp_t  hi,
  input  logic g_lo,
  output logic g_out
);

  always_comb g_out = hi.g | (hi.p & g_lo);

endmodule
