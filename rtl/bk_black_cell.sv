// bk_black_cell: full prefix operator of the carry tree.
//
// Merges the (G,P) pair of a more significant group "hi" with that of the
// adjacent less significant group "lo" into the pair of the combined group:
//   G = Gh | (Ph & Gl)      (AND + OR)
//   P = Ph & Pl             (AND)
// i.e. three gates. It is used wherever a later cell still needs the group
// propagate. Purely combinational, no clock.
module bk_black_cell
  import bk_pkg::*;
(
  input  gp_t hi,
  input  gp_t lo,
  output gp_t out
);

  always_comb begin
    out.g = hi.g | (hi.p & lo.g);
    out.p = hi.p & lo.p;
  end

endmodule
