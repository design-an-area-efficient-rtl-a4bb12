// bk_carry_stage: carry generation stage of the 8-bit Brent-Kung adder.
//
// Input are the bit pairs (g[i], p[i]) and the carry input cin; output is the
// carry out of every bit, c[i] = carry from bit i into bit i+1.
//
// The stage first builds, with black cells, the group pair (G,P)(i:0) of every
// prefix i:0 without looking at cin, in three levels of a Brent-Kung tree:
//   level 1  u/v[0] = (1:0)   u/v[1] = bit 2 passed on   u/v[2] = (3:2)
//            u/v[3] = (5:4)   u/v[4] = (7:6)
//   level 2  x/t[0] = (2:0)   x/t[1] = (3:0)   x/t[2] = (7:4)
//   level 3  m/n[0] = (4:0)   m/n[1] = (5:0)   m/n[2] = (6:0)   m/n[3] = (7:0)
// (u,x,m hold group propagates, v,t,n group generates). (6:0) is formed from
// bit 6 and (5:0), so it is one cell later than the other level-3 outputs.
// A last row of eight gray cells then folds the carry input in:
//   c[i] = G(i:0) | P(i:0) & cin
// so cin is not on any path inside the tree: it skips straight to each carry
// through one gray cell. The level grouping and the u/v/x/t/m/n names follow
// the signals shown for this adder; which cell feeds which inside the tree,
// and bit 2 being passed on unchanged at level 1, are this design's reading.
// Purely combinational, no clock. The width is fixed at 8 bits.
module bk_carry_stage
  import bk_pkg::*;
(
  input  logic [7:0] p,
  input  logic [7:0] g,
  input  logic       cin,
  output logic [4:0] u,
  output logic [4:0] v,
  output logic [2:0] x,
  output logic [2:0] t,
  output logic [3:0] m,
  output logic [3:0] n,
  output logic [7:0] c
);

  gp_t bit_gp [8];  // single-bit pairs
  gp_t lvl1   [5];
  gp_t lvl2   [3];
  gp_t lvl3   [4];
  gp_t pre    [8];  // pre[i] = (G,P)(i:0)

  always_comb
    for (int i = 0; i < 8; i++) bit_gp[i] = '{g: g[i], p: p[i]};

  // level 1
  bk_black_cell l1_10 (.hi(bit_gp[1]), .lo(bit_gp[0]), .out(lvl1[0]));
  assign lvl1[1] = bit_gp[2];
  bk_black_cell l1_32 (.hi(bit_gp[3]), .lo(bit_gp[2]), .out(lvl1[2]));
  bk_black_cell l1_54 (.hi(bit_gp[5]), .lo(bit_gp[4]), .out(lvl1[3]));
  bk_black_cell l1_76 (.hi(bit_gp[7]), .lo(bit_gp[6]), .out(lvl1[4]));

  // level 2
  bk_black_cell l2_20 (.hi(lvl1[1]), .lo(lvl1[0]), .out(lvl2[0]));
  bk_black_cell l2_30 (.hi(lvl1[2]), .lo(lvl1[0]), .out(lvl2[1]));
  bk_black_cell l2_74 (.hi(lvl1[4]), .lo(lvl1[3]), .out(lvl2[2]));

  // level 3
  bk_black_cell l3_40 (.hi(bit_gp[4]), .lo(lvl2[1]), .out(lvl3[0]));
  bk_black_cell l3_50 (.hi(lvl1[3]),   .lo(lvl2[1]), .out(lvl3[1]));
  bk_black_cell l3_60 (.hi(bit_gp[6]), .lo(lvl3[1]), .out(lvl3[2]));
  bk_black_cell l3_70 (.hi(lvl2[2]),   .lo(lvl2[1]), .out(lvl3[3]));

  // prefix (i:0) for every bit
  assign pre[0] = bit_gp[0];
  assign pre[1] = lvl1[0];
  assign pre[2] = lvl2[0];
  assign pre[3] = lvl2[1];
  assign pre[4] = lvl3[0];
  assign pre[5] = lvl3[1];
  assign pre[6] = lvl3[2];
  assign pre[7] = lvl3[3];

  // last row: gray cells fold in the carry input
  for (genvar i = 0; i < 8; i++) begin : g_last
    bk_gray_cell gc (.hi(pre[i]), .g_lo(cin), .g_out(c[i]));
  end

  // group signals brought out under their level names
  always_comb begin
    for (int i = 0; i < 5; i++) begin
      u[i] = lvl1[i].p;
      v[i] = lvl1[i].g;
    end
    for (int i = 0; i < 3; i++) begin
      x[i] = lvl2[i].p;
      t[i] = lvl2[i].g;
    end
    for (int i = 0; i < 4; i++) begin
      m[i] = lvl3[i].p;
      n[i] = lvl3[i].g;
    end
  end

endmodule
