// cska_bk_adder: 8-bit Brent-Kung parallel-prefix adder, s = a + b + cin.
//
// Three stages, all combinational (no clock, result valid one propagation
// delay after the inputs change):
//   1. bk_pre_stage    bit propagate p = a^b and generate g = a&b
//   2. bk_carry_stage  Brent-Kung tree of black cells giving (G,P)(i:0) for
//                      every bit, then a row of gray cells that adds the carry
//                      input: c[i] = G(i:0) | P(i:0)&cin
//   3. bk_post_stage   s[i] = p[i] ^ carry into bit i, s[8] = carry out
// The three-stage split, the black/gray cells and the gray-cell last stage
// follow the published design; the carry input skipping the tree through that
// last row is this design's reading of it. The intermediate tree signals
// (u,v,x,t,m,n) stay inside as named nets for waveform viewing, so lint
// reports them as unused; the ports are only the operands and the sum.
module cska_bk_adder #(
  parameter int unsigned WIDTH = bk_pkg::ADDER_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH:0]   s
);

  // The carry tree is laid out for 8 bits.
  if (WIDTH != 8) begin : g_width_check
    $error("cska_bk_adder: only WIDTH = 8 is supported");
  end

  logic [WIDTH-1:0] p, g, c;
  logic [4:0] u, v;
  logic [2:0] x, t;
  logic [3:0] m, n;

  bk_pre_stage #(.WIDTH(WIDTH)) u_pre (
    .a(a), .b(b), .p(p), .g(g)
  );

  bk_carry_stage u_carry (
    .p(p), .g(g), .cin(cin),
    .u(u), .v(v), .x(x), .t(t), .m(m), .n(n),
    .c(c)
  );

  bk_post_stage #(.WIDTH(WIDTH)) u_post (
    .p(p), .c(c), .cin(cin), .s(s)
  );

endmodule
