// bk_post_stage: post-processing (sum) stage of the Brent-Kung adder.
//
// Bit i of the sum is its propagate XOR the carry into it: the carry input
// for bit 0, the carry out of bit i-1 (c[i-1]) above. The carry out of the
// top bit becomes the extra sum bit s[WIDTH], so s is one bit wider than the
// operands. One XOR level, purely combinational. WIDTH defaults to 8.
module bk_post_stage #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] p,
  input  logic [WIDTH-1:0] c,
  input  logic             cin,
  output logic [WIDTH:0]   s
);

  always_comb begin
    s[WIDTH-1:0] = p ^ {c[WIDTH-2:0], cin};
    s[WIDTH]     = c[WIDTH-1];
  end

endmodule
