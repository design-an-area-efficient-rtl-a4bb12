// bk_pre_stage: pre-processing stage of the Brent-Kung adder.
//
// Forms for every bit position i the bit propagate p[i] = a[i] ^ b[i] and the
// bit generate g[i] = a[i] & b[i]. p is taken as the XOR, so it serves both
// the carry tree and the final sum. One gate level, purely combinational.
// WIDTH defaults to the 8-bit adder.
module bk_pre_stage #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] p,
  output logic [WIDTH-1:0] g
);

  always_comb begin
    p = a ^ b;
    g = a & b;
  end

endmodule
