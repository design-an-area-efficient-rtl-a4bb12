// tb_bk_post_stage: check of the sum stage at 8 bits.
// For every a, b and cin the propagates and carries are formed here by
// ripple arithmetic (not by the adder's own carry stage) and fed to the block;
// its 9-bit output must equal the integer a + b + cin.
module tb_bk_post_stage;
  localparam int W = 8;

  logic [W-1:0] p, c;
  logic         cin;
  logic [W:0]   s;
  int checks = 0, failures = 0;

  bk_post_stage #(.WIDTH(W)) dut (.p(p), .c(c), .cin(cin), .s(s));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ci = 0; ci < 2; ci++) begin
      for (int i = 0; i < (1 << W); i++) begin
        for (int j = 0; j < (1 << W); j++) begin
          int carry;
          carry = ci;
          for (int k = 0; k < W; k++) begin
            int bs;
            bs = ((i >> k) & 1) + ((j >> k) & 1);
            p[k] = (bs == 1);
            carry = (bs + carry) >= 2 ? 1 : 0;
            c[k] = 1'(carry);
          end
          cin = 1'(ci);
          #1;
          checks++;
          if (int'(s) != i + j + ci) begin
            failures++;
            if (failures < 10)
              $display("FAIL a=%0d b=%0d cin=%0d s=%0d expected %0d", i, j, ci, s, i + j + ci);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
