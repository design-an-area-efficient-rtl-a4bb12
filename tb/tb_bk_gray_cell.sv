// tb_bk_gray_cell: exhaustive check of the gray (generate-only) cell.
// All 8 combinations of the group pair and the incoming generate are applied;
// the expected output is the carry that leaves the group: the group's own
// generate, or the incoming one if the group propagates it.
module tb_bk_gray_cell;
  import bk_pkg::*;

  gp_t  hi;
  logic g_lo, g_out;
  int checks = 0, failures = 0;

  bk_gray_cell dut (.hi(hi), .g_lo(g_lo), .g_out(g_out));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      logic exp;
      {hi.g, hi.p, g_lo} = 3'(k);
      #1;
      exp = hi.g ? 1'b1 : (hi.p ? g_lo : 1'b0);
      checks++;
      if (g_out !== exp) begin
        failures++;
        $display("FAIL hi=%b g_lo=%b g_out=%b expected %b", hi, g_lo, g_out, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
