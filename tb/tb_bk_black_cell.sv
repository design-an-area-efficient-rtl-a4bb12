// tb_bk_black_cell: exhaustive check of the black (full prefix) cell.
// All 16 combinations of the two (G,P) input pairs are applied; the expected
// pair is worked out from what the combined group does with a carry: it
// generates one if the high part generates, or the high part propagates one
// the low part generates; it propagates only if both parts propagate.
module tb_bk_black_cell;
  import bk_pkg::*;

  gp_t hi, lo, out;
  int checks = 0, failures = 0;

  bk_black_cell dut (.hi(hi), .lo(lo), .out(out));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 16; k++) begin
      logic exp_g, exp_p;
      {hi.g, hi.p, lo.g, lo.p} = 4'(k);
      #1;
      exp_g = (hi.g == 1'b1) ? 1'b1 : ((hi.p == 1'b1) ? lo.g : 1'b0);
      exp_p = (hi.p == 1'b1) && (lo.p == 1'b1);
      checks++;
      if (out.g !== exp_g || out.p !== exp_p) begin
        failures++;
        $display("FAIL hi=%b lo=%b out=%b expected g=%b p=%b", hi, lo, out, exp_g, exp_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
