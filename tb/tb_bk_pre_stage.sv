// tb_bk_pre_stage: exhaustive check of the pre-processing stage at 8 bits.
// Every operand pair is applied. The expected generate and propagate of each
// bit come from the arithmetic sum of the two bits: generate when the bit sum
// is 2, propagate when it is exactly 1.
module tb_bk_pre_stage;
  localparam int W = 8;

  logic [W-1:0] a, b, p, g;
  int checks = 0, failures = 0;

  bk_pre_stage #(.WIDTH(W)) dut (.a(a), .b(b), .p(p), .g(g));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << W); i++) begin
      for (int j = 0; j < (1 << W); j++) begin
        logic [W-1:0] ep, eg;
        a = W'(i);
        b = W'(j);
        #1;
        for (int k = 0; k < W; k++) begin
          int bitsum;
          bitsum = int'(a[k]) + int'(b[k]);
          eg[k] = (bitsum == 2);
          ep[k] = (bitsum == 1);
        end
        checks++;
        if (p !== ep || g !== eg) begin
          failures++;
          if (failures < 10)
            $display("FAIL a=%h b=%h p=%b g=%b expected p=%b g=%b", a, b, p, g, ep, eg);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
