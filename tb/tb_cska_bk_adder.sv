// tb_cska_bk_adder: end-to-end check of the 8-bit adder at its default size.
//
// Applies two reference additions (0xCC + 0x2A = 0x0F6, 0x35 + 0x2D = 0x062)
// and then every a, b and cin (2^17 cases), comparing the 9-bit sum with the
// integer a + b + cin. The adder is combinational, so each result is sampled
// 1 time unit after the inputs change. It also counts how often the adder's
// mechanisms were exercised and fails if one never was:
//   carry_out   the sum overflows 8 bits (s[8] = 1)
//   cin_skip    cin = 1 and every bit propagates, so the carry input passes
//               the whole word through the last gray-cell row
//   cin_select  cin changes a carry that the tree alone (cin = 0) would give
//   long_gen    a carry generated in bit 0 reaches bit 7
module tb_cska_bk_adder;
  logic [7:0] a, b;
  logic       cin;
  logic [8:0] s;
  int checks = 0, failures = 0;
  int n_carry_out = 0, n_cin_skip = 0, n_cin_select = 0, n_long_gen = 0;

  cska_bk_adder dut (.a(a), .b(b), .cin(cin), .s(s));

  task automatic check_add(logic [7:0] aa, logic [7:0] bb, logic ci);
    int exp;
    a = aa; b = bb; cin = ci;
    #1;
    exp = int'(aa) + int'(bb) + int'(ci);
    checks++;
    if (int'(s) != exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL a=%h b=%h cin=%b s=%h expected %h", aa, bb, ci, s, 9'(exp));
    end
    if (s[8]) n_carry_out++;
    if (ci && ((aa ^ bb) == 8'hFF)) n_cin_skip++;
    if (ci && (((int'(aa) + int'(bb)) ^ exp) & ~1) != 0) n_cin_select++;
    if (aa[0] && bb[0] && ((aa[7:1] ^ bb[7:1]) == 7'h7F)) n_long_gen++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_add(8'hCC, 8'h2A, 1'b0);
    check_add(8'h35, 8'h2D, 1'b0);
    for (int ci = 0; ci < 2; ci++)
      for (int i = 0; i < 256; i++)
        for (int j = 0; j < 256; j++)
          check_add(8'(i), 8'(j), 1'(ci));
    $display("carry_out=%0d cin_skip=%0d cin_select=%0d long_gen=%0d",
             n_carry_out, n_cin_skip, n_cin_select, n_long_gen);
    checks += 4;
    if (n_carry_out == 0)  failures++;
    if (n_cin_skip == 0)   failures++;
    if (n_cin_select == 0) failures++;
    if (n_long_gen == 0)   failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
