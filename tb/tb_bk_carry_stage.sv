// tb_bk_carry_stage: check of the 8-bit carry generation stage.
//
// 1. Two reference vectors with known group signals (0xCC + 0x2A and
//    0x35 + 0x2D, carry input 0) are checked signal by signal.
// 2. Every a, b and cin (2^17 cases) is applied. Bit propagate/generate are
//    formed here from a and b; the expected group pairs of the tree levels
//    are worked out by rippling a carry through the group's bits, and the
//    expected carries c[i] by rippling cin through bits 0..i.
module tb_bk_carry_stage;
  logic [7:0] a, b, p, g, c;
  logic       cin;
  logic [4:0] u, v;
  logic [2:0] x, t;
  logic [3:0] m, n;
  int checks = 0, failures = 0;

  bk_carry_stage dut (
    .p(p), .g(g), .cin(cin),
    .u(u), .v(v), .x(x), .t(t), .m(m), .n(n), .c(c)
  );

  // Group generate of bits hi..lo: carry out of bit hi with no carry into lo.
  function automatic logic grp_g(logic [7:0] aa, logic [7:0] bb, int hi, int lo);
    int carry = 0;
    for (int k = lo; k <= hi; k++)
      carry = (int'(aa[k]) + int'(bb[k]) + carry) >= 2 ? 1 : 0;
    return 1'(carry);
  endfunction

  // Group propagate of bits hi..lo: a carry into lo reaches out of hi on its
  // own, i.e. every bit sum is exactly 1.
  function automatic logic grp_p(logic [7:0] aa, logic [7:0] bb, int hi, int lo);
    for (int k = lo; k <= hi; k++)
      if (int'(aa[k]) + int'(bb[k]) != 1) return 1'b0;
    return 1'b1;
  endfunction

  task automatic apply(logic [7:0] aa, logic [7:0] bb, logic ci);
    a = aa; b = bb; cin = ci;
    for (int k = 0; k < 8; k++) begin
      p[k] = (int'(aa[k]) + int'(bb[k])) == 1;
      g[k] = (int'(aa[k]) + int'(bb[k])) == 2;
    end
    #1;
  endtask

  task automatic expect_eq(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s a=%h b=%h cin=%b got=%b expected=%b", what, a, b, cin, got, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // reference vectors
    apply(8'hCC, 8'h2A, 1'b0);
    expect_eq("u", 8'(u), 8'b10010);
    expect_eq("v", 8'(v), 8'b00100);
    expect_eq("x", 8'(x), 8'b000);
    expect_eq("t", 8'(t), 8'b010);
    expect_eq("m", 8'(m), 8'b0000);
    expect_eq("n", 8'(n), 8'b0000);
    expect_eq("c", c, 8'b00001000);
    apply(8'h35, 8'h2D, 1'b0);
    expect_eq("u", 8'(u), 8'b00000);
    expect_eq("v", 8'(v), 8'b01110);
    expect_eq("x", 8'(x), 8'b000);
    expect_eq("t", 8'(t), 8'b011);
    expect_eq("m", 8'(m), 8'b0000);
    expect_eq("n", 8'(n), 8'b0011);
    expect_eq("c", c, 8'b00111101);

    // exhaustive
    for (int ci = 0; ci < 2; ci++) begin
      for (int i = 0; i < 256; i++) begin
        for (int j = 0; j < 256; j++) begin
          logic [7:0] eu, ev, ex, et, em, en, ec;
          int carry;
          apply(8'(i), 8'(j), 1'(ci));
          eu = '0; ev = '0; ex = '0; et = '0; em = '0; en = '0;
          eu[0] = grp_p(a, b, 1, 0); ev[0] = grp_g(a, b, 1, 0);
          eu[1] = grp_p(a, b, 2, 2); ev[1] = grp_g(a, b, 2, 2);
          eu[2] = grp_p(a, b, 3, 2); ev[2] = grp_g(a, b, 3, 2);
          eu[3] = grp_p(a, b, 5, 4); ev[3] = grp_g(a, b, 5, 4);
          eu[4] = grp_p(a, b, 7, 6); ev[4] = grp_g(a, b, 7, 6);
          ex[0] = grp_p(a, b, 2, 0); et[0] = grp_g(a, b, 2, 0);
          ex[1] = grp_p(a, b, 3, 0); et[1] = grp_g(a, b, 3, 0);
          ex[2] = grp_p(a, b, 7, 4); et[2] = grp_g(a, b, 7, 4);
          for (int k = 0; k < 4; k++) begin
            em[k] = grp_p(a, b, k + 4, 0);
            en[k] = grp_g(a, b, k + 4, 0);
          end
          carry = ci;
          for (int k = 0; k < 8; k++) begin
            carry = (int'(a[k]) + int'(b[k]) + carry) >= 2 ? 1 : 0;
            ec[k] = 1'(carry);
          end
          expect_eq("u", 8'(u), eu);
          expect_eq("v", 8'(v), ev);
          expect_eq("x", 8'(x), ex);
          expect_eq("t", 8'(t), et);
          expect_eq("m", 8'(m), em);
          expect_eq("n", 8'(n), en);
          expect_eq("c", c, ec);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
