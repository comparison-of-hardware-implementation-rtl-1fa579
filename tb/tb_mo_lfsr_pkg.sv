// tb_mo_lfsr_pkg: checks the polynomial helpers against hand-worked values
// for the seven evaluated polynomials: length N, first tap k1, number of
// Katti groups ceil(N/k1), Lowy period N/gcd(N,k1), plus the flip-flop map
// s[m] -> flip-flop N - (m mod N) and a case with gcd(N,k1) > 1.
module tb_mo_lfsr_pkg;
  import mo_lfsr_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  poly_t p[7];
  int n[7]  = '{5, 16, 15, 25, 31, 33, 39};
  int k[7]  = '{2, 3, 14, 8, 12, 4, 4};
  int g[7]  = '{3, 6, 2, 4, 3, 9, 10};

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    p[0] = 64'h25;
    p[1] = 64'h1_0009;
    p[2] = 64'hC001;
    p[3] = 64'h210_1101;
    p[4] = 64'h8101_1001;
    p[5] = 64'h2_1100_0011;
    p[6] = 64'h90_1000_0011;
    check("POLY_X5_X2", POLY_X5_X2 == p[0]);
    for (int i = 0; i < 7; i++) begin
      check($sformatf("degree %0d", i), poly_degree(p[i]) == n[i]);
      check($sformatf("k1 %0d", i), poly_k1(p[i]) == k[i]);
      check($sformatf("groups %0d", i), katti_groups(p[i]) == g[i]);
      check($sformatf("lowy period %0d", i), lowy_period(p[i]) == n[i]);
    end
    // 1 + x^2 + x^6: gcd 2, Lowy map repeats after 3 XOR phases
    check("gcd", gcd(6, 2) == 2 && gcd(39, 4) == 1 && gcd(12, 18) == 6);
    check("period with gcd 2", lowy_period(64'h45) == 3);
    check("ff_of s0", ff_of(0, 5) == 5);
    check("ff_of s4", ff_of(4, 5) == 1);
    check("ff_of s7", ff_of(7, 5) == 3);
    check("ff_of s39", ff_of(39, 39) == 39);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
