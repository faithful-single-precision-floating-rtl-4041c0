// tb_tan_numerator: drives random tan(a), b and tan(c) words and checks
//   t_sum = tan(a) + b + tan(a)^2 b   (to within 2^-43 absolute)
//   n     = tan(c) + t_sum            (to within 2^-34 relative + 2^-43)
// using real arithmetic on the input words, plus that n_mant is normalized.
// Covers c = 0 (all-zero table word) and every tan(c) exponent.
module tb_tan_numerator;
  import tan_pkg::*;

  logic [TA_W-1:0]   tan_a;
  logic [B_W-1:0]    b;
  tanc_t             tan_c;
  logic [T_W-1:0]    t_sum;
  logic [MANT_W-1:0] n_mant;
  logic signed [7:0] n_exp;

  tan_numerator dut (.tan_a, .b, .tan_c, .t_sum, .n_mant, .n_exp);

  int checks = 0, failures = 0;

  initial begin
    for (int i = 0; i < 50000; i++) begin
      real ta, bv, tc, tref, nref, nv, ts, tol;
      int  ce, ne;
      tan_a = TA_W'({$urandom, $urandom}) >> $urandom_range(0, 9);
      if (tan_a[TA_W-1 -: 2] == 2'b11) tan_a[TA_W-1] = 1'b0;   // tan(a) < 2^-8
      b     = B_W'($urandom);
      if (i % 5 == 0) tan_c = '0;
      else begin
        tan_c.exp  = TC_EXP_W'($urandom_range(0, 19));
        tan_c.mant = {1'b1, 28'($urandom)};
      end
      #1;
      ta   = real'(tan_a) * (2.0 ** -45);
      bv   = real'(b) * (2.0 ** -35);
      ce   = int'(tan_c.exp);
      tc   = real'(tan_c[TC_MANT_W-1:0]) * (2.0 ** (ce - 36));
      tref = ta + bv + ta * ta * bv;
      nref = tc + tref;
      ts   = real'(t_sum) * (2.0 ** -45);
      ne   = int'(n_exp);
      nv   = real'(n_mant) * (2.0 ** (ne - 35));
      checks++;
      if ((ts - tref) > 2.0 ** -43 || (tref - ts) > 2.0 ** -43) begin
        failures++;
        if (failures < 10) $display("FAIL t_sum %e vs %e", ts, tref);
      end
      tol  = nref * (2.0 ** -34) + 2.0 ** -43;
      checks++;
      if (!n_mant[MANT_W-1] || (nv - nref) > tol || (nref - nv) > tol) begin
        failures++;
        if (failures < 10) $display("FAIL n %e vs %e", nv, nref);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
