// tb_tan_denominator: drives random (tan(a) + b) sums and tan(c) words with a
// product below 1 and checks d = 1 - T * tan(c) against real arithmetic on the
// input words: relative error below 2^-30, normalized mantissa. Includes T = 0
// and c = 0 (d = 1) and products close to 1 (deep cancellation).
module tb_tan_denominator;
  import tan_pkg::*;

  logic [T_W-1:0]    t_sum;
  tanc_t             tan_c;
  logic [MANT_W-1:0] d_mant;
  logic [5:0]        d_lz;

  tan_denominator dut (.t_sum, .tan_c, .d_mant, .d_lz);

  int checks = 0, failures = 0, deep = 0;

  initial begin
    for (int i = 0; i < 50000; i++) begin
      real tv, tc, dref, dv;
      int  ce, dl;
      do begin
        t_sum = T_W'({$urandom, $urandom}) >> $urandom_range(1, 12);
        if (i % 7 == 0) t_sum = '0;
        if (i % 11 == 0) tan_c = '0;
        else begin
          tan_c.exp  = TC_EXP_W'($urandom_range(0, 19));
          tan_c.mant = {1'b1, 28'($urandom)};
        end
        tv = real'(t_sum) * (2.0 ** -45);
        ce = int'(tan_c.exp);
        tc = real'(tan_c[TC_MANT_W-1:0]) * (2.0 ** (ce - 36));
      end while (tv * tc > 0.97);
      #1;
      dref = 1.0 - tv * tc;
      dl   = int'(d_lz);
      dv   = real'(d_mant) * (2.0 ** (-35 - dl));
      if (d_lz >= 3) deep++;
      checks++;
      if (!d_mant[MANT_W-1] || (dv - dref) > dref * 2.0 ** -30 || (dref - dv) > dref * 2.0 ** -30) begin
        failures++;
        if (failures < 10) $display("FAIL d %e vs %e", dv, dref);
      end
    end
    checks++;
    if (deep == 0) begin
      failures++;
      $display("FAIL no deep cancellation exercised");
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
