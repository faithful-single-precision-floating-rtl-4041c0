// tb_tan_c_rom: reads every word of the tan(c) table and compares it with a
// double-precision $tan(c/256): the mantissa must carry its leading one, the
// value must be within half a mantissa LSB of the reference, word 0 and the
// words past pi/2 must be zero, and data must appear one cycle after the
// address (registered read) and hold while the enable is low.
module tb_tan_c_rom;
  import tan_pkg::*;

  logic           clk = 1'b0;
  logic           en = 1'b1;
  logic [C_W-1:0] addr = '0;
  tanc_t          q;

  tan_c_rom dut (.clk, .en, .addr, .q);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    for (int i = 0; i < 2**C_W; i++) begin
      real t, v, lsb;
      int  qe;
      addr <= C_W'(i);
      @(posedge clk);
      #1;
      checks++;
      t = $tan(real'(i) / 256.0);
      if (i == 0 || real'(i) / 256.0 > 1.5707963267948966) begin
        if (q != '0) begin
          failures++;
          $display("FAIL word %0d not zero", i);
        end
      end else begin
        qe  = int'(q.exp);
        v   = real'(q[TC_MANT_W-1:0]) * (2.0 ** (qe - 36));
        lsb = 2.0 ** (qe - 36);
        if (!q.mant[TC_MANT_W-1] || (v - t) > 0.5 * lsb + 1e-30 || (t - v) > 0.5 * lsb + 1e-30) begin
          failures++;
          $display("FAIL word %0d: %e vs %e", i, v, t);
        end
      end
    end
    // enable low holds the last word
    begin
      tanc_t held;
      held = q;
      en   <= 1'b0;
      addr <= 9'd5;
      @(posedge clk);
      #1;
      checks++;
      if (q != held) begin
        failures++;
        $display("FAIL enable");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
