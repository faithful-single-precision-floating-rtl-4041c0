// tb_tan_a_rom: reads every word of the tan(a) table and checks that
// word * 2^-45 is within half an LSB of $tan(a * 2^-17), that the read is
// registered (data one cycle after the address) and that a low enable holds it.
module tb_tan_a_rom;
  import tan_pkg::*;

  logic            clk = 1'b0;
  logic            en = 1'b1;
  logic [A_W-1:0]  addr = '0;
  logic [TA_W-1:0] q;

  tan_a_rom dut (.clk, .en, .addr, .q);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    for (int i = 0; i < 2**A_W; i++) begin
      real t, v;
      addr <= A_W'(i);
      @(posedge clk);
      #1;
      checks++;
      t = $tan(real'(i) * (2.0 ** -17));
      v = real'(q) * (2.0 ** -45);
      if ((v - t) > 2.0 ** -46 || (t - v) > 2.0 ** -46) begin
        failures++;
        $display("FAIL word %0d: %e vs %e", i, v, t);
      end
    end
    begin
      logic [TA_W-1:0] held;
      held = q;
      en   <= 1'b0;
      addr <= 9'd7;
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
