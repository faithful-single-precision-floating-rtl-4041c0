// tb_tan_pio2_rom: reads all 256 words of the near-pi/2 table and checks each
// against $tan of the corresponding binary32 argument (0x3FC90EDC + index):
// within half an ulp (correct rounding of the double reference), with the
// sign of the last word negative since that float lies just above pi/2.
module tb_tan_pio2_rom;
  import tan_pkg::*;
  import tan_ref_pkg::*;

  logic        clk = 1'b0;
  logic        en = 1'b1;
  logic [7:0]  addr = '0;
  logic [31:0] q;

  tan_pio2_rom dut (.clk, .en, .addr, .q);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    for (int i = 0; i < 256; i++) begin
      real t, e;
      addr <= 8'(i);
      @(posedge clk);
      #1;
      checks++;
      t = $tan(f32_to_real(32'h3FC9_0EDC + 32'(i)));
      e = ulp_err(q, t);
      if (e > 0.5 + 1e-6 || q[31] != (t < 0.0)) begin
        failures++;
        $display("FAIL word %0d: %h vs %e (%f ulp)", i, q, t, e);
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
