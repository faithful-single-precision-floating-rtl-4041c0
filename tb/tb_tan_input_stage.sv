// tb_tan_input_stage: checks the argument classifier and fixed-point converter.
//
// For random and boundary binary32 inputs it recomputes |x| * 2^35 from the
// real value, the expected c/a/b fields and the expected class from the real
// magnitude (tiny below 2^-12, the 256-float window ending at the float nearest
// pi/2, NaN beyond it), and compares them with the block's outputs.
module tb_tan_input_stage;
  import tan_pkg::*;
  import tan_ref_pkg::*;

  logic [31:0]      x;
  logic             sign;
  tan_class_e       cls;
  logic [FIX_W-1:0] xfix;
  logic [C_W-1:0]   c;
  logic [A_W-1:0]   a;
  logic [B_W-1:0]   b;
  logic [7:0]       idx;

  tan_input_stage dut (.x, .sign, .cls, .xfix, .c, .a, .b, .pio2_idx(idx));

  int checks = 0, failures = 0;

  task automatic check_one(input logic [31:0] xv);
    real        m;
    tan_class_e ecls;
    longint     efix;
    x = xv;
    #1;
    m = f32_to_real({1'b0, xv[30:0]});
    if (xv[30:23] == 8'hFF || m > f32_to_real(PIO2_BITS)) ecls = CLS_NAN;
    else if (m < 2.0 ** -12)                               ecls = CLS_TINY;
    else if (xv[30:0] > PIO2_BITS[30:0] - 31'd256)         ecls = CLS_PIO2;
    else                                                   ecls = CLS_MAIN;
    checks++;
    if (cls != ecls || sign != xv[31]) begin
      failures++;
      $display("FAIL class x=%h got %s exp %s", xv, cls.name(), ecls.name());
    end
    if (ecls == CLS_MAIN) begin
      efix = longint'(m * (2.0 ** 35));
      checks++;
      if (xfix != FIX_W'(efix) || c != C_W'(efix >> 27) || a != A_W'(efix >> 18) || b != B_W'(efix)) begin
        failures++;
        $display("FAIL fix x=%h got %h exp %h", xv, xfix, efix);
      end
    end
    if (ecls == CLS_PIO2) begin
      checks++;
      if (idx != 8'(xv[30:0] - (PIO2_BITS[30:0] - 31'd255))) begin
        failures++;
        $display("FAIL idx x=%h got %0d", xv, idx);
      end
    end
  endtask

  initial begin
    // boundaries
    check_one(32'h3980_0000);                 // 2^-12: first main-path exponent
    check_one(32'h397F_FFFF);                 // just below: tiny
    check_one(32'h0000_0000);
    check_one(32'h8000_0001);
    check_one(PIO2_BITS);
    check_one(PIO2_BITS + 32'd1);
    check_one(PIO2_BITS - 32'd255);
    check_one(PIO2_BITS - 32'd256);
    check_one(32'h7F80_0000);
    check_one(32'hFFC0_0001);
    check_one(32'h3F80_0000);
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] xv;
      xv = $urandom;
      if (i % 4 != 0) xv[30:23] = 8'($urandom_range(113, 128));
      if (i % 8 == 1) xv[30:0] = PIO2_BITS[30:0] - 31'($urandom_range(0, 600));
      check_one(xv);
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
