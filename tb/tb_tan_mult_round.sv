// tb_tan_mult_round: checks the final product, normalization and rounding.
// The reference forms the exact 72-bit product, finds its leading one, and
// rounds the top 24 bits to nearest-even by comparing the discarded part with
// half an LSB; the exponent is n_exp + d_lz - 1 + position + 127. Random
// mantissas exercise both positions of the normalization mux; a directed
// all-ones case exercises the rounding carry.
module tb_tan_mult_round;
  import tan_pkg::*;

  logic [MANT_W-1:0] n_mant, q;
  logic signed [7:0] n_exp;
  logic [5:0]        d_lz;
  logic [30:0]       mag;
  logic              norm_hi;

  tan_mult_round dut (.n_mant, .n_exp, .q, .d_lz, .mag, .norm_hi);

  int checks = 0, failures = 0, n_hi = 0, n_lo = 0;

  task automatic check_one(input logic [MANT_W-1:0] nm, input logic [MANT_W-1:0] qq,
                           input int ne, input int lz);
    logic [71:0] p, rest, half;
    int          top, ex;
    logic [24:0] sig;
    logic [30:0] emag;
    n_mant = nm; q = qq; n_exp = 8'(ne); d_lz = 6'(lz);
    #1;
    p   = 72'(nm) * 72'(qq);
    top = 0;
    for (int k = 0; k < 72; k++) if (p[k]) top = k;
    sig  = 25'(p >> (top - 23));
    rest = p & ((72'd1 << (top - 23)) - 72'd1);
    half = 72'd1 << (top - 24);
    if (rest > half || (rest == half && sig[0])) sig = sig + 25'd1;
    ex = ne + lz - 1 + (top - 70) + 127;
    if (sig[24]) begin
      sig = sig >> 1;
      ex  = ex + 1;
    end
    emag = {8'(ex), sig[22:0]};
    if (top == 71) n_hi++; else n_lo++;
    checks++;
    if (mag != emag) begin
      failures++;
      if (failures < 10) $display("FAIL n=%h q=%h got %h exp %h", nm, qq, mag, emag);
    end
  endtask

  initial begin
    check_one('1, '1, 0, 0);
    check_one({1'b1, 35'd0}, {1'b1, 35'd0}, -3, 2);
    check_one(36'hF_FFFF_FF80, {1'b1, 35'd0}, 1, 1);    // rounds up into next binade
    for (int i = 0; i < 50000; i++)
      check_one({1'b1, 35'({$urandom, $urandom})}, {1'b1, 35'({$urandom, $urandom})},
                int'($urandom_range(0, 24)) - 12, int'($urandom_range(0, 8)));
    checks++;
    if (n_hi == 0 || n_lo == 0) begin
      failures++;
      $display("FAIL normalization mux not exercised both ways");
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
