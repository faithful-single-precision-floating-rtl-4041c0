// tb_tan_out_select: drives every input class with random data and checks the
// chosen word: signed datapath magnitude, unchanged input, table word with its
// sign flipped for negative arguments, or the quiet NaN.
module tb_tan_out_select;
  import tan_pkg::*;

  tan_class_e  cls;
  logic        sign;
  logic [31:0] x, pio2_word, r;
  logic [30:0] main_mag;

  tan_out_select dut (.cls, .sign, .x, .main_mag, .pio2_word, .r);

  int checks = 0, failures = 0;

  initial begin
    for (int i = 0; i < 4000; i++) begin
      logic [31:0] er;
      cls       = tan_class_e'(i % 4);
      x         = $urandom;
      sign      = x[31];
      main_mag  = 31'($urandom);
      pio2_word = $urandom;
      #1;
      case (i % 4)
        0:       er = {x[31], main_mag};
        1:       er = x;
        2:       er = {pio2_word[31] ^ x[31], pio2_word[30:0]};
        default: er = 32'h7FC0_0000;
      endcase
      checks++;
      if (r != er) begin
        failures++;
        if (failures < 10) $display("FAIL cls=%0d got %h exp %h", i % 4, r, er);
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
