// tb_tan_recip: streams one operand per cycle through the pipelined reciprocal
// and checks each result against q = floor(2^71 / d)
// computed exactly with wide integer division in the testbench. Covers random
// normalized 36-bit mantissas, the edge values 2^35 + 1 and 2^36 - 1, and the
// saturation q = 2^36 - 1 at d = 2^35. An operand driven after clock edge k is
// registered at edge k+1, so its quotient is sampled at edge k+1+STAGES.
module tb_tan_recip;
  import tan_pkg::*;

  localparam int unsigned STAGES = 12;

  logic              clk = 1'b0;
  logic [MANT_W-1:0] d_mant = '0, q;

  tan_recip dut (.clk, .d_mant, .q);   // default STAGES = 12

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [MANT_W-1:0] sent [$];
  int                sent_t [$];
  int                cycle = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (sent.size() > 0 && cycle - sent_t[0] == int'(STAGES) + 1) begin
      logic [71:0]       expq;
      logic [MANT_W-1:0] dv;
      dv = sent.pop_front();
      void'(sent_t.pop_front());
      expq = (72'd1 << 71) / 72'(dv);
      if (expq >= (72'd1 << 36)) expq = (72'd1 << 36) - 72'd1;
      checks++;
      if (72'(q) != expq) begin
        failures++;
        if (failures < 10) $display("FAIL d=%h q=%h exp=%h", dv, q, expq);
      end
    end
  end

  task automatic send(input logic [MANT_W-1:0] dv);
    d_mant <= dv;
    sent.push_back(dv);
    sent_t.push_back(cycle);
    @(posedge clk);
  endtask

  initial begin
    @(posedge clk);
    send(36'h8_0000_0000);
    send(36'h8_0000_0001);
    send(36'hF_FFFF_FFFF);
    for (int i = 0; i < 50000; i++)
      send({1'b1, 35'({$urandom, $urandom})});
    repeat (STAGES + 2) @(posedge clk);
    checks++;
    if (sent.size() != 0) begin
      failures++;
      $display("FAIL %0d results never checked", sent.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
