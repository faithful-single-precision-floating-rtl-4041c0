// tb_fp_tan_eq56: runs fp_tan with TAB_CORR = 0, i.e. with the numerator and
// denominator formed exactly as n = tan(c) + tan(a) + b and
// d = 1 - (tan(a) + b) tan(c), without the tan(a)^2 b term.
//
// Arguments are drawn from the upper main range (x >= 1.4), where the
// denominator cancels. The test checks that every result stays within 5 ulp
// of a double-precision $tan reference, that results arrive LATENCY cycles
// after their arguments, and that at least one result is off by more than
// 1 ulp: this is the accuracy loss the default TAB_CORR = 1 removes. It reports
// the largest error seen.
module tb_fp_tan_eq56;
  import tan_pkg::*;
  import tan_ref_pkg::*;

  localparam int unsigned LAT = 30;
  localparam int          N   = 100000;

  logic        clk = 1'b0;
  logic        rst_n = 1'b1;   // falls at time 1 so the asynchronous reset sees an edge
  logic        in_valid = 1'b0;
  logic [31:0] x = '0;
  logic        out_valid;
  logic [31:0] r;

  fp_tan #(.LATENCY(LAT), .TAB_CORR(1'b0)) dut (.clk, .rst_n, .in_valid, .x, .out_valid, .r);

  always #5 clk = ~clk;

  int     checks = 0, failures = 0, over1 = 0;
  longint cycle = 0;
  real    max_err = 0.0;
  logic [31:0] q_x[$];
  longint      q_t[$];

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (out_valid) begin
    logic [31:0] xi;
    real         e;
    if (q_x.size() == 0) begin
      failures++;
      $display("FAIL unexpected output");
      xi = '0;
    end else begin
      xi = q_x.pop_front();
      checks++;
      if (cycle - q_t.pop_front() != longint'(LAT)) begin
        failures++;
        $display("FAIL latency");
      end
      e = ulp_err(r, $tan(f32_to_real(xi)));
      if (e > max_err) max_err = e;
      if (e >= 1.0) over1++;
      checks++;
      if (!(e < 5.0)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h r=%h err=%f ulp", xi, r, e);
      end
    end
  end

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < N; i++) begin
      logic [31:0] xv;
      // 0x3FB33333 ~ 1.4 up to the last float before the pi/2 window
      xv = {$urandom_range(0, 1) == 1, 31'($urandom_range(32'h3FB3_3333, 32'h3FC9_0EDB))};
      in_valid <= 1'b1;
      x        <= xv;
      q_x.push_back(xv);
      q_t.push_back(cycle + 1);
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (over1 == 0) begin
      failures++;
      $display("FAIL no result beyond 1 ulp: the uncorrected equations were not exercised");
    end
    $display("max error %f ulp, %0d results at or beyond 1 ulp", max_err, over1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd10 * 64'(N + 1000));
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
