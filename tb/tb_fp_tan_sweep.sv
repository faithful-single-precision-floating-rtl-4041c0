// tb_fp_tan_sweep: exhaustive check of fp_tan (default parameters) over the
// 2^24 consecutive positive binary32 arguments that end at 0x3FC90EDB, the last
// argument before the pi/2 table window (x from about 0.39 to pi/2 - 256 ulp).
// This is the region where the denominator cancels and where accuracy is
// hardest to hold. Every result must be within 1 ulp of a double-precision
// $tan reference and arrive exactly 30 cycles after its argument; arguments
// are streamed back to back, one per cycle. The largest error is reported.
module tb_fp_tan_sweep;
  import tan_pkg::*;
  import tan_ref_pkg::*;

  localparam int unsigned LAT   = 30;
  localparam int unsigned COUNT = 1 << 24;
  localparam logic [31:0] LAST  = PIO2_BITS - 32'(PIO2_WIN);   // 0x3FC90EDB

  logic        clk = 1'b0;
  logic        rst_n = 1'b1;   // falls at time 1 so the asynchronous reset sees an edge
  logic        in_valid = 1'b0;
  logic [31:0] x = '0;
  logic        out_valid;
  logic [31:0] r;

  fp_tan dut (.clk, .rst_n, .in_valid, .x, .out_valid, .r);

  always #5 clk = ~clk;

  int          checks = 0, failures = 0, received = 0;
  real         max_err = 0.0;
  logic [31:0] max_x = '0;
  // results come back in order, so the expected argument is a counter
  logic [31:0] next_expect = LAST - 32'(COUNT - 1);
  longint      cycle = 0, t_in = -1, t_out = -1;

  // first accepted argument and first result, sampled on the same edges
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (in_valid && t_in < 0)   t_in  <= cycle;
    if (out_valid && t_out < 0) t_out <= cycle;
  end

  always @(posedge clk) if (out_valid) begin
    real e;
    e = ulp_err(r, $tan(f32_to_real(next_expect)));
    if (e > max_err) begin
      max_err = e;
      max_x   = next_expect;
    end
    checks++;
    if (!(e < 1.0)) begin
      failures++;
      if (failures < 10) $display("FAIL x=%h r=%h err=%f ulp", next_expect, r, e);
    end
    next_expect <= next_expect + 32'd1;
    received    <= received + 1;
  end

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    in_valid <= 1'b1;
    for (int i = 0; i < int'(COUNT); i++) begin
      x <= LAST - 32'(COUNT - 1) + 32'(i);
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (t_out - t_in != longint'(LAT)) begin
      failures++;
      $display("FAIL first result after %0d cycles", t_out - t_in);
    end
    checks++;
    if (received != int'(COUNT)) begin
      failures++;
      $display("FAIL %0d of %0d results", received, COUNT);
    end
    $display("swept %0d arguments, max error %f ulp at x=%h", received, max_err, max_x);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd10 * (64'(COUNT) + 1000));
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
