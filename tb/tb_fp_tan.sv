// tb_fp_tan: end-to-end test of the pipelined binary32 tangent at its default
// parameters (LATENCY = 30).
//
// Streams arguments one per cycle, with random idle cycles, through fp_tan and
// checks every result against a double-precision $tan reference: main-path
// results must be within 1 ulp (faithful rounding), tiny arguments must come
// back unchanged, the near-pi/2 window within 1 ulp, and out-of-range inputs
// must give a quiet NaN. It also checks that each result appears exactly
// LATENCY cycles after its argument, and counts how often each mechanism of the
// design was exercised (tiny bypass, pi/2 table, NaN, negative argument, c = 0,
// both positions of the final normalization mux, a rounding carry, a deep
// denominator cancellation); a mechanism never seen counts as a failure.
module tb_fp_tan;
  import tan_pkg::*;
  import tan_ref_pkg::*;

  localparam int unsigned LAT = 30;
  localparam int          N   = 400000;

  logic        clk = 1'b0;
  logic        rst_n = 1'b1;   // falls at time 1 so the asynchronous reset sees an edge
  logic        in_valid = 1'b0;
  logic [31:0] x = '0;
  logic        out_valid;
  logic [31:0] r;

  fp_tan dut (.clk, .rst_n, .in_valid, .x, .out_valid, .r);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // scoreboard
  logic [31:0] q_x[$];
  longint      q_t[$];
  int n_main = 0, n_tiny = 0, n_pio2 = 0, n_nan = 0, n_neg = 0, n_c0 = 0;
  int n_hi = 0, n_lo = 0, n_rcarry = 0, n_cancel = 0;
  real max_err = 0.0;
  int seen [10];
  int max_dlz = 0;

  // mechanism monitors inside the datapath
  always @(posedge clk) if (rst_n) begin
    if (dut.side5.cls == CLS_MAIN && dut.vpipe[dut.CORE_STAGES-2]) begin
      if (dut.norm_hi_c) n_hi++; else n_lo++;
      if (dut.dlz5 >= 3) n_cancel++;
      if (int'(dut.dlz5) > max_dlz) max_dlz = int'(dut.dlz5);
      if (dut.u_mr.sig_r[WF+1]) n_rcarry++;
    end
  end

  task automatic check_out(input logic [31:0] xi, input logic [31:0] got);
    real xr, t, e;
    logic [30:0] mag;
    mag = xi[30:0];
    checks++;
    if (xi[30:23] == 8'hFF || mag > PIO2_BITS[30:0]) begin
      n_nan++;
      if (got != QNAN) begin
        failures++;
        $display("FAIL nan x=%h r=%h", xi, got);
      end
    end else if (xi[30:23] < 8'(MIN_EXP)) begin
      n_tiny++;
      if (got != xi) begin
        failures++;
        $display("FAIL tiny x=%h r=%h", xi, got);
      end
    end else begin
      xr = f32_to_real(xi);
      t  = $tan(xr);
      e  = ulp_err(got, t);
      if (mag >= PIO2_BITS[30:0] - 31'(PIO2_WIN - 1)) n_pio2++;
      else begin
        n_main++;
        if (xi[30:23] <= 8'd119) n_c0++;
        if (e > max_err) max_err = e;
      end
      if (xi[31]) n_neg++;
      if (!(e < 1.0)) begin
        failures++;
        if (failures < 20) $display("FAIL x=%h r=%h ref=%e err=%f ulp", xi, got, t, e);
      end
    end
  endtask

  always @(posedge clk) if (out_valid) begin
    logic [31:0] xi;
    longint      t0;
    if (q_x.size() == 0) begin
      failures++;
      $display("FAIL unexpected output");
    end else begin
      xi = q_x.pop_front();
      t0 = q_t.pop_front();
      checks++;
      if (cycle - t0 != longint'(LAT)) begin
        failures++;
        $display("FAIL latency %0d", cycle - t0);
      end
      check_out(xi, r);
    end
  end

  function automatic logic [31:0] gen_x(input int i);
    logic s;
    int   sel, e;
    logic [22:0] f;
    s   = 1'($urandom);
    sel = int'($urandom_range(0, 99));
    f   = 23'($urandom);
    if (sel < 55) begin                       // main range, any exponent 115..127
      e = int'($urandom_range(115, 127));
      if (e == 127 && {8'd127, f} >= PIO2_BITS[30:0] - 31'(PIO2_WIN)) f = 23'(f % 23'h490000);
      return {s, 8'(e), f};
    end else if (sel < 75) begin               // just below the pi/2 window
      return {s, PIO2_BITS[30:0] - 31'(PIO2_WIN) - 31'($urandom_range(0, 20000))};
    end else if (sel < 85) begin               // near the top of the main range, c = 402
      return {s, 8'd127, 23'h490000 + 23'($urandom_range(0, 32'h0EDB))};
    end else if (sel < 90) begin               // pi/2 window
      return {s, PIO2_BITS[30:0] - 31'($urandom_range(0, PIO2_WIN - 1))};
    end else if (sel < 95) begin               // tiny, zero, subnormal
      return {s, 8'($urandom_range(0, 114)), f};
    end else begin                             // out of range, inf, NaN
      case ($urandom_range(0, 3))
        0: return {s, 8'hFF, 23'd0};
        1: return {s, 8'hFF, f | 23'd1};
        2: return {s, PIO2_BITS[30:0] + 31'($urandom_range(1, 1000))};
        default: return {s, 8'($urandom_range(128, 254)), f};
      endcase
    end
  endfunction

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < N; ) begin
      if ($urandom_range(0, 9) == 0) begin
        in_valid <= 1'b0;
      end else begin
        logic [31:0] xv;
        // a few fixed points first: exact table boundaries, the last
        // main-path float before the pi/2 window, and a sweep around
        // 0x3EED6338, whose tangent lies within half an ulp below 0.5 and so
        // exercises the rounding carry into the next binade
        if (i < 4)
          xv = (i == 0) ? 32'h3F80_0000 : (i == 1) ? 32'h3C00_0000 :
               (i == 2) ? PIO2_BITS - 32'(PIO2_WIN) : 32'h3A00_0001;
        else if (i < 68)
          xv = 32'h3EED_6338 + 32'(i - 36);
        else
          xv = gen_x(i);
        in_valid <= 1'b1;
        x        <= xv;
        q_x.push_back(xv);
        q_t.push_back(cycle + 1);
        i++;
      end
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (q_x.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", q_x.size());
    end
    seen = '{n_main, n_tiny, n_pio2, n_nan, n_neg, n_c0, n_hi, n_lo, n_rcarry, n_cancel};
    $display("mechanisms: main=%0d tiny=%0d pio2=%0d nan=%0d neg=%0d c0=%0d norm_hi=%0d norm_lo=%0d round_carry=%0d cancel>=3=%0d",
             n_main, n_tiny, n_pio2, n_nan, n_neg, n_c0, n_hi, n_lo, n_rcarry, n_cancel);
    $display("max main-path error %f ulp, deepest denominator cancellation %0d bits", max_err, max_dlz);
    // every mechanism must have been exercised at least once
    foreach (seen[k]) begin
      checks++;
      if (seen[k] == 0) begin
        failures++;
        $display("FAIL mechanism %0d never exercised", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd10 * (N * 2 + 1000));
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
