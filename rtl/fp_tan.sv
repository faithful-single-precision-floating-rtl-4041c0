// fp_tan: pipelined binary32 tangent for arguments in [-pi/2, pi/2], faithfully
// rounded (error below 1 ulp).
//
// The argument's magnitude is turned into a 36-bit fixed-point word and split
// into three fields, x = c + a + b (9, 9 and 18 bits). tan(c) and tan(a) come
// from two 512-word tables and tan(b) is taken as b. The result is
//     tan(x) = n / d,  n = tan(c) + tan(a) + b,  d = 1 - (tan(a) + b) tan(c),
// evaluated as n times the reciprocal of d and rounded to nearest. With
// TAB_CORR = 1 (default) tan(a) + b carries the extra term tan(a)^2 * b, which
// keeps the error below 1 ulp next to pi/2 (see tan_numerator). Arguments
// below 2^-12 return x itself, the 256 floats ending at pi/2 read a third table,
// and NaN, infinity or |x| > pi/2 give a quiet NaN. tan(-x) = -tan(x).
//
// Pipeline (one result per cycle, no stalls):
//   1  input register
//   2  classify / fixed-point conversion, registered table reads
//   3  numerator n (and the shared sum tan(a) + b)
//   4  denominator d
//   5 .. 4+RECIP_STAGES  reciprocal 1/d (3 quotient bits per stage by default)
//   5+RECIP_STAGES       multiply, round, exception handling, final multiplexer
//   then LATENCY - 5 - RECIP_STAGES balancing registers (13 by default, at the
//   output, for retiming into the multipliers), so `r` follows `x` by exactly
//   LATENCY cycles (30 by default, the latency reported for the published
//   implementation; how those cycles are spread over the operators is this
//   design's choice). `out_valid` follows `in_valid` with the same delay.
// Interface: synchronous to `clk`, active-low asynchronous reset of the valid
// chain only.
module fp_tan
  import tan_pkg::*;
#(
  parameter int unsigned LATENCY  = 30,
  parameter bit          TAB_CORR = 1'b1,  // see tan_numerator
  parameter int unsigned RECIP_STAGES = 12  // pipeline depth of the reciprocal
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] x,
  output logic        out_valid,
  output logic [31:0] r
);
  localparam int unsigned CORE_STAGES = 5 + RECIP_STAGES;

  typedef struct packed {
    tan_class_e  cls;
    logic        sign;
    logic [31:0] x;
  } side_t;

  // ---- stage 1: input register ------------------------------------------
  logic [31:0] x1;
  logic [CORE_STAGES-1:0] vpipe;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[CORE_STAGES-2:0], in_valid};

  always_ff @(posedge clk) x1 <= x;

  // ---- stage 2: classify, convert, read tables ---------------------------
  side_t          side1, side2, side3, side4, side5;
  logic [C_W-1:0] c1;
  logic [A_W-1:0] a1;
  logic [B_W-1:0] b1, b2;
  logic [FIX_W-1:0] xfix1;
  logic [7:0]     idx1;
  tanc_t          tanc2, tanc3;
  logic [TA_W-1:0] tana2;
  logic [31:0]    pio2_2, pio2_3, pio2_4, pio2_5;

  tan_input_stage u_in (
    .x(x1), .sign(side1.sign), .cls(side1.cls), .xfix(xfix1),
    .c(c1), .a(a1), .b(b1), .pio2_idx(idx1)
  );
  assign side1.x = x1;

  tan_c_rom    u_tanc (.clk, .en(1'b1), .addr(c1),   .q(tanc2));
  tan_a_rom    u_tana (.clk, .en(1'b1), .addr(a1),   .q(tana2));
  tan_pio2_rom u_pio2 (.clk, .en(1'b1), .addr(idx1), .q(pio2_2));

  always_ff @(posedge clk) begin
    side2 <= side1;
    b2    <= b1;
  end

  // ---- stage 3: numerator ---------------------------------------------------
  logic [T_W-1:0]          tsum_c, tsum3;
  logic [MANT_W-1:0]       nm_c, nm3, nm4, nm5;
  logic signed [7:0]       ne_c, ne3, ne4, ne5;

  tan_numerator #(.TAB_CORR(TAB_CORR)) u_num (
    .tan_a(tana2), .b(b2), .tan_c(tanc2),
    .t_sum(tsum_c), .n_mant(nm_c), .n_exp(ne_c)
  );

  always_ff @(posedge clk) begin
    side3  <= side2;
    tsum3  <= tsum_c;
    tanc3  <= tanc2;
    nm3    <= nm_c;
    ne3    <= ne_c;
    pio2_3 <= pio2_2;
  end

  // ---- stage 4: denominator ---------------------------------------------
  logic [MANT_W-1:0] dm_c, dm4;
  logic [5:0]        dlz_c, dlz4, dlz5;

  tan_denominator u_den (.t_sum(tsum3), .tan_c(tanc3), .d_mant(dm_c), .d_lz(dlz_c));

  always_ff @(posedge clk) begin
    side4  <= side3;
    dm4    <= dm_c;
    dlz4   <= dlz_c;
    nm4    <= nm3;
    ne4    <= ne3;
    pio2_4 <= pio2_3;
  end

  // ---- stages 5 .. 4+RECIP_STAGES: reciprocal ---------------------------
  // everything else waits alongside the reciprocal pipeline
  localparam int unsigned SB_W = $bits(side_t) + MANT_W + 8 + 6 + 32;
  logic [MANT_W-1:0] q5;

  tan_recip #(.STAGES(RECIP_STAGES)) u_rcp (.clk, .d_mant(dm4), .q(q5));

  tan_delay #(.W(SB_W), .D(RECIP_STAGES), .RESET(1'b0)) u_wait (
    .clk, .rst_n,
    .din ({side4, nm4, ne4, dlz4, pio2_4}),
    .dout({side5, nm5, ne5, dlz5, pio2_5})
  );

  // ---- last core stage: multiply, round, select -------------------------
  logic [30:0] mag_c;
  logic        norm_hi_c;
  logic [31:0] r_c, r6;

  tan_mult_round u_mr (
    .n_mant(nm5), .n_exp(ne5), .q(q5), .d_lz(dlz5), .mag(mag_c), .norm_hi(norm_hi_c)
  );

  tan_out_select u_sel (
    .cls(side5.cls), .sign(side5.sign), .x(side5.x),
    .main_mag(mag_c), .pio2_word(pio2_5), .r(r_c)
  );

  always_ff @(posedge clk) r6 <= r_c;

  // ---- balancing registers up to LATENCY --------------------------------
  tan_delay #(.W(33), .D(LATENCY - CORE_STAGES), .RESET(1'b1)) u_pad (
    .clk, .rst_n, .din({vpipe[CORE_STAGES-1], r6}), .dout({out_valid, r})
  );

  initial assert (LATENCY >= CORE_STAGES)
    else $error("fp_tan: LATENCY must be at least %0d", CORE_STAGES);

  // unused on the main path but kept visible for debug
  logic unused;
  assign unused = ^{xfix1, norm_hi_c};
endmodule
