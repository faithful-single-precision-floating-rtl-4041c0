// tan_numerator: numerator n = tan(c) + tan(a) + b of the tangent identity
// tan(a+b+c) = (tan(a+b) + tan(c)) / (1 - tan(a+b) tan(c)), with tan(a+b)
// replaced by tan(a) + b (tan(b) ~ b since b < 2^-17; tan(a) tan(b) is tiny).
//
// Steps (combinational, left side of the published block diagram):
//   1. T = tan(a) + b in fixed point (LSB 2^-45, 38 bits: the sum may carry).
//      With TAB_CORR = 1 (default) T also gets the second-order term
//      tan(a)^2 * b. That term is not part of the published equations; without
//      it the result near pi/2 is off by up to about 4 ulp, because the
//      denominator's cancellation magnifies the error of tan(a+b) ~ tan(a) + b.
//      TAB_CORR = 0 gives the published equations n = tan(c) + tan(a) + b and
//      d = 1 - (tan(a) + b) tan(c) exactly.
//      T is also an output, since the denominator uses the same sum.
//   2. T is shifted right by the tan(c) exponent EC (0..19) to align it with the
//      tan(c) mantissa, which is extended by 9 guard bits.
//   3. The two are added and the 39-bit sum is normalized with a leading-zero
//      count. For c = 0 the table word is zero and the sum is T alone.
// Output: n = (n_mant / 2^35) * 2^n_exp with n_mant[35] = 1 (truncated to 36
// bits). Latency: none; the caller registers the result.
module tan_numerator
  import tan_pkg::*;
#(
  parameter bit TAB_CORR = 1'b1   // add the tan(a)^2 * b term to tan(a) + b
) (
  input  logic [TA_W-1:0]     tan_a,    // tan(a) * 2^45
  input  logic [B_W-1:0]      b,        // b * 2^35
  input  tanc_t               tan_c,
  output logic [T_W-1:0]      t_sum,    // (tan(a) + b) * 2^45
  output logic [MANT_W-1:0]   n_mant,   // 1.35
  output logic signed [7:0]   n_exp     // unbiased exponent of n
);
  localparam int unsigned NS_W = T_W + 1;             // 39
  logic [NS_W-1:0]           aligned_t, mant_c, n_sum, n_norm;
  logic [$clog2(NS_W+1)-1:0] lz;

  // tan(a + b) = tan(a) + b + tan(a)^2 b + O(2^-42): the third term is below
  // 2^-33 but the denominator cancellation near pi/2 magnifies it by up to
  // 2^15, so it is added when TAB_CORR is set. Both products are 18 x 18.
  logic [17:0] ta_hi, sq_hi;
  logic [35:0] sq, corr_full;
  logic [T_W-1:0] corr;
  assign ta_hi     = tan_a[TA_W-1 -: 18];           // LSB 2^-26
  assign sq        = 36'(ta_hi) * 36'(ta_hi);         // LSB 2^-52
  assign sq_hi     = 18'(sq >> 18);                 // LSB 2^-34
  assign corr_full = 36'(sq_hi) * 36'(b);             // LSB 2^-69
  assign corr      = TAB_CORR ? T_W'(corr_full >> 24) : T_W'(0);   // LSB 2^-45
  assign t_sum     = T_W'(tan_a) + T_W'({b, 10'b0}) + corr;
  // tan(c) mantissa LSB has weight 2^(EC-36); shifting T right by EC gives it
  // LSB weight 2^(EC-45), i.e. 9 bits below the mantissa LSB.
  assign mant_c    = NS_W'({tan_c.mant, 9'b0});
  assign aligned_t = NS_W'(t_sum >> tan_c.exp);
  assign n_sum     = mant_c + aligned_t;

  tan_lzc #(.W(NS_W)) u_lzc (.din(n_sum), .count(lz));

  assign n_norm = n_sum << lz;
  assign n_mant = MANT_W'(n_norm >> (NS_W - MANT_W));
  // n = n_sum * 2^(EC-45) = (n_norm / 2^38) * 2^(EC - 7 - lz)
  assign n_exp  = 8'(signed'({3'b0, tan_c.exp})) - 8'sd7 - 8'(signed'({2'b0, lz}));
endmodule
