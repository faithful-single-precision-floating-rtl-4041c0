// tan_denominator: denominator d = 1 - (tan(a) + b) * tan(c), normalized.
//
// Steps (combinational, right side of the published block diagram):
//   1. T = tan(a) + b (from the numerator block) is normalized with a
//      leading-zero count and truncated to a 36-bit mantissa.
//   2. That mantissa is multiplied by the 29-bit tan(c) mantissa (36 x 29).
//   3. The product is shifted back to fixed point with 40 fraction bits using
//      the local exponent (EC - leading zeros of T).
//   4. It is subtracted from 1.0 and the difference is normalized again.
// The published design relies on the cancellation in step 4 being at most a few
// bits and uses a short normalizer; this version counts leading zeros over the
// whole word, which covers the same cases. Inputs in the main range keep the
// product below 1, so d is positive (d = 1 when c = 0 or T = 0).
// Output: d = (d_mant / 2^35) * 2^-d_lz with d_mant[35] = 1.
// Latency: none; the caller registers the result.
module tan_denominator
  import tan_pkg::*;
(
  input  logic [T_W-1:0]    t_sum,   // (tan(a) + b) * 2^45
  input  tanc_t             tan_c,
  output logic [MANT_W-1:0] d_mant,  // 1.35
  output logic [5:0]        d_lz     // d = d_mant/2^35 * 2^-d_lz
);
  localparam int unsigned PM_W = MANT_W + TC_MANT_W;  // 65-bit product
  localparam int unsigned DF   = 40;                  // fraction bits of 1 - P
  localparam int unsigned D_W  = DF + 1;

  logic [$clog2(T_W+1)-1:0] lz_t;
  logic [T_W-1:0]           t_norm;
  logic [MANT_W-1:0]        t_mant;
  logic [PM_W-1:0]          prod;
  logic [7:0]               dn_shift;
  logic [D_W-1:0]           p_fix, d_fix, d_norm;
  logic [$clog2(D_W+1)-1:0] lz_d;

  tan_lzc #(.W(T_W)) u_lzc_t (.din(t_sum), .count(lz_t));

  assign t_norm = t_sum << lz_t;
  assign t_mant = MANT_W'(t_norm >> (T_W - MANT_W));
  assign prod   = PM_W'(t_mant) * PM_W'(tan_c.mant);
  // T ~ t_mant * 2^(-43-lz_t), tan(c) = mant * 2^(EC-36)
  // P * 2^40 = prod >> (39 + lz_t - EC)
  assign dn_shift = 8'd39 + 8'(lz_t) - 8'(tan_c.exp);
  assign p_fix    = D_W'(prod >> dn_shift);
  assign d_fix    = (D_W'(1) << DF) - p_fix;

  tan_lzc #(.W(D_W)) u_lzc_d (.din(d_fix), .count(lz_d));

  assign d_norm = d_fix << lz_d;
  assign d_mant = MANT_W'(d_norm >> (D_W - MANT_W));
  assign d_lz   = 6'(lz_d);
endmodule
