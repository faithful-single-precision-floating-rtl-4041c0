// tan_mult_round: final product n * (1/d), one-bit normalization and rounding to a
// binary32 magnitude.
//
// Both factors are normalized 1.35 mantissas, so their 72-bit product lies in
// [1, 4) and needs at most a one-position shift, chosen by a 2:1 multiplexer on
// the product's top bit (as in the published architecture). The 24-bit
// significand is then rounded to nearest, ties to even, with the bit below it as
// round bit and the OR of all lower bits as sticky bit; a rounding carry bumps
// the exponent. Exponent: n_exp + d_lz - 1 (the reciprocal is q/2^36) + the
// normalization bit + 127. For main-path inputs the result exponent stays well
// inside the normal range, so no overflow or underflow logic is needed here.
// Output: 31-bit magnitude {exponent, fraction}; the sign is applied later.
// Combinational; the caller registers it.
module tan_mult_round
  import tan_pkg::*;
(
  input  logic [MANT_W-1:0]  n_mant,   // numerator, 1.35
  input  logic signed [7:0]  n_exp,    // numerator exponent
  input  logic [MANT_W-1:0]  q,        // reciprocal of d_mant, 1/d_m = q/2^36
  input  logic [5:0]         d_lz,     // d = d_m * 2^-d_lz
  output logic [30:0]        mag,      // {biased exponent, fraction}
  output logic               norm_hi   // product was in [2, 4)
);
  localparam int unsigned P_W = 2 * MANT_W;   // 72
  logic [P_W-1:0]     prod;
  logic [WF:0]        sig;
  logic               rnd, sticky, inc;
  logic [WF+1:0]      sig_r;
  logic signed [9:0]  ex;

  assign prod    = P_W'(n_mant) * P_W'(q);
  assign norm_hi = prod[P_W-1];

  always_comb begin
    if (norm_hi) begin
      sig    = prod[P_W-1 -: WF+1];
      rnd    = prod[P_W-WF-2];
      sticky = |prod[P_W-WF-3:0];
    end else begin
      sig    = prod[P_W-2 -: WF+1];
      rnd    = prod[P_W-WF-3];
      sticky = |prod[P_W-WF-4:0];
    end
    inc   = rnd & (sticky | sig[0]);
    sig_r = {1'b0, sig} + (WF+2)'(inc);
    ex    = 10'(n_exp) + 10'(signed'({4'b0, d_lz})) - 10'sd1
          + 10'(signed'({9'b0, norm_hi})) + 10'(signed'({1'b0, WE'(BIAS)}));
    if (sig_r[WF+1]) begin
      ex  = ex + 10'sd1;
      mag = {ex[WE-1:0], sig_r[WF:1]};
    end else begin
      mag = {ex[WE-1:0], sig_r[WF-1:0]};
    end
  end
endmodule
